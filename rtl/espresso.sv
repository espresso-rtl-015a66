// espresso: the Espresso stream cipher, one keystream bit per clock.
//
// Espresso is a filter generator built on a Galois NLFSR. The Galois form
// keeps each feedback function small, so the critical path is two XORs and
// a flip-flop. The register G is equivalent to a Fibonacci-like NLFSR F,
// which is how the cipher is analysed. The datapath has three parts:
//   nlfsr_g      256-stage Galois NLFSR holding the whole state
//   z_pipe       output function z(x), two register stages, z = z7 ^ z8
//   init_switch  two copies; z AND init, registered, into g255 and g217
// espresso_ctrl sequences serial load, initialization, warm-up and keystream.
//
// Usage: pulse `start` for one clock. On every following clock where
// kiv_req is high, present the next key/IV bit on kiv_bit: k0..k127, then
// IV0..IV95, 224 bits in all. The sequencer loads the padding and runs
// INIT_ROUNDS clocks of initialization, during which z is fed back through
// a one-clock register. Three more clocks follow. Then ks_valid rises and
// ks_bit carries one keystream bit per clock until the next start. The
// first keystream bit comes 515 clocks after the first load clock.
//
// Because of the pipeline, the bit fed back at initialization clock n is
// z of the state three clocks earlier. The output pipeline is cleared
// during load, so the first two bits fed back are zero. The keystream is
// the output of this pipelined circuit. Component structure and phase
// lengths follow the cipher; load ordering, the clear and the interface
// are this implementation's.
module espresso
  import espresso_pkg::*;
#(
  parameter int unsigned INIT_ROUNDS = INIT_CLOCKS
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,     // begin a new key/IV setup (any time)
  input  logic kiv_bit,   // serial key/IV bit, taken when kiv_req is high
  output logic kiv_req,
  output logic ks_bit,    // keystream bit
  output logic ks_valid,  // ks_bit is valid
  output logic busy       // load, initialization or warm-up in progress
);

  phase_e phase;
  logic   load, pad, init, z, fb255, fb217, din;
  state_t x;

  espresso_ctrl #(.INIT_ROUNDS(INIT_ROUNDS)) u_ctrl (
    .clk, .rst_n, .start, .phase, .load, .kiv_req, .pad, .init, .ks_valid
  );

  assign din = kiv_req ? kiv_bit : pad;

  nlfsr_g u_g (
    .clk, .rst_n, .load, .din, .fb255, .fb217, .state(x)
  );

  z_pipe u_z (
    .clk, .rst_n, .clear(load), .x, .z
  );

  init_switch u_sw255 (.clk, .rst_n, .z, .init, .fb(fb255));
  init_switch u_sw217 (.clk, .rst_n, .z, .init, .fb(fb217));

  assign ks_bit = z;
  assign busy   = (phase == PH_LOAD) || (phase == PH_INIT) || (phase == PH_WARM);

  // Keystream is never flagged valid while a setup is in progress, and the
  // external key/IV bit is only requested during load.
  a_valid_not_busy: assert property (@(posedge clk) disable iff (!rst_n) !(ks_valid && busy));
  a_req_in_load:    assert property (@(posedge clk) disable iff (!rst_n) kiv_req |-> load);

endmodule
