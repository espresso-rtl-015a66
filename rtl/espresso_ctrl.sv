// espresso_ctrl: phase sequencer of the Espresso keystream generator.
//
// A `start` pulse, accepted in any phase, begins a new key/IV setup.
//   LOAD : 256 clocks. For the first 224, kiv_req is high and the caller's
//          serial key/IV bit is shifted into the NLFSR (k0 first, IV95 last).
//          For the last 32, the sequencer supplies the padding itself
//          (31 ones, then one zero). The output pipeline is held cleared.
//   INIT : INIT_ROUNDS clocks (256 in the cipher). `init` is high, so the
//          output bit is fed back into stages 255 and 217.
//   WARM : 3 clocks while the last fed-back bit enters the state and the
//          output pipeline refills.
//   KS   : ks_valid stays high; one keystream bit per clock.
// So the first valid keystream bit comes 256 + 256 + 3 = 515 clocks after
// the first LOAD clock, the latency the cipher's hardware analysis counts.
// The phase lengths are the cipher's. The serial-load interface, the
// start/restart behaviour and the single shared counter are this
// implementation's choices.
//
// Interface: clk, rst_n (asynchronous, active low), start. Outputs are
// decoded from the registered phase and counter; none is registered itself.
module espresso_ctrl
  import espresso_pkg::*;
#(
  parameter int unsigned INIT_ROUNDS = INIT_CLOCKS
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  output phase_e phase,
  output logic   load,      // NLFSR in serial-load mode
  output logic   kiv_req,   // external key/IV bit is taken this clock
  output logic   pad,       // padding bit to load when kiv_req is low
  output logic   init,      // initialization feedback enabled
  output logic   ks_valid   // z output is a keystream bit
);

  logic [8:0] cnt;
  phase_e     ph;

  assign phase    = ph;
  assign load     = (ph == PH_LOAD);
  assign kiv_req  = load && (cnt < 9'(KIV_BITS));
  assign pad      = pad_bit(cnt[7:0]);
  assign init     = (ph == PH_INIT);
  assign ks_valid = (ph == PH_KS);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ph  <= PH_IDLE;
      cnt <= '0;
    end else if (start) begin
      ph  <= PH_LOAD;
      cnt <= '0;
    end else begin
      unique case (ph)
        PH_LOAD: begin
          if (cnt == 9'(STATE_BITS - 1)) begin
            ph  <= PH_INIT;
            cnt <= '0;
          end else cnt <= cnt + 9'd1;
        end
        PH_INIT: begin
          if (cnt == 9'(INIT_ROUNDS - 1)) begin
            ph  <= PH_WARM;
            cnt <= '0;
          end else cnt <= cnt + 9'd1;
        end
        PH_WARM: begin
          if (cnt == 9'(WARM_CLOCKS - 1)) begin
            ph  <= PH_KS;
            cnt <= '0;
          end else cnt <= cnt + 9'd1;
        end
        default: ;  // IDLE and KS hold until the next start
      endcase
    end
  end

  // INIT_ROUNDS must fit the 9-bit counter.
  initial assert (INIT_ROUNDS >= 1 && INIT_ROUNDS <= 512)
    else $error("espresso_ctrl: INIT_ROUNDS out of range");

endmodule
