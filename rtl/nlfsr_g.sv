// nlfsr_g: the 256-stage Galois NLFSR G at the heart of Espresso.
//
// Every clock each stage i takes the value of its feedback function g_i.
// Fourteen stages (255, 251, 247, 243, 239, 235, 231, 217, 213, 209, 205,
// 201, 197, 193) have non-trivial functions. All other stages shift,
// x_i <= x_{i+1}. The functions are the cipher's. Following its hardware
// section, the 4-input products of g235 and g197 are written as the NOR of
// two NANDs. During initialization the registered output bit is XORed into
// stages 255 (fb255) and 217 (fb217). Both inputs come from init_switch and
// are zero otherwise.
//
// Loading is serial, the way the cipher's latency figure counts it (256 load
// clocks). While `load` is high all feedback terms are suppressed, the chain
// shifts plainly, and `din` enters stage 255. After 256 load clocks, the bit
// shifted in first sits in stage 0. Gating the feedback off during load is
// this implementation's choice. So are the reset value (all zero) and the
// absence of a clock enable: the register runs on every clock.
//
// Interface: clk, rst_n (asynchronous, active low), load, din, fb255, fb217.
// `state` is the current register contents, bit i = x_i.
module nlfsr_g
  import espresso_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   load,
  input  logic   din,
  input  logic   fb255,
  input  logic   fb217,
  output state_t state
);

  state_t x, nxt;
  assign state = x;

  always_comb begin
    // g_i(x) = x_{i+1} unless listed below
    nxt = {1'b0, x[STATE_BITS-1:1]};
    nxt[255] = x[0]   ^ (x[41] & x[70]) ^ fb255;
    nxt[251] = x[252] ^ (x[42] & x[83])  ^ x[8];
    nxt[247] = x[248] ^ (x[44] & x[102]) ^ x[40];
    nxt[243] = x[244] ^ (x[43] & x[118]) ^ x[103];
    nxt[239] = x[240] ^ (x[46] & x[141]) ^ x[117];
    nxt[235] = x[236] ^ ~(~(x[67] & x[90]) | ~(x[110] & x[137]));
    nxt[231] = x[232] ^ (x[50] & x[159]) ^ x[189];
    nxt[217] = x[218] ^ (x[3]  & x[32])  ^ fb217;
    nxt[213] = x[214] ^ (x[4]  & x[45]);
    nxt[209] = x[210] ^ (x[6]  & x[64]);
    nxt[205] = x[206] ^ (x[5]  & x[80]);
    nxt[201] = x[202] ^ (x[8]  & x[103]);
    nxt[197] = x[198] ^ ~(~(x[29] & x[52]) | ~(x[72] & x[99]));
    nxt[193] = x[194] ^ (x[12] & x[121]);
    if (load) nxt = {din, x[STATE_BITS-1:1]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) x <= '0;
    else        x <= nxt;
  end

endmodule
