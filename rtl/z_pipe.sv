// z_pipe: the output function z(x) of Espresso, split by two register stages.
//
// z(x) = x80 ^ x99 ^ x137 ^ x227 ^ x222 ^ x187 ^ x243 x217 ^ x247 x231
//        ^ x213 x235 ^ x255 x251 ^ x181 x239 ^ x174 x44 ^ x164 x29
//        ^ x255 x247 x243 x213 x181 x174
// The first register stage holds the six partial sums z1..z6. The second
// holds z7 = z1^z2^z3^z4 and z8 = z5^z6. The output is z = z7 ^ z8, taken
// combinationally after the second stage. That is 8 flip-flops, and z at
// clock t belongs to the state of clock t-2. This split is the cipher's own.
// The synchronous `clear`, which empties both stages, is this
// implementation's addition: the sequencer holds it during serial load, so
// the pipeline starts from zero when initialization begins.
//
// Interface: clk, rst_n (asynchronous, active low), clear, x (the NLFSR
// state, bit i = x_i), z (output bit, latency 2 clocks).
module z_pipe
  import espresso_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   clear,
  input  state_t x,
  output logic   z
);

  logic [6:1] s1;  // z1..z6
  logic [8:7] s2;  // z7, z8
  logic [6:1] s1_nxt;

  always_comb begin
    s1_nxt[1] = x[80] ^ x[99] ^ x[137] ^ x[227];
    s1_nxt[2] = x[222] ^ x[187] ^ (x[243] & x[217]);
    s1_nxt[3] = (x[247] & x[231]) ^ (x[213] & x[235]);
    s1_nxt[4] = (x[255] & x[251]) ^ (x[181] & x[239]);
    s1_nxt[5] = (x[174] & x[44]) ^ (x[164] & x[29]);
    s1_nxt[6] = (x[255] & x[247] & x[243]) & (x[213] & x[181] & x[174]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1 <= '0;
      s2 <= '0;
    end else if (clear) begin
      s1 <= '0;
      s2 <= '0;
    end else begin
      s1    <= s1_nxt;
      s2[7] <= s1[1] ^ s1[2] ^ s1[3] ^ s1[4];
      s2[8] <= s1[5] ^ s1[6];
    end
  end

  assign z = s2[7] ^ s2[8];

endmodule
