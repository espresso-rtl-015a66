// espresso_pkg: constants and types shared by the Espresso keystream generator.
//
// Espresso keeps its whole state in one 256-stage Galois NLFSR. A 128-bit key
// and a 96-bit IV fill stages 0..223. Stages 224..254 are padded with ones
// and stage 255 with zero. The state size, the key and IV lengths, the padding
// and the 256 initialization clocks all follow the cipher's specification.
// The phase encoding and the serial-load order are choices of this
// implementation.
package espresso_pkg;

  localparam int unsigned STATE_BITS  = 256;  // stages x0..x255 of NLFSR G
  localparam int unsigned KEY_BITS    = 128;  // k0..k127 -> x0..x127
  localparam int unsigned IV_BITS     = 96;   // IV0..IV95 -> x128..x223
  localparam int unsigned KIV_BITS    = KEY_BITS + IV_BITS;  // 224 external bits
  localparam int unsigned INIT_CLOCKS = 256;  // initialization clocks
  // Extra clocks before the first keystream bit: two for the register
  // stages of z(x) and one for the register that switches between phases.
  localparam int unsigned WARM_CLOCKS = 3;

  typedef logic [STATE_BITS-1:0] state_t;

  // Sequencer phases.
  typedef enum logic [2:0] {
    PH_IDLE = 3'd0,  // after reset, nothing loaded
    PH_LOAD = 3'd1,  // 256 clocks of serial load into stage 255
    PH_INIT = 3'd2,  // z(x) fed back into stages 255 and 217
    PH_WARM = 3'd3,  // pipeline refills, output not yet valid
    PH_KS   = 3'd4   // one keystream bit per clock
  } phase_e;

  // Constant loaded into stage idx (KIV_BITS <= idx < STATE_BITS):
  // one for stages 224..254, zero for stage 255.
  function automatic logic pad_bit(input logic [7:0] idx);
    return (idx != 8'(STATE_BITS - 1));
  endfunction

endpackage
