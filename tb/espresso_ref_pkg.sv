// espresso_ref_pkg: untimed reference model of Espresso for the testbenches.
//
// Written directly from the algebraic normal forms, with plain AND gates
// (no NAND/NOR rewriting, no pipelining):
//   g_step  one clock of the Galois NLFSR G, with optional feedback bits
//           for stages 255 and 217
//   z_ref   the 20-variable output function z(x)
//   f_step  one clock of the transformed Fibonacci-like NLFSR F, which
//           the cipher's analysis uses. G's stage 231 and F's stage 255
//           produce the same set of sequences, and so do G's stage 193
//           and F's stage 217. This gives an independent check of the
//           fourteen feedback functions of G.
package espresso_ref_pkg;

  typedef logic [255:0] st_t;

  function automatic st_t g_step(input st_t x, input logic fb255, input logic fb217);
    st_t n;
    for (int i = 0; i < 255; i++) n[i] = x[i+1];
    n[255] = x[0] ^ (x[41] & x[70]) ^ fb255;
    n[251] = x[252] ^ (x[42] & x[83]) ^ x[8];
    n[247] = x[248] ^ (x[44] & x[102]) ^ x[40];
    n[243] = x[244] ^ (x[43] & x[118]) ^ x[103];
    n[239] = x[240] ^ (x[46] & x[141]) ^ x[117];
    n[235] = x[236] ^ (x[67] & x[90] & x[110] & x[137]);
    n[231] = x[232] ^ (x[50] & x[159]) ^ x[189];
    n[217] = x[218] ^ (x[3] & x[32]) ^ fb217;
    n[213] = x[214] ^ (x[4] & x[45]);
    n[209] = x[210] ^ (x[6] & x[64]);
    n[205] = x[206] ^ (x[5] & x[80]);
    n[201] = x[202] ^ (x[8] & x[103]);
    n[197] = x[198] ^ (x[29] & x[52] & x[72] & x[99]);
    n[193] = x[194] ^ (x[12] & x[121]);
    return n;
  endfunction

  function automatic logic z_ref(input st_t x);
    return x[80] ^ x[99] ^ x[137] ^ x[227] ^ x[222] ^ x[187]
         ^ (x[243] & x[217]) ^ (x[247] & x[231]) ^ (x[213] & x[235])
         ^ (x[255] & x[251]) ^ (x[181] & x[239]) ^ (x[174] & x[44])
         ^ (x[164] & x[29])
         ^ (x[255] & x[247] & x[243] & x[213] & x[181] & x[174]);
  endfunction

  function automatic st_t f_step(input st_t x);
    st_t n;
    for (int i = 0; i < 255; i++) n[i] = x[i+1];
    n[255] = x[0] ^ x[12] ^ x[48] ^ x[115] ^ x[133] ^ x[213]
           ^ (x[41] & x[70]) ^ (x[46] & x[87]) ^ (x[52] & x[110])
           ^ (x[55] & x[130]) ^ (x[62] & x[157]) ^ (x[74] & x[183])
           ^ (x[87] & x[110] & x[130] & x[157]);
    n[217] = x[218] ^ (x[3] & x[32]) ^ (x[8] & x[49]) ^ (x[14] & x[72])
           ^ (x[17] & x[92]) ^ (x[24] & x[119]) ^ (x[36] & x[145])
           ^ (x[49] & x[72] & x[92] & x[119]);
    return n;
  endfunction

endpackage
