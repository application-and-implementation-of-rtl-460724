// des_ref_pkg -- behavioural DES reference model for the testbenches.
//
// A plain, loop-based software model of DES that follows the standard step by
// step: PC-1, sixteen rounds of left rotations of C and D with PC-2, and
// sixteen Feistel rounds, then the swap and IP^-1.  It shares only the
// standard's tables with the RTL; the tables themselves are checked by the
// published known-answer vectors in the testbenches.  Bits are addressed in
// the standard's 1-based, most-significant-first numbering through get_bit().
package des_ref_pkg;
  import des_pkg::*;

  function automatic logic get_bit(input logic [63:0] v, input int width, input int n);
    return v[width-n];
  endfunction

  // Round keys K1..K16 by iterated rotation (not the folded wiring of the RTL).
  function automatic void ref_subkeys(input logic [63:0] key, output logic [47:0] ks [16]);
    logic [27:0] c, d;
    logic [55:0] cd;
    for (int i = 1; i <= 28; i++) begin
      c[28-i] = get_bit(key, 64, PC1_T[i-1]);
      d[28-i] = get_bit(key, 64, PC1_T[i+27]);
    end
    for (int rn = 0; rn < 16; rn++) begin
      for (int s = 0; s < SHIFT_T[rn]; s++) begin
        c = {c[26:0], c[27]};
        d = {d[26:0], d[27]};
      end
      cd = {c, d};
      for (int i = 1; i <= 48; i++) ks[rn][48-i] = get_bit({8'h0, cd}, 56, PC2_T[i-1]);
    end
  endfunction

  function automatic logic [31:0] ref_f(input logic [31:0] r, input logic [47:0] k);
    logic [47:0] x;
    logic [31:0] s, y;
    int row, col;
    for (int i = 1; i <= 48; i++) x[48-i] = get_bit({32'h0, r}, 32, E_T[i-1]);
    x = x ^ k;
    for (int b = 0; b < 8; b++) begin
      row = 2 * int'(x[47-6*b]) + int'(x[42-6*b]);
      col = int'(x[46-6*b -: 4]);
      s[31-4*b -: 4] = SBOX_T[b][row*16 + col];
    end
    for (int i = 1; i <= 32; i++) y[32-i] = get_bit({32'h0, s}, 32, P_T[i-1]);
    return y;
  endfunction

  function automatic logic [63:0] ref_des(input logic [63:0] key, input logic [63:0] blk,
                                          input logic encrypt);
    logic [47:0] ks [16];
    logic [63:0] t, o;
    logic [31:0] l, r, nr;
    ref_subkeys(key, ks);
    for (int i = 1; i <= 64; i++) t[64-i] = get_bit(blk, 64, IP_T[i-1]);
    l = t[63:32];
    r = t[31:0];
    for (int rn = 0; rn < 16; rn++) begin
      nr = l ^ ref_f(r, encrypt ? ks[rn] : ks[15-rn]);
      l  = r;
      r  = nr;
    end
    t = {r, l};
    for (int i = 1; i <= 64; i++) o[64-i] = get_bit(t, 64, FP_T[i-1]);
    return o;
  endfunction

endpackage
