// des_f -- the DES round function f(R, K) = P(S(E(R) xor K)).
//
// The 32-bit right half is expanded to 48 bits by E (fixed wiring), mixed
// with the 48-bit round key by XOR, cut into eight 6-bit groups that pass
// through S-boxes S1..S8 (S1 takes the most significant group), and the
// 32-bit result is permuted by P.  Purely combinational; the only logic is
// the XOR and the S-boxes.
module des_f
  import des_pkg::*;
(
  input  logic [31:0] r,    // right half R(i-1)
  input  subkey_t     k,    // round key K(i), standard bit 1 = k[47]
  output logic [31:0] f     // f(R, K)
);

  logic [47:0] x;
  logic [31:0] s;

  assign x = des_e(r) ^ k;

  for (genvar b = 0; b < 8; b++) begin : g_sbox
    des_sbox #(.BOX(b + 1)) u_sbox (
      .x(x[47-6*b -: 6]),
      .y(s[31-4*b -: 4])
    );
  end

  assign f = des_p(s);

endmodule
