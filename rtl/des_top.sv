// des_top -- 16-stage pipelined DES encryption/decryption module.
//
// A 64-bit block enters with its key and its mode on every clock.  The
// initial permutation IP splits it into halves L0, R0; sixteen des_round
// stages, one register each, perform the sixteen Feistel iterations; the
// halves of the last stage are swapped (R16 L16) and the final permutation
// IP^-1 gives the result.  IP, the swap and IP^-1 are wiring.  des_subkey
// supplies each stage with its round key, delayed through registers so that
// it meets the block it belongs to.  Decryption is the same pipeline with the
// round keys in reverse order.
//
// Interface: lorun = 1 encrypts and lorun = 0 decrypts (per block); in_valid
// marks a block on din with its key; out_valid marks the result on dout.
// Timing: a block presented in clock cycle n (sampled at the rising edge that
// ends it) is on dout in cycle n+16: 16 cycles of latency, one register per
// round.  One block leaves per clock, so the throughput is 64 bits per clock.  There is no back-pressure: the pipeline
// never stalls.  rst_n (active low, asynchronous) clears the valid flags only.
//
// The one-register-per-round pipeline, the 16-cycle latency, the precomputed
// and register-delayed round keys and the encrypt/decrypt select follow the
// published design.  The valid flags, the reset scope and the mode being
// carried per block are choices of this implementation.
module des_top
  import des_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        lorun,      // 1: encrypt, 0: decrypt
  input  logic        in_valid,
  input  logic [63:0] key,
  input  logic [63:0] din,
  output logic        out_valid,
  output logic [63:0] dout
);

  des_stage_t st [ROUNDS+1];
  subkey_t    k  [ROUNDS];

  des_subkey u_subkey (.clk(clk), .key(key), .encrypt(lorun), .k(k));

  assign st[0].valid       = in_valid;
  assign {st[0].l, st[0].r} = des_ip(din);

  for (genvar rn = 0; rn < ROUNDS; rn++) begin : g_round
    des_round u_round (.clk(clk), .rst_n(rst_n), .d(st[rn]), .k(k[rn]), .q(st[rn+1]));
  end

  assign out_valid = st[ROUNDS].valid;
  assign dout      = des_fp({st[ROUNDS].r, st[ROUNDS].l});

  // Every accepted block leaves exactly ROUNDS clocks later.
  a_latency: assert property (@(posedge clk) disable iff (!rst_n)
                              in_valid |-> ##16 out_valid);

endmodule
