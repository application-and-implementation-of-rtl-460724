// des_round -- one stage of the 16-stage DES pipeline.
//
// A stage performs one Feistel iteration and registers the result:
//   L(i) = R(i-1),  R(i) = L(i-1) xor f(R(i-1), K(i)).
// It is built from the round function (des_f), an XOR and the stage register,
// as in the iteration diagram of the design.  Encryption and decryption use
// the same stage; only the order in which round keys arrive differs.
//
// Timing: one clock of latency, a new block every clock.  The valid flag
// travels with the halves and is the only reset state (active-low
// asynchronous rst_n); the data registers need no reset.
module des_round
  import des_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  des_stage_t d,     // L(i-1), R(i-1) and valid
  input  subkey_t    k,     // K(i), aligned with d
  output des_stage_t q      // L(i), R(i) and valid, one clock later
);

  logic [31:0] f;
  logic        valid_q;
  logic [31:0] l_q, r_q;

  des_f u_f (.r(d.r), .k(k), .f(f));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) valid_q <= 1'b0;
    else        valid_q <= d.valid;
  end

  always_ff @(posedge clk) begin
    l_q <= d.r;
    r_q <= d.l ^ f;
  end

  assign q = '{valid: valid_q, l: l_q, r: r_q};

endmodule
