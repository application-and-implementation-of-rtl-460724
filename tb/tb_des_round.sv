// tb_des_round -- self-checking testbench for des_round, one pipeline stage.
//
// Feeds a new (L, R, K, valid) on every clock and checks, one clock later,
// L' = R, R' = L xor f(R, K) (reference model) and the valid flag, including
// the first round of the published worked example (L0 = CC00CCFF,
// R0 = F0AAF0AA, K1 = 1B02EFFC7072 gives R1 = EF4A6544).  Also checks that
// reset clears the valid flag.  10 ns clock.
module tb_des_round;
  import des_pkg::*;
  import des_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  des_stage_t d, q;
  subkey_t k;
  int checks = 0, failures = 0;

  des_round dut (.clk(clk), .rst_n(rst_n), .d(d), .k(k), .q(q));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    des_stage_t exp_q;
    d = '{valid: 1'b1, l: 32'h1, r: 32'h2};
    k = '0;
    repeat (2) @(posedge clk);
    #1 check(q.valid == 1'b0, "valid held low in reset");
    rst_n = 1'b1;
    // worked example, then random traffic with random valid
    d = '{valid: 1'b1, l: 32'hCC00CCFF, r: 32'hF0AAF0AA};
    k = 48'h1B02EFFC7072;
    for (int i = 0; i < 1000; i++) begin
      exp_q = '{valid: d.valid, l: d.r, r: d.l ^ ref_f(d.r, k)};
      @(posedge clk);
      #1;
      check(q == exp_q, $sformatf("step %0d q=%h exp %h", i, q, exp_q));
      if (i == 0) check(q.r == 32'hEF4A6544 && q.l == 32'hF0AAF0AA, "worked example R1");
      d = '{valid: 1'($urandom), l: $urandom, r: $urandom};
      k = {16'($urandom), $urandom};
    end
    rst_n = 1'b0;
    #1 check(q.valid == 1'b0, "asynchronous reset clears valid");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
