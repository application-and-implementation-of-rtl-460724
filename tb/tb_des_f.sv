// tb_des_f -- self-checking testbench for des_f, the round function.
//
// Checks the first round of the widely published worked example (key
// 133457799BBCDFF1, plaintext 0123456789ABCDEF: R0 = F0AAF0AA,
// K1 = 1B02EFFC7072, f = 234AA9BB) and 2000 random (R, K) pairs against the
// reference model.  Combinational: one pair per 1 ns step.
module tb_des_f;
  import des_ref_pkg::*;
  logic [31:0] r, f;
  logic [47:0] k;
  int checks = 0, failures = 0;

  des_f dut (.r(r), .k(k), .f(f));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    r = 32'hF0AAF0AA; k = 48'h1B02EFFC7072; #1;
    check(f == 32'h234AA9BB, $sformatf("worked example f=%h", f));
    for (int i = 0; i < 2000; i++) begin
      r = $urandom;
      k = {16'($urandom), $urandom};
      #1;
      check(f == ref_f(r, k), $sformatf("f(%h,%h)=%h exp %h", r, k, f, ref_f(r, k)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
