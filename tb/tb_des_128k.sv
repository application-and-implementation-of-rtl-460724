// tb_des_128k -- throughput workload: 128 KiB through the DES pipeline.
//
// Streams 16384 64-bit blocks (128 KiB) back to back through des_top under one
// key, first encrypting generated plaintext, then decrypting the collected
// ciphertext, and checks: every ciphertext block against the reference model,
// every decrypted block against the original plaintext, and that each pass
// occupies exactly 16384 + 16 clock cycles from the cycle in which the first
// block is presented to the cycle in which the last result is on dout (one
// block per clock after a 16-cycle fill).  At the 166 MHz clock the
// design targets, that is 98.8 us per pass, i.e. 64 bits x 166 MHz =
// 10.62 Gbit/s.
module tb_des_128k;
  import des_ref_pkg::*;
  localparam int NBLK = 16384;
  localparam logic [63:0] KEY = 64'h133457799BBCDFF1;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        lorun = 1'b1, in_valid = 1'b0;
  logic [63:0] key = KEY, din = '0;
  logic        out_valid;
  logic [63:0] dout;

  des_top dut (.*);

  always #3 clk = ~clk;   // 6 ns period, about 166 MHz

  logic [63:0] pt [NBLK];
  logic [63:0] ct [NBLK];
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (3 * NBLK) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One pass: feed src[] every clock, collect dst[]; returns the number of
  // clock cycles from the one in which the first block is presented to the
  // one in which the last result is on dout, both included.
  task automatic pass(input logic mode, input logic [63:0] src [NBLK],
                      output logic [63:0] dst [NBLK], output int clocks);
    int n_in, n_out;
    n_in = 0; n_out = 0; clocks = 1;
    @(negedge clk);
    lorun = mode; in_valid = 1'b1; din = src[0];
    while (n_out < NBLK) begin
      @(posedge clk);
      clocks++;
      n_in++;
      #1;
      if (out_valid) begin
        dst[n_out] = dout;
        n_out++;
      end
      @(negedge clk);
      if (n_in < NBLK) din = src[n_in];
      else in_valid = 1'b0;
    end
    in_valid = 1'b0;
  endtask

  initial begin
    int clocks;
    for (int i = 0; i < NBLK; i++) pt[i] = {$urandom, $urandom};
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    pass(1'b1, pt, ct, clocks);
    check(clocks == NBLK + 16, $sformatf("encryption pass took %0d clocks", clocks));
    $display("encryption: %0d blocks in %0d clocks", NBLK, clocks);
    for (int i = 0; i < NBLK; i++)
      check(ct[i] == ref_des(KEY, pt[i], 1'b1), $sformatf("ciphertext %0d", i));
    begin
      logic [63:0] back [NBLK];
      pass(1'b0, ct, back, clocks);
      check(clocks == NBLK + 16, $sformatf("decryption pass took %0d clocks", clocks));
      $display("decryption: %0d blocks in %0d clocks", NBLK, clocks);
      for (int i = 0; i < NBLK; i++)
        check(back[i] == pt[i], $sformatf("round trip %0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
