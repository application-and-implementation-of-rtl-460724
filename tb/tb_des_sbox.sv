// tb_des_sbox -- self-checking testbench for des_sbox.
//
// Instantiates all eight boxes and checks, for every box, that each of its
// four rows maps the sixteen column inputs onto 0..15 exactly once (the
// defining property of a DES S-box row), plus spot entries of the published
// tables.  Combinational: one input pattern per 1 ns step.
module tb_des_sbox;
  logic [5:0] x;
  logic [3:0] y [8];
  int checks = 0, failures = 0;

  for (genvar b = 0; b < 8; b++) begin : g_dut
    des_sbox #(.BOX(b + 1)) dut (.x(x), .y(y[b]));
  end

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
    logic [15:0] seen [8][4];
    for (int b = 0; b < 8; b++) for (int r = 0; r < 4; r++) seen[b][r] = '0;
    for (int v = 0; v < 64; v++) begin
      x = 6'(v);
      #1;
      for (int b = 0; b < 8; b++) seen[b][{x[5], x[0]}][y[b]] = 1'b1;
    end
    for (int b = 0; b < 8; b++)
      for (int r = 0; r < 4; r++)
        check(seen[b][r] == 16'hFFFF, $sformatf("S%0d row %0d is not a permutation", b + 1, r));
    // Spot entries: {input, box, expected}
    x = 6'b000000; #1; check(y[0] == 14 && y[7] == 13, "S1/S8 (000000)");
    x = 6'b111111; #1; check(y[0] == 13 && y[7] == 11, "S1/S8 (111111)");
    x = 6'b011011; #1; check(y[0] == 5, "S1 (011011) = 5");   // row 01, col 1101
    x = 6'b100001; #1; check(y[1] == 13, "S2 (100001) = 13"); // row 11, col 0000
    x = 6'b100000; #1; check(y[0] == 4 && y[5] == 9, "S1/S6 (100000), row 2");
    x = 6'b000001; #1; check(y[0] == 0 && y[5] == 10, "S1/S6 (000001), row 1");
    x = 6'b110101; #1; check(y[0] == 3 && y[7] == 9, "S1/S8 (110101), row 3 col 10");
    x = 6'b000010; #1; check(y[4] == 12 && y[6] == 11, "S5/S7 (000010)");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
