// tb_des_top -- end-to-end testbench of the 16-stage DES pipeline (des_top),
// at its only configuration.
//
// Phases, all checked by a scoreboard against the reference model and the
// published known-answer vectors, with the latency of every block (16 clocks)
// and the ordering checked too:
//   1. known answers, encryption and decryption (e.g. key 0, block 0 gives
//      8CA64DE9C1B123A7 either way);
//   2. the counter test: a counter drives both key and plaintext, one block
//      per clock, first in encryption and then in decryption mode;
//   3. random blocks back to back with the mode switched at random per block;
//   4. random blocks with random gaps (bubbles) in in_valid;
//   5. a reset in the middle of traffic, which must drop the blocks in flight.
// Events counted, each of which must happen at least once: encryptions,
// decryptions, mode switches between consecutive blocks, bubbles, runs of 16
// consecutive output clocks (full pipeline), and blocks dropped by reset.
module tb_des_top;
  import des_ref_pkg::*;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic        lorun = 1'b1, in_valid = 1'b0;
  logic [63:0] key = '0, din = '0;
  logic        out_valid;
  logic [63:0] dout;

  des_top dut (.*);

  always #5 clk = ~clk;

  typedef struct {
    logic [63:0] exp;
    longint      cyc;
  } item_t;
  item_t  sb [$];
  longint cycle = 0;
  int checks = 0, failures = 0;
  int n_enc = 0, n_dec = 0, n_switch = 0, n_bubble = 0, n_full = 0, n_dropped = 0;
  int out_run = 0;
  logic last_mode = 1'b1;
  bit   have_last = 1'b0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Scoreboard: sample at each rising edge.
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n && in_valid) begin
      sb.push_back('{exp: ref_des(key, din, lorun), cyc: cycle});
      if (lorun) n_enc++; else n_dec++;
      if (have_last && last_mode != lorun) n_switch++;
      last_mode <= lorun;
      have_last <= 1'b1;
    end
    if (rst_n && !in_valid && have_last) n_bubble++;
    if (rst_n && out_valid) begin
      out_run <= out_run + 1;
      if (out_run + 1 == 16) n_full++;
      if (sb.size() == 0) check(1'b0, "output with no block in flight");
      else begin
        item_t it;
        it = sb.pop_front();
        check(dout == it.exp, $sformatf("dout=%h exp %h", dout, it.exp));
        check(cycle - it.cyc == 16, $sformatf("latency %0d", cycle - it.cyc));
      end
    end else out_run <= 0;
  end

  task automatic send(input logic [63:0] k, input logic [63:0] d, input logic mode);
    @(negedge clk);
    key = k; din = d; lorun = mode; in_valid = 1'b1;
  endtask

  task automatic idle(input int n);
    @(negedge clk);
    in_valid = 1'b0;
    repeat (n - 1) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // 1. known answers, directly against published values
    begin
      logic [63:0] kat [10][3] = '{
        '{64'h0000000000000000, 64'h0000000000000000, 64'h8CA64DE9C1B123A7},
        '{64'hFFFFFFFFFFFFFFFF, 64'hFFFFFFFFFFFFFFFF, 64'h7359B2163E4EDC58},
        '{64'h3000000000000000, 64'h1000000000000001, 64'h958E6E627A05557B},
        '{64'h1111111111111111, 64'h1111111111111111, 64'hF40379AB9E0EC533},
        '{64'h0123456789ABCDEF, 64'h1111111111111111, 64'h17668DFC7292532D},
        '{64'h1111111111111111, 64'h0123456789ABCDEF, 64'h8A5AE1F81AB8F2DD},
        '{64'hFEDCBA9876543210, 64'h0123456789ABCDEF, 64'hED39D950FA74BCC4},
        '{64'h133457799BBCDFF1, 64'h0123456789ABCDEF, 64'h85E813540F0AB405},
        '{64'h0E329232EA6D0D73, 64'h8787878787878787, 64'h0000000000000000},
        '{64'h7CA110454A1A6E57, 64'h01A1D6D039776742, 64'h690F5B0D9A26939B}};
      for (int i = 0; i < 10; i++) send(kat[i][0], kat[i][1], 1'b1);
      for (int i = 0; i < 10; i++) send(kat[i][0], kat[i][2], 1'b0);
      for (int i = 0; i < 10; i++)
        check(ref_des(kat[i][0], kat[i][1], 1'b1) == kat[i][2], $sformatf("reference KAT %0d", i));
    end
    idle(20);
    // 2. counter test: the same counter value is key and plaintext
    for (int m = 1; m >= 0; m--) begin
      for (int c = 0; c < 40; c++) send(64'(c), 64'(c), 1'(m));
      idle(20);
    end
    // 3. back-to-back random traffic, random mode per block
    for (int i = 0; i < 300; i++) send({$urandom, $urandom}, {$urandom, $urandom}, 1'($urandom));
    // 4. random bubbles
    for (int i = 0; i < 300; i++) begin
      if ($urandom_range(0, 2) == 0) idle($urandom_range(1, 3));
      send({$urandom, $urandom}, {$urandom, $urandom}, 1'($urandom));
    end
    // 5. reset with blocks in flight
    for (int i = 0; i < 10; i++) send({$urandom, $urandom}, {$urandom, $urandom}, 1'b1);
    @(negedge clk);
    in_valid = 1'b0;
    rst_n = 1'b0;
    n_dropped = sb.size();
    sb.delete();
    #1 check(out_valid == 1'b0, "reset clears the pipeline");
    @(negedge clk);
    rst_n = 1'b1;
    repeat (20) begin
      @(posedge clk); #1;
      check(out_valid == 1'b0, "no output after reset");
    end
    for (int i = 0; i < 5; i++) send({$urandom, $urandom}, {$urandom, $urandom}, 1'b0);
    idle(20);
    check(sb.size() == 0, "all blocks delivered");
    $display("events: enc=%0d dec=%0d switch=%0d bubble=%0d full=%0d dropped=%0d",
             n_enc, n_dec, n_switch, n_bubble, n_full, n_dropped);
    check(n_enc > 0, "encryption happened");
    check(n_dec > 0, "decryption happened");
    check(n_switch > 0, "mode switch happened");
    check(n_bubble > 0, "bubble happened");
    check(n_full > 0, "pipeline ran full");
    check(n_dropped > 0, "reset dropped blocks in flight");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
