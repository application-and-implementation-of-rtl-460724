// tb_des_subkey -- self-checking testbench for des_subkey.
//
// Presents a new random key and mode on every clock and checks that output
// k[i] equals round key K(i+1) (encryption) or K(16-i) (decryption) of the key
// and mode presented i clocks earlier, as computed by the reference model's
// iterated rotations.  Also checks K1 and K16 of the published worked example
// key 133457799BBCDFF1 (1B02EFFC7072 and CB3D8B0E17F5).  10 ns clock.
module tb_des_subkey;
  import des_pkg::*;
  import des_ref_pkg::*;
  logic clk = 1'b0;
  logic [63:0] key;
  logic encrypt;
  subkey_t k [ROUNDS];
  logic [63:0] key_hist [ROUNDS];
  logic        enc_hist [ROUNDS];
  int checks = 0, failures = 0;

  des_subkey dut (.clk(clk), .key(key), .encrypt(encrypt), .k(k));

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
    logic [47:0] ks [16];
    key = 64'h133457799BBCDFF1; encrypt = 1'b1; #1;
    check(k[0] == 48'h1B02EFFC7072, $sformatf("worked example K1 = %h", k[0]));
    encrypt = 1'b0; #1;
    check(k[0] == 48'hCB3D8B0E17F5, $sformatf("worked example K16 first when decrypting = %h", k[0]));
    for (int cyc = 0; cyc < 1000; cyc++) begin
      @(negedge clk);
      key = {$urandom, $urandom};
      encrypt = 1'($urandom);
      for (int i = ROUNDS - 1; i > 0; i--) begin
        key_hist[i] = key_hist[i-1];
        enc_hist[i] = enc_hist[i-1];
      end
      key_hist[0] = key;
      enc_hist[0] = encrypt;
      #1;
      if (cyc >= ROUNDS) begin
        for (int i = 0; i < ROUNDS; i++) begin
          ref_subkeys(key_hist[i], ks);
          check(k[i] == (enc_hist[i] ? ks[i] : ks[15-i]),
                $sformatf("cycle %0d k[%0d]=%h", cyc, i, k[i]));
        end
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
