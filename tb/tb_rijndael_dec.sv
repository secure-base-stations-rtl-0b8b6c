// Testbench of rijndael_dec. An AES-sized instance (NB=4) must turn the
// FIPS-197 AES-256 ciphertext back into its plaintext; the 288-bit instance
// (NB=9) must invert the reference encryption of random blocks under random
// keys. Latency from start to done must be NR cycles.
module tb_rijndael_dec;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [31:0] w4 [200], w9 [200];
  logic s4, b4, d4, s9, b9, d9;
  logic [127:0] din4, rk4, dout4;
  logic [287:0] din9, rk9, dout9;
  logic [3:0] r4, r9;

  rijndael_dec #(.NB(4), .NK(8)) dut4 (.clk, .rst_n, .start(s4), .din(din4), .rk_round(r4),
    .rk(rk4), .busy(b4), .done(d4), .dout(dout4));
  rijndael_dec dut9 (.clk, .rst_n, .start(s9), .din(din9), .rk_round(r9),
    .rk(rk9), .busy(b9), .done(d9), .dout(dout9));

  always_comb rk4 = round_key(4, w4, int'(r4))[127:0];
  always_comb rk9 = round_key(9, w9, int'(r9));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [255:0] key;
    logic [287:0] pt;
    int cyc;
    s4 = 0; s9 = 0; din4 = 0; din9 = 0;
    key = 256'h000102030405060708090a0b0c0d0e0f101112131415161718191a1b1c1d1e1f;
    expand(4, 8, key, w4);
    expand(9, 8, key, w9);
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    @(negedge clk); din4 = 128'h8ea2b7ca516745bfeafc49904b496089;
    @(negedge clk); s4 = 1; @(negedge clk); s4 = 0;
    cyc = 0;
    while (!d4) begin @(negedge clk); cyc++; end
    check(dout4 == 128'h00112233445566778899aabbccddeeff, $sformatf("AES-256 inverse got %h", dout4));
    check(cyc == 14, $sformatf("NB=4 latency %0d", cyc));
    for (int n = 0; n < 12; n++) begin
      key = rand256();
      expand(9, 8, key, w9);
      pt = {$urandom, rand256()};
      @(posedge clk);
      @(negedge clk); din9 = encrypt(9, 8, key, pt); s9 = 1; @(negedge clk); s9 = 0;
      cyc = 0;
      while (!d9) begin @(negedge clk); cyc++; end
      check(dout9 == pt, $sformatf("NB=9 block %0d", n));
      check(cyc == 15, $sformatf("NB=9 latency %0d", cyc));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
