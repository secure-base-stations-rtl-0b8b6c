// Testbench of the fuse_key_store model: fuses start at zero, burned bits
// read as one, the lock fuse freezes the key, and burns after it change
// nothing.
module tb_fuse_key_store;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic burn = 0, locked;
  logic [8:0] burn_idx = 0;
  logic [255:0] key, expkey;

  fuse_key_store dut (.clk, .burn, .burn_idx, .key, .locked);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic do_burn(input int i);
    @(negedge clk); burn = 1; burn_idx = 9'(i); @(negedge clk); burn = 0;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    check(key == '0 && !locked, "blank after manufacture");
    expkey = '0;
    for (int n = 0; n < 40; n++) begin
      int i;
      i = $urandom % 256;
      expkey[i] = 1'b1;
      do_burn(i);
    end
    check(key == expkey, "burned bits read as one");
    do_burn(256);
    check(locked, "lock fuse burned");
    do_burn(0); do_burn(1); do_burn(255);
    check(key == expkey, "no change after lock");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
