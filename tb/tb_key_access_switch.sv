// Testbench of key_access_switch: the key passes after hard reset, is cut
// off from the cycle after throw, stays cut off whatever throw does later,
// and is available again only after another hard reset.
module tb_key_access_switch;
  logic clk = 0, hard_rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic throw = 0, allowed;
  logic [255:0] key_in, key_out;

  key_access_switch dut (.clk, .hard_rst_n, .throw, .key_in, .allowed, .key_out);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    key_in = {8{32'hdeadbeef}} ^ 256'h1234;
    for (int pass = 0; pass < 2; pass++) begin
      hard_rst_n = 0; repeat (2) @(negedge clk); hard_rst_n = 1;
      repeat (3) @(negedge clk);
      check(allowed && key_out == key_in, "key readable after hard reset");
      throw = 1; #1;
      check(allowed, "still open in the throw cycle");
      @(negedge clk); throw = 0;
      check(!allowed && key_out == '0, "closed after throw");
      repeat (5) @(negedge clk);
      check(!allowed && key_out == '0, "stays closed");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
