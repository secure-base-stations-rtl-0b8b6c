// Testbench of addr_expand: the DRAM word address of block b must be 9*b,
// for corner and random byte addresses (low five bits ignored).
module tb_addr_expand;
  int checks = 0, failures = 0;
  logic [31:0] log_addr, phys_word;

  addr_expand dut (.log_addr, .phys_word);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned exp;
    for (int n = 0; n < 200; n++) begin
      log_addr = (n == 0) ? 32'h0 : (n == 1) ? 32'h20 : (n == 2) ? 32'h3f : (n == 3) ? 32'h07ff_ffe0 : $urandom;
      #1;
      exp = 64'(log_addr >> 5) * 9;
      check(phys_word == 32'(exp), $sformatf("addr %h -> %h exp %h", log_addr, phys_word, exp));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
