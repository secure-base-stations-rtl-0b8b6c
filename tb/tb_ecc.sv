// Testbench of ecc_encoder: the 40-bit word for random and corner-case data
// must equal the reference SEC-DED encoding, and every check bit must be able
// to change.
module tb_ecc;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [31:0] data;
  logic [39:0] word;
  logic [6:0]  seen_one;

  ecc_encoder dut (.data, .word);

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
    seen_one = '0;
    for (int n = 0; n < 300; n++) begin
      data = (n == 0) ? 32'h0 : (n == 1) ? 32'hffffffff : (n < 34) ? (32'h1 << (n - 2)) : $urandom;
      #1;
      check(word == ecc_word(data), $sformatf("data %h word %h exp %h", data, word, ecc_word(data)));
      seen_one |= word[38:32];
    end
    check(seen_one == 7'h7f, "all check bits toggled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
