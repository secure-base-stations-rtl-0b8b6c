// Testbench of ecc_decoder: reference-encoded words pass unchanged; every
// single flipped bit (data, check or parity) is corrected and flagged as
// corrected; pairs of flipped bits are flagged uncorrectable.
module tb_ecc_decoder;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [39:0] word;
  logic [31:0] data;
  logic corrected, uncorrectable;

  ecc_decoder dut (.word, .data, .corrected, .uncorrectable);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    logic [39:0] good;
    int a, b;
    for (int n = 0; n < 40; n++) begin
      d = $urandom;
      good = ecc_word(d);
      word = good; #1;
      check(data == d && !corrected && !uncorrectable, "clean word");
      for (int i = 0; i < 39; i++) begin
        word = good; word[i] = ~word[i]; #1;
        check(data == d && corrected && !uncorrectable, $sformatf("single error bit %0d", i));
      end
      a = $urandom % 39;
      b = (a + 1 + $urandom % 38) % 39;
      word = good; word[a] = ~word[a]; word[b] = ~word[b]; #1;
      check(uncorrectable && !corrected, $sformatf("double error bits %0d %0d", a, b));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
