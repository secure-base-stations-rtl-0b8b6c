// Testbench of dram_ctrl with the behavioural DRAM model (random command
// stalls): random 288-bit blocks are written and read back at random word
// addresses; the stored words must be the reference ECC encoding of the
// block's 32-bit slices in order; single flipped bits in DRAM must be
// corrected and counted, double ones reported. A write must take nine
// accepted commands.
module tb_dram_ctrl;
  import vault_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic op_valid = 0, op_ready, op_write = 0, op_done, op_uncorr;
  logic [31:0] op_addr = 0;
  logic [287:0] op_wdata = 0, op_rdata;
  logic [3:0] op_corr;
  logic cmd_valid, cmd_ready, rvalid;
  dram_cmd_t cmd;
  logic [39:0] rdata;

  dram_ctrl dut (.clk, .rst_n, .op_valid, .op_ready, .op_write, .op_addr, .op_wdata, .op_done,
    .op_rdata, .op_corr, .op_uncorr, .cmd_valid, .cmd_ready, .cmd, .rvalid, .rdata);
  dram_model #(.LATENCY(5), .STALLS(1)) mem (.clk, .cmd_valid, .cmd_ready, .cmd, .rvalid, .rdata);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic op(input logic w, input logic [31:0] a, input logic [287:0] d);
    @(negedge clk);
    while (!op_ready) @(negedge clk);
    op_valid = 1; op_write = w; op_addr = a; op_wdata = d;
    @(negedge clk); op_valid = 0;
    while (!op_done) @(negedge clk);
  endtask

  initial begin
    logic [287:0] blk;
    logic [31:0] a;
    int w0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 20; n++) begin
      blk = {$urandom, rand256()};
      a = ($urandom % 100000) * 9;
      w0 = mem.writes;
      op(1, a, blk);
      check(mem.writes - w0 == 9, "nine words written");
      for (int i = 0; i < 9; i++)
        check(mem.peek(a + i) == ecc_word(blk[32*i +: 32]), $sformatf("stored word %0d", i));
      if (n % 3 == 1) mem.flip(a + $urandom % 9, $urandom % 39);
      if (n % 3 == 2) begin mem.flip(a + 4, 3); mem.flip(a + 4, 20); end
      op(0, a, '0);
      if (n % 3 == 2) check(op_uncorr, "double error reported");
      else begin
        check(op_rdata == blk, "read back");
        check(op_corr == 4'(n % 3 == 1), $sformatf("corrected count %0d", op_corr));
        check(!op_uncorr, "no uncorrectable error");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
