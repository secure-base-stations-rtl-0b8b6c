// Testbench of bus_interface, with a write_buffer behind it and the
// testbench acting as the encryption logic: it drains the buffer into a
// memory model (backfilling partial entries) and answers read misses after a
// delay. Random secure and non-secure reads and writes to a few blocks are
// checked against a model of what memory should hold. Also checked: refused
// non-secure requests, one-cycle responses for writes and buffer hits, that
// misses go out with the block address, and that each case occurred.
module tb_bus_interface;
  import vault_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic req_valid = 0, req_ready, rsp_valid;
  mem_req_t req = '0;
  mem_rsp_t rsp;
  logic [TAG_W-1:0] wb_tag, b_tag;
  logic wb_hit, wb_hit_busy, wb_full, wb_wr, b_valid, b_take = 0, b_fill = 0, b_pop = 0, empty;
  logic [31:0] wb_hit_be, wb_be, b_be;
  logic [255:0] wb_hit_data, wb_wdata, b_data, b_fill_data = 0;
  logic miss_valid, miss_done = 0, miss_err = 0;
  logic [31:0] miss_addr;
  logic [255:0] miss_data = 0;

  bus_interface dut (.clk, .rst_n, .req_valid, .req_ready, .req, .rsp_valid, .rsp,
    .wb_tag, .wb_hit, .wb_hit_busy, .wb_hit_be, .wb_hit_data, .wb_full, .wb_wr, .wb_be, .wb_wdata,
    .miss_valid, .miss_addr, .miss_done, .miss_data, .miss_err);
  write_buffer #(.DEPTH(2)) wb (.clk, .rst_n, .a_tag(wb_tag), .a_hit(wb_hit), .a_hit_busy(wb_hit_busy),
    .a_hit_be(wb_hit_be), .a_hit_data(wb_hit_data), .full(wb_full), .a_wr(wb_wr), .a_be(wb_be),
    .a_wdata(wb_wdata), .b_valid, .b_tag, .b_be, .b_data, .b_take, .b_fill, .b_fill_data, .b_pop, .empty);

  logic [255:0] mem [8];       // what DRAM holds
  logic [255:0] view [8];      // what a read must return
  int n_refused = 0, n_hit = 0, n_miss = 0, n_wr = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // encryption-logic stand-in: misses have priority, then drain the buffer
  initial begin
    forever begin
      @(negedge clk);
      if (!rst_n) continue;
      if (miss_valid) begin
        check(miss_addr[4:0] == 0, "miss address is block aligned");
        repeat (4 + $urandom % 6) @(negedge clk);
        miss_data = mem[miss_addr[7:5]];
        miss_err  = (miss_addr[7:5] == 3'd7);   // block 7 plays a tampered block
        miss_done = 1; @(negedge clk); miss_done = 0;
      end else if (b_valid && ($urandom % 3 == 0)) begin
        b_take = 1; @(negedge clk); b_take = 0;
        repeat ($urandom % 4) @(negedge clk);
        if (b_be != '1) begin
          b_fill = 1; b_fill_data = mem[b_tag[2:0]]; @(negedge clk); b_fill = 0;
        end
        mem[b_tag[2:0]] = b_data;
        b_pop = 1; @(negedge clk); b_pop = 0;
      end
    end
  end

  initial begin
    logic [2:0] blk;
    int cyc;
    bit was_hit;
    for (int i = 0; i < 8; i++) begin mem[i] = rand256(); view[i] = mem[i]; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      blk = 3'($urandom % 8);
      req.addr   = {24'h0, blk, 5'($urandom)};
      req.secure = ($urandom % 10 != 0);
      req.write  = (blk != 7) && ($urandom % 2 == 0);
      req.be     = ($urandom % 3 == 0) ? '1 : (32'hf << (4 * ($urandom % 8)));
      req.wdata  = rand256();
      req_valid  = 1;
      #1;
      was_hit = wb_hit && ((wb_hit_be & req.be) == req.be);
      cyc = 0;
      while (!req_ready) begin @(negedge clk); #1; cyc++; was_hit = wb_hit && ((wb_hit_be & req.be) == req.be); end
      @(negedge clk); req_valid = 0;
      cyc = 0;
      while (!rsp_valid) begin @(negedge clk); cyc++; end
      if (!req.secure) begin
        n_refused++;
        check(rsp.err && cyc == 0, "non-secure request refused at once");
      end else if (req.write) begin
        n_wr++;
        check(!rsp.err && cyc == 0, "write completes at once");
        for (int b = 0; b < 32; b++) if (req.be[b]) view[blk][8*b +: 8] = req.wdata[8*b +: 8];
      end else begin
        if (was_hit) begin n_hit++; check(cyc == 0, "buffer hit answers at once"); end
        else begin n_miss++; check(cyc > 3, "miss waits for the encryption logic"); end
        if (blk == 7) check(rsp.err, "failed block answered with err");
        else for (int b = 0; b < 32; b++)
          if (req.be[b]) check(!rsp.err && rsp.rdata[8*b +: 8] == view[blk][8*b +: 8], $sformatf("read byte %0d of block %0d", b, blk));
      end
    end
    check(n_refused > 0 && n_hit > 0 && n_miss > 0 && n_wr > 0, "all cases exercised");
    $display("refused %0d hits %0d misses %0d writes %0d", n_refused, n_hit, n_miss, n_wr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
