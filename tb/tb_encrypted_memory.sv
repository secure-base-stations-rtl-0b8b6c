// Testbench of encrypted_memory (16 logical blocks, 2-entry write buffer,
// DRAM with random stalls). Keys are loaded through the key port. Random
// secure reads and writes of whole blocks, words and bytes are checked against
// a model of memory contents, before, during and after a key mutation that
// runs while traffic goes on. Also checked: DRAM never holds the plaintext,
// each block is stored as the reference encryption under the key of its
// region, a moved block and a replaced word are detected (err, fail pulse),
// a single-bit upset is corrected and counted, and non-secure accesses are
// refused. Counts of buffer hits, merges, backfills, full-buffer stalls and
// mutation steps must all be non-zero.
module tb_encrypted_memory;
  import vault_pkg::*;
  import tb_ref_pkg::*;
  localparam int BLOCKS = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic req_valid = 0, req_ready, rsp_valid;
  mem_req_t req = '0;
  mem_rsp_t rsp;
  logic key_load = 0, key_slot = 0, key_load_ok, mutate_start = 0, mutate_active, cur_slot;
  logic [255:0] key = 0;
  logic [TAG_W-1:0] boundary;
  logic fail, idle;
  logic [31:0] fail_addr;
  logic [3:0] ecc_corr;
  logic cmd_valid, cmd_ready, rvalid;
  dram_cmd_t cmd;
  logic [39:0] rdata;

  encrypted_memory #(.MEM_BLOCKS(BLOCKS), .WB_DEPTH(2)) dut (.clk, .rst_n, .req_valid, .req_ready,
    .req, .rsp_valid, .rsp, .key_load, .key_slot, .key, .key_load_ok, .mutate_start, .mutate_active,
    .boundary, .cur_slot, .fail, .fail_addr, .ecc_corr, .idle, .dram_cmd_valid(cmd_valid),
    .dram_cmd_ready(cmd_ready), .dram_cmd(cmd), .dram_rvalid(rvalid), .dram_rdata(rdata));
  dram_model #(.LATENCY(7), .STALLS(1)) mem (.clk, .cmd_valid, .cmd_ready, .cmd, .rvalid, .rdata);

  logic [255:0] keys [2];
  logic [255:0] view [BLOCKS];
  int n_fail = 0, n_corr = 0, n_hit = 0, n_merge = 0, n_backfill = 0, n_full = 0, n_steps = 0;
  always @(posedge clk) if (rst_n) begin
    if (fail) n_fail++;
    n_corr += int'(ecc_corr);
    if (dut.u_bus.req_ready && req_valid && !req.write && req.secure && dut.u_bus.full_hit) n_hit++;
    if (dut.u_wbuf.merge) n_merge++;
    if (dut.u_crypt.wb_fill) n_backfill++;
    if (req_valid && req.write && req.secure && !req_ready && dut.wa_full) n_full++;
    if (dut.step_done) n_steps++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic access(input bit w, input bit sec, input int blk, input logic [31:0] be,
                        input logic [255:0] d, output mem_rsp_t r);
    @(negedge clk);
    req_valid = 1; req.write = w; req.secure = sec; req.addr = 32'(blk) << 5; req.be = be; req.wdata = d;
    #1;
    while (!req_ready) begin @(negedge clk); #1; end
    @(negedge clk); req_valid = 0;
    while (!rsp_valid) @(negedge clk);
    r = rsp;
  endtask

  task automatic write(input int blk, input logic [31:0] be, input logic [255:0] d);
    mem_rsp_t r;
    access(1, 1, blk, be, d, r);
    check(!r.err, "write accepted");
    for (int b = 0; b < 32; b++) if (be[b]) view[blk][8*b +: 8] = d[8*b +: 8];
  endtask

  task automatic read_check(input int blk, input logic [31:0] be);
    mem_rsp_t r;
    access(0, 1, blk, be, '0, r);
    check(!r.err, $sformatf("read of block %0d accepted", blk));
    for (int b = 0; b < 32; b++)
      if (be[b]) check(r.rdata[8*b +: 8] == view[blk][8*b +: 8], $sformatf("block %0d byte %0d", blk, b));
  endtask

  task automatic wait_idle();
    do @(negedge clk); while (!idle);
  endtask

  task automatic load(input int s);
    keys[s] = rand256();
    @(negedge clk);
    while (!key_load_ok) @(negedge clk);
    key_load = 1; key_slot = 1'(s); key = keys[s];
    @(negedge clk); key_load = 0;
    while (!key_load_ok) @(negedge clk);
  endtask

  function automatic bit stored_as(input int blk, input int s);
    logic [287:0] c;
    c = encrypt(9, 8, keys[s], {32'(blk) << 5, view[blk]});
    for (int i = 0; i < 9; i++) if (mem.peek(9*blk + i) != ecc_word(c[32*i +: 32])) return 0;
    return 1;
  endfunction

  task automatic traffic(input int n);
    for (int k = 0; k < n; k++) begin
      int blk;
      logic [31:0] be;
      blk = $urandom % BLOCKS;
      case ($urandom % 4)
        0: be = '1;
        1: be = 32'hf << (4 * ($urandom % 8));
        2: be = 32'h1 << ($urandom % 32);
        default: be = $urandom;
      endcase
      if ($urandom % 2) write(blk, be, rand256());
      else read_check(blk, be);
    end
  endtask

  initial begin
    mem_rsp_t r;
    int f0;
    logic [31:0] sv;
    repeat (3) @(negedge clk);
    rst_n = 1;
    load(0);
    load(1);
    // initialise memory with whole-block writes
    for (int b = 0; b < BLOCKS; b++) write(b, '1, rand256());
    wait_idle();
    for (int b = 0; b < BLOCKS; b++) check(stored_as(b, cur_slot), $sformatf("block %0d encrypted in DRAM", b));
    for (int b = 0; b < BLOCKS; b++) begin
      sv = mem.peek(9*b)[31:0];
      check(sv != view[b][31:0], "no plaintext in DRAM");
    end
    traffic(150);
    // refused non-secure accesses
    access(0, 0, 3, '1, '0, r);
    check(r.err && r.rdata == '0, "non-secure read refused");
    access(1, 0, 3, '1, rand256(), r);
    check(r.err, "non-secure write refused");
    wait_idle();
    read_check(3, '1);
    // single-bit upset
    mem.flip(9*5 + 2, 11);
    read_check(5, '1);
    check(n_corr > 0, "corrected error counted");
    // moved block
    wait_idle();
    for (int i = 0; i < 9; i++) mem.poke(9*7 + i, mem.peek(9*6 + i));
    f0 = n_fail;
    access(0, 1, 7, '1, '0, r);
    check(r.err && n_fail == f0 + 1, "moved block detected");
    write(7, '1, rand256());       // repair block 7
    // key mutation under traffic: new key into the spare slot first
    wait_idle();
    load(1 - int'(cur_slot));
    @(negedge clk); mutate_start = 1; @(negedge clk); mutate_start = 0;
    check(mutate_active && !key_load_ok, "mutation running, key loads refused");
    while (mutate_active) traffic(1);
    wait_idle();
    for (int b = 0; b < BLOCKS; b++) check(stored_as(b, cur_slot), $sformatf("block %0d under the new key", b));
    traffic(100);
    check(n_hit > 0 && n_merge > 0 && n_backfill > 0 && n_full > 0 && n_steps == BLOCKS,
          $sformatf("mechanisms: hits %0d merges %0d backfills %0d full %0d steps %0d",
                    n_hit, n_merge, n_backfill, n_full, n_steps));
    $display("hits %0d merges %0d backfills %0d full-stalls %0d mutation steps %0d corrected %0d fails %0d",
             n_hit, n_merge, n_backfill, n_full, n_steps, n_corr, n_fail);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
