// End-to-end testbench of cell_site_vault at its default size (128 MB of
// DRAM, 3,728,270 logical blocks, 4-entry write buffer). The key mutation is
// started and run over the first blocks only: a full pass over memory takes
// some 10^8 cycles.
//
// Flow: secure boot (burn the master key and the fuse lock, read the key back,
// throw the key-access switch, show that only a hard reset reopens it), load
// memory keys, secure memory traffic checked against a model, refusal of
// non-secure accesses, ECC correction, detection of a moved block (irq),
// then a key mutation while traffic goes on. Every mechanism is counted and a
// mechanism that never happened counts as a failure.
module tb_cell_site_vault_full;
  localparam int BLOCKS = 3728270;
  localparam bit FULL_MUTATION = 1'b0;
  localparam int WATCHDOG = 600000;
  import vault_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, hard_rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic mem_req_valid = 0, mem_req_ready, mem_rsp_valid, reg_req_valid = 0, reg_rsp_valid, irq;
  mem_req_t mem_req = '0;
  mem_rsp_t mem_rsp;
  reg_req_t reg_req = '0;
  reg_rsp_t reg_rsp;
  logic cmd_valid, cmd_ready, rvalid;
  dram_cmd_t cmd;
  logic [39:0] rdata;

  dram_model #(.LATENCY(8), .STALLS(1)) dram (.clk, .cmd_valid, .cmd_ready, .cmd, .rvalid, .rdata);

  localparam int TB_BLOCKS = (BLOCKS < 16) ? BLOCKS : 16;   // blocks the traffic uses
  logic [255:0] master;
  logic [255:0] keys [2];
  logic [255:0] view [TB_BLOCKS];
  bit           written [TB_BLOCKS];

  // mechanism counters
  int n_hit = 0, n_miss = 0, n_merge = 0, n_backfill = 0, n_full = 0, n_refused = 0, n_corr = 0;
  int n_fail = 0, n_steps = 0, n_mut_done = 0, n_throw = 0;
  always @(posedge clk) if (hard_rst_n) begin
    if (dut.u_mem.u_bus.req_ready && mem_req_valid && mem_req.secure && !mem_req.write) begin
      if (dut.u_mem.u_bus.full_hit) n_hit++;
      else n_miss++;
    end
    if (dut.u_mem.u_wbuf.merge) n_merge++;
    if (dut.u_mem.u_crypt.wb_fill) n_backfill++;
    if (mem_req_valid && mem_req.write && mem_req.secure && !mem_req_ready && dut.u_mem.wa_full) n_full++;
    if (mem_req_valid && mem_req_ready && !mem_req.secure) n_refused++;
    n_corr += int'(dut.ecc_corr);
    if (dut.fail) n_fail++;
    if (dut.u_mem.step_done) n_steps++;
    if (dut.u_mem.mut_finished) n_mut_done++;
    if (dut.throw) n_throw++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic reg_rw(input bit w, input bit sec, input logic [7:0] a, input logic [31:0] d,
                        output reg_rsp_t r);
    @(negedge clk); reg_req_valid = 1; reg_req.write = w; reg_req.secure = sec; reg_req.addr = a; reg_req.wdata = d;
    @(negedge clk); reg_req_valid = 0;
    r = reg_rsp;
  endtask

  task automatic mem_access(input bit w, input bit sec, input int blk, input logic [31:0] be,
                            input logic [255:0] d, output mem_rsp_t r);
    @(negedge clk);
    mem_req_valid = 1; mem_req.write = w; mem_req.secure = sec; mem_req.addr = 32'(blk) << 5;
    mem_req.be = be; mem_req.wdata = d;
    #1;
    while (!mem_req_ready) begin @(negedge clk); #1; end
    @(negedge clk); mem_req_valid = 0;
    while (!mem_rsp_valid) @(negedge clk);
    r = mem_rsp;
  endtask

  task automatic write(input int blk, input logic [31:0] be, input logic [255:0] d);
    mem_rsp_t r;
    mem_access(1, 1, blk, be, d, r);
    check(!r.err, "write accepted");
    for (int b = 0; b < 32; b++) if (be[b]) view[blk][8*b +: 8] = d[8*b +: 8];
  endtask

  task automatic read_check(input int blk, input logic [31:0] be);
    mem_rsp_t r;
    mem_access(0, 1, blk, be, '0, r);
    check(!r.err, $sformatf("read of block %0d", blk));
    for (int b = 0; b < 32; b++)
      if (be[b]) check(r.rdata[8*b +: 8] == view[blk][8*b +: 8], $sformatf("block %0d byte %0d", blk, b));
  endtask

  task automatic traffic(input int n);
    for (int k = 0; k < n; k++) begin
      int blk;
      logic [31:0] be;
      blk = $urandom % TB_BLOCKS;
      case ($urandom % 3)
        0: be = '1;
        1: be = 32'hf << (4 * ($urandom % 8));
        default: be = 32'h1 << ($urandom % 32);
      endcase
      if ($urandom % 2) write(blk, be, rand256());
      else read_check(blk, be);
    end
  endtask

  task automatic wait_status(input int bitn, input bit val);
    reg_rsp_t r;
    do reg_rw(0, 1, REG_STATUS, 0, r); while (r.rdata[bitn] != val);
  endtask

  task automatic load_key(input int s);
    reg_rsp_t r;
    keys[s] = rand256() ^ master;      // any key software derives
    wait_status(5, 1);
    for (int i = 0; i < 8; i++) reg_rw(1, 1, REG_KEYDATA + 8'(4*i), keys[s][255-32*i -: 32], r);
    reg_rw(1, 1, REG_KEYLOAD, 32'(s), r);
    check(!r.err, "key load accepted");
    wait_status(5, 1);
  endtask

  function automatic bit stored_as(input int blk, input int s);
    logic [287:0] c;
    c = encrypt(9, 8, keys[s], {32'(blk) << 5, view[blk]});
    for (int i = 0; i < 9; i++) if (dram.peek(9*blk + i) != ecc_word(c[32*i +: 32])) return 0;
    return 1;
  endfunction

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reg_rsp_t r;
    mem_rsp_t m;
    int slot, f0;
    repeat (3) @(negedge clk);
    hard_rst_n = 1;
    // ---- secure boot: fuse the master key, then lock the fuses ----
    master = rand256();
    for (int i = 0; i < 256; i++) if (master[i]) reg_rw(1, 1, REG_FUSE_BURN, 32'(i), r);
    reg_rw(1, 1, REG_FUSE_BURN, 32'd256, r);
    #2;
    reg_rw(0, 1, REG_STATUS, 0, r);
    check(r.rdata[1], "fuse lock burned");
    reg_rw(1, 1, REG_FUSE_BURN, 32'd0, r);
    check(r.err, "no burning after lock");
    for (int i = 0; i < 8; i++) begin
      reg_rw(0, 1, REG_MASTER + 8'(4*i), 0, r);
      check(!r.err && r.rdata == master[255-32*i -: 32], "master key readable during boot");
    end
    reg_rw(0, 0, REG_MASTER, 0, r);
    check(r.err, "master key refused to the non-secure state");
    // ---- throw the switch; only a hard reset reopens it ----
    reg_rw(1, 1, REG_CONTROL, 32'(1 << CTL_THROW_SWITCH), r);
    reg_rw(0, 1, REG_MASTER, 0, r);
    check(r.err && r.rdata == 0, "master key gone after the switch is thrown");
    hard_rst_n = 0; @(negedge clk); hard_rst_n = 1;
    reg_rw(0, 1, REG_MASTER + 8'd28, 0, r);
    check(!r.err && r.rdata == master[31:0], "hard reset reopens key access");
    // ---- boot continues: memory keys, then the switch is thrown for good ----
    load_key(0);
    load_key(1);
    reg_rw(1, 1, REG_CONTROL, 32'(1 << CTL_THROW_SWITCH), r);
    reg_rw(0, 1, REG_MASTER, 0, r);
    check(r.err, "key access closed for operation");
    slot = 0;
    // ---- secure memory ----
    for (int b = 0; b < TB_BLOCKS; b++) write(b, '1, rand256());
    wait_status(6, 1);
    for (int b = 0; b < TB_BLOCKS; b++) check(stored_as(b, slot), $sformatf("block %0d encrypted", b));
    traffic(120);
    mem_access(0, 0, 2, '1, '0, m);
    check(m.err, "non-secure read refused");
    mem_access(1, 0, 2, '1, rand256(), m);
    check(m.err, "non-secure write refused");
    wait_status(6, 1);
    dram.flip(9*3 + 4, 17);
    read_check(3, '1);
    reg_rw(0, 1, REG_ECC_CORR, 0, r);
    check(r.rdata >= 1, "corrected word counted");
    // moved block: copy block 4's ciphertext over block 5
    for (int i = 0; i < 9; i++) dram.poke(9*5 + i, dram.peek(9*4 + i));
    f0 = n_fail;
    mem_access(0, 1, 5, '1, '0, m);
    check(m.err && n_fail == f0 + 1, "moved block detected");
    @(negedge clk);
    check(irq, "irq raised");
    reg_rw(0, 1, REG_FAILS, 0, r);
    check(r.rdata == 1, "failure counted");
    reg_rw(1, 1, REG_CONTROL, 32'(1 << CTL_CLEAR_FLAGS), r);
    check(!irq, "irq cleared");
    write(5, '1, rand256());
    // ---- key mutation towards a fresh key in the spare slot ----
    wait_status(6, 1);
    load_key(1 - slot);
    reg_rw(1, 1, REG_CONTROL, 32'(1 << CTL_START_MUTATE), r);
    check(!r.err, "mutation started");
    reg_rw(1, 1, REG_KEYLOAD, 32'(slot), r);
    check(r.err, "key load refused during mutation");
    if (FULL_MUTATION) begin
      do begin
        traffic(1);
        reg_rw(0, 1, REG_STATUS, 0, r);
      end while (r.rdata[2]);
      slot = 1 - slot;
      wait_status(6, 1);
      check(r.rdata[3] == slot[0], "new key is current");
      for (int b = 0; b < TB_BLOCKS; b++) check(stored_as(b, slot), $sformatf("block %0d under the new key", b));
      check(n_mut_done == 1 && n_steps == BLOCKS, $sformatf("mutation steps %0d", n_steps));
    end else begin
      // run until the traffic blocks are re-encrypted, then check both regions
      do begin
        traffic(1);
        reg_rw(0, 1, REG_BOUNDARY, 0, r);
      end while (r.rdata < TB_BLOCKS + 2);
      for (int b = 0; b < TB_BLOCKS; b++) read_check(b, '1);
      for (int b = 0; b < TB_BLOCKS; b++)
        if (b < int'(dut.boundary)) check(stored_as(b, 1 - slot) || !dut.u_mem.idle, $sformatf("block %0d under the new key", b));
      check(n_steps >= TB_BLOCKS, "mutation steps ran");
    end
    traffic(60);
    check(n_hit > 0, "buffer hits");          check(n_miss > 0, "read misses");
    check(n_merge > 0, "write merges");       check(n_backfill > 0, "backfills");
    check(n_full > 0, "full-buffer stalls");  check(n_refused > 0, "non-secure refusals");
    check(n_corr > 0, "ECC corrections");     check(n_fail > 0, "authentication failures");
    check(n_steps > 0, "mutation steps");     check(n_throw >= 2, "switch throws");
    if (FULL_MUTATION) check(n_mut_done > 0, "completed mutation");
    $display("hits %0d misses %0d merges %0d backfills %0d full-stalls %0d refused %0d corrected %0d fails %0d steps %0d mutations %0d throws %0d",
             n_hit, n_miss, n_merge, n_backfill, n_full, n_refused, n_corr, n_fail, n_steps, n_mut_done, n_throw);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  cell_site_vault dut (
    .clk, .hard_rst_n, .mem_req_valid, .mem_req_ready, .mem_req, .mem_rsp_valid, .mem_rsp,
    .reg_req_valid, .reg_req, .reg_rsp_valid, .reg_rsp, .irq,
    .dram_cmd_valid(cmd_valid), .dram_cmd_ready(cmd_ready), .dram_cmd(cmd), .dram_rvalid(rvalid),
    .dram_rdata(rdata));

endmodule
