// Testbench of vault_regs: non-secure accesses are refused; the master key
// reads back word by word only while key access is allowed; fuse burns are
// refused once the switch is thrown or the fuse lock is burned; CONTROL bits
// pulse throw and mutate_start; key data and KEYLOAD produce a key_load with
// the assembled key, refused while key_load_ok is low; the failure flag,
// counters and irq follow fail and ecc_corr and clear on command; unknown
// offsets and writes to read-only registers are refused.
module tb_vault_regs;
  import vault_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic req_valid = 0, rsp_valid;
  reg_req_t req = '0;
  reg_rsp_t rsp;
  logic [255:0] master_key;
  logic key_access = 1, fuse_locked = 0, throw, fuse_burn, key_load, key_slot, key_load_ok = 1;
  logic [8:0] fuse_idx;
  logic [255:0] key;
  logic mutate_start, mutate_active = 0, cur_slot = 1, mem_idle = 1, fail = 0, irq;
  logic [TAG_W-1:0] boundary = 27'd1234;
  logic [3:0] ecc_corr = 0;

  vault_regs dut (.clk, .rst_n, .req_valid, .req, .rsp_valid, .rsp, .master_key, .key_access,
    .fuse_locked, .throw, .fuse_burn, .fuse_idx, .key_load, .key_slot, .key, .key_load_ok,
    .mutate_start, .mutate_active, .boundary, .cur_slot, .mem_idle, .fail, .ecc_corr, .irq);

  int n_throw = 0, n_burn = 0, n_load = 0, n_start = 0;
  logic [8:0] last_idx;
  logic [255:0] last_key;
  logic last_slot;
  always @(posedge clk) if (rst_n) begin
    if (throw) n_throw++;
    if (fuse_burn) begin n_burn++; last_idx = fuse_idx; end
    if (key_load) begin n_load++; last_key = key; last_slot = key_slot; end
    if (mutate_start) n_start++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic rw(input bit w, input bit sec, input logic [7:0] a, input logic [31:0] d, output reg_rsp_t r);
    @(negedge clk); req_valid = 1; req.write = w; req.secure = sec; req.addr = a; req.wdata = d;
    @(negedge clk); req_valid = 0;
    check(rsp_valid, "response one cycle later");
    r = rsp;
    @(negedge clk);
  endtask

  initial begin
    reg_rsp_t r;
    logic [255:0] k;
    master_key = rand256();
    repeat (3) @(negedge clk);
    rst_n = 1;
    rw(0, 0, REG_STATUS, 0, r);            check(r.err, "non-secure read refused");
    rw(1, 0, REG_CONTROL, 1, r);           check(r.err && n_throw == 0, "non-secure write refused");
    for (int i = 0; i < 8; i++) begin
      rw(0, 1, REG_MASTER + 8'(4*i), 0, r);
      check(!r.err && r.rdata == master_key[255-32*i -: 32], $sformatf("master key word %0d", i));
    end
    rw(1, 1, REG_FUSE_BURN, 9'd77, r);     check(!r.err && n_burn == 1 && last_idx == 77, "fuse burn");
    rw(0, 1, REG_STATUS, 0, r);
    check(!r.err && r.rdata[6:0] == 7'b1101001, $sformatf("status %h", r.rdata));
    rw(0, 1, REG_BOUNDARY, 0, r);          check(r.rdata == 1234, "boundary");
    rw(1, 1, REG_BOUNDARY, 0, r);          check(r.err, "read-only register");
    rw(0, 1, 8'hfc, 0, r);                 check(r.err, "unknown offset");
    // memory key
    k = rand256();
    for (int i = 0; i < 8; i++) rw(1, 1, REG_KEYDATA + 8'(4*i), k[255-32*i -: 32], r);
    rw(1, 1, REG_KEYLOAD, 1, r);
    check(!r.err && n_load == 1 && last_key == k && last_slot == 1, "key load");
    key_load_ok = 0;
    rw(1, 1, REG_KEYLOAD, 0, r);           check(r.err && n_load == 1, "key load refused while busy");
    rw(1, 1, REG_CONTROL, 4, r);           check(r.err && n_start == 0, "mutation start refused while busy");
    key_load_ok = 1;
    rw(1, 1, REG_CONTROL, 4, r);           check(!r.err && n_start == 1, "mutation start");
    // failures and ECC counters
    @(negedge clk); fail = 1; ecc_corr = 3; @(negedge clk); fail = 0; ecc_corr = 0;
    @(negedge clk); fail = 1; @(negedge clk); fail = 0;
    check(irq, "irq on failure");
    rw(0, 1, REG_FAILS, 0, r);             check(r.rdata == 2, "failure count");
    rw(0, 1, REG_ECC_CORR, 0, r);          check(r.rdata == 3, "corrected count");
    rw(1, 1, REG_CONTROL, 2, r);           check(!irq, "flags cleared");
    rw(0, 1, REG_FAILS, 0, r);             check(r.rdata == 0, "failure count cleared");
    // throw the switch: key access goes away
    rw(1, 1, REG_CONTROL, 1, r);           check(n_throw == 1, "throw pulse");
    key_access = 0;
    rw(0, 1, REG_MASTER, 0, r);            check(r.err && r.rdata == 0, "master key refused after throw");
    rw(1, 1, REG_FUSE_BURN, 9'd3, r);      check(r.err && n_burn == 1, "fuse burn refused after throw");
    key_access = 1; fuse_locked = 1;
    rw(1, 1, REG_FUSE_BURN, 9'd3, r);      check(r.err && n_burn == 1, "fuse burn refused when locked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
