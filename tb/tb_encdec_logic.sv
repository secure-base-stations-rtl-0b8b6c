// Testbench of encdec_logic with the real key store, DRAM controller and the
// behavioural DRAM; the testbench plays the write buffer (one entry), the
// bus interface (read misses) and the region boundary. Checked against the
// reference cipher and ECC:
//  - a full write-buffer entry is stored as the ECC-coded encryption of
//    {address, data} at DRAM word 9*block;
//  - a partial entry is backfilled from memory before it is written;
//  - a read miss returns the data; its latency is 28 cycles plus the DRAM
//    latency (nine word reads, 15 decryption rounds, sequencing);
//  - a block that was replaced, or moved to another address, fails its check
//    (err and a fail pulse), and so does an uncorrectable ECC error;
//  - a mutation step re-encrypts the block at the boundary with the new key;
//  - a read miss is served before a pending write.
module tb_encdec_logic;
  import vault_pkg::*;
  import tb_ref_pkg::*;
  localparam int LAT = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic miss_valid = 0, miss_done, miss_err;
  logic [31:0] miss_addr = 0;
  logic [255:0] miss_data;
  logic wb_valid = 0, wb_take, wb_fill, wb_pop;
  logic [TAG_W-1:0] wb_tag = 0, kr_tag, mut_boundary = 0;
  logic [31:0] wb_be = 0;
  logic [255:0] wb_data = 0, wb_fill_data;
  logic kr_slot, mut_active = 0, mut_cur_slot = 0, mut_step_done;
  logic ks_enc_slot, ks_dec_slot, keys_ready;
  logic [3:0] ks_enc_round, ks_dec_round;
  logic [287:0] ks_enc_rk, ks_dec_rk;
  logic dr_valid, dr_ready, dr_write, dr_done, dr_uncorr;
  logic [31:0] dr_addr;
  logic [287:0] dr_wdata, dr_rdata;
  logic [3:0] dr_corr;
  logic fail;
  logic [31:0] fail_addr;
  logic cmd_valid, cmd_ready, rvalid;
  dram_cmd_t cmd;
  logic [39:0] rdata;
  logic load = 0, load_slot = 0, ks_busy;
  logic [255:0] load_key = 0;
  logic [1:0] slot_valid;

  assign kr_slot = (mut_active && kr_tag < mut_boundary) ? !mut_cur_slot : mut_cur_slot;
  assign keys_ready = !ks_busy && (&slot_valid);

  encdec_logic dut (.clk, .rst_n, .miss_valid, .miss_addr, .miss_done, .miss_data, .miss_err,
    .wb_valid, .wb_tag, .wb_be, .wb_data, .wb_take, .wb_fill, .wb_fill_data, .wb_pop,
    .kr_tag, .kr_slot, .mut_active, .mut_boundary, .mut_cur_slot, .mut_new_slot(!mut_cur_slot),
    .mut_step_done, .ks_enc_slot, .ks_enc_round, .ks_enc_rk, .ks_dec_slot, .ks_dec_round, .ks_dec_rk,
    .keys_ready, .dr_valid, .dr_ready, .dr_write, .dr_addr, .dr_wdata, .dr_done, .dr_rdata, .dr_uncorr,
    .fail, .fail_addr);
  rijndael_key_store ks (.clk, .rst_n, .load, .load_slot, .load_key, .busy(ks_busy), .slot_valid,
    .rd_slot_a(ks_enc_slot), .rd_round_a(ks_enc_round), .rk_a(ks_enc_rk),
    .rd_slot_b(ks_dec_slot), .rd_round_b(ks_dec_round), .rk_b(ks_dec_rk));
  dram_ctrl dc (.clk, .rst_n, .op_valid(dr_valid), .op_ready(dr_ready), .op_write(dr_write),
    .op_addr(dr_addr), .op_wdata(dr_wdata), .op_done(dr_done), .op_rdata(dr_rdata), .op_corr(dr_corr),
    .op_uncorr(dr_uncorr), .cmd_valid, .cmd_ready, .cmd, .rvalid, .rdata);
  dram_model #(.LATENCY(LAT)) mem (.clk, .cmd_valid, .cmd_ready, .cmd, .rvalid, .rdata);

  logic [255:0] key [2];
  int fails = 0;
  always @(posedge clk) if (fail) fails++;

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

  function automatic void store(input int blk, input int s, input logic [255:0] d);
    logic [287:0] c;
    c = encrypt(9, 8, key[s], {32'(blk) << 5, d});
    for (int i = 0; i < 9; i++) mem.poke(9*blk + i, ecc_word(c[32*i +: 32]));
  endfunction

  function automatic bit stored(input int blk, input int s, input logic [255:0] d);
    logic [287:0] c;
    c = encrypt(9, 8, key[s], {32'(blk) << 5, d});
    for (int i = 0; i < 9; i++) if (mem.peek(9*blk + i) != ecc_word(c[32*i +: 32])) return 0;
    return 1;
  endfunction

  task automatic read_miss(input int blk, output logic [255:0] d, output logic err, output int cyc);
    @(negedge clk); miss_valid = 1; miss_addr = 32'(blk) << 5;
    cyc = 0;
    while (!miss_done) begin @(negedge clk); cyc++; end
    d = miss_data; err = miss_err;
    miss_valid = 0;
  endtask

  task automatic retire(input int blk, input logic [31:0] be, input logic [255:0] d);
    @(negedge clk); wb_valid = 1; wb_tag = 27'(blk); wb_be = be; wb_data = d;
    while (!wb_pop) begin
      @(negedge clk);
      if (wb_fill) begin
        for (int b = 0; b < 32; b++) if (!wb_be[b]) wb_data[8*b +: 8] = wb_fill_data[8*b +: 8];
        wb_be = '1;
      end
    end
    @(negedge clk); wb_valid = 0;
  endtask

  task automatic load_key_slot(input int s);
    key[s] = rand256();
    @(negedge clk); load = 1; load_slot = 1'(s); load_key = key[s];
    @(negedge clk); load = 0;
    while (ks_busy) @(negedge clk);
  endtask

  initial begin
    logic [255:0] d, got, merged;
    logic err;
    logic [31:0] be;
    int cyc, f0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    load_key_slot(0);
    load_key_slot(1);
    // full-entry retire
    for (int n = 0; n < 4; n++) begin
      d = rand256();
      retire(10 + n, '1, d);
      check(stored(10 + n, 0, d), $sformatf("block %0d stored encrypted", 10 + n));
    end
    // read miss with latency
    d = rand256();
    store(20, 0, d);
    read_miss(20, got, err, cyc);
    check(!err && got == d, "read miss data");
    check(cyc == 28 + LAT, $sformatf("read miss latency %0d", cyc));
    // partial entry: backfill
    be = 32'h0000_ff0f;
    merged = rand256();
    d = rand256();
    store(21, 0, d);
    for (int b = 0; b < 32; b++) if (!be[b]) merged[8*b +: 8] = d[8*b +: 8];
    retire(21, be, merged & {256{1'b1}});
    check(stored(21, 0, merged), "partial entry backfilled and stored");
    // tampering: block 10 copied to block 22's place
    for (int i = 0; i < 9; i++) mem.poke(9*22 + i, mem.peek(9*10 + i));
    f0 = fails;
    read_miss(22, got, err, cyc);
    @(negedge clk);
    check(err && fails == f0 + 1, "moved block fails its check");
    // replaced word with valid ECC
    mem.poke(9*11 + 3, ecc_word(32'h12345678));
    read_miss(11, got, err, cyc);
    check(err, "replaced word fails the check");
    // two flipped bits in one word
    mem.flip(9*12 + 5, 1); mem.flip(9*12 + 5, 30);
    read_miss(12, got, err, cyc);
    check(err, "uncorrectable ECC error fails");
    // single flipped bit is corrected
    mem.flip(9*13 + 8, 7);
    read_miss(13, got, err, cyc);
    check(!err, "single-bit upset corrected");
    // mutation step on block 20 (current slot 0 -> new slot 1)
    mut_active = 1; mut_cur_slot = 0; mut_boundary = 27'd20;
    d = rand256();
    store(20, 0, d);
    @(negedge clk);
    while (!mut_step_done) @(negedge clk);
    mut_active = 0;
    check(stored(20, 1, d), "mutation re-encrypted block with the new key");
    // a region below the boundary uses the new key for reads
    mut_active = 1; mut_boundary = 27'd21;
    read_miss(20, got, err, cyc);
    check(!err && got == d, "read below boundary with new key");
    while (!mut_step_done) @(negedge clk);   // the step on block 21 that follows
    mut_active = 0;
    // read miss goes before a waiting write
    d = rand256();
    store(30, 0, d);
    @(negedge clk); wb_valid = 1; wb_tag = 27'd31; wb_be = '1; wb_data = rand256();
    miss_valid = 1; miss_addr = 32'd30 << 5;
    #1;
    check(!wb_take, "write not taken while a miss waits");
    while (!miss_done) @(negedge clk);
    check(miss_data == d, "miss served first");
    miss_valid = 0;
    while (!wb_pop) @(negedge clk);
    @(negedge clk); wb_valid = 0;
    check(stored(31, 0, wb_data), "write retired after the miss");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
