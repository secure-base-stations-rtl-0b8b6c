// Encrypted off-chip memory system: everything between the on-chip bus and
// the DRAM pins that keeps memory contents secret and authenticated.
//
// Data path (all blocks in this folder):
//   bus_interface -> write_buffer -> encdec_logic -> dram_ctrl -> DRAM
// with rijndael_key_store holding the expanded keys of two key slots and
// key_region_ctrl choosing the slot per block and driving key mutation.
// Each 256-bit block is encrypted together with its 32-bit address into a
// 288-bit Rijndael block and stored as nine 40-bit ECC-protected words at
// DRAM word address 9/8 of its logical word address.
//
// Interfaces: the secure memory port (mem_req_t/mem_rsp_t, valid/ready
// request, one-cycle response valid), key loading (key_load with slot and
// 256-bit key, accepted while no key expansion and no mutation is running,
// as flagged by key_load_ok), mutation start, and the 40-bit DRAM word port.
// fail pulses on every block that fails its authentication check; ecc_corr
// pulses for every DRAM word whose single-bit error was corrected.
// Memory size (MEM_BLOCKS, logical 256-bit blocks) and write buffer depth are
// parameters; their defaults are this design's choices (128 MB of DRAM).
module encrypted_memory
  import vault_pkg::*;
#(
  parameter int unsigned MEM_BLOCKS = 3728270,
  parameter int unsigned WB_DEPTH   = 4
) (
  input  logic               clk,
  input  logic               rst_n,
  // secure memory port
  input  logic               req_valid,
  output logic               req_ready,
  input  mem_req_t           req,
  output logic               rsp_valid,
  output mem_rsp_t           rsp,
  // keys and mutation
  input  logic               key_load,
  input  logic               key_slot,
  input  logic [32*NK-1:0]   key,
  output logic               key_load_ok,
  input  logic               mutate_start,
  output logic               mutate_active,
  output logic [TAG_W-1:0]   boundary,
  output logic               cur_slot,
  // status
  output logic               fail,
  output logic [ADDR_W-1:0]  fail_addr,
  output logic [3:0]         ecc_corr,
  output logic               idle,
  // DRAM word port
  output logic               dram_cmd_valid,
  input  logic               dram_cmd_ready,
  output dram_cmd_t          dram_cmd,
  input  logic               dram_rvalid,
  input  logic [DRAM_W-1:0]  dram_rdata
);
  localparam int unsigned NR = rijndael_pkg::num_rounds(NB, NK);
  localparam int unsigned RW = $clog2(NR + 1);

  // write buffer
  logic [TAG_W-1:0]      wa_tag, wb_tag;
  logic                  wa_hit, wa_hit_busy, wa_full, wa_wr;
  logic [LINE_BYTES-1:0] wa_hit_be, wa_be, wb_be;
  logic [LINE_W-1:0]     wa_hit_data, wa_wdata, wb_data, wb_fill_data;
  logic                  wb_valid, wb_take, wb_fill, wb_pop, wb_empty;
  // miss path
  logic                  miss_valid, miss_done, miss_err;
  logic [ADDR_W-1:0]     miss_addr;
  logic [LINE_W-1:0]     miss_data;
  // key regions
  logic [TAG_W-1:0]      kr_tag;
  logic                  kr_slot, new_slot, step_done, mut_finished;
  // key store
  logic                  ks_busy;
  logic [1:0]            slot_valid;
  logic                  ks_enc_slot, ks_dec_slot;
  logic [RW-1:0]         ks_enc_round, ks_dec_round;
  logic [BLOCK_W-1:0]    ks_enc_rk, ks_dec_rk;
  logic                  keys_ready;
  // DRAM controller
  logic                  dr_valid, dr_ready, dr_write, dr_done, dr_uncorr;
  logic [ADDR_W-1:0]     dr_addr;
  logic [BLOCK_W-1:0]    dr_wdata, dr_rdata;
  logic [3:0]            dr_corr;

  bus_interface u_bus (
    .clk, .rst_n, .req_valid, .req_ready, .req, .rsp_valid, .rsp,
    .wb_tag(wa_tag), .wb_hit(wa_hit), .wb_hit_busy(wa_hit_busy), .wb_hit_be(wa_hit_be),
    .wb_hit_data(wa_hit_data), .wb_full(wa_full), .wb_wr(wa_wr), .wb_be(wa_be), .wb_wdata(wa_wdata),
    .miss_valid, .miss_addr, .miss_done, .miss_data, .miss_err);

  write_buffer #(.DEPTH(WB_DEPTH)) u_wbuf (
    .clk, .rst_n,
    .a_tag(wa_tag), .a_hit(wa_hit), .a_hit_busy(wa_hit_busy), .a_hit_be(wa_hit_be),
    .a_hit_data(wa_hit_data), .full(wa_full), .a_wr(wa_wr), .a_be(wa_be), .a_wdata(wa_wdata),
    .b_valid(wb_valid), .b_tag(wb_tag), .b_be(wb_be), .b_data(wb_data), .b_take(wb_take),
    .b_fill(wb_fill), .b_fill_data(wb_fill_data), .b_pop(wb_pop), .empty(wb_empty));

  key_region_ctrl #(.MEM_BLOCKS(MEM_BLOCKS)) u_region (
    .clk, .rst_n, .start(mutate_start && key_load_ok), .step_done, .q_tag(kr_tag), .q_slot(kr_slot),
    .active(mutate_active), .boundary, .cur_slot, .new_slot, .finished(mut_finished));

  rijndael_key_store #(.NB(NB), .NK(NK)) u_keys (
    .clk, .rst_n, .load(key_load && key_load_ok), .load_slot(key_slot), .load_key(key),
    .busy(ks_busy), .slot_valid,
    .rd_slot_a(ks_enc_slot), .rd_round_a(ks_enc_round), .rk_a(ks_enc_rk),
    .rd_slot_b(ks_dec_slot), .rd_round_b(ks_dec_round), .rk_b(ks_dec_rk));

  // Keys may change only while nothing depends on them staying put.
  assign key_load_ok = !ks_busy && !mutate_active;
  assign keys_ready  = !ks_busy && slot_valid[cur_slot] && (!mutate_active || slot_valid[new_slot]);

  encdec_logic u_crypt (
    .clk, .rst_n,
    .miss_valid, .miss_addr, .miss_done, .miss_data, .miss_err,
    .wb_valid, .wb_tag, .wb_be, .wb_data, .wb_take, .wb_fill, .wb_fill_data, .wb_pop,
    .kr_tag, .kr_slot, .mut_active(mutate_active), .mut_boundary(boundary),
    .mut_cur_slot(cur_slot), .mut_new_slot(new_slot), .mut_step_done(step_done),
    .ks_enc_slot, .ks_enc_round, .ks_enc_rk, .ks_dec_slot, .ks_dec_round, .ks_dec_rk, .keys_ready,
    .dr_valid, .dr_ready, .dr_write, .dr_addr, .dr_wdata, .dr_done, .dr_rdata, .dr_uncorr,
    .fail, .fail_addr);

  dram_ctrl u_dram (
    .clk, .rst_n, .op_valid(dr_valid), .op_ready(dr_ready), .op_write(dr_write), .op_addr(dr_addr),
    .op_wdata(dr_wdata), .op_done(dr_done), .op_rdata(dr_rdata), .op_corr(dr_corr),
    .op_uncorr(dr_uncorr), .cmd_valid(dram_cmd_valid), .cmd_ready(dram_cmd_ready), .cmd(dram_cmd),
    .rvalid(dram_rvalid), .rdata(dram_rdata));

  // Corrected-word count of each completed DRAM read.
  assign ecc_corr = (dr_done && !dr_write) ? dr_corr : 4'd0;
  assign idle     = wb_empty && !miss_valid && !mutate_active;

endmodule
