// Cell-site vault hardware of a secure base-station system-on-chip.
//
// The vault keeps keys and unencrypted data inside the chip. This top joins
// the parts of it that are hardware:
//  - the fused master key (fuse_key_store) behind the key-access switch
//    (key_access_switch), which boot software throws after authentication so
//    the key stays unreachable until the next hard reset;
//  - the encrypted memory system (encrypted_memory), through which the secure
//    processor state reaches off-chip DRAM: data leaves the chip only
//    encrypted with its address as authentication value, ECC-protected, under
//    one of two keys that can be rotated by key mutation;
//  - the vault's control registers (vault_regs) on a secure register bus.
// The processor, caches, interconnect, boot ROM, cipher accelerators and the
// DRAM chips are outside; their connections are the ports.
//
// Ports: secure memory port (mem_req_t/mem_rsp_t), register port
// (reg_req_t/reg_rsp_t), 40-bit DRAM word port, irq (sticky authentication
// failure). hard_rst_n is the chip's hard reset: it resets everything,
// including the key-access switch, which no other reset reaches.
// The failing block address from the memory system (fail_addr) is left
// unconnected here: software learns of a failure from the failed read
// response, irq and the failure counter, which is what the vault needs; a
// register holding the address would be an easy addition.
module cell_site_vault
  import vault_pkg::*;
#(
  parameter int unsigned MEM_BLOCKS = 3728270,
  parameter int unsigned WB_DEPTH   = 4
) (
  input  logic               clk,
  input  logic               hard_rst_n,
  // secure memory port
  input  logic               mem_req_valid,
  output logic               mem_req_ready,
  input  mem_req_t           mem_req,
  output logic               mem_rsp_valid,
  output mem_rsp_t           mem_rsp,
  // register port
  input  logic               reg_req_valid,
  input  reg_req_t           reg_req,
  output logic               reg_rsp_valid,
  output reg_rsp_t           reg_rsp,
  output logic               irq,
  // DRAM word port
  output logic               dram_cmd_valid,
  input  logic               dram_cmd_ready,
  output dram_cmd_t          dram_cmd,
  input  logic               dram_rvalid,
  input  logic [DRAM_W-1:0]  dram_rdata
);
  logic [MASTER_KEY_W-1:0] fuse_key, gated_key;
  logic                    fuse_locked, key_access, throw, fuse_burn;
  logic [8:0]              fuse_idx;
  logic                    key_load, key_slot, key_load_ok, mutate_start, mutate_active;
  logic [32*NK-1:0]        mem_key;
  logic [TAG_W-1:0]        boundary;
  logic                    cur_slot, fail, mem_idle;
  logic [ADDR_W-1:0]       fail_addr;
  logic [3:0]              ecc_corr;

  fuse_key_store #(.KEY_W(MASTER_KEY_W)) u_fuses (
    .clk, .burn(fuse_burn), .burn_idx(fuse_idx), .key(fuse_key), .locked(fuse_locked));

  key_access_switch #(.KEY_W(MASTER_KEY_W)) u_switch (
    .clk, .hard_rst_n, .throw, .key_in(fuse_key), .allowed(key_access), .key_out(gated_key));

  vault_regs u_regs (
    .clk, .rst_n(hard_rst_n), .req_valid(reg_req_valid), .req(reg_req),
    .rsp_valid(reg_rsp_valid), .rsp(reg_rsp),
    .master_key(gated_key), .key_access, .fuse_locked, .throw, .fuse_burn, .fuse_idx,
    .key_load, .key_slot, .key(mem_key), .key_load_ok, .mutate_start, .mutate_active,
    .boundary, .cur_slot, .mem_idle, .fail, .ecc_corr, .irq);

  encrypted_memory #(.MEM_BLOCKS(MEM_BLOCKS), .WB_DEPTH(WB_DEPTH)) u_mem (
    .clk, .rst_n(hard_rst_n),
    .req_valid(mem_req_valid), .req_ready(mem_req_ready), .req(mem_req),
    .rsp_valid(mem_rsp_valid), .rsp(mem_rsp),
    .key_load, .key_slot, .key(mem_key), .key_load_ok, .mutate_start, .mutate_active,
    .boundary, .cur_slot, .fail, .fail_addr, .ecc_corr, .idle(mem_idle),
    .dram_cmd_valid, .dram_cmd_ready, .dram_cmd, .dram_rvalid, .dram_rdata);

endmodule
