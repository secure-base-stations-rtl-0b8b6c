// Control registers of the cell-site vault, reachable only from the secure
// processor state.
//
// The registers give secure software what the boot and memory-protection
// steps need: reading the fused master key (only until the key-access switch
// is thrown), burning fuses (only while the switch is open and the fuse lock
// is intact), throwing the switch, loading the two memory-encryption key
// slots, starting a key mutation, and status: mutation progress, a sticky
// authentication-failure flag (also the interrupt line), and counts of
// failures and corrected ECC words. Any access without the secure state, to an
// unknown offset, or not allowed at that moment, is answered with err and has
// no effect. The register map (see vault_pkg) is this design's choice.
//
// Timing: every request is accepted at once; rsp_valid follows one cycle
// later. Register-bus writes become pulses on throw, key_load, mutate_start
// and fuse_burn in the cycle after the request.
module vault_regs
  import vault_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               req_valid,
  input  reg_req_t           req,
  output logic               rsp_valid,
  output reg_rsp_t           rsp,
  // master key and fuses
  input  logic [MASTER_KEY_W-1:0] master_key,
  input  logic               key_access,
  input  logic               fuse_locked,
  output logic               throw,
  output logic               fuse_burn,
  output logic [8:0]         fuse_idx,
  // memory keys and mutation
  output logic               key_load,
  output logic               key_slot,
  output logic [32*NK-1:0]   key,
  input  logic               key_load_ok,
  output logic               mutate_start,
  input  logic               mutate_active,
  input  logic [TAG_W-1:0]   boundary,
  input  logic               cur_slot,
  input  logic               mem_idle,
  // events
  input  logic               fail,
  input  logic [3:0]         ecc_corr,
  output logic               irq
);
  logic [31:0] keydata [NK];
  logic        fail_flag;
  logic [31:0] fail_cnt, corr_cnt;
  logic [31:0] rdata;
  logic        err, do_wr;

  // Decode: read data and whether the access is refused.
  always_comb begin
    rdata = '0;
    err   = 1'b0;
    if (!req.secure) begin
      err = 1'b1;
    end else if (req.addr >= REG_MASTER && req.addr < REG_MASTER + 8'(4 * NK)) begin
      err   = req.write || !key_access;
      rdata = key_access ? master_key[32*(NK - 1 - int'((req.addr - REG_MASTER) >> 2)) +: 32] : '0;
    end else if (req.addr >= REG_KEYDATA && req.addr < REG_KEYDATA + 8'(4 * NK)) begin
      err = !req.write;
    end else begin
      case (req.addr)
        REG_STATUS: begin
          err   = req.write;
          rdata = {25'd0, mem_idle, key_load_ok, fail_flag, cur_slot, mutate_active, fuse_locked, key_access};
        end
        REG_CONTROL:   err = !req.write ||
                             (req.wdata[CTL_START_MUTATE] && !key_load_ok);
        REG_KEYLOAD:   err = !req.write || !key_load_ok;
        REG_BOUNDARY: begin
          err   = req.write;
          rdata = 32'(boundary);
        end
        REG_ECC_CORR: begin
          err   = req.write;
          rdata = corr_cnt;
        end
        REG_FAILS: begin
          err   = req.write;
          rdata = fail_cnt;
        end
        REG_FUSE_BURN: err = !req.write || !key_access || fuse_locked;
        default:       err = 1'b1;
      endcase
    end
  end

  assign do_wr = req_valid && req.write && !err;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rsp_valid    <= 1'b0;
      rsp          <= '0;
      throw        <= 1'b0;
      fuse_burn    <= 1'b0;
      fuse_idx     <= '0;
      key_load     <= 1'b0;
      key_slot     <= 1'b0;
      mutate_start <= 1'b0;
      fail_flag    <= 1'b0;
      fail_cnt     <= '0;
      corr_cnt     <= '0;
      for (int i = 0; i < NK; i++) keydata[i] <= '0;
    end else begin
      rsp_valid    <= req_valid;
      rsp.err      <= err;
      rsp.rdata    <= req.write ? '0 : rdata;
      throw        <= 1'b0;
      fuse_burn    <= 1'b0;
      key_load     <= 1'b0;
      mutate_start <= 1'b0;
      if (fail) begin
        fail_flag <= 1'b1;
        fail_cnt  <= fail_cnt + 32'd1;
      end
      corr_cnt <= corr_cnt + 32'(ecc_corr);
      if (do_wr) begin
        if (req.addr >= REG_KEYDATA && req.addr < REG_KEYDATA + 8'(4 * NK))
          keydata[(req.addr - REG_KEYDATA) >> 2] <= req.wdata;
        case (req.addr)
          REG_CONTROL: begin
            throw        <= req.wdata[CTL_THROW_SWITCH];
            mutate_start <= req.wdata[CTL_START_MUTATE];
            if (req.wdata[CTL_CLEAR_FLAGS]) begin
              fail_flag <= 1'b0;
              fail_cnt  <= '0;
              corr_cnt  <= '0;
            end
          end
          REG_KEYLOAD: begin
            key_load <= 1'b1;
            key_slot <= req.wdata[0];
          end
          REG_FUSE_BURN: begin
            fuse_burn <= 1'b1;
            fuse_idx  <= req.wdata[8:0];
          end
          default: ;
        endcase
      end
    end
  end

  always_comb
    for (int i = 0; i < NK; i++) key[32*(NK-1-i) +: 32] = keydata[i];

  assign irq = fail_flag;

endmodule
