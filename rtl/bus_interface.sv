// Bus interface of the encrypted memory.
//
// It takes one request at a time from the secure memory port and completes
// it as early as it can:
//  - requests that do not carry the secure processor state are refused with
//    err (this memory only serves the secure world);
//  - writes go into the write buffer and complete at once, merging into an
//    entry of the same block when there is one; they wait while the buffer is
//    full or while the matching entry is being encrypted;
//  - reads whose bytes are all valid in a buffer entry complete at once from
//    the buffer (a hit);
//  - reads of a block with an incomplete buffer entry wait until that entry
//    has been written to memory;
//  - other reads (misses) are handed to the encryption logic and complete
//    after the DRAM access and the decryption, with err if the block failed
//    its authentication check.
// Timing: req_ready is high in the cycle a request is accepted; rsp_valid
// follows one cycle later for refused requests, writes and hits, and one
// cycle after miss_done for misses. Read responses carry the whole block.
module bus_interface
  import vault_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  req_valid,
  output logic                  req_ready,
  input  mem_req_t              req,
  output logic                  rsp_valid,
  output mem_rsp_t              rsp,
  // write buffer, port A
  output logic [TAG_W-1:0]      wb_tag,
  input  logic                  wb_hit,
  input  logic                  wb_hit_busy,
  input  logic [LINE_BYTES-1:0] wb_hit_be,
  input  logic [LINE_W-1:0]     wb_hit_data,
  input  logic                  wb_full,
  output logic                  wb_wr,
  output logic [LINE_BYTES-1:0] wb_be,
  output logic [LINE_W-1:0]     wb_wdata,
  // read misses to the encryption logic
  output logic                  miss_valid,
  output logic [ADDR_W-1:0]     miss_addr,
  input  logic                  miss_done,
  input  logic [LINE_W-1:0]     miss_data,
  input  logic                  miss_err
);
  logic in_miss;
  logic full_hit, can_write;

  assign wb_tag    = req.addr[ADDR_W-1:5];
  assign wb_be     = req.be;
  assign wb_wdata  = req.wdata;
  assign full_hit  = wb_hit && ((wb_hit_be & req.be) == req.be);
  assign can_write = wb_hit ? !wb_hit_busy : !wb_full;

  always_comb begin
    req_ready = 1'b0;
    wb_wr     = 1'b0;
    if (req_valid && !in_miss) begin
      if (!req.secure)          req_ready = 1'b1;
      else if (req.write)       begin req_ready = can_write; wb_wr = can_write; end
      else if (full_hit)        req_ready = 1'b1;
      else if (!wb_hit)         req_ready = 1'b1;     // miss: accepted, answered later
    end
  end

  assign miss_valid = in_miss;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_miss   <= 1'b0;
      miss_addr <= '0;
      rsp_valid <= 1'b0;
      rsp       <= '0;
    end else begin
      rsp_valid <= 1'b0;
      if (in_miss) begin
        if (miss_done) begin
          in_miss   <= 1'b0;
          rsp_valid <= 1'b1;
          rsp.err   <= miss_err;
          rsp.rdata <= miss_err ? '0 : miss_data;
        end
      end else if (req_ready) begin
        if (!req.secure) begin
          rsp_valid <= 1'b1;
          rsp.err   <= 1'b1;
          rsp.rdata <= '0;
        end else if (req.write) begin
          rsp_valid <= 1'b1;
          rsp.err   <= 1'b0;
          rsp.rdata <= '0;
        end else if (full_hit) begin
          rsp_valid <= 1'b1;
          rsp.err   <= 1'b0;
          rsp.rdata <= wb_hit_data;
        end else begin
          in_miss   <= 1'b1;
          miss_addr <= {req.addr[ADDR_W-1:5], 5'b00000};
        end
      end
    end
  end

endmodule
