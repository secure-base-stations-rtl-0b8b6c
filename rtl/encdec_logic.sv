// Encryption/decryption logic of the encrypted memory.
//
// A 256-bit data block is stored in DRAM as one 288-bit Rijndael block made
// of the data and its own 32-bit address. Decryption of a block read back must
// reproduce that address in the top 32 bits; if it does, the data is taken as
// authentic, so the address acts as a message authentication value spread over
// the whole cipher block. If it does not (or the DRAM word had an
// uncorrectable ECC error) the access is flagged as failed.
//
// A sequencer runs one job at a time, picked in this order:
//  1. read miss from the bus interface: read block, decrypt, check, answer;
//  2. head of the write buffer: if it is partial, read and decrypt the block
//     and backfill the missing bytes; then encrypt and write, and pop it;
//  3. key mutation step, while a mutation is active: read the block at the
//     boundary, decrypt with the current key, encrypt with the new key, write
//     back, advance the boundary.
// Reads go first because the processor waits for them; writes have already
// completed on the bus. Which key slot a block uses comes from the region
// boundary (key_region_ctrl) when the job starts.
// On a failed check: a read miss answers with err; a backfill fills the
// missing bytes with zeros and still retires the entry; a mutation step leaves
// the block as it is. Each failure pulses fail with the block address in
// fail_addr.
// Latency of a read miss, from the first cycle miss_valid is high to the
// cycle miss_done is high: 28 cycles plus the DRAM read latency (2 to start
// the job, 9 word commands, 1 to collect, 15 decryption rounds, 1 to answer).
module encdec_logic
  import vault_pkg::*;
#(
  localparam int unsigned NR = rijndael_pkg::num_rounds(NB, NK),
  localparam int unsigned RW = $clog2(NR + 1)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // read misses
  input  logic                  miss_valid,
  input  logic [ADDR_W-1:0]     miss_addr,
  output logic                  miss_done,
  output logic [LINE_W-1:0]     miss_data,
  output logic                  miss_err,
  // write buffer, port B
  input  logic                  wb_valid,
  input  logic [TAG_W-1:0]      wb_tag,
  input  logic [LINE_BYTES-1:0] wb_be,
  input  logic [LINE_W-1:0]     wb_data,
  output logic                  wb_take,
  output logic                  wb_fill,
  output logic [LINE_W-1:0]     wb_fill_data,
  output logic                  wb_pop,
  // key regions
  output logic [TAG_W-1:0]      kr_tag,
  input  logic                  kr_slot,
  input  logic                  mut_active,
  input  logic [TAG_W-1:0]      mut_boundary,
  input  logic                  mut_cur_slot,
  input  logic                  mut_new_slot,
  output logic                  mut_step_done,
  // key store read ports
  output logic                  ks_enc_slot,
  output logic [RW-1:0]         ks_enc_round,
  input  logic [BLOCK_W-1:0]    ks_enc_rk,
  output logic                  ks_dec_slot,
  output logic [RW-1:0]         ks_dec_round,
  input  logic [BLOCK_W-1:0]    ks_dec_rk,
  input  logic                  keys_ready,
  // DRAM controller
  output logic                  dr_valid,
  input  logic                  dr_ready,
  output logic                  dr_write,
  output logic [ADDR_W-1:0]     dr_addr,
  output logic [BLOCK_W-1:0]    dr_wdata,
  input  logic                  dr_done,
  input  logic [BLOCK_W-1:0]    dr_rdata,
  input  logic                  dr_uncorr,
  // failure report
  output logic                  fail,
  output logic [ADDR_W-1:0]     fail_addr
);
  typedef enum logic [3:0] {
    S_IDLE, S_RD_ISSUE, S_RD_WAIT, S_DEC, S_FILL, S_ENC_START, S_ENC, S_WR_ISSUE, S_WR_WAIT
  } state_t;
  typedef enum logic [1:0] {J_READ, J_RETIRE, J_MUTATE} job_t;

  state_t state;
  job_t   job;
  logic [ADDR_W-1:0]  job_addr;
  logic               dec_slot, enc_slot;
  logic [LINE_W-1:0]  plain;
  logic               uncorr;
  logic               mac_ok;

  logic               enc_start, enc_busy, enc_done;
  logic [BLOCK_W-1:0] enc_din, enc_dout;
  logic               dec_start, dec_busy, dec_done;
  logic [BLOCK_W-1:0] dec_dout;
  logic [ADDR_W-1:0]  phys;

  // Job selection. Nothing is picked in the cycle in which the previous job's
  // completion is signalled (miss_done, wb_pop, mut_step_done): the request
  // it answered, the buffer head and the region boundary only settle then.
  logic settling, pick_read, pick_retire, pick_mut;
  logic [ADDR_W-1:0]  pick_addr;
  assign settling    = miss_done || wb_pop || mut_step_done;
  assign pick_read   = !settling && miss_valid;
  assign pick_retire = !settling && !miss_valid && wb_valid;
  assign pick_mut    = !settling && !miss_valid && !wb_valid && mut_active;
  always_comb begin
    if (pick_read)        pick_addr = miss_addr;
    else if (pick_retire) pick_addr = {wb_tag, 5'b00000};
    else                  pick_addr = {mut_boundary, 5'b00000};
  end
  assign kr_tag = pick_addr[ADDR_W-1:5];

  addr_expand u_addr (.log_addr(job_addr), .phys_word(phys));

  rijndael_enc #(.NB(NB), .NK(NK)) u_enc (
    .clk, .rst_n, .start(enc_start), .din(enc_din), .rk_round(ks_enc_round), .rk(ks_enc_rk),
    .busy(enc_busy), .done(enc_done), .dout(enc_dout));

  rijndael_dec #(.NB(NB), .NK(NK)) u_dec (
    .clk, .rst_n, .start(dec_start), .din(dr_rdata), .rk_round(ks_dec_round), .rk(ks_dec_rk),
    .busy(dec_busy), .done(dec_done), .dout(dec_dout));

  assign ks_enc_slot = enc_slot;
  assign ks_dec_slot = dec_slot;
  assign mac_ok      = !uncorr && (dec_dout[BLOCK_W-1 -: ADDR_W] == job_addr);

  assign dr_valid  = (state == S_RD_ISSUE) || (state == S_WR_ISSUE);
  assign dr_write  = (state == S_WR_ISSUE);
  assign dr_addr   = phys;
  assign dr_wdata  = enc_dout;
  assign dec_start = (state == S_RD_WAIT) && dr_done;
  assign enc_start = (state == S_ENC_START);
  assign enc_din   = {job_addr, (job == J_RETIRE) ? wb_data : plain};

  assign wb_take      = (state == S_IDLE) && keys_ready && pick_retire;
  assign wb_fill      = (state == S_FILL);
  assign wb_fill_data = plain;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= S_IDLE;
      job           <= J_READ;
      job_addr      <= '0;
      dec_slot      <= 1'b0;
      enc_slot      <= 1'b0;
      plain         <= '0;
      uncorr        <= 1'b0;
      miss_done     <= 1'b0;
      miss_data     <= '0;
      miss_err      <= 1'b0;
      wb_pop        <= 1'b0;
      mut_step_done <= 1'b0;
      fail          <= 1'b0;
      fail_addr     <= '0;
    end else begin
      miss_done     <= 1'b0;
      wb_pop        <= 1'b0;
      mut_step_done <= 1'b0;
      fail          <= 1'b0;
      case (state)
        S_IDLE: if (keys_ready) begin
          if (pick_read) begin
            job      <= J_READ;
            job_addr <= pick_addr;
            dec_slot <= kr_slot;
            state    <= S_RD_ISSUE;
          end else if (pick_retire) begin
            job      <= J_RETIRE;
            job_addr <= pick_addr;
            dec_slot <= kr_slot;
            enc_slot <= kr_slot;
            state    <= (&wb_be) ? S_ENC_START : S_RD_ISSUE;
          end else if (pick_mut) begin
            job      <= J_MUTATE;
            job_addr <= pick_addr;
            dec_slot <= mut_cur_slot;
            enc_slot <= mut_new_slot;
            state    <= S_RD_ISSUE;
          end
        end
        S_RD_ISSUE: if (dr_ready) state <= S_RD_WAIT;
        S_RD_WAIT: if (dr_done) begin
          uncorr <= dr_uncorr;
          state  <= S_DEC;
        end
        S_DEC: if (dec_done) begin
          plain <= mac_ok ? dec_dout[LINE_W-1:0] : '0;
          if (!mac_ok) begin
            fail      <= 1'b1;
            fail_addr <= job_addr;
          end
          case (job)
            J_READ: begin
              miss_done <= 1'b1;
              miss_data <= dec_dout[LINE_W-1:0];
              miss_err  <= !mac_ok;
              state     <= S_IDLE;
            end
            J_RETIRE: state <= S_FILL;
            default: begin
              if (mac_ok) state <= S_ENC_START;
              else begin
                mut_step_done <= 1'b1;
                state         <= S_IDLE;
              end
            end
          endcase
        end
        S_FILL:      state <= S_ENC_START;
        S_ENC_START: state <= S_ENC;
        S_ENC:       if (enc_done) state <= S_WR_ISSUE;
        S_WR_ISSUE:  if (dr_ready) state <= S_WR_WAIT;
        S_WR_WAIT: if (dr_done) begin
          if (job == J_RETIRE) wb_pop <= 1'b1;
          else                 mut_step_done <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
