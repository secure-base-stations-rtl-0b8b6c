// DRAM controller of the encrypted memory: moves one 288-bit cipher block to
// or from off-chip memory as nine consecutive 40-bit words.
//
// Each 32-bit slice of the block gets seven ECC bits on the way out
// (ecc_encoder) and is checked and, for a single flipped bit, corrected on the
// way back (ecc_decoder). Word i of the block is bits [32*i +: 32] and lives at
// DRAM word address base+i, so the authentication word (bits 287:256 before
// encryption) is the ninth word of each block.
//
// Block side: pulse op_valid while op_ready is high, with op_write, the DRAM
// word address of the first word and, for writes, the block. op_done pulses
// when the last write word has been accepted, or when all nine read words have
// returned; read data is then on op_rdata with op_corr (number of words that
// needed correction) and op_uncorr (some word had two flipped bits).
// DRAM side: a simple word interface, one command per cycle when cmd_ready is
// high, and read data returned in order with rvalid after any latency. The
// DDR2 command protocol (row activation, bursts of 4, refresh) is not modelled
// here; it would sit behind this word interface.
module dram_ctrl
  import vault_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               op_valid,
  output logic               op_ready,
  input  logic               op_write,
  input  logic [ADDR_W-1:0]  op_addr,
  input  logic [BLOCK_W-1:0] op_wdata,
  output logic               op_done,
  output logic [BLOCK_W-1:0] op_rdata,
  output logic [3:0]         op_corr,
  output logic               op_uncorr,
  output logic               cmd_valid,
  input  logic               cmd_ready,
  output dram_cmd_t          cmd,
  input  logic               rvalid,
  input  logic [DRAM_W-1:0]  rdata
);
  typedef enum logic [1:0] {S_IDLE, S_WRITE, S_READ} state_t;
  state_t state;

  logic [ADDR_W-1:0]  base;
  logic [BLOCK_W-1:0] wbuf;
  logic [3:0]         issued, returned;
  logic [31:0]        wword, rword;
  logic [DRAM_W-1:0]  wcode;
  logic               corr, uncorr;

  assign wword = wbuf[32*issued +: 32];

  ecc_encoder u_enc (.data(wword), .word(wcode));
  ecc_decoder u_dec (.word(rdata), .data(rword), .corrected(corr), .uncorrectable(uncorr));

  assign op_ready  = (state == S_IDLE);
  assign cmd_valid = (state != S_IDLE) && (issued < 4'(WORDS_PER_BLOCK));
  assign cmd.we    = (state == S_WRITE);
  assign cmd.addr  = base + ADDR_W'(issued);
  assign cmd.wdata = (state == S_WRITE) ? wcode : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      base      <= '0;
      wbuf      <= '0;
      issued    <= '0;
      returned  <= '0;
      op_done   <= 1'b0;
      op_rdata  <= '0;
      op_corr   <= '0;
      op_uncorr <= 1'b0;
    end else begin
      op_done <= 1'b0;
      case (state)
        S_IDLE: if (op_valid) begin
          base     <= op_addr;
          wbuf     <= op_wdata;
          issued   <= '0;
          returned <= '0;
          state    <= op_write ? S_WRITE : S_READ;
          if (!op_write) begin
            op_corr   <= '0;
            op_uncorr <= 1'b0;
          end
        end
        S_WRITE: if (cmd_valid && cmd_ready) begin
          issued <= issued + 4'd1;
          if (issued == 4'(WORDS_PER_BLOCK - 1)) begin
            op_done <= 1'b1;
            state   <= S_IDLE;
          end
        end
        S_READ: begin
          if (cmd_valid && cmd_ready) issued <= issued + 4'd1;
          if (rvalid) begin
            op_rdata[32*returned +: 32] <= rword;
            op_corr   <= op_corr + 4'(corr);
            op_uncorr <= op_uncorr | uncorr;
            returned  <= returned + 4'd1;
            if (returned == 4'(WORDS_PER_BLOCK - 1)) begin
              op_done <= 1'b1;
              state   <= S_IDLE;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
