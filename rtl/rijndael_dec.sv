// Iterative inverse Rijndael, one round per clock, for a block of NB 32-bit
// columns (default 9: the 288-bit block read back from DRAM).
//
// It undoes rijndael_enc step by step: AddRoundKey with the last round key,
// then NR rounds of InvShiftRows, InvSubBytes, AddRoundKey and (except in the
// last round) InvMixColumns, walking the round keys backwards. The round
// structure is standard Rijndael; the one-round-per-cycle schedule is this
// design's choice.
//
// Interface: rk_round selects the round key presented on rk by a key store;
// while idle it asks for round NR. Pulse start (while busy is low) with the
// ciphertext on din; done pulses NR cycles later with the plaintext on dout,
// which holds until the next start.
module rijndael_dec #(
  parameter int unsigned NB = 9,
  parameter int unsigned NK = 8,
  localparam int unsigned NR = rijndael_pkg::num_rounds(NB, NK),
  localparam int unsigned RW = $clog2(NR + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [32*NB-1:0]  din,
  output logic [RW-1:0]     rk_round,
  input  logic [32*NB-1:0]  rk,
  output logic              busy,
  output logic              done,
  output logic [32*NB-1:0]  dout
);
  import rijndael_pkg::*;

  logic [32*NB-1:0] state;
  logic [RW-1:0]    round;     // counts 1..NR while busy
  logic [32*NB-1:0] isr, isb, ark, nxt;

  assign rk_round = busy ? RW'(NR) - round : RW'(NR);
  assign dout     = state;

  always_comb begin
    for (int c = 0; c < NB; c++)
      for (int r = 0; r < 4; r++)
        isr[32*(NB-1-((c + shift_of(NB, r)) % NB)) + 8*(3-r) +: 8] =
          state[32*(NB-1-c) + 8*(3-r) +: 8];
    for (int k = 0; k < 4 * NB; k++)
      isb[8*k +: 8] = inv_sbox(isr[8*k +: 8]);
    ark = isb ^ rk;
    for (int c = 0; c < NB; c++)
      nxt[32*c +: 32] = (round == RW'(NR)) ? ark[32*c +: 32] : inv_mix_column(ark[32*c +: 32]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      done  <= 1'b0;
      round <= '0;
      state <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          state <= din ^ rk;
          round <= RW'(1);
          busy  <= 1'b1;
        end
      end else begin
        state <= nxt;
        if (round == RW'(NR)) begin
          busy  <= 1'b0;
          done  <= 1'b1;
          round <= '0;
        end else begin
          round <= round + RW'(1);
        end
      end
    end
  end

  start_only_when_idle: assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy);

endmodule
