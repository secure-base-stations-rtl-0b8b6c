// Iterative Rijndael encryption, one round per clock, for a block of NB
// 32-bit columns (default 9: the 288-bit block of 256 data bits and a 32-bit
// address that the encrypted memory writes to DRAM).
//
// The cipher is Rijndael with a variable block size, as the secure memory
// scheme calls for; the round structure (SubBytes, ShiftRows, MixColumns,
// AddRoundKey, no MixColumns in the last round) is the standard one, with
// NR = max(NB, NK) + 6 rounds (15 for NB=9, NK=8). Computing one round per
// cycle is this design's choice.
//
// Interface: round keys are not stored here. rk_round tells a key store which
// round key to present on rk, combinationally; while idle it asks for round 0.
// Pulse start (only while busy is low) with the plaintext on din; the initial
// AddRoundKey is applied in that cycle. done pulses NR cycles later with the
// ciphertext on dout, which holds until the next start.
module rijndael_enc #(
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
  logic [RW-1:0]    round;
  logic [32*NB-1:0] sb, sr, mc, nxt;

  assign rk_round = busy ? round : '0;
  assign dout     = state;

  // One full round on the state register.
  always_comb begin
    for (int k = 0; k < 4 * NB; k++)
      sb[8*k +: 8] = sbox(state[8*k +: 8]);
    for (int c = 0; c < NB; c++)
      for (int r = 0; r < 4; r++)
        sr[32*(NB-1-c) + 8*(3-r) +: 8] =
          sb[32*(NB-1-((c + shift_of(NB, r)) % NB)) + 8*(3-r) +: 8];
    for (int c = 0; c < NB; c++)
      mc[32*c +: 32] = mix_column(sr[32*c +: 32]);
    nxt = ((round == RW'(NR)) ? sr : mc) ^ rk;
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
          busy <= 1'b0;
          done <= 1'b1;
          round <= '0;
        end else begin
          round <= round + RW'(1);
        end
      end
    end
  end

  start_only_when_idle: assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy);

endmodule
