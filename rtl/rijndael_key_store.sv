// Round-key store for the two memory-encryption keys.
//
// The secure memory keeps two keys at once, one for each side of the region
// boundary, so that the key can be changed while memory stays in use. This
// block expands each key into its Rijndael key schedule and keeps both
// schedules, so that the cipher engines read a whole round key in one cycle.
//
// Expansion follows the Rijndael key schedule for NK key words and NB block
// columns: NB*(NR+1) 32-bit words, with SubWord(RotWord()) and a round
// constant every NK words and, for NK > 6, an extra SubWord half-way. It runs
// one word per cycle after load (NB*(NR+1)-NK cycles, 136 for the defaults);
// slot_valid of the slot being loaded is low until it ends. Key width (256
// bits) and the iterative expansion are this design's choices.
//
// Two read ports (a: encryption, b: decryption) return round key rd_round of
// slot rd_slot combinationally; column 0 is the most significant word.
module rijndael_key_store #(
  parameter int unsigned NB = 9,
  parameter int unsigned NK = 8,
  localparam int unsigned NR = rijndael_pkg::num_rounds(NB, NK),
  localparam int unsigned RW = $clog2(NR + 1),
  localparam int unsigned NW = NB * (NR + 1),
  localparam int unsigned IW = $clog2(NW + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              load,
  input  logic              load_slot,
  input  logic [32*NK-1:0]  load_key,
  output logic              busy,
  output logic [1:0]        slot_valid,
  input  logic              rd_slot_a,
  input  logic [RW-1:0]     rd_round_a,
  output logic [32*NB-1:0]  rk_a,
  input  logic              rd_slot_b,
  input  logic [RW-1:0]     rd_round_b,
  output logic [32*NB-1:0]  rk_b
);
  import rijndael_pkg::*;

  logic [31:0] w [2][NW];
  logic        slot;
  logic [IW-1:0] idx;
  logic [31:0] prev, back, temp, next_w;

  assign prev = w[slot][idx - IW'(1)];
  assign back = w[slot][idx - IW'(NK)];

  always_comb begin
    temp = prev;
    if ((idx % IW'(NK)) == '0)
      temp = sub_word({prev[23:0], prev[31:24]}) ^ {rcon(5'(idx / IW'(NK))), 24'h0};
    else if (NK > 6 && (idx % IW'(NK)) == IW'(4))
      temp = sub_word(prev);
    next_w = back ^ temp;
  end

  always_ff @(posedge clk) begin
    if (load && !busy) begin
      for (int i = 0; i < NK; i++) w[load_slot][i] <= load_key[32*(NK-1-i) +: 32];
    end else if (busy) begin
      w[slot][idx] <= next_w;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy       <= 1'b0;
      slot       <= 1'b0;
      idx        <= '0;
      slot_valid <= 2'b00;
    end else if (load && !busy) begin
      busy             <= 1'b1;
      slot             <= load_slot;
      idx              <= IW'(NK);
      slot_valid[load_slot] <= 1'b0;
    end else if (busy) begin
      if (idx == IW'(NW - 1)) begin
        busy             <= 1'b0;
        slot_valid[slot] <= 1'b1;
      end
      idx <= idx + IW'(1);
    end
  end

  always_comb begin
    for (int c = 0; c < NB; c++) begin
      rk_a[32*(NB-1-c) +: 32] = w[rd_slot_a][int'(rd_round_a) * NB + c];
      rk_b[32*(NB-1-c) +: 32] = w[rd_slot_b][int'(rd_round_b) * NB + c];
    end
  end

endmodule
