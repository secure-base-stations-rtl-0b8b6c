// Write buffer of the encrypted memory: a queue of pending block writes
// between the bus interface and the encryption logic.
//
// Each entry holds one 256-bit block (tag = block address), its data and a
// valid bit per byte. Bus writes complete as soon as they are in the buffer:
// a write to a block already queued merges its bytes into that entry,
// otherwise it takes a new entry at the tail. Entries leave in order from the
// head. A head entry whose bytes are not all valid is first backfilled by
// the encryption logic with the missing bytes read from memory; only a fully
// valid entry is encrypted and written. Reads that find all the bytes they
// need in an entry are served from it.
//
// Port A (bus side): lookup of a_tag gives a_hit, the entry's byte valids and
// data, and a_hit_busy when the entry is held by the encryption logic (it may
// then not be merged into). a_wr writes a_be/a_wdata: into the hit entry if
// a_hit and not a_hit_busy, else into a new tail entry (the caller checks
// full). Port B (engine side): the head entry is shown on b_*; b_take marks it
// busy (it is busy for port A in the same cycle); b_fill writes the bytes that
// are not yet valid and makes the entry fully valid; b_pop frees it.
// There is at most one entry per tag. Depth is this design's choice.
module write_buffer
  import vault_pkg::*;
#(
  parameter int unsigned DEPTH = 4,
  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // port A
  input  logic [TAG_W-1:0]      a_tag,
  output logic                  a_hit,
  output logic                  a_hit_busy,
  output logic [LINE_BYTES-1:0] a_hit_be,
  output logic [LINE_W-1:0]     a_hit_data,
  output logic                  full,
  input  logic                  a_wr,
  input  logic [LINE_BYTES-1:0] a_be,
  input  logic [LINE_W-1:0]     a_wdata,
  // port B
  output logic                  b_valid,
  output logic [TAG_W-1:0]      b_tag,
  output logic [LINE_BYTES-1:0] b_be,
  output logic [LINE_W-1:0]     b_data,
  input  logic                  b_take,
  input  logic                  b_fill,
  input  logic [LINE_W-1:0]     b_fill_data,
  input  logic                  b_pop,
  output logic                  empty
);
  logic [TAG_W-1:0]      tag  [DEPTH];
  logic [LINE_BYTES-1:0] vbe  [DEPTH];
  logic [LINE_W-1:0]     data [DEPTH];
  logic [DEPTH-1:0]      used, busy;
  logic [PW-1:0]         head, tail, hit_idx;
  logic [PW:0]           count;

  always_comb begin
    a_hit   = 1'b0;
    hit_idx = '0;
    for (int i = 0; i < DEPTH; i++)
      if (used[i] && tag[i] == a_tag) begin
        a_hit   = 1'b1;
        hit_idx = PW'(i);
      end
    a_hit_busy = a_hit && (busy[hit_idx] || (b_take && hit_idx == head));
    a_hit_be   = a_hit ? vbe[hit_idx] : '0;
    a_hit_data = data[hit_idx];
  end

  assign full    = (count == (PW+1)'(DEPTH));
  assign empty   = (count == '0);
  assign b_valid = used[head];
  assign b_tag   = tag[head];
  assign b_be    = vbe[head];
  assign b_data  = data[head];

  logic merge, alloc;
  assign merge = a_wr && a_hit && !a_hit_busy;
  assign alloc = a_wr && !a_hit && !full;

  always_ff @(posedge clk) begin
    for (int i = 0; i < DEPTH; i++) begin
      if ((merge && hit_idx == PW'(i)) || (alloc && tail == PW'(i)))
        for (int b = 0; b < LINE_BYTES; b++)
          if (a_be[b]) data[i][8*b +: 8] <= a_wdata[8*b +: 8];
      if (b_fill && head == PW'(i))
        for (int b = 0; b < LINE_BYTES; b++)
          if (!vbe[i][b]) data[i][8*b +: 8] <= b_fill_data[8*b +: 8];
      if (alloc && tail == PW'(i)) tag[i] <= a_tag;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      used  <= '0;
      busy  <= '0;
      head  <= '0;
      tail  <= '0;
      count <= '0;
      for (int i = 0; i < DEPTH; i++) vbe[i] <= '0;
    end else begin
      if (merge) vbe[hit_idx] <= vbe[hit_idx] | a_be;
      if (alloc) begin
        vbe[tail]  <= a_be;
        used[tail] <= 1'b1;
        busy[tail] <= 1'b0;
        tail       <= (tail == PW'(DEPTH - 1)) ? '0 : tail + PW'(1);
      end
      if (b_take && used[head]) busy[head] <= 1'b1;
      if (b_fill) vbe[head] <= '1;
      if (b_pop && used[head]) begin
        used[head] <= 1'b0;
        busy[head] <= 1'b0;
        head       <= (head == PW'(DEPTH - 1)) ? '0 : head + PW'(1);
      end
      count <= count + (PW+1)'(alloc) - (PW+1)'(b_pop && used[head]);
    end
  end

  no_write_when_full: assert property (@(posedge clk) disable iff (!rst_n)
    a_wr |-> (a_hit && !a_hit_busy) || !full);
  no_merge_into_busy: assert property (@(posedge clk) disable iff (!rst_n)
    a_wr && a_hit |-> !a_hit_busy);

endmodule
