// Key regions and key mutation of the encrypted memory.
//
// Memory is split by a boundary register into two regions, each encrypted
// with its own key slot. Blocks below the boundary use the new key, blocks at
// or above it the current one; one comparison picks the slot. Changing the
// key (mutation) moves the boundary up one block at a time: each block is
// read, decrypted with the current key, encrypted with the new key and written
// back, and then the boundary is incremented. When it reaches the end of
// memory the new key covers everything: it becomes the current key, the
// boundary returns to 0, and the other slot is free to take the next key.
//
// Interface: start (pulse, ignored while active) begins a mutation towards the
// slot that is not current. step_done (pulse, from the encryption logic) says
// the block at the boundary has been re-encrypted. q_tag is a block address;
// q_slot is the key slot it uses right now. finished pulses once per
// completed mutation. MEM_BLOCKS is the number of 256-bit logical blocks.
module key_region_ctrl
  import vault_pkg::*;
#(
  parameter int unsigned MEM_BLOCKS = 3728270
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic             step_done,
  input  logic [TAG_W-1:0] q_tag,
  output logic             q_slot,
  output logic             active,
  output logic [TAG_W-1:0] boundary,
  output logic             cur_slot,
  output logic             new_slot,
  output logic             finished
);
  assign new_slot = ~cur_slot;
  assign q_slot   = (active && q_tag < boundary) ? new_slot : cur_slot;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active   <= 1'b0;
      boundary <= '0;
      cur_slot <= 1'b0;
      finished <= 1'b0;
    end else begin
      finished <= 1'b0;
      if (!active) begin
        if (start) begin
          active   <= 1'b1;
          boundary <= '0;
        end
      end else if (step_done) begin
        if (boundary == TAG_W'(MEM_BLOCKS - 1)) begin
          active   <= 1'b0;
          boundary <= '0;
          cur_slot <= new_slot;
          finished <= 1'b1;
        end else begin
          boundary <= boundary + TAG_W'(1);
        end
      end
    end
  end

  step_only_when_active: assert property (@(posedge clk) disable iff (!rst_n) step_done |-> active);

endmodule
