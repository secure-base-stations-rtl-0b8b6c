// Behavioural model of the on-chip fuse memory that holds the master key.
//
// Fuses are one-time programmable, non-volatile cells: they leave the factory
// all zero, each can be burned once to a one, and no reset clears them. An
// extra fuse enables burning; once the key has been entered it is burned as
// well and the key is frozen for good. Being a process-specific macro, this
// is a simulation model, not synthesizable logic: the cells start at zero
// through an initial block and a burn takes BURN_DELAY of simulated time.
// Interface: burn (one clock) with burn_idx selects a cell, 0..KEY_W-1 for the
// key bits and KEY_W for the lock fuse; burns while locked are ignored. key
// shows the fuse contents; locked is high once the lock fuse is burned.
module fuse_key_store #(
  parameter int unsigned KEY_W = 256,
  parameter int unsigned IDX_W = $clog2(KEY_W + 1)
) (
  input  logic             clk,
  input  logic             burn,
  input  logic [IDX_W-1:0] burn_idx,
  output logic [KEY_W-1:0] key,
  output logic             locked
);
  localparam time BURN_DELAY = 1ns;

  logic [KEY_W-1:0] cells;
  logic             lock_fuse;

  initial begin
    cells     = '0;
    lock_fuse = 1'b0;
  end

  always @(posedge clk) begin
    if (burn && !lock_fuse) begin
      if (int'(burn_idx) == KEY_W) lock_fuse <= #BURN_DELAY 1'b1;
      else if (int'(burn_idx) < KEY_W) cells[burn_idx] <= #BURN_DELAY 1'b1;
    end
  end

  assign key    = cells;
  assign locked = lock_fuse;

endmodule
