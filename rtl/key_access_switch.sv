// Key-access switch of the secure bootstrap.
//
// Software can throw this switch once boot-time authentication is over, to
// cut off all further access to the on-chip master key. Nothing but a hard
// reset of the chip sets it back to the access-allowed position: the switch
// is a flip-flop that is cleared only by the asynchronous hard reset and can
// only be set by logic. While it is thrown, the key passed on is all zeros.
// Interface: throw (pulse) closes the switch; allowed is high while access is
// permitted; key_out is key_in gated by allowed. Effective the cycle after
// throw.
module key_access_switch #(
  parameter int unsigned KEY_W = 256
) (
  input  logic             clk,
  input  logic             hard_rst_n,
  input  logic             throw,
  input  logic [KEY_W-1:0] key_in,
  output logic             allowed,
  output logic [KEY_W-1:0] key_out
);
  logic thrown;

  always_ff @(posedge clk or negedge hard_rst_n) begin
    if (!hard_rst_n)  thrown <= 1'b0;
    else if (throw)   thrown <= 1'b1;
  end

  assign allowed = !thrown;
  assign key_out = allowed ? key_in : '0;

  stays_thrown: assert property (@(posedge clk) disable iff (!hard_rst_n) thrown |=> thrown);

endmodule
