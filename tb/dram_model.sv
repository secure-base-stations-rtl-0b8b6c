// Behavioural stand-in for the off-chip DDR2 memory behind the DRAM
// controller's word port. It stores 40-bit words sparsely (unwritten words
// read as zero), accepts one command per cycle (with optional random stalls)
// and returns read data in order LATENCY cycles after the command. Tasks let a
// testbench flip stored bits (single-event upsets, tampering) or read and
// overwrite words directly.
module dram_model
  import vault_pkg::*;
#(
  parameter int unsigned LATENCY = 6,
  parameter bit          STALLS  = 1'b0
) (
  input  logic              clk,
  input  logic              cmd_valid,
  output logic              cmd_ready,
  input  dram_cmd_t         cmd,
  output logic              rvalid,
  output logic [DRAM_W-1:0] rdata
);
  logic [DRAM_W-1:0] mem [int unsigned];
  logic [DRAM_W-1:0] pipe_d [LATENCY];
  logic              pipe_v [LATENCY];
  int unsigned       writes = 0, reads = 0;

  initial begin
    for (int i = 0; i < LATENCY; i++) begin pipe_v[i] = 0; pipe_d[i] = 0; end
    cmd_ready = 1;
  end

  assign rvalid = pipe_v[LATENCY-1];
  assign rdata  = pipe_d[LATENCY-1];

  always @(posedge clk) begin
    for (int i = LATENCY-1; i > 0; i--) begin
      pipe_v[i] <= pipe_v[i-1];
      pipe_d[i] <= pipe_d[i-1];
    end
    pipe_v[0] <= 0;
    if (cmd_valid && cmd_ready) begin
      if (cmd.we) begin
        mem[cmd.addr] = cmd.wdata;
        writes++;
      end else begin
        pipe_v[0] <= 1;
        pipe_d[0] <= mem.exists(cmd.addr) ? mem[cmd.addr] : '0;
        reads++;
      end
    end
    cmd_ready <= STALLS ? ($urandom % 4 != 0) : 1'b1;
  end

  function automatic logic [DRAM_W-1:0] peek(input int unsigned a);
    return mem.exists(a) ? mem[a] : '0;
  endfunction

  function automatic void poke(input int unsigned a, input logic [DRAM_W-1:0] d);
    mem[a] = d;
  endfunction

  function automatic void flip(input int unsigned a, input int b);
    logic [DRAM_W-1:0] d;
    d = peek(a);
    d[b] = ~d[b];
    mem[a] = d;
  endfunction

endmodule
