// Testbench of write_buffer (DEPTH = 3), driven by random operations and
// compared with a queue model kept in the testbench: bus writes merge into an
// entry of the same block or take a new one, full/empty follow the count, the
// head entry is shown on port B, b_take makes it busy for port A in the same
// cycle, backfill only replaces bytes that were not valid, and pop frees it.
module tb_write_buffer;
  import vault_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [TAG_W-1:0] a_tag = 0, b_tag;
  logic a_hit, a_hit_busy, full, a_wr = 0, b_valid, b_take = 0, b_fill = 0, b_pop = 0, empty;
  logic [31:0] a_hit_be, a_be = 0, b_be;
  logic [255:0] a_hit_data, a_wdata = 0, b_data, b_fill_data = 0;

  write_buffer #(.DEPTH(3)) dut (.clk, .rst_n, .a_tag, .a_hit, .a_hit_busy, .a_hit_be, .a_hit_data,
    .full, .a_wr, .a_be, .a_wdata, .b_valid, .b_tag, .b_be, .b_data, .b_take, .b_fill, .b_fill_data,
    .b_pop, .empty);

  // model
  typedef struct { logic [TAG_W-1:0] tag; logic [31:0] be; logic [255:0] data; bit busy; } ent_t;
  ent_t q[$];
  int merges = 0, allocs = 0, fills = 0, busy_seen = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic int find(input logic [TAG_W-1:0] t);
    foreach (q[i]) if (q[i].tag == t) return i;
    return -1;
  endfunction

  function automatic logic [255:0] merge_bytes(input logic [255:0] old, input logic [255:0] nw, input logic [31:0] be);
    for (int b = 0; b < 32; b++) if (be[b]) old[8*b +: 8] = nw[8*b +: 8];
    return old;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int k;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 600; n++) begin
      @(negedge clk);
      a_wr = 0; b_take = 0; b_fill = 0; b_pop = 0;
      // compare state with the model
      check(empty == (q.size() == 0) && full == (q.size() == 3), "empty/full");
      check(b_valid == (q.size() > 0), "head valid");
      if (q.size() > 0) begin
        check(b_tag == q[0].tag && b_be == q[0].be, "head tag and byte valids");
        for (int b = 0; b < 32; b++)
          if (q[0].be[b]) check(b_data[8*b +: 8] == q[0].data[8*b +: 8], "head data");
      end
      a_tag = 27'($urandom % 5);
      #1;
      k = find(a_tag);
      check(a_hit == (k >= 0), "lookup hit");
      if (k >= 0) begin
        check(a_hit_be == q[k].be && a_hit_busy == q[k].busy, "lookup valids and busy");
        for (int b = 0; b < 32; b++)
          if (q[k].be[b]) check(a_hit_data[8*b +: 8] == q[k].data[8*b +: 8], "lookup data");
      end
      case ($urandom % 4)
        0, 1: if ((k >= 0 && !q[k].busy) || (k < 0 && q.size() < 3)) begin
          a_wr = 1;
          a_be = ($urandom % 3 == 0) ? '1 : $urandom;
          a_wdata = rand256();
          if (k >= 0) begin
            q[k].be |= a_be; q[k].data = merge_bytes(q[k].data, a_wdata, a_be); merges++;
          end else begin
            q.push_back('{a_tag, a_be, merge_bytes('0, a_wdata, a_be), 0}); allocs++;
          end
        end
        2: if (q.size() > 0 && !q[0].busy) begin
          b_take = 1;
          #1;
          if (k == 0) begin check(a_hit_busy, "busy in the take cycle"); busy_seen++; end
          q[0].busy = 1;
        end
        default: if (q.size() > 0 && q[0].busy) begin
          if (q[0].be != '1) begin
            b_fill = 1; b_fill_data = rand256();
            q[0].data = merge_bytes(q[0].data, b_fill_data, ~q[0].be); q[0].be = '1; fills++;
          end else begin
            b_pop = 1;
            void'(q.pop_front());
          end
        end
      endcase
    end
    check(merges > 10 && allocs > 10 && fills > 5 && busy_seen > 0, "all cases exercised");
    $display("merges %0d allocs %0d fills %0d busy-in-take %0d", merges, allocs, fills, busy_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
