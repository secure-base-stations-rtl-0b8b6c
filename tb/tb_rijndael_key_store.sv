// Testbench of rijndael_key_store: loads random keys into both slots and
// compares every round key on both read ports with the reference key
// expansion; checks that slot_valid drops during expansion and that the
// expansion takes NB*(NR+1)-NK = 136 cycles.
module tb_rijndael_key_store;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic load = 0, load_slot = 0, busy;
  logic [255:0] load_key = '0;
  logic [1:0] slot_valid;
  logic rs_a = 0, rs_b = 0;
  logic [3:0] rr_a = 0, rr_b = 0;
  logic [287:0] rk_a, rk_b;
  logic [31:0] w [2][200];

  rijndael_key_store dut (.clk, .rst_n, .load, .load_slot, .load_key, .busy, .slot_valid,
    .rd_slot_a(rs_a), .rd_round_a(rr_a), .rk_a, .rd_slot_b(rs_b), .rd_round_b(rr_b), .rk_b);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load_one(input logic s, input logic [255:0] k);
    logic [31:0] tmp [200];
    int cyc;
    expand(9, 8, k, tmp);
    w[s] = tmp;
    @(negedge clk); load = 1; load_slot = s; load_key = k;
    @(negedge clk); load = 0;
    check(!slot_valid[s] && busy, "slot invalid while expanding");
    cyc = 0;
    while (busy) begin @(negedge clk); cyc++; end
    check(cyc == 136, $sformatf("expansion took %0d cycles", cyc));
    check(slot_valid[s], "slot valid after expansion");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    check(slot_valid == 2'b00, "no valid slot after reset");
    load_one(0, 256'h000102030405060708090a0b0c0d0e0f101112131415161718191a1b1c1d1e1f);
    load_one(1, rand256());
    for (int r = 0; r <= 15; r++) begin
      @(negedge clk); rs_a = 0; rr_a = 4'(r); rs_b = 1; rr_b = 4'(15 - r);
      #1;
      check(rk_a == round_key(9, w[0], r), $sformatf("slot 0 round %0d", r));
      check(rk_b == round_key(9, w[1], 15 - r), $sformatf("slot 1 round %0d", 15 - r));
    end
    // round key 0 starts with the key itself
    @(negedge clk); rs_a = 0; rr_a = 4'd0; #1;
    check(rk_a[287 -: 256] == 256'h000102030405060708090a0b0c0d0e0f101112131415161718191a1b1c1d1e1f,
          "round key 0 holds the key");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
