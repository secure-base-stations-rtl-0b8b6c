// Testbench of key_region_ctrl (MEM_BLOCKS = 6): before a mutation every block
// uses the current slot; during one, blocks below the boundary use the new
// slot; each step advances the boundary; after the last block the new slot
// becomes current, the boundary returns to 0 and finished pulses once. Start
// is ignored while a mutation is running.
module tb_key_region_ctrl;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start = 0, step_done = 0, q_slot, active, cur_slot, new_slot, finished;
  logic [26:0] q_tag = 0, boundary;

  key_region_ctrl #(.MEM_BLOCKS(6)) dut (.clk, .rst_n, .start, .step_done, .q_tag, .q_slot,
    .active, .boundary, .cur_slot, .new_slot, .finished);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int fin = 0;
  always @(posedge clk) if (finished) fin++;

  initial begin
    logic c;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int round = 0; round < 2; round++) begin
      c = cur_slot;
      for (int t = 0; t < 6; t++) begin q_tag = 27'(t); #1; check(q_slot == c, "idle: current slot"); end
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      check(active && boundary == 0, "mutation started");
      for (int b = 0; b < 6; b++) begin
        for (int t = 0; t < 6; t++) begin
          q_tag = 27'(t); #1;
          check(q_slot == ((t < b) ? !c : c), $sformatf("block %0d at boundary %0d", t, b));
        end
        if (b == 2) begin @(negedge clk); start = 1; @(negedge clk); start = 0; check(boundary == 2, "start ignored"); end
        @(negedge clk); step_done = 1; @(negedge clk); step_done = 0;
      end
      check(!active && boundary == 0 && cur_slot == !c, "mutation finished, slots swapped");
    end
    check(fin == 2, "finished pulsed once per mutation");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
