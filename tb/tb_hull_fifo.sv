// Self-checking testbench of hull_fifo.
//
// DEPTH 4. Random push and pop traffic against a queue model: order of
// the data, count, ready while full, valid while empty, and simultaneous
// push and pop at full. Also checks that a point pushed in one cycle can
// be popped in the next, and clear. Counts how often the FIFO was full
// with a push waiting (backpressure) and fails if that never happened.
module tb_hull_fifo;
  import quickhull_pkg::*;

  localparam int unsigned DEPTH = 4;
  localparam int unsigned CW = $clog2(DEPTH + 1);

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic clear, in_valid, in_ready, out_valid, out_ready;
  point_t in_data, out_data;
  logic [CW-1:0] count;

  hull_fifo #(.DEPTH(DEPTH)) u_dut (.*);

  int checks = 0;
  int failures = 0;
  int stalls = 0, full_both = 0;
  point_t model[$];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    clear = 0; in_valid = 0; in_data = 0; out_ready = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    check(!out_valid && count == 0 && in_ready, "empty after reset");
    // push then pop next cycle
    in_valid = 1; in_data = 16'h1234;
    @(negedge clk);
    in_valid = 0; out_ready = 1;
    #1;
    check(out_valid && out_data == 16'h1234, "one-cycle pass");
    @(negedge clk);
    out_ready = 0;
    for (int t = 0; t < 3000; t++) begin
      in_valid = ($urandom_range(3) != 0);
      in_data = point_t'($urandom);
      out_ready = ($urandom_range(2) == 0);
      #1;
      check(out_valid == (model.size() != 0), "valid iff not empty");
      check(in_ready == (model.size() < DEPTH || out_ready), "ready rule");
      check(count == CW'(model.size()), "count");
      if (out_valid) check(out_data == model[0], "head data");
      if (in_valid && !in_ready) stalls++;
      if (model.size() == DEPTH && in_valid && out_ready) full_both++;
      @(posedge clk);
      if (out_valid && out_ready) void'(model.pop_front());
      if (in_valid && in_ready) model.push_back(in_data);
      @(negedge clk);
    end
    check(stalls > 0, "backpressure occurred");
    check(full_both > 0, "push and pop while full occurred");
    clear = 1; in_valid = 0; @(negedge clk); clear = 0;
    check(!out_valid && count == 0, "clear empties");
    $display("stalls=%0d push+pop at full=%0d", stalls, full_both);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
