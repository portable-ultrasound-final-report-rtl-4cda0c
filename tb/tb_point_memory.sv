// Self-checking testbench of point_memory.
//
// Uses a small DEPTH of 64. Appends random points with gaps, checks count
// after each write, reads every point back, fills the memory and checks
// that full rises and that further points are dropped, then checks that
// clear empties it and that a new cloud overwrites from address 0.
module tb_point_memory;
  import quickhull_pkg::*;

  localparam int unsigned DEPTH = 64;
  localparam int unsigned AW = $clog2(DEPTH);
  localparam int unsigned CW = $clog2(DEPTH + 1);

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic clear, wr_en, full;
  point_t wr_data, rd_data;
  logic [CW-1:0] count;
  logic [AW-1:0] rd_addr;

  point_memory #(.DEPTH(DEPTH)) u_dut (.*);

  int checks = 0;
  int failures = 0;
  point_t model[$];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic readback(input string tag);
    foreach (model[i]) begin
      rd_addr = AW'(i);
      #1;
      check(rd_data == model[i], $sformatf("%s: read %0d", tag, i));
    end
  endtask

  initial begin
    clear = 0; wr_en = 0; wr_data = 0; rd_addr = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    check(count == 0 && !full, "empty after reset");
    // 40 points with idle cycles in between
    while (model.size() < 40) begin
      @(negedge clk);
      wr_en = ($urandom_range(2) != 0);
      wr_data = point_t'($urandom);
      if (wr_en) model.push_back(wr_data);
      @(posedge clk); #1;
      check(count == CW'(model.size()), "count follows writes");
    end
    @(negedge clk); wr_en = 0;
    readback("partial");
    // fill and overfill
    while (model.size() < DEPTH + 5) begin
      @(negedge clk);
      wr_en = 1; wr_data = point_t'($urandom);
      model.push_back(wr_data);
    end
    @(negedge clk); wr_en = 0;
    check(full && count == CW'(DEPTH), "full after DEPTH points");
    while (model.size() > DEPTH) void'(model.pop_back());
    readback("full");
    // clear and refill
    clear = 1; @(negedge clk); clear = 0;
    check(count == 0 && !full, "clear empties");
    model.delete();
    for (int i = 0; i < 8; i++) begin
      wr_en = 1; wr_data = point_t'($urandom); model.push_back(wr_data);
      @(negedge clk);
    end
    wr_en = 0;
    check(count == 8, "count after refill");
    readback("refill");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
