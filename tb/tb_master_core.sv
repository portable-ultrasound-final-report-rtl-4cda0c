// Self-checking testbench of master_core.
//
// N_PROC 2, SUBSET 32 (up to 64 points). Each frame clears the core,
// feeds sub-hull points with random gaps on in_valid, then raises merge,
// and checks that the merged hull equals the reference model (qh_ref_pkg)
// over the accepted points and that done comes the model's engine cycle
// count + 3 cycles after the merge request (one cycle to leave
// collection, one to start the engine, one to see it finish). One frame offers more points than
// fit and checks that in_ready drops and only 64 are taken.
module tb_master_core;
  import quickhull_pkg::*;
  import qh_ref_pkg::*;

  localparam int unsigned N_PROC = 2;
  localparam int unsigned SUBSET = 32;
  localparam int unsigned TOTAL = N_PROC * SUBSET;
  localparam int unsigned TAW = $clog2(TOTAL);
  localparam int unsigned TCW = $clog2(TOTAL + 1);

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic clear, in_valid, in_ready, merge, done, overflow;
  point_t in_data, hull_rd_data;
  logic [TCW-1:0] hull_size;
  logic [TAW-1:0] hull_rd_addr;

  master_core #(.N_PROC(N_PROC), .SUBSET(SUBSET)) u_dut (.*);

  int checks = 0;
  int failures = 0;
  int refused = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic frame(input int n, input int range);
    point_t acc[$];
    point_t exp_h[$];
    point_t got[$];
    longint cyc;
    int cycles, sent;
    @(negedge clk);
    clear = 1;
    @(negedge clk);
    clear = 0;
    sent = 0;
    while (sent < n) begin
      in_valid = ($urandom_range(2) != 0);
      in_data = '{y: coord_t'($urandom_range(range - 1)), x: coord_t'($urandom_range(range - 1))};
      #1;
      if (in_valid) begin
        if (in_ready) acc.push_back(in_data);
        else refused++;
        sent++;
      end
      @(negedge clk);
    end
    in_valid = 0;
    merge = 1;
    cycles = 0;
    while (!done && cycles < 100000) begin
      @(negedge clk);
      cycles++;
    end
    merge = 0;
    ref_hull(acc, exp_h, cyc);
    for (int i = 0; i < int'(hull_size); i++) begin
      hull_rd_addr = TAW'(i);
      #1;
      got.push_back(hull_rd_data);
    end
    check(done, $sformatf("n=%0d: done", n));
    check(!overflow, $sformatf("n=%0d: no overflow", n));
    check(got == exp_h, $sformatf("n=%0d: merged hull (%0d vs %0d points)", n, got.size(), exp_h.size()));
    check(longint'(cycles) == cyc + 3, $sformatf("n=%0d: %0d cycles, expected %0d", n, cycles, cyc + 3));
    check(acc.size() == ((n > int'(TOTAL)) ? TOTAL : n), $sformatf("n=%0d: accepted %0d", n, acc.size()));
    $display("n=%0d accepted=%0d hull=%0d cycles=%0d", n, acc.size(), got.size(), cycles);
  endtask

  initial begin
    clear = 0; in_valid = 0; in_data = 0; merge = 0; hull_rd_addr = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    frame(20, 256);
    frame(64, 64);
    frame(90, 32);
    frame(1, 256);
    check(refused > 0, "input refused when full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
