// Self-checking testbench of dispatcher.
//
// N_PROC 4, SUBSET 16 (64 points in all). The point memory is a plain
// array here. For cloud sizes 0, 10, 16, 37, 64 and 100 (more than fits,
// clamped to 64) it records every load-port write and checks that point
// i reached processor i / 16 at address i mod 16, that no write hit a
// wrong processor, that sub_n holds the sub-set sizes and that done
// comes num_pts + 2 cycles after start.
module tb_dispatcher;
  import quickhull_pkg::*;

  localparam int unsigned N_PROC = 4;
  localparam int unsigned SUBSET = 16;
  localparam int unsigned TOTAL = N_PROC * SUBSET;
  localparam int unsigned TAW = $clog2(TOTAL);
  localparam int unsigned TCW = $clog2(TOTAL + 1);
  localparam int unsigned SAW = $clog2(SUBSET);
  localparam int unsigned SCW = $clog2(SUBSET + 1);

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start, busy, done;
  logic [TCW-1:0] num_pts;
  logic [TAW-1:0] mem_addr;
  point_t mem_data, ld_data;
  logic [N_PROC-1:0] ld_en;
  logic [SAW-1:0] ld_addr;
  logic [SCW-1:0] sub_n [N_PROC];

  point_t mem [TOTAL];
  assign mem_data = mem[mem_addr];

  dispatcher #(.N_PROC(N_PROC), .SUBSET(SUBSET)) u_dut (.*);

  int checks = 0;
  int failures = 0;
  point_t got [N_PROC][SUBSET];
  int writes;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  always @(posedge clk) begin
    for (int k = 0; k < int'(N_PROC); k++)
      if (ld_en[k]) begin
        got[k][ld_addr] <= ld_data;
        writes++;
      end
    if ($countones(ld_en) > 1) begin
      failures++;
      $display("FAIL: two processors loaded at once");
    end
  end

  task automatic run(input int n);
    int eff, cycles;
    eff = (n > int'(TOTAL)) ? int'(TOTAL) : n;
    foreach (mem[i]) mem[i] = point_t'($urandom);
    foreach (got[k, j]) got[k][j] = '0;
    writes = 0;
    @(negedge clk);
    start = 1; num_pts = TCW'(n > int'(TOTAL) ? TOTAL : n);
    if (n > int'(TOTAL)) num_pts = '1;
    @(negedge clk);
    start = 0;
    cycles = 1;
    while (!done) begin
      cycles++;
      @(negedge clk);
    end
    check(cycles == eff + 2, $sformatf("n=%0d: done after %0d cycles", n, cycles));
    check(writes == eff, $sformatf("n=%0d: %0d writes", n, writes));
    for (int i = 0; i < eff; i++)
      check(got[i / SUBSET][i % SUBSET] == mem[i], $sformatf("n=%0d: point %0d", n, i));
    for (int k = 0; k < int'(N_PROC); k++) begin
      int e = eff - k * int'(SUBSET);
      if (e < 0) e = 0;
      if (e > int'(SUBSET)) e = int'(SUBSET);
      check(int'(sub_n[k]) == e, $sformatf("n=%0d: sub_n[%0d]=%0d expected %0d", n, k, sub_n[k], e));
    end
  endtask

  initial begin
    start = 0; num_pts = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(0); run(10); run(16); run(37); run(64); run(100);
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
