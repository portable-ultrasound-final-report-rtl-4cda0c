// Self-checking testbench of processor_array.
//
// N_PROC 4, SUBSET 32. The point memory is a plain array; the output
// sink takes points with a random ready. For clouds of 128, 100 and 40
// points it checks that divided comes N + 2 cycles after start, that
// every core's hull arrives intact and in one piece (compared with the
// reference model in qh_ref_pkg, per core, in the order the cores were
// drained), that proc_done rises for every core, that gathered follows,
// and that nothing overflows. It counts the frames in which cores
// finished at different times and the cycles the sink stalled the
// gatherer, and fails if either never happened.
module tb_processor_array;
  import quickhull_pkg::*;
  import qh_ref_pkg::*;

  localparam int unsigned N_PROC = 4;
  localparam int unsigned SUBSET = 32;
  localparam int unsigned TOTAL = N_PROC * SUBSET;
  localparam int unsigned TAW = $clog2(TOTAL);
  localparam int unsigned TCW = $clog2(TOTAL + 1);

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start, out_valid, out_ready, divided, gathered, overflow;
  logic [TCW-1:0] num_pts;
  logic [TAW-1:0] mem_addr;
  point_t mem_data, out_data;
  logic [N_PROC-1:0] proc_done;

  point_t mem [TOTAL];
  assign mem_data = mem[mem_addr];

  processor_array #(.N_PROC(N_PROC), .SUBSET(SUBSET)) u_dut (.*);

  int checks = 0;
  int failures = 0;
  int staggered = 0, stalls = 0;
  point_t stream[$];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  always @(posedge clk) begin
    if (out_valid && out_ready) stream.push_back(out_data);
    if (out_valid && !out_ready) stalls++;
  end

  task automatic run(input int n);
    point_t exp_h [N_PROC][$];
    int done_at [N_PROC];
    int order[$];
    int cycles, div_at, pos;
    longint cyc;
    bit distinct;
    foreach (mem[i]) mem[i] = '{y: coord_t'($urandom_range(63)), x: coord_t'($urandom_range(63))};
    for (int k = 0; k < int'(N_PROC); k++) begin
      point_t s[$];
      for (int i = k * int'(SUBSET); i < (k + 1) * int'(SUBSET) && i < n; i++) s.push_back(mem[i]);
      ref_hull(s, exp_h[k], cyc);
      done_at[k] = -1;
    end
    stream.delete();
    @(negedge clk);
    start = 1; num_pts = TCW'(n);
    @(negedge clk);
    start = 0;
    cycles = 1; div_at = -1;
    while (!gathered && cycles < 100000) begin
      if (divided) div_at = cycles;
      out_ready = ($urandom_range(3) != 0);
      for (int k = 0; k < int'(N_PROC); k++)
        if (proc_done[k] && done_at[k] < 0 && div_at >= 0) begin
          done_at[k] = cycles;
          order.push_back(k);
        end
      @(negedge clk);
      cycles++;
    end
    out_ready = 0;
    check(gathered, $sformatf("n=%0d: gathered", n));
    check(div_at == n + 2, $sformatf("n=%0d: divided after %0d cycles", n, div_at));
    check(!overflow, $sformatf("n=%0d: no overflow", n));
    check(order.size() == N_PROC, $sformatf("n=%0d: all cores reported done", n));
    // cores are drained in the order they finished (lowest index on ties)
    pos = 0;
    distinct = 0;
    foreach (order[j]) begin
      int k = order[j];
      point_t seg[$];
      if (j > 0 && done_at[order[j]] != done_at[order[0]]) distinct = 1;
      for (int i = 0; i < exp_h[k].size() && pos + i < stream.size(); i++) seg.push_back(stream[pos + i]);
      check(seg == exp_h[k], $sformatf("n=%0d: hull of core %0d (%0d points)", n, k, exp_h[k].size()));
      pos += exp_h[k].size();
    end
    check(pos == stream.size(), $sformatf("n=%0d: %0d points gathered, %0d expected", n, stream.size(), pos));
    if (distinct) staggered++;
    $display("n=%0d: gathered %0d points in %0d cycles", n, stream.size(), cycles);
  endtask

  initial begin
    start = 0; num_pts = 0; out_ready = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(128); run(100); run(40);
    check(staggered > 0, "cores finished at different times");
    check(stalls > 0, "sink backpressure occurred");
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
