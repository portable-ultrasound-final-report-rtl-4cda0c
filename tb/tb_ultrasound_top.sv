// End-to-end testbench of ultrasound_top at its default size: 8 cores of
// 256 points, a 2048-point cloud, a 16-entry FIFO.
//
// Frame 1 sends a full 2048-point cloud, frame 2 a 900-point cloud (so
// some cores get a partial sub-set and some none), frame 3 2148 points,
// of which the point memory must keep the first 2048 and raise cloud_full. In each frame the
// testbench requests a scan, answers tx_pulse with listen, streams the
// echo points with random gaps, marks the cloud complete, and takes the
// displayed hull with a random disp_ready. Expected result: the hull of
// each 256-point block by the reference model, gathered in the order the
// cores finished (read from proc_done, lowest index on ties), and the
// reference hull of that sequence. The display must match it exactly;
// independently, every strict vertex of the whole cloud's hull (monotone
// chain) must be displayed once and no displayed point may lie inside.
// Mechanisms counted, each of which must occur: every device state,
// cores finishing at different times, a core line with no point outside,
// with one point outside and a split, and a display stall.
module tb_ultrasound_top;
  import quickhull_pkg::*;
  import qh_ref_pkg::*;

  localparam int unsigned N_PROC = 8;
  localparam int unsigned SUBSET = 256;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic pulse_req, tx_pulse, listen, rx_valid, rx_done;
  point_t rx_point, disp_point;
  logic disp_valid, disp_ready, disp_last, cloud_full, error;
  dev_state_t state_o;
  logic [N_PROC-1:0] proc_done;
  logic [31:0] frame_cycles;

  ultrasound_top u_dut (.*);

  int checks = 0;
  int failures = 0;
  int state_seen [7];
  int staggered = 0, disp_stalls = 0;
  int leaf0 = 0, leaf1 = 0, splits = 0;
  int full_frames = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  always @(posedge clk) begin
    state_seen[int'(state_o)]++;
    if (disp_valid && !disp_ready) disp_stalls++;
  end

  // HULL_RECURSE outcomes over all slave cores (first cycle of each visit)
  for (genvar g = 0; g < N_PROC; g++) begin : g_mon
    qh_state_t prev;
    always @(posedge clk) begin
      prev <= u_dut.u_array.g_core[g].u_core.state;
      if (u_dut.u_array.g_core[g].u_core.state == QH_HULL_RECURSE && prev != QH_HULL_RECURSE) begin
        if (u_dut.u_array.g_core[g].u_core.pos_cnt == 0) leaf0++;
        else if (u_dut.u_array.g_core[g].u_core.pos_cnt == 1) leaf1++;
        else splits++;
      end
    end
  end

  task automatic frame(input int n);
    point_t cloud[$];
    point_t sub_h [N_PROC][$];
    point_t merged_in[$];
    point_t exp_h[$];
    point_t verts[$];
    point_t got[$];
    longint cyc;
    int done_at [N_PROC];
    int order[$];
    int cycles;
    bit distinct, last_ok;
    point_t sent[$];
    for (int i = 0; i < n; i++)
      sent.push_back('{y: coord_t'($urandom_range(255)), x: coord_t'($urandom_range(255))});
    // the point memory keeps the first N_PROC * SUBSET points
    for (int i = 0; i < n && i < int'(N_PROC * SUBSET); i++) cloud.push_back(sent[i]);
    for (int k = 0; k < int'(N_PROC); k++) begin
      point_t s[$];
      for (int i = k * int'(SUBSET); i < (k + 1) * int'(SUBSET) && i < n; i++) s.push_back(cloud[i]);
      ref_hull(s, sub_h[k], cyc);
      done_at[k] = -1;
    end
    chain(cloud, verts);
    // scan request and pulse
    @(negedge clk);
    pulse_req = 1;
    @(negedge clk);
    pulse_req = 0;
    check(tx_pulse, "tx_pulse in PULSE_SEND");
    repeat (3) @(negedge clk);
    listen = 1;
    @(negedge clk);
    listen = 0;
    // echo points
    for (int i = 0; i < n; ) begin
      rx_valid = ($urandom_range(4) != 0);
      rx_point = sent[i];
      if (rx_valid) i++;
      @(negedge clk);
    end
    rx_valid = 0;
    if (n > int'(N_PROC * SUBSET)) begin
      check(cloud_full, $sformatf("n=%0d: cloud_full after overfilling", n));
      full_frames++;
    end
    rx_done = 1;
    @(negedge clk);
    rx_done = 0;
    // processing and display
    cycles = 0;
    last_ok = 1;
    while (state_o != DEV_INIT && cycles < 500000) begin
      disp_ready = ($urandom_range(3) != 0);
      #1;
      for (int k = 0; k < int'(N_PROC); k++)
        if (proc_done[k] && done_at[k] < 0) begin
          done_at[k] = cycles;
          order.push_back(k);
        end
      if (disp_valid && disp_ready) begin
        got.push_back(disp_point);
        if (disp_last != (got.size() == int'(u_dut.hull_size))) last_ok = 0;
      end
      @(negedge clk);
      cycles++;
    end
    disp_ready = 0;
    distinct = 0;
    foreach (order[j]) begin
      if (done_at[order[j]] != done_at[order[0]]) distinct = 1;
      foreach (sub_h[order[j]][i]) merged_in.push_back(sub_h[order[j]][i]);
    end
    if (distinct) staggered++;
    ref_hull(merged_in, exp_h, cyc);
    check(state_o == DEV_INIT, $sformatf("n=%0d: frame completed", n));
    check(!error, $sformatf("n=%0d: no overflow", n));
    check(order.size() == N_PROC, $sformatf("n=%0d: every core finished", n));
    check(got == exp_h, $sformatf("n=%0d: displayed hull (%0d vs %0d points)", n, got.size(), exp_h.size()));
    check(last_ok, $sformatf("n=%0d: disp_last on the last point", n));
    foreach (verts[i]) begin
      int hits[$];
      hits = got.find_index with (item == verts[i]);
      check(hits.size() == 1, $sformatf("n=%0d: cloud vertex (%0d,%0d) displayed once", n,
                                        verts[i].x, verts[i].y));
    end
    foreach (got[i]) begin
      bit interior = 1'b1;
      for (int k = 0; k < verts.size(); k++)
        if (xval(got[i], verts[k], verts[(k+1) % verts.size()]) <= 0) interior = 1'b0;
      check(!interior, $sformatf("n=%0d: displayed (%0d,%0d) is on the hull", n, got[i].x, got[i].y));
    end
    $display("frame n=%0d: sub-hull points %0d, hull %0d points, frame_cycles %0d",
             n, merged_in.size(), got.size(), frame_cycles);
  endtask

  initial begin
    pulse_req = 0; listen = 0; rx_valid = 0; rx_point = 0; rx_done = 0; disp_ready = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    frame(N_PROC * SUBSET);
    frame(900);
    frame(N_PROC * SUBSET + 100);
    check(full_frames > 0, "point memory overfilled once");
    for (int s = 0; s < 7; s++)
      check(state_seen[s] > 0, $sformatf("device state %s visited", dev_state_t'(s)));
    check(staggered > 0, "cores finished at different times");
    check(leaf0 > 0 && leaf1 > 0 && splits > 0, "all HULL_RECURSE outcomes occurred");
    check(disp_stalls > 0, "display stall occurred");
    $display("recurse outcomes none=%0d one=%0d split=%0d, display stalls %0d",
             leaf0, leaf1, splits, disp_stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
