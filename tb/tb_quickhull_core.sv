// Self-checking testbench of quickhull_core.
//
// Each case loads a point set, starts the core and waits for done. The
// expected hull sequence and cycle count come from a recursive quickhull
// model written here with queues (same push order, same strict "> 0"
// test, same first-found furthest point). The hull is also checked
// against Andrew's monotone chain, an unrelated algorithm: every strict
// hull vertex must be reported, nothing reported may lie strictly inside
// the hull, and nothing may be reported twice. The sets include the
// sizes and coordinate ranges of the single-core runtime table (16 to 256
// points, coordinates 0-31 and 0-63); for those the cycle count at
// 100 MHz must not exceed the runtime the table reports. Edge cases: an
// empty set, one point, all points equal, two points, collinear points
// and points on a circle. Every HULL_RECURSE outcome (0, 1 and more than
// one point outside the line) must occur. A second instance with a point
// stack of only 2 x 16 + 2 entries must report overflow on 16 points along
// a parabola, stop, and clear the flag on its next run.
module tb_quickhull_core;
  import quickhull_pkg::*;

  localparam int unsigned MAX_PTS = 256;
  localparam int unsigned NW = $clog2(MAX_PTS + 1);
  localparam int unsigned AW = $clog2(MAX_PTS);

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic          ld_en;
  logic [AW-1:0] ld_addr;
  point_t        ld_data;
  logic          start;
  logic [NW-1:0] num_pts;
  logic          done, overflow;
  qh_state_t     state;
  logic [NW-1:0] hull_size;
  logic [AW-1:0] hull_rd_addr;
  point_t        hull_rd_data;

  quickhull_core #(.MAX_PTS(MAX_PTS)) u_dut (
    .clk, .rst_n, .ld_en, .ld_addr, .ld_data, .start, .num_pts,
    .done, .overflow_o(overflow), .state_o(state),
    .hull_size, .hull_rd_addr, .hull_rd_data
  );

  // second instance with a point stack too small for its sets
  localparam int unsigned SMALL_PTS = 16;
  localparam int unsigned SMALL_PSTACK = 2 * SMALL_PTS + 2;
  logic       s_ld_en, s_start, s_done, s_ovf;
  logic [3:0] s_ld_addr;
  point_t     s_ld_data, s_hull_data;
  logic [4:0] s_hull_size;
  quickhull_core #(.MAX_PTS(SMALL_PTS), .PSTACK_DEPTH(SMALL_PSTACK)) u_small (
    .clk, .rst_n, .ld_en(s_ld_en), .ld_addr(s_ld_addr), .ld_data(s_ld_data),
    .start(s_start), .num_pts(5'd16), .done(s_done), .overflow_o(s_ovf), .state_o(),
    .hull_size(s_hull_size), .hull_rd_addr(4'd0), .hull_rd_data(s_hull_data)
  );

  int checks = 0;
  int failures = 0;
  int n_leaf0 = 0, n_leaf1 = 0, n_split = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // count the HULL_RECURSE outcomes (first cycle of each visit)
  qh_state_t prev_state;
  always @(posedge clk) begin
    prev_state <= state;
    if (state == QH_HULL_RECURSE && prev_state != QH_HULL_RECURSE) begin
      if (u_dut.pos_cnt == 0) n_leaf0++;
      else if (u_dut.pos_cnt == 1) n_leaf1++;
      else n_split++;
    end
  end

  // ------------------------------------------------------------- reference
  function automatic longint xval(point_t p, point_t a, point_t b);
    longint ax = a.x, ay = a.y, bx = b.x, by = b.y, px = p.x, py = p.y;
    return (ax - px) * (by - py) - (ay - py) * (bx - px);
  endfunction

  point_t exp_hull[$];
  longint exp_cycles;

  function automatic void ref_line(point_t a, point_t b, point_t s[$]);
    point_t pos[$];
    point_t far;
    longint best = 0;
    exp_cycles += s.size();
    foreach (s[i]) begin
      longint c = xval(s[i], a, b);
      if (c > 0) begin
        if (pos.size() == 0 || c > best) begin
          best = c;
          far = s[i];
        end
        pos.push_back(s[i]);
      end
    end
    if (pos.size() <= 1) begin
      exp_cycles += 1;
      exp_hull.push_back(a);
      if (pos.size() == 1) exp_hull.push_back(far);
    end else begin
      exp_cycles += pos.size();
      ref_line(far, b, pos);
      ref_line(a, far, pos);
    end
  endfunction

  function automatic bit lt(point_t l, point_t r);
    return (l.x < r.x) || (l.x == r.x && l.y < r.y);
  endfunction

  function automatic void ref_quickhull(point_t s[$]);
    point_t mn, mx;
    exp_hull.delete();
    exp_cycles = 1;
    if (s.size() == 0) return;
    mn = s[0];
    mx = s[0];
    foreach (s[i]) begin
      if (lt(s[i], mn)) mn = s[i];
      if (lt(mx, s[i])) mx = s[i];
    end
    exp_cycles += 2 * s.size();
    if (mn == mx) begin
      exp_hull.push_back(mn);
      return;
    end
    ref_line(mx, mn, s);
    ref_line(mn, mx, s);
  endfunction

  // strict hull vertices by Andrew's monotone chain
  function automatic void chain(point_t s[$], ref point_t v[$]);
    point_t p[$];
    point_t h[$];
    p = s;
    p.sort() with ({item.x, item.y});
    v.delete();
    if (p.size() == 0) return;
    foreach (p[i]) begin
      while (h.size() >= 2 && xval(p[i], h[h.size()-2], h[h.size()-1]) <= 0) void'(h.pop_back());
      h.push_back(p[i]);
    end
    for (int i = p.size() - 2, int lo = h.size() + 1; i >= 0; i--) begin
      while (h.size() >= lo && xval(p[i], h[h.size()-2], h[h.size()-1]) <= 0) void'(h.pop_back());
      h.push_back(p[i]);
    end
    if (h.size() > 1) void'(h.pop_back());
    v = h;
  endfunction

  // ------------------------------------------------------------ one case
  task automatic run_case(input point_t s[$], input string name, input longint paper_ns);
    point_t got[$];
    point_t verts[$];
    int cycles;
    string msg;
    ref_quickhull(s);
    chain(s, verts);
    // load
    @(negedge clk);
    foreach (s[i]) begin
      ld_en = 1'b1;
      ld_addr = AW'(i);
      ld_data = s[i];
      @(negedge clk);
    end
    ld_en = 1'b0;
    start = 1'b1;
    num_pts = NW'(s.size());
    @(negedge clk);
    start = 1'b0;
    cycles = 0;
    while (!done) begin
      cycles++;
      @(negedge clk);
    end
    for (int i = 0; i < int'(hull_size); i++) begin
      hull_rd_addr = AW'(i);
      #1;
      got.push_back(hull_rd_data);
    end
    check(!overflow, {name, ": no overflow"});
    check(got == exp_hull, $sformatf("%s: hull sequence (got %0d points, expected %0d)",
                                     name, got.size(), exp_hull.size()));
    check(longint'(cycles) == exp_cycles,
          $sformatf("%s: cycles %0d, expected %0d", name, cycles, exp_cycles));
    // independent geometry check
    foreach (verts[i]) begin
      int hits[$];
      hits = got.find_index with (item == verts[i]);
      check(hits.size() == 1, $sformatf("%s: vertex (%0d,%0d) reported once", name,
                                        verts[i].x, verts[i].y));
    end
    if (verts.size() >= 3) begin
      foreach (got[i]) begin
        bit interior = 1'b1;
        for (int k = 0; k < verts.size(); k++)
          if (xval(got[i], verts[k], verts[(k+1) % verts.size()]) <= 0) interior = 1'b0;
        check(!interior, $sformatf("%s: (%0d,%0d) is on the hull", name, got[i].x, got[i].y));
      end
    end
    if (paper_ns > 0)
      check(longint'(cycles) * 10 <= paper_ns,
            $sformatf("%s: %0d ns within the reported %0d ns", name, cycles * 10, paper_ns));
    $sformat(msg, "%s: n=%0d hull=%0d cycles=%0d", name, s.size(), got.size(), cycles);
    $display("%s", msg);
  endtask

  function automatic void rand_set(ref point_t s[$], input int n, input int range);
    s.delete();
    for (int i = 0; i < n; i++) begin
      point_t p;
      p.x = coord_t'($urandom_range(range - 1));
      p.y = coord_t'($urandom_range(range - 1));
      s.push_back(p);
    end
  endfunction

  initial begin
    point_t s[$];
    int sizes[4] = '{16, 32, 64, 256};
    longint rt31[4] = '{4100, 10200, 22500, 77900};
    longint rt63[4] = '{4800, 10300, 20000, 109000};
    ld_en = 0; ld_addr = 0; ld_data = 0; start = 0; num_pts = 0; hull_rd_addr = 0;
    s_ld_en = 0; s_ld_addr = 0; s_ld_data = 0; s_start = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    check(done, "idle after reset");

    // single-core runtime table workloads
    for (int k = 0; k < 4; k++) begin
      rand_set(s, sizes[k], 32);
      run_case(s, $sformatf("table %0d pts 0-31", sizes[k]), rt31[k]);
      rand_set(s, sizes[k], 64);
      run_case(s, $sformatf("table %0d pts 0-63", sizes[k]), rt63[k]);
    end
    // edge cases
    s.delete();
    run_case(s, "empty", 0);
    s = '{'{y: 8'd7, x: 8'd3}};
    run_case(s, "single", 0);
    s = '{'{y: 8'd5, x: 8'd5}, '{y: 8'd5, x: 8'd5}, '{y: 8'd5, x: 8'd5}};
    run_case(s, "all equal", 0);
    s = '{'{y: 8'd1, x: 8'd9}, '{y: 8'd4, x: 8'd2}};
    run_case(s, "two", 0);
    s.delete();
    for (int i = 0; i < 20; i++) s.push_back('{y: coord_t'(i * 3), x: coord_t'(i * 2)});
    run_case(s, "collinear", 0);
    s.delete();
    for (int i = 0; i < 256; i++) begin
      real a;
      a = 6.283185307 * i / 256.0;
      s.push_back('{y: coord_t'($rtoi(127.5 + 127.0 * $sin(a))),
                    x: coord_t'($rtoi(127.5 + 127.0 * $cos(a)))});
    end
    run_case(s, "circle", 0);
    // random sets over the full coordinate range
    for (int t = 0; t < 10; t++) begin
      rand_set(s, 1 + $urandom_range(255), 256);
      run_case(s, $sformatf("random %0d", t), 0);
    end
    // overflow: 16 points on an arc need more than 2 x 16 + 2 entries
    s_ld_en = 1'b1;
    for (int i = 0; i < 16; i++) begin
      s_ld_addr = 4'(i);
      s_ld_data = '{y: coord_t'(i * i), x: coord_t'(i * 16)};
      @(negedge clk);
    end
    s_ld_en = 1'b0;
    s_start = 1'b1;
    @(negedge clk);
    s_start = 1'b0;
    repeat (2000) begin
      if (s_done) break;
      @(negedge clk);
    end
    check(s_done, "small stack: run ends");
    check(s_ovf, "small stack: overflow reported");
    check(s_hull_size < 5'd16, "small stack: aborted before the whole hull");
    s_ld_en = 1'b1;
    s_ld_addr = 4'd0;
    s_ld_data = '0;
    for (int i = 0; i < 3; i++) begin
      s_ld_addr = 4'(i);
      s_ld_data = '{y: coord_t'(i), x: coord_t'(3 * i)};
      @(negedge clk);
    end
    s_ld_en = 1'b0;
    s_start = 1'b1;
    @(negedge clk);
    s_start = 1'b0;
    @(negedge clk);
    check(!s_ovf, "small stack: overflow cleared by the next run");
    check(n_leaf0 > 0, "HULL_RECURSE with no point outside occurred");
    check(n_leaf1 > 0, "HULL_RECURSE with one point outside occurred");
    check(n_split > 0, "HULL_RECURSE split occurred");
    $display("recurse outcomes: none=%0d one=%0d split=%0d", n_leaf0, n_leaf1, n_split);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
