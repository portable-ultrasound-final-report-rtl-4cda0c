// Self-checking testbench of qh_cross.
//
// Drives corner vectors (all-zero and all-255 coordinates, a point on the
// line, points left and right of it) and 20000 random vectors, and
// compares the cross value and the positive flag with the formula
// evaluated in 64-bit integers. Combinational, so no cycle count applies.
module tb_qh_cross;
  import quickhull_pkg::*;

  line_t  line;
  point_t pt;
  cross_t cross_v;
  logic   positive;

  qh_cross u_dut (.line_i(line), .pt_i(pt), .cross_o(cross_v), .positive_o(positive));

  int checks = 0;
  int failures = 0;

  task automatic try(input line_t l, input point_t p);
    longint e;
    line = l;
    pt = p;
    #1;
    e = (longint'(l.a.x) - longint'(p.x)) * (longint'(l.b.y) - longint'(p.y))
      - (longint'(l.a.y) - longint'(p.y)) * (longint'(l.b.x) - longint'(p.x));
    checks += 2;
    if (longint'(cross_v) != e || positive != (e > 0)) begin
      failures++;
      $display("FAIL: a=(%0d,%0d) b=(%0d,%0d) p=(%0d,%0d) got %0d/%0b expected %0d",
               l.a.x, l.a.y, l.b.x, l.b.y, p.x, p.y, cross_v, positive, e);
    end
  endtask

  initial begin
    // left of a horizontal line a->b (y up) is positive
    try('{a: '{y: 0, x: 0}, b: '{y: 0, x: 10}}, '{y: 5, x: 5});
    check_sign(1);
    try('{a: '{y: 0, x: 0}, b: '{y: 0, x: 10}}, '{y: 0, x: 5});
    check_sign(0);
    try('{a: '{y: 255, x: 0}, b: '{y: 0, x: 255}}, '{y: 255, x: 255});
    try('{a: '{y: 0, x: 255}, b: '{y: 255, x: 0}}, '{y: 0, x: 0});
    try('{a: '{y: 255, x: 255}, b: '{y: 0, x: 0}}, '{y: 0, x: 255});
    for (int i = 0; i < 20000; i++) try(line_t'($urandom), point_t'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_sign(input bit exp_pos);
    checks++;
    if (positive != exp_pos) begin
      failures++;
      $display("FAIL: sign, expected %0b", exp_pos);
    end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
