// Cross-value unit of a quickhull processing element.
//
// Combinational. For a point p and a directed line a -> b it returns
//   cross = (ax - px) * (by - py) - (ay - py) * (bx - px)
// the formula the processor evaluates once per point in its CROSS state.
// The coordinate differences are formed as signed values of the result
// width, so the result is exact (19 bits for 8-bit
// coordinates); the original used a 32-bit signed register, which holds
// the same values. Positive means p is strictly left of a -> b.
module qh_cross
  import quickhull_pkg::*;
(
  input  line_t  line_i,
  input  point_t pt_i,
  output cross_t cross_o,
  output logic   positive_o
);
  cross_t dax, day, dbx, dby;

  always_comb begin
    dax = cross_t'(line_i.a.x) - cross_t'(pt_i.x);
    day = cross_t'(line_i.a.y) - cross_t'(pt_i.y);
    dbx = cross_t'(line_i.b.x) - cross_t'(pt_i.x);
    dby = cross_t'(line_i.b.y) - cross_t'(pt_i.y);
    cross_o = (dax * dby) - (day * dbx);
    positive_o = (cross_o > 0);
  end
endmodule
