// Shared types and constants of the quickhull convex-hull engine.
//
// A point is 16 bits: two unsigned 8-bit coordinates, x in the low byte
// and y in the high byte, the packing of the processor's original point
// bus. A line is a directed pair of points (a -> b). The cross value of a
// point p against a line is (ax-px)*(by-py) - (ay-py)*(bx-px); it is
// positive when p lies to the left of a -> b, which is the side a line
// still has to examine.
package quickhull_pkg;

  localparam int unsigned COORD_W = 8;
  // Signed width that holds any cross value exactly.
  localparam int unsigned CROSS_W = 2 * (COORD_W + 1) + 1;

  typedef logic [COORD_W-1:0] coord_t;

  typedef struct packed {
    coord_t y;
    coord_t x;
  } point_t;

  typedef struct packed {
    point_t b;
    point_t a;
  } line_t;

  typedef logic signed [CROSS_W-1:0] cross_t;

  // Processing-element states (Figure 3 of the design description).
  typedef enum logic [2:0] {
    QH_INITIAL      = 3'd0,
    QH_FIND_MAX_MIN = 3'd1,
    QH_HULL_START   = 3'd2,
    QH_CROSS        = 3'd3,
    QH_HULL_RECURSE = 3'd4,
    QH_END          = 3'd5
  } qh_state_t;

  // Device states (application task graph).
  typedef enum logic [2:0] {
    DEV_INIT       = 3'd0,
    DEV_PULSE_SEND = 3'd1,
    DEV_PULSE_RECV = 3'd2,
    DEV_DIVIDE     = 3'd3,
    DEV_PROCESS    = 3'd4,
    DEV_MERGE      = 3'd5,
    DEV_DISPLAY    = 3'd6
  } dev_state_t;

  // Point ordering used to find the extreme points: by x, ties by y.
  function automatic logic pt_less(point_t l, point_t r);
    return (l.x < r.x) || ((l.x == r.x) && (l.y < r.y));
  endfunction

endpackage
