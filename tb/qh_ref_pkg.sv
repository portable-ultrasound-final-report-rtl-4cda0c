// Reference model of quickhull for the testbenches.
//
// ref_hull returns the hull points in the order the hardware emits them:
// the line max->min is examined first, then min->max; a line with more
// than one point strictly left of it is split at its first furthest point
// into far->b (examined first) and a->far; a line with at most one such
// point emits a, then that point. Extreme points are ordered by x, ties
// by y. cycles returns the processing element's cycle count for the set.
// chain gives the strict hull vertices by a different algorithm.
package qh_ref_pkg;
  import quickhull_pkg::*;

  typedef point_t pt_q_t[$];

  function automatic longint xval(point_t p, point_t a, point_t b);
    longint ax = a.x, ay = a.y, bx = b.x, by = b.y, px = p.x, py = p.y;
    return (ax - px) * (by - py) - (ay - py) * (bx - px);
  endfunction

  function automatic void ref_line(point_t a, point_t b, point_t s[$],
                                   ref point_t h[$], ref longint cycles);
    point_t pos[$];
    point_t far;
    longint best = 0;
    cycles += s.size();
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
      cycles += 1;
      h.push_back(a);
      if (pos.size() == 1) h.push_back(far);
    end else begin
      cycles += pos.size();
      ref_line(far, b, pos, h, cycles);
      ref_line(a, far, pos, h, cycles);
    end
  endfunction

  function automatic void ref_hull(point_t s[$], ref point_t h[$], ref longint cycles);
    point_t mn, mx;
    h.delete();
    cycles = 1;
    if (s.size() == 0) return;
    mn = s[0];
    mx = s[0];
    foreach (s[i]) begin
      if ((s[i].x < mn.x) || (s[i].x == mn.x && s[i].y < mn.y)) mn = s[i];
      if ((mx.x < s[i].x) || (mx.x == s[i].x && mx.y < s[i].y)) mx = s[i];
    end
    cycles += 2 * s.size();
    if (mn == mx) begin
      h.push_back(mn);
      return;
    end
    ref_line(mx, mn, s, h, cycles);
    ref_line(mn, mx, s, h, cycles);
  endfunction
  // Strict hull vertices (no collinear boundary points) by Andrew's
  // monotone chain, an algorithm unrelated to quickhull.
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
endpackage
