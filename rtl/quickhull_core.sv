// Quickhull processing element: convex hull of one set of points.
//
// The core runs the quickhull divide-and-conquer algorithm as a six-state
// machine, INITIAL, FIND_MAX_MIN, HULL_START, CROSS, HULL_RECURSE and END,
// over three stacks held in on-chip arrays:
//   line stack   directed lines still to be examined (a -> b),
//   point stack  for each pending line, the points that may lie outside it,
//   size stack   the number of points of each set on the point stack.
// FIND_MAX_MIN scans the set for its extreme points by x. HULL_START pushes
// the lines min->max and max->min with a copy of the whole set for each.
// CROSS walks the set of the top line once, counting the points strictly
// left of it, keeping the furthest of them, and packing them in place at
// the bottom of that set. HULL_RECURSE then either emits hull points and
// pops the line and its set (0 points left: emit a; 1 point: emit a and
// that point) or replaces the line with a -> far and far -> b, the latter
// on top, each with a copy of the packed set. The machine returns to CROSS
// until the line stack is empty and stops in END. Because every CROSS only
// scans the subset that can still lie outside its line, the work grows as
// n log n for typical sets rather than n^2.
//
// Interface: while done is high (END) the set is written through ld_*
// (point i at ld_addr i, directly into the bottom of the point stack);
// a start pulse with num_pts (0..MAX_PTS) runs the algorithm. When done
// rises again, hull_size points are readable through hull_rd_addr /
// hull_rd_data (combinational read). The hull points come out in the
// order the stack emits them, not sorted around the polygon. overflow_o
// is set, and the run aborted, if a copy would not fit in the point stack.
//
// Timing, one clock per step: 1 cycle INITIAL, n cycles FIND_MAX_MIN, n
// cycles HULL_START (copying the set), |S| cycles per CROSS over a set S,
// then 1 cycle HULL_RECURSE for a leaf or |P| cycles for a split that
// copies P points.
//
// Follows the design description: the states and their order, the three
// stacks, the push order of lines and sets, 256-point sets of 8-bit
// coordinates, the cross formula and the strict "> 0" test. This design's
// own choices: the load port and start/done handshake, ordering the
// extreme points by x with ties broken by y, copying sets over several
// cycles instead of in one, a point stack of 4*MAX_PTS entries (the
// HULL_START step alone needs 2*MAX_PTS), overflow detection, and ending
// at once for an empty set or a set whose points are all equal.
module quickhull_core
  import quickhull_pkg::*;
#(
  parameter int unsigned MAX_PTS      = 256,
  parameter int unsigned PSTACK_DEPTH = 4 * MAX_PTS,
  parameter int unsigned LSTACK_DEPTH = MAX_PTS + 2,
  localparam int unsigned NW  = $clog2(MAX_PTS + 1),
  localparam int unsigned AW  = $clog2(MAX_PTS),
  localparam int unsigned PAW = $clog2(PSTACK_DEPTH + 1),
  localparam int unsigned PIW = $clog2(PSTACK_DEPTH),
  localparam int unsigned LAW = $clog2(LSTACK_DEPTH + 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  // point load port (accepted while done is high)
  input  logic            ld_en,
  input  logic [AW-1:0]   ld_addr,
  input  point_t          ld_data,
  // control
  input  logic            start,
  input  logic [NW-1:0]   num_pts,
  output logic            done,
  output logic            overflow_o,
  output qh_state_t       state_o,
  // result
  output logic [NW-1:0]   hull_size,
  input  logic [AW-1:0]   hull_rd_addr,
  output point_t          hull_rd_data
);

  // ---------------------------------------------------------------- storage
  point_t pstack [PSTACK_DEPTH];
  line_t  lstack [LSTACK_DEPTH];
  logic [NW-1:0] sstack [LSTACK_DEPTH];
  point_t hull   [MAX_PTS];

  qh_state_t      state;
  logic [NW-1:0]  n;
  logic [PAW-1:0] idx;
  logic [PAW-1:0] ptop;
  logic [LAW-1:0] lsp, ssp;
  logic [NW-1:0]  hsz;
  logic [NW-1:0]  pos_cnt;
  point_t         xmin, xmax, furthest;
  cross_t         fcross;
  logic           fflag;
  logic           ovf;

  // ------------------------------------------------------- top-of-stack view
  line_t          cur_line;
  logic [NW-1:0]  cur_size;
  logic [PAW-1:0] base;
  point_t         rd_pt;
  cross_t         cross_v;
  logic           cross_pos;

  always_comb begin
    cur_line = lstack[(lsp == '0) ? '0 : LAW'(lsp - 1'b1)];
    cur_size = sstack[(ssp == '0) ? '0 : LAW'(ssp - 1'b1)];
    base     = ptop - PAW'(cur_size);
    unique case (state)
      QH_FIND_MAX_MIN, QH_HULL_START: rd_pt = pstack[PIW'(idx)];
      default:                        rd_pt = pstack[PIW'(base + idx)];
    endcase
  end

  qh_cross u_cross (
    .line_i    (cur_line),
    .pt_i      (rd_pt),
    .cross_o   (cross_v),
    .positive_o(cross_pos)
  );

  // ------------------------------------------------------- memory write ports
  logic           split_ovf;
  logic           pw_en;
  logic [PIW-1:0] pw_addr;
  point_t         pw_data;

  always_comb begin
    pw_en   = 1'b0;
    pw_addr = '0;
    pw_data = rd_pt;
    unique case (state)
      QH_END: begin
        pw_en   = ld_en;
        pw_addr = PIW'(ld_addr);
        pw_data = ld_data;
      end
      QH_HULL_START: begin
        pw_en   = 1'b1;
        pw_addr = PIW'(PAW'(n) + idx);
      end
      QH_CROSS: begin
        pw_en   = cross_pos;
        pw_addr = PIW'(base + PAW'(pos_cnt));
      end
      QH_HULL_RECURSE: begin
        pw_en   = (pos_cnt > NW'(1)) && !split_ovf;
        pw_addr = PIW'(base + PAW'(pos_cnt) + idx);
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (pw_en) pstack[pw_addr] <= pw_data;
  end

  // A split needs room for two copies of the packed set and one more line.
  always_comb begin
    split_ovf = ((PAW + 1)'(base) + (PAW + 1)'(2 * pos_cnt) > (PAW + 1)'(PSTACK_DEPTH))
             || ((LAW + 1)'(lsp) + 1 > (LAW + 1)'(LSTACK_DEPTH));
  end

  // last cycle of a multi-cycle step
  logic last_scan;
  always_comb begin
    unique case (state)
      QH_FIND_MAX_MIN, QH_HULL_START: last_scan = (idx == PAW'(n) - 1'b1);
      QH_CROSS:                       last_scan = (idx == PAW'(cur_size) - 1'b1);
      QH_HULL_RECURSE:                last_scan = (idx == PAW'(pos_cnt) - 1'b1);
      default:                        last_scan = 1'b0;
    endcase
  end

  // ------------------------------------------------------------ control FSM
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= QH_END;
      n        <= '0;
      idx      <= '0;
      ptop     <= '0;
      lsp      <= '0;
      ssp      <= '0;
      hsz      <= '0;
      pos_cnt  <= '0;
      xmin     <= '0;
      xmax     <= '0;
      furthest <= '0;
      fcross   <= '0;
      fflag    <= 1'b0;
      ovf      <= 1'b0;
    end else begin
      unique case (state)
        QH_END: begin
          if (start) begin
            n     <= num_pts;
            state <= QH_INITIAL;
          end
        end

        QH_INITIAL: begin
          idx      <= '0;
          ptop     <= '0;
          lsp      <= '0;
          ssp      <= '0;
          hsz      <= '0;
          pos_cnt  <= '0;
          furthest <= '0;
          fcross   <= '0;
          fflag    <= 1'b0;
          ovf      <= 1'b0;
          state    <= (n == '0) ? QH_END : QH_FIND_MAX_MIN;
        end

        QH_FIND_MAX_MIN: begin
          if (idx == '0) begin
            xmin <= rd_pt;
            xmax <= rd_pt;
          end else begin
            if (pt_less(rd_pt, xmin)) xmin <= rd_pt;
            if (pt_less(xmax, rd_pt)) xmax <= rd_pt;
          end
          if (last_scan) begin
            idx   <= '0;
            state <= QH_HULL_START;
          end else begin
            idx <= idx + 1'b1;
          end
        end

        QH_HULL_START: begin
          if (last_scan) begin
            idx <= '0;
            if (xmin == xmax) begin
              hsz   <= NW'(1);
              state <= QH_END;
            end else begin
              lsp   <= LAW'(2);
              ssp   <= LAW'(2);
              ptop  <= PAW'(2 * n);
              state <= QH_CROSS;
            end
          end else begin
            idx <= idx + 1'b1;
          end
        end

        QH_CROSS: begin
          if (cross_pos) begin
            pos_cnt <= pos_cnt + 1'b1;
            if (!fflag || (cross_v > fcross)) begin
              furthest <= rd_pt;
              fcross   <= cross_v;
              fflag    <= 1'b1;
            end
          end
          if (last_scan) begin
            idx   <= '0;
            state <= QH_HULL_RECURSE;
          end else begin
            idx <= idx + 1'b1;
          end
        end

        QH_HULL_RECURSE: begin
          if (pos_cnt <= NW'(1)) begin
            // leaf: emit hull point(s), pop the line and its set
            hsz  <= hsz + NW'(1) + pos_cnt;
            lsp  <= lsp - 1'b1;
            ssp  <= ssp - 1'b1;
            ptop <= base;
            pos_cnt <= '0;
            fflag   <= 1'b0;
            state   <= (lsp == LAW'(1)) ? QH_END : QH_CROSS;
          end else if (split_ovf) begin
            ovf   <= 1'b1;
            state <= QH_END;
          end else if (last_scan) begin
            // split: a->far below, far->b on top, packed set twice
            lsp     <= lsp + 1'b1;
            ssp     <= ssp + 1'b1;
            ptop    <= base + PAW'(2 * pos_cnt);
            idx     <= '0;
            pos_cnt <= '0;
            fflag   <= 1'b0;
            state   <= QH_CROSS;
          end else begin
            idx <= idx + 1'b1;
          end
        end

        default: state <= QH_END;
      endcase
    end
  end

  // line, size and hull stack writes
  always_ff @(posedge clk) begin
    if (state == QH_HULL_START && last_scan && xmin != xmax) begin
      lstack[0] <= '{a: xmin, b: xmax};
      lstack[1] <= '{a: xmax, b: xmin};
      sstack[0] <= n;
      sstack[1] <= n;
    end
    if (state == QH_HULL_RECURSE && pos_cnt > NW'(1) && !split_ovf && last_scan) begin
      lstack[LAW'(lsp - 1'b1)] <= '{a: cur_line.a, b: furthest};
      lstack[lsp]              <= '{a: furthest,   b: cur_line.b};
      sstack[LAW'(ssp - 1'b1)] <= pos_cnt;
      sstack[ssp]              <= pos_cnt;
    end
  end

  always_ff @(posedge clk) begin
    if (state == QH_HULL_START && last_scan && xmin == xmax) begin
      hull[0] <= xmin;
    end
    if (state == QH_HULL_RECURSE && pos_cnt <= NW'(1)) begin
      hull[AW'(hsz)] <= cur_line.a;
      if (pos_cnt == NW'(1)) hull[AW'(hsz + 1'b1)] <= furthest;
    end
  end

  // ---------------------------------------------------------------- outputs
  assign done         = (state == QH_END);
  assign overflow_o   = ovf;
  assign state_o      = state;
  assign hull_size    = hsz;
  assign hull_rd_data = hull[hull_rd_addr];

  // The stack pointers never underflow while the machine walks the stacks.
  property p_no_underflow;
    @(posedge clk)
      (state == QH_CROSS || state == QH_HULL_RECURSE) |-> (lsp != '0 && ssp != '0);
  endproperty
  a_no_underflow: assert property (p_no_underflow);

endmodule
