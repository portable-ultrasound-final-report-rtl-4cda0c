// Master core, merge step: hull of the union of all sub-hulls.
//
// Hull points gathered from the processors arrive through a valid/ready
// port (from the FIFO) and are written, one per cycle, into the point
// set of a quickhull engine sized for N_PROC * SUBSET points. clear
// empties the set at the start of a frame. When merge is high and no
// point is waiting on the input, the engine is started on the points
// collected so far and the input is closed; done rises when the merged
// hull is ready, and stays high until the next clear. The hull of the
// whole cloud is then read through hull_rd_addr / hull_rd_data
// (combinational), hull_size points. Timing: collection takes one cycle
// per accepted point; done rises the engine's run time + 3 cycles after
// merge is seen with the input idle. Merging is the hull of the sub-hull
// vertices: a vertex of the whole cloud's hull is a vertex of the hull of
// the sub-set that holds it, so no point is lost.
//
// That one master core both divides the cloud and merges the processed
// sub-clouds into one polished hull follows the design description. How
// it merges is not described; running quickhull once more on the
// collected sub-hull points is this design's choice, as are the ports.
module master_core
  import quickhull_pkg::*;
#(
  parameter int unsigned N_PROC = 8,
  parameter int unsigned SUBSET = 256,
  localparam int unsigned TOTAL = N_PROC * SUBSET,
  localparam int unsigned TAW   = $clog2(TOTAL),
  localparam int unsigned TCW   = $clog2(TOTAL + 1)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           clear,
  input  logic           in_valid,
  output logic           in_ready,
  input  point_t         in_data,
  input  logic           merge,
  output logic           done,
  output logic           overflow,
  output logic [TCW-1:0] hull_size,
  input  logic [TAW-1:0] hull_rd_addr,
  output point_t         hull_rd_data
);
  typedef enum logic [1:0] {MC_COLLECT, MC_START, MC_RUN, MC_DONE} mc_state_t;

  mc_state_t      state;
  logic [TCW-1:0] cnt;
  logic           eng_done;

  assign in_ready = (state == MC_COLLECT) && (cnt != TCW'(TOTAL));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= MC_COLLECT;
      cnt   <= '0;
    end else if (clear) begin
      state <= MC_COLLECT;
      cnt   <= '0;
    end else begin
      unique case (state)
        MC_COLLECT: begin
          if (in_valid && in_ready) cnt <= cnt + 1'b1;
          else if (merge && !in_valid) state <= MC_START;
        end
        MC_START: state <= MC_RUN;          // engine sees start this cycle
        MC_RUN:   if (eng_done) state <= MC_DONE;
        MC_DONE:  ;
        default:  state <= MC_COLLECT;
      endcase
    end
  end

  quickhull_core #(.MAX_PTS(TOTAL)) u_engine (
    .clk, .rst_n,
    .ld_en       (in_valid && in_ready),
    .ld_addr     (TAW'(cnt)),
    .ld_data     (in_data),
    .start       (state == MC_START),
    .num_pts     (cnt),
    .done        (eng_done),
    .overflow_o  (overflow),
    .state_o     (),
    .hull_size   (hull_size),
    .hull_rd_addr,
    .hull_rd_data
  );

  assign done = (state == MC_DONE);
endmodule
