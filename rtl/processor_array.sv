// Processor array: the dispatcher, N_PROC quickhull cores and the
// controller that runs them and gathers their results.
//
// A start pulse divides the cloud: the dispatcher copies each block of
// SUBSET points from the point memory into one core (DIVIDE), then all
// cores are started together (PROCESS). The cores finish at different
// times; proc_done shows which have finished in this frame (cleared by the
// next start). As soon as a core is done, the
// gatherer streams its hull points out through a valid/ready port (to the
// FIFO in front of the master core), one point per accepted cycle, taking
// finished cores in order of their index when several are waiting. When
// every core has been drained, gathered pulses for one cycle. divided
// pulses when the last point has been dispatched. overflow reports a
// core that aborted on a full point stack.
//
// From the design description: the array as the controller of the
// processors, the dispatcher inside it, eight cores of 256 points each,
// one sub-set per core and cores finishing independently. This design's
// own choices: starting all cores at once after dividing, draining each
// core as soon as it is done, fixed-priority choice among waiting cores,
// and the handshakes.
module processor_array
  import quickhull_pkg::*;
#(
  parameter int unsigned N_PROC = 8,
  parameter int unsigned SUBSET = 256,
  localparam int unsigned TOTAL = N_PROC * SUBSET,
  localparam int unsigned TAW   = $clog2(TOTAL),
  localparam int unsigned TCW   = $clog2(TOTAL + 1),
  localparam int unsigned SAW   = $clog2(SUBSET),
  localparam int unsigned SCW   = $clog2(SUBSET + 1),
  localparam int unsigned PW    = (N_PROC > 1) ? $clog2(N_PROC) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [TCW-1:0]    num_pts,
  // point memory read port
  output logic [TAW-1:0]    mem_addr,
  input  point_t            mem_data,
  // gathered hull points
  output logic              out_valid,
  input  logic              out_ready,
  output point_t            out_data,
  // status
  output logic              divided,
  output logic [N_PROC-1:0] proc_done,
  output logic              gathered,
  output logic              overflow
);
  typedef enum logic [1:0] {PA_IDLE, PA_DIVIDE, PA_PROCESS} pa_state_t;

  pa_state_t         state;
  logic [N_PROC-1:0] ld_en;
  logic [SAW-1:0]    ld_addr;
  point_t            ld_data;
  logic [SCW-1:0]    sub_n [N_PROC];
  logic              disp_done;
  logic              core_start;
  logic [N_PROC-1:0] core_done, core_ovf;
  logic [SCW-1:0]    hull_size [N_PROC];
  point_t            hull_data [N_PROC];

  dispatcher #(.N_PROC(N_PROC), .SUBSET(SUBSET)) u_dispatcher (
    .clk, .rst_n,
    .start   (start && state == PA_IDLE),
    .num_pts,
    .mem_addr, .mem_data,
    .ld_en, .ld_addr, .ld_data, .sub_n,
    .busy    (),
    .done    (disp_done)
  );

  // gatherer state
  logic              draining;
  logic [PW-1:0]     sel;
  logic [SCW-1:0]    rd_idx;
  logic [N_PROC-1:0] drained;
  logic [N_PROC-1:0] finished;

  // per-core "finished this frame", held until the next start
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                                       finished <= '0;
    else if (start && state == PA_IDLE)               finished <= '0;
    else if (state == PA_PROCESS && !core_start)      finished <= finished | core_done;
  end

  for (genvar g = 0; g < N_PROC; g++) begin : g_core
    quickhull_core #(.MAX_PTS(SUBSET)) u_core (
      .clk, .rst_n,
      .ld_en       (ld_en[g]),
      .ld_addr     (ld_addr),
      .ld_data     (ld_data),
      .start       (core_start),
      .num_pts     (sub_n[g]),
      .done        (core_done[g]),
      .overflow_o  (core_ovf[g]),
      .state_o     (),
      .hull_size   (hull_size[g]),
      .hull_rd_addr(SAW'(rd_idx)),
      .hull_rd_data(hull_data[g])
    );
  end

  // lowest-index core that is done and not yet drained
  logic              pick_any;
  logic [PW-1:0]     pick;
  always_comb begin
    pick_any = 1'b0;
    pick     = '0;
    for (int k = N_PROC - 1; k >= 0; k--) begin
      if (core_done[k] && !drained[k]) begin
        pick_any = 1'b1;
        pick     = PW'(k);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= PA_IDLE;
      core_start <= 1'b0;
      draining   <= 1'b0;
      sel        <= '0;
      rd_idx     <= '0;
      drained    <= '0;
      gathered   <= 1'b0;
    end else begin
      core_start <= 1'b0;
      gathered   <= 1'b0;
      unique case (state)
        PA_IDLE: begin
          if (start) state <= PA_DIVIDE;
        end
        PA_DIVIDE: begin
          if (disp_done) begin
            core_start <= 1'b1;
            drained    <= '0;
            draining   <= 1'b0;
            state      <= PA_PROCESS;
          end
        end
        PA_PROCESS: begin
          // the cycle of core_start the cores still show done: wait it out
          if (!core_start) begin
            if (!draining) begin
              if (&drained) begin
                gathered <= 1'b1;
                state    <= PA_IDLE;
              end else if (pick_any) begin
                draining <= 1'b1;
                sel      <= pick;
                rd_idx   <= '0;
              end
            end else if (rd_idx == hull_size[sel]) begin
              draining     <= 1'b0;
              drained[sel] <= 1'b1;
            end else if (out_ready) begin
              rd_idx <= rd_idx + 1'b1;
            end
          end
        end
        default: state <= PA_IDLE;
      endcase
    end
  end

  assign out_valid = (state == PA_PROCESS) && draining && (rd_idx != hull_size[sel]);
  assign out_data  = hull_data[sel];
  assign divided   = disp_done;
  assign proc_done = finished;
  assign overflow  = |core_ovf;
endmodule
