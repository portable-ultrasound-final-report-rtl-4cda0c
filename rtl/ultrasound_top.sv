// Portable-ultrasound convex-hull device: top level.
//
// The device turns one ultrasound scan into the outline of what it saw.
// A device state machine runs one frame at a time:
//   INIT        wait for a scan request (pulse_req, e.g. a switch);
//   PULSE_SEND  drive tx_pulse to the transducer until it reports that it
//               listens (listen);
//   PULSE_RECV  store the echo points the receive path delivers (rx_valid,
//               rx_point) in the point memory until it marks the cloud
//               complete (rx_done);
//   DIVIDE      the dispatcher in the processor array splits the cloud
//               into sub-sets of SUBSET points, one per core;
//   PROCESS     the N_PROC cores compute their sub-hulls in parallel; the
//               hull points of each finished core flow through the FIFO
//               into the master core;
//   MERGE       the master core computes the hull of all sub-hull points;
//   DISPLAY     the final hull is streamed out (disp_valid / disp_point /
//               disp_last, with disp_ready) and the device returns to INIT.
// frame_cycles counts the clock cycles since the frame left INIT and holds
// its value in INIT. proc_done shows which cores have finished, state_o
// the device state, cloud_full that the point memory is full and further
// echo points are dropped. error is set when a core or the master core aborted
// on a full point stack; that frame's hull is then incomplete.
//
// From the design description: the states of the application task graph
// and their order, the memory, the dispatcher and processor array, eight
// slave cores of 256 points with a FIFO toward one master core that both
// divides and merges, and the hull sent to a display. The transducer,
// receive filters, speaker and display are outside this design and meet
// it at the ports above. The port handshakes, the return from DISPLAY to
// INIT, the frame counter and the error output are this design's choices.
module ultrasound_top
  import quickhull_pkg::*;
#(
  parameter int unsigned N_PROC     = 8,
  parameter int unsigned SUBSET     = 256,
  parameter int unsigned FIFO_DEPTH = 16,
  localparam int unsigned TOTAL = N_PROC * SUBSET,
  localparam int unsigned TAW   = $clog2(TOTAL),
  localparam int unsigned TCW   = $clog2(TOTAL + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  // scan control and transducer side
  input  logic              pulse_req,
  output logic              tx_pulse,
  input  logic              listen,
  input  logic              rx_valid,
  input  point_t            rx_point,
  input  logic              rx_done,
  // display side
  output logic              disp_valid,
  input  logic              disp_ready,
  output point_t            disp_point,
  output logic              disp_last,
  // status
  output dev_state_t        state_o,
  output logic [N_PROC-1:0] proc_done,
  output logic [31:0]       frame_cycles,
  output logic              cloud_full,
  output logic              error
);
  dev_state_t     state;
  logic [TCW-1:0] n_points;
  logic           mem_full;
  logic [TAW-1:0] mem_addr;
  point_t         mem_data;

  logic           pa_start, pa_divided, pa_gathered, pa_ovf;
  logic           pa_valid, pa_ready;
  point_t         pa_data;
  logic           mc_valid, mc_ready;
  point_t         mc_data;
  logic           mc_done, mc_ovf;
  logic [TCW-1:0] hull_size;
  logic [TCW-1:0] disp_idx;
  point_t         hull_pt;

  // ------------------------------------------------------------ device FSM
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= DEV_INIT;
      pa_start <= 1'b0;
      disp_idx <= '0;
    end else begin
      pa_start <= 1'b0;
      unique case (state)
        DEV_INIT:       if (pulse_req) state <= DEV_PULSE_SEND;
        DEV_PULSE_SEND: if (listen)    state <= DEV_PULSE_RECV;
        DEV_PULSE_RECV: if (rx_done) begin
          pa_start <= 1'b1;
          state    <= DEV_DIVIDE;
        end
        DEV_DIVIDE:     if (pa_divided)  state <= DEV_PROCESS;
        DEV_PROCESS:    if (pa_gathered) state <= DEV_MERGE;
        DEV_MERGE:      if (mc_done) begin
          disp_idx <= '0;
          state    <= DEV_DISPLAY;
        end
        DEV_DISPLAY: begin
          if (disp_idx == hull_size) state <= DEV_INIT;
          else if (disp_ready) begin
            disp_idx <= disp_idx + 1'b1;
            if (disp_idx + 1'b1 == hull_size) state <= DEV_INIT;
          end
        end
        default: state <= DEV_INIT;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                 frame_cycles <= '0;
    else if (state == DEV_INIT) begin
      if (pulse_req) frame_cycles <= '0;
    end else                    frame_cycles <= frame_cycles + 1'b1;
  end

  logic err_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                                 err_q <= 1'b0;
    else if (state == DEV_INIT && pulse_req)    err_q <= 1'b0;
    else if (pa_ovf || mc_ovf)                  err_q <= 1'b1;
  end

  // ---------------------------------------------------------------- blocks
  point_memory #(.DEPTH(TOTAL)) u_memory (
    .clk, .rst_n,
    .clear   (state == DEV_INIT),
    .wr_en   (state == DEV_PULSE_RECV && rx_valid),
    .wr_data (rx_point),
    .count   (n_points),
    .full    (mem_full),
    .rd_addr (mem_addr),
    .rd_data (mem_data)
  );

  processor_array #(.N_PROC(N_PROC), .SUBSET(SUBSET)) u_array (
    .clk, .rst_n,
    .start    (pa_start),
    .num_pts  (n_points),
    .mem_addr, .mem_data,
    .out_valid(pa_valid),
    .out_ready(pa_ready),
    .out_data (pa_data),
    .divided  (pa_divided),
    .proc_done,
    .gathered (pa_gathered),
    .overflow (pa_ovf)
  );

  hull_fifo #(.DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n,
    .clear    (state == DEV_INIT),
    .in_valid (pa_valid),
    .in_ready (pa_ready),
    .in_data  (pa_data),
    .out_valid(mc_valid),
    .out_ready(mc_ready),
    .out_data (mc_data),
    .count    ()
  );

  master_core #(.N_PROC(N_PROC), .SUBSET(SUBSET)) u_master (
    .clk, .rst_n,
    .clear       (state == DEV_INIT),
    .in_valid    (mc_valid),
    .in_ready    (mc_ready),
    .in_data     (mc_data),
    .merge       (state == DEV_MERGE),
    .done        (mc_done),
    .overflow    (mc_ovf),
    .hull_size,
    .hull_rd_addr(TAW'(disp_idx)),
    .hull_rd_data(hull_pt)
  );

  assign tx_pulse   = (state == DEV_PULSE_SEND);
  assign disp_valid = (state == DEV_DISPLAY) && (disp_idx != hull_size);
  assign disp_point = hull_pt;
  assign disp_last  = disp_valid && (disp_idx + 1'b1 == hull_size);
  assign state_o    = state;
  assign error      = err_q;
  assign cloud_full = mem_full;
endmodule
