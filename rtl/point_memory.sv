// Point memory: holds the whole point cloud of one scan.
//
// The receive path appends points one per cycle (wr_en / wr_data) at an
// internal write pointer; clear empties the memory for the next scan.
// count gives the number of points stored and full is raised once DEPTH
// points are held; points offered while full are dropped. The dispatcher
// reads the cloud through a combinational read port (rd_addr / rd_data).
// Write latency one cycle; the read is combinational.
//
// The memory between the receiver and the processors, and its role of
// storing the cloud as one large set of points, follow the design
// description; the append interface, the clear input, dropping points
// when full and the combinational read port are this design's choices.
// DEPTH defaults to 8 processors x 256 points.
module point_memory
  import quickhull_pkg::*;
#(
  parameter int unsigned DEPTH = 2048,
  localparam int unsigned AW = $clog2(DEPTH),
  localparam int unsigned CW = $clog2(DEPTH + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          wr_en,
  input  point_t        wr_data,
  output logic [CW-1:0] count,
  output logic          full,
  input  logic [AW-1:0] rd_addr,
  output point_t        rd_data
);
  point_t mem [DEPTH];
  logic [CW-1:0] wptr;

  assign full = (wptr == CW'(DEPTH));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                wptr <= '0;
    else if (clear)            wptr <= '0;
    else if (wr_en && !full)   wptr <= wptr + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (wr_en && !full && !clear) mem[AW'(wptr)] <= wr_data;
  end

  assign count   = wptr;
  assign rd_data = mem[rd_addr];
endmodule
