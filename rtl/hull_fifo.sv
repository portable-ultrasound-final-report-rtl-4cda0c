// FIFO between the slave cores and the master core.
//
// Synchronous first-in first-out buffer of points with a valid/ready
// handshake on both sides. A push is accepted when in_valid and in_ready
// (not full) are both high; a pop happens when out_valid (not empty) and
// out_ready are high. Push and pop may happen in the same cycle, also
// when full. The head is read combinationally from the storage array, so
// a pushed point can be popped in the next cycle. clear empties it.
//
// The FIFO and its place between the processing cores and the master
// core follow the design description's network graph; its depth (not
// given there), the handshake and the clear input are this design's
// choices.
module hull_fifo
  import quickhull_pkg::*;
#(
  parameter int unsigned DEPTH = 16,
  localparam int unsigned AW = $clog2(DEPTH),
  localparam int unsigned CW = $clog2(DEPTH + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          in_valid,
  output logic          in_ready,
  input  point_t        in_data,
  output logic          out_valid,
  input  logic          out_ready,
  output point_t        out_data,
  output logic [CW-1:0] count
);
  point_t mem [DEPTH];
  logic [AW-1:0] rptr, wptr;
  logic [CW-1:0] cnt;
  logic push, pop;

  assign out_valid = (cnt != '0);
  assign in_ready  = (cnt != CW'(DEPTH)) || out_ready;
  assign pop       = out_valid && out_ready;
  assign push      = in_valid && in_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rptr <= '0;
      wptr <= '0;
      cnt  <= '0;
    end else if (clear) begin
      rptr <= '0;
      wptr <= '0;
      cnt  <= '0;
    end else begin
      if (push) wptr <= (wptr == AW'(DEPTH - 1)) ? '0 : wptr + 1'b1;
      if (pop)  rptr <= (rptr == AW'(DEPTH - 1)) ? '0 : rptr + 1'b1;
      unique case ({push, pop})
        2'b10:   cnt <= cnt + 1'b1;
        2'b01:   cnt <= cnt - 1'b1;
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (push && !clear) mem[wptr] <= in_data;
  end

  assign out_data = mem[rptr];
  assign count    = cnt;

  a_no_overflow: assert property (@(posedge clk) (cnt == CW'(DEPTH) && in_valid && !out_ready) |-> !in_ready);
endmodule
