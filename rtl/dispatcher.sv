// Dispatcher: divides the point cloud into one sub-set per processor.
//
// On start it walks the point memory from address 0 to num_pts-1, one
// point per cycle, and writes point i into processor i / SUBSET at local
// address i mod SUBSET through that processor's load port (a shared
// address/data bus with one enable per processor). sub_n gives the size
// of every sub-set: SUBSET for full ones, the remainder for the last one
// that holds points and zero for the rest. Timing: the writes take the N
// cycles after the start cycle, and done is a one-cycle pulse two cycles
// after the last write, N + 2 cycles after start.
//
// Splitting the large set into sub-sets of at most 256 points, one per
// processor, follows the design description; splitting by contiguous
// address ranges and the load bus are this design's choices.
module dispatcher
  import quickhull_pkg::*;
#(
  parameter int unsigned N_PROC = 8,
  parameter int unsigned SUBSET = 256,
  localparam int unsigned TOTAL = N_PROC * SUBSET,
  localparam int unsigned TAW   = $clog2(TOTAL),
  localparam int unsigned TCW   = $clog2(TOTAL + 1),
  localparam int unsigned SAW   = $clog2(SUBSET),
  localparam int unsigned SCW   = $clog2(SUBSET + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [TCW-1:0]    num_pts,
  // point memory read port
  output logic [TAW-1:0]    mem_addr,
  input  point_t            mem_data,
  // processor load ports
  output logic [N_PROC-1:0] ld_en,
  output logic [SAW-1:0]    ld_addr,
  output point_t            ld_data,
  output logic [SCW-1:0]    sub_n [N_PROC],
  output logic              busy,
  output logic              done
);
  logic [TCW-1:0] total, addr;
  logic           run;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run   <= 1'b0;
      addr  <= '0;
      total <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !run) begin
        run   <= 1'b1;
        addr  <= '0;
        total <= (num_pts > TCW'(TOTAL)) ? TCW'(TOTAL) : num_pts;
      end else if (run) begin
        if (addr == total) begin
          run  <= 1'b0;
          done <= 1'b1;
        end else begin
          addr <= addr + 1'b1;
        end
      end
    end
  end

  assign mem_addr = TAW'(addr);
  assign ld_addr  = SAW'(addr);
  assign ld_data  = mem_data;
  assign busy     = run;

  always_comb begin
    for (int k = 0; k < int'(N_PROC); k++) begin
      ld_en[k] = run && (addr != total) && (int'(addr) / int'(SUBSET) == k);
      if (int'(total) >= (k + 1) * int'(SUBSET)) sub_n[k] = SCW'(SUBSET);
      else if (int'(total) > k * int'(SUBSET))   sub_n[k] = SCW'(int'(total) - k * int'(SUBSET));
      else                                       sub_n[k] = '0;
    end
  end
endmodule
