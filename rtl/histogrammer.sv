// Calibration histogrammer of a slave FPGA.
//
// During calibration scans the front ends are pulsed many times; for every
// hit (pixel column, row and ToT) this block adds one to the pixel's
// occupancy and the ToT to the pixel's ToT sum in a dedicated memory
// (one word per pixel: {occupancy[CNT_W-1:0], ToT sum[TOT_W-1:0]}), so
// mean ToT and occupancy maps can be read out afterwards.
//
// Update is a two-stage read-modify-write: the memory is read at the clock
// edge where a hit is taken, the sum is written back at the next edge,
// and a hit that follows on the same pixel uses the value being written,
// so a new hit may arrive every cycle. When no hit arrives, `rd_addr`
// uses the read port and `rd_data` is valid one cycle later. `clear`
// zeroes the memory, one word per cycle, while `clearing` is high (no hits
// may arrive then). Pixel address = col * ROWS + row, zero-based; hits
// outside the matrix are counted in `dropped`.
// The function follows the text; geometry comes from the FE-I4 pixel
// matrix (80 x 336), the word layout and pipeline are this design's.
module histogrammer #(
  parameter int unsigned COLS  = 80,
  parameter int unsigned ROWS  = 336,
  parameter int unsigned CNT_W = 16,
  parameter int unsigned TOT_W = 20
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic                             hit_valid,
  input  logic [6:0]                       hit_col,
  input  logic [8:0]                       hit_row,
  input  logic [3:0]                       hit_tot,
  input  logic [$clog2(COLS*ROWS)-1:0]     rd_addr,
  output logic [CNT_W+TOT_W-1:0]           rd_data,
  input  logic                             clear,
  output logic                             clearing,
  output logic [15:0]                      dropped
);

  localparam int unsigned N  = COLS * ROWS;
  localparam int unsigned AW = $clog2(N);
  localparam int unsigned DW = CNT_W + TOT_W;

  logic [DW-1:0] mem [N];

  // stage 0: address
  logic          in_range;
  logic [AW-1:0] hit_addr, raddr;
  assign in_range = (32'(hit_col) < COLS) && (32'(hit_row) < ROWS);
  assign hit_addr = AW'(32'(hit_col) * ROWS + 32'(hit_row));
  assign raddr    = hit_valid ? hit_addr : rd_addr;

  // stage 1: read data, stage 2: write-back
  logic          v1, v2;
  logic [AW-1:0] a1, a2;
  logic [3:0]    t1;
  logic [DW-1:0] q1, new1, new2, old1;
  logic [AW-1:0] clr_addr;

  always_ff @(posedge clk) begin
    q1 <= mem[raddr];
    if (clearing)  mem[clr_addr] <= '0;
    else if (v1)   mem[a1] <= new1;
  end

  assign old1    = (v2 && a2 == a1) ? new2 : q1;
  assign new1    = {old1[DW-1:TOT_W] + 1'b1, old1[TOT_W-1:0] + TOT_W'(t1)};
  assign rd_data = q1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1       <= 1'b0;
      v2       <= 1'b0;
      a1       <= '0;
      a2       <= '0;
      t1       <= '0;
      new2     <= '0;
      clearing <= 1'b0;
      clr_addr <= '0;
      dropped  <= '0;
    end else begin
      v1   <= hit_valid && in_range && !clearing;
      a1   <= hit_addr;
      t1   <= hit_tot;
      v2   <= v1;
      a2   <= a1;
      new2 <= new1;
      if (hit_valid && !in_range) dropped <= dropped + 1'b1;
      if (clear && !clearing) begin
        clearing <= 1'b1;
        clr_addr <= '0;
      end else if (clearing) begin
        if (clr_addr == AW'(N - 1)) clearing <= 1'b0;
        clr_addr <= clr_addr + 1'b1;
      end
    end
  end

endmodule
