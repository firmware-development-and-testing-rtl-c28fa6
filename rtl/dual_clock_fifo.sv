// Dual-clock FIFO between the 80 MHz BOC-ROD bus domain and the 40 MHz
// domain of the slave FPGA logic.
//
// Write and read pointers are kept in binary and Gray code; each Gray
// pointer crosses to the other clock through two flip-flops, so `full`
// (write side) and `empty` (read side) are safe but may lag by two
// cycles of the other clock. DEPTH must be a power of two. The read side
// is first-word-fall-through: rd_data shows the oldest word when empty is
// low and rd_en removes it. The clock domains follow the text; the Gray
// pointer scheme and the depth are this design's choices.
module dual_clock_fifo #(
  parameter int unsigned W     = 28,
  parameter int unsigned DEPTH = 64
) (
  input  logic         wclk,
  input  logic         wrst_n,
  input  logic         wr_en,
  input  logic [W-1:0] wr_data,
  output logic         full,
  input  logic         rclk,
  input  logic         rrst_n,
  input  logic         rd_en,
  output logic [W-1:0] rd_data,
  output logic         empty
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [W-1:0] mem [DEPTH];
  logic [AW:0]  wbin, wgray, rbin, rgray;
  logic [AW:0]  wq1, wq2;   // read pointer in the write domain
  logic [AW:0]  rq1, rq2;   // write pointer in the read domain

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // ---------------- write side ----------------
  logic [AW:0] wbin_n;
  assign wbin_n = wbin + 1'b1;
  assign full   = (wgray == {~wq2[AW:AW-1], wq2[AW-2:0]});

  always_ff @(posedge wclk) begin
    if (wr_en && !full) mem[wbin[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wbin  <= '0;
      wgray <= '0;
      wq1   <= '0;
      wq2   <= '0;
    end else begin
      wq1 <= rgray;
      wq2 <= wq1;
      if (wr_en && !full) begin
        wbin  <= wbin_n;
        wgray <= bin2gray(wbin_n);
      end
    end
  end

  // ---------------- read side ----------------
  logic [AW:0] rbin_n;
  assign rbin_n  = rbin + 1'b1;
  assign empty   = (rgray == rq2);
  assign rd_data = mem[rbin[AW-1:0]];

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rbin  <= '0;
      rgray <= '0;
      rq1   <= '0;
      rq2   <= '0;
    end else begin
      rq1 <= wgray;
      rq2 <= rq1;
      if (rd_en && !empty) begin
        rbin  <= rbin_n;
        rgray <= bin2gray(rbin_n);
      end
    end
  end

endmodule
