// Single-clock first-word-fall-through FIFO.
//
// Used by the PRM to buffer the programming data the VME master sends a
// few words at a time, and by the ROD slave as the Inmem debug FIFO that
// keeps a copy of the BOC-ROD bus words. A write when full and a read when
// empty are ignored. rd_data shows the oldest word whenever empty is low;
// rd_en removes it at the clock edge. `count` is the number of words held.
// `clear` empties the FIFO synchronously. Storage is a plain array, so it
// maps onto block RAM or registers. Depth and width are this design's
// choices.
module sync_fifo #(
  parameter int unsigned W     = 32,
  parameter int unsigned DEPTH = 512
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       clear,
  input  logic                       wr_en,
  input  logic [W-1:0]               wr_data,
  input  logic                       rd_en,
  output logic [W-1:0]               rd_data,
  output logic                       full,
  output logic                       empty,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wptr, rptr;
  logic          do_wr, do_rd;

  assign full  = (count == ($clog2(DEPTH+1))'(DEPTH));
  assign empty = (count == '0);
  assign do_wr = wr_en && !full;
  assign do_rd = rd_en && !empty;

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else if (clear) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (do_wr) wptr <= (wptr == AW'(DEPTH - 1)) ? '0 : wptr + 1'b1;
      if (do_rd) rptr <= (rptr == AW'(DEPTH - 1)) ? '0 : rptr + 1'b1;
      count <= count + {{($clog2(DEPTH+1)-1){1'b0}}, do_wr} - {{($clog2(DEPTH+1)-1){1'b0}}, do_rd};
    end
  end

  assign rd_data = mem[rptr];

endmodule
