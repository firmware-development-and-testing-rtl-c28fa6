// One slave FPGA of the ROD: data path for four BOC-ROD buses (sixteen
// front-end links).
//
//   80 MHz : per bus a gatherer turns bus bytes into hit/end-of-frame
//            records and writes them into a dual-clock FIFO; the Inmem
//            FIFO records the raw words of one selected bus so the
//            controller can inspect the input.
//   40 MHz : the event fragment builder takes the event record from the
//            master, collects the records of the event from the four
//            FIFOs and writes the fragment towards the S-Link; data words
//            of one selected link are also fed to the histogrammer.
// Interface: buses in (bus_word_t, 80 MHz), event record in with take
// handshake, fragment words out, Inmem read port (80 MHz) and
// histogram read port (40 MHz); status: end-of-frame counts per bus,
// Inmem fill level, FIFO overflow flags. The block list follows the text; the
// choice of one Inmem bus and one histogrammed link is this design's.
module rod_slave
  import ibl_pkg::*;
#(
  parameter int unsigned N_BUS      = 4,
  parameter int unsigned LINK_BASE  = 0,
  parameter int unsigned FIFO_DEPTH = 64,
  parameter int unsigned INMEM_DEPTH = 1024,
  parameter int unsigned TIMEOUT    = 4096,
  parameter int unsigned COLS       = 80,
  parameter int unsigned ROWS       = 336
) (
  input  logic                          clk40,
  input  logic                          clk80,
  input  logic                          rst_n,
  input  bus_word_t                     bus_in    [N_BUS],
  input  logic [N_BUS*4-1:0]            link_en,
  // event record from the master
  input  evt_t                          evt,
  input  logic                          evt_valid,
  output logic                          evt_take,
  // fragment out
  output logic [31:0]                   frag_word,
  output logic                          frag_ctrl,
  output logic                          frag_valid,
  output logic [15:0]                   frag_count,
  output logic [15:0]                   timeout_count,
  // Inmem FIFO (80 MHz)
  input  logic [$clog2(N_BUS > 1 ? N_BUS : 2)-1:0] inmem_sel,
  input  logic                          inmem_rd,
  output logic [11:0]                   inmem_data,
  output logic                          inmem_empty,
  // histogrammer (40 MHz)
  input  logic [4:0]                    histo_link,
  input  logic [$clog2(COLS*ROWS)-1:0]  histo_addr,
  output logic [35:0]                   histo_data,
  input  logic                          histo_clear,
  output logic                          histo_clearing,
  output logic [15:0]                   histo_dropped,
  // status
  output logic [15:0]                   g_frames  [N_BUS],
  output logic [$clog2(INMEM_DEPTH+1)-1:0] inmem_count,
  output logic [N_BUS-1:0]              fifo_overflow
);

  rec_t             g_rec   [N_BUS];
  logic [N_BUS-1:0] g_valid;
  rec_t             f_rec   [N_BUS];
  logic [N_BUS-1:0] f_empty, f_full, f_rd;

  // reset released synchronously in each domain
  logic rst40_a, rst40_n, rst80_a, rst80_n;
  always_ff @(posedge clk40 or negedge rst_n)
    if (!rst_n) begin rst40_a <= 1'b0; rst40_n <= 1'b0; end
    else        begin rst40_a <= 1'b1; rst40_n <= rst40_a; end
  always_ff @(posedge clk80 or negedge rst_n)
    if (!rst_n) begin rst80_a <= 1'b0; rst80_n <= 1'b0; end
    else        begin rst80_a <= 1'b1; rst80_n <= rst80_a; end

  for (genvar b = 0; b < N_BUS; b++) begin : g_bus
    rx_gatherer u_gath (
      .clk(clk80), .rst_n(rst80_n), .bus(bus_in[b]),
      .rec(g_rec[b]), .rec_valid(g_valid[b]), .frames(g_frames[b])
    );
    dual_clock_fifo #(.W($bits(rec_t)), .DEPTH(FIFO_DEPTH)) u_fifo (
      .wclk(clk80), .wrst_n(rst80_n), .wr_en(g_valid[b]), .wr_data(g_rec[b]),
      .full(f_full[b]),
      .rclk(clk40), .rrst_n(rst40_n), .rd_en(f_rd[b]), .rd_data(f_rec[b]),
      .empty(f_empty[b])
    );
    always_ff @(posedge clk80 or negedge rst80_n)
      if (!rst80_n) fifo_overflow[b] <= 1'b0;
      else if (g_valid[b] && f_full[b]) fifo_overflow[b] <= 1'b1;
  end

  // ---------------- Inmem FIFO ----------------
  logic       in_full;
  bus_word_t  in_sel_w;
  assign in_sel_w = bus_in[inmem_sel];
  logic [11:0] in_rd_data;
  sync_fifo #(.W(12), .DEPTH(INMEM_DEPTH)) u_inmem (
    .clk(clk80), .rst_n(rst80_n), .clear(1'b0),
    .wr_en(in_sel_w.valid && !in_full), .wr_data(in_sel_w),
    .rd_en(inmem_rd), .rd_data(in_rd_data), .full(in_full),
    .empty(inmem_empty), .count(inmem_count)
  );
  assign inmem_data = in_rd_data;

  // ---------------- event fragment builder ----------------
  efb #(.N_BUS(N_BUS), .LINK_BASE(LINK_BASE), .TIMEOUT(TIMEOUT)) u_efb (
    .clk(clk40), .rst_n(rst40_n), .link_en(link_en),
    .evt(evt), .evt_valid(evt_valid), .evt_take(evt_take),
    .rec(f_rec), .rec_empty(f_empty), .rec_rd(f_rd),
    .out_word(frag_word), .out_ctrl(frag_ctrl), .out_valid(frag_valid),
    .frag_count(frag_count), .timeout_count(timeout_count)
  );

  // ---------------- histogrammer ----------------
  logic h_valid;
  assign h_valid = frag_valid && !frag_ctrl && frag_word[31:29] == 3'b001
                   && frag_word[28:24] == histo_link;
  histogrammer #(.COLS(COLS), .ROWS(ROWS), .CNT_W(16), .TOT_W(20)) u_histo (
    .clk(clk40), .rst_n(rst40_n), .hit_valid(h_valid),
    .hit_col(frag_word[23:17]), .hit_row(frag_word[16:8]), .hit_tot(frag_word[7:4]),
    .rd_addr(histo_addr), .rd_data(histo_data),
    .clear(histo_clear), .clearing(histo_clearing), .dropped(histo_dropped)
  );

endmodule
