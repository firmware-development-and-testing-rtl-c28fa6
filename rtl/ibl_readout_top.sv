// IBL off-detector read-out unit: one BOC-ROD pair with its PRM and the
// JTAG logic of the PLL that cleans the board clock.
//
//   BOC TX  : the command stream of the ROD master is sent to every enabled
//             TX link, bi-phase-mark encoded at 160 MHz and delayed by a
//             per-link coarse delay.
//   BOC RX  : N_FE 8b/10b decoders (one per FE-I4 link, 80 MHz, symbol
//             valid strobe) and one BOC-ROD bus multiplexer per four links;
//             the eight 12-bit buses cross the backplane on 96 lines in
//             the line assignment of the BOC-ROD interface.
//   ROD     : master (trigger processor, FE command processor, event
//             processor) and two slaves, each owning half of the buses and
//             writing its own fragment stream.
//   PRM     : VME slave, FPGA programming chains and the PLL JTAG master,
//             which talks to the PLL boundary-scan logic modelled here by
//             jtag_bscan_device (pin 0 = REFSEL switch, pin 1 = PLL reset).
// Clocks: clk40 (ROD logic), clk80 (BOC-ROD bus), clk160 (TX serial),
// osc_clk (PRM oscillator). One asynchronous reset, released
// synchronously inside each block domain that needs it.
// Partitioning follows the text; the broadcast command stream, the TX
// enable mask and the port grouping are this design's choices.
module ibl_readout_top
  import ibl_pkg::*;
#(
  parameter int unsigned N_FE      = 32,
  parameter int unsigned N_TX      = 16,
  parameter int unsigned DELAY_TAPS = 32,
  parameter int unsigned TIMEOUT   = 4096,
  parameter int unsigned OSC_HZ    = 100_000_000,
  parameter int unsigned TCK_HZ    = 1_000_000,
  parameter int unsigned RESET_US  = 2000
) (
  input  logic                 clk40,
  input  logic                 clk80,
  input  logic                 clk160,
  input  logic                 osc_clk,
  input  logic                 rst_n,
  // TIM and controller trigger inputs (40 MHz)
  input  logic                 use_tim,
  input  logic                 tim_l1a,
  input  logic [7:0]           tim_ttype,
  input  logic                 tim_ecr,
  input  logic                 tim_bcr,
  input  logic                 ppc_trig,
  input  logic [7:0]           ppc_ttype,
  input  logic [31:0]          slow_cmd,
  input  logic [5:0]           slow_len,
  input  logic                 slow_valid,
  output logic                 slow_ready,
  // BOC TX
  input  logic [N_TX-1:0]      tx_en,
  input  logic [$clog2(DELAY_TAPS)-1:0] tx_tap [N_TX],
  output logic [N_TX-1:0]      tx_out,
  // BOC RX (80 MHz)
  input  logic [9:0]           fe_sym   [N_FE],
  input  logic [N_FE-1:0]      fe_sym_valid,
  input  logic [N_FE-1:0]      link_en,
  output logic [N_FE-1:0]      rx_code_err,
  output logic [N_FE-1:0]      rx_disp_err,
  output logic [N_FE/4-1:0]    bus_overflow,
  // ROD fragments (two slaves)
  output logic [31:0]          frag_word  [2],
  output logic [1:0]           frag_ctrl,
  output logic [1:0]           frag_valid,
  output logic [15:0]          frag_count [2],
  output logic [15:0]          timeout_count [2],
  output logic [23:0]          trig_count,
  output logic [15:0]          lv1_sent,
  output logic                 evt_overflow,
  output logic [4:0]           evt_queued,
  output logic                 cmd_busy,
  output logic [N_TX-1:0]      tx_bit_strobe,
  output logic [15:0]          rx_frames  [N_FE/4],
  output logic [N_FE/4-1:0]    fifo_overflow,
  output logic [10:0]          inmem_count [2],
  output logic [15:0]          histo_dropped [2],
  // slave controller ports
  input  logic [1:0]           inmem_sel  [2],
  input  logic [1:0]           inmem_rd,
  output logic [11:0]          inmem_data [2],
  output logic [1:0]           inmem_empty,
  input  logic [4:0]           histo_link [2],
  input  logic [14:0]          histo_addr [2],
  output logic [35:0]          histo_data [2],
  input  logic [1:0]           histo_clear,
  output logic [1:0]           histo_clearing,
  // VME
  input  logic [7:0]           board_addr,
  input  logic [23:0]          vme_addr,
  input  logic [5:0]           vme_am,
  input  logic                 vme_as_n,
  input  logic                 vme_ds0_n,
  input  logic                 vme_ds1_n,
  input  logic                 vme_write_n,
  input  logic [31:0]          vme_data_in,
  output logic [31:0]          vme_data_out,
  output logic                 vme_data_oe,
  output logic                 vme_dtack_n,
  output logic                 vme_berr_n,
  // FPGA configuration JTAG chains (BOC, ROD master, ROD slaves)
  output logic [2:0]           fpga_tck,
  output logic [2:0]           fpga_tms,
  output logic [2:0]           fpga_tdi,
  input  logic [2:0]           fpga_tdo,
  // PRM front-panel JTAG connector
  input  logic                 fp_tck,
  input  logic                 fp_tms,
  input  logic                 fp_tdi,
  output logic                 fp_tdo,
  // PLL pins
  input  logic [7:0]           pll_pins,
  output logic [7:0]           pll_core,
  output logic [7:0]           pll_ir
);

  localparam int unsigned N_BUS = N_FE / 4;
  localparam int unsigned BUS_PER_SLAVE = N_BUS / 2;

  // ================= ROD master =================
  logic lv1_req, tp_valid;
  evt_t tp_evt;
  trigger_processor u_trig (
    .clk(clk40), .rst_n(rst_n), .use_tim(use_tim),
    .tim_l1a(tim_l1a), .tim_ttype(tim_ttype), .tim_ecr(tim_ecr), .tim_bcr(tim_bcr),
    .ppc_trig(ppc_trig), .ppc_ttype(ppc_ttype),
    .lv1_req(lv1_req), .evt_valid(tp_valid), .evt(tp_evt), .trig_count(trig_count)
  );

  logic cmd_out;
  fe_cmd_processor u_cmd (
    .clk(clk40), .rst_n(rst_n), .lv1_req(lv1_req),
    .slow_cmd(slow_cmd), .slow_len(slow_len), .slow_valid(slow_valid),
    .slow_ready(slow_ready), .cmd_out(cmd_out), .busy(cmd_busy), .lv1_sent(lv1_sent)
  );

  evt_t       ep_evt;
  logic [1:0] ep_valid, ep_take;
  event_processor #(.DEPTH(16), .N_SLAVES(2)) u_evp (
    .clk(clk40), .rst_n(rst_n), .in_valid(tp_valid), .in_evt(tp_evt),
    .evt(ep_evt), .evt_valid(ep_valid), .take(ep_take),
    .overflow(evt_overflow), .queued(evt_queued)
  );

  // ================= BOC TX =================
  for (genvar t = 0; t < N_TX; t++) begin : g_tx
    logic bpm;
    bpm_encoder #(.CLK_PER_BIT(4)) u_bpm (
      .clk(clk160), .rst_n(rst_n), .bit_in(cmd_out && tx_en[t]),
      .bit_strobe(tx_bit_strobe[t]), .bpm_out(bpm)
    );
    coarse_delay #(.DEPTH(DELAY_TAPS)) u_dly (
      .clk(clk160), .rst_n(rst_n), .din(bpm), .tap(tx_tap[t]), .dout(tx_out[t])
    );
  end

  // ================= BOC RX =================
  bus_word_t boc_bus [N_BUS];   // bus words as the BOC sends them
  bus_word_t bus     [N_BUS];   // bus words as the ROD receives them
  for (genvar b = 0; b < N_BUS; b++) begin : g_rx
    logic [3:0][7:0] d;
    logic [3:0]      k, v;
    for (genvar c = 0; c < 4; c++) begin : g_dec
      dec_8b10b u_dec (
        .clk(clk80), .rst_n(rst_n), .sym(fe_sym[4*b+c]), .sym_valid(fe_sym_valid[4*b+c]),
        .data(d[c]), .k(k[c]), .out_valid(v[c]),
        .code_err(rx_code_err[4*b+c]), .disp_err(rx_disp_err[4*b+c])
      );
    end
    boc_rx_mux #(.N_CH(4)) u_mux (
      .clk(clk80), .rst_n(rst_n), .ch_data(d), .ch_k(k), .ch_valid(v),
      .bus(boc_bus[b]), .overflow(bus_overflow[b])
    );
  end

  // ================= BOC-ROD backplane =================
  // The buses are spread over the 96 backplane lines in the fixed pattern
  // given by the line_* functions of the package; the ROD side gathers
  // them back. Lines of buses beyond N_BUS stay 0.
  logic [N_BOC_ROD_LINES-1:0] rxdata;
  always_comb begin
    rxdata = '0;
    for (int b = 0; b < int'(N_BUS); b++) begin
      rxdata[line_data_lsb(b) +: 8] = boc_bus[b].data;
      rxdata[line_addr_lsb(b) +: 2] = boc_bus[b].addr;
      rxdata[line_valid(b)]         = boc_bus[b].valid;
      rxdata[line_ctrl(b)]          = boc_bus[b].ctrl;
    end
  end
  for (genvar b = 0; b < N_BUS; b++) begin : g_unpack
    assign bus[b] = '{ctrl:  rxdata[line_ctrl(b)],
                      valid: rxdata[line_valid(b)],
                      addr:  rxdata[line_addr_lsb(b) +: 2],
                      data:  rxdata[line_data_lsb(b) +: 8]};
  end

  // ================= ROD slaves =================
  for (genvar s = 0; s < 2; s++) begin : g_slave
    bus_word_t sb [BUS_PER_SLAVE];
    for (genvar b = 0; b < BUS_PER_SLAVE; b++) begin : g_b
      assign sb[b] = bus[s*BUS_PER_SLAVE + b];
    end
    logic [15:0] frames [BUS_PER_SLAVE];
    for (genvar b = 0; b < BUS_PER_SLAVE; b++) begin : g_f
      assign rx_frames[s*BUS_PER_SLAVE + b] = frames[b];
    end
    rod_slave #(
      .N_BUS(BUS_PER_SLAVE), .LINK_BASE(s * BUS_PER_SLAVE * 4), .FIFO_DEPTH(64),
      .INMEM_DEPTH(1024), .TIMEOUT(TIMEOUT), .COLS(80), .ROWS(336)
    ) u_slave (
      .clk40(clk40), .clk80(clk80), .rst_n(rst_n), .bus_in(sb),
      .link_en(link_en[s*BUS_PER_SLAVE*4 +: BUS_PER_SLAVE*4]),
      .evt(ep_evt), .evt_valid(ep_valid[s]), .evt_take(ep_take[s]),
      .frag_word(frag_word[s]), .frag_ctrl(frag_ctrl[s]), .frag_valid(frag_valid[s]),
      .frag_count(frag_count[s]), .timeout_count(timeout_count[s]),
      .inmem_sel(inmem_sel[s][$clog2(BUS_PER_SLAVE)-1:0]), .inmem_rd(inmem_rd[s]),
      .inmem_data(inmem_data[s]), .inmem_empty(inmem_empty[s]),
      .histo_link(histo_link[s]), .histo_addr(histo_addr[s]), .histo_data(histo_data[s]),
      .histo_clear(histo_clear[s]), .histo_clearing(histo_clearing[s]),
      .histo_dropped(histo_dropped[s]), .g_frames(frames), .inmem_count(inmem_count[s]),
      .fifo_overflow(fifo_overflow[s*BUS_PER_SLAVE +: BUS_PER_SLAVE])
    );
  end

  // ================= PRM and PLL =================
  logic pll_tck, pll_tms, pll_tdi, pll_tdo;
  prm #(
    .N_CHAINS(3), .FIFO_DEPTH(512), .TCK_DIV(4),
    .OSC_HZ(OSC_HZ), .TCK_HZ(TCK_HZ), .RESET_US(RESET_US)
  ) u_prm (
    .clk(clk40), .osc_clk(osc_clk), .rst_n(rst_n), .board_addr(board_addr),
    .vme_addr(vme_addr), .vme_am(vme_am), .vme_as_n(vme_as_n),
    .vme_ds0_n(vme_ds0_n), .vme_ds1_n(vme_ds1_n), .vme_write_n(vme_write_n),
    .vme_data_in(vme_data_in), .vme_data_out(vme_data_out), .vme_data_oe(vme_data_oe),
    .vme_dtack_n(vme_dtack_n), .vme_berr_n(vme_berr_n),
    .fpga_tck(fpga_tck), .fpga_tms(fpga_tms), .fpga_tdi(fpga_tdi), .fpga_tdo(fpga_tdo),
    .fp_tck(fp_tck), .fp_tms(fp_tms), .fp_tdi(fp_tdi), .fp_tdo(fp_tdo),
    .pll_tck(pll_tck), .pll_tms(pll_tms), .pll_tdi(pll_tdi), .pll_tdo(pll_tdo)
  );

  // the PLL has no scannable outputs in this design
  logic pll_out_nc, pll_oe_nc;
  jtag_bscan_device #(.N_IN(8)) u_pll_jtag (
    .tck(pll_tck), .trst_n(rst_n), .tms(pll_tms), .tdi(pll_tdi), .tdo(pll_tdo),
    .pins(pll_pins), .core_in(pll_core), .core_out(1'b0),
    .pins_out(pll_out_nc), .pins_oe(pll_oe_nc), .ir_q(pll_ir)
  );

endmodule
