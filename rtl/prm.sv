// Program Reset Manager (PRM) of the IBL ROD.
//
// The PRM sits between the VME bus and the other devices of the ROD. It
// provides two services:
//  * FPGA programming via VME. The VME master writes JTAG vectors into the
//    programming FIFO (register PROG_DATA); the JTAG player sends them to
//    the chain chosen in CTRL (0 = slave A, 1 = slave B, 2 = ROD
//    controller). The master polls FIFO_STATUS to keep the FIFO filled.
//    Because writes through the broadcast address 0x25 are taken by every
//    PRM in the crate, all RODs are programmed at once; FIFO_STATUS must
//    be read from each board's own address.
//  * Front-panel JTAG (CTRL bit 5): the PRM joins the three FPGAs into a
//    single chain reached from its front-panel connector (fp_tck, fp_tms,
//    fp_tdi in, fp_tdo out); the VME player is then disconnected.
//  * PLL reset and clock-source check via VME. CTRL bit 0 starts a PLL
//    reset and bit 1 a clock-source check; both run in pll_jtag_ctrl on
//    the internal oscillator, since the PRM clock itself comes from the
//    PLL. STATUS shows REFSEL (1 = local clock, 0 = BOC clock).
//
// Register map (32-bit words, byte offset = 4 * index):
//   0 CTRL        W: [0] start PLL reset, [1] start clock check,
//                    [3:2] FPGA chain, [4] clear FIFO,
//                    [5] front-panel chain mode;  R: [3:2], [5]
//   1 STATUS      R: [0] REFSEL, [1] REFSEL valid, [2] PLL sequencer busy,
//                    [3] PLL RESET held, [4] JTAG player busy,
//                    [15:8] PLL resets done
//   2 PROG_DATA   W: JTAG word {TMS[15:0], TDI[15:0]}
//   3 FIFO_STATUS R: [15:0] words in FIFO, [16] empty, [17] full
//   4 TDO         R: last 16 TDO bits of the JTAG player
//   5 WORDS       R: JTAG words played
// Start requests cross into the oscillator domain as toggles through
// three flip-flops; status comes back through two. Only the services are
// described by the text: register map and encodings are this design's.
module prm #(
  parameter int unsigned N_CHAINS   = 3,
  parameter int unsigned FIFO_DEPTH = 512,
  parameter int unsigned TCK_DIV    = 4,
  parameter int unsigned OSC_HZ     = 100_000_000,
  parameter int unsigned TCK_HZ     = 1_000_000,
  parameter int unsigned RESET_US   = 2000
) (
  input  logic                clk,
  input  logic                osc_clk,
  input  logic                rst_n,
  input  logic [7:0]          board_addr,
  input  logic [23:0]         vme_addr,
  input  logic [5:0]          vme_am,
  input  logic                vme_as_n,
  input  logic                vme_ds0_n,
  input  logic                vme_ds1_n,
  input  logic                vme_write_n,
  input  logic [31:0]         vme_data_in,
  output logic [31:0]         vme_data_out,
  output logic                vme_data_oe,
  output logic                vme_dtack_n,
  output logic                vme_berr_n,
  output logic [N_CHAINS-1:0] fpga_tck,
  output logic [N_CHAINS-1:0] fpga_tms,
  output logic [N_CHAINS-1:0] fpga_tdi,
  input  logic [N_CHAINS-1:0] fpga_tdo,
  input  logic                fp_tck,
  input  logic                fp_tms,
  input  logic                fp_tdi,
  output logic                fp_tdo,
  output logic                pll_tck,
  output logic                pll_tms,
  output logic                pll_tdi,
  input  logic                pll_tdo
);

  localparam int unsigned CNTW = $clog2(FIFO_DEPTH + 1);

  // ---------------- VME ----------------
  logic        reg_wr, reg_rd, reg_bcast;
  logic [5:0]  reg_addr;
  logic [31:0] reg_wdata, reg_rdata;

  vme_slave u_vme (
    .clk, .rst_n, .board_addr, .vme_addr, .vme_am, .vme_as_n, .vme_ds0_n,
    .vme_ds1_n, .vme_write_n, .vme_data_in, .vme_data_out, .vme_data_oe,
    .vme_dtack_n, .vme_berr_n, .reg_wr, .reg_rd, .reg_bcast, .reg_addr,
    .reg_wdata, .reg_rdata
  );

  // ---------------- control register ----------------
  logic [1:0] chain_sel;
  logic       fp_mode;
  logic       tog_reset, tog_check, fifo_clear;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      chain_sel  <= '0;
      fp_mode    <= 1'b0;
      tog_reset  <= 1'b0;
      tog_check  <= 1'b0;
      fifo_clear <= 1'b0;
    end else begin
      fifo_clear <= 1'b0;
      if (reg_wr && reg_addr == 6'd0) begin
        chain_sel  <= reg_wdata[3:2];
        fp_mode    <= reg_wdata[5];
        fifo_clear <= reg_wdata[4];
        if (reg_wdata[0]) tog_reset <= !tog_reset;
        if (reg_wdata[1]) tog_check <= !tog_check;
      end
    end
  end

  // ---------------- programming FIFO and JTAG player ----------------
  logic [31:0]     fifo_q;
  logic            fifo_full, fifo_empty, fifo_rd;
  logic [CNTW-1:0] fifo_count;
  logic            prog_tck, prog_tms, prog_tdi, prog_tdo, prog_busy;
  logic [15:0]     tdo_capture;
  logic [31:0]     words_done;

  sync_fifo #(.W(32), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n, .clear(fifo_clear),
    .wr_en(reg_wr && reg_addr == 6'd2), .wr_data(reg_wdata),
    .rd_en(fifo_rd), .rd_data(fifo_q),
    .full(fifo_full), .empty(fifo_empty), .count(fifo_count)
  );

  jtag_programmer #(.TCK_DIV(TCK_DIV)) u_player (
    .clk, .rst_n, .word(fifo_q), .word_valid(!fifo_empty), .word_ready(fifo_rd),
    .tck(prog_tck), .tms(prog_tms), .tdi(prog_tdi), .tdo(prog_tdo),
    .busy(prog_busy), .tdo_capture, .words_done
  );

  // chain select: unselected chains idle with TCK low and TMS high.
  // Front-panel mode joins all FPGAs into one chain driven from the
  // front-panel connector: TDI -> FPGA 0 -> FPGA 1 -> ... -> TDO.
  always_comb begin
    fpga_tck = '0;
    fpga_tms = '1;
    fpga_tdi = '0;
    prog_tdo = 1'b0;
    fp_tdo   = 1'b0;
    for (int i = 0; i < N_CHAINS; i++) begin
      if (fp_mode) begin
        fpga_tck[i] = fp_tck;
        fpga_tms[i] = fp_tms;
        fpga_tdi[i] = (i == 0) ? fp_tdi : fpga_tdo[(i == 0) ? 0 : i - 1];
      end else if (chain_sel == 2'(i)) begin
        fpga_tck[i] = prog_tck;
        fpga_tms[i] = prog_tms;
        fpga_tdi[i] = prog_tdi;
        prog_tdo    = fpga_tdo[i];
      end
    end
    if (fp_mode) fp_tdo = fpga_tdo[N_CHAINS-1];
  end

  // ---------------- PLL sequencer in the oscillator domain ----------------
  logic [2:0] rst_sync, chk_sync;
  logic       o_start_reset, o_start_check;
  logic       o_busy, o_refsel, o_refsel_valid, o_held;
  logic [7:0] o_count;

  always_ff @(posedge osc_clk or negedge rst_n) begin
    if (!rst_n) begin
      rst_sync <= '0;
      chk_sync <= '0;
    end else begin
      rst_sync <= {rst_sync[1:0], tog_reset};
      chk_sync <= {chk_sync[1:0], tog_check};
    end
  end
  assign o_start_reset = rst_sync[2] ^ rst_sync[1];
  assign o_start_check = chk_sync[2] ^ chk_sync[1];

  pll_jtag_ctrl #(.OSC_HZ(OSC_HZ), .TCK_HZ(TCK_HZ), .RESET_US(RESET_US)) u_pll_seq (
    .osc_clk, .rst_n, .start_check(o_start_check), .start_reset(o_start_reset),
    .tck(pll_tck), .tms(pll_tms), .tdi(pll_tdi), .tdo(pll_tdo),
    .busy(o_busy), .refsel(o_refsel), .refsel_valid(o_refsel_valid),
    .pll_reset_held(o_held), .reset_count(o_count)
  );

  // status back into the PRM clock domain (quasi-static values)
  logic [11:0] st_s1, st_s2;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_s1 <= '0;
      st_s2 <= '0;
    end else begin
      st_s1 <= {o_count, o_held, o_busy, o_refsel_valid, o_refsel};
      st_s2 <= st_s1;
    end
  end

  // ---------------- register read ----------------
  always_comb begin
    reg_rdata = '0;
    unique case (reg_addr)
      6'd0: reg_rdata = {26'd0, fp_mode, 1'b0, chain_sel, 2'b00};
      6'd1: reg_rdata = {16'd0, st_s2[11:4], 3'd0, prog_busy, st_s2[3:0]};
      6'd3: reg_rdata = {14'd0, fifo_full, fifo_empty, 16'(fifo_count)};
      6'd4: reg_rdata = {16'd0, tdo_capture};
      6'd5: reg_rdata = words_done;
      default: reg_rdata = '0;
    endcase
  end

endmodule
