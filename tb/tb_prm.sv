// Testbench of the PRM. Two PRMs (board addresses 0x10 and 0x11) share one
// VME bus; each drives three FPGA JTAG chains (test logic models with
// distinct IDCODEs) and the JTAG port of its PLL. The test
//  - reads and writes registers at each board's own address;
//  - checks that a broadcast read gets BERR*;
//  - selects the Virtex-5 chain and loads the same JTAG program into both
//    boards with broadcast writes, then reads each board's captured TDO,
//    which must be the IDCODE of that board's own chain-2 FPGA;
//  - joins the three FPGAs of board 0x10 into the front-panel chain and
//    reads their three IDCODEs through it;
//  - runs a broadcast clock-source check (board 0x10 on the local clock,
//    0x11 on the BOC clock) and a broadcast PLL reset, measuring the RESET
//    pulse of both PLLs (at least 2 ms).
module tb_prm;
  logic clk = 0, osc_clk = 0, rst_n = 1;
  logic [23:0] vme_addr = 0;
  logic [5:0] vme_am = 6'h39;
  logic vme_as_n = 1, vme_ds0_n = 1, vme_ds1_n = 1, vme_write_n = 1;
  logic [31:0] vme_data_in = 0;
  logic [31:0] dout [2];
  logic [1:0] oe, dtack_n, berr_n;
  logic [2:0] f_tck [2], f_tms [2], f_tdi [2], f_tdo [2];
  logic [1:0] p_tck, p_tms, p_tdi, p_tdo;
  logic [1:0] fp_tck = 0, fp_tms = 1, fp_tdi = 0, fp_tdo;
  logic [7:0] p_pins [2], p_core [2], p_ir [2], f_pins, f_core [2][3], f_ir [2][3];
  int checks = 0, failures = 0;

  always #12.5 clk = ~clk;      // 40 MHz PRM clock
  always #5 osc_clk = ~osc_clk; // 100 MHz internal oscillator

  assign f_pins = 8'h00;
  for (genvar b = 0; b < 2; b++) begin : g_board
    prm u_prm (
      .clk, .osc_clk, .rst_n, .board_addr(8'h10 + 8'(b)),
      .vme_addr, .vme_am, .vme_as_n, .vme_ds0_n, .vme_ds1_n, .vme_write_n, .vme_data_in,
      .vme_data_out(dout[b]), .vme_data_oe(oe[b]), .vme_dtack_n(dtack_n[b]), .vme_berr_n(berr_n[b]),
      .fpga_tck(f_tck[b]), .fpga_tms(f_tms[b]), .fpga_tdi(f_tdi[b]), .fpga_tdo(f_tdo[b]),
      .fp_tck(fp_tck[b]), .fp_tms(fp_tms[b]), .fp_tdi(fp_tdi[b]), .fp_tdo(fp_tdo[b]),
      .pll_tck(p_tck[b]), .pll_tms(p_tms[b]), .pll_tdi(p_tdi[b]), .pll_tdo(p_tdo[b])
    );
    for (genvar c = 0; c < 3; c++) begin : g_fpga
      jtag_bscan_device #(.N_IN(8), .IDCODE(32'hA000_0001 + 32'(b * 16 + c) * 2)) u_dev (
        .tck(f_tck[b][c]), .trst_n(rst_n), .tms(f_tms[b][c]), .tdi(f_tdi[b][c]), .tdo(f_tdo[b][c]),
        .pins(f_pins), .core_in(f_core[b][c]), .core_out(1'b0), .pins_out(), .pins_oe(),
        .ir_q(f_ir[b][c]));
    end
    jtag_bscan_device #(.N_IN(8)) u_pll (
      .tck(p_tck[b]), .trst_n(rst_n), .tms(p_tms[b]), .tdi(p_tdi[b]), .tdo(p_tdo[b]),
      .pins(p_pins[b]), .core_in(p_core[b]), .core_out(1'b0), .pins_out(), .pins_oe(),
      .ir_q(p_ir[b]));
  end

  // open-collector bus
  wire bus_dtack_n = &dtack_n;
  wire bus_berr_n  = &berr_n;
  wire [31:0] bus_data = oe[0] ? dout[0] : dout[1];

  task automatic expect_val(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  // res: 0 DTACK, 1 BERR, 2 none
  task automatic vme(input logic wr, input logic [7:0] board, input int reg_idx,
                     input logic [31:0] d, output int res, output logic [31:0] q);
    int t = 0;
    vme_addr = {board, 8'h00, 6'(reg_idx), 2'b00}; vme_write_n = !wr; vme_data_in = d;
    #40 vme_as_n = 0;
    #10 vme_ds0_n = 0; vme_ds1_n = 0;
    while (bus_dtack_n && bus_berr_n && t < 40) begin #25; t++; end
    res = !bus_dtack_n ? 0 : (!bus_berr_n ? 1 : 2);
    q = bus_data;
    checks++;
    if (wr == 0 && res == 0 && (oe[0] && oe[1])) begin failures++; $display("FAIL two drivers"); end
    vme_ds0_n = 1; vme_ds1_n = 1; #10 vme_as_n = 1;
    while ((!bus_dtack_n || !bus_berr_n) && t < 80) begin #25; t++; end
    #50;
  endtask

  realtime t_up [2], w [2];
  int pulses [2] = '{0, 0};
  for (genvar b = 0; b < 2; b++) begin : g_mon
    always @(posedge p_core[b][1]) t_up[b] = $realtime;
    always @(negedge p_core[b][1]) if (rst_n) begin w[b] = $realtime - t_up[b]; pulses[b]++; end
  end

  // front-panel JTAG: one TCK period of 200 ns, TMS/TDI set while TCK is
  // low, TDO sampled on the rising edge
  task automatic fp_clock(input logic tms, input logic tdi, output logic tdo);
    fp_tms[0] = tms; fp_tdi[0] = tdi;
    #100 fp_tck[0] = 1; tdo = fp_tdo[0];
    #100 fp_tck[0] = 0;
  endtask

  initial begin
    #30ms failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int r;
    logic [31:0] q;
    logic [31:0] id;
    p_pins[0] = 8'h01;  // board 0x10: REFSEL = 1, local clock
    p_pins[1] = 8'h00;  // board 0x11: REFSEL = 0, BOC clock
    #1 rst_n = 0;
    #200 rst_n = 1;
    #200;
    vme(1, 8'h10, 0, 32'h4, r, q);              // board 0x10 chain 1
    expect_val(r, 0, "own write");
    vme(0, 8'h10, 0, 0, r, q);
    expect_val(r, 0, "own read"); expect_val(q, 32'h4, "CTRL read back");
    vme(0, 8'h11, 0, 0, r, q);
    expect_val(q, 32'h0, "other board untouched");
    vme(0, 8'h25, 0, 0, r, q);
    expect_val(r, 1, "broadcast read -> BERR");
    // broadcast: chain 2 (Virtex-5 master), clear FIFO
    vme(1, 8'h25, 0, 32'h18, r, q);
    expect_val(r, 0, "broadcast write DTACK");
    vme(0, 8'h11, 0, 0, r, q); expect_val(q, 32'h8, "broadcast reached 0x11");
    vme(0, 8'h10, 0, 0, r, q); expect_val(q, 32'h8, "broadcast reached 0x10");
    // JTAG program: TLR, to Shift-DR, read 32 IDCODE bits, back to idle
    vme(1, 8'h25, 2, {16'b0000_0000_0101_1111, 16'h0}, r, q);
    vme(1, 8'h25, 2, {16'h0000, 16'h0}, r, q);
    vme(1, 8'h25, 2, {16'b0000_0011_0000_0000, 16'h0}, r, q);
    vme(0, 8'h10, 3, 0, r, q);
    expect_val(r, 0, "FIFO status read");
    #20us;
    vme(0, 8'h10, 3, 0, r, q); expect_val(q[16], 1'b1, "FIFO drained");
    vme(0, 8'h10, 5, 0, r, q); expect_val(q, 3, "3 words played on 0x10");
    for (int b = 0; b < 2; b++) begin
      id = 32'hA000_0001 + 32'(b * 16 + 2) * 2;
      vme(0, 8'h10 + 8'(b), 4, 0, r, q);
      expect_val(q[8:0], id[31:23], "IDCODE of own chain-2 FPGA");
      expect_val(f_ir[b][0], 8'h16, "chain 0 untouched (TMS held high)");
    end
    // front-panel mode on board 0x10: after Test-Logic-Reset every FPGA
    // holds its IDCODE; a 96-bit data scan returns the IDCODEs of
    // FPGA 2, 1, 0 in that order
    vme(1, 8'h10, 0, 32'h20, r, q);
    vme(0, 8'h10, 0, 0, r, q); expect_val(q, 32'h20, "front-panel mode set");
    begin
      logic t;
      logic [95:0] got;
      for (int i = 0; i < 5; i++) fp_clock(1, 0, t);
      fp_clock(0, 0, t); fp_clock(1, 0, t); fp_clock(0, 0, t); fp_clock(0, 0, t);
      for (int i = 0; i < 96; i++) begin fp_clock(i == 95, 0, t); got[i] = t; end
      fp_clock(1, 0, t); fp_clock(0, 0, t);
      for (int c = 0; c < 3; c++)
        expect_val(got[32 * c +: 32], 32'hA000_0001 + 32'(2 - c) * 2, "front-panel chain IDCODE");
      expect_val(fp_tdo[1], 1'b0, "board 0x11 front panel idle");
    end
    vme(1, 8'h10, 0, 32'h08, r, q);
    // broadcast clock-source check
    vme(1, 8'h25, 0, 32'hA, r, q);
    #100us;
    vme(0, 8'h10, 1, 0, r, q);
    expect_val(q[1:0], 2'b11, "0x10 REFSEL=1 valid");
    vme(0, 8'h11, 1, 0, r, q);
    expect_val(q[1:0], 2'b10, "0x11 REFSEL=0 valid");
    // broadcast PLL reset
    vme(1, 8'h25, 0, 32'h9, r, q);
    #500us;
    vme(0, 8'h10, 1, 0, r, q);
    expect_val(q[3:2], 2'b11, "0x10 sequencer busy, RESET held");
    #2ms;
    for (int b = 0; b < 2; b++) begin
      vme(0, 8'h10 + 8'(b), 1, 0, r, q);
      expect_val(q[15:8], 1, "one PLL reset done");
      expect_val(q[3:2], 2'b00, "idle, RESET released");
      expect_val(pulses[b], 1, "one RESET pulse");
      checks++;
      if (w[b] < 2ms) begin failures++; $display("FAIL RESET shorter than 2 ms"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
