// Testbench of the device test logic. A JTAG master in the testbench
// reads IDCODE after reset, checks the one-bit bypass path, samples the
// pins with SAMPLE/PRELOAD, preloads a pattern and drives it into the core
// with INTEST, and checks the instruction-register capture value. With
// four output cells it also drives output pins with EXTEST, holds them
// with CLAMP, disables them with HIGHZ and reads USERCODE. The device has
// 8 input and 4 output cells; every data scan of the boundary-scan
// register is 12 bits long.
module tb_jtag_bscan_device;
  import ibl_pkg::*;
  localparam int N = 8;
  localparam int NO = 4;
  localparam int NB = N + NO;
  localparam logic [31:0] ID = 32'h1234_5679;
  localparam logic [31:0] UC = 32'hC0DE_0042;
  logic tck = 0, trst_n = 0, tms = 1, tdi = 0, tdo;
  logic [N-1:0] pins, core_in;
  logic [7:0] ir_q;
  logic [NO-1:0] core_out, pins_out;
  logic pins_oe;
  int checks = 0, failures = 0;

  jtag_bscan_device #(.N_IN(N), .N_OUT(NO), .IDCODE(ID), .USERCODE(UC)) dut (.*);

  always #50 tck = ~tck;

  task automatic expect_val(input logic [63:0] got, input logic [63:0] exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  // one TCK period: drive on falling edge, sample TDO on rising edge
  task automatic clk(input logic m, input logic d, output logic o);
    @(negedge tck); tms = m; tdi = d;
    @(posedge tck); o = tdo;
  endtask

  task automatic go_reset();
    logic o;
    repeat (5) clk(1, 0, o);
    clk(0, 0, o);  // Run-Test/Idle
  endtask

  task automatic ir_scan(input logic [7:0] op, output logic [7:0] cap);
    logic o;
    clk(1, 0, o); clk(1, 0, o); clk(0, 0, o); clk(0, 0, o);  // -> Shift-IR
    for (int i = 0; i < 8; i++) begin clk(i == 7, op[i], o); cap[i] = o; end
    clk(1, 0, o); clk(0, 0, o);  // Update-IR, Idle
  endtask

  task automatic dr_scan(input int len, input logic [63:0] din, output logic [63:0] dout);
    logic o;
    dout = '0;
    clk(1, 0, o); clk(0, 0, o); clk(0, 0, o);  // -> Shift-DR
    for (int i = 0; i < len; i++) begin clk(i == len - 1, din[i], o); dout[i] = o; end
    clk(1, 0, o); clk(0, 0, o);
  endtask

  initial begin
    #2000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] cap;
    logic [63:0] d;
    pins = 8'hA5;
    core_out = 4'h6;
    #120 trst_n = 1;
    go_reset();
    expect_val(ir_q, 8'h16, "IDCODE after reset");
    dr_scan(32, 0, d);
    expect_val(d[31:0], ID, "IDCODE read");
    // bypass: a pattern comes out one bit late
    ir_scan(8'hFF, cap);
    expect_val(cap[1:0], 2'b01, "IR capture");
    dr_scan(17, 64'h1_3A5C, d);
    expect_val(d[16:0], {16'h3A5C, 1'b0}, "bypass one-bit delay");
    // SAMPLE/PRELOAD: pins captured, core sees pins
    for (int k = 0; k < 4; k++) begin
      pins = 8'($urandom());
      ir_scan(8'h1C, cap);
      dr_scan(NB, 64'h0F, d);
      expect_val(d[N-1:0], pins, "SAMPLE captures pins");
      expect_val(core_in, pins, "core sees pins in SAMPLE");
    end
    // INTEST: preload then drive core
    ir_scan(8'h1C, cap);
    dr_scan(NB, 64'h3C, d);
    ir_scan(8'h2C, cap);
    expect_val(core_in, 8'h3C, "INTEST drives preloaded value");
    dr_scan(NB, 64'h02, d);
    expect_val(core_in, 8'h02, "INTEST drives new value");
    expect_val(d[N-1:0], pins, "INTEST scan captured pins");
    ir_scan(8'h1C, cap);
    expect_val(core_in, pins, "SAMPLE restores normal path");
    // output cells: SAMPLE captures the core outputs, pins follow the core
    for (int k = 0; k < 4; k++) begin
      logic [NO-1:0] o, o2;
      core_out = NO'($urandom());
      dr_scan(NB, 64'h0, d);
      expect_val(d[NB-1:N], core_out, "SAMPLE captures core outputs");
      expect_val(pins_out, core_out, "pins follow core in SAMPLE");
      expect_val(pins_oe, 1'b1, "outputs enabled in SAMPLE");
      // EXTEST: preloaded value appears on the output pins
      o = NO'($urandom());
      dr_scan(NB, 64'({o, 8'h00}), d);
      ir_scan(8'h00, cap);
      expect_val(pins_out, o, "EXTEST drives preloaded outputs");
      expect_val(core_in, pins, "core sees pins in EXTEST");
      o2 = NO'($urandom());
      dr_scan(NB, 64'({o2, 8'h00}), d);
      expect_val(pins_out, o2, "EXTEST drives new outputs");
      expect_val(d[NB-1:0], 64'({core_out, pins}), "EXTEST captures core outputs and pins");
      // CLAMP: outputs held, bypass between TDI and TDO
      ir_scan(8'h20, cap);
      core_out = ~core_out;
      expect_val(pins_out, o2, "CLAMP holds outputs");
      dr_scan(17, 64'h1_5AC3, d);
      expect_val(d[16:0], {16'h5AC3, 1'b0}, "CLAMP selects bypass");
      expect_val(pins_out, o2, "CLAMP outputs unchanged by scan");
      // HIGHZ: outputs disabled, bypass selected
      ir_scan(8'h18, cap);
      expect_val(pins_oe, 1'b0, "HIGHZ disables outputs");
      dr_scan(9, 64'h1A5, d);
      expect_val(d[8:0], {8'hA5, 1'b0}, "HIGHZ selects bypass");
      ir_scan(8'h1C, cap);
      expect_val(pins_oe, 1'b1, "SAMPLE enables outputs again");
      expect_val(pins_out, core_out, "pins follow core again");
    end
    // USERCODE and IDCODE share the identification register
    ir_scan(8'h17, cap);
    dr_scan(32, 0, d);
    expect_val(d[31:0], UC, "USERCODE read");
    ir_scan(8'h16, cap);
    dr_scan(32, 0, d);
    expect_val(d[31:0], ID, "IDCODE read after USERCODE");
    // reset by TMS brings IDCODE back and normal path
    ir_scan(8'h2C, cap);
    go_reset();
    expect_val(ir_q, 8'h16, "TMS reset reloads IDCODE");
    expect_val(core_in, pins, "normal path after reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
