// Testbench of the PLL reset / clock-source sequencer. The sequencer drives
// the test logic of the PLL (jtag_bscan_device, REFSEL on pin 0, RESET on
// pin 1). It checks that a clock-source check returns the REFSEL pin for
// both values and leaves RESET released, that TCK runs at 1 MHz from the
// 100 MHz oscillator, and that a PLL reset holds the PLL RESET input high
// for at least 2 ms (and not much longer) before normal operation returns.
module tb_pll_jtag_ctrl;
  logic osc_clk = 0, rst_n = 0, start_check = 0, start_reset = 0;
  logic tck, tms, tdi, tdo, busy, refsel, refsel_valid, pll_reset_held;
  logic [7:0] reset_count;
  logic [7:0] pins, core_in, ir_q;
  int checks = 0, failures = 0;

  pll_jtag_ctrl dut (.*);
  jtag_bscan_device #(.N_IN(8)) u_pll (.tck, .trst_n(rst_n), .tms, .tdi, .tdo, .pins, .core_in,
    .core_out(1'b0), .pins_out(), .pins_oe(), .ir_q);

  always #5 osc_clk = ~osc_clk;   // 100 MHz

  task automatic expect_val(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  // TCK period measurement
  realtime t_last, period;
  always @(posedge tck) begin period = $realtime - t_last; t_last = $realtime; end

  // RESET pulse width seen by the PLL core
  realtime t_rise, width;
  int n_pulses = 0;
  always @(posedge core_in[1]) t_rise = $realtime;
  always @(negedge core_in[1]) if (rst_n) begin width = $realtime - t_rise; n_pulses++; end

  initial begin
    #20ms failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input bit rst_op);
    @(posedge osc_clk); if (rst_op) start_reset = 1; else start_check = 1;
    @(posedge osc_clk); start_reset = 0; start_check = 0;
    @(posedge osc_clk);
    wait (!busy);
    repeat (10) @(posedge osc_clk);
  endtask

  initial begin
    pins = 8'b0000_0001;  // REFSEL=1: local clock
    #100 rst_n = 1;
    run(0);
    expect_val(refsel_valid, 1, "refsel valid");
    expect_val(refsel, 1, "refsel = 1");
    expect_val(32'(period), 1000, "TCK period 1 us");
    expect_val(core_in[1], 0, "RESET released after check");
    expect_val(ir_q, 8'h1C, "SAMPLE/PRELOAD left selected");
    pins = 8'b0000_0000;  // REFSEL=0: BOC clock
    run(0);
    expect_val(refsel, 0, "refsel = 0");
    expect_val(n_pulses, 0, "no reset pulse from a check");
    run(1);
    expect_val(n_pulses, 1, "one reset pulse");
    checks++;
    if (width < 2ms || width > 2.1ms) begin failures++; $display("FAIL reset width %t", width); end
    expect_val(core_in[1], 0, "RESET released after reset");
    expect_val(reset_count, 1, "reset count");
    expect_val(ir_q, 8'h1C, "SAMPLE/PRELOAD restored");
    pins = 8'b0000_0001;
    run(1);
    expect_val(refsel, 1, "refsel refreshed by reset");
    expect_val(reset_count, 2, "reset count 2");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
