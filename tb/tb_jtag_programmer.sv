// Testbench of the JTAG vector player. Words are fed from a queue; the
// player drives a device test logic (jtag_bscan_device) and must reset its
// TAP, read its 32-bit IDCODE and shift a pattern through the bypass
// register. TCK period and the TMS/TDI bit order are also checked.
module tb_jtag_programmer;
  localparam logic [31:0] ID = 32'h5A3C_9617;
  logic clk = 0, rst_n = 0;
  logic [31:0] word;
  logic word_valid, word_ready, tck, tms, tdi, tdo, busy;
  logic [15:0] tdo_capture;
  logic [31:0] words_done;
  logic [7:0] pins = 0, core_in, ir_q;
  int checks = 0, failures = 0;
  logic [31:0] q [$];

  jtag_programmer #(.TCK_DIV(4)) dut (.*);
  jtag_bscan_device #(.N_IN(8), .IDCODE(ID)) u_dev (.tck, .trst_n(rst_n), .tms, .tdi, .tdo, .pins, .core_in,
    .core_out(1'b0), .pins_out(), .pins_oe(), .ir_q);

  always #5 clk = ~clk;
  assign word_valid = q.size() > 0;
  assign word = word_valid ? q[0] : '0;
  // pop half a cycle after the player took the word, to avoid a race
  bit pop_pending = 0;
  always @(posedge clk) if (word_ready) pop_pending <= 1;
  always @(negedge clk) if (pop_pending) begin void'(q.pop_front()); pop_pending = 0; end

  task automatic expect_val(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  realtime tl, per;
  always @(posedge tck) begin per = $realtime - tl; tl = $realtime; end

  initial begin
    #1000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #22 rst_n = 1;
    // TMS bits LSB first: TLR x5, Idle, SelDR, CapDR, ShiftDR, then 7 shifts (id[6:0])
    q.push_back({16'b0000_0000_0101_1111, 16'h0000});
    q.push_back({16'h0000, 16'h0000});                 // 16 shifts: id[22:7]
    // 9 shifts id[31:23] (exit on the 9th), Update-DR, then Run-Test/Idle
    q.push_back({16'b0000_0011_0000_0000, 16'h0000});
    wait (q.size() == 0 && !busy);
    repeat (20) @(posedge clk);
    expect_val(words_done, 3, "words played");
    expect_val(u_dev.ir_q, 8'h16, "IDCODE selected after TLR");
    expect_val(32'(per), 40, "TCK period = 4 clocks");
    expect_val(tdo_capture[8:0], ID[31:23], "IDCODE upper bits read back");
    // IR scan of BYPASS: SelDR, SelIR, CapIR, ShiftIR, 8 ones (exit on last), Update, Idle
    q.push_back({16'b0001_1000_0000_0011, 16'b0000_1111_1111_0000});
    // DR scan: SelDR, CapDR, ShiftDR, then 13 shifted bits
    q.push_back({16'h0001, 16'b1011_0110_1001_1000});
    wait (q.size() == 0 && !busy);
    repeat (20) @(posedge clk);
    expect_val(u_dev.ir_q, 8'hFF, "BYPASS loaded");
    // the bypass returns each TDI bit one TCK later
    expect_val(tdo_capture[15:4], 12'(16'b1011_0110_1001_1000 >> 3), "bypass path delay");
    expect_val(tdo_capture[3], 1'b0, "bypass captures 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
