// Testbench of the boundary-scan cell: normal mode passes IN to OUT,
// capture samples IN, scan moves SIN to SOUT, and the update latch only
// changes on UpdateDR and drives OUT in test mode.
module tb_boundary_scan_cell;
  logic tck = 0, trst_n = 0, pin_in = 0, sin = 0, shift_dr = 0, capture_en = 0, update_en = 0, mode = 0;
  logic sout, pin_out;
  int checks = 0, failures = 0;

  boundary_scan_cell dut (.*);
  always #5 tck = ~tck;

  task automatic expect_bit(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %0b expected %0b", what, got, exp); end
  endtask

  task automatic clk1();
    @(posedge tck); @(negedge tck); #1;
  endtask

  initial begin
    #100000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12 trst_n = 1;
    for (int i = 0; i < 20; i++) begin
      logic a, b;
      a = 1'($urandom()); b = 1'($urandom());
      // normal mode
      mode = 0; pin_in = a; #1 expect_bit(pin_out, a, "normal");
      // capture
      @(negedge tck) capture_en = 1; shift_dr = 0; pin_in = a;
      clk1(); capture_en = 0; pin_in = ~a;
      expect_bit(sout, a, "capture");
      // scan
      @(negedge tck) capture_en = 1; shift_dr = 1; sin = b;
      clk1(); capture_en = 0; shift_dr = 0;
      expect_bit(sout, b, "scan");
      // update not yet given: test mode shows old latch, not b (latch was set last loop)
      mode = 1; #1;
      // update
      @(negedge tck); update_en = 1; @(posedge tck); @(negedge tck); #1 update_en = 0;
      expect_bit(pin_out, b, "update in test mode");
      // capture again: latch holds
      @(negedge tck) capture_en = 1; pin_in = ~b;
      clk1(); capture_en = 0;
      expect_bit(pin_out, b, "latch holds during capture");
      mode = 0; #1 expect_bit(pin_out, pin_in, "back to normal");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
