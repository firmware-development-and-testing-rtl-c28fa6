// Testbench of the TAP controller: random TMS sequences are compared with a
// reference transition table written out here from the IEEE 1149.1 state
// diagram, and five TMS=1 clocks from every state must reach
// Test-Logic-Reset. The decoded strobes are checked against the state.
module tb_jtag_tap_ctrl;
  import ibl_pkg::*;
  logic tck = 0, trst_n = 0, tms = 1;
  tap_state_e state;
  logic test_reset, capture_dr, shift_dr, update_dr, capture_ir, shift_ir, update_ir, run_idle;
  int checks = 0, failures = 0;

  jtag_tap_ctrl dut (.*);

  always #5 tck = ~tck;

  // reference: state names as small integers in diagram order
  // 0 TLR 1 RTI 2 SelDR 3 CapDR 4 ShDR 5 Ex1DR 6 PauseDR 7 Ex2DR 8 UpdDR
  // 9 SelIR 10 CapIR 11 ShIR 12 Ex1IR 13 PauseIR 14 Ex2IR 15 UpdIR
  int nxt0 [16] = '{1, 1, 3, 4, 4, 6, 6, 4, 1, 10, 11, 11, 13, 13, 11, 1};
  int nxt1 [16] = '{0, 2, 9, 5, 5, 8, 7, 8, 2, 0, 12, 12, 15, 14, 15, 2};
  tap_state_e enc [16] = '{TAP_RESET, TAP_IDLE, TAP_SEL_DR, TAP_CAPTURE_DR, TAP_SHIFT_DR,
                           TAP_EXIT1_DR, TAP_PAUSE_DR, TAP_EXIT2_DR, TAP_UPDATE_DR, TAP_SEL_IR,
                           TAP_CAPTURE_IR, TAP_SHIFT_IR, TAP_EXIT1_IR, TAP_PAUSE_IR,
                           TAP_EXIT2_IR, TAP_UPDATE_IR};
  int ref_s = 0;
  bit seen [16];

  task automatic check_state();
    checks++;
    if (state !== enc[ref_s]) begin
      failures++;
      $display("FAIL state %0d expected %0d", state, enc[ref_s]);
    end
    checks++;
    if (shift_dr != (ref_s == 4) || shift_ir != (ref_s == 11) || capture_dr != (ref_s == 3) ||
        update_ir != (ref_s == 15) || test_reset != (ref_s == 0) || run_idle != (ref_s == 1)) begin
      failures++;
      $display("FAIL strobes in state %0d", ref_s);
    end
  endtask

  task automatic step(input logic t);
    @(negedge tck) tms = t;
    @(posedge tck) ref_s = t ? nxt1[ref_s] : nxt0[ref_s];
    #1 check_state();
  endtask

  initial begin
    #2000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12 trst_n = 1;
    #1 check_state();
    repeat (600) begin
      step(1'($urandom_range(0, 99) < 45));
      seen[ref_s] = 1;
    end
    foreach (seen[i]) begin
      checks++;
      if (!seen[i]) begin failures++; $display("FAIL state %0d never visited", i); end
    end
    // from every state, five TMS=1 clocks reach Test-Logic-Reset
    for (int s = 0; s < 16; s++) begin
      // walk to state s with a random walk until reached
      while (ref_s != s) step(1'($urandom_range(0, 1)));
      repeat (5) step(1'b1);
      checks++;
      if (state !== TAP_RESET) begin failures++; $display("FAIL no reset from %0d", s); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
