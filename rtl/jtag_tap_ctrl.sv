// IEEE 1149.1 Test Access Port controller.
//
// The sixteen-state machine of the boundary-scan standard, advanced by TMS
// on each rising edge of TCK. Holding TMS high for five clocks always
// reaches Test-Logic-Reset, the only steady state entered with TMS=1; the
// other steady states are Run-Test/Idle, Shift-DR, Pause-DR, Shift-IR and
// Pause-IR. Besides the state it decodes the strobes the instruction and
// data registers need: capture, shift and update for each scan path, and a
// reset flag for the test logic.
//
// Interface: tck, tms, trst_n (asynchronous reset to Test-Logic-Reset).
// The strobes are combinational decodes of the current state, so a
// register clocked by the same rising edge of TCK acts in that state (a
// shift register shifts on every rising edge spent in Shift-xR). The
// state diagram is the standard one; the 4-bit encoding and the optional
// TRST* input are this design's choices.
module jtag_tap_ctrl
  import ibl_pkg::*;
(
  input  logic       tck,
  input  logic       trst_n,
  input  logic       tms,
  output tap_state_e state,
  output logic       test_reset,
  output logic       capture_dr,
  output logic       shift_dr,
  output logic       update_dr,
  output logic       capture_ir,
  output logic       shift_ir,
  output logic       update_ir,
  output logic       run_idle
);

  tap_state_e next;

  always_comb begin
    unique case (state)
      TAP_RESET:      next = tms ? TAP_RESET     : TAP_IDLE;
      TAP_IDLE:       next = tms ? TAP_SEL_DR    : TAP_IDLE;
      TAP_SEL_DR:     next = tms ? TAP_SEL_IR    : TAP_CAPTURE_DR;
      TAP_CAPTURE_DR: next = tms ? TAP_EXIT1_DR  : TAP_SHIFT_DR;
      TAP_SHIFT_DR:   next = tms ? TAP_EXIT1_DR  : TAP_SHIFT_DR;
      TAP_EXIT1_DR:   next = tms ? TAP_UPDATE_DR : TAP_PAUSE_DR;
      TAP_PAUSE_DR:   next = tms ? TAP_EXIT2_DR  : TAP_PAUSE_DR;
      TAP_EXIT2_DR:   next = tms ? TAP_UPDATE_DR : TAP_SHIFT_DR;
      TAP_UPDATE_DR:  next = tms ? TAP_SEL_DR    : TAP_IDLE;
      TAP_SEL_IR:     next = tms ? TAP_RESET     : TAP_CAPTURE_IR;
      TAP_CAPTURE_IR: next = tms ? TAP_EXIT1_IR  : TAP_SHIFT_IR;
      TAP_SHIFT_IR:   next = tms ? TAP_EXIT1_IR  : TAP_SHIFT_IR;
      TAP_EXIT1_IR:   next = tms ? TAP_UPDATE_IR : TAP_PAUSE_IR;
      TAP_PAUSE_IR:   next = tms ? TAP_EXIT2_IR  : TAP_PAUSE_IR;
      TAP_EXIT2_IR:   next = tms ? TAP_UPDATE_IR : TAP_SHIFT_IR;
      TAP_UPDATE_IR:  next = tms ? TAP_SEL_DR    : TAP_IDLE;
      default:        next = TAP_RESET;
    endcase
  end

  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n) state <= TAP_RESET;
    else         state <= next;
  end

  assign test_reset = (state == TAP_RESET);
  assign capture_dr = (state == TAP_CAPTURE_DR);
  assign shift_dr   = (state == TAP_SHIFT_DR);
  assign update_dr  = (state == TAP_UPDATE_DR);
  assign capture_ir = (state == TAP_CAPTURE_IR);
  assign shift_ir   = (state == TAP_SHIFT_IR);
  assign update_ir  = (state == TAP_UPDATE_IR);
  assign run_idle   = (state == TAP_IDLE);

endmodule
