// PRM sequencer that checks the clock source of the ROD clock PLL and
// resets the PLL through the PLL's JTAG port.
//
// The PRM itself is clocked by the PLL, so a sequencer on that clock would
// stop as soon as the PLL is held in reset. This block therefore runs on
// the PRM's internal oscillator (OSC_HZ, 100 MHz) and makes TCK by
// dividing it down to TCK_HZ (1 MHz).
//
// Clock-source check (start_check):
//   five TMS=1 clocks to Test-Logic-Reset, then to Run-Test/Idle;
//   instruction scan of SAMPLE/PRELOAD (0x1C), back to Run-Test/Idle;
//   data scan of the BSR_LEN-bit boundary-scan register, the bit shifted
//   out at position REFSEL_BIT is the REFSEL pin (1 = local clock,
//   0 = clock from the BOC) and is kept in `refsel`.
// PLL reset (start_reset):
//   Test-Logic-Reset, instruction scan of INTEST (0x2C), data scan with a 1
//   in the RESET_BIT cell (all other cells 0), then RESET_US microseconds in
//   Run-Test/Idle with the RESET input forced, then SAMPLE/PRELOAD is
//   selected again and a data scan restores normal operation (and refreshes
//   `refsel`).
// Instructions and data go LSB first. TMS/TDI change on the falling TCK
// edge, TDO is sampled on the rising edge.
//
// The two procedures, the opcodes, the 1 MHz TCK from the oscillator and
// the 2 ms reset time follow the text. The positions of REFSEL and RESET
// in the boundary-scan register and its length are assumptions, as is the
// Run-Test/Idle stop between the instruction and data scans of the reset.
module pll_jtag_ctrl
  import ibl_pkg::*;
#(
  parameter int unsigned OSC_HZ     = 100_000_000,
  parameter int unsigned TCK_HZ     = 1_000_000,
  parameter int unsigned RESET_US   = 2000,
  parameter int unsigned BSR_LEN    = 8,
  parameter int unsigned REFSEL_BIT = 0,
  parameter int unsigned RESET_BIT  = 1
) (
  input  logic        osc_clk,
  input  logic        rst_n,
  input  logic        start_check,
  input  logic        start_reset,
  output logic        tck,
  output logic        tms,
  output logic        tdi,
  input  logic        tdo,
  output logic        busy,
  output logic        refsel,
  output logic        refsel_valid,
  output logic        pll_reset_held,
  output logic [7:0]  reset_count
);

  localparam int unsigned DIV      = OSC_HZ / TCK_HZ;
  localparam int unsigned HALF     = DIV / 2;
  localparam int unsigned WAIT_TCK = (RESET_US * (TCK_HZ / 1000)) / 1000;
  localparam int unsigned CW       = $clog2(DIV + 1);
  localparam int unsigned WW       = $clog2(WAIT_TCK + BSR_LEN + 16) + 1;

  typedef enum logic [3:0] {
    PH_IDLE, PH_TLR, PH_IR_PRE, PH_IR_SHIFT, PH_IR_POST,
    PH_DR_PRE, PH_DR_SHIFT, PH_DR_POST, PH_WAIT
  } phase_e;

  // step counter inside a phase and which pass of the reset procedure
  phase_e        phase;
  logic [WW-1:0] idx;
  logic          do_reset;   // procedure is the PLL reset
  logic          second;     // reset procedure: restoring pass
  logic [CW-1:0] div_cnt;
  logic          fall, rise;

  assert property (@(posedge osc_clk) disable iff (!rst_n) DIV >= 4);

  always_ff @(posedge osc_clk or negedge rst_n) begin
    if (!rst_n) div_cnt <= '0;
    else if (div_cnt == CW'(DIV - 1)) div_cnt <= '0;
    else div_cnt <= div_cnt + 1'b1;
  end
  assign fall = (div_cnt == '0);
  assign rise = (div_cnt == CW'(HALF));

  // current instruction and data pattern
  logic [7:0]         opcode;
  logic [BSR_LEN-1:0] pattern;
  always_comb begin
    opcode  = (do_reset && !second) ? JI_INTEST : JI_SAMPLE;
    pattern = '0;
    if (do_reset && !second) pattern[RESET_BIT] = 1'b1;
  end

  // length of each phase in TCK steps
  function automatic logic [WW-1:0] ph_len(phase_e p);
    case (p)
      PH_TLR:      return WW'(6);
      PH_IR_PRE:   return WW'(4);
      PH_IR_SHIFT: return WW'(8);
      PH_IR_POST:  return WW'(2);
      PH_DR_PRE:   return WW'(3);
      PH_DR_SHIFT: return WW'(BSR_LEN);
      PH_DR_POST:  return WW'(2);
      PH_WAIT:     return WW'(WAIT_TCK);
      default:     return WW'(1);
    endcase
  endfunction

  // TMS/TDI of step `idx` of a phase
  logic tms_n, tdi_n;
  always_comb begin
    tms_n = 1'b0;
    tdi_n = 1'b0;
    case (phase)
      PH_TLR:      tms_n = (idx < WW'(5));
      PH_IR_PRE:   tms_n = (idx < WW'(2));
      PH_IR_SHIFT: begin tms_n = (idx == WW'(7)); tdi_n = opcode[idx[2:0]]; end
      PH_IR_POST:  tms_n = (idx == '0);
      PH_DR_PRE:   tms_n = (idx == '0);
      PH_DR_SHIFT: begin
        tms_n = (idx == WW'(BSR_LEN - 1));
        for (int i = 0; i < BSR_LEN; i++) if (idx == WW'(i)) tdi_n = pattern[i];
      end
      PH_DR_POST:  tms_n = (idx == '0);
      default:     tms_n = 1'b0;
    endcase
  end

  // phase that follows the current one
  function automatic phase_e next_phase(phase_e p, logic rst_proc, logic pass2);
    case (p)
      PH_TLR:      return PH_IR_PRE;
      PH_IR_PRE:   return PH_IR_SHIFT;
      PH_IR_SHIFT: return PH_IR_POST;
      PH_IR_POST:  return PH_DR_PRE;
      PH_DR_PRE:   return PH_DR_SHIFT;
      PH_DR_SHIFT: return PH_DR_POST;
      PH_DR_POST:  return (rst_proc && !pass2) ? PH_WAIT : PH_IDLE;
      PH_WAIT:     return PH_IR_PRE;
      default:     return PH_IDLE;
    endcase
  endfunction

  // 'active' is set once the first step of a phase has been driven
  logic active;

  always_ff @(posedge osc_clk or negedge rst_n) begin
    if (!rst_n) begin
      phase          <= PH_IDLE;
      idx            <= '0;
      do_reset       <= 1'b0;
      second         <= 1'b0;
      active         <= 1'b0;
      tck            <= 1'b0;
      tms            <= 1'b1;
      tdi            <= 1'b0;
      refsel         <= 1'b0;
      refsel_valid   <= 1'b0;
      pll_reset_held <= 1'b0;
      reset_count    <= '0;
    end else begin
      if (phase == PH_IDLE) begin
        active <= 1'b0;
        if (start_reset || start_check) begin
          phase    <= PH_TLR;
          idx      <= '0;
          do_reset <= start_reset;
          second   <= 1'b0;
        end
      end else if (fall) begin
        // drive the next step, or move on when the phase is complete
        tck <= 1'b0;
        tms    <= tms_n;
        tdi    <= tdi_n;
        active <= 1'b1;
      end else if (rise && active) begin
        tck <= 1'b1;
        if (phase == PH_DR_SHIFT && idx == WW'(REFSEL_BIT)) begin
          refsel       <= tdo;
          refsel_valid <= 1'b1;
        end
        if (idx == ph_len(phase) - 1'b1) begin
          idx    <= '0;
          active <= 1'b0;
          if (phase == PH_DR_POST && do_reset && !second) pll_reset_held <= 1'b1;
          if (phase == PH_WAIT) second <= 1'b1;
          if (phase == PH_DR_POST && (!do_reset || second)) begin
            pll_reset_held <= 1'b0;
            if (do_reset) reset_count <= reset_count + 1'b1;
          end
          phase <= next_phase(phase, do_reset, second);
        end else begin
          idx <= idx + 1'b1;
        end
      end
    end
  end

  assign busy = (phase != PH_IDLE);

endmodule
