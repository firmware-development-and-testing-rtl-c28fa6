// IEEE 1149.1 test logic of one device (TAP, instruction register, bypass,
// device identification and boundary-scan registers).
//
// This is the JTAG side of a chip such as the ispClock 5620 clock PLL on
// the ROD: the PRM reaches it through the J8 chain to read the REFSEL pin
// and to force the RESET pin. The TAP controller selects an instruction
// scan or a data scan. The 8-bit instruction shift register captures
// 8'b0000_0001, shifts from TDI towards TDO and is copied to the
// instruction shadow register on the falling TCK edge in Update-IR.
// The instruction chooses the data register between TDI and TDO:
//   BYPASS (all ones) and unknown codes  - 1-bit bypass register
//   SAMPLE/PRELOAD (0x1C)                - boundary-scan register, core
//                                           sees the pins, pins see core
//   EXTEST (all zeros)                   - boundary-scan register, output
//                                           pins driven by update latches
//   INTEST (0x2C)                        - boundary-scan register, core
//                                           inputs and output pins driven
//                                           by the update latches
//   IDCODE (0x16)                        - 32-bit identification register
//   USERCODE (0x17)                      - identification register loaded
//                                           with the USERCODE value
//   CLAMP (0x20)                         - bypass register, output pins
//                                           held at the update latches
//   HIGHZ (0x18)                         - bypass register, output
//                                           enables low
// Test-Logic-Reset loads IDCODE into the instruction register.
//
// Input pins: pin i of `pins` feeds cell i and the core sees `core_in[i]`.
// Output pins (N_OUT, 0 = none): core_out[j] feeds cell N_IN+j, the pin is
// `pins_out[j]` and `pins_oe` is the common output enable. Cell 0 is
// nearest TDO, so it is the first bit shifted out after Capture-DR; the
// output cells sit on the TDI side. With N_OUT = 0 the output ports are
// one bit wide, pins_out is 0 and pins_oe is 1. TDO changes on the falling
// TCK edge and is 0 outside the shift states (a real device floats it).
// The instruction behaviours follow the standard as described; all codes
// except BYPASS and EXTEST, the IDCODE/USERCODE values and the cell order
// are this design's choice. RUNBIST is not built (its code selects bypass).
module jtag_bscan_device
  import ibl_pkg::*;
#(
  parameter int unsigned N_IN     = 8,
  parameter int unsigned N_OUT    = 0,
  parameter logic [31:0] IDCODE   = 32'h0000_1043,
  parameter logic [31:0] USERCODE = 32'h0000_0000
) (
  input  logic            tck,
  input  logic            trst_n,
  input  logic            tms,
  input  logic            tdi,
  output logic            tdo,
  input  logic [N_IN-1:0] pins,
  output logic [N_IN-1:0] core_in,
  input  logic [(N_OUT > 0 ? N_OUT : 1)-1:0] core_out,
  output logic [(N_OUT > 0 ? N_OUT : 1)-1:0] pins_out,
  output logic            pins_oe,
  output logic [7:0]      ir_q
);

  tap_state_e state;
  logic test_reset, capture_dr, shift_dr, update_dr;
  logic capture_ir, shift_ir, update_ir, run_idle;

  jtag_tap_ctrl u_tap (
    .tck, .trst_n, .tms, .state, .test_reset,
    .capture_dr, .shift_dr, .update_dr,
    .capture_ir, .shift_ir, .update_ir, .run_idle
  );

  // ---------------- instruction register ----------------
  logic [7:0] ir_sr;

  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n)         ir_sr <= 8'h01;
    else if (capture_ir) ir_sr <= 8'h01;
    else if (shift_ir)   ir_sr <= {tdi, ir_sr[7:1]};
  end

  always_ff @(negedge tck or negedge trst_n) begin
    if (!trst_n)         ir_q <= JI_IDCODE;
    else if (test_reset) ir_q <= JI_IDCODE;
    else if (update_ir)  ir_q <= ir_sr;
  end

  logic sel_bsr, sel_id;
  always_comb begin
    sel_bsr = (ir_q == JI_SAMPLE) || (ir_q == JI_EXTEST) || (ir_q == JI_INTEST);
    sel_id  = (ir_q == JI_IDCODE) || (ir_q == JI_USERCODE);
  end

  // ---------------- bypass and IDCODE ----------------
  logic        byp_q;
  logic [31:0] id_sr;

  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n) begin
      byp_q <= 1'b0;
      id_sr <= IDCODE;
    end else begin
      if (capture_dr)    byp_q <= 1'b0;
      else if (shift_dr) byp_q <= tdi;
      if (sel_id && capture_dr)    id_sr <= (ir_q == JI_USERCODE) ? USERCODE : IDCODE;
      else if (sel_id && shift_dr) id_sr <= {tdi, id_sr[31:1]};
    end
  end

  // ---------------- boundary-scan register ----------------
  localparam int unsigned NB = N_IN + N_OUT;
  logic [NB-1:0] bsr_sout;
  logic          bsr_cap_en, bsr_upd_en, in_mode, out_mode;

  assign bsr_cap_en = sel_bsr && (capture_dr || shift_dr);
  assign bsr_upd_en = sel_bsr && update_dr;
  assign in_mode    = (ir_q == JI_INTEST);
  assign out_mode   = (ir_q == JI_EXTEST) || (ir_q == JI_INTEST) || (ir_q == JI_CLAMP);
  assign pins_oe    = (ir_q != JI_HIGHZ);

  for (genvar i = 0; i < NB; i++) begin : g_bsc
    logic sin_i, src_i, mode_i, dst_i;
    if (i == NB - 1) begin : g_first
      assign sin_i = tdi;
    end else begin : g_mid
      assign sin_i = bsr_sout[i+1];
    end
    if (i < N_IN) begin : g_in
      assign src_i      = pins[i];
      assign mode_i     = in_mode;
      assign core_in[i] = dst_i;
    end else begin : g_out
      assign src_i             = core_out[i-N_IN];
      assign mode_i            = out_mode;
      assign pins_out[i-N_IN]  = dst_i;
    end
    boundary_scan_cell u_bsc (
      .tck, .trst_n,
      .pin_in     (src_i),
      .sin        (sin_i),
      .shift_dr   (shift_dr),
      .capture_en (bsr_cap_en),
      .update_en  (bsr_upd_en),
      .mode       (mode_i),
      .sout       (bsr_sout[i]),
      .pin_out    (dst_i)
    );
  end
  if (N_OUT == 0) begin : g_no_out
    assign pins_out = 1'b0;
  end

  // ---------------- TDO ----------------
  always_ff @(negedge tck or negedge trst_n) begin
    if (!trst_n)       tdo <= 1'b0;
    else if (shift_ir) tdo <= ir_sr[0];
    else if (shift_dr) tdo <= sel_bsr ? bsr_sout[0] : (sel_id ? id_sr[0] : byp_q);
    else               tdo <= 1'b0;
  end

endmodule
