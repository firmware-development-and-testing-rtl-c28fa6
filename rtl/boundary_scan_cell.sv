// Boundary-scan cell (BSC) of IEEE 1149.1.
//
// One cell sits between a pin and the core. It has a capture/shift stage
// and an update (shadow) stage:
//  - normal mode (mode=0): pin_out follows pin_in;
//  - capture (capture_en=1, shift_dr=0): the stage samples pin_in;
//  - scan (capture_en=1, shift_dr=1): the stage takes sin, so chained
//    cells form a shift register whose last stage is sout;
//  - update (update_en=1): the shadow stage loads the capture stage and,
//    with mode=1, drives pin_out.
// The shadow stage keeps its value while data are captured and shifted.
//
// Timing: ClockDR and UpdateDR of the schematic become enables on the one
// test clock. The capture/shift stage acts on the rising TCK edge; the
// update stage on the falling edge, as the standard updates in the
// second half of Update-DR. Using enables instead of gated clocks is this
// design's choice.
module boundary_scan_cell (
  input  logic tck,
  input  logic trst_n,
  input  logic pin_in,
  input  logic sin,
  input  logic shift_dr,
  input  logic capture_en,
  input  logic update_en,
  input  logic mode,
  output logic sout,
  output logic pin_out
);

  logic cap_q;
  logic upd_q;

  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n)         cap_q <= 1'b0;
    else if (capture_en) cap_q <= shift_dr ? sin : pin_in;
  end

  always_ff @(negedge tck or negedge trst_n) begin
    if (!trst_n)        upd_q <= 1'b0;
    else if (update_en) upd_q <= cap_q;
  end

  assign sout    = cap_q;
  assign pin_out = mode ? upd_q : pin_in;

endmodule
