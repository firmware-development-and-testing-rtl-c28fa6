// Event ID and Trigger Processor of the ROD controller.
//
// Triggers come either from the TIM (Level-1 accept with trigger type) or
// from the PPC (software trigger with a programmable type); `use_tim`
// selects the source. The block keeps the event counter (L1ID) and the
// bunch-crossing counter (BCID) of the ROD in step with the TTC system:
// the BCID counts every 40 MHz bunch clock, wraps after 3564 bunches and
// is cleared by BCR; the L1ID counts triggers and is cleared by ECR.
// For every trigger it pulses `lv1_req` (so the FE command processor
// sends an LV1 to the front ends in the same cycle) and presents the
// event record {L1ID, BCID, trigger type} with `evt_valid` for the event
// processor. ECR sets the L1ID so that the next trigger gets 0.
// Roles, sources and counters follow the text; the widths (24-bit L1ID,
// 12-bit BCID, 8-bit type) and the reset values are this design's.
module trigger_processor
  import ibl_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       use_tim,
  input  logic       tim_l1a,
  input  logic [7:0] tim_ttype,
  input  logic       tim_ecr,
  input  logic       tim_bcr,
  input  logic       ppc_trig,
  input  logic [7:0] ppc_ttype,
  output logic       lv1_req,
  output logic       evt_valid,
  output evt_t       evt,
  output logic [23:0] trig_count
);

  localparam logic [11:0] LAST_BC = 12'd3563;

  logic [23:0] l1id_next;
  logic [11:0] bcid;
  logic        trig;
  logic [7:0]  ttype;

  assign trig    = use_tim ? tim_l1a : ppc_trig;
  assign ttype   = use_tim ? tim_ttype : ppc_ttype;
  assign lv1_req = trig;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bcid       <= '0;
      l1id_next  <= '0;
      evt_valid  <= 1'b0;
      evt        <= '0;
      trig_count <= '0;
    end else begin
      bcid      <= (tim_bcr || bcid == LAST_BC) ? '0 : bcid + 1'b1;
      evt_valid <= trig;
      if (trig) begin
        evt.l1id   <= tim_ecr ? '0 : l1id_next;
        evt.bcid   <= bcid;
        evt.ttype  <= ttype;
        trig_count <= trig_count + 1'b1;
      end
      if (tim_ecr)   l1id_next <= trig ? 24'd1 : '0;
      else if (trig) l1id_next <= l1id_next + 1'b1;
    end
  end

endmodule
