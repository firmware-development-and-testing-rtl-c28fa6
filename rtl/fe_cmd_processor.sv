// Front-end command processor of the ROD controller.
//
// Produces the serial command stream (one bit per 40 MHz cycle) that the
// BOC encodes and sends to the front ends. Two kinds of command:
//  * fast LV1 trigger: on `lv1_req` the 5-bit LV1 pattern is sent at once
//    (a slow command in progress finishes first, and up to 15 pending
//    triggers are counted so none is lost);
//  * slow commands from the PPC (configuration, register writes):
//    `slow_len` bits of `slow_cmd`, MSB first, taken with slow_valid and
//    slow_ready.
// LV1 requests have priority over queued slow commands. Between commands
// the line is 0. `lv1_sent` counts LV1 commands sent.
// Fast LV1 on a TIM trigger and slow PPC commands follow the text; the
// LV1 bit pattern (5'b11101, the FE-I4 trigger command) and the pending
// counter are this design's choices.
module fe_cmd_processor #(
  parameter logic [4:0] LV1_CODE = 5'b11101
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        lv1_req,
  input  logic [31:0] slow_cmd,
  input  logic [5:0]  slow_len,
  input  logic        slow_valid,
  output logic        slow_ready,
  output logic        cmd_out,
  output logic        busy,
  output logic [15:0] lv1_sent
);

  logic [31:0] sr;
  logic [5:0]  left;
  logic [3:0]  pending;
  logic        lv1_go, slow_go;

  assign busy       = (left != 0);
  assign lv1_go     = !busy && (pending != 0 || lv1_req);
  assign slow_go    = !busy && !lv1_go && slow_valid && slow_len != 0;
  assign slow_ready = slow_go;

  // a trigger waits when it cannot go out this cycle; a waiting one leaves
  logic p_inc, p_dec;
  assign p_inc = lv1_req && !(lv1_go && pending == 0);
  assign p_dec = lv1_go && pending != 0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr       <= '0;
      left     <= '0;
      pending  <= '0;
      cmd_out  <= 1'b0;
      lv1_sent <= '0;
    end else begin
      // count triggers that cannot be served this cycle
      if (p_inc && !p_dec && pending != 4'hF) pending <= pending + 1'b1;
      else if (p_dec && !p_inc)              pending <= pending - 1'b1;
      if (lv1_go) begin
        cmd_out  <= LV1_CODE[4];
        sr       <= {LV1_CODE[3:0], 28'd0};
        left     <= 6'd4;
        lv1_sent <= lv1_sent + 1'b1;
      end else if (slow_go) begin
        cmd_out <= slow_cmd[5'(slow_len - 1'b1)];
        sr      <= slow_cmd << (6'd33 - slow_len);
        left    <= slow_len - 1'b1;
      end else if (busy) begin
        cmd_out <= sr[31];
        sr      <= sr << 1;
        left    <= left - 1'b1;
      end else begin
        cmd_out <= 1'b0;
      end
    end
  end

endmodule
