// Bi-phase mark (BPM) encoder of the BOC transmit path.
//
// The ROD sends front-end commands as a 40 Mb/s bit stream; the BOC
// encodes each bit as bi-phase mark so the front end can recover the
// clock from the data line. The encoded line changes level at the start
// of every bit period and changes again in the middle of the period when
// the bit is 1; a 0 is a full period without a mid-bit change.
//
// Runs on the 160 MHz BOC clock: CLK_PER_BIT (4) cycles per bit. `bit_in`
// is sampled when `bit_strobe` is high (first cycle of each bit period);
// the line toggles in the cycle after the sample and, for a 1, again
// CLK_PER_BIT/2 cycles later. Encoding follows the text; the phase
// relation to the input is this design's choice.
module bpm_encoder #(
  parameter int unsigned CLK_PER_BIT = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic bit_in,
  output logic bit_strobe,
  output logic bpm_out
);

  localparam int unsigned PW = $clog2(CLK_PER_BIT);

  logic [PW-1:0] phase;
  logic          cur;

  assign bit_strobe = (phase == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase   <= '0;
      cur     <= 1'b0;
      bpm_out <= 1'b0;
    end else begin
      phase <= (phase == PW'(CLK_PER_BIT - 1)) ? '0 : phase + 1'b1;
      if (phase == '0) begin
        cur     <= bit_in;
        bpm_out <= !bpm_out;                        // bit boundary
      end else if (phase == PW'(CLK_PER_BIT / 2) && cur) begin
        bpm_out <= !bpm_out;                        // mid-bit for a 1
      end
    end
  end

endmodule
