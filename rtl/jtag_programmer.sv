// JTAG vector player of the PRM.
//
// The VME master writes FPGA configuration data, already turned into JTAG
// vectors, into the PRM programming FIFO; this block takes one 32-bit word
// at a time and plays it on the JTAG chain of the selected FPGA. A word
// holds 16 TCK cycles: bits [31:16] are the TMS values and bits [15:0] the
// TDI values, bit 0/16 first. TDO is sampled on every rising TCK edge and
// the last 16 samples are kept in `tdo_capture` (bit 15 = latest).
//
// TCK runs at clk / TCK_DIV: TMS and TDI change with the falling edge and
// are stable for half a TCK period before the rising edge. `word_ready`
// is a one-cycle read strobe for a first-word-fall-through FIFO. The
// word format and TCK rate are this design's choices; the document only
// says the PRM receives the programming files and redirects them to the
// right FPGA.
module jtag_programmer #(
  parameter int unsigned TCK_DIV = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] word,
  input  logic        word_valid,
  output logic        word_ready,
  output logic        tck,
  output logic        tms,
  output logic        tdi,
  input  logic        tdo,
  output logic        busy,
  output logic [15:0] tdo_capture,
  output logic [31:0] words_done
);

  localparam int unsigned HALF = TCK_DIV / 2;
  localparam int unsigned CW   = $clog2(TCK_DIV + 1);

  logic [31:0]   cur;
  logic [4:0]    bitn;
  logic [CW-1:0] cnt;

  assign word_ready = !busy && word_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy        <= 1'b0;
      cur         <= '0;
      bitn        <= '0;
      cnt         <= '0;
      tck         <= 1'b0;
      tms         <= 1'b1;
      tdi         <= 1'b0;
      tdo_capture <= '0;
      words_done  <= '0;
    end else if (!busy) begin
      tck <= 1'b0;
      if (word_valid) begin
        busy <= 1'b1;
        cur  <= word;
        bitn <= '0;
        cnt  <= '0;
        tms  <= word[16];
        tdi  <= word[0];
      end
    end else begin
      cnt <= cnt + 1'b1;
      if (cnt == CW'(HALF - 1)) begin
        tck         <= 1'b1;
        tdo_capture <= {tdo, tdo_capture[15:1]};
      end else if (cnt == CW'(TCK_DIV - 1)) begin
        tck <= 1'b0;
        cnt <= '0;
        if (bitn == 5'd15) begin
          busy       <= 1'b0;
          words_done <= words_done + 1'b1;
        end else begin
          bitn <= bitn + 1'b1;
          tms  <= cur[16 + int'(bitn) + 1];
          tdi  <= cur[int'(bitn) + 1];
        end
      end
    end
  end

endmodule
