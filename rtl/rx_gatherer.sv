// Gatherer at the input of the slave formatter: one BOC-ROD bus in, hit
// records out.
//
// The bus interleaves the bytes of four front-end channels (bits 9:8 give
// the channel). Each channel is followed separately: a start-of-frame
// K-word (K.28.7) opens a frame, every three data bytes form one FE-I4
// data record {col[6:0], row[8:0], ToT[3:0], ToT2[3:0]} and give a
// REC_HIT record, and an end-of-frame K-word (K.28.5) gives a REC_EOF
// record that tells the event fragment builder the channel is complete
// for this event. Bytes outside a frame and other K-words are dropped.
// Runs at the 80 MHz bus clock; at most one record per cycle (one byte
// per cycle arrives), registered. `frames` counts end-of-frame records.
// Bus layout follows the BOC-ROD interface; the frame format is this
// design's reading of the FE-I4 data stream.
module rx_gatherer
  import ibl_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  bus_word_t   bus,
  output rec_t        rec,
  output logic        rec_valid,
  output logic [15:0] frames
);

  logic        in_frame [4];
  logic [1:0]  nbytes   [4];
  logic [15:0] acc      [4];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < 4; c++) begin
        in_frame[c] <= 1'b0;
        nbytes[c]   <= '0;
        acc[c]      <= '0;
      end
      rec       <= '0;
      rec_valid <= 1'b0;
      frames    <= '0;
    end else begin
      rec_valid <= 1'b0;
      if (bus.valid) begin
        automatic logic [1:0] c = bus.addr;
        if (bus.ctrl) begin
          if (bus.data == K_SOF) begin
            in_frame[c] <= 1'b1;
            nbytes[c]   <= '0;
          end else if (bus.data == K_EOF && in_frame[c]) begin
            in_frame[c] <= 1'b0;
            rec         <= '{rtype: REC_EOF, ch: bus.addr, hit: '0};
            rec_valid   <= 1'b1;
            frames      <= frames + 1'b1;
          end
        end else if (in_frame[c]) begin
          if (nbytes[c] == 2'd2) begin
            nbytes[c] <= '0;
            rec       <= '{rtype: REC_HIT, ch: bus.addr, hit: hit_t'({acc[c], bus.data})};
            rec_valid <= 1'b1;
          end else begin
            nbytes[c] <= nbytes[c] + 1'b1;
            acc[c]    <= {acc[c][7:0], bus.data};
          end
        end
      end
    end
  end

endmodule
