// Receive multiplexer of the BOC: four decoded front-end channels onto one
// 12-bit BOC-ROD bus.
//
// Each of the N_CH (4) channels delivers decoded bytes (data plus K flag)
// at up to 16 MB/s; the bus runs at 80 MHz, so one bus carries four
// channels. Every channel has a small FIFO (4 entries); a round-robin
// arbiter puts one byte per cycle on the bus as
//   bit 11 control (K-word), bit 10 valid, bits 9:8 channel, bits 7:0 data.
// Idle K-words (K.28.1) carry no information and are dropped. `overflow`
// flags a byte lost to a full channel FIFO (sticky).
// The bus layout follows the BOC-ROD line assignment; the buffering,
// arbitration and idle removal are this design's choices.
module boc_rx_mux
  import ibl_pkg::*;
#(
  parameter int unsigned N_CH = 4
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [N_CH-1:0][7:0]  ch_data,
  input  logic [N_CH-1:0]       ch_k,
  input  logic [N_CH-1:0]       ch_valid,
  output bus_word_t             bus,
  output logic                  overflow
);

  localparam int unsigned QD = 4;

  logic [8:0] q     [N_CH][QD];
  logic [2:0] cnt   [N_CH];
  logic [1:0] rd_p  [N_CH];
  logic [1:0] wr_p  [N_CH];
  logic [$clog2(N_CH)-1:0] rr;

  // arbiter: first non-empty channel at or after rr
  logic                    grant_v;
  logic [$clog2(N_CH)-1:0] grant;
  always_comb begin
    grant_v = 1'b0;
    grant   = '0;
    for (int i = N_CH - 1; i >= 0; i--) begin
      automatic logic [$clog2(N_CH)-1:0] c = rr + ($clog2(N_CH))'(i);
      if (cnt[c] != 0) begin
        grant_v = 1'b1;
        grant   = c;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < N_CH; c++) begin
        cnt[c]  <= '0;
        rd_p[c] <= '0;
        wr_p[c] <= '0;
      end
      rr       <= '0;
      bus      <= '0;
      overflow <= 1'b0;
    end else begin
      bus.valid <= 1'b0;
      for (int c = 0; c < N_CH; c++) begin
        automatic logic push = ch_valid[c] && !(ch_k[c] && ch_data[c] == K_IDLE);
        automatic logic pop  = grant_v && grant == ($clog2(N_CH))'(c);
        if (push && (cnt[c] < 3'(QD) || pop)) begin
          q[c][wr_p[c]] <= {ch_k[c], ch_data[c]};
          wr_p[c]       <= wr_p[c] + 1'b1;
        end else if (push) begin
          overflow <= 1'b1;
        end
        if (pop) rd_p[c] <= rd_p[c] + 1'b1;
        cnt[c] <= cnt[c] + ((push && (cnt[c] < 3'(QD) || pop)) ? 3'd1 : 3'd0) - (pop ? 3'd1 : 3'd0);
      end
      if (grant_v) begin
        bus.valid <= 1'b1;
        bus.addr  <= 2'(grant);
        bus.ctrl  <= q[grant][rd_p[grant]][8];
        bus.data  <= q[grant][rd_p[grant]][7:0];
        rr        <= grant + 1'b1;
      end
    end
  end

endmodule
