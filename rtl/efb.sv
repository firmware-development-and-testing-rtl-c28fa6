// Event fragment builder of a slave FPGA (40 MHz domain).
//
// For every event record handed over by the master's event processor it
// writes one fragment:
//   header : 0xEE1234EE (ctrl=1), L1ID, {BCID, trigger type}
//   data   : one word per hit record, bus 0 first, then bus 1, ...:
//            {3'b001, link[4:0], col[6:0], row[8:0], ToT[3:0], ToT2[3:0]}
//            with link = LINK_BASE + bus*4 + channel
//   trailer: {0xE0, timeout flag, data word count[22:0]} (ctrl=1)
// A bus is finished when every enabled channel of it has sent its
// end-of-frame record. If a bus brings nothing for TIMEOUT cycles the
// missing channels are given up and the trailer timeout flag is set.
// Records come from the per-bus dual-clock FIFOs (FWFT: rec/empty in,
// rd_en out); `evt_take` pulses for one cycle when an event is accepted.
// One output word per cycle, no back-pressure from the output link.
// The header/data/trailer order follows the text; the word layouts, the
// link enable mask and the timeout are this design's choices.
module efb
  import ibl_pkg::*;
#(
  parameter int unsigned N_BUS     = 4,
  parameter int unsigned LINK_BASE = 0,
  parameter int unsigned TIMEOUT   = 4096
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N_BUS*4-1:0]   link_en,
  input  evt_t                 evt,
  input  logic                 evt_valid,
  output logic                 evt_take,
  input  rec_t                 rec       [N_BUS],
  input  logic [N_BUS-1:0]     rec_empty,
  output logic [N_BUS-1:0]     rec_rd,
  output logic [31:0]          out_word,
  output logic                 out_ctrl,
  output logic                 out_valid,
  output logic [15:0]          frag_count,
  output logic [15:0]          timeout_count
);

  localparam int unsigned BW = (N_BUS > 1) ? $clog2(N_BUS) : 1;

  typedef enum logic [2:0] {
    S_IDLE, S_HDR2, S_HDR3, S_DATA, S_TRAILER
  } state_e;

  state_e        state;
  evt_t          cur;
  logic [BW-1:0] bus;
  logic [3:0]    done_mask;
  logic [22:0]   nwords;
  logic          tmo_flag;
  logic [$clog2(TIMEOUT+1)-1:0] idle_cnt;

  rec_t          r;
  logic          have;
  logic [3:0]    en_bus;
  logic [3:0]    done_next;

  assign r        = rec[bus];
  assign have     = (state == S_DATA) && !rec_empty[bus];
  assign en_bus   = link_en[4*bus +: 4];
  assign done_next = done_mask | ((have && r.rtype == REC_EOF) ? (4'b1 << r.ch) : 4'b0);

  always_comb begin
    rec_rd = '0;
    rec_rd[bus] = have;
  end

  assign evt_take = (state == S_IDLE) && evt_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= S_IDLE;
      cur           <= '0;
      bus           <= '0;
      done_mask     <= '0;
      nwords        <= '0;
      tmo_flag      <= 1'b0;
      idle_cnt      <= '0;
      out_word      <= '0;
      out_ctrl      <= 1'b0;
      out_valid     <= 1'b0;
      frag_count    <= '0;
      timeout_count <= '0;
    end else begin
      out_valid <= 1'b0;
      out_ctrl  <= 1'b0;
      unique case (state)
        S_IDLE: if (evt_valid) begin
          cur       <= evt;
          out_word  <= ROD_HDR_MARKER;
          out_ctrl  <= 1'b1;
          out_valid <= 1'b1;
          nwords    <= '0;
          tmo_flag  <= 1'b0;
          state     <= S_HDR2;
        end
        S_HDR2: begin
          out_word  <= {8'h00, cur.l1id};
          out_valid <= 1'b1;
          state     <= S_HDR3;
        end
        S_HDR3: begin
          out_word  <= {12'h000, cur.bcid, cur.ttype};
          out_valid <= 1'b1;
          bus       <= '0;
          done_mask <= ~link_en[3:0];
          idle_cnt  <= '0;
          state     <= S_DATA;
        end
        S_DATA: begin
          if (have && r.rtype == REC_HIT && en_bus[r.ch]) begin
            out_word  <= {3'b001, 5'(LINK_BASE + 4 * int'(bus) + int'(r.ch)), r.hit};
            out_valid <= 1'b1;
            nwords    <= nwords + 1'b1;
          end
          if (have) idle_cnt <= '0;
          else      idle_cnt <= idle_cnt + 1'b1;
          if ((done_next | ~en_bus) == 4'hF || (!have && 32'(idle_cnt) == TIMEOUT - 1)) begin
            if ((done_next | ~en_bus) != 4'hF) begin
              tmo_flag      <= 1'b1;
              timeout_count <= timeout_count + 1'b1;
            end
            idle_cnt <= '0;
            if (32'(bus) == N_BUS - 1) begin
              state <= S_TRAILER;
            end else begin
              bus       <= bus + 1'b1;
              done_mask <= ~link_en[4*(32'(bus)+1) +: 4];
            end
          end else begin
            done_mask <= done_next;
          end
        end
        S_TRAILER: begin
          out_word   <= {ROD_TRL_MARKER, tmo_flag, nwords};
          out_ctrl   <= 1'b1;
          out_valid  <= 1'b1;
          frag_count <= frag_count + 1'b1;
          state      <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
