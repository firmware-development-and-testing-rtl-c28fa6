// VME slave interface of the PRM with a broadcast address.
//
// Each ROD's PRM answers A24 single accesses (address modifier 0x39 or
// 0x3D, D32) whose A[23:16] equals its own board address. All PRMs also
// answer A[23:16] = BCAST_ADDR (0x25): a write cycle to it is taken by
// every PRM at once, which lets the VME master load the same FPGA
// configuration into all RODs in parallel. Reading the broadcast address
// would make every PRM drive the data bus, so a read cycle there is
// answered with BERR* instead of DTACK*.
//
// AS*, DS0*/DS1* and WRITE* are asynchronous to `clk` and are synchronised
// with two flip-flops; address, AM and write data are taken when the
// synchronised data strobe is seen and are stable by then under the VME
// protocol. A write gives one `reg_wr` pulse; a read gives one `reg_rd`
// pulse and `reg_rdata` is latched one cycle later and driven with
// `vme_data_oe`. DTACK*/BERR* stay asserted until both data strobes are
// released. `reg_bcast` marks writes that came through the broadcast
// address. Register offset is A[7:2]. The broadcast address, write-only
// use and BERR* follow the text; the address bits, AM codes and the
// synchroniser are this design's choices.
module vme_slave #(
  parameter logic [7:0] BCAST_ADDR = 8'h25
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [7:0]  board_addr,
  input  logic [23:0] vme_addr,
  input  logic [5:0]  vme_am,
  input  logic        vme_as_n,
  input  logic        vme_ds0_n,
  input  logic        vme_ds1_n,
  input  logic        vme_write_n,
  input  logic [31:0] vme_data_in,
  output logic [31:0] vme_data_out,
  output logic        vme_data_oe,
  output logic        vme_dtack_n,
  output logic        vme_berr_n,
  output logic        reg_wr,
  output logic        reg_rd,
  output logic        reg_bcast,
  output logic [5:0]  reg_addr,
  output logic [31:0] reg_wdata,
  input  logic [31:0] reg_rdata
);

  typedef enum logic [1:0] {S_IDLE, S_READ, S_ACK, S_WAIT_RELEASE} state_e;

  logic [1:0] as_s, ds_s, wr_s;
  logic       as_act, ds_act, is_write;
  state_e     state;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      as_s <= '0;
      ds_s <= '0;
      wr_s <= '0;
    end else begin
      as_s <= {as_s[0], !vme_as_n};
      ds_s <= {ds_s[0], !(vme_ds0_n && vme_ds1_n)};
      wr_s <= {wr_s[0], !vme_write_n};
    end
  end
  assign as_act   = as_s[1];
  assign ds_act   = ds_s[1];
  assign is_write = wr_s[1];

  logic am_ok, own_hit, bc_hit;
  assign am_ok   = (vme_am == 6'h39) || (vme_am == 6'h3D);
  assign own_hit = am_ok && (vme_addr[23:16] == board_addr);
  assign bc_hit  = am_ok && (vme_addr[23:16] == BCAST_ADDR);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      reg_wr       <= 1'b0;
      reg_rd       <= 1'b0;
      reg_bcast    <= 1'b0;
      reg_addr     <= '0;
      reg_wdata    <= '0;
      vme_data_out <= '0;
      vme_data_oe  <= 1'b0;
      vme_dtack_n  <= 1'b1;
      vme_berr_n   <= 1'b1;
    end else begin
      reg_wr <= 1'b0;
      reg_rd <= 1'b0;
      unique case (state)
        S_IDLE: if (as_act && ds_act) begin
          reg_addr  <= vme_addr[7:2];
          reg_wdata <= vme_data_in;
          reg_bcast <= bc_hit;
          if (bc_hit && !is_write) begin
            vme_berr_n <= 1'b0;          // broadcast may not be read
            state      <= S_WAIT_RELEASE;
          end else if (own_hit || bc_hit) begin
            if (is_write) begin
              reg_wr <= 1'b1;
              state  <= S_ACK;
            end else begin
              reg_rd <= 1'b1;
              state  <= S_READ;
            end
          end else begin
            state <= S_WAIT_RELEASE;     // not for us: stay silent
          end
        end
        S_READ: begin
          vme_data_out <= reg_rdata;
          vme_data_oe  <= 1'b1;
          state        <= S_ACK;
        end
        S_ACK: begin
          vme_dtack_n <= 1'b0;
          state       <= S_WAIT_RELEASE;
        end
        S_WAIT_RELEASE: if (!ds_act) begin
          vme_dtack_n <= 1'b1;
          vme_berr_n  <= 1'b1;
          vme_data_oe <= 1'b0;
          state       <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // a slave never answers with both DTACK* and BERR*
  assert property (@(posedge clk) disable iff (!rst_n) vme_dtack_n || vme_berr_n);

endmodule
