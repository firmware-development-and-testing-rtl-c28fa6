// Event processor of the ROD controller.
//
// Queues the identifiers of each triggered event (L1ID, BCID, trigger
// type) and hands them to the event fragment builders of the two slave
// FPGAs, which write them into the header of every ROD fragment. The
// record at the head of the queue is offered to both slaves; it is
// removed once each slave has taken it (slave i takes it with
// `take[i]` while `evt_valid[i]` is high), so the slaves may run apart by
// up to DEPTH events. `overflow` is sticky and flags a trigger lost to a
// full queue.
// The task follows the text; the queue, its depth and the take protocol
// are this design's choices.
module event_processor
  import ibl_pkg::*;
#(
  parameter int unsigned DEPTH    = 16,
  parameter int unsigned N_SLAVES = 2
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  evt_t                in_evt,
  output evt_t                evt,
  output logic [N_SLAVES-1:0] evt_valid,
  input  logic [N_SLAVES-1:0] take,
  output logic                overflow,
  output logic [$clog2(DEPTH+1)-1:0] queued
);

  logic                fifo_empty, fifo_full, pop;
  logic [N_SLAVES-1:0] done;

  sync_fifo #(.W($bits(evt_t)), .DEPTH(DEPTH)) u_q (
    .clk, .rst_n, .clear(1'b0), .wr_en(in_valid), .wr_data(in_evt),
    .rd_en(pop), .rd_data(evt), .full(fifo_full), .empty(fifo_empty), .count(queued)
  );

  assign evt_valid = fifo_empty ? '0 : ~done;
  assign pop       = !fifo_empty && ((done | (take & evt_valid)) == '1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      done     <= '0;
      overflow <= 1'b0;
    end else begin
      if (pop) done <= '0;
      else     done <= done | (take & evt_valid);
      if (in_valid && fifo_full) overflow <= 1'b1;
    end
  end

endmodule
