// Testbench of the dual-clock FIFO. The write clock (80 MHz) and read
// clock (40 MHz, then 100 MHz) are unrelated in phase; words are written
// whenever the FIFO is not full and read at random. Every word must come
// out once, in order. A phase with no reads must end with `full` set and
// no word lost.
module tb_dual_clock_fifo;
  logic wclk = 0, rclk = 0, wrst_n = 0, rrst_n = 0;
  logic wr_en = 0, rd_en = 0, full, empty;
  logic [27:0] wr_data = '0, rd_data;
  int checks = 0, failures = 0;
  realtime rhalf = 12.5;
  dual_clock_fifo #(.W(28), .DEPTH(64)) dut (.*);
  always #6.25 wclk = ~wclk;
  initial begin #3.1; forever #(rhalf) rclk = ~rclk; end

  logic [27:0] q [$];
  int n_out = 0;
  bit rd_go = 1;
  always @(posedge wclk) if (wr_en && !full) q.push_back(wr_data);
  always @(posedge rclk) if (rrst_n && rd_en && !empty) begin
    checks++;
    if (q.size() == 0 || rd_data != q[0]) begin
      failures++; $display("FAIL word %0d got %h", n_out, rd_data);
    end
    if (q.size() != 0) void'(q.pop_front());
    n_out++;
  end
  always @(negedge rclk) rd_en = rd_go && ($urandom_range(0, 3) != 0);

  initial begin
    #2ms failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #40 wrst_n = 1; rrst_n = 1;
    for (int ph = 0; ph < 3; ph++) begin
      if (ph == 1) rhalf = 5.0;
      if (ph == 2) rd_go = 0;
      for (int i = 0; i < 4000; i++) begin
        @(negedge wclk);
        wr_en   = ($urandom_range(0, 2) == 0);
        wr_data = 28'($urandom());
      end
      @(negedge wclk) wr_en = 0;
    end
    repeat (10) @(negedge wclk);
    checks++;
    if (!full || q.size() != 64) begin failures++; $display("FAIL full=%0d held=%0d", full, q.size()); end
    rd_go = 1;
    repeat (400) @(negedge wclk);
    checks++;
    if (!empty || q.size() != 0 || n_out < 2000) begin
      failures++; $display("FAIL drain empty=%0d left=%0d out=%0d", empty, q.size(), n_out);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
