// Testbench of the single-clock FIFO: random pushes and pops against a
// queue model, with full/empty/count checked every cycle and clear tested.
module tb_sync_fifo;
  localparam int W = 16, D = 8;
  logic clk = 0, rst_n = 0, clear = 0, wr_en = 0, rd_en = 0;
  logic [W-1:0] wr_data, rd_data;
  logic full, empty;
  logic [$clog2(D+1)-1:0] count;
  int checks = 0, failures = 0;
  logic [W-1:0] q [$];

  sync_fifo #(.W(W), .DEPTH(D)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #200000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int full_seen = 0;
    wr_data = 0;
    #22 rst_n = 1;
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      checks++;
      if (count != q.size() || empty != (q.size() == 0) || full != (q.size() == D) ||
          (q.size() > 0 && rd_data != q[0])) begin
        failures++;
        $display("FAIL cycle %0d count %0d model %0d", c, count, q.size());
      end
      if (full) full_seen++;
      if (c == 1500) begin clear = 1; @(posedge clk); #1 clear = 0; q.delete(); continue; end
      wr_en = 1'($urandom_range(0, 99) < ((c / 400) % 2 ? 70 : 35));
      rd_en = 1'($urandom_range(0, 99) < ((c / 400) % 2 ? 35 : 70));
      wr_data = W'($urandom());
      @(posedge clk);
      #1;
    end
    checks++;
    if (full_seen == 0) begin failures++; $display("FAIL never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model push, evaluated with pre-edge state
  always @(posedge clk) if (rst_n && !clear) begin
    if (rd_en && !empty) void'(q.pop_front());
    if (wr_en && !full) q.push_back(wr_data);
  end
endmodule
