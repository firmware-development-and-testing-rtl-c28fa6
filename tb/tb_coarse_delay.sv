// Testbench of the coarse delay: a random stream passes through while the
// tap changes; the output must equal the input of tap+1 cycles earlier.
module tb_coarse_delay;
  logic clk = 0, rst_n = 0, din = 0, dout;
  logic [4:0] tap = 0;
  int checks = 0, failures = 0;
  logic hist [$];
  coarse_delay #(.DEPTH(32)) dut (.*);
  always #3.125 clk = ~clk;

  always @(posedge clk) if (rst_n) hist.push_front(din);

  initial begin
    #100000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10 rst_n = 1;
    for (int c = 0; c < 2000; c++) begin
      @(negedge clk);
      if (hist.size() > 33) begin
        checks++;
        if (dout !== hist[tap]) begin failures++; $display("FAIL tap %0d", tap); end
      end
      din = 1'($urandom());
      if (c % 97 == 0) tap = 5'($urandom());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
