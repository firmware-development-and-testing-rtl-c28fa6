// Testbench of the bi-phase mark encoder: random bits are encoded and the
// line is decoded independently from the recorded samples: a level change
// at every bit start, a second change mid-bit exactly for a 1, four
// 160 MHz cycles per bit (40 Mb/s).
module tb_bpm_encoder;
  logic clk = 0, rst_n = 0, bit_in = 0, bit_strobe, bpm_out;
  int checks = 0, failures = 0;
  bpm_encoder dut (.*);
  always #3.125 clk = ~clk;

  logic smp [$];
  int   edge_idx [$];
  logic bits [$];
  int   n = 0;

  always @(posedge clk) if (rst_n) begin
    if (bit_strobe) begin edge_idx.push_back(n); bits.push_back(bit_in); end
    #0.5 smp.push_back(bpm_out);
    n++;
  end

  initial begin
    #100000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10 rst_n = 1;
    repeat (800) begin
      @(negedge clk);
      if (bit_strobe) bit_in = 1'($urandom());
    end
    for (int i = 1; i + 1 < edge_idx.size(); i++) begin
      automatic int e = edge_idx[i];
      checks++;
      if (edge_idx[i] - edge_idx[i-1] != 4) begin failures++; $display("FAIL bit period"); end
      checks++;
      if (smp[e] != smp[e+1] || smp[e+2] != smp[e+3]) begin failures++; $display("FAIL half-bit not steady at %0d", e); end
      checks++;
      if (smp[e] == smp[e-1]) begin failures++; $display("FAIL no boundary transition at %0d", e); end
      checks++;
      if ((smp[e] != smp[e+2]) != bits[i]) begin failures++; $display("FAIL bit %0d decoded wrong", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
