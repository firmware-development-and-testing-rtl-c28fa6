// Testbench of the histogrammer at full FE-I4 size (80 x 336 pixels).
// The memory is cleared first, then random hits are sent, many of them on
// a handful of pixels and often back to back, so the read-modify-write
// forwarding is exercised. Occupancy and ToT sum of every touched pixel,
// and of some untouched ones, are read back and compared with a software
// histogram. Hits outside the matrix must be dropped and counted.
module tb_histogrammer;
  logic clk = 0, rst_n = 0, hit_valid = 0, clear = 0, clearing;
  logic [6:0] hit_col = 0;
  logic [8:0] hit_row = 0;
  logic [3:0] hit_tot = 0;
  logic [14:0] rd_addr = 0;
  logic [35:0] rd_data;
  logic [15:0] dropped;
  int checks = 0, failures = 0;
  histogrammer dut (.*);
  always #12.5 clk = ~clk;

  int occ [int];
  int tsum [int];
  int n_drop = 0;

  initial begin
    #5ms failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #30 rst_n = 1;
    @(negedge clk) clear = 1;
    @(negedge clk) clear = 0;
    wait (!clearing);
    @(negedge clk);
    for (int i = 0; i < 20000; i++) begin
      automatic int c, r;
      if ($urandom_range(0, 1) == 0) begin c = $urandom_range(0, 2); r = $urandom_range(0, 2); end
      else begin c = $urandom_range(0, 79); r = $urandom_range(0, 335); end
      if ($urandom_range(0, 99) == 0) begin c = 80 + $urandom_range(0, 47); n_drop++; end
      hit_valid = ($urandom_range(0, 3) != 0);
      hit_col = 7'(c); hit_row = 9'(r); hit_tot = 4'($urandom());
      if (hit_valid && c < 80) begin
        occ[c * 336 + r] = occ.exists(c * 336 + r) ? occ[c * 336 + r] + 1 : 1;
        tsum[c * 336 + r] = (tsum.exists(c * 336 + r) ? tsum[c * 336 + r] : 0) + int'(hit_tot);
      end else if (!hit_valid && c >= 80) n_drop--;
      @(negedge clk);
    end
    hit_valid = 0;
    repeat (3) @(negedge clk);
    foreach (occ[a]) begin
      rd_addr = 15'(a);
      @(negedge clk);
      checks++;
      if (rd_data != {16'(occ[a]), 20'(tsum[a])}) begin
        failures++;
        if (failures < 10) $display("FAIL pixel %0d got %h exp occ %0d tot %0d", a, rd_data, occ[a], tsum[a]);
      end
    end
    for (int i = 0; i < 200; i++) begin
      automatic int a = $urandom_range(0, 26879);
      if (!occ.exists(a)) begin
        rd_addr = 15'(a);
        @(negedge clk);
        checks++;
        if (rd_data != '0) begin failures++; $display("FAIL untouched pixel %0d = %h", a, rd_data); end
      end
    end
    checks++;
    if (32'(dropped) != n_drop || n_drop == 0) begin failures++; $display("FAIL dropped %0d exp %0d", dropped, n_drop); end
    // clear again: everything returns to zero
    @(negedge clk) clear = 1;
    @(negedge clk) clear = 0;
    wait (!clearing);
    @(negedge clk);
    foreach (occ[a]) begin
      rd_addr = 15'(a);
      @(negedge clk);
      checks++;
      if (rd_data != '0) begin failures++; $display("FAIL pixel %0d not cleared", a); break; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
