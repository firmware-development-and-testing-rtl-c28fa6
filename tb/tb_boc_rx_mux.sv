// Testbench of the BOC receive multiplexer. Four channels send random
// bytes and K-words (idle words mixed in) at the 160 Mb/s link rate (one
// byte every 5 bus cycles); every non-idle byte must appear on the bus, in
// order per channel, tagged with its channel number and K flag, and no
// idle word may appear. A burst with every channel sending each cycle
// must raise the overflow flag.
module tb_boc_rx_mux;
  import ibl_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [3:0][7:0] ch_data;
  logic [3:0] ch_k = 0, ch_valid = 0;
  bus_word_t bus;
  logic overflow;
  int checks = 0, failures = 0;
  logic [8:0] exp_q [4][$];
  int got = 0;
  bit checking = 1;

  boc_rx_mux dut (.*);
  always #6.25 clk = ~clk;

  always @(posedge clk) if (rst_n) begin
    #1;
    if (bus.valid && checking) begin
      logic [8:0] e;
      checks++;
      if (exp_q[bus.addr].size() == 0) begin failures++; $display("FAIL unexpected word on ch %0d %h t=%t", bus.addr, bus, $realtime); end
      else begin
        e = exp_q[bus.addr].pop_front();
        if ({bus.ctrl, bus.data} !== e) begin failures++; $display("FAIL ch %0d got %h expected %h", bus.addr, {bus.ctrl, bus.data}, e); end
      end
      got++;
    end
  end

  initial begin
    #2000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ch_data = '0;
    #20 rst_n = 1;
    for (int c = 0; c < 4000; c++) begin
      @(negedge clk);
      ch_valid = 0;
      for (int i = 0; i < 4; i++) begin
        if ((c + i) % 5 == 0) begin
          automatic int r = $urandom_range(0, 9);
          ch_valid[i] = 1;
          ch_k[i] = (r < 3);
          ch_data[i] = r == 0 ? K_IDLE : (r == 1 ? K_SOF : (r == 2 ? K_EOF : 8'($urandom())));
          if (!(r == 0)) exp_q[i].push_back({ch_k[i], ch_data[i]});
        end
      end
    end
    @(negedge clk) ch_valid = 0;
    repeat (20) @(negedge clk);
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (exp_q[i].size() != 0) begin failures++; $display("FAIL ch %0d lost %0d bytes", i, exp_q[i].size()); end
    end
    checks++;
    if (overflow || got < 2000) begin failures++; $display("FAIL overflow at nominal rate or too few words %0d", got); end
    // overload: every channel every cycle
    checking = 0;
    for (int c = 0; c < 20; c++) begin
      @(negedge clk);
      ch_valid = 4'hF; ch_k = 0; ch_data = '0;
    end
    @(negedge clk) ch_valid = 0;
    checks++;
    if (!overflow) begin failures++; $display("FAIL overflow not flagged"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
