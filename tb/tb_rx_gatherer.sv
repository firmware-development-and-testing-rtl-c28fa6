// Testbench of the gatherer. Four channels produce random frames
// (start-of-frame, 0..6 three-byte hit records, end-of-frame) with idle
// words and stray bytes between frames; their bytes are interleaved on
// the bus in random order with random gaps. A software copy of the
// expected records (hit and end-of-frame, in bus order) is compared with
// the block's output.
module tb_rx_gatherer;
  import ibl_pkg::*;
  logic clk = 0, rst_n = 0;
  bus_word_t bus;
  rec_t rec;
  logic rec_valid;
  logic [15:0] frames;
  int checks = 0, failures = 0;
  rx_gatherer dut (.*);
  always #6.25 clk = ~clk;

  rec_t exp_q [$];
  int n_eof = 0;
  always @(posedge clk) if (rst_n && rec_valid) begin
    checks++;
    if (exp_q.size() == 0 || rec != exp_q[0]) begin
      failures++; $display("FAIL got %h exp %h", rec, exp_q.size() ? exp_q[0] : '0);
    end
    if (exp_q.size()) void'(exp_q.pop_front());
  end

  // per-channel byte streams: {ctrl, byte}
  logic [8:0] st [4][$];
  logic [15:0] acc [4];
  int nb [4];
  bit inf [4];

  task automatic gen_frame(int c);
    int n = $urandom_range(0, 6);
    if ($urandom_range(0, 3) == 0) st[c].push_back({1'b0, 8'($urandom())}); // stray byte
    if ($urandom_range(0, 3) == 0) st[c].push_back({1'b1, K_IDLE});
    st[c].push_back({1'b1, K_SOF});
    for (int i = 0; i < n * 3; i++) st[c].push_back({1'b0, 8'($urandom())});
    st[c].push_back({1'b1, K_EOF});
  endtask

  // model applied in the order bytes are put on the bus
  task automatic model(int c, logic [8:0] w);
    if (w[8]) begin
      if (w[7:0] == K_SOF) begin inf[c] = 1; nb[c] = 0; end
      else if (w[7:0] == K_EOF && inf[c]) begin
        inf[c] = 0; n_eof++;
        exp_q.push_back('{rtype: REC_EOF, ch: 2'(c), hit: '0});
      end
    end else if (inf[c]) begin
      if (nb[c] == 2) begin
        nb[c] = 0;
        exp_q.push_back('{rtype: REC_HIT, ch: 2'(c), hit: hit_t'({acc[c], w[7:0]})});
      end else begin
        nb[c]++; acc[c] = {acc[c][7:0], w[7:0]};
      end
    end
  endtask

  initial begin
    #1ms failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bus = '0;
    for (int c = 0; c < 4; c++) begin inf[c] = 0; nb[c] = 0; acc[c] = '0; end
    #30 rst_n = 1;
    for (int c = 0; c < 4; c++) repeat (60) gen_frame(c);
    while (st[0].size() || st[1].size() || st[2].size() || st[3].size()) begin
      automatic int c = $urandom_range(0, 3);
      @(negedge clk);
      bus = '0;
      if (st[c].size() && $urandom_range(0, 4) != 0) begin
        automatic logic [8:0] w = st[c].pop_front();
        bus = '{ctrl: w[8], valid: 1'b1, addr: 2'(c), data: w[7:0]};
        model(c, w);
      end
    end
    @(negedge clk) bus = '0;
    repeat (5) @(negedge clk);
    checks++;
    if (exp_q.size() != 0 || 32'(frames) != n_eof || n_eof != 240) begin
      failures++; $display("FAIL left=%0d frames=%0d exp %0d", exp_q.size(), frames, n_eof);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
