// Testbench of one ROD slave (four buses, sixteen links). For each event
// every enabled link sends a frame of random hits on its bus (bytes of
// the four links of a bus interleaved at random) and the master's event
// record is offered. The expected fragment is built in software from the
// order in which hit records complete on each bus and compared word by
// word with the fragment output. Afterwards the histogram of one link is
// read back and compared, and the Inmem FIFO must hold the first raw
// words of the selected bus.
module tb_rod_slave;
  import ibl_pkg::*;
  logic clk40 = 0, clk80 = 0, rst_n = 0;
  bus_word_t bus_in [4];
  logic [15:0] link_en = 16'hFFFF;
  evt_t evt;
  logic evt_valid = 0, evt_take;
  logic [31:0] frag_word;
  logic frag_ctrl, frag_valid;
  logic [15:0] frag_count, timeout_count;
  logic [1:0] inmem_sel = 2'd1;
  logic inmem_rd = 0, inmem_empty;
  logic [11:0] inmem_data;
  logic [4:0] histo_link = 5'd6;
  logic [14:0] histo_addr = 0;
  logic [35:0] histo_data;
  logic histo_clear = 0, histo_clearing;
  logic [15:0] histo_dropped;
  logic [15:0] g_frames [4];
  logic [10:0] inmem_count;
  logic [3:0] fifo_overflow;
  int checks = 0, failures = 0;
  rod_slave dut (.*);
  always #12.5 clk40 = ~clk40;
  always #6.25 clk80 = ~clk80;

  logic [32:0] exp_q [$];
  logic [11:0] inmem_exp [$];
  int occ [int];
  int n_words = 0;
  always @(posedge clk40) if (rst_n && frag_valid) begin
    checks++;
    if (exp_q.size() == 0 || {frag_ctrl, frag_word} != exp_q[0]) begin
      failures++;
      if (failures < 10) $display("FAIL word %0d got %0d:%h exp %h", n_words, frag_ctrl, frag_word, exp_q.size() ? exp_q[0] : '0);
    end
    if (exp_q.size()) void'(exp_q.pop_front());
    n_words++;
  end

  task automatic run_event(int n);
    evt_t e = '{l1id: 24'(n), bcid: 12'($urandom()), ttype: 8'($urandom())};
    bus_word_t w [4][$];
    int nd = 0;
    exp_q.push_back({1'b1, ROD_HDR_MARKER});
    exp_q.push_back({1'b0, 8'h00, e.l1id});
    exp_q.push_back({1'b0, 12'h000, e.bcid, e.ttype});
    for (int b = 0; b < 4; b++) begin
      bus_word_t st [4][$];
      int cnt [4] = '{0, 0, 0, 0};
      for (int c = 0; c < 4; c++) begin
        int nh = $urandom_range(0, 4);
        st[c].push_back('{ctrl: 1, valid: 1, addr: 2'(c), data: K_SOF});
        for (int i = 0; i < nh; i++) begin
          hit_t h = '{col: 7'($urandom_range(0, 2)), row: 9'($urandom_range(0, 2)),
                      tot: 4'($urandom()), tot2: 4'($urandom())};
          st[c].push_back('{ctrl: 0, valid: 1, addr: 2'(c), data: h[23:16]});
          st[c].push_back('{ctrl: 0, valid: 1, addr: 2'(c), data: h[15:8]});
          st[c].push_back('{ctrl: 0, valid: 1, addr: 2'(c), data: h[7:0]});
        end
        st[c].push_back('{ctrl: 1, valid: 1, addr: 2'(c), data: K_EOF});
      end
      while (st[0].size() || st[1].size() || st[2].size() || st[3].size()) begin
        int c = $urandom_range(0, 3);
        if (st[c].size()) begin
          bus_word_t x = st[c].pop_front();
          w[b].push_back(x);
          if (!x.ctrl) begin
            cnt[c]++;
            if (cnt[c] % 3 == 0) begin
              // third byte completes a record: take the last three of this link
              logic [23:0] hv = '0;
              int k = 0;
              for (int i = w[b].size() - 1; i >= 0 && k < 3; i--)
                if (w[b][i].addr == 2'(c)) begin hv[8*k +: 8] = w[b][i].data; k++; end
              exp_q.push_back({1'b0, 3'b001, 5'(4*b+c), hv});
              nd++;
              if (4*b+c == 6) begin
                automatic int a = int'(hv[23:17]) * 336 + int'(hv[16:8]);
                occ[a] = occ.exists(a) ? occ[a] + 1 : 1;
              end
            end
          end
        end
      end
    end
    exp_q.push_back({1'b1, ROD_TRL_MARKER, 1'b0, 23'(nd)});
    @(negedge clk40) evt = e; evt_valid = 1;
    fork
      begin
        @(posedge clk40); #1;
        while (!evt_take) begin @(posedge clk40); #1; end
        @(negedge clk40) evt_valid = 0;
      end
      for (int b = 0; b < 4; b++) fork
        automatic int bb = b;
        begin
          while (w[bb].size()) begin
            @(negedge clk80);
            if ($urandom_range(0, 2) != 0) begin
              bus_in[bb] = w[bb].pop_front();
              if (bb == 1 && inmem_exp.size() < 1024) inmem_exp.push_back(bus_in[bb]);
            end else bus_in[bb] = '0;
          end
          @(negedge clk80) bus_in[bb] = '0;
        end
      join_none
      wait fork;
    join
    while (exp_q.size()) @(negedge clk40);
  endtask

  initial begin
    #20ms failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    evt = '0;
    for (int b = 0; b < 4; b++) bus_in[b] = '0;
    #1 rst_n = 0;
    #100 rst_n = 1;
    #100;
    @(negedge clk40) histo_clear = 1;
    @(negedge clk40) histo_clear = 0;
    wait (!histo_clearing);
    for (int n = 0; n < 60; n++) run_event(n);
    repeat (10) @(negedge clk40);
    checks++;
    if (frag_count != 60 || timeout_count != 0 || fifo_overflow != 0) begin
      failures++; $display("FAIL frags=%0d timeouts=%0d ovf=%b", frag_count, timeout_count, fifo_overflow);
    end
    foreach (occ[a]) begin
      histo_addr = 15'(a);
      @(negedge clk40);
      checks++;
      if (32'(histo_data[35:20]) != occ[a]) begin failures++; $display("FAIL histo pixel %0d got %0d exp %0d", a, histo_data[35:20], occ[a]); end
    end
    for (int i = 0; i < 300; i++) begin
      @(negedge clk80);
      checks++;
      if (inmem_empty || inmem_data != inmem_exp[i]) begin
        failures++; $display("FAIL inmem %0d got %h exp %h", i, inmem_data, inmem_exp[i]); break;
      end
      inmem_rd = 1;
      @(negedge clk80) inmem_rd = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
