// Testbench of the event fragment builder (four buses, sixteen links).
// For every event the testbench fills four record queues (standing in for
// the dual-clock FIFOs, with random empty gaps) with hit records and one
// end-of-frame per enabled channel, interleaved at random within a bus;
// disabled links also send hits, which must be dropped. The expected
// fragment (header, data words bus by bus, trailer with count) is built
// in software and compared word by word. One event leaves a channel
// without end-of-frame: the trailer must carry the timeout flag.
module tb_efb;
  import ibl_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [15:0] link_en;
  evt_t evt;
  logic evt_valid = 0, evt_take;
  rec_t rec [4];
  logic [3:0] rec_empty, rec_rd;
  logic [31:0] out_word;
  logic out_ctrl, out_valid;
  logic [15:0] frag_count, timeout_count;
  int checks = 0, failures = 0;
  efb #(.N_BUS(4), .LINK_BASE(0)) dut (.*);
  always #12.5 clk = ~clk;

  rec_t q [4][$];
  logic [32:0] exp_q [$];   // {ctrl, word}
  bit gap [4];
  always_comb for (int b = 0; b < 4; b++) begin
    rec_empty[b] = (q[b].size() == 0) || gap[b];
    rec[b] = q[b].size() ? q[b][0] : '0;
  end
  always @(posedge clk) if (rst_n) for (int b = 0; b < 4; b++)
    if (rec_rd[b]) begin
      checks++;
      if (rec_empty[b]) begin failures++; $display("FAIL read of empty bus %0d", b); end
      else void'(q[b].pop_front());
    end
  always @(negedge clk) for (int b = 0; b < 4; b++) gap[b] = ($urandom_range(0, 3) == 0);

  int n_words = 0;
  always @(posedge clk) if (rst_n && out_valid) begin
    checks++;
    if (exp_q.size() == 0 || {out_ctrl, out_word} != exp_q[0]) begin
      failures++;
      if (failures < 10) $display("FAIL word %0d got %0d:%h exp %h", n_words, out_ctrl, out_word, exp_q.size() ? exp_q[0] : '0);
    end
    if (exp_q.size()) void'(exp_q.pop_front());
    n_words++;
  end

  task automatic send_event(int n, bit drop_eof);
    evt_t e = '{l1id: 24'(n), bcid: 12'($urandom()), ttype: 8'($urandom())};
    int nd = 0;
    // records of disabled links left over from the last event are discarded
    for (int b = 0; b < 4; b++) q[b].delete();
    exp_q.push_back({1'b1, ROD_HDR_MARKER});
    exp_q.push_back({1'b0, 8'h00, e.l1id});
    exp_q.push_back({1'b0, 12'h000, e.bcid, e.ttype});
    for (int b = 0; b < 4; b++) begin
      rec_t pend [4][$];
      for (int c = 0; c < 4; c++) begin
        int nh = $urandom_range(0, 5);
        for (int i = 0; i < nh; i++)
          pend[c].push_back('{rtype: REC_HIT, ch: 2'(c), hit: hit_t'($urandom())});
        if (!(drop_eof && b == 2 && c == 1) && (link_en[4*b+c] || $urandom_range(0, 1)))
          pend[c].push_back('{rtype: REC_EOF, ch: 2'(c), hit: '0});
      end
      while (pend[0].size() || pend[1].size() || pend[2].size() || pend[3].size()) begin
        int c = $urandom_range(0, 3);
        if (pend[c].size()) begin
          rec_t r = pend[c].pop_front();
          q[b].push_back(r);
          if (r.rtype == REC_HIT && link_en[4*b+c]) begin
            exp_q.push_back({1'b0, 3'b001, 5'(4*b+c), r.hit});
            nd++;
          end
        end
      end
    end
    exp_q.push_back({1'b1, ROD_TRL_MARKER, drop_eof, 23'(nd)});
    @(negedge clk) evt = e; evt_valid = 1;
    @(posedge clk); #1;
    while (!evt_take) begin @(posedge clk); #1; end
    @(negedge clk) evt_valid = 0;
    // the next event's records are written only once this fragment is done
    while (exp_q.size()) @(negedge clk);
  endtask

  initial begin
    #20ms failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    evt = '0; link_en = 16'hFFFF;
    for (int b = 0; b < 4; b++) gap[b] = 0;
    #30 rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      link_en = (n < 100) ? 16'hFFFF : 16'($urandom() | 32'h0001);
      if (n == 150) link_en[9] = 1;
      send_event(n, n == 150);
    end
    repeat (5) @(negedge clk);
    checks++;
    if (frag_count != 200 || timeout_count != 1 || exp_q.size() != 0) begin
      failures++; $display("FAIL frags=%0d timeouts=%0d left=%0d", frag_count, timeout_count, exp_q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
