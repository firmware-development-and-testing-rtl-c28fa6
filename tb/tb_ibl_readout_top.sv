// End-to-end testbench of the read-out unit at full size (32 FE-I4 links,
// 16 TX links, 2 ms PLL reset hold), default parameters.
//
// The testbench plays the TIM, the controller, the front ends and the VME
// crate:
//  * triggers come from the TIM and then from the controller; every
//    trigger makes all 32 front ends send an 8b/10b frame of random hits;
//  * both slave fragment streams are checked: header marker and L1ID,
//    the multiset of data words (link and hit) and the trailer count;
//  * the bi-phase-mark TX lines are decoded (a half-bit interval is a
//    "1") and the number of ones must match the commands sent; a
//    disabled TX link must send no ones;
//  * VME register access, broadcast write, FPGA programming words, PLL
//    clock-source check (REFSEL read back), PLL reset (RESET pin held
//    about 2 ms) and the front-panel JTAG chain go through the PRM;
//  * ECR, a missing end-of-frame (timeout), a bad 10-bit symbol, the
//    histogram and the Inmem FIFO are exercised once each.
// Each mechanism is counted; a mechanism that never happens is a failure.
module tb_ibl_readout_top;
  import ibl_pkg::*;
  logic clk40 = 0, clk80 = 0, clk160 = 0, osc_clk = 0, rst_n = 1;
  logic use_tim = 1, tim_l1a = 0, tim_ecr = 0, tim_bcr = 0, ppc_trig = 0;
  logic [7:0] tim_ttype = 0, ppc_ttype = 0;
  logic [31:0] slow_cmd = 0;
  logic [5:0] slow_len = 0;
  logic slow_valid = 0, slow_ready;
  logic [15:0] tx_en = 16'hFFFB;
  logic [4:0] tx_tap [16];
  logic [15:0] tx_out, tx_bit_strobe;
  logic [9:0] fe_sym [32];
  logic [31:0] fe_sym_valid = 0, link_en = 32'hFFFF_FFFF, rx_code_err, rx_disp_err;
  logic [7:0] bus_overflow, fifo_overflow;
  logic [31:0] frag_word [2];
  logic [1:0] frag_ctrl, frag_valid;
  logic [15:0] frag_count [2], timeout_count [2], lv1_sent, rx_frames [8], histo_dropped [2];
  logic [23:0] trig_count;
  logic evt_overflow, cmd_busy;
  logic [4:0] evt_queued;
  logic [1:0] inmem_sel [2];
  logic [1:0] inmem_rd = 0, inmem_empty, histo_clear = 0, histo_clearing;
  logic [11:0] inmem_data [2];
  logic [10:0] inmem_count [2];
  logic [4:0] histo_link [2];
  logic [14:0] histo_addr [2];
  logic [35:0] histo_data [2];
  logic [7:0] board_addr = 8'h12;
  logic [23:0] vme_addr = 0;
  logic [5:0] vme_am = 6'h39;
  logic vme_as_n = 1, vme_ds0_n = 1, vme_ds1_n = 1, vme_write_n = 1;
  logic [31:0] vme_data_in = 0, vme_data_out;
  logic vme_data_oe, vme_dtack_n, vme_berr_n;
  logic [2:0] fpga_tck, fpga_tms, fpga_tdi, fpga_tdo;
  logic fp_tck = 0, fp_tms = 1, fp_tdi = 0, fp_tdo;
  logic [7:0] pll_pins, pll_core, pll_ir;
  int checks = 0, failures = 0;

  ibl_readout_top dut (.*);

  always #12.5  clk40  = ~clk40;
  always #6.25  clk80  = ~clk80;
  always #3.125 clk160 = ~clk160;
  always #5     osc_clk = ~osc_clk;
  assign fpga_tdo = fpga_tdi;

  // ---------------- mechanism counters ----------------
  localparam int NM = 19;
  string mname [NM] = '{"tim_trigger", "ppc_trigger", "ecr", "slow_command", "tx_lv1_ones",
    "fe_frame", "fragment_slave0", "fragment_slave1", "data_word", "timeout",
    "code_error", "histogram", "inmem", "vme_access", "vme_broadcast",
    "fpga_program", "pll_clock_check", "pll_reset", "front_panel_jtag"};
  int mcount [NM];
  function automatic void fail(string s);
    failures++;
    if (failures < 20) $display("FAIL %s", s);
  endfunction

  // ---------------- 8b/10b encoder (front-end side) ----------------
  logic [5:0] t6 [32] = '{6'b100111, 6'b011101, 6'b101101, 6'b110001, 6'b110101, 6'b101001,
    6'b011001, 6'b111000, 6'b111001, 6'b100101, 6'b010101, 6'b110100, 6'b001101, 6'b101100,
    6'b011100, 6'b010111, 6'b011011, 6'b100011, 6'b010011, 6'b110010, 6'b001011, 6'b101010,
    6'b011010, 6'b111010, 6'b110011, 6'b100110, 6'b010110, 6'b110110, 6'b001110, 6'b101110,
    6'b011110, 6'b101011};
  logic [3:0] t4 [9] = '{4'b1011, 4'b1001, 4'b0101, 4'b1100, 4'b1101, 4'b1010, 4'b0110, 4'b1110, 4'b0111};
  logic [3:0] t4k [8] = '{4'b1011, 4'b0110, 4'b1010, 4'b1100, 4'b1101, 4'b0101, 4'b1001, 4'b0111};
  function automatic int ones(input logic [9:0] v, input int w);
    int c = 0;
    for (int i = 0; i < w; i++) c += v[i];
    return c;
  endfunction
  bit rd [32];
  function automatic logic [9:0] enc(input int l, input logic [7:0] b, input bit kk);
    logic [5:0] c6;
    logic [3:0] c4;
    int x = b[4:0], y = b[7:5];
    c6 = kk && x == 28 ? 6'b001111 : t6[x];
    if (rd[l] && (ones(10'(c6), 6) != 3 || c6 == 6'b111000)) c6 = ~c6;
    if (ones(10'(c6), 6) != 3) rd[l] = !rd[l];
    if (kk) c4 = rd[l] ? ~t4k[y] : t4k[y];
    else begin
      if (y == 7 && ((!rd[l] && (x == 17 || x == 18 || x == 20)) || (rd[l] && (x == 11 || x == 13 || x == 14)))) c4 = t4[8];
      else c4 = t4[y];
      if (rd[l] && (ones(10'(c4), 4) != 2 || c4 == 4'b1100)) c4 = ~c4;
    end
    if (ones(10'(c4), 4) != 2) rd[l] = !rd[l];
    return {c6, c4};
  endfunction

  // ---------------- front ends ----------------
  logic [9:0] sq [32][$];
  int gap [32];
  always @(negedge clk80) begin
    for (int l = 0; l < 32; l++) begin
      fe_sym_valid[l] = 0;
      if (gap[l] > 0) gap[l]--;
      else if (sq[l].size()) begin
        fe_sym[l] = sq[l].pop_front();
        fe_sym_valid[l] = 1;
        gap[l] = 4;
      end
    end
  end

  // expected fragments: L1ID and word count per event, words in one queue
  logic [23:0] e_l1 [2][$];
  int          e_n  [2][$];
  logic [31:0] e_w  [2][$];
  int occ [int];
  logic [23:0] next_l1id = 0;
  int drop_eof_link = -1;

  task automatic fe_event();
    int n [2] = '{0, 0};
    for (int l = 0; l < 32; l++) begin
      int nh = $urandom_range(0, 3);
      sq[l].push_back(enc(l, K_SOF, 1));
      for (int i = 0; i < nh; i++) begin
        hit_t h = '{col: 7'($urandom_range(0, 79)), row: 9'($urandom_range(0, 335)),
                    tot: 4'($urandom()), tot2: 4'($urandom())};
        sq[l].push_back(enc(l, h[23:16], 0));
        sq[l].push_back(enc(l, h[15:8], 0));
        sq[l].push_back(enc(l, h[7:0], 0));
        e_w[l / 16].push_back({3'b001, 5'(l), h});
        n[l / 16]++;
        if (l == 3) begin
          automatic int a = int'(h.col) * 336 + int'(h.row);
          occ[a] = occ.exists(a) ? occ[a] + 1 : 1;
        end
      end
      if (l != drop_eof_link) sq[l].push_back(enc(l, K_EOF, 1));
      mcount[5]++;
    end
    for (int s = 0; s < 2; s++) begin e_l1[s].push_back(next_l1id); e_n[s].push_back(n[s]); end
    next_l1id++;
  endtask

  // ---------------- fragment checker ----------------
  logic [31:0] got [2][$];
  int state [2] = '{0, 0};
  logic [23:0] cur_l1id [2];
  always @(posedge clk40) if (rst_n) for (int s = 0; s < 2; s++) if (frag_valid[s]) begin
    if (frag_ctrl[s] && frag_word[s] == ROD_HDR_MARKER) begin
      state[s] = 1; got[s].delete();
    end else if (state[s] == 1) begin
      cur_l1id[s] = frag_word[s][23:0]; state[s] = 2;
    end else if (state[s] == 2) begin
      state[s] = 3;
    end else if (state[s] == 3 && !frag_ctrl[s]) begin
      got[s].push_back(frag_word[s]);
      mcount[8]++;
    end else if (state[s] == 3 && frag_ctrl[s]) begin
      state[s] = 0;
      checks++;
      if (e_l1[s].size() == 0) fail($sformatf("slave %0d: unexpected fragment", s));
      else begin
        automatic logic [23:0] el1 = e_l1[s].pop_front();
        automatic int en = e_n[s].pop_front();
        automatic logic [31:0] a [$] = got[s];
        automatic logic [31:0] b [$];
        for (int i = 0; i < en; i++) b.push_back(e_w[s].pop_front());
        a.sort(); b.sort();
        if (cur_l1id[s] != el1 || a != b || 32'(frag_word[s][22:0]) != got[s].size()
            || frag_word[s][31:24] != ROD_TRL_MARKER)
          fail($sformatf("slave %0d fragment l1id %0d (exp %0d): %0d words, exp %0d",
                         s, cur_l1id[s], el1, got[s].size(), en));
        if (frag_word[s][23]) mcount[9]++;
        mcount[6 + s]++;
      end
    end
  end

  // ---------------- TX decoders ----------------
  int tx_ones [3] = '{0, 0, 0};
  int last_edge [3] = '{0, 0, 0};
  int tcount = 0;
  logic tx_prev [3];
  int txl [3] = '{0, 7, 2};   // link 2 is disabled
  always @(posedge clk160) begin
    tcount++;
    for (int i = 0; i < 3; i++) begin
      if (tx_out[txl[i]] != tx_prev[i]) begin
        if (tcount - last_edge[i] == 2 && rst_n) tx_ones[i]++;
        last_edge[i] = tcount;
      end
      tx_prev[i] = tx_out[txl[i]];
    end
  end

  // ---------------- code errors ----------------
  bit bad_sent = 0;
  logic [31:0] err_q = 0;
  always @(posedge clk80) if (rst_n) begin
    if ((rx_code_err & ~err_q) != 0) begin
      if (!bad_sent) fail("code error on a clean stream");
      mcount[10]++;
    end
    err_q = rx_code_err;
  end

  // ---------------- VME ----------------
  task automatic vme(input logic wr, input logic [7:0] board, input int reg_idx,
                     input logic [31:0] d, output int res, output logic [31:0] q);
    int t = 0;
    vme_addr = {board, 8'h00, 6'(reg_idx), 2'b00}; vme_write_n = !wr; vme_data_in = d;
    #40 vme_as_n = 0;
    #10 vme_ds0_n = 0; vme_ds1_n = 0;
    while (vme_dtack_n && vme_berr_n && t < 40) begin #25; t++; end
    res = !vme_dtack_n ? 0 : (!vme_berr_n ? 1 : 2);
    q = vme_data_out;
    vme_ds0_n = 1; vme_ds1_n = 1; #10 vme_as_n = 1;
    while ((!vme_dtack_n || !vme_berr_n) && t < 80) begin #25; t++; end
    #50;
  endtask

  task automatic trigger(bit from_tim);
    @(negedge clk40);
    if (from_tim) begin tim_l1a = 1; tim_ttype = 8'($urandom()); end
    else begin ppc_trig = 1; ppc_ttype = 8'($urandom()); end
    fe_event();
    @(negedge clk40) tim_l1a = 0; ppc_trig = 0;
    mcount[from_tim ? 0 : 1]++;
    repeat ($urandom_range(60, 120)) @(negedge clk40);
  endtask

  initial begin
    #30ms fail("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int res;
    logic [31:0] q;
    int slow_ones = 0;
    realtime t0;
    for (int l = 0; l < 32; l++) begin rd[l] = 0; gap[l] = 0; fe_sym[l] = '0; end
    for (int t = 0; t < 16; t++) tx_tap[t] = 5'($urandom());
    for (int i = 0; i < 3; i++) tx_prev[i] = 0;
    for (int s = 0; s < 2; s++) begin
      inmem_sel[s] = 2'(s); histo_link[s] = 5'd3; histo_addr[s] = 0;
    end
    pll_pins = 8'($urandom()) & 8'hFD;
    #1 rst_n = 0;
    #200 rst_n = 1;
    #200;
    @(negedge clk40) histo_clear = 2'b11;
    @(negedge clk40) histo_clear = 2'b00;
    wait (histo_clearing == 2'b00);

    // ---- triggers from the TIM, then an ECR, then from the controller
    for (int n = 0; n < 40; n++) trigger(1);
    @(negedge clk40) tim_ecr = 1;
    @(negedge clk40) tim_ecr = 0;
    next_l1id = 0;
    mcount[2]++;
    for (int n = 0; n < 20; n++) trigger(1);
    use_tim = 0;
    for (int n = 0; n < 30; n++) trigger(0);

    // ---- one front end forgets its end-of-frame: the event times out
    drop_eof_link = 21;
    trigger(0);
    drop_eof_link = -1;
    repeat (5000) @(negedge clk40);

    // ---- slow command, then a bad symbol on a link
    @(negedge clk40) slow_cmd = 32'h0000_5A5A; slow_len = 6'd16; slow_valid = 1;
    @(posedge clk40); #1;
    while (!slow_ready) begin @(posedge clk40); #1; end
    @(negedge clk40) slow_valid = 0;
    slow_ones = 8;
    mcount[3]++;
    bad_sent = 1;
    sq[9].push_back(10'b0000000000);
    repeat (200) @(negedge clk40);

    checks++;
    if (32'(trig_count) != 91 || 32'(lv1_sent) != 91) fail($sformatf("triggers %0d lv1 %0d", trig_count, lv1_sent));
    checks++;
    if (e_l1[0].size() || e_l1[1].size()) fail($sformatf("fragments missing %0d %0d", e_l1[0].size(), e_l1[1].size()));
    checks++;
    // a "1" shows as two half-bit intervals
    for (int i = 0; i < 3; i++) tx_ones[i] /= 2;
    if (tx_ones[0] != 4 * 91 + slow_ones || tx_ones[1] != tx_ones[0] || tx_ones[2] != 0)
      fail($sformatf("TX ones %0d %0d %0d exp %0d", tx_ones[0], tx_ones[1], tx_ones[2], 4 * 91 + slow_ones));
    else mcount[4] = tx_ones[0];
    checks++;
    if (bus_overflow != 0 || fifo_overflow != 0 || evt_overflow) fail("overflow");

    // ---- histogram of link 3 (slave 0)
    foreach (occ[a]) begin
      histo_addr[0] = 15'(a);
      @(negedge clk40); @(negedge clk40);
      checks++;
      if (32'(histo_data[0][35:20]) != occ[a]) fail($sformatf("histo %0d got %0d exp %0d", a, histo_data[0][35:20], occ[a]));
      else mcount[11]++;
    end
    // ---- Inmem of slave 1 holds SOF of link 16 or another link of bus 4
    @(negedge clk80);
    checks++;
    if (inmem_empty[1] || inmem_data[1][11] != 1'b1 || inmem_data[1][7:0] != K_SOF) fail($sformatf("inmem head %h", inmem_data[1]));
    else mcount[12]++;
    inmem_rd[1] = 1; @(negedge clk80) inmem_rd[1] = 0;

    // ---- VME: register access, other board, broadcast
    vme(1, 8'h12, 0, 32'h8, res, q);      // chain 2
    vme(0, 8'h12, 0, 0, res, q);
    checks++;
    if (res != 0 || q[3:2] != 2'd2) fail($sformatf("vme ctrl res %0d q %h", res, q)); else mcount[13]++;
    vme(0, 8'h13, 0, 0, res, q);
    checks++;
    if (res != 2) fail("other board answered"); else mcount[13]++;
    vme(1, 8'h25, 0, 32'h4, res, q);      // broadcast: chain 1
    vme(0, 8'h12, 0, 0, res, q);
    checks++;
    if (q[3:2] != 2'd1) fail("broadcast write lost"); else mcount[14]++;
    vme(0, 8'h25, 0, 0, res, q);
    checks++;
    if (res != 1) fail("broadcast read not refused"); else mcount[14]++;

    // ---- FPGA programming: 4 words to chain 1
    for (int i = 0; i < 4; i++) vme(1, 8'h12, 2, {16'h0000, 16'($urandom())}, res, q);
    #20us;
    vme(0, 8'h12, 5, 0, res, q);
    checks++;
    if (q != 4) fail($sformatf("programming words %0d", q)); else mcount[15]++;

    // ---- front-panel JTAG: the three chains in series (each looped back here)
    vme(1, 8'h12, 0, 32'h20, res, q);
    for (int i = 0; i < 8; i++) begin
      automatic logic bit_in = 1'($urandom());
      fp_tdi = bit_in; fp_tck = i[0];
      #10;
      checks++;
      if (fp_tdo != bit_in || fpga_tck != {3{fp_tck}}) fail("front-panel chain");
      else mcount[18]++;
    end
    fp_tck = 0;
    vme(1, 8'h12, 0, 32'h4, res, q);

    // ---- PLL clock-source check
    vme(1, 8'h12, 0, 32'h6, res, q);
    #200us;
    vme(0, 8'h12, 1, 0, res, q);
    checks++;
    if (!q[1] || q[0] != pll_pins[0] || q[2]) fail($sformatf("clock check status %h refsel pin %b", q, pll_pins[0]));
    else mcount[16]++;
    checks++;
    if (pll_ir != JI_SAMPLE) fail($sformatf("PLL IR %h", pll_ir));

    // ---- PLL reset: the RESET pin is held about 2 ms
    vme(1, 8'h12, 0, 32'h5, res, q);
    wait (pll_core[1]);
    t0 = $realtime;
    wait (!pll_core[1]);
    checks++;
    if ($realtime - t0 < 1.99ms || $realtime - t0 > 2.2ms) fail($sformatf("PLL reset held %0t", $realtime - t0));
    else mcount[17]++;
    #200us;
    vme(0, 8'h12, 1, 0, res, q);
    checks++;
    if (q[15:8] != 8'd1 || q[2] || q[0] != pll_pins[0]) fail($sformatf("after reset status %h", q));

    for (int m = 0; m < NM; m++) begin
      checks++;
      $display("mechanism %-16s %0d", mname[m], mcount[m]);
      if (mcount[m] == 0) fail($sformatf("mechanism %s never happened", mname[m]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
