// Testbench of the Event ID and Trigger Processor. Random TIM triggers,
// BCR every 3564 bunches (and once early) and ECRs are applied; a model
// here tracks the bunch and event counters. Every trigger must pulse
// lv1_req in the same cycle and give one event record with the expected
// L1ID, BCID and type one cycle later. Software triggers are then used
// with the PPC type.
module tb_trigger_processor;
  import ibl_pkg::*;
  logic clk = 0, rst_n = 0, use_tim = 1, tim_l1a = 0, tim_ecr = 0, tim_bcr = 0, ppc_trig = 0;
  logic [7:0] tim_ttype = 0, ppc_ttype = 8'h42;
  logic lv1_req, evt_valid;
  evt_t evt;
  logic [23:0] trig_count;
  int checks = 0, failures = 0;
  trigger_processor dut (.*);
  always #12.5 clk = ~clk;

  int m_bc = 0, m_l1 = 0, n_ecr = 0, n_bcr = 0, n_wrap = 0;
  evt_t exp_q [$];

  always @(posedge clk) if (rst_n) begin
    automatic logic t = use_tim ? tim_l1a : ppc_trig;
    checks++;
    if (lv1_req !== t) begin failures++; $display("FAIL lv1_req"); end
    if (evt_valid) begin
      automatic evt_t e = exp_q.pop_front();
      checks++;
      if (evt !== e) begin failures++; $display("FAIL evt %h expected %h", evt, e); end
    end
    if (t) begin
      exp_q.push_back('{l1id: tim_ecr ? 24'd0 : 24'(m_l1), bcid: 12'(m_bc), ttype: use_tim ? tim_ttype : ppc_ttype});
      m_l1 = tim_ecr ? 1 : m_l1 + 1;
    end else if (tim_ecr) m_l1 = 0;
    if (tim_ecr) n_ecr++;
    if (tim_bcr) n_bcr++;
    if (!tim_bcr && m_bc == 3563) n_wrap++;
    m_bc = (tim_bcr || m_bc == 3563) ? 0 : m_bc + 1;
  end

  initial begin
    #2ms failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #30 rst_n = 1;
    for (int c = 0; c < 20000; c++) begin
      @(negedge clk);
      tim_l1a = ($urandom_range(0, 19) == 0);
      tim_ttype = 8'($urandom());
      tim_ecr = (c == 5000 || c == 12001);
      tim_bcr = (c == 777);
    end
    use_tim = 0;
    for (int c = 0; c < 500; c++) begin
      @(negedge clk);
      tim_l1a = 1;   // ignored in PPC mode
      ppc_trig = ($urandom_range(0, 9) == 0);
    end
    @(negedge clk) ppc_trig = 0; tim_l1a = 0;
    @(negedge clk);
    @(negedge clk);
    checks++;
    if (exp_q.size() != 0 || n_ecr != 2 || n_bcr != 1 || n_wrap < 4) begin
      failures++; $display("FAIL coverage q=%0d ecr=%0d bcr=%0d wrap=%0d", exp_q.size(), n_ecr, n_bcr, n_wrap);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
