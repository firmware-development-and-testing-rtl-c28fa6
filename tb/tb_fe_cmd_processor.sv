// Testbench of the FE command processor. The serial output is parsed
// here: a 5-bit LV1 pattern 11101, or a 24-bit slow command with the
// header 10110. Triggers arrive at random, some while a slow command is
// on the line; every trigger must give exactly one LV1, slow commands must
// come out whole and in order, and an LV1 requested on an idle line must
// start in the next cycle.
module tb_fe_cmd_processor;
  logic clk = 0, rst_n = 0, lv1_req = 0, slow_valid = 0;
  logic [31:0] slow_cmd = 0;
  logic [5:0] slow_len = 24;
  logic slow_ready, cmd_out, busy;
  logic [15:0] lv1_sent;
  int checks = 0, failures = 0;
  fe_cmd_processor dut (.*);
  always #12.5 clk = ~clk;

  logic [18:0] slow_q [$];
  int n_trig = 0, n_lv1 = 0, n_slow = 0, n_wait = 0;

  // parser
  logic [4:0] hdr;
  int state = 0, cnt = 0;
  logic [18:0] pay;
  always @(posedge clk) if (rst_n) begin
    #1;
    case (state)
      0: if (cmd_out) begin hdr = 5'b1; cnt = 1; state = 1; end
      1: begin
        hdr = {hdr[3:0], cmd_out}; cnt++;
        if (cnt == 5) begin
          if (hdr == 5'b11101) begin n_lv1++; state = 0; end
          else if (hdr == 5'b10110) begin state = 2; cnt = 0; pay = 0; end
          else begin failures++; checks++; $display("FAIL bad header %b", hdr); state = 0; end
        end
      end
      2: begin
        pay = {pay[17:0], cmd_out}; cnt++;
        if (cnt == 19) begin
          automatic logic [18:0] e = slow_q.pop_front();
          checks++;
          if (pay !== e) begin failures++; $display("FAIL slow %h expected %h", pay, e); end
          n_slow++;
          state = 0;
        end
      end
      default: state = 0;
    endcase
  end

  initial begin
    #2ms failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #30 rst_n = 1;
    // immediate LV1 on idle line
    @(negedge clk) lv1_req = 1; n_trig++;
    @(negedge clk) lv1_req = 0;
    checks++;
    if (cmd_out !== 1'b1) begin failures++; $display("FAIL LV1 not immediate"); end
    repeat (10) @(negedge clk);
    for (int c = 0; c < 6000; c++) begin
      @(negedge clk);
      lv1_req = ($urandom_range(0, 39) == 0);
      if (lv1_req) begin n_trig++; if (busy) n_wait++; end
      if (took) begin slow_valid = 0; took = 0; end
      if (!slow_valid && $urandom_range(0, 29) == 0) begin
        automatic logic [18:0] p = 19'($urandom());
        slow_cmd = {8'd0, 5'b10110, p};
        slow_q.push_back(p);
        slow_valid = 1;
      end
    end
    @(negedge clk) lv1_req = 0;
    while (slow_valid) begin @(negedge clk); if (took) begin slow_valid = 0; took = 0; end end
    repeat (200) @(negedge clk);
    checks++;
    if (n_lv1 != n_trig || lv1_sent != 16'(n_trig) || slow_q.size() != 0 || n_slow < 50 || n_wait < 10) begin
      failures++;
      $display("FAIL counts lv1 %0d/%0d slow left %0d slow %0d waited %0d", n_lv1, n_trig, slow_q.size(), n_slow, n_wait);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // the processor took the slow command at the last clock edge
  bit took = 0;
  always @(posedge clk) if (slow_ready && slow_valid) took = 1;
endmodule
