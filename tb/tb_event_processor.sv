// Testbench of the event processor. Event records are pushed at random;
// two slaves take them at independent random rates. Each slave must see
// every record once and in order; a record is removed only after both
// took it. Filling the queue beyond its depth must set the overflow flag.
module tb_event_processor;
  import ibl_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0;
  evt_t in_evt, evt;
  logic [1:0] evt_valid, take = 0;
  logic overflow;
  logic [4:0] queued;
  int checks = 0, failures = 0;
  event_processor #(.DEPTH(16)) dut (.*);
  always #12.5 clk = ~clk;

  evt_t sent [$];
  int idx [2] = '{0, 0};
  always @(posedge clk) if (rst_n) begin
    for (int s = 0; s < 2; s++) if (take[s] && evt_valid[s]) begin
      checks++;
      if (evt !== sent[idx[s]]) begin failures++; $display("FAIL slave %0d event %0d", s, idx[s]); end
      idx[s]++;
    end
  end

  initial begin
    #1ms failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_evt = '0;
    #30 rst_n = 1;
    for (int c = 0; c < 5000; c++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 9) == 0) && queued < 15;
      in_evt = '{l1id: 24'(sent.size()), bcid: 12'($urandom()), ttype: 8'($urandom())};
      if (in_valid) sent.push_back(in_evt);
      take[0] = ($urandom_range(0, 3) == 0);
      take[1] = ($urandom_range(0, 5) == 0);
    end
    @(negedge clk) in_valid = 0; take = 2'b11;
    repeat (40) @(negedge clk);
    checks++;
    if (idx[0] != sent.size() || idx[1] != sent.size() || overflow || sent.size() < 300) begin
      failures++; $display("FAIL delivered %0d %0d of %0d", idx[0], idx[1], sent.size());
    end
    take = 0;
    repeat (20) begin @(negedge clk) in_valid = 1; end
    @(negedge clk) in_valid = 0;
    checks++;
    if (!overflow) begin failures++; $display("FAIL no overflow"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
