// Testbench of the PRM VME slave. A VME master in the testbench writes and
// reads registers at the board's own address, writes through the
// broadcast address 0x25, and checks that a broadcast read gets BERR*,
// that other boards' addresses and other address modifiers get no answer,
// and that DTACK* is held until the data strobes are released.
module tb_vme_slave;
  logic clk = 0, rst_n = 0;
  logic [7:0] board_addr = 8'h12;
  logic [23:0] vme_addr = 0;
  logic [5:0] vme_am = 6'h39;
  logic vme_as_n = 1, vme_ds0_n = 1, vme_ds1_n = 1, vme_write_n = 1;
  logic [31:0] vme_data_in = 0, vme_data_out;
  logic vme_data_oe, vme_dtack_n, vme_berr_n;
  logic reg_wr, reg_rd, reg_bcast;
  logic [5:0] reg_addr;
  logic [31:0] reg_wdata, reg_rdata;
  int checks = 0, failures = 0;
  logic [31:0] regs [64];

  vme_slave dut (.*);
  always #12.5 clk = ~clk;

  // register model behind the slave
  assign reg_rdata = regs[reg_addr];
  int n_wr = 0, n_bc = 0;
  always @(posedge clk) if (reg_wr) begin regs[reg_addr] <= reg_wdata; n_wr++; if (reg_bcast) n_bc++; end

  task automatic expect_val(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  // result: 0 = DTACK, 1 = BERR, 2 = no answer
  task automatic cycle(input logic wr, input logic [23:0] a, input logic [5:0] am,
                       input logic [31:0] d, output int res, output logic [31:0] q);
    int t = 0;
    vme_addr = a; vme_am = am; vme_write_n = !wr; vme_data_in = d;
    #40 vme_as_n = 0;
    #10 vme_ds0_n = 0; vme_ds1_n = 0;
    while (vme_dtack_n && vme_berr_n && t < 40) begin #25; t++; end
    res = !vme_dtack_n ? 0 : (!vme_berr_n ? 1 : 2);
    q = vme_data_out;
    if (res == 0 && !wr) begin checks++; if (!vme_data_oe) begin failures++; $display("FAIL no data oe"); end end
    #100;
    if (res != 2) begin checks++; if (vme_dtack_n && vme_berr_n) begin failures++; $display("FAIL ack dropped early"); end end
    vme_ds0_n = 1; vme_ds1_n = 1; #10 vme_as_n = 1;
    #150;
    checks++;
    if (!vme_dtack_n || !vme_berr_n || vme_data_oe) begin failures++; $display("FAIL ack not released"); end
  endtask

  initial begin
    #1000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int r;
    logic [31:0] q, v;
    foreach (regs[i]) regs[i] = 32'(i) * 32'h0101_0101;
    #100 rst_n = 1;
    #100;
    for (int i = 0; i < 6; i++) begin
      v = $urandom();
      cycle(1, {8'h12, 8'h00, 6'(i + 1), 2'b00}, 6'h39, v, r, q);
      expect_val(r, 0, "own write DTACK");
      cycle(0, {8'h12, 8'h00, 6'(i + 1), 2'b00}, 6'h3D, 0, r, q);
      expect_val(r, 0, "own read DTACK");
      expect_val(q, v, "own read data");
    end
    expect_val(n_wr, 6, "write pulses");
    cycle(1, {8'h25, 8'h00, 6'd9, 2'b00}, 6'h39, 32'hCAFE_0001, r, q);
    expect_val(r, 0, "broadcast write DTACK");
    expect_val(n_bc, 1, "broadcast write flagged");
    cycle(0, {8'h12, 8'h00, 6'd9, 2'b00}, 6'h39, 0, r, q);
    expect_val(q, 32'hCAFE_0001, "broadcast write landed");
    cycle(0, {8'h25, 8'h00, 6'd9, 2'b00}, 6'h39, 0, r, q);
    expect_val(r, 1, "broadcast read gives BERR");
    cycle(1, {8'h13, 8'h00, 6'd9, 2'b00}, 6'h39, 32'h1, r, q);
    expect_val(r, 2, "other board silent");
    cycle(1, {8'h12, 8'h00, 6'd9, 2'b00}, 6'h09, 32'h1, r, q);
    expect_val(r, 2, "A32 AM ignored");
    expect_val(regs[9], 32'hCAFE_0001, "ignored writes changed nothing");
    expect_val(n_wr, 7, "write pulse count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
