// Testbench of the 8b/10b decoder. An encoder written here from the
// 5b/6b and 3b/4b code tables (with running disparity and the alternate
// D.x.A7 rule) produces random data and K-word streams that must decode
// without error; the twelve K-words of the standard table are also
// applied literally for both disparities; corrupted symbols (all zeros,
// all ones, a 6b part of six ones) must be flagged.
module tb_dec_8b10b;
  logic clk = 0, rst_n = 0, sym_valid = 0;
  logic [9:0] sym = 0;
  logic [7:0] data;
  logic k, out_valid, code_err, disp_err;
  int checks = 0, failures = 0;
  dec_8b10b dut (.*);
  always #5 clk = ~clk;

  // RD- forms of the 5b/6b codes (abcdei) for D.0 .. D.31
  logic [5:0] t6 [32] = '{6'b100111, 6'b011101, 6'b101101, 6'b110001, 6'b110101, 6'b101001,
    6'b011001, 6'b111000, 6'b111001, 6'b100101, 6'b010101, 6'b110100, 6'b001101, 6'b101100,
    6'b011100, 6'b010111, 6'b011011, 6'b100011, 6'b010011, 6'b110010, 6'b001011, 6'b101010,
    6'b011010, 6'b111010, 6'b110011, 6'b100110, 6'b010110, 6'b110110, 6'b001110, 6'b101110,
    6'b011110, 6'b101011};
  // RD- forms of the 3b/4b codes (fghj): D.x.0..D.x.P7, then A7 at index 8
  logic [3:0] t4 [9] = '{4'b1011, 4'b1001, 4'b0101, 4'b1100, 4'b1101, 4'b1010, 4'b0110, 4'b1110, 4'b0111};
  logic [3:0] t4k [8] = '{4'b1011, 4'b0110, 4'b1010, 4'b1100, 4'b1101, 4'b0101, 4'b1001, 4'b0111};

  function automatic int ones(input logic [9:0] v, input int w);
    int c = 0;
    for (int i = 0; i < w; i++) c += v[i];
    return c;
  endfunction

  bit rdp = 0;  // encoder running disparity +1
  function automatic logic [9:0] enc(input logic [7:0] b, input bit kk);
    logic [5:0] c6;
    logic [3:0] c4;
    int x = b[4:0], y = b[7:5];
    c6 = kk && x == 28 ? 6'b001111 : t6[x];
    if (rdp && (ones(10'(c6), 6) != 3 || c6 == 6'b111000)) c6 = ~c6;
    if (ones(10'(c6), 6) != 3) rdp = !rdp;
    if (kk) c4 = rdp ? ~t4k[y] : t4k[y];
    else begin
      if (y == 7 && ((!rdp && (x == 17 || x == 18 || x == 20)) || (rdp && (x == 11 || x == 13 || x == 14)))) c4 = t4[8];
      else c4 = t4[y];
      if (rdp && (ones(10'(c4), 4) != 2 || c4 == 4'b1100)) c4 = ~c4;
    end
    if (ones(10'(c4), 4) != 2) rdp = !rdp;
    return {c6, c4};
  endfunction

  logic [7:0] exp_d [$];
  logic       exp_k [$];
  logic       exp_e [$];
  always @(posedge clk) if (rst_n) begin
    #1;
    if (out_valid) begin
      logic [7:0] d; logic kk; logic e;
      d = exp_d.pop_front(); kk = exp_k.pop_front(); e = exp_e.pop_front();
      checks++;
      if (e) begin
        if (!(code_err || disp_err)) begin failures++; $display("FAIL error not flagged"); end
      end else if (data !== d || k !== kk || code_err || disp_err) begin
        failures++;
        $display("FAIL got %h k%0b err%0b%0b expected %h k%0b", data, k, code_err, disp_err, d, kk);
      end
    end
  end

  task automatic send(input logic [9:0] s, input logic [7:0] d, input bit kk, input bit err);
    @(negedge clk);
    sym = s; sym_valid = 1; exp_d.push_back(d); exp_k.push_back(kk); exp_e.push_back(err);
    @(negedge clk) sym_valid = 0;
  endtask

  initial begin
    #1000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // the twelve K-words: {RD-1 form, RD+1 form} from the standard table
  logic [9:0] kt [12][2] = '{
    '{10'b001111_0100, 10'b110000_1011}, '{10'b001111_1001, 10'b110000_0110},
    '{10'b001111_0101, 10'b110000_1010}, '{10'b001111_0011, 10'b110000_1100},
    '{10'b001111_0010, 10'b110000_1101}, '{10'b001111_1010, 10'b110000_0101},
    '{10'b001111_0110, 10'b110000_1001}, '{10'b001111_1000, 10'b110000_0111},
    '{10'b111010_1000, 10'b000101_0111}, '{10'b110110_1000, 10'b001001_0111},
    '{10'b101110_1000, 10'b010001_0111}, '{10'b011110_1000, 10'b100001_0111}};
  logic [7:0] kv [12] = '{8'h1C, 8'h3C, 8'h5C, 8'h7C, 8'h9C, 8'hBC, 8'hDC, 8'hFC, 8'hF7, 8'hFB, 8'hFD, 8'hFE};

  initial begin
    #22 rst_n = 1;
    // table K-words: each RD- form is followed by its RD+ form (RD- -> + -> -)
    for (int i = 0; i < 24; i++) begin
      automatic logic [9:0] s = kt[i % 12][rdp];
      send(s, kv[i % 12], 1, 0);
      if (ones(s, 10) != 5) rdp = !rdp;
    end
    // every data byte, then a random mix
    for (int b = 0; b < 256; b++) send(enc(8'(b), 0), 8'(b), 0, 0);
    for (int i = 0; i < 3000; i++) begin
      if ($urandom_range(0, 9) == 0) begin
        automatic int j = $urandom_range(0, 11);
        send(enc(kv[j], 1), kv[j], 1, 0);
      end else begin
        automatic logic [7:0] b = 8'($urandom());
        send(enc(b, 0), b, 0, 0);
      end
    end
    // corrupted symbols
    send(10'b0000000000, 0, 0, 1);
    send(10'b1111111111, 0, 0, 1);
    send(10'b111111_0101, 0, 0, 1);
    repeat (5) @(negedge clk);
    checks++;
    if (exp_d.size() != 0) begin failures++; $display("FAIL outputs missing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
