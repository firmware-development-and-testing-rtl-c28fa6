// 8b/10b decoder for one front-end link.
//
// FE-I4 data arrive 8b/10b encoded at 160 Mb/s. Each 10-bit symbol
// `sym` = {a,b,c,d,e,i,f,g,h,j} (a, the first bit on the line, is bit 9)
// is split into its 6-bit and 4-bit sub-blocks, which are looked up
// separately and give EDCBA and HGF of the byte. A symbol is a control
// word (`k`) when its 6-bit part is the K.28 code, or when it is one of
// K.23.7, K.27.7, K.29.7, K.30.7 (6-bit code of 23/27/29/30 followed by
// 0111 or 1000). K.28 sub-blocks sent from positive disparity are
// complemented before the 4-bit lookup.
//
// The running disparity (reset to -1) is updated per sub-block; a
// sub-block whose disparity is not allowed by the current running
// disparity raises `disp_err`, a code absent from the tables raises
// `code_err`. Outputs are registered: one cycle after `sym_valid`,
// `out_valid` is high with data, k and the error flags.
// The code tables are those of the standard 8b/10b code (only its K-words
// are printed in the text).
module dec_8b10b (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [9:0] sym,
  input  logic       sym_valid,
  output logic [7:0] data,
  output logic       k,
  output logic       out_valid,
  output logic       code_err,
  output logic       disp_err
);

  logic [5:0] s6;
  logic [3:0] s4;
  assign s6 = sym[9:4];
  assign s4 = sym[3:0];

  // 6b -> 5b
  logic [4:0] v5;
  logic       ok6;
  always_comb begin
    ok6 = 1'b1;
    unique case (s6)
      6'b100111, 6'b011000: v5 = 5'd0;
      6'b011101, 6'b100010: v5 = 5'd1;
      6'b101101, 6'b010010: v5 = 5'd2;
      6'b110001:            v5 = 5'd3;
      6'b110101, 6'b001010: v5 = 5'd4;
      6'b101001:            v5 = 5'd5;
      6'b011001:            v5 = 5'd6;
      6'b111000, 6'b000111: v5 = 5'd7;
      6'b111001, 6'b000110: v5 = 5'd8;
      6'b100101:            v5 = 5'd9;
      6'b010101:            v5 = 5'd10;
      6'b110100:            v5 = 5'd11;
      6'b001101:            v5 = 5'd12;
      6'b101100:            v5 = 5'd13;
      6'b011100:            v5 = 5'd14;
      6'b010111, 6'b101000: v5 = 5'd15;
      6'b011011, 6'b100100: v5 = 5'd16;
      6'b100011:            v5 = 5'd17;
      6'b010011:            v5 = 5'd18;
      6'b110010:            v5 = 5'd19;
      6'b001011:            v5 = 5'd20;
      6'b101010:            v5 = 5'd21;
      6'b011010:            v5 = 5'd22;
      6'b111010, 6'b000101: v5 = 5'd23;
      6'b110011, 6'b001100: v5 = 5'd24;
      6'b100110:            v5 = 5'd25;
      6'b010110:            v5 = 5'd26;
      6'b110110, 6'b001001: v5 = 5'd27;
      6'b001110:            v5 = 5'd28;
      6'b101110, 6'b010001: v5 = 5'd29;
      6'b011110, 6'b100001: v5 = 5'd30;
      6'b101011, 6'b010100: v5 = 5'd31;
      6'b001111, 6'b110000: v5 = 5'd28;   // K.28
      default: begin v5 = 5'd0; ok6 = 1'b0; end
    endcase
  end

  logic is_k28, is_kx7;
  assign is_k28 = (s6 == 6'b001111) || (s6 == 6'b110000);
  assign is_kx7 = (v5 == 5'd23 || v5 == 5'd27 || v5 == 5'd29 || v5 == 5'd30) && ok6 &&
                  (s4 == 4'b0111 || s4 == 4'b1000);

  // 4b -> 3b (K.28 from positive disparity is complemented first)
  logic [3:0] s4d;
  logic [2:0] v3;
  logic       ok4;
  assign s4d = (s6 == 6'b110000) ? ~s4 : s4;
  always_comb begin
    ok4 = 1'b1;
    unique case (s4d)
      4'b1011, 4'b0100: v3 = 3'd0;
      4'b1001:          v3 = 3'd1;
      4'b0101:          v3 = 3'd2;
      4'b1100, 4'b0011: v3 = 3'd3;
      4'b1101, 4'b0010: v3 = 3'd4;
      4'b1010:          v3 = 3'd5;
      4'b0110:          v3 = 3'd6;
      4'b1110, 4'b0001, 4'b0111, 4'b1000: v3 = 3'd7;
      default: begin v3 = 3'd0; ok4 = 1'b0; end
    endcase
  end

  // disparity of the sub-blocks
  logic       rd_pos;                  // running disparity is +1
  logic       rd_mid, bad6, bad4, rd_next;
  logic [2:0] ones6;
  logic [2:0] ones4;
  always_comb begin
    ones6 = 3'(s6[0]) + 3'(s6[1]) + 3'(s6[2]) + 3'(s6[3]) + 3'(s6[4]) + 3'(s6[5]);
    ones4 = 3'(s4[0]) + 3'(s4[1]) + 3'(s4[2]) + 3'(s4[3]);
    bad6   = 1'b0;
    rd_mid = rd_pos;
    if (ones6 == 3'd4)      begin bad6 = rd_pos;  rd_mid = 1'b1; end
    else if (ones6 == 3'd2) begin bad6 = !rd_pos; rd_mid = 1'b0; end
    else if (ones6 == 3'd3) bad6 = (s6 == 6'b111000 && rd_pos) || (s6 == 6'b000111 && !rd_pos);
    bad4    = 1'b0;
    rd_next = rd_mid;
    if (ones4 == 3'd3)      begin bad4 = rd_mid;  rd_next = 1'b1; end
    else if (ones4 == 3'd1) begin bad4 = !rd_mid; rd_next = 1'b0; end
    else if (ones4 == 3'd2) bad4 = (s4 == 4'b1100 && rd_mid) || (s4 == 4'b0011 && !rd_mid);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_pos    <= 1'b0;
      data      <= '0;
      k         <= 1'b0;
      out_valid <= 1'b0;
      code_err  <= 1'b0;
      disp_err  <= 1'b0;
    end else begin
      out_valid <= sym_valid;
      if (sym_valid) begin
        data     <= {v3, v5};
        k        <= is_k28 || is_kx7;
        code_err <= !ok6 || !ok4 || ones6 > 3'd4 || ones6 < 3'd2 || ones4 > 3'd3 || ones4 < 3'd1;
        disp_err <= bad6 || bad4;
        rd_pos   <= rd_next;
      end
    end
  end

endmodule
