// Coarse delay of one BOC transmit line.
//
// A shift register clocked at 160 MHz with a selectable output tap, used
// to align the command/clock stream of each front-end link: the line
// leaves `tap`+1 clock cycles (6.25 ns steps) after it entered. The tap may
// be changed at any time; the output then jumps to the new position.
// The variable-tap shift register at 160 MHz follows the text; its depth
// (DEPTH = 32, up to 200 ns) is this design's choice.
module coarse_delay #(
  parameter int unsigned DEPTH = 32
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     din,
  input  logic [$clog2(DEPTH)-1:0] tap,
  output logic                     dout
);

  logic [DEPTH-1:0] sr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sr <= '0;
    else        sr <= {sr[DEPTH-2:0], din};
  end

  assign dout = sr[tap];

endmodule
