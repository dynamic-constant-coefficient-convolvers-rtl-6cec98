// fir_pipe_opt: the filter H(z) = 2 + 5z^-1 - 5z^-2 with grouped similar
// coefficients and optimised pipelining.
//
// The two taps of coefficient +-5 share one multiplier: a subtractor forms
// x(i-1) - x(i-2) and a ROM ("LUT x5") multiplies the difference by 5. In a
// straightforward pipeline the subtractor would be fed from the delay line
// and the 2x path would need balancing registers. Here the subtractor is fed
// from the input and the input register, x(i) - x(i-1), so the result reaches
// the final adder exactly when 2*x(i) arrives through the same input register.
//
// Pipeline (x(n) applied in cycle n): x1 = x(n-1), d = x(n-1)-x(n-2),
// m = 5*(x(n-2)-x(n-3)), y <= 2*x1 + m. y(n) appears in cycle n+2.
// Input unsigned, output two's complement. The ROM has 2^(K+1) entries,
// computed at elaboration.
// The filter, the grouping into one x5 table and the relocated subtractor
// feed follow the pipelining example; the exact register count per path and
// the 8-bit input width are this design's reading of it.
module fir_pipe_opt #(
  parameter int unsigned K = 8,
  localparam int unsigned OW = K + 5
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic        [K-1:0]  x,
  output logic signed [OW-1:0] y
);

  localparam int unsigned DW = K + 1;    // signed difference
  localparam int unsigned MW = K + 4;    // signed 5*difference

  typedef logic signed [MW-1:0] rom_t [2**DW];

  function automatic rom_t make_rom();
    rom_t r;
    for (int a = 0; a < 2**DW; a++) r[a] = MW'(signed'(DW'(a)) * 5);
    return r;
  endfunction

  localparam rom_t LUT5 = make_rom();

  logic        [K-1:0]  x1;
  logic signed [DW-1:0] d;
  logic signed [MW-1:0] m;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x1 <= '0;
      d  <= '0;
      m  <= '0;
      y  <= '0;
    end else begin
      x1 <= x;
      d  <= signed'({1'b0, x}) - signed'({1'b0, x1});
      m  <= LUT5[d];
      y  <= signed'(OW'({x1, 1'b0})) + OW'(m);
    end
  end

endmodule
