// convolver_top: the family of constant and dynamic constant coefficient
// multipliers and convolvers, side by side, each with its own ports and a
// shared clock and reset.
//
//  c_*  : dklc, DKLC-C with one serial RPU (3 taps, 8-bit data/coefficients);
//         the arrangement for coefficients that change once per frame.
//  m_*  : dklc, DKLC-M with one RPU per tap (parallel programming).
//  k_*  : klc, 2-tap constant LUT convolver with h = {200, 77}.
//  d_*  : dkcm, 8x8 dynamic constant coefficient multiplier.
//  l_*  : lm, 8x8 LUT constant multiplier (coefficient 173).
//  mm_* : mm_kcm, 8x8 multiplierless constant multiplier (coefficient 27).
//  s_*  : a similar-coefficient group, s_y = 5 * (x0 - x1 - 2 x2 + 4 x3),
//         sco_group followed by one multiplierless x5 multiplier.
//  f_*  : fir_pipe_opt, pipelined 2 + 5z^-1 - 5z^-2 filter.
// Timing of each part is given in its own module. Combinational parts
// (l, mm, s, d's product) have no registers.
module convolver_top (
  input  logic               clk,
  input  logic               rst_n,
  // DKLC-C, serial RPU
  input  logic [7:0]         c_x,
  input  logic [7:0]         c_coef [3],
  input  logic               c_load,
  output logic               c_not_ready,
  output logic [18:0]        c_y,
  // DKLC-M, parallel RPUs
  input  logic [7:0]         m_x,
  input  logic [7:0]         m_coef [3],
  input  logic               m_load,
  output logic               m_not_ready,
  output logic [18:0]        m_y,
  // KLC
  input  logic [7:0]         k_x,
  output logic [17:0]        k_y,
  // DKCM
  input  logic [7:0]         d_x,
  input  logic [7:0]         d_coef,
  input  logic               d_load,
  output logic               d_not_ready,
  output logic [15:0]        d_y,
  // LM and MM constant multipliers
  input  logic [7:0]         l_x,
  output logic [15:0]        l_y,
  input  logic [7:0]         mm_x,
  output logic [15:0]        mm_y,
  // similar coefficient group times 5
  input  logic [7:0]         s_x [4],
  output logic signed [15:0] s_y,
  // pipelined filter
  input  logic [7:0]         f_x,
  output logic signed [12:0] f_y
);

  dklc #(.MUX_AT_INPUT(1'b1), .PARALLEL_RPU(1'b0)) u_dklc_c (
    .clk (clk), .rst_n (rst_n), .x (c_x), .coef (c_coef), .load (c_load),
    .not_ready (c_not_ready), .y (c_y)
  );

  dklc #(.MUX_AT_INPUT(1'b0), .PARALLEL_RPU(1'b1)) u_dklc_m (
    .clk (clk), .rst_n (rst_n), .x (m_x), .coef (m_coef), .load (m_load),
    .not_ready (m_not_ready), .y (m_y)
  );

  klc u_klc (.clk (clk), .rst_n (rst_n), .x (k_x), .y (k_y));

  dkcm u_dkcm (
    .clk (clk), .rst_n (rst_n), .x (d_x), .coef (d_coef), .load (d_load),
    .not_ready (d_not_ready), .y (d_y)
  );

  lm     u_lm (.x (l_x),  .y (l_y));
  mm_kcm u_mm (.x (mm_x), .y (mm_y));

  // a = x0 - x1 - 2 x2 + 4 x3 needs 13 bits; 5a needs 16, so a is
  // sign-extended to 16 bits and multiplied modulo 2^16.
  logic signed [12:0] s_a;
  logic        [18:0] s_p;

  sco_group u_sco (.x (s_x), .a (s_a));

  mm_kcm #(.K(16), .CW(3), .COEF(3'd5)) u_x5 (
    .x (16'(s_a)),
    .y (s_p)
  );

  assign s_y = signed'(s_p[15:0]);

  fir_pipe_opt u_fir (.clk (clk), .rst_n (rst_n), .x (f_x), .y (f_y));

endmodule
