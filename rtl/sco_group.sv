// sco_group: similar coefficient grouping for a convolver.
//
// Taps whose coefficients equal one common coefficient h times +-2^s are
// merged ahead of a single multiplier: this block forms
//   a = sum_j (-1)^NEGS[j] * (x[j] << SHIFTS[j])
// from the grouped delayed inputs x[j], so that the group's contribution to
// the filter output is h * a. The default is the group of coefficient 5 in
// 5z^-i - 5z^-j - 10z^-k + 20z^-l, i.e. a = x_i - x_j - 2 x_k + 4 x_l.
// Inputs are unsigned, the output is two's complement and wide enough for
// every input combination. Purely combinational.
// Grouping by shift and sign and the default group follow the similar
// coefficients optimisation; the output width rule is this design's.
module sco_group #(
  parameter int unsigned N = 4,
  parameter int unsigned W = 8,
  parameter int unsigned SHIFTS [N] = '{0, 0, 1, 2},
  parameter bit          NEGS   [N] = '{1'b0, 1'b1, 1'b1, 1'b0},
  localparam int unsigned AW = W + max_shift() + ((N > 1) ? $clog2(N) : 0) + 1
) (
  input  logic        [W-1:0]  x [N],
  output logic signed [AW-1:0] a
);

  function automatic int unsigned max_shift();
    int unsigned m = 0;
    for (int j = 0; j < N; j++) if (SHIFTS[j] > m) m = SHIFTS[j];
    return m;
  endfunction

  always_comb begin
    a = '0;
    for (int j = 0; j < N; j++) begin
      if (NEGS[j]) a = a - (AW'(x[j]) << SHIFTS[j]);
      else         a = a + (AW'(x[j]) << SHIFTS[j]);
    end
  end

endmodule
