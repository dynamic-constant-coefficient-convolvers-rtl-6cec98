// conv_adders: adders block of a LUT based multiplier or convolver.
//
// Input p[k][c] is the partial product of tap k for input chunk c, i.e.
// h(k) * chunk_c(x(i-k)), of weight 2^(c*CHUNK). The block first adds all
// partial products of the same weight over all taps (one adder group per
// chunk, like Adder1 for the M LUTs and Adder0 for the L LUTs of a 2-tap,
// 8-bit convolver) and then adds the groups with hardwired shifts (Adder2,
// whose low CHUNK bits pass straight from the least significant group).
// Combinational; the caller registers the result where it wants.
// With N = 1 this is the adder of a single LUT multiplier.
// The grouping of equal-weight products into one adder network follows the
// LUT convolver structure; the tree itself is written behaviourally rather
// than as a searched optimal netlist of two-input adders.
module conv_adders #(
  parameter int unsigned N     = 2,   // taps
  parameter int unsigned NC    = 2,   // input chunks per tap
  parameter int unsigned CHUNK = 4,   // chunk width
  parameter int unsigned PW    = 12,  // partial product width
  parameter int unsigned OW    = 18   // output width
) (
  input  logic [PW-1:0] p [N][NC],
  output logic [OW-1:0] y
);

  localparam int unsigned GW = PW + ((N > 1) ? $clog2(N) : 0);

  logic [GW-1:0] grp [NC];

  always_comb begin
    for (int c = 0; c < NC; c++) begin
      grp[c] = '0;
      for (int k = 0; k < N; k++) grp[c] = grp[c] + GW'(p[k][c]);
    end
    y = '0;
    for (int c = 0; c < NC; c++) y = y + (OW'(grp[c]) << (c * CHUNK));
  end

endmodule
