// mm_kcm: multiplierless constant coefficient multiplier (KCM-MM),
// y = x * COEF, built only from hardwired shifts, adders and subtractors.
//
// COEF is recoded at elaboration into +1 and -1 digits (conv_pkg::csd_recode):
// a -1 digit appears only where it reduces the number of non-zero digits, so
// 14 = 1110b becomes 2^4 - 2^1 while 27 = 11011b stays binary. Each +1 digit
// at position i adds x << i and each -1 digit subtracts it. Repeated digit
// pairs are then shared (conv_pkg::ss_plan): one adder forms
// t = x +- (x << gap) and every occurrence of the pair adds or subtracts a
// shifted copy of t, e.g. 27x = t + (t << 3) with t = x + (x << 1). Sums are
// formed modulo 2^(K+CW), which is exact because the product always fits.
// Only one shared sub-expression is extracted (the one used most often).
// Purely combinational.
// Shift-and-add, the recoding rule and the shared sub-expression follow the
// multiplierless multiplier; extracting a single shared pair is this design's
// simplification of a full sharing search.
module mm_kcm #(
  parameter int unsigned K  = 8,
  parameter int unsigned CW = 8,
  parameter logic [CW-1:0] COEF = CW'(27)
) (
  input  logic [K-1:0]    x,
  output logic [K+CW-1:0] y
);

  localparam int unsigned OW = K + CW;
  localparam conv_pkg::csd_t DIG = conv_pkg::csd_recode(conv_pkg::MAX_CW'(COEF));
  localparam conv_pkg::ss_t  SS  = conv_pkg::ss_plan(DIG);

  logic [OW-1:0] t;

  // shared sub-expression
  assign t = SS.neg_pair ? OW'(x) - (OW'(x) << SS.gap) : OW'(x) + (OW'(x) << SS.gap);

  always_comb begin
    y = '0;
    for (int i = 0; i <= CW; i++) begin
      if (SS.tpos[i]) y = y + (t << i);
      if (SS.tneg[i]) y = y - (t << i);
      if (SS.pos[i])  y = y + (OW'(x) << i);
      if (SS.neg[i])  y = y - (OW'(x) << i);
    end
  end

endmodule
