// conv_pkg: constants and elaboration-time helpers shared by the LUT and
// multiplierless convolver blocks.
//
// csd_pos / csd_neg return the +1 and -1 digit masks of the modified
// canonic-signed-digit recoding used by the shift-and-add constant
// multiplier. A -1 digit is only introduced when it lowers the number of
// non-zero digits: a run of three or more ones, bits b..t, is rewritten as
// +2^(t+1) - 2^b, while runs of one or two ones are kept as plain binary.
// The carry into bit t+1 may lengthen the next run, which the scan then
// handles like any other run. The value always equals pos - neg.
//
// ss_plan applies substructure sharing to a recoded coefficient. A
// sub-expression t = x + r*(x << gap), r = +-1, stands for a pair of digits
// gap apart whose signs have product r. For every gap and r the digits are
// scanned from the bottom and paired greedily without overlap; the (gap, r)
// that covers most pairs is chosen if it covers at least two, since only
// then is the shared adder used more than once. The coefficient is then
// sum over pair starts i of +-(t << i) plus the unpaired digits +-(x << i).
// Example: 27 = 11011b gives t = x + (x << 1), 27x = t + (t << 3).
package conv_pkg;

  localparam int unsigned MAX_CW = 32;

  typedef struct packed {
    logic [MAX_CW:0] pos;
    logic [MAX_CW:0] neg;
  } csd_t;

  function automatic csd_t csd_recode(input logic [MAX_CW-1:0] coef);
    logic [MAX_CW+1:0] v;
    csd_t r;
    int unsigned i, len;
    v = {2'b00, coef};
    r = '0;
    i = 0;
    while (i <= MAX_CW) begin
      if (!v[i]) begin
        i++;
      end else begin
        len = 0;
        while ((i + len) <= MAX_CW && v[i+len]) len++;
        if (len >= 3) begin
          r.neg[i] = 1'b1;
          v = v + ((MAX_CW+2)'(1) << i);
        end else begin
          for (int unsigned j = 0; j < len; j++) r.pos[i+j] = 1'b1;
        end
        i = i + len;
      end
    end
    return r;
  endfunction

  typedef struct packed {
    logic                  used;      // a shared sub-expression is used
    logic [7:0]            gap;      // distance of the two digits
    logic                  neg_pair;  // r = -1: t = x - (x << gap)
    logic [MAX_CW:0]       tpos;      // +t << i
    logic [MAX_CW:0]       tneg;      // -t << i
    logic [MAX_CW:0]       pos;       // remaining +x << i
    logic [MAX_CW:0]       neg;       // remaining -x << i
  } ss_t;

  function automatic int digit(input csd_t c, input int i);
    if (i < 0 || i > MAX_CW) return 0;
    if (c.pos[i]) return 1;
    if (c.neg[i]) return -1;
    return 0;
  endfunction

  function automatic ss_t ss_plan(input csd_t c);
    ss_t best;
    int best_cnt;
    best = '0;
    best.pos = c.pos;
    best.neg = c.neg;
    best_cnt = 1;
    for (int gap = 1; gap <= MAX_CW; gap++) begin
      for (int r = -1; r <= 1; r += 2) begin
        ss_t cand;
        int cnt;
        logic [MAX_CW:0] taken;
        cand = '0;
        cand.used = 1'b1;
        cand.gap = 8'(gap);
        cand.neg_pair = (r < 0);
        taken = '0;
        cnt = 0;
        for (int i = 0; i + gap <= MAX_CW; i++) begin
          if (!taken[i] && !taken[i+gap] && digit(c, i) != 0 &&
              digit(c, i) * digit(c, i + gap) == r) begin
            taken[i] = 1'b1;
            taken[i+gap] = 1'b1;
            if (digit(c, i) > 0) cand.tpos[i] = 1'b1;
            else                 cand.tneg[i] = 1'b1;
            cnt++;
          end
        end
        cand.pos = c.pos & ~taken;
        cand.neg = c.neg & ~taken;
        if (cnt > best_cnt) begin
          best = cand;
          best_cnt = cnt;
        end
      end
    end
    return best;
  endfunction

endpackage
