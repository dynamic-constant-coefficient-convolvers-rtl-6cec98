// klc: constant coefficient LUT based convolver,
// y(i) = sum_{k=0}^{N-1} h(k) * x(i-k), h(k) = COEFS[k] fixed at elaboration.
//
// The input passes through a delay line of N-1 registers. Each tap splits
// its delayed sample into chunks of CHUNK bits and looks each chunk up in a
// ROM holding chunk * h(k). The partial products are not summed per
// multiplier: all of them go into one adders block (conv_adders) that first
// adds the products of equal weight over all taps and then combines the
// weights with shifts, which is cheaper than a sum of separate LUT
// multipliers.
//
// Similar coefficient grouping (SCO = 1): taps whose coefficients have the
// same odd part, h(j) = odd * 2^s(j), share one set of tables. Their delayed
// samples are first added, each shifted by s(j) - s_min of its group, and the
// sum is multiplied by odd * 2^s_min in the tables of the group's first tap
// (its leader). The other taps of the group get no tables (their partial
// products are zero). A tap alone in its group is built exactly as without
// grouping. The group sums are wider than a sample, so with SCO = 1 every
// tap has ceil((K+CW+clog2(N))/CHUNK) chunks; the upper chunks of an
// ungrouped tap are constant zero and vanish in synthesis.
//
// Timing: the adders block output is registered, so x(i) on the input during
// cycle c gives y(i) in cycle c+1. With LUT_REG = 1 the table outputs are
// registered as well (one table level between registers) and y(i) comes in
// cycle c+2. Input and coefficients are unsigned.
// One adders block for all taps and the grouping of similar coefficients
// follow the LUT convolver; the output register, unsigned arithmetic (so
// only shifts, no negation, in a group) and the example coefficients are
// this design's choices.
module klc #(
  parameter int unsigned N     = 2,
  parameter int unsigned K     = 8,
  parameter int unsigned CW    = 8,
  parameter int unsigned CHUNK = 4,
  parameter logic [CW-1:0] COEFS [N] = '{CW'(200), CW'(77)},
  parameter bit          SCO   = 1'b1,
  parameter bit          LUT_REG = 1'b0,
  localparam int unsigned OW = K + CW + ((N > 1) ? $clog2(N) : 0) + 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [K-1:0]  x,
  output logic [OW-1:0] y
);

  localparam int unsigned NC  = (K + CHUNK - 1) / CHUNK;
  localparam int unsigned GW  = K + CW + ((N > 1) ? $clog2(N) : 0);
  localparam int unsigned NCG = SCO ? (GW + CHUNK - 1) / CHUNK : NC;
  localparam int unsigned XW  = NCG * CHUNK;
  localparam int unsigned PW  = CHUNK + CW;

  typedef logic [PW-1:0] rom_t [2**CHUNK];

  function automatic rom_t make_rom(input logic [CW-1:0] h);
    rom_t r;
    for (int a = 0; a < 2**CHUNK; a++) r[a] = PW'(a) * PW'(h);
    return r;
  endfunction

  // odd part and power of two of a coefficient (0 has odd part 0)
  function automatic logic [CW-1:0] odd_of(input logic [CW-1:0] c);
    logic [CW-1:0] v = c;
    for (int i = 0; i < CW; i++) if (v != 0 && !v[0]) v = v >> 1;
    return v;
  endfunction

  function automatic int unsigned sh_of(input logic [CW-1:0] c);
    logic [CW-1:0] v = c;
    int unsigned s = 0;
    for (int i = 0; i < CW; i++) if (v != 0 && !v[0]) begin v = v >> 1; s++; end
    return s;
  endfunction

  // first tap whose coefficient has the same odd part as tap k
  function automatic int unsigned leader(input int unsigned k);
    for (int unsigned j = 0; j < k; j++)
      if (odd_of(COEFS[j]) == odd_of(COEFS[k])) return j;
    return k;
  endfunction

  // smallest power of two in the group of tap k
  function automatic int unsigned min_sh(input int unsigned k);
    int unsigned m = sh_of(COEFS[k]);
    for (int unsigned j = 0; j < N; j++)
      if (odd_of(COEFS[j]) == odd_of(COEFS[k]) && sh_of(COEFS[j]) < m) m = sh_of(COEFS[j]);
    return m;
  endfunction

  logic [K-1:0]  xd   [N];
  logic [XW-1:0] term [N][N];   // term[g][j]: tap j's share of group sum g
  logic [XW-1:0] gsum [N];
  logic [PW-1:0] p    [N][NCG];
  logic [PW-1:0] p_q  [N][NCG];
  logic [OW-1:0] sum;

  assign xd[0] = x;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 1; k < N; k++) xd[k] <= '0;
      y <= '0;
    end else begin
      for (int k = 1; k < N; k++) xd[k] <= xd[k-1];
      y <= sum;
    end
  end

  for (genvar g = 0; g < N; g++) begin : g_tap
    localparam int unsigned   LEAD = SCO ? leader(g) : g;
    localparam logic [CW-1:0] GC   = SCO ? CW'(odd_of(COEFS[g]) << min_sh(g)) : COEFS[g];
    localparam rom_t          ROM  = make_rom(GC);

    for (genvar j = 0; j < N; j++) begin : g_term
      localparam bit          MEMBER = SCO ? (LEAD == g && leader(j) == g) : (j == g);
      localparam int unsigned REL    = SCO ? sh_of(COEFS[j]) - min_sh(j) : 0;
      assign term[g][j] = MEMBER ? (XW'(xd[j]) << REL) : '0;
    end

    always_comb begin
      gsum[g] = '0;
      for (int j = 0; j < N; j++) gsum[g] = gsum[g] + term[g][j];
    end

    for (genvar c = 0; c < NCG; c++) begin : g_chunk
      assign p[g][c] = ROM[gsum[g][c*CHUNK +: CHUNK]];
    end
  end

  // optional pipeline register between the tables and the adders block
  if (LUT_REG) begin : g_lut_reg
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int k = 0; k < N; k++)
          for (int c = 0; c < NCG; c++) p_q[k][c] <= '0;
      end else begin
        p_q <= p;
      end
    end
  end else begin : g_no_lut_reg
    assign p_q = p;
  end

  conv_adders #(.N(N), .NC(NCG), .CHUNK(CHUNK), .PW(PW), .OW(OW)) u_add (
    .p (p_q),
    .y (sum)
  );

endmodule
