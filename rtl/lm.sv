// lm: LUT based constant coefficient multiplier (KCM-LM), y = x * COEF.
//
// The K-bit input is split into NC = ceil(K/CHUNK) chunks. Every chunk
// addresses its own ROM of 2^CHUNK words holding chunk * COEF
// (CHUNK + CW bits), and the ROM outputs are added with a shift of CHUNK bits
// per chunk (conv_adders with one tap). For K = CW = 8 and CHUNK = 4 this is
// the two 16x12 LUTs and the 12-bit adder with 4 bypassed LSBs; for
// K = CW = 14 and CHUNK = 7 it is the two 21-bit-wide tables of the 14-bit
// multiplier. The ROM contents are computed at elaboration from COEF; how a
// table is spread over block RAM and LUTs is left to synthesis.
// Purely combinational.
// Splitting the input and adding shifted table outputs follows the LUT
// multiplier; the coefficient value 173 is only a default.
module lm #(
  parameter int unsigned K     = 8,
  parameter int unsigned CW    = 8,
  parameter int unsigned CHUNK = 4,
  parameter logic [CW-1:0] COEF = CW'(173)
) (
  input  logic [K-1:0]    x,
  output logic [K+CW-1:0] y
);

  localparam int unsigned NC = (K + CHUNK - 1) / CHUNK;
  localparam int unsigned PW = CHUNK + CW;

  typedef logic [PW-1:0] rom_t [2**CHUNK];

  function automatic rom_t make_rom();
    rom_t r;
    for (int a = 0; a < 2**CHUNK; a++) r[a] = PW'(a) * PW'(COEF);
    return r;
  endfunction

  localparam rom_t ROM = make_rom();

  logic [NC*CHUNK-1:0] xp;
  logic [PW-1:0]       p [1][NC];

  assign xp = (NC*CHUNK)'(x);

  always_comb begin
    for (int c = 0; c < NC; c++) p[0][c] = ROM[xp[c*CHUNK +: CHUNK]];
  end

  conv_adders #(.N(1), .NC(NC), .CHUNK(CHUNK), .PW(PW), .OW(K+CW)) u_add (
    .p (p),
    .y (y)
  );

endmodule
