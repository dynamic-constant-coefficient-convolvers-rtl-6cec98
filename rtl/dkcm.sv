// dkcm: dynamic constant coefficient multiplier, y = x * coefficient, where
// the coefficient lives in LUT RAMs and can be changed at run time.
//
// Structure: the K-bit input is split into NC = K/CHUNK chunks; each chunk
// addresses a lut_ram through a 2:1 address multiplexer, and the RAM outputs
// are shift-added (conv_adders). A single rpu feeds all RAMs with the same
// address / data sequence, so all RAMs end up holding addr * coefficient.
//
// Interface and timing: pulse load for one cycle with the new coefficient on
// coef. not_ready rises in the next cycle and stays high for 2^CHUNK cycles
// while the multiplexers route the programming address to the RAMs; y is not
// meaningful during that time. Afterwards y = x * coef combinationally in the
// same cycle (asynchronous RAM read plus adder, no register).
// The multiplexer select is the RPU's busy flag; multiplexers rather than
// tri-state buffers are used.
// Structure (RAMs, 2:1 address multiplexers, one RPU, shift-add) follows the
// 8x8 dynamic multiplier; select source and timing are this design's choices.
module dkcm #(
  parameter int unsigned K     = 8,
  parameter int unsigned CW    = 8,
  parameter int unsigned CHUNK = 4
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [K-1:0]    x,
  input  logic [CW-1:0]   coef,
  input  logic            load,
  output logic            not_ready,
  output logic [K+CW-1:0] y
);

  localparam int unsigned NC = (K + CHUNK - 1) / CHUNK;
  localparam int unsigned PW = CHUNK + CW;

  logic [CHUNK-1:0]    addr_pr;
  logic [PW-1:0]       data_pr;
  logic [0:0]          we;
  logic [CW-1:0]       coef_a [1];
  logic [NC*CHUNK-1:0] xp;
  logic [PW-1:0]       p [1][NC];

  assign coef_a[0] = coef;
  assign xp        = (NC*CHUNK)'(x);

  rpu #(.NT(1), .AW(CHUNK), .CW(CW)) u_rpu (
    .clk   (clk),
    .rst_n (rst_n),
    .load  (load),
    .coef  (coef_a),
    .busy  (not_ready),
    .addr  (addr_pr),
    .data  (data_pr),
    .we    (we)
  );

  for (genvar c = 0; c < NC; c++) begin : g_chunk
    logic [CHUNK-1:0] ram_addr;
    assign ram_addr = not_ready ? addr_pr : xp[c*CHUNK +: CHUNK];
    lut_ram #(.AW(CHUNK), .DW(PW)) u_ram (
      .clk   (clk),
      .we    (we[0]),
      .addr  (ram_addr),
      .wdata (data_pr),
      .rdata (p[0][c])
    );
  end

  conv_adders #(.N(1), .NC(NC), .CHUNK(CHUNK), .PW(PW), .OW(K+CW)) u_add (
    .p (p),
    .y (y)
  );

endmodule
