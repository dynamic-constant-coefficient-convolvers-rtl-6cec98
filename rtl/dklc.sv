// dklc: dynamic constant coefficient LUT based convolver,
// y(i) = sum_{k=0}^{N-1} h(k) * x(i-k), with h(k) held in LUT RAMs that are
// reprogrammed at run time.
//
// Datapath as in klc: a delay line, NC lut_rams per tap addressed by the
// chunks of the delayed sample, one adders block and an output register
// (y valid one clock after x(i); two clocks with LUT_REG = 1, which also
// registers the RAM outputs). The RAMs are written by RAM programming
// units (rpu), in one of two arrangements chosen by parameters:
//
//  MUX_AT_INPUT = 0 (DKLC-M): a 2:1 address multiplexer in front of every
//    tap's RAMs selects the programming address while programming.
//  MUX_AT_INPUT = 1 (DKLC-C): one multiplexer at the convolver input puts the
//    programming address into the delay line instead of a sample. Tap k sees
//    it k cycles later, so its write enable and write data pass through k
//    matching registers. Programming takes N-1 cycles longer and the delay
//    line holds addresses afterwards: the first N-1 outputs after not_ready
//    falls still contain them.
//
//  PARALLEL_RPU = 0: one rpu programs the taps one after another
//    (N * 2^CHUNK cycles); PARALLEL_RPU = 1: one rpu per tap, all taps at
//    once (2^CHUNK cycles).
//
// Interface: pulse load for one cycle with all new coefficients on coef;
// not_ready is high from the next cycle until the last RAM write is done.
// y is valid for samples applied while not_ready is low (the output
// register still holds one programming-time sum in the cycle not_ready
// falls). In DKLC-M the samples applied while programming still enter the
// delay line; in DKLC-C they are replaced by the programming addresses.
// The default is DKLC-C with a single RPU.
// The two multiplexer placements and the serial/parallel RPU options follow
// the dynamic convolver; the delayed write-enable/data chains that make
// DKLC-C work, the not_ready definition and the defaults are this design's.
module dklc #(
  parameter int unsigned N            = 3,
  parameter int unsigned K            = 8,
  parameter int unsigned CW           = 8,
  parameter int unsigned CHUNK        = 4,
  parameter bit          MUX_AT_INPUT = 1'b1,
  parameter bit          PARALLEL_RPU = 1'b0,
  parameter bit          LUT_REG      = 1'b0,
  localparam int unsigned OW = K + CW + ((N > 1) ? $clog2(N) : 0) + 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [K-1:0]  x,
  input  logic [CW-1:0] coef [N],
  input  logic          load,
  output logic          not_ready,
  output logic [OW-1:0] y
);

  localparam int unsigned NC  = (K + CHUNK - 1) / CHUNK;
  localparam int unsigned PW  = CHUNK + CW;
  localparam int unsigned XW  = NC * CHUNK;

  // raw programming streams, one per tap, as produced by the RPU(s)
  logic [CHUNK-1:0] addr_raw [N];
  logic [PW-1:0]    data_raw [N];
  logic [N-1:0]     we_raw;
  logic             busy;

  if (PARALLEL_RPU) begin : g_par
    logic [N-1:0] busy_t;
    for (genvar k = 0; k < N; k++) begin : g_rpu
      logic [CW-1:0] c1 [1];
      assign c1[0] = coef[k];
      rpu #(.NT(1), .AW(CHUNK), .CW(CW)) u_rpu (
        .clk   (clk),
        .rst_n (rst_n),
        .load  (load),
        .coef  (c1),
        .busy  (busy_t[k]),
        .addr  (addr_raw[k]),
        .data  (data_raw[k]),
        .we    (we_raw[k +: 1])
      );
    end
    assign busy = |busy_t;
  end else begin : g_ser
    logic [CHUNK-1:0] addr_s;
    logic [PW-1:0]    data_s;
    rpu #(.NT(N), .AW(CHUNK), .CW(CW)) u_rpu (
      .clk   (clk),
      .rst_n (rst_n),
      .load  (load),
      .coef  (coef),
      .busy  (busy),
      .addr  (addr_s),
      .data  (data_s),
      .we    (we_raw)
    );
    for (genvar k = 0; k < N; k++) begin : g_fan
      assign addr_raw[k] = addr_s;
      assign data_raw[k] = data_s;
    end
  end

  // input multiplexer (DKLC-C only) and delay line
  logic [XW-1:0] xd [N];
  logic [OW-1:0] sum;
  logic [PW-1:0] p   [N][NC];
  logic [PW-1:0] p_q [N][NC];

  if (MUX_AT_INPUT) begin : g_inmux
    assign xd[0] = busy ? {NC{addr_raw[0]}} : XW'(x);
  end else begin : g_nomux
    assign xd[0] = XW'(x);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 1; k < N; k++) xd[k] <= '0;
      y <= '0;
    end else begin
      for (int k = 1; k < N; k++) xd[k] <= xd[k-1];
      y <= sum;
    end
  end

  // per-tap write port: direct (DKLC-M) or delayed by k cycles (DKLC-C)
  logic [N-1:0] we_tap;
  logic [PW-1:0] data_tap [N];

  for (genvar k = 0; k < N; k++) begin : g_tap
    logic [CHUNK-1:0] ram_addr [NC];

    if (MUX_AT_INPUT && k > 0) begin : g_dly
      logic [k-1:0]  we_sr;
      logic [PW-1:0] data_sr [k];
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          we_sr <= '0;
          for (int d = 0; d < k; d++) data_sr[d] <= '0;
        end else begin
          we_sr[0]   <= we_raw[k];
          data_sr[0] <= data_raw[k];
          for (int d = 1; d < k; d++) begin
            we_sr[d]   <= we_sr[d-1];
            data_sr[d] <= data_sr[d-1];
          end
        end
      end
      assign we_tap[k]   = we_sr[k-1];
      assign data_tap[k] = data_sr[k-1];
    end else begin : g_nodly
      assign we_tap[k]   = we_raw[k];
      assign data_tap[k] = data_raw[k];
    end

    for (genvar c = 0; c < NC; c++) begin : g_chunk
      if (MUX_AT_INPUT) begin : g_a
        assign ram_addr[c] = xd[k][c*CHUNK +: CHUNK];
      end else begin : g_m
        assign ram_addr[c] = busy ? addr_raw[k] : xd[k][c*CHUNK +: CHUNK];
      end
      lut_ram #(.AW(CHUNK), .DW(PW)) u_ram (
        .clk   (clk),
        .we    (we_tap[k]),
        .addr  (ram_addr[c]),
        .wdata (data_tap[k]),
        .rdata (p[k][c])
      );
    end
  end

  // not_ready covers the RPU activity plus, for DKLC-C, the writes still
  // travelling down the delayed write-enable chains
  assign not_ready = busy | (|we_tap);

  // optional pipeline register between the RAMs and the adders block
  if (LUT_REG) begin : g_lut_reg
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int k = 0; k < N; k++)
          for (int c = 0; c < NC; c++) p_q[k][c] <= '0;
      end else begin
        p_q <= p;
      end
    end
  end else begin : g_no_lut_reg
    assign p_q = p;
  end

  conv_adders #(.N(N), .NC(NC), .CHUNK(CHUNK), .PW(PW), .OW(OW)) u_add (
    .p (p_q),
    .y (sum)
  );

endmodule
