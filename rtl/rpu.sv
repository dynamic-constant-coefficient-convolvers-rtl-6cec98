// rpu: RAM programming unit of a dynamic constant coefficient multiplier or
// convolver.
//
// A one-cycle pulse on load (while busy is low) latches the NT coefficients
// and starts programming. For each target t = 0..NT-1 in turn, the unit walks
// addr through 0 .. 2^AW-1, one address per clock, with we[t] high and
// data = addr * coef[t]. The product is built by adding coef[t] once per
// cycle, so no multiplier is needed. With NT = 1 one multiplier is programmed
// (parallel option: one RPU per multiplier); with NT > 1 the multipliers are
// programmed one after another by a single shared unit (serial option).
//
// Timing: load in cycle c -> busy, we and the first address 0 appear in
// cycle c+1; programming takes NT * 2^AW cycles (r = 16 for 16-entry LUT
// RAMs); busy (the "not ready" flag) is high exactly while we is active.
// load is ignored while busy.
// The unit's job (address and data sequence, not-ready flag, serial or
// parallel use) follows the dynamic multiplier concept; the accumulate-based
// data generation, the load handshake and the latching of coefficients are
// this design's choices.
module rpu #(
  parameter int unsigned NT = 1,   // number of multipliers served in sequence
  parameter int unsigned AW = 4,   // LUT address width
  parameter int unsigned CW = 8,   // coefficient width
  localparam int unsigned DW = AW + CW,
  localparam int unsigned TW = (NT > 1) ? $clog2(NT) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,
  input  logic [CW-1:0] coef [NT],
  output logic          busy,
  output logic [AW-1:0] addr,
  output logic [DW-1:0] data,
  output logic [NT-1:0] we
);

  logic [CW-1:0] coef_q [NT];
  logic [TW-1:0] tgt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      addr <= '0;
      data <= '0;
      tgt  <= '0;
      for (int t = 0; t < NT; t++) coef_q[t] <= '0;
    end else if (!busy) begin
      if (load) begin
        busy <= 1'b1;
        addr <= '0;
        data <= '0;
        tgt  <= '0;
        coef_q <= coef;
      end
    end else begin
      if (addr == AW'(2**AW - 1)) begin
        addr <= '0;
        data <= '0;
        if (tgt == TW'(NT - 1)) begin
          busy <= 1'b0;
          tgt  <= '0;
        end else begin
          tgt <= tgt + 1'b1;
        end
      end else begin
        addr <= addr + 1'b1;
        data <= data + DW'(coef_q[tgt]);
      end
    end
  end

  always_comb begin
    we = '0;
    if (busy) we[tgt] = 1'b1;
  end

endmodule
