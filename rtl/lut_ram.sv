// lut_ram: one partial-product LUT RAM of a dynamic constant coefficient
// multiplier or convolver (RAM A / RAM B of the DKCM).
//
// A single address serves reads and writes, as an FPGA distributed LUT RAM
// does: writes are synchronous (wdata is stored at addr on the rising clock
// edge when we is high), reads are asynchronous (rdata follows addr in the
// same cycle). The RAM is loaded by the RAM programming unit with
// addr*coefficient for every address, after which the data chunk applied to
// addr reads back its product with the coefficient.
// The contents are not reset; the programming sequence defines them.
// The LUT RAM holding partial products comes from the dynamic multiplier
// concept; the single shared address, synchronous write and asynchronous
// read are chosen here to match FPGA distributed RAM.
module lut_ram #(
  parameter int unsigned AW = 4,   // address width: 4-bit data chunk (16x1 LUTs)
  parameter int unsigned DW = 12   // data width: chunk width + coefficient width
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] wdata,
  output logic [DW-1:0] rdata
);

  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
  end

  assign rdata = mem[addr];

endmodule
