// tb_dklc: the dynamic LUT convolver in all four arrangements (DKLC-C and
// DKLC-M, serial and parallel RPU), 3 taps, 8-bit data and coefficients.
// Each arrangement is driven by dklc_runner; the expected programming times
// are 50, 18, 48 and 16 cycles. Two more instances cover 5 taps (DKLC-C,
// serial: 84 cycles), a single tap (DKLC-M, serial: 16 cycles) and DKLC-C
// with the RAM outputs registered (two cycles latency).
module tb_dklc;
  logic clk = 0, rst_n = 0;
  logic [6:0] done;
  int c [7], f [7];
  int checks, failures;

  always #5 clk = ~clk;

  dklc_runner #(.MUX_AT_INPUT(1), .PARALLEL_RPU(0)) r_cs (.clk, .rst_n, .done(done[0]), .checks(c[0]), .failures(f[0]));
  dklc_runner #(.MUX_AT_INPUT(1), .PARALLEL_RPU(1)) r_cp (.clk, .rst_n, .done(done[1]), .checks(c[1]), .failures(f[1]));
  dklc_runner #(.MUX_AT_INPUT(0), .PARALLEL_RPU(0)) r_ms (.clk, .rst_n, .done(done[2]), .checks(c[2]), .failures(f[2]));
  dklc_runner #(.MUX_AT_INPUT(0), .PARALLEL_RPU(1)) r_mp (.clk, .rst_n, .done(done[3]), .checks(c[3]), .failures(f[3]));
  dklc_runner #(.MUX_AT_INPUT(1), .PARALLEL_RPU(0), .N(5)) r_c5 (.clk, .rst_n, .done(done[4]), .checks(c[4]), .failures(f[4]));
  dklc_runner #(.MUX_AT_INPUT(0), .PARALLEL_RPU(0), .N(1)) r_m1 (.clk, .rst_n, .done(done[5]), .checks(c[5]), .failures(f[5]));
  dklc_runner #(.MUX_AT_INPUT(1), .PARALLEL_RPU(0), .LUT_REG(1)) r_cr (.clk, .rst_n, .done(done[6]), .checks(c[6]), .failures(f[6]));

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    fork
      wait (&done);
      repeat (20000) @(posedge clk);
    join_any
    checks = 0; failures = 0;
    for (int i = 0; i < 7; i++) begin checks += c[i]; failures += f[i]; end
    if (!(&done)) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
