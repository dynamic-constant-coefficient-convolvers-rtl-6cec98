// dklc_runner: test sequence for one dklc configuration, used by tb_dklc and
// tb_convolver_top-style benches. It loads several random coefficient sets,
// checks the programming time (not_ready high for exactly PROG cycles,
// starting the cycle after load), keeps feeding random samples while
// programming, and then compares y with sum h(k) x(i-k) from a software
// history. For DKLC-C the first N-1 outputs after programming are skipped,
// since the delay line still holds programming addresses. With LUT_REG the
// output is compared one cycle later.
module dklc_runner #(
  parameter bit MUX_AT_INPUT = 1'b1,
  parameter bit PARALLEL_RPU = 1'b0,
  parameter bit LUT_REG = 1'b0,
  parameter int N = 3,
  parameter int RELOADS = 4,
  parameter int SAMPLES = 300
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int OW = 16 + $clog2(N) + 1;
  localparam int PROG = (PARALLEL_RPU ? 16 : 16 * N) + (MUX_AT_INPUT ? N - 1 : 0);

  logic [7:0] x = 0, coef [N];
  logic load = 0, not_ready;
  logic [OW-1:0] y;

  dklc #(.N(N), .MUX_AT_INPUT(MUX_AT_INPUT), .PARALLEL_RPU(PARALLEL_RPU), .LUT_REG(LUT_REG)) dut (
    .clk, .rst_n, .x, .coef, .load, .not_ready, .y
  );

  initial begin
    int hist [N];
    int h [N];
    int e_prev;
    done = 0; checks = 0; failures = 0;
    for (int k = 0; k < N; k++) begin coef[k] = 0; hist[k] = 0; end
    @(posedge rst_n);
    @(negedge clk);
    for (int rep = 0; rep < RELOADS; rep++) begin
      int busy_cycles;
      for (int k = 0; k < N; k++) begin
        h[k] = (rep == 0) ? 255 : (rep == 1) ? k + 1 : int'($urandom_range(1, 255));
        coef[k] = 8'(h[k]);
      end
      load = 1;
      @(negedge clk);
      load = 0;
      for (int k = 0; k < N; k++) coef[k] = 8'($urandom);
      busy_cycles = 0;
      while (not_ready && busy_cycles < 1000) begin
        x = 8'($urandom);
        for (int k = N - 1; k > 0; k--) hist[k] = hist[k-1];
        hist[0] = int'(x);
        busy_cycles++;
        @(negedge clk);
      end
      checks++;
      if (busy_cycles != PROG) begin
        failures++;
        $display("C=%0b P=%0b programming took %0d cycles, expected %0d",
                 MUX_AT_INPUT, PARALLEL_RPU, busy_cycles, PROG);
      end
      for (int i = 0; i < SAMPLES; i++) begin
        int e;
        x = (i % 50 < 3) ? 8'hff : 8'($urandom);
        for (int k = N - 1; k > 0; k--) hist[k] = hist[k-1];
        hist[0] = int'(x);
        e = 0;
        for (int k = 0; k < N; k++) e += h[k] * hist[k];
        @(negedge clk);
        // with LUT_REG the output lags one more cycle: compare with the
        // previous sample's result
        if (LUT_REG) begin
          int t;
          t = e; e = e_prev; e_prev = t;
        end
        if (i >= (MUX_AT_INPUT ? N - 1 : 0) + (LUT_REG ? 1 : 0)) begin
          checks++;
          if (y != OW'(e)) begin
            failures++;
            $display("C=%0b P=%0b rep=%0d i=%0d got %0d exp %0d",
                     MUX_AT_INPUT, PARALLEL_RPU, rep, i, y, e);
          end
        end
      end
    end
    done = 1;
  end
endmodule
