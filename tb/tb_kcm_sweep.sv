// tb_kcm_sweep: the multiplier sweep over input and coefficient width
// K = 3 .. 15 (input 0 .. 2^K-1, coefficient 1 .. 2^K-1). For every K the LUT
// multiplier (lm), the multiplierless multiplier (mm_kcm) and the dynamic
// multiplier (dkcm, reloaded with several coefficients) are built with
// CW = K and checked on random inputs against x * coefficient. Chunks are
// 4 bits; widths that are not a multiple of 4 use a zero-padded top chunk.
module tb_kcm_sweep;
  localparam int KMIN = 3, KMAX = 15, NK = KMAX - KMIN + 1;
  logic clk = 0, rst_n = 0;
  int c [NK], f [NK];
  logic [NK-1:0] done;

  always #5 clk = ~clk;

  for (genvar g = 0; g < NK; g++) begin : g_k
    localparam int K = KMIN + g;
    localparam logic [K-1:0] C = K'((32'h9e3779b9 >> g) | 1);
    logic [K-1:0] x, dcoef;
    logic [2*K-1:0] y_lm, y_mm, y_d;
    logic load, nr;

    lm     #(.K(K), .CW(K), .COEF(C)) u_lm (.x, .y(y_lm));
    mm_kcm #(.K(K), .CW(K), .COEF(C)) u_mm (.x, .y(y_mm));
    dkcm   #(.K(K), .CW(K)) u_d (.clk, .rst_n, .x, .coef(dcoef), .load, .not_ready(nr), .y(y_d));

    initial begin
      c[g] = 0; f[g] = 0; done[g] = 0; load = 0; x = '0; dcoef = '0;
      @(posedge rst_n);
      for (int rep = 0; rep < 4; rep++) begin
        logic [K-1:0] dc;
        dc = (rep == 0) ? {K{1'b1}} : K'($urandom_range(1, (1 << K) - 1));
        @(negedge clk); dcoef = dc; load = 1;
        @(negedge clk); load = 0;
        while (nr) @(negedge clk);
        for (int i = 0; i < 200; i++) begin
          x = (i == 0) ? {K{1'b1}} : K'($urandom);
          #1;
          c[g] += 3;
          if (y_lm != (2*K)'(longint'(x) * longint'(C)))  f[g]++;
          if (y_mm != (2*K)'(longint'(x) * longint'(C)))  f[g]++;
          if (y_d  != (2*K)'(longint'(x) * longint'(dc))) f[g]++;
        end
      end
      done[g] = 1;
    end
  end

  initial begin
    int checks, failures;
    repeat (3) @(negedge clk);
    rst_n = 1;
    fork
      wait (&done);
      repeat (10000) @(posedge clk);
    join_any
    checks = 0; failures = 0;
    for (int i = 0; i < NK; i++) begin
      checks += c[i]; failures += f[i];
      if (f[i] != 0) $display("K=%0d: %0d failures", KMIN + i, f[i]);
    end
    if (!(&done)) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
