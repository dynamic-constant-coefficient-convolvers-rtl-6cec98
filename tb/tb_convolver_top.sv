// tb_convolver_top: end-to-end run of convolver_top at its default sizes.
// All parts run at once on independent random streams, each checked every
// cycle against a software model:
//   - DKLC-C (serial RPU) and DKLC-M (parallel RPUs) are reloaded with new
//     coefficients several times while samples keep flowing; programming time
//     is checked (50 and 16 cycles) and outputs are compared once valid
//     (DKLC-C: after the delay line has refilled, N-1 = 2 samples);
//   - the DKCM is reloaded (16 cycles) and its product checked;
//   - KLC, LM, MM, the similar-coefficient group x5 and the pipelined filter
//     are compared on every cycle.
// Each mechanism is counted; one that never happened counts as a failure.
module tb_convolver_top;
  logic clk = 0, rst_n = 0;
  logic [7:0] c_x = 0, c_coef [3], m_x = 0, m_coef [3];
  logic c_load = 0, m_load = 0, c_not_ready, m_not_ready;
  logic [18:0] c_y, m_y;
  logic [7:0] k_x = 0; logic [17:0] k_y;
  logic [7:0] d_x = 0, d_coef = 0; logic d_load = 0, d_not_ready; logic [15:0] d_y;
  logic [7:0] l_x = 0, mm_x = 0; logic [15:0] l_y, mm_y;
  logic [7:0] s_x [4]; logic signed [15:0] s_y;
  logic [7:0] f_x = 0; logic signed [12:0] f_y;

  int checks = 0, failures = 0;
  int n_c_reload = 0, n_m_reload = 0, n_d_reload = 0, n_c_refill = 0;
  int n_klc = 0, n_lm = 0, n_mm = 0, n_sco = 0, n_fir = 0;

  convolver_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what, input longint got, input longint exp);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s got %0d exp %0d at %0t", what, got, exp, $time);
    end
  endtask

  // software state
  int hc [3], hm [3], xc [3], xm [3], hk [2];
  int dcoef;
  int c_busy = 0, m_busy = 0, d_busy = 0;   // cycles of not_ready seen so far
  int c_since = 100;                        // samples since DKLC-C became ready
  int fx [$];
  bit c_armed = 0, m_armed = 0, d_armed = 0;
  bit m_nr_prev = 0;                        // not_ready while the sample was applied

  initial begin
    for (int k = 0; k < 3; k++) begin c_coef[k] = 0; m_coef[k] = 0; xc[k] = 0; xm[k] = 0; end
    hk = '{0, 0};
    s_x = '{0, 0, 0, 0};
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 6000; cyc++) begin
      // ---- start reloads now and then
      if (cyc % 1000 == 10) begin
        for (int k = 0; k < 3; k++) begin hc[k] = $urandom_range(1, 255); c_coef[k] = 8'(hc[k]); end
        c_load = 1; c_armed = 1; c_busy = 0;
      end else c_load = 0;
      if (cyc % 700 == 20) begin
        for (int k = 0; k < 3; k++) begin hm[k] = $urandom_range(1, 255); m_coef[k] = 8'(hm[k]); end
        m_load = 1; m_armed = 1; m_busy = 0;
      end else m_load = 0;
      if (cyc % 500 == 30) begin
        dcoef = $urandom_range(1, 255); d_coef = 8'(dcoef); d_load = 1; d_armed = 1; d_busy = 0;
      end else d_load = 0;

      // ---- new samples
      c_x = 8'($urandom); m_x = 8'($urandom); k_x = 8'($urandom); d_x = 8'($urandom);
      l_x = 8'($urandom); mm_x = 8'($urandom); f_x = 8'($urandom);
      for (int j = 0; j < 4; j++) s_x[j] = 8'($urandom);
      if (cyc % 97 < 2) begin c_x = 8'hff; m_x = 8'hff; k_x = 8'hff; f_x = 8'hff; end

      // DKLC-C: a sample only enters the delay line when the input mux is
      // not selecting the programming address; model the line as the RTL does
      for (int k = 2; k > 0; k--) begin xc[k] = xc[k-1]; xm[k] = xm[k-1]; end
      xc[0] = int'(c_x); xm[0] = int'(m_x);
      hk[1] = hk[0]; hk[0] = int'(k_x);
      fx.push_back(int'(f_x));

      // ---- combinational parts, checked in the same cycle
      #1;
      chk(l_y == 16'(int'(l_x) * 173), "lm", l_y, int'(l_x) * 173); n_lm++;
      chk(mm_y == 16'(int'(mm_x) * 27), "mm", mm_y, int'(mm_x) * 27); n_mm++;
      begin
        int e;
        e = 5 * (int'(s_x[0]) - int'(s_x[1]) - 2 * int'(s_x[2]) + 4 * int'(s_x[3]));
        chk(int'(s_y) == e, "sco x5", s_y, e); n_sco++;
      end
      if (!d_not_ready && d_armed && !d_load) begin
        chk(d_y == 16'(int'(d_x) * dcoef), "dkcm", d_y, int'(d_x) * dcoef);
      end

      @(negedge clk);

      // ---- registered parts: outputs for the samples just applied
      chk(k_y == 18'(200 * hk[0] + 77 * hk[1]), "klc", k_y, 200 * hk[0] + 77 * hk[1]); n_klc++;
      if (fx.size() >= 4) begin
        int n, e;
        n = fx.size();
        e = 2 * fx[n-2] + 5 * fx[n-3] - 5 * fx[n-4];
        chk(int'(f_y) == e, "fir", f_y, e); n_fir++;
      end

      // DKLC-C
      if (c_not_ready) begin c_busy++; c_since = 0; end
      else if (c_armed) begin
        if (c_busy > 0) begin
          chk(c_busy == 50, "dklc-c programming cycles", c_busy, 50);
          n_c_reload++; c_busy = 0;
        end
        // the sample applied in this cycle was accepted
        c_since++;
        if (c_since >= 3) begin
          int e;
          e = hc[0] * xc[0] + hc[1] * xc[1] + hc[2] * xc[2];
          chk(c_y == 19'(e), "dklc-c", c_y, e);
        end else if (c_since == 2) n_c_refill++;
      end
      // DKLC-M: y is valid for a sample applied while not_ready was low
      if (m_not_ready) m_busy++;
      else if (m_armed) begin
        int e;
        if (m_busy > 0) begin
          chk(m_busy == 16, "dklc-m programming cycles", m_busy, 16);
          n_m_reload++; m_busy = 0;
        end
        e = hm[0] * xm[0] + hm[1] * xm[1] + hm[2] * xm[2];
        if (!m_nr_prev) chk(m_y == 19'(e), "dklc-m", m_y, e);
      end
      m_nr_prev = m_not_ready;
      // DKCM
      if (d_not_ready) d_busy++;
      else if (d_busy > 0) begin
        chk(d_busy == 16, "dkcm programming cycles", d_busy, 16);
        n_d_reload++; d_busy = 0;
      end
    end
    $display("mechanisms: dklc-c reloads %0d, dklc-c refills %0d, dklc-m reloads %0d, dkcm reloads %0d,",
             n_c_reload, n_c_refill, n_m_reload, n_d_reload);
    $display("            klc %0d, lm %0d, mm %0d, sco %0d, fir %0d",
             n_klc, n_lm, n_mm, n_sco, n_fir);
    if (n_c_reload == 0 || n_c_refill == 0 || n_m_reload == 0 || n_d_reload == 0 ||
        n_klc == 0 || n_lm == 0 || n_mm == 0 || n_sco == 0 || n_fir == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
