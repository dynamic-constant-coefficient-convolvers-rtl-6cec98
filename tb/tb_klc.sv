// tb_klc: constant LUT convolver: default 2 taps h = {200, 77}; a 4-tap
// instance without grouping; a 5-tap instance h = {5, 10, 3, 20, 40} where
// taps 0, 1, 3, 4 form one similar-coefficient group (5 * {1, 2, 4, 8}) and
// tap 2 stays alone. Random input stream, reference y(i) = sum h(k) x(i-k)
// from a software history, compared one cycle after x(i) is applied. The
// grouping chosen at elaboration is checked as well, and the 5-tap filter
// is repeated with registered table outputs (result one cycle later).
module tb_klc;
  logic clk = 0, rst_n = 0;
  logic [7:0] x = 0;
  logic [17:0] y2;
  logic [18:0] y4;
  int checks = 0, failures = 0;
  localparam logic [7:0] H4 [4] = '{8'd3, 8'd255, 8'd128, 8'd17};
  localparam logic [7:0] H5 [5] = '{8'd5, 8'd10, 8'd3, 8'd20, 8'd40};
  logic [19:0] y5;
  klc #(.N(5), .COEFS(H5)) dut5 (.clk, .rst_n, .x, .y(y5));
  logic [19:0] y5r;
  klc #(.N(5), .COEFS(H5), .LUT_REG(1'b1)) dut5r (.clk, .rst_n, .x, .y(y5r));

  klc dut2 (.clk, .rst_n, .x, .y(y2));
  klc #(.N(4), .COEFS(H4), .SCO(1'b0)) dut4 (.clk, .rst_n, .x, .y(y4));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int hist [5];
    hist = '{0, 0, 0, 0, 0};
    // grouping: tap 0 leads {0, 1, 3, 4} with table coefficient 5; tap 2 alone
    checks++;
    if (!(dut5.g_tap[0].LEAD == 0 && dut5.g_tap[1].LEAD == 0 && dut5.g_tap[2].LEAD == 2 &&
          dut5.g_tap[3].LEAD == 0 && dut5.g_tap[4].LEAD == 0 && dut5.g_tap[0].GC == 5 &&
          dut5.g_tap[2].GC == 3 && dut5.g_tap[0].g_term[4].REL == 3 &&
          dut5.g_tap[0].g_term[2].MEMBER == 0 && dut5.g_tap[1].g_term[1].MEMBER == 0)) begin
      failures++; $display("unexpected coefficient grouping");
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      int e2, e4, e5;
      static int e5_prev = 0;
      x = (i < 10) ? 8'hff : 8'($urandom);
      for (int k = 4; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = int'(x);
      e2 = 200 * hist[0] + 77 * hist[1];
      e4 = 0;
      for (int k = 0; k < 4; k++) e4 += int'(H4[k]) * hist[k];
      e5 = 0;
      for (int k = 0; k < 5; k++) e5 += int'(H5[k]) * hist[k];
      @(negedge clk);
      checks += 3;
      if (y5 != 20'(e5)) begin failures++; $display("N=5 i=%0d got %0d exp %0d", i, y5, e5); end
      checks++;
      if (y5r != 20'(e5_prev)) begin failures++; $display("N=5 reg i=%0d got %0d exp %0d", i, y5r, e5_prev); end
      e5_prev = e5;
      if (y2 != 18'(e2)) begin failures++; $display("N=2 i=%0d got %0d exp %0d", i, y2, e2); end
      if (y4 != 19'(e4)) begin failures++; $display("N=4 i=%0d got %0d exp %0d", i, y4, e4); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
