// tb_conv_adders: random partial products into the adders block of a 2-tap,
// 2-chunk, 8-bit convolver and of a 3-tap one; the reference adds
// p[k][c] * 16^c directly.
module tb_conv_adders;
  int checks = 0, failures = 0;
  logic [11:0] p2 [2][2];
  logic [17:0] y2;
  logic [11:0] p3 [3][2];
  logic [18:0] y3;

  conv_adders dut2 (.p(p2), .y(y2));
  conv_adders #(.N(3), .OW(19)) dut3 (.p(p3), .y(y3));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 2000; it++) begin
      longint e2, e3;
      e2 = 0; e3 = 0;
      for (int k = 0; k < 3; k++)
        for (int c = 0; c < 2; c++) begin
          logic [11:0] v;
          v = (it < 2) ? (it == 0 ? 12'h000 : 12'hfff) : 12'($urandom);
          p3[k][c] = v;
          e3 += longint'(v) << (4 * c);
          if (k < 2) begin p2[k][c] = v; e2 += longint'(v) << (4 * c); end
        end
      #1;
      checks += 2;
      if (y2 != 18'(e2)) begin failures++; $display("N=2 got %0d exp %0d", y2, e2); end
      if (y3 != 19'(e3)) begin failures++; $display("N=3 got %0d exp %0d", y3, e3); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
