// tb_mm_kcm: multiplierless constant multiplier for several coefficients
// (27, 14, 255, 1, 119, 0xAB), every 8-bit input. Reference: x * COEF.
// Also checks the recoding of 14 and the shared sub-expression chosen for 27.
module tb_mm_kcm;
  int checks = 0, failures = 0;
  logic [7:0] x;
  logic [15:0] y [6];
  localparam logic [7:0] C [6] = '{8'd27, 8'd14, 8'd255, 8'd1, 8'd119, 8'hAB};

  mm_kcm                        d0 (.x, .y(y[0]));
  mm_kcm #(.COEF(8'd14))        d1 (.x, .y(y[1]));
  mm_kcm #(.COEF(8'd255))       d2 (.x, .y(y[2]));
  mm_kcm #(.COEF(8'd1))         d3 (.x, .y(y[3]));
  mm_kcm #(.COEF(8'd119))       d4 (.x, .y(y[4]));
  mm_kcm #(.COEF(8'hAB))        d5 (.x, .y(y[5]));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 256; a++) begin
      x = 8'(a);
      #1;
      for (int i = 0; i < 6; i++) begin
        checks++;
        if (y[i] != 16'(a * int'(C[i]))) begin
          failures++; $display("%0d*%0d got %0d", C[i], a, y[i]);
        end
      end
    end
    // structure: 27 = 11011b shares t = x + (x << 1): 27x = t + (t << 3);
    // 14 recodes to 2^4 - 2^1 and has nothing to share
    checks += 2;
    if (!(d0.SS.used && d0.SS.gap == 1 && !d0.SS.neg_pair && d0.SS.tpos[8:0] == 9'b000001001 &&
          d0.SS.pos == 0 && d0.SS.neg == 0)) begin
      failures++; $display("27: unexpected sharing plan");
    end
    if (d1.SS.used || d1.DIG.pos[8:0] != 9'b000010000 || d1.DIG.neg[8:0] != 9'b000000010) begin
      failures++; $display("14: unexpected recoding");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
