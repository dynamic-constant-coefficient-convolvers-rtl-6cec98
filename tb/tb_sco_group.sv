// tb_sco_group: similar coefficient group a = x0 - x1 - 2 x2 + 4 x3 (default)
// and a 3-input group a = 8 x0 + x1 - 4 x2, random and extreme inputs.
module tb_sco_group;
  int checks = 0, failures = 0;
  logic [7:0] x4 [4];
  logic signed [12:0] a4;
  logic [7:0] x3 [3];
  logic signed [14:0] a3;

  sco_group dut4 (.x(x4), .a(a4));
  localparam int unsigned S3 [3] = '{3, 0, 2};
  localparam bit          N3 [3] = '{1'b0, 1'b0, 1'b1};

  sco_group #(.N(3), .SHIFTS(S3), .NEGS(N3)) dut3 (.x(x3), .a(a3));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 3000; it++) begin
      int e4, e3;
      for (int j = 0; j < 4; j++) x4[j] = 8'($urandom);
      for (int j = 0; j < 3; j++) x3[j] = 8'($urandom);
      if (it == 0) begin x4 = '{0, 255, 255, 0}; x3 = '{0, 0, 255}; end
      if (it == 1) begin x4 = '{255, 0, 0, 255}; x3 = '{255, 255, 0}; end
      e4 = int'(x4[0]) - int'(x4[1]) - 2 * int'(x4[2]) + 4 * int'(x4[3]);
      e3 = 8 * int'(x3[0]) + int'(x3[1]) - 4 * int'(x3[2]);
      #1;
      checks += 2;
      if (int'(a4) != e4) begin failures++; $display("A4 got %0d exp %0d", a4, e4); end
      if (int'(a3) != e3) begin failures++; $display("A3 got %0d exp %0d", a3, e3); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
