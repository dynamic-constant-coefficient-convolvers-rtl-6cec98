// tb_lm: LUT constant multiplier. Default 8x8 (coefficient 173) and two more
// coefficients are checked for every input; the 14x14 configuration
// (7-bit chunks) is checked on random inputs. Reference: x * COEF.
module tb_lm;
  int checks = 0, failures = 0;
  logic [7:0]  x8;
  logic [15:0] y_def, y_255, y_1;
  logic [13:0] x14;
  logic [27:0] y14;

  lm dut_def (.x(x8), .y(y_def));
  lm #(.COEF(8'd255)) dut_255 (.x(x8), .y(y_255));
  lm #(.COEF(8'd1))   dut_1   (.x(x8), .y(y_1));
  lm #(.K(14), .CW(14), .CHUNK(7), .COEF(14'd12345)) dut14 (.x(x14), .y(y14));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 256; a++) begin
      x8 = 8'(a);
      #1;
      checks += 3;
      if (y_def != 16'(a * 173)) begin failures++; $display("173*%0d got %0d", a, y_def); end
      if (y_255 != 16'(a * 255)) begin failures++; $display("255*%0d got %0d", a, y_255); end
      if (y_1   != 16'(a))       begin failures++; $display("1*%0d got %0d", a, y_1); end
    end
    for (int it = 0; it < 3000; it++) begin
      x14 = (it == 0) ? 14'h3fff : 14'($urandom);
      #1;
      checks++;
      if (y14 != 28'(longint'(x14) * 12345)) begin
        failures++; $display("14-bit %0d got %0d", x14, y14);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
