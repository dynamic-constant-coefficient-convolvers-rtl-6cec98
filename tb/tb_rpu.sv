// tb_rpu: checks the RAM programming unit for one target (default) and for a
// serial unit serving three targets: address walk 0..15, data = addr*coef,
// one-hot write enable of the right target, busy for exactly NT*16 cycles
// starting the cycle after load, and load ignored while busy.
module tb_rpu;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;

  logic       load1 = 0, busy1;
  logic [7:0] coef1 [1];
  logic [3:0] addr1;
  logic [11:0] data1;
  logic [0:0] we1;

  logic       load3 = 0, busy3;
  logic [7:0] coef3 [3];
  logic [3:0] addr3;
  logic [11:0] data3;
  logic [2:0] we3;

  rpu dut1 (.clk, .rst_n, .load(load1), .coef(coef1), .busy(busy1), .addr(addr1), .data(data1), .we(we1));
  rpu #(.NT(3)) dut3 (.clk, .rst_n, .load(load3), .coef(coef3), .busy(busy3), .addr(addr3), .data(data3), .we(we3));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    coef1[0] = 0;
    coef3 = '{0, 0, 0};
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(!busy1 && !busy3 && we1 == 0 && we3 == 0, "idle after reset");
    for (int rep = 0; rep < 3; rep++) begin
      logic [7:0] c1, c3 [3];
      c1 = 8'($urandom);
      for (int t = 0; t < 3; t++) c3[t] = 8'($urandom);
      coef1[0] = c1; coef3 = c3; load1 = 1; load3 = 1;
      @(negedge clk);
      load1 = 0; load3 = 0;
      coef1[0] = ~c1;  // latched value must be used
      for (int t = 0; t < 3; t++) coef3[t] = ~c3[t];
      for (int cyc = 0; cyc < 48; cyc++) begin
        int a, t;
        a = cyc % 16; t = cyc / 16;
        if (cyc == 5) begin load1 = 1; load3 = 1; end   // ignored while busy
        if (cyc == 6) begin load1 = 0; load3 = 0; end
        if (cyc < 16) begin
          chk(busy1 && we1 == 1 && addr1 == 4'(a) && data1 == 12'(a * c1), "rpu1 sequence");
        end else begin
          chk(!busy1 && we1 == 0, "rpu1 done after 16 cycles");
        end
        chk(busy3 && we3 == 3'(1 << t) && addr3 == 4'(a) && data3 == 12'(a * c3[t]), "rpu3 sequence");
        @(negedge clk);
      end
      chk(!busy3 && we3 == 0, "rpu3 done after 48 cycles");
      repeat (2) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
