// tb_dkcm: dynamic constant coefficient multiplier. Several coefficient
// changes; for each: not_ready must rise the cycle after load and last exactly
// 16 cycles, then y must equal x * coef for every 8-bit x.
module tb_dkcm;
  logic clk = 0, rst_n = 0, load = 0, not_ready;
  logic [7:0] x = 0, coef = 0;
  logic [15:0] y;
  int checks = 0, failures = 0;

  dkcm dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int rep = 0; rep < 6; rep++) begin
      logic [7:0] c;
      int busy_cycles;
      c = (rep == 0) ? 8'd255 : (rep == 1) ? 8'd1 : 8'($urandom);
      coef = c; load = 1;
      @(negedge clk);
      load = 0; coef = 8'($urandom);
      busy_cycles = 0;
      while (not_ready && busy_cycles < 100) begin
        x = 8'($urandom);
        busy_cycles++;
        @(negedge clk);
      end
      checks++;
      if (busy_cycles != 16) begin failures++; $display("programming took %0d cycles", busy_cycles); end
      for (int a = 0; a < 256; a++) begin
        x = 8'(a);
        #1;
        checks++;
        if (y != 16'(a * int'(c))) begin failures++; $display("%0d*%0d got %0d", c, a, y); end
        if (a % 64 == 0) @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
