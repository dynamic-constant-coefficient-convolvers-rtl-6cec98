// tb_fir_pipe_opt: the 2 + 5z^-1 - 5z^-2 filter on a random stream with runs
// of extreme values; y(n) must appear two cycles after x(n) is applied.
module tb_fir_pipe_opt;
  logic clk = 0, rst_n = 0;
  logic [7:0] x = 0;
  logic signed [12:0] y;
  int checks = 0, failures = 0;

  fir_pipe_opt dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int xs [$];
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      int sel;
      sel = n % 40;
      x = (sel < 4) ? 8'hff : (sel < 8) ? 8'h00 : 8'($urandom);
      xs.push_back(int'(x));
      @(negedge clk);
      // y now holds y(n-1), which needs x(n-1), x(n-2), x(n-3)
      if (n >= 4) begin
        int e;
        e = 2 * xs[n-1] + 5 * xs[n-2] - 5 * xs[n-3];
        checks++;
        if (int'(y) != e) begin failures++; $display("n=%0d got %0d exp %0d", n, y, e); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
