// tb_lut_ram: checks the LUT RAM: synchronous write, asynchronous read on the
// shared address, and no write while we is low. Reference: a local array.
module tb_lut_ram;
  localparam int AW = 4, DW = 12;
  logic clk = 0, we = 0;
  logic [AW-1:0] addr = '0;
  logic [DW-1:0] wdata = '0, rdata;
  logic [DW-1:0] ref_mem [2**AW];
  int checks = 0, failures = 0;

  lut_ram #(.AW(AW), .DW(DW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill every word
    for (int a = 0; a < 2**AW; a++) begin
      @(negedge clk);
      we = 1; addr = AW'(a); wdata = DW'($urandom); ref_mem[a] = wdata;
    end
    @(negedge clk); we = 0;
    for (int r = 0; r < 3; r++) begin
      for (int a = 0; a < 2**AW; a++) begin
        // write with we low must not change the contents
        addr = AW'(a); wdata = ~ref_mem[a];
        #1;
        checks++;
        if (rdata !== ref_mem[a]) begin
          failures++;
          $display("read a=%0d got %h exp %h", a, rdata, ref_mem[a]);
        end
        @(negedge clk);
      end
      // rewrite a random word
      addr = AW'($urandom); we = 1; wdata = DW'($urandom); ref_mem[addr] = wdata;
      @(negedge clk); we = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
