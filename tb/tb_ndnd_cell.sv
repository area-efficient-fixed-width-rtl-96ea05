// tb_ndnd_cell: exhaustive self-checking test of the compensation-column
// cell ndnd_cell. All 32 combinations of x0, y0, x1, y1, sin are applied, one
// per clock, and {c, s} is compared with the integer sum of the two NAND
// partial products and sin.
module tb_ndnd_cell;
  logic clk = 1'b0;
  logic x0, y0, x1, y1, sin, s, c;
  int   checks = 0, failures = 0, cycles = 0;

  ndnd_cell dut (.x0(x0), .y0(y0), .x1(x1), .y1(y1), .sin(sin), .s(s), .c(c));

  always #5 clk = ~clk;
  always @(posedge clk) cycles <= cycles + 1;

  initial begin : watchdog
    wait (cycles == 1000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stim
    int expect_sum;
    for (int v = 0; v < 32; v++) begin
      @(posedge clk);
      {x0, y0, x1, y1, sin} = 5'(v);
      @(negedge clk);
      expect_sum = int'(!(x0 & y0)) + int'(!(x1 & y1)) + int'(sin);
      checks++;
      if ({c, s} != 2'(expect_sum)) begin
        failures++;
        $display("FAIL in=%05b -> c=%0b s=%0b, want %0d", 5'(v), c, s, expect_sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
