// tb_nfa_cell: exhaustive self-checking test of the NFA cell. All 16
// combinations of x, y, sin, cin are applied, one per clock, and {c, s} is
// compared with the integer sum of the NAND partial product, sin and cin.
module tb_nfa_cell;
  logic clk = 1'b0;
  logic x, y, sin, cin, s, c;
  int   checks = 0, failures = 0, cycles = 0;

  nfa_cell dut (.x(x), .y(y), .sin(sin), .cin(cin), .s(s), .c(c));

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
    for (int v = 0; v < 16; v++) begin
      @(posedge clk);
      {x, y, sin, cin} = 4'(v);
      @(negedge clk);
      expect_sum = int'(!(x & y)) + int'(sin) + int'(cin);
      checks++;
      if ({c, s} != 2'(expect_sum)) begin
        failures++;
        $display("FAIL x=%0b y=%0b sin=%0b cin=%0b -> c=%0b s=%0b, want %0d",
                 x, y, sin, cin, c, s, expect_sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
