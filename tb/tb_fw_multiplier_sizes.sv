// tb_fw_multiplier_sizes: exhaustive test of the fixed-width multiplier at
// other sizes than the default: N = 5 (odd, so the middle term of column
// N-1 starts the compensation chain), N = 6 and N = 7 with BIAS = 2. All
// operand pairs of each instance are applied and compared with an integer
// reference: floor((a*b - columns 0..N-2 + BIAS*2^N) / 2^N) mod 2^N.
module tb_fw_multiplier_sizes;
  logic clk = 1'b0;
  logic [4:0] a5, b5, p5;
  logic [5:0] a6, b6, p6;
  logic [6:0] a7, b7, p7;
  int checks = 0, failures = 0, cycles = 0;

  fw_multiplier #(.N(5), .BIAS(1)) dut5 (.a(a5), .b(b5), .p(p5));
  fw_multiplier #(.N(6), .BIAS(1)) dut6 (.a(a6), .b(b6), .p(p6));
  fw_multiplier #(.N(7), .BIAS(2)) dut7 (.a(a7), .b(b7), .p(p7));

  always #5 clk = ~clk;
  always @(posedge clk) cycles <= cycles + 1;

  initial begin : watchdog
    wait (cycles == 20000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference for width n: operands given as unsigned n-bit patterns.
  function automatic longint fw_ref(int n, int bias, longint ua, longint ub);
    longint sa, sb, low, t, m2;
    sa = (ua >= (longint'(1) << (n - 1))) ? ua - (longint'(1) << n) : ua;
    sb = (ub >= (longint'(1) << (n - 1))) ? ub - (longint'(1) << n) : ub;
    low = 0;
    for (int i = 0; i < n - 1; i++)
      for (int j = 0; j < n - 1; j++)
        if (i + j <= n - 2 && ua[i] && ub[j]) low += longint'(1) << (i + j);
    m2 = longint'(1) << (2 * n);
    t  = ((sa * sb - low) % m2 + m2) % m2;
    return ((t + (longint'(bias) << n)) >> n) & ((longint'(1) << n) - 1);
  endfunction

  task automatic check(int n, longint got, longint want, longint ua, longint ub);
    checks++;
    if (got != want) begin
      failures++;
      if (failures < 10)
        $display("FAIL N=%0d a=%0h b=%0h p=%0h want %0h", n, ua, ub, got, want);
    end
  endtask

  initial begin : stim
    for (longint va = 0; va < 128; va++) begin
      for (longint vb = 0; vb < 128; vb++) begin
        @(posedge clk);
        a5 = 5'(va); b5 = 5'(vb);
        a6 = 6'(va); b6 = 6'(vb);
        a7 = 7'(va); b7 = 7'(vb);
        @(negedge clk);
        if (va < 32 && vb < 32) check(5, longint'(p5), fw_ref(5, 1, va, vb), va, vb);
        if (va < 64 && vb < 64) check(6, longint'(p6), fw_ref(6, 1, va, vb), va, vb);
        check(7, longint'(p7), fw_ref(7, 2, va, vb), va, vb);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
