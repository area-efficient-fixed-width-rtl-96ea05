// tb_fw_multiplier: end-to-end, full-size test of the fixed-width multiplier
// at its default parameters (8 x 8, BIAS = 1).
//
// Every one of the 2^16 operand pairs is applied, one per clock. Each
// result is compared with a reference built from integer arithmetic only:
// the exact product a*b minus the partial products of columns 0..N-2,
// plus BIAS*2^N, divided by 2^N. Over the whole sweep the test also
// measures the error against the exact product and checks that
//   * the mean error is within 0.01 LSB of zero (LSB = 2^N),
//   * no error exceeds 3 LSB,
//   * the mean-square error is below that of plain truncation of the
//     exact product (the uncompensated fixed-width result).
// It counts how often each mechanism acted: compensation carries from
// column N-1, operands with the sign bit set, and results raised above the
// truncated exact product by the compensation; each must occur.
module tb_fw_multiplier;
  localparam int N    = 8;
  localparam int BIAS = 1;

  logic clk = 1'b0;
  logic [N-1:0] a, b, p;
  int checks = 0, failures = 0, cycles = 0;
  int n_comp = 0, n_signed = 0, n_raised = 0;
  // error statistics, in units of 1 (the output LSB is 2^N)
  longint sum_err = 0, sq_err = 0, sq_trunc = 0, max_err = 0;

  fw_multiplier dut (.a(a), .b(b), .p(p));

  always #5 clk = ~clk;
  always @(posedge clk) cycles <= cycles + 1;

  initial begin : watchdog
    wait (cycles == 70000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Sum of the partial products a_i*b_j with i+j <= N-2 (the columns the
  // multiplier replaces by a constant), weighted by 2^(i+j).
  function automatic longint low_columns(logic [N-1:0] x, logic [N-1:0] y);
    longint acc = 0;
    for (int i = 0; i < N - 1; i++)
      for (int j = 0; j < N - 1; j++)
        if (i + j <= N - 2 && x[i] && y[j]) acc += longint'(1) << (i + j);
    return acc;
  endfunction

  // Number of set terms in column N-1 of the Baugh-Wooley array.
  function automatic int column_nm1(logic [N-1:0] x, logic [N-1:0] y);
    int t = 0;
    for (int i = 0; i < N; i++) begin
      logic term;
      term = x[i] & y[N-1-i];
      if (i == 0 || i == N - 1) term = ~term;
      t += int'(term);
    end
    return t;
  endfunction

  initial begin : stim
    longint exact, modulus, t, ref_val, err, trunc, terr;
    logic [N-1:0] want;
    modulus = longint'(1) << (2 * N);
    for (int va = 0; va < (1 << N); va++) begin
      for (int vb = 0; vb < (1 << N); vb++) begin
        @(posedge clk);
        a = N'(va);
        b = N'(vb);
        @(negedge clk);
        exact   = longint'($signed(a)) * longint'($signed(b));
        t       = ((exact - low_columns(a, b)) % modulus + modulus) % modulus;
        ref_val = (t + (longint'(BIAS) << N)) >> N;
        want    = N'(ref_val);
        checks++;
        if (p !== want) begin
          failures++;
          if (failures < 10)
            $display("FAIL a=%0d b=%0d p=%0d want %0d",
                     $signed(a), $signed(b), $signed(p), $signed(want));
        end
        // error statistics against the exact product
        err   = longint'($signed(p)) * (longint'(1) << N) - exact;
        trunc = exact >>> N;  // floor(exact / 2^N)
        sum_err  += err;
        sq_err   += (err * err) >> N;
        terr      = trunc * (longint'(1) << N) - exact;
        sq_trunc += (terr * terr) >> N;
        if (err < 0 && -err > max_err) max_err = -err;
        if (err > max_err) max_err = err;
        // mechanism counters
        if (column_nm1(a, b) >= 2) n_comp++;
        if (a[N-1] || b[N-1]) n_signed++;
        if (longint'($signed(p)) > trunc) n_raised++;
      end
    end
    // mean within 0.01 LSB: |sum| * 100 < count * 2^N
    checks++;
    if ((sum_err < 0 ? -sum_err : sum_err) * 100 >= longint'(1 << (2 * N)) * (longint'(1) << N)) begin
      failures++;
      $display("FAIL mean error %0d / %0d", sum_err, 1 << (2 * N));
    end
    checks++;
    if (max_err > 3 * (longint'(1) << N)) begin
      failures++;
      $display("FAIL max error %0d", max_err);
    end
    checks++;
    if (sq_err >= sq_trunc) begin
      failures++;
      $display("FAIL mean-square error %0d not below truncation %0d", sq_err, sq_trunc);
    end
    $display("error: sum=%0d max=%0d (LSB=%0d) sq=%0d sq_trunc=%0d",
             sum_err, max_err, 1 << N, sq_err, sq_trunc);
    $display("mechanisms: compensation=%0d signed=%0d raised=%0d",
             n_comp, n_signed, n_raised);
    checks++;
    if (n_comp == 0 || n_signed == 0 || n_raised == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
