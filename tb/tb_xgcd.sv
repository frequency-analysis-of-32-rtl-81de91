// tb_xgcd: end-to-end self-checking test of the XGCD modular inverse processor.
//
// Runs the processor at its default size (N = 32, 33-bit buses) through:
//   - the worked example 18^-1 mod 65 = 47, which takes six loop iterations;
//   - the slowest 33-bit input, consecutive Fibonacci numbers (47 iterations);
//   - directed corner cases (a = 0, a = 1, a = m-1, a > m, even/even and other
//     non-coprime pairs, full 33-bit moduli, m = 1);
//   - random operand pairs over the full bus width and of random magnitude;
//   - a synchronous Reset in the middle of an operation.
// For the worked example the registers are also compared with the expected
// trace after every iteration. Each result is checked against a reference extended Euclidean computation
// written here with 64-bit integers, and independently by confirming that
// (a * s) mod m == 1 with 128-bit arithmetic, or that gcd(a, m) != 1 and
// the result is 0. The Ack pulse, the Ready/Enable handshake and the latency
// k*(N+6)+1 clock edges for k loop iterations are checked too.
// Every mechanism of the design (loop skipped, sign correction applied and
// not applied, non-invertible input, a >= m, Enable held in the output state,
// reset during an operation) is counted; one that never occurs is a failure.
module tb_xgcd;
  localparam int unsigned N = 32;
  localparam int unsigned W = N + 1;
  localparam int NOPS = 3000;

  logic         Clk = 1'b0;
  logic         Reset, Enable;
  logic [N:0]   A, B;
  logic [N:0]   Results;
  logic         Ack, Ready;

  int checks = 0;
  int failures = 0;

  // Mechanism counters.
  int n_skip_loop = 0, n_correction = 0, n_no_correction = 0, n_not_invertible = 0;
  int n_a_ge_m = 0, n_enable_held = 0, n_reset_mid = 0, n_full_width = 0;

  xgcd dut (.*);

  always #5 Clk = ~Clk;

  initial begin
    repeat (20000000) @(posedge Clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Iteration-by-iteration trace of 18^-1 mod 65: (s, s1, r, r1) after each
  // loop iteration, as in the worked example.
  bit trace_on = 1'b0;
  int trace_row = 0;
  longint trace_tab[6][4] = '{'{1, -3, 18, 11}, '{-3, 4, 11, 7}, '{4, -7, 7, 4},
                              '{-7, 11, 4, 3}, '{11, -18, 3, 1}, '{-18, 65, 1, 0}};

  always @(posedge Clk) begin
    if (trace_on && dut.state_q == xgcd_pkg::ST_SET1) begin
      if (trace_row < 6) begin
        checks++;
        if (longint'(dut.s_q) != trace_tab[trace_row][0] ||
            longint'(dut.s1_q) != trace_tab[trace_row][1] ||
            longint'(dut.r_q) != trace_tab[trace_row][2] ||
            longint'(dut.r1_q) != trace_tab[trace_row][3]) begin
          failures++;
          $display("FAIL trace row %0d: s=%0d s1=%0d r=%0d r1=%0d", trace_row + 1,
                   dut.s_q, dut.s1_q, dut.r_q, dut.r1_q);
        end
      end
      trace_row++;
    end
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  // Reference model: extended Euclid on 64-bit signed integers.
  task automatic reference(input longint a, input longint m, output longint s_raw,
                           output longint g, output int k);
    longint s, s1, r, r1, q, t;
    s = 0; s1 = 1; r = m; r1 = a; k = 0;
    while (r1 != 0) begin
      q = r / r1;
      t = s - q * s1; s = s1; s1 = t;
      t = r - q * r1; r = r1; r1 = t;
      k++;
    end
    s_raw = s;
    g = r;
  endtask

  task automatic run_op(input logic [N:0] a, input logic [N:0] m, input int hold);
    longint s_raw, g, expect_res;
    int k, lat;
    logic [127:0] prod;
    reference(longint'(a), longint'(m), s_raw, g, k);
    if (g != 1) expect_res = 0;
    else if (s_raw < 0) expect_res = s_raw + longint'(m);
    else expect_res = s_raw;

    @(negedge Clk);
    A = a; B = m; Enable = 1'b1;
    @(negedge Clk);
    check(Ack === 1'b1, $sformatf("Ack missing for a=%0d m=%0d", a, m));
    A = '1; B = '1;  // operands are captured at acceptance
    lat = 0;
    while (!Ready && lat < 5000) begin
      @(negedge Clk);
      lat++;
      if (Ack) begin
        checks++; failures++;
        $display("FAIL Ack longer than one cycle");
      end
    end
    check(lat == k * (N + 6) + 1,
          $sformatf("latency a=%0d m=%0d: %0d edges, expected %0d (k=%0d)", a, m, lat,
                    k * (N + 6) + 1, k));
    check(longint'(Results) == expect_res,
          $sformatf("a=%0d m=%0d: got %0d, expected %0d", a, m, Results, expect_res));
    // Independent property check.
    if (g == 1 && m > 1) begin
      prod = 128'(a) * 128'(Results);
      check(Results < m && (prod % 128'(m)) == 128'd1,
            $sformatf("a*s mod m != 1 for a=%0d m=%0d s=%0d", a, m, Results));
    end else if (g != 1) begin
      check(Results == '0, $sformatf("non-invertible a=%0d m=%0d gave %0d", a, m, Results));
    end

    // Mechanism bookkeeping.
    if (k == 0) n_skip_loop++;
    if (g != 1) n_not_invertible++;
    else if (s_raw < 0) n_correction++;
    else n_no_correction++;
    if (a >= m) n_a_ge_m++;
    if (m[N]) n_full_width++;

    // Hold Enable in the output state for a while, then release it.
    repeat (hold) begin
      @(negedge Clk);
      check(Ready === 1'b1 && longint'(Results) == expect_res, "Ready/Results not held");
    end
    if (hold > 0) n_enable_held++;
    Enable = 1'b0;
    @(negedge Clk);
    check(Ready === 1'b0, "Ready still high after Enable release");
    check(longint'(Results) == expect_res, "Results changed after Ready fell");
  endtask

  function automatic logic [N:0] rnd_sized();
    logic [63:0] v;
    v = {$urandom(), $urandom()};
    return W'(v) >> $urandom_range(N - 1, 0);
  endfunction

  initial begin
    logic [N:0] a, m;
    Reset = 1'b1; Enable = 1'b0; A = '0; B = '0;
    repeat (3) @(posedge Clk);
    @(negedge Clk);
    Reset = 1'b0;
    check(Ready === 1'b0 && Ack === 1'b0, "outputs not cleared by reset");

    // Worked example: six iterations, negative coefficient -18 corrected to 47.
    trace_on = 1'b1;
    run_op(18, 65, 0);
    trace_on = 1'b0;
    check(Results == 47, "18^-1 mod 65 != 47");
    check(trace_row == 6, $sformatf("18^-1 mod 65 took %0d iterations, expected 6", trace_row));

    run_op(0, 65, 1);                     // loop skipped, not invertible
    run_op(0, 1, 0);                      // m = 1
    run_op(1, 65, 2);
    run_op(64, 65, 0);
    run_op(83, 65, 0);                    // a > m
    run_op(10, 16, 0);                    // r and e both even
    run_op(21, 35, 3);                    // gcd 7
    run_op(3, 33'd4294967291, 0);             // largest 32-bit prime
    run_op(33'd4294967290, 33'd4294967291, 0);
    run_op(33'h1_FFFF_FFFF, 33'h1_FFFF_FFFE, 0);
    run_op(65537, 33'h1_0000_0001, 1);
    run_op(33'h1_2345_6789, 33'h1_FFFF_FFFF, 0);
    // Worst case for 33-bit operands: consecutive Fibonacci numbers F(48), F(49),
    // 47 iterations, 47*(N+6)+1 = 1787 cycles.
    run_op(33'd4807526976, 33'd7778742049, 0);

    // Reset in the middle of an operation.
    @(negedge Clk);
    A = 12345; B = 99991; Enable = 1'b1;
    repeat ($urandom_range(200, 5)) @(negedge Clk);
    Reset = 1'b1; Enable = 1'b0;
    @(negedge Clk);
    Reset = 1'b0;
    check(Ready === 1'b0 && Ack === 1'b0, "outputs not cleared by reset mid-operation");
    n_reset_mid++;
    run_op(12345, 99991, 0);

    for (int i = 0; i < NOPS; i++) begin
      m = rnd_sized();
      if (m < 2) m = 2;
      // Mostly a < m, sometimes an unrelated operand that may exceed m.
      if ($urandom_range(3, 0) == 0) a = rnd_sized();
      else a = W'({$urandom(), $urandom()} % 64'(m));
      run_op(a, m, $urandom_range(2, 0));
    end

    check(n_skip_loop > 0, "loop-skip case never seen");
    check(n_correction > 0, "sign correction never applied");
    check(n_no_correction > 0, "positive coefficient case never seen");
    check(n_not_invertible > 0, "non-invertible case never seen");
    check(n_a_ge_m > 0, "a >= m case never seen");
    check(n_enable_held > 0, "Enable never held in output state");
    check(n_reset_mid > 0, "reset mid-operation never done");
    check(n_full_width > 0, "33-bit modulus never used");
    $display("mechanisms: skip_loop=%0d correction=%0d no_correction=%0d not_invertible=%0d a_ge_m=%0d enable_held=%0d reset_mid=%0d full_width=%0d",
             n_skip_loop, n_correction, n_no_correction, n_not_invertible, n_a_ge_m,
             n_enable_held, n_reset_mid, n_full_width);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
