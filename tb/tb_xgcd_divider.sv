// tb_xgcd_divider: self-checking test of the sequential divider.
//
// Drives directed corner cases (dividend 0, divisor 1, divisor above the
// dividend, full-width operands, the quotients of the worked 18^-1 mod 65
// example) and random operands of random magnitude. Each result is compared
// with the simulator's own / and % operators, and the time from the start
// pulse to 'done' is checked to be exactly W+1 clock edges (W busy cycles,
// then the done cycle). Ends with a TB_RESULT line.
module tb_xgcd_divider;
  localparam int unsigned W = 33;

  logic         clk = 1'b0;
  logic         rst;
  logic         start;
  logic [W-1:0] dividend, divisor;
  logic         busy, done;
  logic [W-1:0] quotient, remainder;

  int checks = 0;
  int failures = 0;

  xgcd_divider #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic divide(input logic [W-1:0] n, input logic [W-1:0] d);
    int cycles;
    logic [W-1:0] eq, er;
    eq = n / d;
    er = n % d;
    @(negedge clk);
    dividend = n;
    divisor  = d;
    start    = 1'b1;
    @(negedge clk);
    start    = 1'b0;
    dividend = '1;  // operands must be captured, not followed
    divisor  = '1;
    cycles   = 1;
    while (!done && cycles < 200) begin
      @(negedge clk);
      cycles++;
    end
    checks++;
    if (cycles != W + 1) begin
      failures++;
      $display("FAIL latency %0d / %0d: %0d edges, expected %0d", n, d, cycles, W + 1);
    end
    checks++;
    if (quotient !== eq || remainder !== er) begin
      failures++;
      $display("FAIL %0d / %0d: got q=%0d r=%0d, expected q=%0d r=%0d",
               n, d, quotient, remainder, eq, er);
    end
    // Outputs hold after done.
    @(negedge clk);
    checks++;
    if (quotient !== eq || remainder !== er || busy || done) begin
      failures++;
      $display("FAIL outputs not held after done for %0d / %0d", n, d);
    end
  endtask

  function automatic logic [W-1:0] rnd();
    logic [W-1:0] v;
    int sh;
    v  = W'({$urandom(), $urandom()});
    sh = $urandom_range(W - 1, 0);
    return v >> sh;
  endfunction

  initial begin
    logic [W-1:0] d;
    rst = 1'b1; start = 1'b0; dividend = '0; divisor = '1;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    divide(65, 18);
    divide(18, 11);
    divide(11, 7);
    divide(3, 1);
    divide(0, 7);
    divide(5, 9);
    divide(W'(1) << (W - 1), 3);
    divide('1, '1);
    divide('1, 1);
    divide('1, W'(2));
    divide(W'(4294967295), W'(65537));
    repeat (2000) begin
      d = rnd();
      if (d == '0) d = 1;
      divide(rnd(), d);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
