// tb_crc_ser_locator: self-checking test of the bit-serial error locator.
//
// Each syndrome is built from a known error pattern. After start, done must
// pulse exactly N clocks later with the error register marking the injected
// bits; busy must be high in between, and a start given while busy must be
// ignored. Patterns: no error, single errors at the ends and in the middle,
// and random patterns of errors with at least two clean bits between them.
module tb_crc_ser_locator;

  localparam int unsigned N = 128;

  int checks = 0, failures = 0;

  logic         clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [N-1:0] syndrome = '0;
  logic         busy, done;
  logic [N-1:0] err_loc;

  crc_ser_locator dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [N-1:0] syn_of(input logic [N-1:0] errs);
    logic [N-1:0] s = '0;
    for (int j = 0; j < N; j++)
      if (errs[j]) begin
        s[j] = !s[j];
        s[(j + N - 1) % N] = !s[(j + N - 1) % N];
      end
    return s;
  endfunction

  task automatic run(input logic [N-1:0] errs);
    int n = 0;
    start = 1'b1;
    syndrome = syn_of(errs);
    @(negedge clk);
    n = 1;
    start = 1'b0;
    syndrome = ~syndrome;   // must not disturb the word under test
    while (!done && n < 4 * N) begin
      check(busy, "busy while working");
      if (n == 5) begin      // a start while busy is ignored
        start = 1'b1;
        @(negedge clk);
        start = 1'b0;
      end else @(negedge clk);
      n++;
    end
    check(done, "done reached");
    check(n == N, $sformatf("serial cycles %0d, expected %0d", n, N));
    check(err_loc == errs, $sformatf("err_loc %h, expected %h", err_loc, errs));
    @(negedge clk);
    check(!done && !busy, "idle after done");
    check(err_loc == errs, "err_loc held after done");
  endtask

  initial begin
    logic [N-1:0] errs;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(!busy && !done, "idle after reset");
    run('0);
    run(N'(1));
    run(N'(1) << (N - 1));
    run(N'(1) << 61);
    for (int t = 0; t < 12; t++) begin
      errs = '0;
      for (int k = 0; k < 5; k++) begin
        int p = $urandom_range(N-1);
        if (!errs[(p + 1) % N] && !errs[(p + N - 1) % N] &&
              !errs[(p + 2) % N] && !errs[(p + N - 2) % N]) errs[p] = 1'b1;
      end
      run(errs);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20 * 4 * N) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
