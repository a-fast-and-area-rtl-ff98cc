// tb_crc_par_locator: self-checking test of the single-cycle error locator.
//
// Syndromes are built from known error patterns (a flipped data bit j flips
// check bits j and j-1), one per clock and back to back. Each result must
// appear in the error register exactly one clock later, marking the injected
// bits: no error, every single-bit position, and random patterns of errors
// with at least two clean bits between them. Idle cycles must not raise loc_valid.
module tb_crc_par_locator;

  localparam int unsigned N = 128;

  int checks = 0, failures = 0;

  logic         clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic [N-1:0] syndrome = '0;
  logic         loc_valid;
  logic [N-1:0] err_loc;

  crc_par_locator dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // syndrome produced by a set of flipped data bits
  function automatic logic [N-1:0] syn_of(input logic [N-1:0] errs);
    logic [N-1:0] s = '0;
    for (int j = 0; j < N; j++)
      if (errs[j]) begin
        s[j] = !s[j];
        s[(j + N - 1) % N] = !s[(j + N - 1) % N];
      end
    return s;
  endfunction

  logic [N-1:0] expq[$];
  int           sent_cycle[$];
  int           cycle = 0;

  always @(posedge clk) cycle <= cycle + 1;

  // scoreboard: every result one clock after its syndrome
  always @(negedge clk) if (rst_n) begin
    if (loc_valid) begin
      if (expq.size() == 0) check(1'b0, "unexpected loc_valid");
      else begin
        check(err_loc == expq[0], $sformatf("err_loc %h, expected %h", err_loc, expq[0]));
        check(cycle - sent_cycle[0] == 1, $sformatf("latency %0d", cycle - sent_cycle[0]));
        void'(expq.pop_front());
        void'(sent_cycle.pop_front());
      end
    end
  end

  task automatic send(input logic [N-1:0] errs);
    in_valid = 1'b1;
    syndrome = syn_of(errs);
    expq.push_back(errs);
    sent_cycle.push_back(cycle);
    @(negedge clk);
  endtask

  initial begin
    logic [N-1:0] errs;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    send('0);
    for (int j = 0; j < N; j++) send(N'(1) << j);
    in_valid = 1'b0;
    repeat (3) @(negedge clk);
    for (int t = 0; t < 100; t++) begin
      errs = '0;
      for (int k = 0; k < 4; k++) begin
        int p = $urandom_range(N-1);
        // keep at least two clean bits between errors (cyclically)
        if (!errs[(p + 1) % N] && !errs[(p + N - 1) % N] &&
              !errs[(p + 2) % N] && !errs[(p + N - 2) % N]) errs[p] = 1'b1;
      end
      if (t % 7 == 3) begin
        in_valid = 1'b0;
        @(negedge clk);
      end
      send(errs);
    end
    in_valid = 1'b0;
    repeat (3) @(negedge clk);
    check(expq.size() == 0, "all results returned");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
