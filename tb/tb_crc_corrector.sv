// tb_crc_corrector: self-checking test of the error corrector.
//
// A random word is corrupted in chosen positions; feeding the corrupted word
// and the corruption positions must give back the original word, and an
// all-zero location vector must leave the word unchanged.
module tb_crc_corrector;

  localparam int unsigned N = 128;

  int checks = 0, failures = 0;

  logic [N-1:0] rx, loc, corr;

  crc_corrector dut (.data_rx(rx), .err_loc(loc), .data_corr(corr));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [N-1:0] rnd();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  initial begin
    logic [N-1:0] orig;
    for (int t = 0; t < 300; t++) begin
      orig = rnd();
      loc = '0;
      if (t % 2 == 1) for (int k = 0; k < 1 + t % 5; k++) loc[$urandom_range(N-1)] = 1'b1;
      rx = orig;
      for (int i = 0; i < N; i++) if (loc[i]) rx[i] = !orig[i];
      #1 check(corr == orig, $sformatf("correction t=%0d", t));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
