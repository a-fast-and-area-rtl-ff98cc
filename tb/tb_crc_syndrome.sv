// tb_crc_syndrome: self-checking test of the CRC comparison / syndrome stage.
//
// Equal CRC pairs must give a zero syndrome and no error; pairs that differ in
// chosen bits must give exactly those bits and the error flag. Includes the
// 8-bit-style example pattern (bits 0 and 7) embedded in a 128-bit word.
module tb_crc_syndrome;

  localparam int unsigned N = 128;

  int checks = 0, failures = 0;

  logic [N-1:0] a, b, s;
  logic         e;

  crc_syndrome dut (.crc_rx(a), .crc_calc(b), .syndrome(s), .error(e));

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
    logic [N-1:0] diff;
    for (int t = 0; t < 300; t++) begin
      a = rnd();
      diff = '0;
      // t%3: no difference, one or two flipped positions, random pattern
      if (t % 3 == 1) begin
        diff[$urandom_range(N-1)] = 1'b1;
        diff[$urandom_range(N-1)] = 1'b1;
      end else if (t % 3 == 2) begin
        diff = rnd();
      end
      b = a;
      for (int i = 0; i < N; i++) if (diff[i]) b[i] = !b[i];
      #1;
      check(s == diff, $sformatf("syndrome t=%0d", t));
      check(e == (diff != '0), $sformatf("error flag t=%0d", t));
    end
    a = '0; b = '0; b[0] = 1'b1; b[7] = 1'b1;
    #1 check(s[7:0] == 8'b1000_0001 && s[N-1:8] == '0 && e, "example syndrome");
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
