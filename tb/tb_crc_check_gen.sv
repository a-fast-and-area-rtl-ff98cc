// tb_crc_check_gen: self-checking test of the redundant-bit generator.
//
// An 8-bit instance is checked against the hand-worked example: data
// 00010001 gives check bits 10011001, and flipping B0 in transit gives the
// error CRC 10000001 (check bits 0 and 7). A 128-bit instance is checked on
// random words against a rotate-and-XOR formulation, and for every bit
// position j that flipping data bit j flips exactly check bits j and j-1.
module tb_crc_check_gen;

  localparam int unsigned N = 128;

  int checks = 0, failures = 0;

  logic [7:0]   d8, c8;
  logic [N-1:0] d, c, d2, c2;

  crc_check_gen #(.N(8)) u8   (.data(d8), .check(c8));
  crc_check_gen              u128 (.data(d), .check(c));
  crc_check_gen              u128b(.data(d2), .check(c2));

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
    logic [7:0] c8_good;
    logic [N-1:0] exp_flip;
    // worked 8-bit example
    d8 = 8'b0001_0001;
    #1 check(c8 == 8'b1001_1001, $sformatf("8-bit check of 00010001: got %b", c8));
    c8_good = c8;
    d8 = 8'b0001_0000;  // B0 flipped
    #1 check((c8 ^ c8_good) == 8'b1000_0001,
             $sformatf("8-bit error CRC for B0: got %b", c8 ^ c8_good));
    // 128-bit: rotate formulation
    for (int t = 0; t < 200; t++) begin
      d = rnd();
      #1 check(c == (d ^ {d[0], d[N-1:1]}), $sformatf("rotate form, data %h", d));
    end
    // 128-bit: every single-bit flip touches exactly two check bits
    d = rnd();
    for (int j = 0; j < N; j++) begin
      d2 = d ^ (N'(1) << j);
      exp_flip = (N'(1) << j) | (N'(1) << ((j + N - 1) % N));
      #1 check((c ^ c2) == exp_flip, $sformatf("flip of bit %0d", j));
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
