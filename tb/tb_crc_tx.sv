// tb_crc_tx: self-checking test of the transmitter.
//
// Random data words are offered with random gaps while the beacon toggles at
// random. Every codeword that moves (cw_valid and beacon high) must carry the
// next data word in order with its CRC half equal to the neighbour-pair
// parity, worked out here bit by bit. A codeword must stay unchanged while the
// beacon is low, and with the beacon and data held high one codeword must
// leave per clock.
module tb_crc_tx;

  localparam int unsigned N = 128;

  int checks = 0, failures = 0;

  logic         clk = 1'b0, rst_n = 1'b0;
  logic         data_valid = 1'b0, beacon = 1'b0;
  logic [N-1:0] data = '0;
  logic         data_ready, cw_valid;
  logic [N-1:0] cw_data, cw_crc;

  crc_tx dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [N-1:0] pair_parity(input logic [N-1:0] d);
    logic [N-1:0] c;
    for (int i = 0; i < N - 1; i++) c[i] = d[i] ^ d[i+1];
    c[N-1] = d[N-1] ^ d[0];
    return c;
  endfunction

  logic [N-1:0] sentq[$];
  int           moved = 0, stalled = 0, burst_moves = 0;
  bit           burst = 1'b0;
  logic [N-1:0] held_data;
  bit           was_stalled = 1'b0;

  // observe on the rising edge, before anything changes
  always @(posedge clk) if (rst_n) begin
    if (was_stalled) check(cw_valid && cw_data == held_data, "codeword held while beacon low");
    was_stalled <= cw_valid && !beacon;
    held_data   <= cw_data;
    if (cw_valid && !beacon) stalled++;
    if (cw_valid && beacon) begin
      moved++;
      if (burst) burst_moves++;
      if (sentq.size() == 0) check(1'b0, "codeword with nothing sent");
      else begin
        check(cw_data == sentq[0], "codeword data in order");
        check(cw_crc == pair_parity(sentq[0]), "codeword CRC");
        void'(sentq.pop_front());
      end
    end
    if (data_valid && data_ready) sentq.push_back(data);
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(!cw_valid, "empty after reset");
    for (int t = 0; t < 400; t++) begin
      beacon = ($urandom_range(3) != 0);
      if (!data_valid || data_ready) begin
        data_valid = ($urandom_range(2) != 0);
        data = {$urandom, $urandom, $urandom, $urandom};
      end
      @(negedge clk);
    end
    // full-rate burst: one codeword per clock
    beacon = 1'b1;
    data_valid = 1'b1;
    burst = 1'b1;
    for (int t = 0; t < 50; t++) begin
      data = {$urandom, $urandom, $urandom, $urandom};
      @(negedge clk);
    end
    burst = 1'b0;
    data_valid = 1'b0;
    repeat (3) @(negedge clk);
    check(burst_moves >= 49, $sformatf("burst rate: %0d codewords in 50 clocks", burst_moves));
    check(sentq.size() == 0, "every word delivered");
    check(stalled > 0, "beacon stall exercised");
    $display("INFO moved=%0d stalled_cycles=%0d", moved, stalled);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
