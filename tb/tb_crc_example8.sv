// tb_crc_example8: the 8-bit worked example run through the whole link.
//
// The link is built 8 bits wide. The data word 00010001 is sent, bit B0 is
// flipped in the channel, and the receiver must flag the error, mark B0 in
// its error register (error CRC 10000001, check bits 0 and 7, both cover B0)
// and deliver 00010001 again. This is done once with the parallel locator
// (result 1 clock after the receiver takes the codeword) and once with the
// serial one (8 clocks, one per data bit), then once with no error.
module tb_crc_example8;

  localparam int unsigned N = 8;

  int checks = 0, failures = 0;

  logic         clk = 1'b0, rst_n = 1'b0;
  logic         tx_valid = 1'b0, tx_ready;
  logic [N-1:0] tx_data = '0;
  logic         tx_cw_valid;
  logic [N-1:0] tx_cw_data, tx_cw_crc;
  logic         rx_cw_valid;
  logic [N-1:0] rx_cw_data, rx_cw_crc;
  logic         beacon;
  logic         mode = 1'b0;
  logic         out_valid, out_error;
  logic [N-1:0] out_data, out_err_loc;
  logic [N-1:0] flip = '0;

  crc_decoder_top #(.N(N)) dut (.*);

  always_comb begin
    rx_cw_valid = tx_cw_valid;
    rx_cw_data  = tx_cw_data ^ flip;
    rx_cw_crc   = tx_cw_crc;
  end

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic run(input logic serial, input logic [N-1:0] f);
    int n = 0;
    mode = serial;
    flip = f;
    tx_data = 8'b0001_0001;
    tx_valid = 1'b1;
    @(negedge clk);
    tx_valid = 1'b0;
    check(tx_cw_valid && tx_cw_crc == 8'b1001_1001, $sformatf("codeword CRC %b", tx_cw_crc));
    // the receiver takes it on the next edge; count clocks to the result
    @(negedge clk);
    n = 1;
    while (!out_valid && n < 50) begin
      @(negedge clk);
      n++;
    end
    check(out_valid, "result");
    check(n == (serial ? N : 1), $sformatf("receiver clocks %0d", n));
    check(out_error == (f != '0), "error flag");
    check(out_err_loc == f, $sformatf("error register %b", out_err_loc));
    check(out_data == 8'b0001_0001, $sformatf("corrected data %b", out_data));
    @(negedge clk);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    run(1'b0, 8'b0000_0001);
    run(1'b1, 8'b0000_0001);
    run(1'b0, 8'b0000_0000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
