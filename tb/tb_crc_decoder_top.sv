// tb_crc_decoder_top: end-to-end test of the CRC128 link at full size.
//
// The top runs with its default parameters (N = 128: 128 data bits, 128 CRC
// bits, 256-bit codeword). The testbench closes the channel between the
// transmitter's codeword outputs and the receiver's codeword inputs and
// injects errors there, chosen afresh for every codeword: none, one data bit,
// several data bits with two clean bits between them, or one CRC bit. The
// locator (parallel or serial) is also picked per codeword. Every decoded
// word must equal the word given to the transmitter, in order, with the right
// error flag and error register. A full-rate parallel burst must deliver one
// word per clock with 2 clocks from input to output (1 clock in the receiver; N clocks
// there in serial mode), and each mechanism must
// happen at least once: clean, corrected single and multiple errors, CRC-bit
// error, parallel and serial decoding, locator switch, beacon stall and
// transmitter back-pressure.
module tb_crc_decoder_top;

  localparam int unsigned N = crc_pkg::CRC_N;

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

  crc_decoder_top dut (.*);

  always #5 clk = ~clk;

  // channel with error injection
  logic [N-1:0] data_err = '0, crc_err = '0;
  always_comb begin
    rx_cw_valid = tx_cw_valid;
    rx_cw_data  = tx_cw_data ^ data_err;
    rx_cw_crc   = tx_cw_crc ^ crc_err;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  typedef struct {
    logic [N-1:0] data;
    logic [N-1:0] loc;
    logic         err;
    logic         serial;
    int           in_cycle;  // clock the transmitter took the word
    int           cycle;     // clock the receiver took the codeword
  } exp_t;

  logic [N-1:0] inq[$];   // words given to the transmitter
  int           in_cycle[$];
  exp_t         expq[$];  // words in the receiver
  int           cycle = 0;
  int           n_clean = 0, n_single = 0, n_multi = 0, n_crcbit = 0;
  int           n_par = 0, n_ser = 0, n_switch = 0, n_stall = 0, n_backp = 0;
  int           n_out = 0, burst_out = 0, max_lat_ok = 0;
  bit           burst = 1'b0, serial_allowed = 1'b1;
  int           last_mode = -1;

  // next codeword's channel errors and locator
  task automatic pick_next();
    int kind = $urandom_range(3);
    data_err = '0;
    crc_err  = '0;
    case (kind)
      1: data_err[$urandom_range(N-1)] = 1'b1;
      2: for (int k = 0; k < 5; k++) begin
           int p = $urandom_range(N-1);
           if (!data_err[(p + 1) % N] && !data_err[(p + N - 1) % N] &&
               !data_err[(p + 2) % N] && !data_err[(p + N - 2) % N]) data_err[p] = 1'b1;
         end
      3: crc_err[$urandom_range(N-1)] = 1'b1;
      default: ;
    endcase
    mode = serial_allowed && ($urandom_range(7) == 0);
  endtask

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n) begin
      if (out_valid) begin
        n_out++;
        if (burst) burst_out++;
        if (expq.size() == 0) check(1'b0, "result with nothing sent");
        else begin
          check(out_data == expq[0].data, "end-to-end data");
          check(out_err_loc == expq[0].loc, $sformatf("err_loc %h, expected %h", out_err_loc, expq[0].loc));
          check(out_error == expq[0].err, "error flag");
          check(cycle - expq[0].cycle == (expq[0].serial ? N : 1),
                $sformatf("receiver latency %0d", cycle - expq[0].cycle));
          if (burst) check(cycle - expq[0].in_cycle == 2,
                           $sformatf("input-to-output latency %0d", cycle - expq[0].in_cycle));
          void'(expq.pop_front());
        end
      end
      if (tx_valid && !tx_ready) n_backp++;
      if (tx_cw_valid && !beacon) n_stall++;
      if (tx_valid && tx_ready) begin
        inq.push_back(tx_data);
        in_cycle.push_back(cycle);
      end
      if (rx_cw_valid && beacon) begin
        if (inq.size() == 0) check(1'b0, "codeword with nothing sent");
        else begin
          check(tx_cw_data == inq[0], "transmitter order");
          if (data_err == '0 && crc_err == '0) n_clean++;
          else if (crc_err != '0) n_crcbit++;
          else if ($countones(data_err) == 1) n_single++;
          else n_multi++;
          if (mode) n_ser++; else n_par++;
          if (last_mode != -1 && last_mode != int'(mode)) n_switch++;
          last_mode = int'(mode);
          expq.push_back('{inq[0], data_err, (data_err != '0) || (crc_err != '0), mode, in_cycle[0], cycle});
          void'(inq.pop_front());
          void'(in_cycle.pop_front());
        end
        #1 pick_next();
      end
    end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    pick_next();
    // random traffic, both locators
    for (int t = 0; t < 6000; t++) begin
      if (!tx_valid || tx_ready) begin
        tx_valid = ($urandom_range(4) != 0);
        tx_data = {$urandom, $urandom, $urandom, $urandom};
      end
      @(negedge clk);
    end
    // drain, then a full-rate parallel burst
    tx_valid = 1'b0;
    serial_allowed = 1'b0;
    while (expq.size() > 0 || inq.size() > 0 || tx_cw_valid) @(negedge clk);
    if (mode) begin
      mode = 1'b0;
    end
    repeat (2) @(negedge clk);
    tx_valid = 1'b1;
    burst = 1'b1;
    for (int t = 0; t < 64; t++) begin
      tx_data = {$urandom, $urandom, $urandom, $urandom};
      @(negedge clk);
    end
    tx_valid = 1'b0;
    @(negedge clk);
    @(negedge clk);
    burst = 1'b0;
    repeat (4) @(negedge clk);
    check(burst_out == 64, $sformatf("burst: %0d words out for 64 in", burst_out));
    check(expq.size() == 0 && inq.size() == 0, "every word decoded");
    check(n_clean > 0, "clean codeword seen");
    check(n_single > 0, "single-error correction seen");
    check(n_multi > 0, "multiple-error correction seen");
    check(n_crcbit > 0, "CRC-bit error seen");
    check(n_par > 0, "parallel decoding seen");
    check(n_ser > 0, "serial decoding seen");
    check(n_switch > 0, "locator switch seen");
    check(n_stall > 0, "beacon stall seen");
    check(n_backp > 0, "transmitter back-pressure seen");
    $display("INFO words=%0d clean=%0d single=%0d multi=%0d crc_bit=%0d parallel=%0d serial=%0d switches=%0d stall_cycles=%0d backpressure_cycles=%0d",
             n_out, n_clean, n_single, n_multi, n_crcbit, n_par, n_ser, n_switch, n_stall, n_backp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
