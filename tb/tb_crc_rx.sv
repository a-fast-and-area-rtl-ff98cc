// tb_crc_rx: self-checking test of the receiver (CRC-based decoder).
//
// Codewords are built here (data plus neighbour-pair parity) and corrupted in
// known ways: no error, one data bit, several data bits with two clean bits between,
// and a single CRC bit. Each is sent in parallel or serial mode, picked at
// random, and held until the beacon takes it. Every result must bring back
// the original data (the CRC-bit case leaves the data as received), the error
// flag, and the error register marking exactly the flipped data bits. The
// result must come 1 clock after acceptance in parallel mode and N clocks in
// serial mode, and the beacon must stay low while the serial locator works.
module tb_crc_rx;

  import crc_pkg::*;

  localparam int unsigned N = 128;

  int checks = 0, failures = 0;

  logic         clk = 1'b0, rst_n = 1'b0;
  loc_mode_e    mode = LOC_PARALLEL;
  logic         beacon;
  logic         cw_valid = 1'b0;
  logic [N-1:0] cw_data = '0, cw_crc = '0;
  logic         out_valid, out_error;
  logic [N-1:0] out_data, out_err_loc;

  crc_rx dut (.*);

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

  typedef struct {
    logic [N-1:0] data;   // expected corrected data
    logic [N-1:0] loc;    // expected error register
    logic         err;
    loc_mode_e    mode;
    int           cycle;  // clock of acceptance
  } exp_t;

  exp_t expq[$];
  int   cycle = 0;
  int   n_par = 0, n_ser = 0, n_clean = 0, n_corr = 0, n_crcbit = 0, n_stall = 0;
  logic [N-1:0] cur_data, cur_loc;
  logic         cur_err;

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n) begin
      if (out_valid) begin
        if (expq.size() == 0) check(1'b0, "result with nothing sent");
        else begin
          check(out_data == expq[0].data, $sformatf("data, mode %s", expq[0].mode.name()));
          check(out_err_loc == expq[0].loc, $sformatf("err_loc %h, expected %h", out_err_loc, expq[0].loc));
          check(out_error == expq[0].err, "error flag");
          check(cycle - expq[0].cycle == ((expq[0].mode == LOC_SERIAL) ? N : 1),
                $sformatf("latency %0d in mode %s", cycle - expq[0].cycle, expq[0].mode.name()));
          void'(expq.pop_front());
        end
      end
      if (expq.size() > 0 && expq[$].mode == LOC_SERIAL && cycle - expq[$].cycle < N)
        check(!beacon, "beacon low while serial locator busy");
      if (cw_valid && !beacon) n_stall++;
      if (cw_valid && beacon) expq.push_back('{cur_data, cur_loc, cur_err, mode, cycle});
    end
  end

  task automatic send(input int kind, input loc_mode_e m);
    logic [N-1:0] d, errs;
    d = {$urandom, $urandom, $urandom, $urandom};
    errs = '0;
    cw_data = d;
    cw_crc = pair_parity(d);
    cur_data = d;
    cur_err = 1'b1;
    case (kind)
      0: begin cur_err = 1'b0; n_clean++; end
      1: begin errs[$urandom_range(N-1)] = 1'b1; n_corr++; end
      2: begin
        for (int k = 0; k < 6; k++) begin
          int p = $urandom_range(N-1);
          if (!errs[(p + 1) % N] && !errs[(p + N - 1) % N] &&
              !errs[(p + 2) % N] && !errs[(p + N - 2) % N]) errs[p] = 1'b1;
        end
        n_corr++;
      end
      default: begin   // a CRC bit hit: flagged, nothing to correct
        cw_crc[$urandom_range(N-1)] ^= 1'b1;
        n_crcbit++;
      end
    endcase
    cw_data = d ^ errs;
    cur_loc = errs;
    mode = m;
    if (m == LOC_SERIAL) n_ser++; else n_par++;
    cw_valid = 1'b1;
    @(posedge clk);
    while (!beacon) @(posedge clk);
    @(negedge clk);
    cw_valid = ($urandom_range(1) == 0) ? 1'b0 : 1'b1;
    if (!cw_valid) @(negedge clk);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(beacon && !out_valid, "ready after reset");
    // back-to-back parallel stream
    for (int t = 0; t < 40; t++) send(t % 4, LOC_PARALLEL);
    // mixed modes
    for (int t = 0; t < 40; t++) send($urandom_range(3), loc_mode_e'($urandom_range(2) == 0));
    cw_valid = 1'b0;
    repeat (2 * N) @(negedge clk);
    check(expq.size() == 0, "every codeword decoded");
    check(n_par > 0 && n_ser > 0 && n_clean > 0 && n_corr > 0 && n_crcbit > 0 && n_stall > 0,
          "all cases exercised");
    $display("INFO parallel=%0d serial=%0d clean=%0d corrected=%0d crc_bit=%0d stall_cycles=%0d",
             n_par, n_ser, n_clean, n_corr, n_crcbit, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100 * N) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
