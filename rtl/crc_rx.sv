// crc_rx: receiver / CRC-based error decoder of the CRC128 link.
//
// For each received codeword (data half, CRC half) the receiver
//   1. recomputes the N CRC bits from the received data (crc_check_gen),
//   2. XORs them with the received CRC bits into the syndrome and flags an
//      error when they differ (crc_syndrome),
//   3. locates the erroneous data bits from the syndrome, either with the
//      parallel comparator array in one clock (crc_par_locator, the main
//      configuration) or bit by bit in N clocks (crc_ser_locator),
//   4. inverts the located bits (crc_corrector).
// The beacon tells the transmitter that a codeword can be taken; it is low
// while the serial locator works, which stalls the sender. The choice of
// locator per codeword (the mode input) is this design's own; the locators,
// their timing and the steps above follow the design description.
//
// Interface: mode (sampled with each codeword), beacon out, cw_valid/cw_data/
// cw_crc in (a codeword is taken when cw_valid and beacon are high),
// out_valid/out_data/out_error/out_err_loc out, with no back-pressure.
// Timing: parallel mode, result one clock after the codeword is taken and one
// codeword per clock; serial mode, result N clocks after it is taken. rst_n is
// synchronous and active low.
module crc_rx #(
  parameter int unsigned N = crc_pkg::CRC_N
) (
  input  logic               clk,
  input  logic               rst_n,
  input  crc_pkg::loc_mode_e mode,
  output logic               beacon,
  input  logic               cw_valid,
  input  logic [N-1:0]       cw_data,
  input  logic [N-1:0]       cw_crc,
  output logic               out_valid,
  output logic [N-1:0]       out_data,
  output logic               out_error,
  output logic [N-1:0]       out_err_loc
);

  import crc_pkg::*;

  logic [N-1:0] crc_calc, syndrome;
  logic         error;
  logic         accept;
  logic         par_valid, ser_busy, ser_done;
  logic [N-1:0] par_loc, ser_loc;
  logic [N-1:0] data_q;
  logic         error_q;
  loc_mode_e    mode_q;

  crc_check_gen #(.N(N)) u_gen (.data(cw_data), .check(crc_calc));

  crc_syndrome #(.N(N)) u_syn (
    .crc_rx(cw_crc), .crc_calc(crc_calc), .syndrome(syndrome), .error(error)
  );

  always_comb begin
    beacon = !ser_busy;
    accept = cw_valid && beacon;
  end

  crc_par_locator #(.N(N)) u_par (
    .clk(clk), .rst_n(rst_n),
    .in_valid(accept && mode == LOC_PARALLEL), .syndrome(syndrome),
    .loc_valid(par_valid), .err_loc(par_loc)
  );

  crc_ser_locator #(.N(N)) u_ser (
    .clk(clk), .rst_n(rst_n),
    .start(accept && mode == LOC_SERIAL), .syndrome(syndrome),
    .busy(ser_busy), .done(ser_done), .err_loc(ser_loc)
  );

  // Received data and error flag wait beside the locator for its result.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      mode_q <= LOC_PARALLEL;
    end else if (accept) begin
      mode_q <= mode;
    end
    if (accept) begin
      data_q  <= cw_data;
      error_q <= error;
    end
  end

  always_comb begin
    out_valid   = par_valid || ser_done;
    out_error   = error_q;
    out_err_loc = (mode_q == LOC_SERIAL) ? ser_loc : par_loc;
  end

  crc_corrector #(.N(N)) u_cor (
    .data_rx(data_q), .err_loc(out_err_loc), .data_corr(out_data)
  );

  // Only one locator can be finishing at a time.
  a_one_result: assert property (@(posedge clk) disable iff (!rst_n)
    !(par_valid && ser_done));

endmodule
