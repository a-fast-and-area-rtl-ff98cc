// crc_decoder_top: CRC128 link, transmitter and receiver.
//
// The transmitter (crc_tx) appends N = 128 CRC bits to each 128-bit data word;
// the receiver (crc_rx) recomputes them, forms the syndrome, locates and
// corrects the erroneous bits with the single-cycle parallel comparator array
// (mode 0) or the bit-serial locator (mode 1), and reports the error flag and
// error register. The receiver's beacon is wired to the transmitter. The
// channel between them is not part of the design: the codeword the
// transmitter sends (tx_cw_*) and the codeword the receiver gets (rx_cw_*) are
// separate ports, so a channel model, or a plain loop-back wire, sits outside.
//
// Timing, parallel mode with the channel looped back by wires: a data word
// taken on clock edge t is in the codeword register from t+1, taken by the
// receiver on edge t+1 and decoded on out_* from t+2; one word per clock.
// In serial mode the beacon drops for N clocks per codeword. rst_n is
// synchronous and active low.
module crc_decoder_top #(
  parameter int unsigned N = crc_pkg::CRC_N
) (
  input  logic         clk,
  input  logic         rst_n,
  // data to send
  input  logic         tx_valid,
  input  logic [N-1:0] tx_data,
  output logic         tx_ready,
  // codeword into the channel
  output logic         tx_cw_valid,
  output logic [N-1:0] tx_cw_data,
  output logic [N-1:0] tx_cw_crc,
  // codeword out of the channel
  input  logic         rx_cw_valid,
  input  logic [N-1:0] rx_cw_data,
  input  logic [N-1:0] rx_cw_crc,
  output logic         beacon,
  // locator choice: 0 parallel, 1 serial
  input  logic         mode,
  // decoded result
  output logic         out_valid,
  output logic [N-1:0] out_data,
  output logic         out_error,
  output logic [N-1:0] out_err_loc
);

  crc_tx #(.N(N)) u_tx (
    .clk(clk), .rst_n(rst_n),
    .data_valid(tx_valid), .data(tx_data), .data_ready(tx_ready),
    .beacon(beacon),
    .cw_valid(tx_cw_valid), .cw_data(tx_cw_data), .cw_crc(tx_cw_crc)
  );

  crc_rx #(.N(N)) u_rx (
    .clk(clk), .rst_n(rst_n),
    .mode(crc_pkg::loc_mode_e'(mode)),
    .beacon(beacon),
    .cw_valid(rx_cw_valid), .cw_data(rx_cw_data), .cw_crc(rx_cw_crc),
    .out_valid(out_valid), .out_data(out_data),
    .out_error(out_error), .out_err_loc(out_err_loc)
  );

endmodule
