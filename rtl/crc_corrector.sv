// crc_corrector: error correction of the received data word.
//
// Every data bit marked in the error-location vector is inverted:
// data_corr = data_rx ^ err_loc. With no error marked the data passes
// unchanged.
//
// Interface: data_rx and err_loc in, data_corr out, N bits each.
// Purely combinational.
module crc_corrector #(
  parameter int unsigned N = crc_pkg::CRC_N
) (
  input  logic [N-1:0] data_rx,
  input  logic [N-1:0] err_loc,
  output logic [N-1:0] data_corr
);

  always_comb data_corr = data_rx ^ err_loc;

endmodule
