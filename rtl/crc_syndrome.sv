// crc_syndrome: CRC comparison and syndrome (error CRC) generation.
//
// The CRC bits that came with the codeword are XORed with the CRC bits the
// receiver recomputed from the received data. The result, the syndrome or
// "error CRC", has a bit set for every check bit whose two covered data bits
// changed parity in transit; error is high when the two CRCs do not match,
// i.e. when any syndrome bit is set.
//
// Interface: crc_rx and crc_calc in, syndrome and error out.
// Purely combinational.
module crc_syndrome #(
  parameter int unsigned N = crc_pkg::CRC_N
) (
  input  logic [N-1:0] crc_rx,
  input  logic [N-1:0] crc_calc,
  output logic [N-1:0] syndrome,
  output logic         error
);

  always_comb begin
    syndrome = crc_rx ^ crc_calc;
    error    = |syndrome;
  end

endmodule
