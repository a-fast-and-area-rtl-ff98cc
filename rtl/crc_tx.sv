// crc_tx: transmitter side of the CRC128 link.
//
// A data word is taken, its N redundant bits are generated (crc_check_gen)
// and data and CRC are placed side by side in the codeword register: a
// 2N-bit codeword, 256 bits for the default N = 128, carried as a data half
// and a CRC half. The receiver's beacon releases the codeword: it moves to the
// receiver in a clock where cw_valid and beacon are both high. The register
// refills in the same clock, so with the beacon held high one codeword leaves
// per clock. Treating the beacon as the ready of a valid/ready handshake is
// this design's reading of "receiver sends a beacon, transmitter then sends".
//
// Interface: data_valid/data/data_ready (the word is taken when both valid
// and ready are high), beacon in, cw_valid/cw_data/cw_crc out.
// Timing: a word taken on one clock edge is offered from the next clock.
// rst_n is synchronous and active low and empties the codeword register.
module crc_tx #(
  parameter int unsigned N = crc_pkg::CRC_N
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         data_valid,
  input  logic [N-1:0] data,
  output logic         data_ready,
  input  logic         beacon,
  output logic         cw_valid,
  output logic [N-1:0] cw_data,
  output logic [N-1:0] cw_crc
);

  logic [N-1:0] check;

  crc_check_gen #(.N(N)) u_gen (.data(data), .check(check));

  // Room in the codeword register: empty, or its codeword leaves this clock.
  always_comb data_ready = !cw_valid || beacon;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cw_valid <= 1'b0;
    end else if (data_ready) begin
      cw_valid <= data_valid;
    end
    if (data_ready && data_valid) begin
      cw_data <= data;
      cw_crc  <= check;
    end
  end

endmodule
