// crc_check_gen: redundant-bit (CRC) generator of the CRC128 link.
//
// Each of the N check bits is the XOR of two neighbouring data bits,
//   check[i] = data[i] ^ data[(i+1) mod N],
// so every data bit is covered by exactly two check bits, check[j] and
// check[(j-1) mod N]. A single flipped data bit therefore flips exactly those
// two check bits, which is what lets the receiver's comparators point at it.
// The pairing (B0 with B1, B7 with B0 for an 8-bit word) follows the worked
// example the design is based on; no generator polynomial is involved.
// The same module serves the transmitter and the receiver.
//
// Interface: data in, check out, N bits each. Purely combinational: one XOR
// level, no clock.
module crc_check_gen #(
  parameter int unsigned N = crc_pkg::CRC_N
) (
  input  logic [N-1:0] data,
  output logic [N-1:0] check
);

  always_comb begin
    for (int unsigned i = 0; i < N; i++) begin
      check[i] = data[i] ^ data[(i + 1) % N];
    end
  end

endmodule
