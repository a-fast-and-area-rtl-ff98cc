// crc_par_locator: parallel (single-cycle) error locator.
//
// Data bit j is covered by check bits j and (j-1) mod N. It is judged to be in
// error when both of its syndrome bits are 1: that is the comparator of bit j,
// and N of them (the "mega comparator") work side by side, so the whole word
// is examined in one clock. In vector form the comparator array is
//   loc = syndrome & rotate_left(syndrome, 1).
// The comparator outputs are captured in the error register, whose set bits
// mark the erroneous data bits. A single error, or errors with at least two
// error-free bits between them, are located exactly. Two adjacent errors
// cancel their shared check bit and are not located; two errors with one bit
// between them also mark that middle bit.
//
// Interface: in_valid/syndrome in; loc_valid/err_loc out from the error
// register. Timing: result one clock after the syndrome, a new syndrome may
// be given every clock. rst_n is synchronous and active low and clears
// loc_valid; the error register itself is not reset.
module crc_par_locator #(
  parameter int unsigned N = crc_pkg::CRC_N
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [N-1:0] syndrome,
  output logic         loc_valid,
  output logic [N-1:0] err_loc
);

  // With fewer than 3 bits both covering check bits of a data bit would be
  // the same pair, and one error would mark two data bits.
  if (N < 3) begin : g_n_check
    $error("N must be at least 3");
  end

  logic [N-1:0] cmp;

  // Comparator array: both covering check bits flagged.
  always_comb cmp = syndrome & {syndrome[N-2:0], syndrome[N-1]};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      loc_valid <= 1'b0;
    end else begin
      loc_valid <= in_valid;
    end
    if (in_valid) err_loc <= cmp;
  end

endmodule
