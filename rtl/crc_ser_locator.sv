// crc_ser_locator: bit-serial error locator.
//
// Same decision as the parallel locator (data bit j is in error when syndrome
// bits j and (j-1) mod N are both 1) but taken for one data bit per clock,
// B0 first, then B1 ... B(N-1), each decision written into its bit of the
// error register. One comparator is shared by all bits, so a word needs N
// clocks instead of one.
//
// Interface: start/syndrome in (start is ignored while busy); busy, done and
// err_loc out. Timing: bit 0 is decided on the clock edge that takes start,
// bit k on the k-th edge after it, so done pulses for one clock N clocks after
// start, with err_loc complete; err_loc then holds until the next start.
// rst_n is synchronous and active low and clears busy and done.
module crc_ser_locator #(
  parameter int unsigned N = crc_pkg::CRC_N
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [N-1:0] syndrome,
  output logic         busy,
  output logic         done,
  output logic [N-1:0] err_loc
);

  // With fewer than 3 bits both covering check bits of a data bit would be
  // the same pair, and one error would mark two data bits.
  if (N < 3) begin : g_n_check
    $error("N must be at least 3");
  end

  localparam int unsigned IW = $clog2(N);

  logic [N-1:0]  syn_q;
  logic [IW-1:0] idx;
  logic          cmp;

  // The one comparator: the bit under test and its lower neighbour (cyclic).
  always_comb cmp = syn_q[idx] & syn_q[(idx == '0) ? IW'(N - 1) : idx - 1'b1];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy && start) begin
        syn_q      <= syndrome;
        err_loc    <= '0;
        err_loc[0] <= syndrome[0] & syndrome[N-1];
        idx        <= IW'(1);
        busy       <= 1'b1;
      end else if (busy) begin
        err_loc[idx] <= cmp;
        idx          <= idx + 1'b1;
        if (idx == IW'(N - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

endmodule
