# CRC128 link with a single-cycle comparator-based error locator

A transmitter appends 128 redundant bits to every 128-bit data word. A
receiver uses those bits to detect corrupted bits, find where they are and
correct them, all in one clock cycle. The idea is to drop the usual
bit-serial error search, which takes one clock per data bit (128 clocks per
word). Instead, the receiver has an array of 128 small comparators that
examine every data bit at once. This suits the baseband section of a
software-defined radio on an FPGA, where decoding has to keep up with the
sample stream. In the main configuration the decoder takes one 256-bit
codeword per clock. At 247.5 MHz that is 128 bits × 247.5 MHz ≈ 31.7 Gbit/s of
payload.

The bit-serial locator is also included. The receiver can switch to it for
any codeword, so the two approaches can be compared on the same link.

## The redundant bits: one check bit per neighbouring pair

The redundant bits are called "CRC" throughout, following the usual name for
this kind of link. They are not the remainder of a polynomial division.
Instead, each check bit is the XOR of two neighbouring data bits, with the
ends wrapping around:

    check[i] = data[i] ^ data[(i+1) mod N]        N = 128

So every data bit `j` is covered by exactly two check bits: `check[j]` and
`check[j-1]`. For example, in an 8-bit word B0 is covered by CRC0 (B0, B1) and
CRC7 (B7, B0). The codeword is the data word plus these N check bits: 2N = 256
bits, carried as a data half and a CRC half.

## Detecting, locating and correcting

The receiver recomputes the check bits from the data it received and XORs
them with the check bits that came with the codeword. The result is the
**syndrome** (the "error CRC"):

* If the syndrome is all zero, the codeword is accepted as error-free.
* If any syndrome bit is set, the two CRCs disagree, and `out_error` is raised.

A flipped data bit `j` flips the two check bits that cover it. So it shows up
as syndrome bits `j` and `j-1`, both set. The 8-bit example: data
`00010001` is sent, B0 is flipped, and the syndrome is `10000001`. The
syndrome has CRC0 and CRC7 set, and B0 is the only bit they share.

The **locator** turns this around. Data bit `j` is declared wrong exactly
when `syndrome[j]` and `syndrome[j-1]` are both 1. The **corrector** then
inverts every declared bit.

This is the hardest part of the design to get right, so note what the rule
can and cannot do:

| what went wrong in the channel | syndrome | result |
|---|---|---|
| nothing | 0 | data passed, no error |
| one data bit | two neighbouring bits | bit located and corrected |
| several data bits, each pair separated by at least two good bits | two neighbouring bits per error | all located and corrected |
| one CRC bit | a single isolated bit | error flagged, nothing located, data (which is correct) passed |
| two adjacent data bits | the shared check bit cancels | flagged, not located |
| two data bits with one good bit between them | four bits in a row | the middle (good) bit is also marked, so it is miscorrected |
| the whole word inverted | 0 | not detected |

The scheme makes no claim beyond the first four rows. `out_error` together
with an all-zero `out_err_loc` means "corrupted, but nothing to correct in
the data".

## Parallel and serial locators

**Parallel locator (`crc_par_locator`, the main configuration).** N
comparators work side by side. In vector form:

    err_loc = syndrome & {syndrome[N-2:0], syndrome[N-1]}

This is a rotate and one AND level, followed by the N-bit **error register**.
Together with the one XOR level of the check-bit generator and the one XOR
level of the syndrome, the logic between the codeword input and the error
register is three gates deep. The error register is the receiver's only
pipeline stage.

**Serial locator (`crc_ser_locator`).** This locator has one comparator and a
bit counter. It decides B0 on the clock that starts it, then B1, B2 and so on,
one bit per clock, writing each decision into its bit of the error register.
After N = 128 clocks it pulses `done`.

## Beacon handshake and timing

The receiver's `beacon` tells the transmitter that it can take a codeword. It
works as the `ready` of a valid/ready pair. A codeword moves in a clock where
`cw_valid` and `beacon` are both high.

* **Transmitter.** It keeps one codeword register and refills it in the same
  clock it empties, so with the beacon high it sends one codeword per clock.
  `tx_ready` is high when the register is empty or emptying.
* **Receiver, parallel mode.** The beacon stays high. The result appears on
  `out_*` one clock after the codeword is taken, for one codeword per clock.
* **Receiver, serial mode.** The beacon drops while the serial locator works.
  The result appears N clocks after the codeword is taken, and during that
  time the transmitter stalls.
* **Mode.** `mode` (0 = parallel, 1 = serial) is sampled with each codeword
  the receiver takes, so the locator can change from one codeword to the
  next.
* **Output.** `out_valid` pulses for one clock per codeword, and there is no
  back-pressure on the output. `out_data` is the corrected word, `out_error`
  the comparison result, and `out_err_loc` the error register.
* **Latency.** With the channel looped back by plain wires, a word taken by
  the transmitter on clock edge t is decoded on `out_*` from t+2 in parallel
  mode.
* **Reset.** `rst_n` is synchronous and active low. It clears the valid, busy
  and mode state. The data registers are not reset.

## Modules

| module | role |
|---|---|
| `crc_pkg` | `CRC_N = 128`, locator mode enum |
| `crc_check_gen` | neighbour-pair check-bit generator (combinational) |
| `crc_tx` | transmitter: check bits plus codeword register, beacon handshake |
| `crc_syndrome` | CRC comparison: syndrome and error flag (combinational) |
| `crc_par_locator` | N-comparator array plus error register, 1 clock |
| `crc_ser_locator` | one comparator, N clocks |
| `crc_corrector` | XOR of the received data with the error register (combinational) |
| `crc_rx` | receiver: generator, syndrome, both locators, corrector, beacon |
| `crc_decoder_top` | transmitter and receiver; the channel is left outside |

The channel is not part of the design. `crc_decoder_top` brings out the
codeword the transmitter sends (`tx_cw_*`) and the codeword the receiver gets
(`rx_cw_*`) as separate ports. Connect them directly, or through an
error-injecting model as the testbenches do. The RF front end and the ADC of
a radio receiver sit before all of this and are not modelled.

Every module has one parameter, `N` (default 128). It is the data width and
also the number of check bits. Any N ≥ 3 works (with N = 2 both check bits cover the same pair, so a
single error would mark both data bits).

## Simulation

Each module has a self-checking testbench `tb/tb_<module>.sv`, plus
`tb/tb_crc_example8.sv`. Each testbench prints
`TB_RESULT checks=<n> failures=<n>`. Build one with, for example:

    verilator --binary --timing --assert --top-module tb_crc_decoder_top \
        -y rtl rtl/crc_pkg.sv tb/tb_crc_decoder_top.sv
    ./obj_dir/Vtb_crc_decoder_top

The package is named first; `-y rtl` lets verilator find the modules by file
name. Adding `+verilator+rand+reset+2` to the run randomises everything that
is not reset, which the testbenches tolerate.

* `tb_crc_decoder_top` runs the whole link at full size (N = 128). It closes
  the channel with random error injection and picks the locator at random
  for each codeword. It checks every word end to end: data, error flag,
  error register and receiver latency. It then runs a full-rate parallel
  burst (64 words in 64 clocks, 2 clocks from input to output). It also
  counts clean words, single and multiple corrections, CRC-bit errors, both
  locators, locator switches, beacon stalls and transmitter back-pressure,
  and fails if any of them never happened.
* `tb_crc_example8` builds the link 8 bits wide and replays the worked
  example above with both locators.
* The block testbenches check each stage against independently computed
  values, including the exact cycle counts (1 clock parallel, N clocks
  serial).

## Where this design makes its own choices

The underlying description defines the scheme through the pairing of
neighbouring bits and a worked 8-bit example. The following were chosen here:

* **Pairing direction.** One description pairs CRC0 with B0,B1 and CRC7 with
  B7,B0, and another pairs them the other way round. This design uses the
  first, regular form, `check[i] = d[i] ^ d[i+1]`. Both forms locate a B0
  error from the same syndrome `10000001`.
* **Example CRC value.** The 8-bit example's CRC value as printed (`11110000`
  for data `00010001`) does not match the pairing rule, which gives
  `10011001`. The example's syndrome does match, so the design follows the
  syndrome.
* **Throughput figure.** The published throughput figure is 316.83 Gbit/s.
  The product it is derived from, 128 bits × 247.524 MHz, is 31.68 Gbit/s.
  This README uses the product.
* **Handshake and interfaces.** The valid/ready reading of the beacon, the
  transmitter's one-codeword register, the per-codeword mode input, reset
  behaviour, and the absence of output back-pressure were all chosen here.
* **Serial locator.** It is included as a selectable alternative. The main
  configuration is the parallel one.

The published implementation figures are 368 slices and 387 LUTs on a
Spartan-3E XC3S100E, with a 4.04 ns delay. They were not reproduced here.
Generic synthesis of the whole link (transmitter and receiver with both
locators, N = 128) has 781 flip-flop bits. 257 of them are in the
transmitter and 265 in the serial locator.
