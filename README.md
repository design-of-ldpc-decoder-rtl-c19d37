# Binary min-max LDPC decoder for image-watermark recovery

A watermark image is LDPC-encoded, hidden in a carrier image, and later
extracted from the marked image. The extraction is noisy, especially after
the image has been attacked. This RTL is the FPGA half of the receiver. It
takes the extracted watermark bits as soft values and corrects them with an
LDPC decoder. The decoded bits go back to a computer over a UART, and the
computer rebuilds the watermark image. Encoding, embedding, extraction and
display all run as software on the computer and are not part of this RTL.

The decoder uses the *binary min-max* algorithm. It is a min-sum style
message-passing decoder. Each message is a pair of non-negative costs, one
for the bit value 0 and one for the bit value 1. The check node works by
enumerating parity configurations rather than with a sign/magnitude
min-sum circuit. The decoder is small and serial. One check-node unit and
one variable-node unit take turns on a single edge memory, and the decoder
runs a fixed 10 iterations.

## The code

The code is a regular LDPC code with variable degree 3 and check degree 6.
It is quasi-cyclic: the parity-check matrix H is a 3 x 6 array of Z x Z
circulant permutation matrices. The block in block-row `i` and block-column
`j` is the identity shifted by `s(i,j) = i*j mod Z`. Check `m = i*Z + r`
connects to variable `j*Z + ((r + s(i,j)) mod Z)`, one variable in each of
the six block columns. With Z prime and above 10, H has no 4-cycles. The
default is Z = 17:

| quantity | value |
|---|---|
| code length N = 6Z | 102 |
| checks M = 3Z | 51 |
| edges 18Z | 306 |
| rank of H | 49, so 53 information bits |

The degrees (3 and 6) and the iteration count (10) come from the published
design. The code length, the lifting size Z and the shifts are this design's
own choices, because the source names no particular code. To use a
different code, change `circ_shift`, `check_var` and `var_check` in
`rtl/ldpc_pkg.sv`. Also change `build()` in `tb/ldpc_ref_pkg.sv`, which
builds H independently for the testbenches. Z is a parameter of every
module.

## Messages: cost pairs

A message is a `cost_pair_t`: two 12-bit costs, `{c1, c0}`, 24 bits in all.
The costs act as negative log-likelihoods, so the smaller cost marks the
more likely value. Every message is normalised: the smaller of its two
costs is zero. For a binary code this carries the same information as a
min-sum LLR. It is kept as a pair because that is the form the min-max rule
works on.

Each channel value enters as an 8-bit signed LLR, with a positive value
meaning that 0 is more likely. It becomes `c0 = 0, c1 = LLR` when the LLR
is positive, and `c0 = -LLR, c1 = 0` otherwise. Sums saturate at 4095.

## The check-node rule and how the CNU evaluates it

The rule is the hardest part of the design. For a check with six edges, the
outgoing cost of value `a` on edge `k` is:

    min over all assignments of the other five bits whose parity equals a
        of  max over those five edges of the incoming cost of the assigned bit

Over all six bits this is a choice among the 32 even-parity 6-bit
*configurations*. Sixteen of them have the target bit equal to 0, and the
other sixteen have it equal to 1. The check-node unit walks through them
one per clock:

* A configuration is the 6-bit vector `peizhi_serial`. Bit 0 is the target
  value `a` and bits 1..5 are the values of the five other edges. The
  sequencer generates configuration `q` (0..15) of value `a` as
  `{^q ^ a, q, a}`. Bits 1..4 then run through all 16 patterns, and bit 5
  restores even parity.
* `check_processing` is the arithmetic core, a three-stage pipeline:
  1. `find_meet_inf`: from each incoming pair `inf1..inf5`, pick the cost
     that matches the configuration bit.
  2. `find_max_en`: register the largest of the five picked costs.
  3. `store_max_en` / `find_min_en`: load the first maximum of a sweep, then
     keep the running minimum of the following fifteen.

  `out_min_max` is the running minimum. After the 16th configuration of a
  sweep has passed all three stages, it is the outgoing cost of value `a`.
* `cnu` runs the sweeps. For each check it reads the six incoming pairs
  (6 cycles). It then issues 6 edges x 2 values x 16 configurations
  back-to-back (192 cycles). For edge `k` the core's inputs are the other
  five pairs, `msg[(k+1)%6] .. msg[(k+5)%6]`. A tag travels through the
  pipeline with each configuration, marking the first and last of a sweep.
  When the last one leaves the core, the result is captured. After a
  3-cycle drain, the unit writes the six outgoing pairs back over the words
  they were computed from (6 cycles). Each check takes 208 cycles.

Because the inputs are normalised, the outputs are normalised too. The
configuration whose bits all pick zero costs gives a maximum of 0 for its
parity.

## The variable-node pipeline

`variable_processing` has three registered stages: sum, min, subtract. For
outgoing edge `j` and bit value `b`:

    sum_j(b) = In(b) + sum of the other two incoming costs of value b
    out_j(b) = sum_j(b) - min(sum_j(0), sum_j(1))

The subtraction is the normalisation. A fourth lane sums all three inputs
and gives the a-posteriori pair, which is used for the decision. With
`init` set, the check inputs count as zero, so every output is the channel
pair itself. The initialisation pass uses this to seed the edge memory.

`vnu` runs one variable at a time, 11 cycles each. It reads three edges and
`In` (3 + 1 cycles), runs the pipeline (1 + 3 cycles), and writes three
edges (3 cycles). The a-posteriori pair goes into the output cache.

## Memory and addressing

`edge_ram` has one word per edge, 306 x 24 bits. It is a simple dual-port
RAM with synchronous read. Each word holds the message that currently
travels along its edge. The CNU overwrites a word with its check-to-variable
message, and the VNU overwrites it again with the variable-to-check message.
One word per edge is therefore enough, because the two passes never run at
the same time.

Words are stored check-major: the edge of check `m` in block column `k` is
at address `6m + k`. The CNU therefore addresses the RAM directly. The VNU
needs the graph, so `addr_rom` holds, for entry `3n + i`, the address of
the i-th edge of variable `n`. The ROM is filled at initialisation from the
code construction. `addr_ctrl` picks the direct address or the ROM
look-up, depending on which unit owns the RAM (`var_phase`).

## Control and timing

`control_unit` sequences one decode:

1. It waits for three things together: a `start_decode` request
   (remembered if it comes early), a full input cache, and an idle output
   cache.
2. It runs the initialisation pass, which is a VNU pass with `init`.
3. It runs 10 iterations, each a CNU pass over all checks followed by a VNU
   pass over all variables. The iteration counter `iter` runs 1..10. There
   is no early stop on a satisfied syndrome.
4. It pulses `decode_over`, frees the input cache, and starts the output
   read-out.

Each pass costs its work plus two hand-over cycles. The decoder is busy for

    (11N + 2) + 10 * ((208M + 2) + (11N + 2)) + 1 = 118,465 cycles   (Z = 17)

Almost all of that time is in the CNU passes. The throughput is one 102-bit
codeword per about 118.5k cycles, or about 43 kbit/s of code bits at
50 MHz. The design favours small area over speed.

Around the decode, the next codeword can be loaded into `input_cache` while
the previous result leaves `output_cache`. `decoding_decision` turns each
a-posteriori pair into a bit (1 when `c1 < c0`). It offers the bit on
`code`/`code_valid`/`code_last` with `code_ready` back-pressure, and raises
`code_out_over` once the last bit has been taken. `code_out_over` stays
high until the next decode starts.

## Top level and interfaces

`ldpc_watermark_fpga` (top) holds `decoder` (instance `decoder_1`) and
`serial_port`. `serial_port` packs the decoded bits eight to a byte, with
the first bit in bit 0. It zero-pads the last byte of each codeword, so one
codeword is 13 bytes. It sends the bytes through `uart_tx` (8N1, 434 clocks
per bit, which is 115200 baud at 50 MHz), and stalls the bit stream while
the UART is busy. Sending one codeword takes about 56k cycles, under half a
decode.

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `reset` | in | 1 | clock; synchronous active-high reset |
| `llr_in`, `llr_valid`, `llr_ready` | in/in/out | 8/1/1 | channel LLRs, variable 0 first |
| `start_decode` | in | 1 | decode request pulse |
| `decode_over` | out | 1 | one-cycle pulse at the end of the iterations |
| `busy`, `iter` | out | 1/4 | decoding, current iteration |
| `code`, `code_valid`, `code_ready` | out | 1 | decoded bit stream; a bit moves to the serial port when `code_valid` and `code_ready` are both high |
| `code_out_over` | out | 1 | all bits of the codeword read out |
| `uart_txd` | out | 1 | serial line to the computer |

`decoder` can be used on its own. It has the same ports plus `code_last`,
and there `code_ready` is an input. Tie it high to get one bit per clock.

## What follows the source design and what does not

These parts follow the published design:

* The block structure: input cache, CNU, RAM, VNU, output cache, decision,
  control unit, ROM and address control.
* The binary min-max algorithm.
* Check degree 6 with 32 configurations, evaluated by select, max and min.
* Variable degree 3, with a sum/min/subtract pipeline.
* Initialisation by passing the channel value straight through.
* 10 iterations.
* The 12/24-bit message widths.
* The port names of the check core and of the decoder's status signals.
* The serial port back to the computer.

These parts are this design's own choices:

* The code itself: length, Z and shifts.
* The LLR width and its mapping to cost pairs.
* Saturation at 4095.
* The serial one-configuration-per-clock and one-variable-at-a-time
  schedules.
* In-place message storage and check-major addressing.
* What the ROM holds.
* The start/done handshakes between the control unit and the units.
* Remembering an early start request.
* The `decode_over` pulse width and how long `code_out_over` stays high.
* The tie rule of the decision.
* UART rate, framing and bit packing.
* How the soft values reach the FPGA: here a plain valid/ready stream.

Departures from the source description:

* The source describes the units as started together, like a pipeline. Here
  the CNU and VNU passes alternate, because each pass needs the other's
  results. Only loading and read-out overlap the decode.
* The source gives a flow chart whose iteration test is labelled
  ambiguously. This design simply stops after the 10th iteration.

No throughput or resource figures were published to compare against. The
decoder's correctness is checked bit-exactly against an independent
behavioural model (see below), not against measured hardware.

## Simulating

Every testbench is self-checking. It prints
`TB_RESULT checks=N failures=F` and stops. Build one with plain Verilator,
for example the full system at its default size:

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/ldpc_pkg.sv tb/ldpc_ref_pkg.sv tb/tb_ldpc_watermark_fpga.sv \
        -y rtl -y tb --top-module tb_ldpc_watermark_fpga -Mdir obj -o sim
    ./obj/sim

Substitute any `tb/tb_<block>.sv` and its module name to test one block.
Leave out `tb/ldpc_ref_pkg.sv` for testbenches that do not import it.

`tb/ldpc_ref_pkg.sv` is the reference. It builds H as a bit matrix from
the circulant definition. It finds codewords by Gaussian elimination over
GF(2). It decodes with a flooding min-max decoder that evaluates the check
rule by brute force over all 32 bit patterns.

* `tb_decoder` runs six codewords at noise levels from none to heavy, with
  random input gaps and output back-pressure. It compares every decoded bit
  with the reference and checks the 118,465-cycle busy time.
* `tb_ldpc_watermark_fpga` runs the whole system at its default parameters
  and decodes the UART line with a model receiver. It also counts that
  error correction, an early start request, serial-port stalls,
  partial-byte flushes and overlapped loading each happen.
* `tb_watermark_image` is the use case. It splits a 16 x 16 binary
  watermark image into 53-bit blocks and encodes each block into a
  codeword. It flips bits with channel noise and decodes through the whole
  receiver. It then rebuilds the image from the UART bytes, and the image
  must come back exactly.
* The unit testbenches check each block against its own model, including
  the 208-cycle check and 11-cycle variable timings.

Both system-level runs take well under a second.

## Files

`rtl/ldpc_pkg.sv` (types, constants, code construction), `decoder.sv`,
`control_unit.sv`, `input_cache.sv`, `cnu.sv`, `check_processing.sv`,
`edge_ram.sv`, `addr_rom.sv`, `addr_ctrl.sv`, `vnu.sv`,
`variable_processing.sv`, `output_cache.sv`, `decoding_decision.sv`,
`serial_port.sv`, `uart_tx.sv`, `ldpc_watermark_fpga.sv` (top).
`tb/` has one `tb_<module>.sv` per module, plus `ldpc_ref_pkg.sv`.
