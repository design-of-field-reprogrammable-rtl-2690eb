# Field programmable parallel CRC with multi-bit configuration flip-flops

A CRC engine whose generator polynomial, CRC width and input word width are
chosen at run time, and which still consumes a whole word (32 bits by
default) every clock cycle. A parallel CRC is a GF(2) matrix-vector product.
Here that matrix is not fixed in gates: it sits in an N x N array of small
programmable XOR cells. A configuration circuit on the same chip computes the
matrix from the polynomial in N+1 clock cycles and writes it into the array.
The array holds one configuration bit per cell, and those bits are stored in
multi-bit flip-flops (4 bits sharing one clock connection by default). This
cuts the number of clock sinks in the largest register population of the
design.

Everything is SystemVerilog in `rtl/`. Each module has a self-checking
testbench in `tb/`.

## How a word is processed: the arithmetic behind the array

**Serial form (LFSR2).** The CRC of a message, taken MSB first, is the
recurrence of the "modified" LFSR. The message bit is XORed with the top
register bit to form the feedback:

    fb  = c[r-1] ^ m
    c  <= (c << 1) ^ (fb ? P : 0)        // P = polynomial without its x^r term

No r zero bits have to be appended. The register holds the remainder of
M(x)·x^r / G(x) as soon as the last message bit has entered. `crc_lfsr2` is
this circuit, bit-serial, with the 4-bit example polynomial x^4+x^3+x+1.

**N steps at once.** Write F for the companion matrix of P, the matrix of
"multiply by x mod P". N steps of the recurrence over an N-bit word d give:

    c' = F^N · (c ^ d)

So the array holds D = F^N. Column k of D is the residue x^(N+k) mod P. Each
residue follows from the one before by one more multiplication by x. That is
why D can be built one row per clock, where "row k" is the residue for input
bit k. Row k is written into array column k.

**The array.** Column line j carries `col_in[j]` down the column. Row i starts
at the left with `row_in[i]`, passes through cells (i,0)…(i,N-1), and leaves
on the right. Each cell computes `out = cfg ? in ^ col : in`. So:

    row_out[i] = row_in[i] ^ XOR_j ( D[i][j] & col_in[j] )

**Words shorter than the port (partial last word).** A word with only W < N
valid bits (`data[W-1:0]`, `data[W-1]` first) needs F^W, not F^N. The port
router rearranges the inputs so that the stored F^N still gives the right
answer:

    col_in[j] = data[j] ^ c[j+N-W]    for j <  W, else 0
    row_in[i] = c[i-W]                for i >= W, else 0

The top W register bits meet the data and go through the matrix. They are
moved down by N-W so that the extra N-W steps of F^N only shift them back
into place. The low N-W register bits cannot reach the feedback within W
steps. They bypass the matrix through the row inputs, shifted up by W. So
unused data inputs are forced to 0, the upper rows take previous CRC data
from the left, and the top CRC bits feed the first columns. Any W from 1 to
N works, for the last word of a message or for a narrower configured port.

**CRC sizes below N.** An r-bit CRC runs in the N-bit register as the N-bit
CRC of P(x)·x^(N-r). The CRC then occupies the top r bits of the register and
the low N-r bits stay 0. The configuration circuit builds F from the shifted
polynomial. The output registers shift the initial value up by N-r and the
result down by N-r. r may be larger or smaller than W.

## Blocks

    fpcrc_top
    ├── crc_config_regs     processor bus, CRC variables, start pulse
    ├── crc_config_ctrl     T matrix, D-row register, counter, column enables
    │   └── crc_drow_calc   next D row = T · row (AND-XOR trees)
    ├── crc_port_router     port-size multiplexing of data and previous CRC
    ├── crc_xor_array       N x N programmable cells
    │   └── crc_cell_group  MBFF_BITS cells of one column + one mbff
    │       ├── mbff        multi-bit flip-flop with load enable
    │       └── crc_cell    XOR / pass-through cell
    ├── crc_output_reg      CRC register, initial value, size alignment
    └── crc_lfsr2           bit-serial LFSR2, with ports of its own

`crc_pkg` holds the register-map enum.

## Configuring

Registers (`crc_pkg::reg_addr_e`). A write takes effect at the rising edge
while `up_wr` is high. Reads are combinational.

| addr | name          | contents                                   | reset     |
|------|---------------|--------------------------------------------|-----------|
| 0    | REG_POLY      | polynomial, r low coefficients (x^r implied) | 04C11DB7 |
| 1    | REG_CRC_SIZE  | r, 1..N (0 means N)                        | N         |
| 2    | REG_PORT_SIZE | W, 1..N (0 means N)                        | N         |
| 3    | REG_INIT      | initial CRC value, r low bits              | 0         |
| 4    | REG_START     | write: start computing the D matrix        | –         |
| 5    | REG_STATUS    | read: bit 1 done, bit 0 busy               | –         |

A START write raises `cfg_start` for one cycle in the next cycle. From the
edge that samples it, `crc_config_ctrl` needs N+1 edges: one to load the row
register with x^(N-1) and N to compute and write rows 0…N-1. For N = 32 that
is 33 cycles. `cfg_done` then rises. `in_ready` is low from the start pulse
until `cfg_done`. Change the polynomial or CRC size only with a new START.
The port size and initial value are used word by word and may change between
messages.

## Streaming words

Offer a word with `in_valid`. It is taken when `in_ready` is high. Give its
valid bits in `in_data[W-1:0]`, MSB first in message order. `in_first` marks
the first word of a message: the initial value is used instead of the CRC
register. `in_last` marks the last word. That word may be shorter: set
`in_last_bits` to its width, or to 0 for the configured port size. One clock
edge later `crc_valid` is high and `crc_out` holds the CRC so far, with r bits
in the low positions. `crc_last` marks the finished CRC of a message. Words
may follow each other on every cycle, so the rate is W bits per clock.

The CRC is not reflected and has no final XOR. Conventions that need these
(CRC-32 of Ethernet, for example) need the byte and bit reversal and the
final XOR outside this block.

## Multi-bit flip-flops

All cells of one column are written in the same cycle, under one enable.
`crc_cell_group` therefore stores the configuration bits of MBFF_BITS
consecutive rows of a column in one `mbff`. With the default of 4 bits, the
1024 configuration bits of a 32 x 32 array sit in 256 multi-bit flip-flops.
MBFF_BITS = 2 and 1 are supported; 1 is the conventional one flip-flop per
cell. In RTL a multi-bit flip-flop is simply one register with a shared clock
and enable. The power and area saving comes from mapping it onto a multi-bit
library cell and from the clock tree built for it. That is a job for
synthesis and placement, which also decide which neighbouring flip-flops
really merge.

## Parameters

| module         | parameter  | default | meaning                                |
|----------------|------------|---------|----------------------------------------|
| fpcrc_top etc. | N          | 32      | array size = largest CRC and port width |
| fpcrc_top, crc_xor_array, crc_cell_group | MBFF_BITS | 4 | bits per multi-bit flip-flop; must divide N |
| crc_lfsr2      | R, POLY    | 4, 1011 | serial register size and taps          |

N = 64 gives a 64 x 64 array that handles 64-bit CRCs directly.

## Verification

Each testbench compares the block with values it works out on its own, and
ends with a `TB_RESULT checks=… failures=…` line.

- `tb_fpcrc_top` runs the whole design at its default size. It checks the
  known check values of "123456789": CRC-32/MPEG-2 `0376E6E7`, CRC-16/UMTS
  `FEE8` on a 16-bit port, and CRC-16/XMODEM `31C3` on a 32-bit port. It
  checks the long-division example 1010101010 / 10011 → 0100 on a 10-bit
  port. It then runs random polynomials, CRC sizes, port widths, initial
  values and partial last words against a bit-serial reference. It also
  checks the 33-cycle configuration, that no word is taken while
  configuring, and the one-cycle result latency. It counts each mechanism
  (reconfiguration, stall, full and partial words, r < N, W < N, non-zero
  initial value, serial LFSR2) and fails if one never happened.
- `tb_fpcrc_crc64` builds the top with N = 64. It checks CRC-64/ECMA-182
  (`6C40DF5F0B497347`) and CRC-32 on the wide array.
- `tb_crc_port_router` proves the routing rule. For every W, router output
  times F^N gives W serial steps.
- `tb_crc_config_ctrl` compares every written column with x^(N+k) mod P and
  checks the cycle count.
- The other testbenches check their block bit by bit. `tb_crc_xor_array`
  runs arrays with 4-, 2- and 1-bit flip-flop grouping side by side.

To run one with Verilator:

    verilator --binary --timing --assert -Irtl -Itb rtl/crc_pkg.sv \
        tb/tb_fpcrc_top.sv --top-module tb_fpcrc_top -Mdir obj
    ./obj/Vtb_fpcrc_top

The full-size end-to-end test finishes in well under a second.

## What this design adds, and where it stops

These are this design's own choices; the architecture leaves them open:

- the register map and bus;
- the valid/first/last word handshake;
- the configurable initial value;
- the one-cycle initialisation that makes configuration N+1 cycles;
- aligning r-bit CRCs in the N-bit register by scaling the polynomial;
- the MSB-first bit order within a word, which may be mirrored compared with
  other descriptions of the port-size routing;
- the grouping of cells into multi-bit flip-flops by column.

Not built:

- **Two 32-wide arrays cascaded on the diagonal for CRC-64.** This is
  described only in outline. The array size N is a parameter instead.
- **Physical design.** This covers the flip-flop merging algorithm
  (coordinate transformation, legal regions, clique search, placement) and
  the merged clock tree. Both work on a placed netlist and are not logic.
- **Power.** The reported saving (76 mW with separate flip-flops, 67 mW
  merged, on an FPGA) cannot be reproduced in RTL simulation.
- **The external processor.** Only its bus is provided.

Verilator reports one style warning, which is left in place.
`crc_config_ctrl` uses `rst_n` both as its asynchronous reset and in the
`disable iff` of its one-hot assertion on the column enables.
