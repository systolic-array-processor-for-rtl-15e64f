# CORDIC systolic array processor for eigenvalues and eigenvectors

SystemVerilog implementation of the design in the thesis *Systolic Array
Processor for Eigenvalues and Eigenvectors*. The design has two parts:

1. **Eigen system.** A triangular systolic array of CORDIC-based Givens
   processors runs the QR algorithm on an N x N matrix (N = 5 by default).
   After a fixed number of iterations an eigenvector unit
   back-substitutes in the final triangular matrix. It then multiplies the
   result by the accumulated transformations. The outputs are the
   eigenvalues and the eigenvectors of the input matrix.
2. **CORDIC processing element (PE) chip.** This is the programmable node
   described in the thesis. It has a microcoded controller (an
   Am2910-class sequencer with a microcode ROM), a 1K x 32 program/data
   RAM, and a floating-point datapath: a 24-bit mantissa lane and an 8-bit
   exponent lane, each with four scratchpad registers, an add/sub unit and
   zero detect, and a one-bit shifter on the mantissa lane. It also has
   four bit-serial neighbour ports, a 16-bit parallel test port and clock
   selection.

Both parts sit in the top level `eigen_top`. The PE has its own pins there
(prefix `pe_`).

## Eigen system

### Algorithm

Basic (unshifted) QR iteration, with P_0 = I:

    A_k = Q_k R_k,   A_{k+1} = R_k Q_k,   P_k = P_{k-1} Q_k

After `QR_ITERS` iterations, A_N is upper triangular up to rounding. Its
diagonal holds the eigenvalues, ordered by decreasing magnitude. The
eigenvectors of A_N form the columns of a unit upper triangular matrix B:

    b_ij = -1/(lambda_i - lambda_j) * sum_{k=i+1..j} a_ik b_kj   (i < j)

The eigenvectors of the input matrix are the columns of X = P_N B.

### Blocks

| module | role |
|---|---|
| `cordic_core` | Iterative CORDIC that does one iteration per clock. It covers circular, linear and hyperbolic coordinates in rotation and vectoring mode. The gain is corrected by one constant multiply. Latency from start to done is 32 clocks for circular, 33 for hyperbolic and FRAC+LIN_EXT+2 = 26 for linear. |
| `givens_cell` | One array processor, with its own `cordic_core`. In generate mode it takes the rotation angle from the first element of its column by vectoring. It outputs r and an exact 0 for that element, and rotates the rest of the two rows. In apply mode it rotates everything by the stored angle. |
| `qr_array` | Triangular array of N(N-1)/2 cells. Cell (q,p) annihilates element (q,p). Rows enter on the left with a one-tick skew, and finished rows leave at the bottom of each column. One pass takes 3N-2 ticks. |
| `eigvec_unit` | Back substitution for B and the product X = P B. It runs sequentially on one linear-mode CORDIC: rotation gives y - x*z, which is used as a multiply-accumulate, and vectoring gives z - y/x, which is used as the divide. |
| `eigen_top` | Holds matrix registers A, R and P, and sequences three array passes per iteration. It then runs `eigvec_unit`. It also instantiates the PE chip. |

Each QR iteration is three passes, in this order:

1. **Generate.** The rows of A_k go in and the rows of R_k come out. The
   array keeps the angles of Q_k.
2. **Apply.** The columns of P_{k-1} go in and the columns of P_k come out.
3. **Apply.** The columns of R_k go in and the columns of A_{k+1} come out.

Results are written back in place. A result element is written at the end
of a tick, which is after the element it replaces has been read.

### Number formats

- **Matrix data:** 32-bit two's complement Q11.20 (`W` = 32, `FRAC` = 20).
  The range is about +-2048 and the resolution about 1e-6.
- **Angles:** Q2.29 radians.
- **Arctangent table:** 11 entries (atan 2^-i for i = 0..10). Beyond that,
  atan 2^-i is taken as 2^-i. This is the table size the thesis derives
  for 32-bit fixed point.

### Interface (`eigen_top`)

| port | meaning |
|---|---|
| `clk`, `rst_n` | Clock, and a synchronous active-low reset. |
| `a_we`, `a_row`, `a_col`, `a_data` | While idle, writes one element of A (Q11.20). |
| `start` | One-clock pulse that starts a computation. The first P is set to I. |
| `busy` | High from start until done. |
| `qr_done` | Pulses exactly `QR_ITERS * 3 * (3N-2) * TICK_CLKS` clocks after start. With the defaults this is 20 * 3 * 13 * 36 = 28,080 clocks. |
| `done` | Pulses when the eigenvectors are ready, 3,047 clocks after `qr_done` for N = 5. |
| `rd_sel`, `rd_row`, `rd_col`, `rd_data` | Combinational read of one element: 0 = A (eigenvalues on the diagonal), 1 = R, 2 = P, 3 = B, 4 = X. |
| `pe_*` | Pins of the PE chip (see below). |

Parameters: `N` (5), `W` (32), `FRAC` (20), `QR_ITERS` (20), `TICK_CLKS`
(36). `TICK_CLKS` is the length of one processing cycle of the array. It
must exceed the CORDIC latency, and an assertion checks that every cell is
idle at each tick.

Limitations:

- Eigenvalues must be real and well separated. The iteration count is
  fixed; there is no convergence test.
- Quotients in the back substitution must stay below 32 in magnitude.
- Matrices larger than the array (the thesis' partitioning scheme) are not
  supported.

## PE chip (`cordic_pe`)

The chip has three internal buses:

- a 32-bit address bus (`pe_pkg::pe_addr_t`), which carries the RAM
  address, datapath register, serial port and port register;
- a 64-bit control bus (`pe_pkg::pe_ctrl_t`), whose low 30 bits are the
  datapath control bus;
- a 32-bit data bus.

A 16-bit flag bus carries the datapath flags, and the receive-full and
send-busy status of each port. The sequencer tests these flags.

| module | role |
|---|---|
| `clkgen` | phi = SCK normally, or the `clock` pin in test mode. |
| `ucode_rom`, `useq` | 256 x 114-bit microprogram store, whose registered output is the microinstruction register. The sequencer implements all 16 Am2910 next-address instructions, with a 5-deep stack and counter. |
| `pe_ram` | 1K x 32 program/data RAM with a synchronous write and an asynchronous read. |
| `datapath`, `dp_lane`, `addsub`, `shifter1` | Two lanes. Each has four scratchpad registers with load enables LL[3:0], a/b operand multiplexers (all-zero select = inhibit, i.e. a zero operand), an add/sub unit, zero detect, and a one-bit up/down shifter (mantissa lane only). The lane result is driven on the data bus when the datapath is selected and enabled. |
| `sio` (x4) | Half-duplex serial port with SD (data), CK (gated clock) and PS (port status) lines; see below. |
| `pio` | Eight 16-bit registers between the PIO pins and the internal buses: address (0-1), data (2-3) and control (4-7). See below. |

The microinstruction (`pe_pkg::uinstr_t`, 114 bits) has these fields:

- sequencer op;
- condition enable, select (a flag-bus bit) and polarity;
- an 8-bit branch address or counter value;
- a 32-bit address-bus word;
- a 64-bit control-bus word.

Control bit 37 puts the address-bus word on the data bus. This is how the
microprogram loads constants.

**Serial protocol.** The sender waits for PS high (receiver ready). It then
sends 32 bits MSB first, two clocks per bit: CK is low with the bit on SD,
then CK goes high. The receiver samples on the rising edge of CK. It drops
PS once the word is in its register, and raises it again when the
controller acknowledges the word. After the last bit the sender sets
`tx_ok` if PS has dropped within `TIMEOUT` clocks, and `tx_err` otherwise.
One word takes 2 * 32 + 3 clocks from `go`.

**Test port.** The pins are `address[2:0]`, `control[9:0]` and `pio[15:0]`.
The control bits are:

| bit | function |
|---|---|
| 0 | write pins to register |
| 1 | read register to pins |
| 2 | drive the data word |
| 3 | capture the data bus |
| 4 | capture the flags into register 7 |
| 5 | apply the address/control words for one clock |

With `test` high the sequencer stops and the PE is clocked from the `clock`
pin. The tester then loads a bus set 16 bits at a time, applies it and
reads back the response. The thesis' datapath test works this way: load
0xF and 1, add, and read 0x10.

**Pins.** `reset` (active high), `sck`, `clock`, `test`, `address`,
`control`, `pio_i/_o/_oe`, and `sio_i/_o/_oe[11:0]`. Port k uses SD =
3k, CK = 3k+1 and PS = 3k+2, where k is 0 = north, 1 = west, 2 = south,
3 = east. Bidirectional pins are split into input, output and output
enable.

**Demo microprogram.** `rtl/pe_ucode.hex` holds the program, one
microinstruction per line. The program:

1. waits for two words on the west port;
2. adds them in both lanes;
3. halves the mantissa twice in a counter loop;
4. stores the word in RAM;
5. sends it out of the east port;
6. reads it back from RAM;
7. repeats.

The thesis gives no microcode. A floating-point CORDIC microprogram for
the PE is not included, so the PE is complete as hardware but only
demonstrated with this program.

## What follows the thesis and what was chosen here

**Follows the thesis:**

- the QR iteration with P accumulation by row and column feeding through
  one triangular array;
- the eigenvector back substitution and X = P B;
- the CORDIC modes and the 11-entry table;
- the PE block structure, bus widths, pins and pin grouping;
- the datapath structure, including the mantissa control-bit positions of
  the thesis' test vectors;
- the test mode via the PIO;
- the serial lines and their handshake.

**Chosen here:**

- fixed-point data for the eigen system, and a CORDIC unit inside every
  array cell (the thesis uses floating-point PEs);
- a fixed iteration count;
- the one-tick row skew with a held pivot row (the thesis' timing chart
  uses a two-cycle skew);
- a sequential eigenvector unit beside the array (the thesis maps it onto
  the array);
- matrix storage in the top level;
- the microinstruction format, bus field layout and PIO control encoding;
- serial bit timing and the status register layout;
- RAM size and timing;
- the use of rising clock edges only, and synchronous resets.

**Other departures from the thesis:**

- The thesis latches the datapath registers and the PIO address on the
  falling clock edge. Here every register loads on the rising edge.
- In test mode the thesis puts the internal blocks in a tri-state mode.
  Here the blocks stay active. Only the source of the address and control
  buses changes, to the PIO registers.
- In the thesis, A_N is fed back into the array to compute the
  eigenvectors. Here it goes to the separate eigenvector unit.
- The thesis flushes Q_1 out of the array with a unit matrix. Here the
  first P pass feeds P_0 = I, which gives the same P_1 = Q_1.
- The serial port address A[3:0] is split here into a 2-bit port number
  and a 2-bit register number on address-bus bits 15:12.

Not built:

- the serial port header register (its contents are not given);
- partitioning for larger matrices;
- any link between PE chips and the eigen array (the thesis does not give
  one).

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=<n> failures=<n>`. Example with Verilator:

    verilator --binary --timing --assert -y rtl rtl/eig_pkg.sv rtl/pe_pkg.sv \
        tb/eigen_top_tb.sv --top-module eigen_top_tb && obj_dir/Veigen_top_tb

Run it from the repository root: the microcode ROM loads `rtl/pe_ucode.hex`
by that relative path. The full eigen_top run takes well under a second.

| testbench | checks |
|---|---|
| `eigen_top_tb` | Two 5 x 5 matrices (general and symmetric) built as V D V^-1. Checks the eigenvalues, A x = lambda x for every column of X, that B is unit upper triangular, and the exact QR cycle count. Also checks the PE test-mode add and the PE microprogram. Each mechanism is counted. |
| `eigen_top_n4_tb` | The same system built for N = 4 (6 cells, 24 iterations): three random 4 x 4 matrices, eigenvalues, eigenvectors and QR cycle count. |
| `qr_array_tb`, `givens_cell_tb` | R = Q^T A and the stored angles against a double-precision Givens QR, the apply mode, and 3N-2 ticks per pass. |
| `cordic_core_tb` | All six mode and direction combinations against double-precision math, plus the latency. |
| `eigvec_unit_tb` | B and X against a reference back substitution, and A b = lambda b. |
| `cordic_pe_tb` | Test-mode add, subtract and RAM access through the pins, the microprogram result, and the serial bit rate. Also two PEs linked east-to-west, each running the program, with the end result checked. |
| `datapath_tb`, `dp_lane_tb`, `addsub_tb`, `shifter1_tb` | The thesis' test vectors, and random operations against models. |
| `sio_tb` | Back-to-back ports: data, transfer time, no overrun, and the error when the receiver never answers. |
| `useq_tb` | Random microinstructions against an Am2910 reference model. |
| `pio_tb`, `pe_ram_tb`, `ucode_rom_tb`, `clkgen_tb` | Register-level checks of each block. |

Each testbench was also run against a copy of its module with one
deliberate bug (a flipped sign, a wrong register index, a missing delay and
the like), and reported failures every time.
