# ADINA-I: a FIFO crossbar joining one master and N arithmetic processors

ADINA-I ("Alternating Direction Immediate Nexus Array") is a small parallel computer for
simulating physical fields. It has a master unit (MU) and N arithmetic units (AU-0 ... AU-(N-1)),
each a complete 8-bit microprocessor with its own memory and a DMA controller. The processors
share no memory and no clock. All data between them goes through an **N x N array of FIFO buffer
memories**. Any two AUs, i and j, own a private pair of FIFOs: FIFO-(i,j) and FIFO-(j,i). Each
processor only waits for a FIFO's *input ready* or *output ready* flag and never needs its
partner's state. That lets every AU run its own program (MIMD) and still trade data with any other
AU at any time.

The machine targets mesh algorithms in which each AU owns one line of the mesh. Alternating-
direction methods (ADI) are the main case: each AU works along its row, then along its column. The
half-step in between is a transpose, and the FIFO array does it with all 16 AUs transferring at
once.

This repository holds synthesizable SystemVerilog for the part of ADINA-I that is real hardware
of its own: the FIFO array with its buses and bus arbitration, the decoding of the processors'
FIFO selections, and the control lines between the MU and the AUs. The processors are
off-the-shelf F8-family parts (CPU, memory interface, DMA, PIO, ROM, RAM) running software, so
their ports are brought out of the top module. The testbenches play their role.

The default configuration is the 16-AU machine: 16 AUs, 256 FIFOs, and 64 bytes per FIFO. Each
FIFO is two 64 x 4-bit FIFO chips side by side, and buses are 8 bits wide.

## The array and who can reach what

```
                 MU data bus (reaches every FIFO)
                 |
   AU-(N-1) ---[0,N-1]---[1,N-1]--- ... ---[N-1,N-1]      row bus of AU-(N-1)
      :            |         |                 |
   AU-1 -------[0,1]-----[1,1]----- ... ---[N-1,1]        row bus of AU-1
   AU-0 -------[0,0]-----[1,0]----- ... ---[N-1,0]        row bus of AU-0
                   |         |                 |
             column bus  column bus      column bus
               of AU-0     of AU-1        of AU-(N-1)
```

FIFO-(i,j), shown as `[i,j]`, is reached by three processors:

* the **MU**, over the MU data bus, which is wired to every FIFO;
* **AU-j**, over its *row* bus (FIFO-(0..N-1, j)); in this RTL this is the node's `row` port;
* **AU-i**, over its *column* bus (FIFO-(i, 0..N-1)); this is the node's `col` port.

A fourth path is the FIFO's own **loop bus**, from its exit back to its entrance. The MU can read a
FIFO's contents and shift every byte back in as it goes, so the data stays in place for the AU it
was meant for.

So AU-i writes to AU-j by putting data into FIFO-(i,j) from its column side, and AU-j takes it out
on its row side. In the other direction AU-j writes FIFO-(j,i) from its column side. Either of the
pair can also be used in both directions, as long as the two programs agree on turns (see
*Using a FIFO in both directions* below).

## Selecting a FIFO (PORT 1)

Before starting a transfer, a processor latches a selection on its 8-bit PORT 1:

| who  | PORT 1           | selects                             |
|------|------------------|-------------------------------------|
| MU   | `P1[7:4]=i, P1[3:0]=j` (hex `ij`) | FIFO-(i,j)         |
| AU-x | `P1[4]=0, P1[3:0]=i`  | FIFO-(i,x), on its row             |
| AU-x | `P1[4]=1, P1[3:0]=k`  | FIFO-(x,k), on its column          |

`fifo_array` compares each node's coordinates with these values. It gates each request to the
node it names and steers that node's response back. The decode is combinational, so the
selection must be stable while the processor's `en` is high.

## Engaging a side and moving bytes

This is the heart of the design. A FIFO has two independent **sides**, the entrance and the exit.
Each side serves one processor at a time, and anyone else who asks for it waits. Reading and
writing are separate sides, so a writer and a reader can stream through the same FIFO at once.

Each processor port is a `port_req_t` / `port_rsp_t` pair (see `rtl/adina_pkg.sv`). These signals
stand for the DMA controller's ENABLE and DIRECTION lines and for the FIFO ready flags:

| signal  | dir | meaning |
|---------|-----|---------|
| `en`    | in  | hold the selected side; drop it to release the side |
| `wr`    | in  | 1: entrance (write), 0: exit (read) |
| `stb`   | in  | move one byte this clock |
| `loop`  | in  | MU only: while reading, shift each byte back in over the loop bus |
| `wdata` | in  | byte to write |
| `gnt`   | out | this processor holds the side |
| `rdy`   | out | write: room in the FIFO (input ready); read: a byte is waiting (output ready) |
| `rdata` | out | byte at the exit; the FIFO is fall-through, so it is valid as soon as `rdy` is |

A byte moves on a rising edge when `stb && gnt && rdy`. Timing of one transfer:

```
clock      0    1    2    3    ...   64   65
en        _/‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾\_
gnt       ______/‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾\_     one clock to engage
stb/rdy   _/‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾\_
byte           b0   b1   b2   ...  b63          64 bytes in 65 clocks
```

Rules of a side (in `fifo_node`):

* **Engaging is registered.** The side's owner register changes on the clock edge after the
  request, so `gnt` rises one clock after `en`.
* **The holder keeps the side** as long as its `en` stays high. It keeps it even while it moves no
  bytes, and even while the FIFO is full or empty. A whole DMA block therefore arrives unbroken,
  with no other writer's bytes in the middle. The top-level test checks this when two processors
  write into the same FIFO.
* **Ties on a free side** go to the MU first, then the row AU, then the column AU.
* **Full and empty are not errors.** A writer with `gnt` but no `rdy` simply waits, as a DMA
  controller waits on input ready. A reader does the same on output ready.
* **Loop read.** With `loop` set, the MU needs both the exit and the entrance, the latter on
  behalf of the loop bus. The node grants the MU's read only when it holds both. Each byte read is
  shifted back in during the same clock. The chips accept a shift-in while full if a word leaves
  in that clock, so a loop read of a full FIFO works.

Assertions in `fifo_node` check that at most one processor is granted per side and that the two
4-bit chips of a buffer always agree on their flags.

## Using a FIFO in both directions

A FIFO is a single queue. If AU-i writes into FIFO-(i,j) and then reads it back from the same
FIFO, it gets its own data unless AU-j has already taken it. Algorithms that use one FIFO both
ways therefore need a rule that separates the turns. The ADI and Poisson schemes alternate a row
step and a column step. The testbench `tb_poisson_iteration` makes every half-step end with a
barrier on the control lines, described next. The FFT exchange in `tb_fft16` needs no barrier:
within a stage, each pair uses FIFO-(k,k') in one direction and FIFO-(k',k) in the other.

## Control lines (PORT 0)

`control_lines` carries the few signals between the MU and the AUs. It is purely combinational,
because every processor latches its own port.

| MU PORT 0 | meaning |
|-----------|---------|
| `[3:0]`   | number j of the AU addressed |
| `[4]`     | stop: the AU returns to receiving programs |
| `[5]`     | broadcast: start/stop goes to every AU, not only AU-j |
| `[6]`     | start: the AU begins its calculation |
| `[7]` (in)| end-of-calculation flag of AU-j |

| AU PORT 0 | meaning |
|-----------|---------|
| `[4]` (in)| stop |
| `[5]`     | interrupt request to the MU |
| `[6]` (in)| start |
| `[7]`     | end of calculation |

The interrupt requests come out one per AU (`mu_pio_irq`, for the MU's PIO to read) and as their
OR (`mu_irq`).

A typical session: the MU loads programs and data into the AUs through the FIFOs, then starts
them. They compute and exchange data among themselves. They raise their end flags, and the MU
polls each flag and collects the results.

## Module hierarchy

```
adina_top            ports of the MU and the N AUs
├── fifo_array       N x N nodes, PORT 1 selection decode, response steering
│   └── fifo_node    one FIFO-(i,j): entrance/exit arbitration, loop bus   (x N*N)
│       └── fifo_chip  64 x 4 fall-through FIFO                              (x 2)
└── control_lines    PORT 0 network
adina_pkg            widths, port structs, PORT 0 bit positions, RAM block address formulas
```

Parameters: `N` (number of AUs, default 16) and `DEPTH` (bytes per FIFO, default 64) on
`adina_top`, `fifo_array` and `fifo_node`. `WIDTH`/`DEPTH` on `fifo_chip`. With `N` other than
16, the selections use `clog2(N)` bits per index. PORT 0 keeps its 4-bit AU number, so the control
lines address at most 16 AUs. At the defaults the whole array synthesises (generic, before
technology mapping) to about 34,000 word-level cells, 12,032 flip-flops and 131,072 memory bits
(256 FIFOs x 64 x 8).

## How far this follows the original machine, and where it chooses

Taken from the original description: the array and its three buses per FIFO; the MU bus to every
FIFO, which was the preferred option over connecting the MU to the diagonal only; 16 AUs; FIFOs
of two 64 x 4 chips; one processor per side, the others waiting; the loop bus; the PORT 1
selection codes and the PORT 0 signal meanings.

Choices made here, where the description says nothing or is ambiguous:

* **One clock.** The original processors each run on their own clock, and the FIFO chips are
  asynchronous between their two sides. Here everything is synchronous to `clk`, with an
  active-low asynchronous reset that empties every FIFO. The asynchrony between processors
  survives at the protocol level: each port only waits on flags.
* **The port protocol** (`en`/`wr`/`stb`/`gnt`/`rdy`) is an abstraction of the DMA ENABLE and
  DIRECTION lines and the chips' shift-request and ready signals.
* **Tie order** on a free side: MU, then row AU, then column AU.
* **How the loop bus is switched on** is not described. Here it is the `loop` bit of the MU's
  request.
* **AU column selection.** The source text gives the code for "AU-i engages FIFO-(i,j)" as `1i`.
  This RTL uses `1j`: the AU's own number is implied, and the digit must name the other end.
* **PORT 0 on the MU side.** The source text is garbled there. Start is taken as bit 6 and stop as
  bit 4, matching the AU side, which is stated clearly. Commands are levels that follow the
  latch, not pulses.
* **Interrupts.** How the PIO merges 16 requests is not described; both the individual lines and
  their OR are provided.

## Workloads and what the testbenches show

The original evaluation runs its examples in software on 14 or 16 AUs with 4-byte floating-point
words. All of them fit the default sizes. The largest message into one FIFO is one 16-word column
(64 bytes) in the matrix product and in the Gauss-elimination pivot row. That is exactly one FIFO,
so the array is full at the peak of the matrix product. The ADI schemes send at most 5 words
(20 bytes) per FIFO per half-step. The testbenches run the data movement of these programs. Each
AU is a process in the testbench that drives that AU's port like its DMA would. In place of the
original's 4-byte floating-point software, they use integers, fixed point, arithmetic modulo a
prime, or 64-bit reals, each checked against a serial run of the same arithmetic:

* `tb_adina_top` (full size):
  * a 16 x 16 matrix product with the data flow of the original example;
  * one Gauss-elimination pivot broadcast, with the MU contending for the same FIFOs;
  * the first FFT stage;
  * start, stop, end flags and interrupts.

  It counts each mechanism (waiting for an engaged side, full, empty, loop-bus bytes, addressed and
  broadcast start, broadcast stop, end flags, interrupt requests, simultaneous pair exchange) and
  fails if any never happens. It also checks the transfer timing: 64 bytes in 65 clocks.
* `tb_fft16` (full size): all four stages of a 16-point FFT, one point per AU. It uses a cos/sin
  table in fixed point, and the pairs run without global synchronisation. The result is checked
  exactly against the same algorithm run serially, and against a real-valued DFT.
* `tb_poisson_iteration` (full size): 5 iterations of the simple iteration for the Poisson
  equation on a 16 x 16 mesh with 14 AUs. It alternates row and column half-steps through the
  FIFOs and is checked exactly against a serial computation.
* `tb_navier_stokes` (full size): two time steps of the ADI scheme for the vorticity and
  stream function of a lid-driven cavity, with 14 AUs, 5 inner Poisson iterations per step and
  64-bit reals. The five stages follow the original program: the five-number set, the zeta
  triple, the zeta/Delta2-psi pair, the B/psi pair and the Delta2-psi/psi pair. These pass through
  FIFO-(i,j) alternately from the row side and the column side. At most 40 bytes sit in one FIFO.
  Vorticity and stream function are bit-exact against a serial run.
* `tb_adi_poisson` (full size): 5 ADI iterations for the Poisson equation with 14 AUs on a
  16 x 16 mesh, in 64-bit reals. AU-j solves the tri-diagonal system of mesh row j, then that of
  mesh column j. Each FIFO carries data forward in one half-step and back in the next, with an
  end/stop/start barrier between them. The result is bit-exact against a serial run, and the
  residual falls. The source term enters both half-steps (Peaceman-Rachford form).
* `tb_gauss16` (full size): Gauss elimination for 16 unknowns. AU-j owns equation j. Pivot rows
  go to every later AU, then the unknowns go back in back substitution. No global
  synchronisation is used. The arithmetic is exact modulo 65521, and every unknown is checked.
* `tb_cordic_pair` (full size): COS and SIN of p pi/8 for p = 0..3 by CORDIC. Four AU pairs
  (AU-p, AU-p+8) run at once and swap x and y through their FIFO pair on every iteration. The
  result is exact against a serial run and within 2^-16 of $cos/$sin.
* `tb_gauss_seidel` (full size): 5 Gauss-Seidel sweeps for the Poisson equation with 14 AUs. The
  data move as a wave through the FIFOs next to the diagonal, and the result is checked exactly
  against a serial computation.
* `tb_fifo_chip`, `tb_fifo_node`, `tb_fifo_array` (N = 4), `tb_control_lines`: unit tests of each
  level.

The original's timing estimates are in microseconds of F8 software, so they are not comparable
with this RTL. The hardware moves one byte per clock per port once engaged, with all ports in
parallel.

## Simulating

Every testbench is self-checking, prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl \
    rtl/adina_pkg.sv rtl/fifo_chip.sv rtl/fifo_node.sv rtl/fifo_array.sv \
    rtl/control_lines.sv rtl/adina_top.sv tb/tb_adina_top.sv \
    --top-module tb_adina_top -Mdir obj_top
./obj_top/Vtb_adina_top
```

Replace the testbench file and top module name to run another test. Leave out files a unit test
does not need, or add `-y rtl`. The full-size tests each finish in a few seconds.

To drive the design from your own processor model, copy the `put`/`get` tasks of
`tb/tb_adina_top.sv`:

1. Set PORT 1.
2. Raise `en` with `wr`.
3. Strobe while `gnt && rdy`.
4. Drop `en`.
