# TR commutator: a triple-port-RAM commutator for radix-4 pipelined FFTs

A radix-4 pipelined FFT processes a serial stream, one complex word per
clock. Each stage splits the frame into four quarters N words apart. In every
word slot the stage's summation needs four words at once: x(q), x(N+q),
x(2N+q) and x(3N+q) of the same frame. The *commutator* in front of each
stage reorders the stream to deliver them.

The classic commutator uses six N-word delay lines and three 2:1 multiplexers.
Built from shift registers, every word moves through every delay line on
every clock, so data movement, and with it switching power, is large. This
design, the TR commutator, does the same job with three RAMs of 2N words.
Each RAM has one write port and two read ports (a triple-port RAM). Data is
written once into each RAM and never moves inside it. Only the read addresses
change. Two more measures cut switching further:

* Only four of the six RAM read ports are needed in any slot. The three ports
  that are idle part of the time are addressed from a small ROM that parks
  them on an unchanging location, so their outputs do not toggle.
* The last RAM is written only in the two quarters of the frame whose words
  are ever read back from it. The chip select blocks all other writes.

The published evaluation of this architecture (0.35 um CMOS, 3.3 V, 10 MHz)
shows the largest gain in the first and second stages of a 64-point FFT. For
8- to 12-bit words it reports 23-29 % less power than a shift-register
commutator and 4-9 % less than one built from dual-port RAMs in the first
stage. The RTL here reproduces the architecture and its data ordering exactly.
It does not reproduce the power numbers, which need a gate-level netlist and
a power tool in that technology.

## Which word appears where

Number the slots of an output frame s = N*m + q, with m = 0..3 and
q = 0..N-1. In slot s the four outputs carry:

| output | word of the frame      | source                  | delay behind the input |
|--------|------------------------|-------------------------|------------------------|
| O1     | x(N*m + q)             | port C                  | 3N                     |
| O2     | x(N*((m-1) mod 4) + q) | input (m=0), D (m>0)    | 0 or 4N                |
| O3     | x(N*((m-2) mod 4) + q) | A (m<=1), E (m>=2)      | N or 5N                |
| O4     | x(N*((m-3) mod 4) + q) | B (m<=2), F (m=3)       | 2N or 6N               |

Together the four outputs always form the set {x(N*p + q), p = 0..3}, rotated
by m. The summation that follows needs exactly that: output
x_t(q, m) = W^(q*m) * sum_p x(N*p + q) * W4^(p*m). Output O_k holds
p = (m - k + 1) mod 4.

The six RAM ports are taps of one long delay line, built from three 2N-word
sections:

```
input --+--> TM0 (2N) --port 2 + reg--> B --+--> TM1 (2N) --port 2 + reg--> D --+--> TM2 (2N) --port 2 + reg--> F
        |     port 1 (aa) --> A (N)         |     port 1 (a3) --> C = O1 (3N)   |     port 1 (ae) --> E (5N)
        |                                   |                                   |     written only while m = 1, 2
        +--> O2 mux (c1)                    +--> O4 mux (c3)                    +--> O2 mux (c1)

O2 = c1 ? input : D     O3 = c2 ? A : E     O4 = c3 ? B : F     O1 = C
m : c1 c2 c3  =  0: 1 1 1,  1: 0 1 1,  2: 0 0 1,  3: 0 0 0
```

The port values in each slot are the words that are delayed by 0N to 6N. This
matches the classic six-FIFO commutator with pairs of FIFOs merged into one
RAM. In each RAM, port 2 plus its register is the FIFO through the whole
RAM. Port 1 taps the word written N slots ago, halfway along.

For the 16-point example (N = 4), the RAM ports carry these word numbers in
the output slots 0..15 ("-" means not needed in that slot):

```
slot  0  1  2  3 | 4  5  6  7 | 8  9 10 11 |12 13 14 15
A     8  9 10 11 |12 13 14 15 | -  -  -  - | -  -  -  -
B     4  5  6  7 | 8  9 10 11 |12 13 14 15 | 0  1  2  3
C     0  1  2  3 | 4  5  6  7 | 8  9 10 11 |12 13 14 15
D     -  -  -  - | 0  1  2  3 | 4  5  6  7 | 8  9 10 11
E     -  -  -  - | -  -  -  - | 0  1  2  3 | 4  5  6  7
F     -  -  -  - | -  -  -  - | -  -  -  - | 0  1  2  3
```

## The RAMs as circular buffers

All three RAMs share one write address, a1 = slot mod 2N, which walks
around the RAM. The read addresses are offsets from it:

* a2 = a1 + 1 is the oldest word, written 2N-1 slots ago. The read is
  combinational, and one register behind the port adds the last slot. The
  result is a FIFO of exactly 2N words (ports B, D, F).
* a3 = a1 - N is the word written N slots ago (port C, and ports A and E
  while they are in use).

`tpram` is written as a plain array with asynchronous reads. That is a
register-file style memory, and it is the simplest read timing that gives
the depth 2N above. If you map it to a RAM macro with registered outputs,
move every read address one slot earlier and drop the register behind
port 2.

## The control block: slot counter and address ROM

`tr_fsm` is a slot counter, cnt = 0 .. 4N-1, which is the s of the output
frame. It decodes a1, a2, a3, m, q, the multiplexer selects c1..c3 and the
chip select of TM2, cs = (m == 1 || m == 2). TM2's words are read back only
by port E (in m = 2, 3, words written N slots earlier) and port F (in m = 3,
words written 2N slots earlier). Both were written while m was 1 or 2, so
writes in m = 0 and m = 3 would be wasted.

`tr_rom` holds the read addresses of the part-time ports A, E and F, one entry
per slot (4N entries). The published architecture states the ROM's purpose
but not its contents. This implementation uses the following rule:

* while a port is in use, its address tracks the data (aa = ae = a1 - N,
  af = a1 + 1; af starts one slot early because F is registered);
* while a port is idle, its address stays at the last one it used.

The table is computed at elaboration:

```
m = c / N,  a1 = c mod 2N
aa(c) = m <= 1              ? (a1 + N) mod 2N : N - 1
ae(c) = m >= 2              ? (a1 + N) mod 2N : N - 1
af(c) = 3N-1 <= c <= 4N-2   ? (a1 + 1) mod 2N : 2N - 1
```

Because TM2 is not written in m = 3 and m = 0, the location that port E parks
on is never rewritten, so E does not switch at all while it is idle. Ports A
and F switch exactly once per idle period, when their parked location is
rewritten. After that, the word they held no longer exists in the RAM, so no
addressing can keep it. Over 22 idle periods at N = 16, the full-size
testbench counts 22 switches on A in 704 idle slots and 22 on F in 1056 idle
slots. A port whose address always tracked the write pointer would switch in
almost every one of those slots.

## Interface and timing

`tr_commutator #(N = 16, W = 16)`:

| port      | dir | width  | meaning |
|-----------|-----|--------|---------|
| clk       | in  | 1      | one word slot per clock |
| rst_n     | in  | 1      | synchronous, active low |
| din       | in  | W      | input word |
| o1..o4    | out | W      | O1..O4 of the table above |
| m, q      | out | 2, log2 N | slot of the output frame (the summation's m_t and q_t) |
| out_valid | out | 1      | high from the first output frame on |

* The first word clocked in after reset is word 0 of a frame. The stream must
  then continue without gaps. There is no valid/stall handshake.
* The first output frame starts 3N clocks after word 0 arrives, and
  out_valid rises in its first slot. That is also the latency of O1. The
  first frame is already complete, because every port it uses has been
  written by then.
* O2 in m = 0 is the input word of the same clock: a combinational path
  from din to o2.
* N must be a power of two, because addresses wrap modulo 2N. A radix-4
  FFT uses N = 4^k: 16 and 4 for the first two stages of a 64-point FFT,
  and 1 for its last stage. All three have been simulated.
* The RAM contents and the data registers are not reset. Use out_valid.

Parameter defaults: N = 16 is the first stage of a 64-point FFT, the
architecture's main use, with three RAMs of 32 words. W = 16 is the largest
word width of the published evaluation, which covered 8, 10, 12, 14 and
16 bits. The word is whatever the FFT carries. For complex data, pack the
real and imaginary parts into one W-bit word.

## What this design chose, and what it leaves out

Taken from the published architecture:

* the three 2N-word triple-port RAMs;
* the roles of the addresses a1, a2 (offset 1), a3 (offset N), aa, ae, af;
* the registers behind port 2;
* the multiplexer sources and select table;
* TM2's chip-select phases;
* the worked 16-point data ordering.

Choices made here:

* asynchronous-read RAMs;
* the ROM contents (park on the last used address);
* selects where 1 picks the input, A or B;
* synchronous reset of the slot counter, with word 0 arriving first;
* the m, q and out_valid outputs.

The select polarity and the 3N output alignment are the only reading that
reproduces the published timing diagrams. The diagrams draw the output rows
against a shifted input row, and the structure of the six-FIFO commutator
fixes O1 at 3N behind the input.

Not included:

* The radix-4 summation and twiddle multiplier of the FFT stage. The
  architecture only describes the commutator and assumes the rest of the
  processor. m, q and o1..o4 are brought out for it.
* The shift-register and dual-port-RAM commutators the architecture is
  compared with.
* Power estimation.

## Files

| file | content |
|------|---------|
| `rtl/tr_pkg.sv` | select-line type `sel_t`, select table `sel_of_m`, index width helper |
| `rtl/tpram.sv` | triple-port RAM: 1 synchronous write port with chip select, 2 asynchronous read ports |
| `rtl/tr_fsm.sv` | slot counter; a1, a2, a3, cs, m, q, selects, out_valid |
| `rtl/tr_rom.sv` | address ROM for ports A, E, F, computed at elaboration |
| `rtl/tr_control.sv` | control block: FSM plus ROM |
| `rtl/tr_outmux.sv` | the three output multiplexers |
| `rtl/tr_commutator.sv` | top: three RAMs, three registers, control, multiplexers |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_tr_workloads` and its helper `tb_tr_stream` |

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself.
With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/tr_pkg.sv tb/tb_tr_commutator.sv --top-module tb_tr_commutator
./obj_dir/Vtb_tr_commutator
```

* `tb_tr_commutator` runs the top at its default size (N = 16, W = 16) over
  24 frames of random words. In every slot it checks all four outputs,
  m and q against the table above. It also checks the 3N latency, that TM2
  is never written in m = 0 or m = 3, that idle port E never switches, and
  that A and F switch at most once per idle period. It counts every m phase
  and both values of every select line.
* `tb_tr_workloads` has three parts:
  * the 16-point example, slot by slot, for O1..O4 and ports A..F, with word
    numbers as data;
  * the 64-point first- and second-stage commutators (N = 16 and N = 4) at
    8, 10, 12, 14 and 16 bits;
  * a last-stage commutator with N = 1.
* `tb_tpram`, `tb_tr_fsm`, `tb_tr_rom`, `tb_tr_control` and `tb_tr_outmux`
  test the parts against independently computed values.

All of them run in well under a second.
