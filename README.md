# Compact digit-serial modular exponentiation coprocessor

This design computes `m^e mod p` for large moduli (1024 to 4096 bits) while
spending as little logic as it can. Three choices keep it small:

* **Digit-serial Montgomery multiplication.** Operands are never held in
  wide registers. Each operand lives in a small block RAM, one K-bit digit
  per word, and a datapath only a few digits wide streams through them. The
  datapath has three K x K multipliers and two adders. Its width depends on
  the digit size K, not on the operand size N.
* **Montgomery powering ladder.** Every exponent bit costs one squaring and
  one multiplication, whatever the bit's value. That is good for resistance
  to simple power analysis, and it lets two identical datapaths run the two
  products of a ladder step side by side.
* **Microcoded control.** Each step of the digit loop repeats the same
  pattern of addresses and control bits. That pattern is stored once, as
  `n + 1` microwords, in the spare half of the memory that holds the
  modulus. The control then only counts. The same microwords drive both
  datapaths.

Default configuration: K = 16-bit digits, N = 1024-bit operands
(n = N/K = 64 digits) and a 1024-bit exponent.

## The ladder

The coprocessor runs, for `i = L-1 downto 0`:

```
if e_i = 1:  R0 <- R0*R1,  R1 <- R1*R1
else:        R0 <- R0*R0,  R1 <- R1*R0
```

All products are Montgomery products `X*Y*R^-1 mod p` with `R = 2^N`, so R0
and R1 stay in the Montgomery domain the whole time. Datapath 0 always takes
R0 as its X operand and writes the new R0. Datapath 1 always takes R1 and
writes the new R1. They share the Y operand: R1 when the bit is 1, R0 when
it is 0. A squaring reads the same memory at two addresses, so every operand
memory is dual-ported.

A digit-serial product needs its operands for the whole multiplication, so
the results cannot overwrite them. There are four banks: R0, R1, R00 and R11.
In one ladder step R0 and R1 are the operands and R00 and R11 receive the
results. In the next step the roles swap. `phase` (in `mpl_ctrl`) records
which pair currently holds R0 and R1. The host port always addresses the
ladder's R0 and R1 through it, so the host never needs to know which
physical bank they are in.

## The Montgomery multiplier

### Algorithm

With `beta = 2^K`, `p' = -p^-1 mod beta`, and A starting at 0, each outer
step `i = 0 .. n-1` runs this loop over the digits `j = 0 .. n-1`:

```
s_j            = A_j + X_j * Y_i
q_i            = s_0 * p' mod beta                 (only for j = 0)
{c_j+1, t_j}   = s_j + q_i * p_j + c_j             (c_0 = 0)
A_j-1          = t_j                               (for j > 0)
```

When the digit loop ends, `A_n-1 = c_n`. The result is built up in place in
the result memory. There is no shift register: the digit write for `j`
goes one address below the digit read for `j`.

### Datapath pipeline (`mont_dp`)

The datapath has these registers:

* `s` (2K+1 bits)
* `q` (K bits)
* `s_d` and `p_d`: a pipeline copy of s and of `p_j`
* `t` (K bits)
* `c` (K+1 bits)

The write-back multiplexer sends either `t` or `c` to the result memory.
Memories read synchronously, one cycle after the address. The table counts
cycles from the cycle in which X_j's address is presented:

| cycle | what happens |
|------:|--------------|
| 0 | the address of X_j and A_j (both `addr_x`) is presented; Y_i is at `addr_y` |
| 1 | X_j, A_j and Y_i arrive; `s <= A_j + X_j*Y_i`. The address of p_j is presented |
| 2 | `s_d <= s` and `p_d <= p_j`. If `load_qi` is set (j = 0): `q <= s*p' mod beta` |
| 3 | `{c, t} <= s_d + q*p_d + (rst_cj ? 0 : c)` |
| 4 | `t` (or `c` when `mux_cj` is set) is written at `addr_a` |

A new digit enters every cycle, so one outer step takes `n + 1` cycles. The
extra cycle is a bubble in which `q_i` is loaded.

### Microprogram (`mpl_pkg::ucode_row`, stored in `pmem`)

A microword is `{addr_x, addr_p, addr_a, wr_a, rst_cj, load_qi, mux_cj}`:
three address fields of `AW = log2(n)` bits each, plus four control bits.
For n = 64 the word is 22 bits. Row r (0 .. n) of the program:

| row | addr_x | addr_p | addr_a | wr_a | rst_cj | load_qi | mux_cj | word (n = 64) |
|----:|-------:|-------:|-------:|:----:|:------:|:-------:|:------:|:--------------|
| 0 | 0 | n-1 | n-5 | 1 | 0 | 0 | 0 | 0x00ffb8 |
| 1 | 0 | 0 | n-4 | 1 | 0 | 0 | 0 | 0x0003c8 |
| 2 | 1 | 0 | n-3 | 1 | 0 | 0 | 0 | 0x0103d8 |
| 3 | 2 | 1 | n-2 | 1 | 1 | 1 | 0 | 0x0207ee |
| 4 | 3 | 2 | n-1 | 1 | 1 | 0 | 1 | 0x030bfd |
| 5 | 4 | 3 | n-1 | 0 | 0 | 0 | 0 | 0x040ff0 |
| r >= 6 | r-1 | r-2 | r-6 | 1 | 0 | 0 | 0 | e.g. row 64: 0x3ffba8 |

Rows 0 to 4 write back the last five digits of the *previous* outer step,
while the current step's first digits are already being read. Row 3 is the
bubble: it loads `q_i`. Row 4 writes `c_n`. The program is replayed n times.
The outer-step counter is also the Y address. After the last step, rows 0
to 4 run once more to write the final five digits. In the first step, the
writes of rows 0 to 4 have no earlier step to belong to and are suppressed.
In that step, `a_clr` replaces A_j by zero, which implements `A = 0` without
clearing the memory.

Reading the control bits takes two decisions that the microword format
does not settle by itself:

* `rst_cj` forces a zero carry into the final adder. In row 4 this gives
  c_0 = 0 for digit 0.
* `c` keeps its value during the `load_qi` row. `c_n` is produced in row 2
  and written in row 4, with the bubble in between.

With these two readings, the stored table computes the loop above exactly.

### Program memory (`pmem`)

The modulus memory holds `p` at addresses `0 .. n-1` and the program at
`n .. 2n`. Port A feeds `p_j` to the datapaths. Port B feeds microwords to
`mont_ctrl`. The memory word is `max(K, 3*AW+4)` bits wide: 22 bits at the
defaults, because a 16-bit word cannot hold a 22-bit microword. The
program is the memory's initial content, computed from `ucode_row()` in
the same way that an FPGA block RAM is initialised from the bitstream.

## Using the coprocessor (`mpl_coproc`)

Drive the host port while `busy` is low. `host_rdata` arrives one cycle
after the address.

| `host_sel` | memory | contents to load |
|------------|--------|------------------|
| `HOST_P`  | modulus | p, digit i at address i (least significant first) |
| `HOST_E`  | exponent | bit b in digit b/K, bit b mod K |
| `HOST_R0` | ladder R0 | R mod p: Montgomery form of 1 |
| `HOST_R1` | ladder R1 | m*R mod p: Montgomery form of the base |

Also hold `p_prime = -p^-1 mod 2^K` on its port.

Pulse `start`. `done` pulses when the ladder has finished. R0 then holds
`m^e * R mod p` as a value below 2p: subtract p once if needed, then
multiply by `R^-1` (or run a Montgomery product with 1) to leave the
Montgomery domain. The host does the conversions into and out of the
Montgomery domain. The coprocessor only runs the ladder.

**Modulus bound.** The modulus must be odd and below `2^(N-2)`. Then every
result stays below 2p, and the top digit `c_n` fits in one K-bit word. For
a modulus that uses all 1024 bits, build with N = 1040 (n = 65 digits);
`tb_mpl_workloads` runs that case. The microprogram needs n >= 6, and n
does not have to be a power of two.

## Timing

* One Montgomery multiplication runs `n(n+1) + 5` microwords, so its last
  row executes `n(n+1) + 4` cycles after its first. From `start` of the
  multiplier control to its `done` takes `n(n+1) + 7` cycles.
* One ladder step takes `n(n+1) + 10` cycles: the multiplication plus
  fetching and latching the exponent bit.
* A whole exponentiation takes `L*(n(n+1)+10) + 2` cycles from `start` to
  `done`.

These counts match the throughputs reported for the architecture on a
Virtex-7. The ms figures below are simulated cycles divided by the
frequency reported for that configuration. Clock frequency is not
something this RTL can establish.

| K | N | cycles per exponent bit | 1024-bit exponent at reported f | reported throughput |
|--:|--:|--:|--:|--:|
| 16 | 1024 | 4170 | 20.50 ms at 208.33 MHz, 49.96 kbit/s | 0.050 Mbit/s |
| 32 | 1024 | 1066 | 10.00 ms at 109.20 MHz, 102.4 kbit/s | 0.102 Mbit/s |
| 64 | 1024 | 282 | 3.22 ms at 89.62 MHz, 317.8 kbit/s | 0.322 Mbit/s |
| 16 | 2048 | 16522 | 81.6 ms at 207.38 MHz | 0.025 Mbit/s |
| 16 | 4096 | 65802 | 320.7 ms at 210.08 MHz | 0.012 Mbit/s |

For 2048 and 4096 bits, the reported figures equal N bits divided by the
time of a 1024-bit exponent: 25.1 and 12.8 kbit/s.

## Files

| file | block |
|------|-------|
| `rtl/mpl_pkg.sv` | host select enum, microword control bits, `ucode_row()` |
| `rtl/mpl_coproc.sv` | top: two datapaths, both controls, routing, six memories |
| `rtl/mont_dp.sv` | Montgomery datapath |
| `rtl/mont_ctrl.sv` | microcoded multiplier control |
| `rtl/mpl_ctrl.sv` | ladder control (exponent scan, phase) |
| `rtl/mem_ctrl.sv` | bank routing and host port |
| `rtl/dpram.sv` | dual-port digit memory (R0, R1, R00, R11, exponent) |
| `rtl/pmem.sv` | modulus and microprogram memory |

Testbenches in `tb/` are self-checking. Each prints
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|-----------|----------------|
| `tb_mpl_coproc` | end to end at N=128: random and extreme exponents, results, cycle counts, and that every mechanism (both bit values, both phases, q load, c_n write) occurs |
| `tb_mpl_coproc_full` | one full 1024-bit exponentiation at the default parameters |
| `tb_mpl_workloads` | the six sizes in the timing table above, plus a full-width 1024-bit modulus at N = 1040, using the helper `mpl_exp_check` |
| `tb_mont_dp` | single multiplier, N=256: random and maximal operands, squaring through both memory ports, latency |
| `tb_mont_ctrl` | every executed microword against the table, suppressed writes, `a_clr`, `done` timing |
| `tb_mpl_ctrl`, `tb_mem_ctrl`, `tb_dpram`, `tb_pmem` | the smaller blocks on their own; `tb_pmem` compares the stored words with the 22-bit values above |

The expected values come from plain square-and-multiply with `%`, or from
shift-and-subtract modular multiplication where the operands are too wide
for `%`. Neither uses Montgomery arithmetic.

Simulate with Verilator 5, for example:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y tb \
    rtl/mpl_pkg.sv tb/tb_mpl_coproc.sv --top-module tb_mpl_coproc -o sim
./obj_dir/sim
```

The package must come first. The other files are found by module name. The
full-size test takes a few seconds and `tb_mpl_workloads` about a minute and
a half.

## Where this RTL makes its own choices

The following are decisions of this implementation, not of the
architecture it follows:

* the pipeline registers `s_d` and `p_d`, and the reading of `rst_cj` and
  `load_qi` described above;
* the modulus bound `p < 2^(N-2)`;
* the exponent memory (a sixth block RAM) and its bit order;
* the host port, the start/busy/done handshakes and the asynchronous
  active-low reset of the control registers;
* the memory layout of `pmem`;
* the final pass of rows 0 to 4 and the suppression of writes in the first
  step;
* host-side conversion into and out of the Montgomery domain.

An FSM version of the multiplier control was also described, but only as a
point of comparison for the microcoded one. It is not included here.
