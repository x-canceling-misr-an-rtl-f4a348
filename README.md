# X-canceling MISR

A MISR compacts scan test responses into one signature. Unknown values (X's) in the responses
normally make the signature useless. The usual fix is to mask the X's before they reach the
MISR, and that needs mask data every clock. This design keeps the MISR and lets the X's in.

Every bit of a MISR signature is an XOR (a linear function over GF(2)) of the bits that were
compacted. If k of those bits are X's, each signature bit is "some known value XOR some subset
of the k X's". With an m-bit MISR and k < m, some XOR combinations of signature bits must
contain no X at all. Those combinations are deterministic and can be checked. The combinations
are found off line. A programmable XOR computes them on chip from tester-supplied selection
vectors, and a second, X-free MISR compacts the results. At the end of the test the X-free
MISR holds a signature that does not depend on the X's.

Each X-free combination sees about half of the good response bits, so checking q independent
combinations misses an error with probability about 2^-q. An m-bit MISR can therefore absorb up
to m - q X's per *intermediate signature* and still give q-bit-MISR error detection. The method
comes from N. A. Touba, "X-Canceling MISR", International Test Conference. This RTL follows its
architecture. Every detail the method leaves open is a choice of this implementation, listed
below.

Defaults: m = 256, q = 12 (so up to 244 X's per intermediate signature, about 99.97 % error
coverage), 512 scan chains, 16 tester channels.

## Data path

```
 scan chains (N) --> phase_shifter --> misr (m bits) --+--> [shadow_register] --+
                                                       |      (SHADOW = 1)      |
                                                       +------------------------+--> prog_xor --> xfree_misr --> xfree_sig_o
 tester channels (b) --> sel_shift_reg (m-bit selection vector) ---------------------^     |
        |                                                                                  +--> xc_bit_o / xc_valid_o
        +--> interval_counter --> halt_controller (or shadow_controller) --> scan_en_o, strobes
```

* **phase_shifter**: a linear XOR network from the N scan outputs to the m MISR inputs. Scan
  chain i drives three distinct MISR inputs: input i mod m, plus two inputs picked by a
  multiplicative hash (`xc_pkg::ps_tap`). The network does two jobs. First, it breaks *shift
  correlation*. Without it, an X and a good bit from neighbouring chains can enter the same
  MISR stage in lock step. They then appear together in every signature bit, and the X cannot
  be canceled without also canceling the good bit. Second, it compacts in space when N > m.
  Any linear network works, provided the off-line tool uses the same one.
* **misr**: internal-XOR (Galois) MISR. For m = 256 its polynomial is
  x^256 + x^254 + x^251 + x^246 + 1. Other widths take their polynomial from `misr_poly_bit`.
  `clr_i` resets it to zero after every intermediate signature.
* **sel_shift_reg**: builds the m-bit selection vector b bits per clock, so one vector takes
  m/b clocks. The vector it presents already includes the chunk now on the channels. As a
  result the X-canceled bit is computed and compacted in the clock of the last chunk, and
  q vectors take exactly q*m/b clocks.
* **prog_xor**: `^(signature & selection)`. It does not depend on the circuit under test.
* **xfree_misr**: a 32-bit single-input LFSR (x^32 + x^22 + x^2 + x + 1) that compacts one
  X-canceled bit per vector. The same bit is also brought out on `xc_bit_o`, qualified by
  `xc_valid_o`, for a setup that sends it straight to the tester instead.
* **interval_counter**: holds the number of shift clocks left before the next halt.

## A test session (halting scheme, the default)

The off-line tool knows where the X's are, so it knows after how many shift clocks the MISR
has collected m - q X's. It sends that number as the *interval*. The controller
(`halt_controller`) then runs:

| state | clocks | what happens | what the tester drives on `ch_i` |
|---|---|---|---|
| `ST_IDLE` | - | nothing; `start_i` starts a session and clears the X-free MISR | - |
| `ST_LOAD` | 1 | load the interval counter, reset the MISR | interval (low `CNT_W` bits); 0 ends the session |
| `ST_SHIFT` | interval | `scan_en_o` = 1, the MISR compacts one slice per clock | scan stimulus (outside this block) |
| `ST_SEL` | q*m/b | scan halted; one selection chunk per clock; an X-canceled bit every m/b clocks | chunks, first chunk = bits [b-1:0] |

After `ST_SEL` it returns to `ST_LOAD`. A halt therefore lasts q*m/b + 1 clocks, which is
193 clocks at the defaults. The tester channels are never idle. During shifting they carry
stimulus. During a halt they carry selection vectors and the next interval.

An interval of n gives exactly n shift clocks. The value 0 is reserved: loaded in `ST_LOAD`,
it ends the session and returns to `ST_IDLE`, and the X-free signature then holds still until
the next `start_i`.

## Continuous-shifting variant (`SHADOW = 1`)

The design can also avoid halting the scan. On the last shift of a stretch, `shadow_controller`
copies the MISR's next state (last slice included) into `shadow_register`. In the same clock it
resets the MISR and reloads the interval counter. The programmable XOR then reads the copy while
the next stretch shifts. In this mode `ch_i` are channels dedicated to control data. For each
copied signature they carry q vectors of m/b chunks, then one clock with the interval of the
stretch after next. That clock loads a pending-interval register. A session therefore starts
with two load clocks, for the first two intervals (`ST_LOAD` on `state_o`). An interval of 0
ends shifting. The controller then finishes the last copy without shifting (`ST_SEL`) and goes
idle.

Processing a copy takes q*m/b + 1 clocks, so every stretch after the first must be at least
that long. A stretch that ends earlier sets the sticky `overrun_o` flag. The new signature is
still copied, and the unfinished one is abandoned. This is the cost of the variant: enough
channels must be dedicated that the worst-case stretch still outlasts the processing.

## Preparing the control data

The chip only applies what an off-line tool computes. For every intermediate signature:

1. Give every X in the stretch its own symbol. Simulate the phase shifter and the MISR over
   GF(2), keeping for each MISR stage the set of symbols it depends on. Alongside, simulate the
   concrete signature with every X set to 0.
2. Build the m x k matrix (stage x symbol). Run Gauss-Jordan elimination on it, and record for
   each row which stages were XORed into it. Rows that end up all-zero give X-free
   combinations. There are at least m - k of them.
3. Pick q of those combinations as the selection vectors. The fault-free value of each
   X-canceled bit is the parity of the X = 0 signature over the vector. Compacting those
   values gives the expected X-free signature.

The tool must use exactly the wiring of `xc_pkg::ps_tap` and the polynomials of
`xc_pkg::misr_poly_bit`. `tb/xc_e2e_bench.sv` contains a complete reference of steps 1-3 in
SystemVerilog: the tasks `make_stretch` and `choose_combos`.

## Parameters of `xcancel_misr_top`

| parameter | default | meaning |
|---|---|---|
| `N` | 512 | scan chains (this implementation's choice) |
| `M` | 256 | MISR width m (the method's main example) |
| `Q` | 12 | X-canceled combinations per intermediate signature (244 = 256 - 12 X's) |
| `B` | 16 | tester channels b; `M` must be a multiple of `B` |
| `CNT_W` | 16 | interval counter width, at most `B` so it loads in one clock |
| `XF_M` | 32 | X-free MISR width |
| `PS_TAPS` | 3 | MISR inputs per scan chain in the phase shifter |
| `SHADOW` | 0 | 1 = continuous-shifting variant |

MISR widths with a built-in polynomial are 4-8, 12, 16, 24, 32, 64, 128 and 256. For any other
width, `misr_poly_bit` falls back to x^m + x^(m-1) + 1, which is not maximal-length in general.

All flip-flops use an asynchronous active-low reset `rst_ni`. Everything runs on one clock,
`clk_i`. `chains_i` is sampled on every clock where `scan_en_o` is high.

## Files

`rtl/` (one unit per file):

* `xc_pkg.sv`: defaults, state types, polynomial table, phase shifter wiring
* `xcancel_misr_top.sv`: the top
* `phase_shifter.sv`, `misr.sv`, `sel_shift_reg.sv`, `prog_xor.sv`, `xfree_misr.sv`,
  `interval_counter.sv`: the data path
* `halt_controller.sv`, `shadow_controller.sv`, `shadow_register.sv`: control

`tb/`: one self-checking testbench per unit (`tb_<unit>.sv`), plus end-to-end benches:

* `tb_xcancel_misr_top.sv`: default sizes, halting scheme
* `tb_xcancel_misr_e2e.sv`: default sizes, halting and continuous-shifting schemes side by side
* `tb_xcancel_misr_small.sv` and `tb_xcancel_misr_shadow_small.sv`: 32 chains, 64-bit MISR,
  q = 7
* `tb_xcancel_misr_table2.sv`: four evaluated configurations side by side with a 256-bit
  MISR: 2048 chains at 0.001 % X's (q = 12), 128 at 0.05 % (q = 9), 64 at 0.1 % (q = 7) and
  16 at 0.5 % (q = 12)

All the end-to-end benches are built on `xc_e2e_bench.sv`. Every testbench prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog.

## Simulating

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
          --top-module tb_xcancel_misr_top rtl/xc_pkg.sv tb/tb_xcancel_misr_top.sv
./obj_dir/Vtb_xcancel_misr_top
```

Replace the top module name to run any other testbench. At the default sizes an end-to-end
bench builds in about 20 s and runs in about 2 s. The four-configuration bench builds in
about 40 s, mostly elaborating the 2048-input phase shifter.

## What the end-to-end benches check

The benches play both the off-line tool and the tester. Scan data with X's is generated at the
densities the method is evaluated at for that number of chains: 0.01 % and 0.05 % X's for 512
chains, 0.5 % and 1 % for 32 chains. Each stretch is ended just before it would exceed m - q
X's. The control data comes from the symbolic simulation and elimination described above. The
design is then run with every X replaced by a random value. The benches check:

* every X-canceled bit against its predicted fault-free value;
* the final X-free signature against the value predicted with all X's set to 0;
* that shift stretches last exactly the interval and halts exactly q*m/b + 1 clocks;
* a second session with one injected error per intermediate signature, counting detections.
  All were detected in the runs made; at most one miss is allowed, since misses occur with
  probability about 2^-q.
* the continuous-shifting benches also check that selection overlaps shifting, that a
  too-short stretch raises `overrun_o`, and that reset clears it.

Every mechanism is counted and must occur at least once: halts or copies, MISR resets,
interval loads, X's compacted (up to the full 244 per signature), signatures actually
corrupted by X's, session end and restart, and error detection.

Each unit testbench compares its unit against a model written separately in the testbench.
For example, the MISR bench uses an explicit GF(2) shift with the polynomial terms listed in
the bench. Each unit testbench has also been run against a deliberately broken copy of its
unit, and it fails there.

## Limits and departures

* **X density.** The roughly 2^-q escape rate assumes the MISR mixes well, so that each
  combination sees about half the response bits. That needs stretches of many shift clocks.
  With 512 chains at 1 % X's, a stretch is only about 46 clocks long. In trial runs at that
  density, single errors then escaped the 12 combinations far more often than 2^-12. X
  cancellation itself stays exact at every density. The benches include 5 % stretches in the
  fault-free session to show this, and check error detection only at the evaluated
  densities. The method itself is meant for X densities of a few percent at most.
* **q.** The method's running example names q = 10 once, but derives 244 X's and
  12 combinations for a 256-bit MISR. This design uses q = 12 throughout. Other values of q
  (7 and 9 are also evaluated) are a parameter change.
* **Phase shifter.** The wiring is a fixed hash, not a phase shifter synthesized to
  guarantee channel separation. Any linear network keeps the scheme correct. Separation only
  affects how often an X and a good bit become inseparable.
* **Own choices.** Not given by the method: the polynomials, the widths N, b and the X-free
  MISR width, the chunk order, the start/stop protocol (`start_i`, interval 0), the order
  inside a halt (vectors first, then the load clock), the pending-interval register and
  overrun flag of the continuous variant, and reset values of zero.
* **Not included.** The circuit under test, its scan chains, the stimulus decompressor and
  the tester are outside this block. The off-line symbolic simulation and elimination is
  software. It exists here only as a testbench reference.
* **Several programmable XORs.** The method allows several programmable XORs feeding one
  X-free MISR, for example across several circuits under test. This design has one.

## Sizing against the evaluated configurations

With the defaults, one intermediate signature absorbs 244 X's. A halt costs 193 clocks. The
16-bit interval counter allows stretches of up to 65 535 shift clocks. In the evaluated range
of 0.001 % to 1 % X's and 8 to 8192 chains, every stretch is between about 760 and 12 000
shift clocks, well inside the counter. Configurations with more than 512 chains need `N`
raised. Tester storage is q*m bits per intermediate signature, plus one interval.
