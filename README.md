# On-line transparent test of SRAM FIFO buffers in a NoC router

A mesh network-on-chip buffers flits at the input channels of its routers. These
buffers are many, spread over the die, and usually built as small SRAMs. Faults
can appear in them during the chip's life: cells stuck at a value, cells that no
longer switch one way, reads that upset a cell. This design finds such faults
**while the network is running**, without losing the flits that are buffered.

Each input FIFO is switched into a short test mode at regular intervals. In test
mode the flit ports stall. A small controller then applies a *transparent* march
test to every location that holds a flit. The test reads the flit, writes its
complement, reads that back, writes the flit back and reads it again. It needs no
test pattern of its own and leaves the FIFO contents unchanged. Afterwards the
FIFO resumes as if nothing had happened, apart from the stall.

The scheme follows the transparent SOA-MATS++ on-line FIFO test described in the
article "Preventing Fault Tolerant in Fifo Buffer of Noc Router" (International
Journal of Research, vol. 3, no. 5, 2016). Below, "the original scheme" means that
article's proposal. All sizes, the flit handshake, the cycle timing and the fault
report are choices made for this RTL. They are listed in
[Where this RTL departs from or adds to the original scheme](#where-this-rtl-departs-from-or-adds-to-the-original-scheme).

## Block structure

```
router_input_stage           PORTS input channels of one router (default 5: N, E, S, W, local)
└── fifo_test_channel        one input channel
    ├── test_init_counter    asks for a test every TEST_PERIOD normal-mode cycles
    ├── tsoa_mats_ctrl       transparent SOA-MATS++ controller (temp, original, FSM)
    │   └── tsoa_comparator  XOR check of temp against original, gives the failing bits
    └── fifo_buffer          circular FIFO, normal/test mode, SRAM port multiplexer
        └── fifo_sram        DEPTH x DATA_W array, 1 write + 1 synchronous read port
fifo_test_pkg                controller state type, fault-counter width
```

| Parameter     | Default | Meaning                                                   |
|---------------|---------|-----------------------------------------------------------|
| `PORTS`       | 5       | input channels per router (mesh router: N, E, S, W, local) |
| `DATA_W`      | 4       | flit / SRAM word width in bits (the original scheme's example width) |
| `DEPTH`       | 8       | FIFO depth in flits                                       |
| `TEST_PERIOD` | 1024    | normal-mode cycles between two test sessions              |

Only `DATA_W = 4` comes from the original scheme, which uses a 4-bit word in its
worked example. The other defaults are this design's choices. All modules
are parameterised, and `DEPTH` need not be a power of two.

## The transparent march element

The classic word-oriented SOA-MATS++ test writes its own background `a` and its
complement `b`: `{⇕(w a); ⇑(r a, w b); ⇓(r b, w a); ⇕(r a)}`. That destroys the
memory contents, so it cannot run on a FIFO full of live flits. The transparent
version uses the stored word `x` itself as the background. It applies one element
to each location:

```
⇑ ( r x , w ~x , r ~x , w x , r x )
```

`tsoa_mats_ctrl` runs it with two registers, `temp` and `original`, one state per
memory operation, and one extra state for each read's data to return:

| state      | SRAM operation            | register update / check                          |
|------------|---------------------------|--------------------------------------------------|
| `T_RD_X`   | read location *j*         |                                                  |
| `T_CAP_X`  | –                         | `temp <= x`, `original <= x` (backup)            |
| `T_WR_NX`  | write `~temp`             |                                                  |
| `T_RD_NX`  | read location *j*         |                                                  |
| `T_CMP_NX` | –                         | `temp <= data`; `temp ^ original` must be all ones |
| `T_WR_X`   | write `original`          | (contents restored)                              |
| `T_RD_X2`  | read location *j*         |                                                  |
| `T_CMP_X`  | –                         | `temp <= data`; `temp ^ original` must be all zeros; *j* ← *j*+1 |

Worked example with a 4-bit word: location *j* holds `1010`, and its MSB cell is
stuck at 1. After `T_CAP_X`, `temp = original = 1010`. The controller writes
`0101`, but the cell stores `1101`. In `T_CMP_NX` the XOR is
`1101 ^ 1010 = 0111`. A 0 where a 1 is expected marks bit 3 as faulty, so the
syndrome is `1000`. A stuck-at-0 cell that holds a 1 in the flit shows up the
other way round. The inversion succeeds, but writing the original back fails, and
the all-zeros check in `T_CMP_X` catches it.

`tsoa_comparator` performs both checks. It XORs the two words and inverts the
result in the invert phase, so that a 1 always marks a failing bit. Running every
fault type at every cell and bit, with both stored values, shows that this element
detects:

* stuck-at-0 and stuck-at-1 cells;
* up and down transition faults (a cell that cannot rise or cannot fall);
* read-disturb faults (a read flips the cell and returns the flipped value);
* incorrect-read faults (a read returns the wrong value and the cell is intact).

A fault that is present only for a moment is caught only if it is present during
the session. The original scheme deliberately waits a long time between sessions.
That gives intermittent faults time to become permanent before they are looked
for.

### Session timing

* The `start` pulse from `test_init_counter` arrives in cycle 0.
* In cycle 1 (`T_SETUP`), `test_mode` is already high and the FIFO is frozen. The
  controller latches `head` (oldest flit) and `count` (number of flits).
* Each occupied location then takes 8 cycles, visited in increasing address order
  from `head` and wrapping at `DEPTH`.
* `T_FINISH` raises `done` for one cycle and returns the channel to normal mode.

`test_mode` therefore stays high for **8·n + 2 cycles**, where n is the number of
flits held. A session on an empty FIFO lasts 2 cycles, and on a full 8-deep FIFO
66 cycles. The next `start` comes exactly `TEST_PERIOD` normal-mode cycles after
the session ends.

### What is and is not tested

Only the locations that hold flits when the session starts are tested. The test
starts when the counter fires, whatever the FIFO holds at that moment. The original
scheme chose this on purpose. Waiting for a full FIFO would delay testing and let
faults accumulate, and testing empty locations would make the stall longer. The
occupied window moves round the circular buffer with the traffic, so over many
sessions every location is tested.

The flit that waits at the FIFO output is still in the SRAM (see below), so it is
tested too.

## FIFO buffer and the mode switch

`fifo_buffer` is a circular buffer over `fifo_sram`. Each pointer has one extra
wrap bit, so that a full FIFO and an empty one can be told apart. The SRAM read
is synchronous: the word appears one cycle after the read. The FIFO therefore
keeps three pointers:

* `wr_ptr`: the next location to write;
* `rd_ptr`: the oldest flit that has **not yet left**. Its location is still occupied.
* `fe_ptr`: the next location to prefetch into the SRAM's output register. That
  register drives `out_data`.

A flit leaves, and `rd_ptr` advances, only on `out_valid && out_ready`. With both
sides ready, one flit passes per cycle.

When `test_mode` rises, in the same cycle:

* `in_ready` and `out_valid` are forced low, so no flit moves in either direction.
* The prefetched output word is discarded, and `fe_ptr` rewinds to `rd_ptr`.
* The SRAM ports are handed to the controller's `t_*` signals.

The test reuses the SRAM read port and so overwrites the output register. The
rewind makes this harmless: after the session the head flit is read again from
the restored SRAM. Resuming costs one cycle. `head` and `count` tell the
controller which locations are occupied.

Mode switching needs no handshake with neighbours. The upstream link sees
`in_ready = 0` and holds its flit, and the router's switch sees `out_valid = 0`.
Incoming flits are held off for the whole session, as in the original scheme.
Letting them in during a test is mentioned there only as future work.

## Interfaces

All flit ports use valid/ready. A transfer happens on a rising clock edge where
both are high. The reset `rst_n` is synchronous and active low. It clears the
pointers, the controller and the fault report, but not the SRAM array.

`router_input_stage` brings out everything per port, as packed arrays indexed by
port:

| port                 | dir | width per port | meaning |
|----------------------|-----|----------------|---------|
| `test_en`            | in  | 1      | enable periodic testing of this channel |
| `in_valid/in_data/in_ready`    | in/in/out | 1/`DATA_W`/1 | flits from the upstream link |
| `out_valid/out_data/out_ready` | out/out/in | 1/`DATA_W`/1 | flits towards the router switch |
| `test_mode`          | out | 1      | channel is stalled for a test |
| `test_done`          | out | 1      | one-cycle pulse at the end of each session |
| `fault`              | out | 1      | sticky: a fault was found since reset |
| `fault_addr`         | out | log2(`DEPTH`) | location of the first fault |
| `fault_syndrome`     | out | `DATA_W` | failing bit positions of the first fault |
| `fault_count`        | out | 16     | failing compares since reset (saturating) |

Assertions in `fifo_buffer` check three rules: no write into a full FIFO, no flit
movement in test mode, and occupancy never above `DEPTH`. Assertions in
`tsoa_mats_ctrl` check that no `start` arrives in mid-session and that no cycle
both reads and writes.

## Cost of testing

Each session takes 8·n + 2 cycles out of every `TEST_PERIOD` + 8·n + 2. Under
saturating traffic the buffer is nearly full at each session (n ≈ 7–8 for
`DEPTH` = 8). The measured throughput of one channel is:

| `TEST_PERIOD` | flits / cycle |
|---------------|---------------|
| 32            | 0.35          |
| 256           | 0.82          |
| 1024          | 0.95          |
| no test       | 1.00          |

Testing rarely costs little bandwidth. Testing very often costs a lot. This agrees
with the original scheme's conclusion.

After synthesis (generic yosys cells, no technology mapping), one channel at the
defaults is about 110 word-level cells and 67 flip-flop bits, plus the 32-bit
SRAM. The test logic (`tsoa_mats_ctrl` and `test_init_counter`) accounts for 54
of those flip-flop bits. Most of them are the 16-bit fault counter, the 11-bit
period counter, and the `temp` and `original` registers.

## Where this RTL departs from or adds to the original scheme

* **Not included.**
  * The router itself: route computation, allocation and crossbar. Its flit
    signals are brought out.
  * The on-line test of the routing logic through unused header-flit fields. It is
    only mentioned in the original scheme.
  * Any fault-tolerance action taken after a fault is found. This RTL only reports
    the fault.
  * The self-similar traffic source used there for evaluation.
* **Order of operations.** All five operations are applied to one location before
  the next location. The march notation implies this, and the text describes the
  invert and restore phases per location.
* **Where the walk starts.** The original scheme starts its address pointer at 0.
  Here the pointer counts the tested locations from 0, starting at the oldest
  flit. In a circular FIFO the flits need not begin at address 0.
* **The second check.** The original scheme spells out only the all-ones check
  after inversion. The all-zeros check after the restoring read is this design's
  reading of the final `r x`.
* **This design's own choices.** Cycle timing (one operation per cycle, 8 cycles
  per location), the valid/ready handshake, the prefetch-and-rewind FIFO
  organisation, and the fault report (first address and syndrome kept, later
  failures counted).
* **Sizes.** Depth 8, period 1024 and 5 ports are assumptions. The original scheme
  gives no buffer depth, flit width (beyond its 4-bit example) or test period.
* **Behaviour on a fault.** The original word is written back even after a
  failure. A stuck cell can still corrupt the flit stored in it: detection, not
  correction.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_fifo_sram` | random reads and writes against a reference array; read data held without `re` |
| `tb_tsoa_comparator` | all 4-bit word pairs in both phases; the `1010`/`1101` example |
| `tb_test_init_counter` | exact request period, hold during a test and while disabled |
| `tb_fifo_buffer` | ordering and `in_ready` against a reference queue; 1 flit/cycle streaming; test-mode freeze and SRAM handover at random moments |
| `tb_tsoa_mats_ctrl` | operation sequence and order per location, wrap-around, 8·n+2 session length, restored contents, stuck-at faults in the invert and restore phases, no report for a fault outside the tested window |
| `tb_tsoa_fault_coverage` | each fault type (SA0, SA1, TF-up, TF-down, RDF, IRF) at every cell, bit and stored value is reported with the right address and bit |
| `tb_fifo_test_channel` | flits unchanged across ~60 sessions; period and session lengths; a stuck-at-1 cell is found |
| `tb_test_period_throughput` | throughput against test period (table above) |
| `tb_router_input_stage` | the whole stage at its default parameters. Five ports with bursty traffic; sessions on empty and full buffers and with a flit waiting at the output; stalled input flits; disabling the test of one port; every location tested; a stuck-at-1 cell found on one port while the others stay clean |

Faults are emulated in the testbenches, not in the RTL. Either a behavioural SRAM
model applies the fault, or the testbench rewrites one cell of the RTL array
every cycle to hold it stuck.

Each run is short: the end-to-end test at full size takes well under a second.
To simulate one with Verilator 5:

```
verilator --binary --timing --assert -y rtl rtl/fifo_test_pkg.sv \
          tb/tb_router_input_stage.sv --top-module tb_router_input_stage
./obj_dir/Vtb_router_input_stage
```

To run another testbench, substitute its name. `-y rtl` lets Verilator find each
module in the file of the same name. The package is named explicitly so that it
is read first. Every file builds without warnings.

## Changing it

* **Flit width.** `DATA_W` changes the width everywhere, including the
  comparator and the syndrome.
* **Depth.** `DEPTH` may be any value ≥ 1. The pointer arithmetic wraps
  explicitly, so it need not be a power of two.
* **Test frequency.** `TEST_PERIOD` sets how often each buffer is tested, which
  trades detection latency against bandwidth. `test_en` switches testing off per
  port at run time.
* **A real SRAM macro.** To use one, replace the array in `fifo_sram` and keep its
  port behaviour: one write port and one synchronous read port, read data held
  while no read is issued.
