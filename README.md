# Generic run-time monitors for FSL-based FPGA designs

An FPGA design built from IP cores usually has no way to notice, at run time,
that one of its cores is producing implausible data: a sensor that has been
tampered with, a core hit by a fault, a value drifting out of its normal
range. This RTL adds that ability without redesigning the cores. Any core
that talks over Fast Simplex Links (FSL, a simple one-way FIFO channel) can be
put inside a **Monitoring Module Wrapper (MMW)**. The wrapper watches the
core's ports, judges every output word with a set of small configurable
**monitoring functions**, and can replace a bad word by a safe default or
report it. All wrappers report to one **Central Monitoring Core (CMC)**. The
CMC sees the whole system, runs slower functions that need history (here, the
detection of a turning trend), keeps a log, and forwards everything to an
optional processor, which may send corrections back to any wrapper.

The monitoring traffic has its own links. The design's own data paths are
unchanged, except for the fixed delay a wrapper adds to the port it monitors.

The example system is a temperature sensor station. Three thermistor readings
are converted to degrees Celsius by three wrapped *normalizing modules*. The
temperatures go on to a processor that displays them, and all three wrappers
are connected to one CMC.

```
 sensor 0 --> [ MMW( normalizing module ) ] --> temperature link 0 --> processor
 sensor 1 --> [ MMW( normalizing module ) ] --> temperature link 1 --> processor
 sensor 2 --> [ MMW( normalizing module ) ] --> temperature link 2 --> processor
                    |  ^   (one FSL link each way per wrapper)
                    v  |
              [ CMC: switch, tendency function, log RAM ] <==> processor links
```

## Files

| file | contents |
|---|---|
| `rtl/mon_pkg.sv` | shared types: FSL word, monitoring message, function descriptor, log entry |
| `rtl/fsl_fifo.sv` | one FSL link: a FIFO of adjustable depth, on one clock or across two |
| `rtl/normalizing_module.sv` | example core: resistance to temperature |
| `rtl/mmw_input_switch.sv` | wrapper entry: pairs each output with its input |
| `rtl/mmw_value_range.sv`, `rtl/mmw_threshold.sv` | the two monitoring functions of the repository |
| `rtl/mmw_reactor.sv` | wrapper reaction: priority, alteration, reports, corrections |
| `rtl/mmw.sv` | the generic wrapper |
| `rtl/normalizing_module_monitored.sv` | core plus wrapper, as one drop-in replacement |
| `rtl/cmc_switch.sv`, `rtl/cmc_tendency.sv`, `rtl/cmc_log_ram.sv`, `rtl/cmc.sv` | the central monitoring core |
| `rtl/sensor_station_top.sv` | the sensor station (top) |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Links and messages

Every connection is an FSL link (`fsl_fifo`). It carries a 33-bit word: 32
data bits plus a control bit (`mon_pkg::fsl_word_t`). The master writes
(`m_write`) only while `m_full` is low. The slave sees the oldest word while
`s_exists` is high and takes it with `s_read`. One word can move in and one
out in every cycle. Assertions flag a write to a full link and a read from an
empty one. Links are 16 words deep by default.

A link can also join two clock regions. With `ASYNC = 1` the master side
runs on `clk` and the slave side on `s_clk`. The two pointers are Gray-coded
and each crosses to the other side through two flip-flops. `DEPTH` must then
be a power of two, and reset must be held for a few cycles of both clocks.
The station runs on one clock and uses `ASYNC = 0`, where `s_clk` is unused.

A wrapper sends the CMC 32-bit messages (`mon_pkg::mon_msg_t`):

| bits | field | value |
|---|---|---|
| 31:28 | `kind` | 1 = input value, 2 = output value, 3 = error |
| 27:24 | `src` | port number (0 = input, 1 = output); for errors, the winning function's slot |
| 23:16 | `aux` | sample sequence number; for errors, the mask of all functions that fired |
| 15:0 | `value` | the monitored value, signed (the low 16 bits of the port's word) |

A correction sent from the CMC to a wrapper is a plain FSL word. Its data
replaces the data of an output word.

## The Monitoring Module Wrapper

The wrapper is the hardest part to follow. It sits *in* the path of the
output it monitors, and it has to line that output up with the input it came
from.

```
 s_* ----+--------------------------> core --core_m_*--+
         | (observed)                                  |
         v                                             v
   [ input switch: input buffer ] ------ pairs ---> sample
                                                       |
           +-------------------+-----------------------+
           v                   v                       v
   [ monitoring fn 0 ] [ monitoring fn 1 ] ... (combinational, in parallel)
           +-------------------+-----------------------+
                               v
                          [ reactor ] <--- comm_s_* (corrections from the CMC)
                           |       \----> comm_m_* (values, errors to the CMC)
                           v
                    [ output stage ] --m_*--> environment
```

**Input switch** (`mmw_input_switch`). The wrapper copies each input word the
core reads into a buffer. When the core writes an output word, the switch takes
the oldest buffered input and hands the two on together as one *sample*. This
works because an FSL core keeps its words in order. The designer gives the
core's processing time (`PROC_TIME`). The buffer holds `PROC_TIME + 3` words,
which covers every input a one-word-per-cycle core can hold inside itself. If
it fills anyway, the wrapper holds off the core's next read (`in_room`), so no
pairing is ever lost. With `MON_IN = 0` only the output is monitored and no
buffer is built.

**Monitoring functions** (`mmw_value_range`, `mmw_threshold`). Each one is
combinational and judges the output value of the sample in the same cycle.
Along with its verdict (`hit`), each function states its reaction. `alter`
means: replace the word by its default value `DFLT`. `report` means: send an
error message. The set of functions is a parameter, `FN_CFG`, an array of
`fn_cfg_t` descriptors. Each descriptor names a function kind, its generics,
and its reaction. The sensor station uses:

| slot | function | generics | reaction |
|---|---|---|---|
| 0 | value range | -20 .. 40 | report |
| 1 | threshold | 50 (fires at 50 and above) | replace by 50, report |

**Reactor** (`mmw_reactor`). If several functions fire, the one named by
`PRIO_FN` wins; otherwise the lowest slot wins. Slot 1 is prioritized by
default. Only the winner's reaction is carried out. Its error message still
carries the mask of all functions that fired.

The reactor reads corrections from the CMC as soon as they arrive, so the
CMC's writes never wait. It keeps the newest correction. The correction is
used once, on the next output word that no local function alters. A local
alteration therefore always beats a central correction.

For each sample the reactor queues the output word for the output stage and
up to three messages for the CMC: input value, output value, and error, in
that order. The messages go out one per cycle. The next sample is taken once
the output word has left and at most one message is still waiting. So a
wrapper runs at one sample per cycle with one message per sample, and at one
sample per *n* cycles with *n* messages. The station sends input and output
values (`SEND_IN`, `SEND_OUT`), so a wrapper there runs at one sample per two
cycles, or three when an error is reported. A full link to the CMC stalls the
wrapper, and with it the core, so monitored data is never dropped.

**Output stage.** A 2-word FSL buffer that drives the wrapper's original
output link.

**Delay.** From the core's output write to the wrapper's output write is 2
cycles: the reactor register plus the output buffer. In the station, a raw
reading becomes a temperature on the output link `LATENCY + 2` cycles after it
is read.

**Forked output (`FORK_OUT = 1`).** The delay can be removed. The core's
word then goes out in the same cycle that it enters the input switch. It is
written only when both the output link and the input switch can take it. The
functions still judge it, and values and errors still reach the CMC. The
word itself can no longer be altered or corrected, and corrections are read
and discarded. The station uses the default, `FORK_OUT = 0`.

`normalizing_module_monitored` is what replaces a core chosen for
monitoring. It has the core's original ports (`s_*`, `m_*`) plus the two CMC
links (`comm_m_*`, `comm_s_*`).

## The Central Monitoring Core

`cmc` is built from four parts.

* **Communication switch** (`cmc_switch`). It takes one message per cycle
  from the wrapper links, round robin. It skips a wrapper whose processor link
  is full, so one slow processor port holds back only its own wrapper.
  * Each message goes to that wrapper's processor link if the wrapper is
    bound to the processor (`MB_BIND`).
  * Output values of wrappers bound in `TEND_BIND` also go to the tendency
    function, and to the log as `TEND_LOG` says. `LOG_ALL` logs every value
    (the default). `LOG_EVENT` logs only the values on which the function
    fires. `LOG_NONE` logs nothing.
  * An error message sets that wrapper's bit in `err_seen`.
  * Corrections written by the processor for wrapper *g* go straight to
    wrapper *g*'s correction link. If that link is full, the correction is
    dropped and counted in `drops`. The processor is never blocked.
* **Tendency function** (`cmc_tendency`). For each wrapper it keeps the last
  value, the current direction, and the length of the current run.
  * A step against the direction, after at least `MIN_RUN` (3) steps with
    it, raises `tend_event` for one cycle. `tend_src` and `tend_falling` say
    which wrapper turned and in which direction.
  * Equal values are ignored.
  * `tend_falling_now` shows each wrapper's current direction.
* **Log RAM** (`cmc_log_ram`). A circular buffer of 1024 entries, each 36
  bits: the wrapper index and the message. That is one 36-kbit block RAM. The
  processor reads it through `log_rd_*` and gets the data one cycle later.
  `log_wr_ptr` is the next address to be written, and `log_wrapped` says that
  the buffer has been filled once.
* **Processor links.** Each bound wrapper gets one 16-word FSL link towards
  the processor (`mb_*`) and one back (`mbc_*`). The processor itself is not
  part of this RTL.

## The example core

`normalizing_module` turns a resistance in ohms into whole degrees Celsius.
It assumes a 10 kΩ NTC thermistor with B = 3950 K:

    R(T) = 10000 · exp(3950 · (1/(T + 273.15) − 1/298.15))

The curve is sampled every 10 °C from −30 to 80 °C and interpolated linearly.
Each segment stores its slope as `K_i = round(10·65536 / (R_i − R_(i+1)))`,
which gives:

    T = T_i + floor((R_i − R) · K_i / 65536)

The result is within 2 °C of the exact curve. Readings past the ends give −30
(open sensor) or 80 (shorted sensor). The module has a fixed processing time
of `LATENCY` (2) cycles and stalls while its output link is full.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `sensor_station_top` | `N_SENSORS` | 3 | sensors, wrappers and processor ports |
| | `NORM_LATENCY` | 2 | processing time of the normalizing module |
| | `LINK_DEPTH` | 16 | depth of every FSL link |
| | `LOG_DEPTH` | 1024 | log entries |
| `mmw` | `FN_CFG`, `N_FN`, `PRIO_FN` | see above | monitoring functions |
| | `MON_IN`, `PROC_TIME` | 1, 2 | input monitoring and core processing time |
| | `SEND_IN`, `SEND_OUT` | 1, 1 | which values go to the CMC |
| | `OUT_DEPTH`, `FORK_OUT` | 2, 0 | output buffer depth; forked zero-delay output |
| `fsl_fifo` | `DEPTH`, `ASYNC` | 16, 0 | words held; two-clock form |
| `cmc` | `MB_BIND`, `TEND_BIND` | all | wrappers bound to the processor / tendency function |
| | `TEND_LOG`, `TEND_MIN_RUN` | `LOG_ALL`, 3 | logging mode, run length for a turn |

The message format limits a CMC to 16 wrappers (4-bit index) and a wrapper to
8 function slots.

## Where this RTL departs from, or fills in, the framework description

The framework describes roles and structure. Everything numeric or bit-level
below was chosen for this RTL.

* **From the description:**
  * the wrapper's structure: input switch, parallel monitoring functions,
    reactor, output stage;
  * an input buffered until its output appears, sized from a stated
    processing time;
  * combinational monitoring functions chosen per wrapper, with generics;
  * a prioritized function, replacement by a default value, or an error
    message to the central core;
  * corrections from the central core that never block it;
  * a central core made of a switch, central functions, a log in block RAM
    and an optional processor, with the choice per function of whether and
    when to log;
  * the example configuration: range −20..40, threshold 50, a tendency
    function, three sensors, one processor;
  * links that may cross clock regions;
  * a forked, zero-delay output that can no longer be corrected.
* **Chosen here:**
  * all widths and the message format;
  * pairing by order;
  * the reactions of each function;
  * one-shot corrections that yield to local alterations;
  * round robin in the switch;
  * dropping corrections that meet a full link;
  * the tendency rule (three steps);
  * log size and organisation;
  * link depths;
  * the thermistor curve;
  * all latencies;
  * synchronous active-high reset.
* **Not built:**
  * A wrapper monitors one output port and, optionally, the one input port
    it comes from (`MON_IN`). Several monitored outputs in one wrapper are
    not supported.
  * Central functions in this RTL do not send corrections themselves. Only
    the processor does, through the switch. The description gives no rule for
    what the tendency function should correct.
  * The processor, sensors and display are outside the RTL. Their links are
    ports of the top.
  * The tool flow that generates wrappers from a configuration script is
    replaced by the parameters above.

**Size.** A coarse synthesis of `mmw` with the two default functions gives
92 flip-flops, plus 339 bits of FIFO memory in the input and output buffers.
For comparison, the framework's authors quote 106 LUTs and 208 registers per
wrapper on a Virtex-5, and 86 LUTs and 69 registers for a CMC with no
functions. The full `cmc` here includes the tendency function, the
1024 × 36 log and six 16-word processor links.

## Verification

Each module has a self-checking testbench in `tb/` (`tb_<module>.sv`). Each
one predicts every output from its own model of the rules, has a watchdog,
and ends with a line `TB_RESULT checks=N failures=M`.

* The converter's tests rebuild the thermistor curve from the B-parameter
  equation with real arithmetic, rather than copying the table.
* The latencies above are checked cycle by cycle.
* The wrapper's rate is checked: one sample per two cycles with two messages
  per sample.
* A wrapper that monitors only its output (`MON_IN = 0`) is checked for
  its words and messages under back-pressure.
* The forked wrapper is checked for zero added delay and for unaltered words
  in order under back-pressure.
* The two-clock link is checked with clocks of 10 ns and 7 ns: it is full
  after `DEPTH` words, and a 3000-word stream arrives whole and in order.

`tb_sensor_station_top` runs the station at its default size.

* It sends 420 readings per sensor, following slow temperature swings. Two
  sensors pass 50 °C, and all three leave the −20..40 range.
* The processor reads with random pauses. Every temperature is checked in
  order.
* Then a processor correction is sent to each wrapper. Each must change
  exactly the next reading.
* The newest log entries are read back and compared.
* It counts each mechanism and fails if any never happens: sensor stall,
  alteration, error report, correction, tendency turn, log wrap, error status
  of every wrapper.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb +libext+.sv \
    rtl/mon_pkg.sv tb/tb_sensor_station_top.sv --top-module tb_sensor_station_top
./obj_dir/Vtb_sensor_station_top
```

Replace the testbench name to run another one. Every testbench finishes in
seconds.
