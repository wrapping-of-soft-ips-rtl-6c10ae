# FIFO wrapper for black-box soft IP

A third-party soft IP core often comes with no flow control at all: it has a clock,
a reset, a data input and a data output, and it computes whenever it is clocked. To
use such a core in a system where producers and consumers run at their own pace, this
design wraps it, without touching its source, in a synchronous FIFO protocol:

* a producer pushes words into an **input FIFO** and watches `full`;
* a **control FSM** takes one word at a time, clocks the IP just long enough to
  process it, and stores the result;
* a consumer pops results from an **output FIFO** and watches `empty`.

The wrapper paces the IP by **gating its clock** (`clk_gen`). The core needs no enable
or handshake pins: when there is no input, or no room for the output, it simply gets
no clock edges and keeps its state. Bursts from the producer are absorbed by the input
FIFO, and a slow consumer by the output FIFO.

This is the architecture of the FIFO wrapper published for wrapping cores such as the
Free-6502 and Dragonfly 8-bit cores and the DLX 32-bit processor. That work generated
VHDL wrappers with a software generator. Here the same variability (FIFO size, data
widths) is expressed as SystemVerilog parameters.

## Structure

```
                 +---------------------------- fifo_wrapper ----------------------------+
 data_in ------->| u_in_fifo  --rd_data--> ip_data_in  ==> [ IP ] ==> ip_data_out -->    |
 push    ------->| (fifo_buffer)                  ip_clk <-- u_clk_gen (clk_gen)        |
 full    <-------|    pop ^  | empty                            ^ en                    |
                 |        |  v                                  |                       |
                 |      u_ctrl (wrapper_ctrl) ---- ip_clk_en ---+                       |
                 |        | push     ^ full                                             |
                 |        v          |                                                  |
                 |      u_out_fifo (fifo_buffer) <-- wr_data = ip_data_out              |
 data_out <------|        rd_data                                                       |
 pop      ------>|                                                                      |
 empty    <------|                                                                      |
                 +----------------------------------------------------------------------+
```

The IP itself is **not** inside `fifo_wrapper`. It is an external black box, and its
pins are the top's `ip_*` ports:

| port          | dir | to/from the IP                                           |
|---------------|-----|----------------------------------------------------------|
| `ip_clk`      | out | the IP's clock: `clk` with the unused cycles removed      |
| `ip_rst`      | out | the IP's reset: the wrapper's own `rst`                   |
| `ip_data_in`  | out | the IP's data input: the head of the input FIFO          |
| `ip_data_out` | in  | the IP's data output, written into the output FIFO       |

The wrapper and the IP share one clock and one reset. There is no second clock domain:
`ip_clk` is derived from `clk`.

| file                   | contents                                                  |
|------------------------|-----------------------------------------------------------|
| `rtl/wrapper_pkg.sv`   | FSM state type `ctrl_state_t`                             |
| `rtl/fifo_buffer.sv`   | synchronous FIFO, first-word fall-through, used twice     |
| `rtl/wrapper_ctrl.sv`  | control FSM                                               |
| `rtl/clk_gen.sv`       | glitch-free clock gate for the IP clock                   |
| `rtl/fifo_wrapper.sv`  | top: wires the four parts together                        |

## Parameters of `fifo_wrapper`

| parameter   | default | meaning                                                           |
|-------------|---------|-------------------------------------------------------------------|
| `DEPTH`     | 4       | words in each FIFO. 4 is the size the wrapper was evaluated with.  |
| `DIN_W`     | 8       | width of `data_in` / `ip_data_in`. 8 suits 8-bit cores; use 32 for a 32-bit core. |
| `DOUT_W`    | 8       | width of `ip_data_out` / `data_out`. It may differ from `DIN_W`.   |
| `IP_CYCLES` | 1       | IP clock pulses the core needs to turn one input word into its output |

`IP_CYCLES` is this design's addition. The wrapper must know how many clocks the black
box takes per word, and the source architecture does not say.

## How one word moves through the wrapper

The control FSM (`wrapper_ctrl`) has three states:

1. **IDLE**: waits until the input FIFO is not empty **and** the output FIFO is not
   full. Because the input FIFO is first-word fall-through, the waiting word is
   already on `ip_data_in`.
2. **RUN**, for `IP_CYCLES` cycles: `ip_clk_en` is high. `clk_gen` turns this into
   exactly `IP_CYCLES` rising edges of `ip_clk`. The operand is held steady throughout.
3. **XFER**, one cycle: the IP's output is pushed into the output FIFO, and the
   consumed word is popped from the input FIFO, both on the same edge.

A word is started only when its result has room, so a result is never dropped and
the FSM never has to hold one. A full output FIFO therefore **stalls the IP**: it
receives no clock edges at all.

### Timing

* Throughput is one word per `IP_CYCLES + 2` clock cycles, measured from the IP side.
  The FSM spends one cycle in IDLE, `IP_CYCLES` in RUN and one in XFER.
* Latency: a word pushed into an empty wrapper at rising edge *t* makes `empty` fall
  right after edge *t + IP_CYCLES + 2*. With the defaults this is 3 edges.
* Capacity: with the consumer stopped, the wrapper holds `2 * DEPTH` words: a full
  input FIFO plus a full output FIFO. The IP itself holds nothing between words.
* FIFO rules: `push` while `full` is ignored (the word is lost), and `pop` while
  `empty` is ignored. Push and pop may happen in the same cycle. `data_out` is valid
  only while `empty` is low. It shows the oldest result, and `pop` removes it.
* Reset is synchronous and active high. While `rst` is high, `ip_clk` runs, so a core
  with a synchronous reset is reset too.

### The clock gate

The subtle part of the design is `clk_gen`. The enable comes from rising-edge logic,
so it changes right after a rising edge, while `clk` is high. ANDing it straight into
the clock would cut a high phase short and make a glitch. Instead, the enable is
sampled on the **falling** edge into `en_q`, and `ip_clk = clk & en_q`. `en_q` only
changes while `clk` is low, so `ip_clk` only ever carries whole high phases of `clk`.
If `en` is set after edge *t*, `ip_clk` rises with `clk` at edge *t+1*. This is the
usual latch-based clock gate, with a falling-edge flop in place of the latch.

Consequences for anyone who integrates the wrapper:

* `ip_clk` is a generated clock. Rising edges of `ip_clk` coincide with rising edges
  of `clk`, so define it as a generated clock in timing constraints. For an ASIC
  flow, the gate can be replaced by the library's integrated clock-gating cell.
* The input FIFO head changes only at XFER edges, and `ip_clk` never pulses at those
  edges. So the IP never sees its operand change at the edge it samples on.
* The output FIFO samples `ip_data_out` one edge after the IP's last pulse. This leaves
  a full cycle of settling time.

## Verification

Each testbench is self-checking. Each prints `TB_RESULT checks=N failures=M` and has
a watchdog.

| testbench              | what it shows                                                     |
|------------------------|-------------------------------------------------------------------|
| `tb/tb_fifo_buffer.sv` | random traffic against a queue model; full/empty/count/data every cycle; pushes while full, pops while empty, simultaneous push/pop |
| `tb/tb_clk_gen.sv`     | one `ip_clk` pulse per enabled cycle at the following edge, pulse count, no glitch or partial pulse |
| `tb/tb_wrapper_ctrl.sv`| FSM against a cycle-level reference model for `IP_CYCLES` 1 and 3, with modelled FIFOs; clock during reset; rate of one word per `IP_CYCLES + 2` cycles |
| `tb/tb_fifo_wrapper.sv`| end to end, see below                                            |
| `tb/tb_fifo_wrapper_full.sv` | the same end-to-end sequence on one wrapper with no parameter overridden |

`tb_fifo_wrapper` runs two wrappers side by side. `dut0` uses the default parameters
(8-bit data, 4-word FIFOs, 1 IP clock per word). `dut1` uses 32-bit data, as for a
32-bit core, and an IP that needs 3 clocks per word. Each wrapper is driven by
`tb/wrapper_env.sv`, and each wraps `tb/ip_model.sv`. `ip_model` is a behavioural
stand-in for the IP: a `LAT`-stage register pipeline computing `x*3 + 0x5A`. Its
output is correct only if it got exactly the right number of clock pulses with a
steady operand. The environment checks:

* reset through the wrapper;
* the single-word latency;
* a burst that fills both FIFOs, refuses further pushes and stalls the IP;
* random traffic with changing producer and consumer rates;
* the order and value of every result;
* exactly `IP_CYCLES` IP clock pulses per word.

It also counts how often each mechanism happens, and fails if any never does:

* input FIFO full;
* a push refused;
* the IP stalled by a full output FIFO;
* the FSM waiting on an empty input FIFO;
* the consumer finding no result.

The environment reads two internal nets of the wrapper (`in_empty`, `out_full`) by
hierarchical reference, to count stalls.

`wrapper_ctrl` also carries assertions that it never pops an empty input FIFO or
pushes a full output FIFO. `fifo_buffer` carries one that the occupancy stays within
`0..DEPTH`.

### Running a test with Verilator

From the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_fifo_wrapper \
    -y rtl -y tb +libext+.sv rtl/wrapper_pkg.sv tb/tb_fifo_wrapper.sv -o sim
./obj_dir/sim
```

Replace `tb_fifo_wrapper` with any other testbench name. Lint a module with
`verilator --lint-only -Wall -y rtl +libext+.sv rtl/wrapper_pkg.sv rtl/<module>.sv`.
Every test runs in seconds.

## Wrapping a real core

Instantiate the core next to `fifo_wrapper` and connect it as follows:

* its clock to `ip_clk`;
* its reset to `ip_rst`, inverted if the core's reset is active low;
* its data input to `ip_data_in`;
* its data output to `ip_data_out`.

Set `DIN_W`, `DOUT_W` and `IP_CYCLES` to match the core. The scheme assumes the core
produces one output word for each input word after a fixed number of clocks. A core
whose output takes a variable number of cycles, or that needs a different number of
inputs per output, needs a different FSM.

## Where this departs from, or goes beyond, the source architecture

* **Taken from the source:**
  * the five parts (input FIFO, IP, clock generator, control logic, output FIFO) and
    how they connect;
  * the port names Data_in/Push/Full and Data_out/Pop/Empty;
  * a single shared clock;
  * a FIFO size of 4;
  * 8-bit data for the 8-bit cores, and 32 bits for the 32-bit core.
* **Chosen here, because the source does not specify it:**
  * the FSM states and the one-word-at-a-time pacing;
  * `IP_CYCLES`;
  * pacing the IP by clock gating, and the falling-edge gate;
  * the first-word fall-through FIFOs with pointer-and-counter organisation;
  * dropping a push while full;
  * the synchronous active-high reset, with the IP clock running during reset;
  * separate input and output widths.
* **Not included:**
  * the wrapped cores themselves, which are third-party and outside this RTL;
  * the software generator that produced wrappers from a parsed VHDL entity.
* **Not reproduced:** the published area and power figures (Synopsys, 0.35 µm): wrapped
  cores 22 to 47 % larger and 18 to 37 % more power-hungry than the bare cores.
  No synthesis to a cell library has been done here.
* **Throughput** (one word per `IP_CYCLES + 2` cycles) is a property of this
  implementation. The source gives no rate or latency. An FSM that starts the next
  word during XFER would reach one word per `IP_CYCLES + 1` cycles.
