# Hardware intrusion detection for a packet-parsing network processor

Radio stacks on small IoT devices (LoRaWAN, Bluetooth LE) have shipped with
packet parsers that copy a received payload into a fixed-size buffer without
checking its length. A crafted packet then overflows a buffer on the stack or
on the heap. This design detects such a packet **while the network processor
parses it**. It does not inspect the packet. It watches how the processor
behaves during parsing.

The idea is simple. The parser runs the same code for every packet, so its
hardware event counts stay in a narrow band for well-formed traffic. Writing
past a buffer changes that code path. It adds load-use stalls and taken
branches. Two performance counters are cleared at the start of each packet
and frozen at the end. A small decision tree then classes the packet as
**legitimate**, **heap overflow** or **stack overflow**. An attack raises an
alert, which the core takes as an exception.

The RTL has three parts around a RISC-V core (the core is not included):

| Module          | Role |
|-----------------|------|
| `hpm_counters`  | 64-bit performance counters: `mcycle`, `minstret` and `NUM_MHPMCOUNTERS` programmable event counters, with RISC-V CSRs |
| `hpm_tracer`    | per-packet state machine: clears the counters, opens and closes the counting window, reads the counters, starts the detector, raises the alert |
| `dt_detector`   | two-level decision tree on LD_STALL and BRANCH_TAKEN, two clock cycles |
| `hids_top`      | the three wired together; the core's side is brought out as ports |
| `hids_pkg`      | event numbering, class encoding, CSR addresses |

## The per-packet sequence

The firmware brackets the parsing of each packet with three one-cycle
strobes. Each is driven by the core, for example from a CSR write in the
receive path.

```
 firmware:   HPM Reset    HPM Enable    ...parse packet...    HPM Stop
 hardware:   clear ctrs   open window   events accumulate     close window
                                                              read LD_STALL ctr
                                                              read BRANCH_TAKEN ctr
                                                              start detector
                                                              (2 cycles)
                                                              result_valid_o, alert_o
```

Tracer states: `IDLE -> MONITOR -> READ_LD -> READ_BT -> DETECT -> WAIT_DET -> IDLE`.

Timing, counted in rising clock edges:

- Events count in every cycle in which the tracer is in `MONITOR`. This
  includes the cycle in which `hpm_stop_i` is sampled, and excludes the cycle
  in which `hpm_enable_i` is sampled.
- `result_valid_o` is high for one cycle, five edges after the edge that
  sampled `hpm_stop_i`. Two edges go to reading the two counters, one edge
  starts the detector, and two edges go to the detector.
  `class_o` holds the result until the next packet.
- `alert_o` is a level. It rises with `result_valid_o` when the class is
  not legitimate. It stays high until the next `hpm_reset_i`.
- `busy_o` is high from the stop until the result.
- While the tracer is busy, it ignores `hpm_enable_i`. In `IDLE` it ignores
  `hpm_stop_i`. If `hpm_reset_i` arrives during `MONITOR`, the packet is
  abandoned and no result is produced.

The two values read are also held on `trace_ld_stall_o` and
`trace_branch_taken_o`. A debug logger can record them per packet.

## The decision tree

```
LD_STALL < 14 ? ── yes ──> legitimate
      │ no
BRANCH_TAKEN < 65.5 ? ── yes ──> heap overflow
      │ no
      └──> stack overflow
```

The tree was trained offline on counter profiles of simulated parsing runs.
It used all eleven available events, and the classifier kept only these two.
The counts measured in training were:

| class           | LD_STALL | BRANCH_TAKEN |
|-----------------|----------|--------------|
| legitimate      | 8 – 13   | 37 – 42      |
| heap overflow   | 16 – 26  | 58 – 65      |
| stack overflow  | 16 – 26  | 66 – 76      |

LD_STALL separates legitimate traffic from attacks. The heap and stack
overflows overlap on LD_STALL, so BRANCH_TAKEN is needed to tell them apart.

The threshold 65.5 has a fractional part. Both thresholds are therefore held
in half-counts as the parameters `K1_HALF = 28` and `K2_HALF = 131`, and each
count is doubled before the comparison. The trained numbers are kept exactly.
For integer counts, the BRANCH_TAKEN test is the same as `BRANCH_TAKEN <= 65`.
Stage 1 of `dt_detector` registers the two comparisons. Stage 2 registers the
leaf.

The thresholds belong to one trained model, and they only hold for the
firmware that model was trained on. If the parser code or compiler changes,
the counts change too. Retrain, then set `K1_HALF` and `K2_HALF`.

## Performance counters

`hpm_counters` follows the RISC-V machine-mode counter model:

| counter number | CSR (low / high)  | counts |
|----------------|-------------------|--------|
| 0              | `0xB00` / `0xB80` | every cycle (`mcycle`) |
| 2              | `0xB02` / `0xB82` | retired instructions (`minstret`) |
| 3, 4, ...      | `0xB03` / `0xB83`, ... | cycles in which any event enabled in `mhpmevent3`, `mhpmevent4`, ... is high |

- Selectors: `mhpmevent3` is at `0x323`, `mhpmevent4` at `0x324`, and so on.
  `mcountinhibit` is at `0x320`. Setting bit *n* of `mcountinhibit` stops
  counter *n*.
- Unimplemented counters read as zero and ignore writes.
- Event lines (`events_i`) are per-cycle strobes from the core. Bit *i* of
  `events_i` and of a selector is event *i*:

  0 CYCLES, 1 INSTR, 2 LD_STALL, 3 JMP_STALL, 4 IMISS, 5 LD, 6 ST, 7 JUMP,
  8 BRANCH, 9 BRANCH_TAKEN, 10 COMP_INSTR.

  IMISS is high in every cycle spent waiting for a fetch.
- Programmable counters count only while the tracer's window is open and
  their inhibit bit is clear. Firmware can therefore still switch a counter
  off through `mcountinhibit`.
- If several sources act in the same cycle, a tracer clear wins over a CSR
  write, and a CSR write wins over an increment.
- After reset, `mhpmevent3` selects LD_STALL and `mhpmevent4` selects
  BRANCH_TAKEN. The tracer reads counter 3 as LD_STALL and counter 4 as
  BRANCH_TAKEN. If firmware reprograms the selectors, the detector sees
  whatever those counters then hold.

With the default `NUM_MHPMCOUNTERS = 2`, counters 3 and 4 exist. `hids_top`
rejects a value below 2 at elaboration.

## Ports of `hids_top`

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk_i`, `rst_ni` | in | 1 | clock; asynchronous active-low reset |
| `events_i` | in | 11 | event strobes from the core |
| `csr_we_i`, `csr_addr_i`, `csr_wdata_i` | in | 1, 12, 32 | CSR write from the core |
| `csr_rdata_o`, `csr_hit_o` | out | 32, 1 | combinational CSR read data; address belongs to this block |
| `hpm_reset_i`, `hpm_enable_i`, `hpm_stop_i` | in | 1 | firmware tracer controls |
| `busy_o`, `result_valid_o` | out | 1 | tracer status |
| `class_o` | out | 2 | 0 legitimate, 1 heap overflow, 2 stack overflow |
| `alert_o` | out | 1 | exception request to the core |
| `trace_ld_stall_o`, `trace_branch_taken_o` | out | `CNT_W` | values of the last packet |

Parameters: `NUM_MHPMCOUNTERS = 2` and `CNT_W = 64`.

## Where this RTL departs from, or adds to, the reference design

The reference implementation ran on an Artix-7 FPGA at about 65 MHz. It used
a CV32E41P core, which provides the counters, and a LiteX SoC. The following
points are choices made for this RTL:

- **Counters.** Here the counters are a separate module, with their own CSR
  port. In the reference they sit inside the core. The CSR port in this RTL
  decodes only the counter CSRs.
- **Firmware controls.** The three controls are plain strobes. How firmware
  produces them is left to the integration.
- **Counting window and inhibit.** The tracer's window is ANDed with
  `mcountinhibit`.
- **Reset values.** All counters reset to zero, and `mcountinhibit` resets to
  zero. The selectors are preset to LD_STALL and BRANCH_TAKEN.
- **Alert.** The alert is sticky and cleared by the next HPM Reset.
- **Counter read.** The counters are read one per cycle over a shared read
  port.
- **Latency.** The result takes five edges after the stop.
- **Detector pipeline.** The split of the two detector cycles into a compare
  stage and a leaf stage is a choice of this RTL.

The core, the bus, RAM, UART, debug logger and the LoRa radio are not part of
this RTL.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`.

- `tb_dt_detector` runs every LD_STALL value from 0 to 40 against every
  BRANCH_TAKEN value from 0 to 100, then random 64-bit values. Starts come
  back to back and spaced. Every result is checked against a reference tree
  and against the two-cycle latency.
- `tb_hpm_counters` uses random events, CSR writes to low and high halves,
  to selectors and to inhibit bits, and random tracer clears and windows. A
  cycle-by-cycle reference model checks every read.
- `tb_hpm_tracer` uses modelled counters and a modelled detector. It checks
  the window length, the read order, the values handed over, the
  five-edge latency, the alert set and clear, and that ignored controls are
  ignored.
- `tb_hids_top` runs the whole design at default parameters. It sends over
  3,000 packets drawn from the class profiles above, plus packets exactly on
  both thresholds. It also covers a counter stopped through `mcountinhibit`,
  swapped selectors, events outside the window, and a packet abandoned by
  HPM Reset. Each packet's class, alert, traced values, CSR read-back and
  latency are checked, and the test fails if any of these mechanisms never
  occurred.

To simulate, with Verilator 5:

```
verilator --binary --timing --assert rtl/hids_pkg.sv rtl/hpm_counters.sv \
  rtl/hpm_tracer.sv rtl/dt_detector.sv rtl/hids_top.sv tb/tb_hids_top.sv \
  --top-module tb_hids_top
./obj_dir/Vtb_hids_top
```

For a unit test, use its module and `rtl/hids_pkg.sv` in the same way. The
end-to-end run takes well under a second.

What the tests cannot show is detection accuracy on real traffic. That
depends on the firmware being the one the thresholds were trained on. The
reference implementation reported 99.98 % accuracy over about 389,000
received LoRa packets. Its errors came from the closest case: a 10-byte
legitimate packet against a 13-byte attack.
