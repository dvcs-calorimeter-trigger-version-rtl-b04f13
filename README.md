# DVCS calorimeter trigger box: read-out logic

The DVCS calorimeter has 208 channels. Its trigger box sees every channel
twice. The analog signal is copied on to the sampling electronics. A charge
integrated in a short window after each level-1 trigger is digitised and read
by FPGAs on the box's mother board. This RTL is the digital path of that
second copy:

- an **integrator gate** whose delay after the trigger and whose width are
  programmable, so the window can be placed where the calorimeter pulse
  arrives;
- the read-out of 52 four-channel **daughter boards**, each of which puts its
  four 12-bit ADCs on one shared bus, selected by four output-enable lines;
- the capture of every channel's value **at the end of the gate**;
- **VME access** for the acquisition CPU: A24 D32 single cycles and A24 block
  transfers (BLT), to set the gate and to read the 208 values in calorimeter
  order.

The trigger decision itself is not part of this RTL. That is the sums the data
FPGAs pass from one to the next and the trigger outputs (see *Not included*).

## Structure

```
              VME crate                      trigger box (mother board)
 CPU ── VME ── vme_ctrl ══ local bus ══ ctrl_fpga ──── gate ─────────────► all daughter boards
               (A24 D32/BLT slave)      ├ gate_gen         int_addr, int_rd[f]
                                        └ cal_chan_map ◄── int_rdata[f] ─┐
                                                                         │
                          data_fpga #0 (20 boards, ch 0-79)   ◄── adc_bus, ──► oe[0]
                          data_fpga #1 (16 boards, ch 80-143) ◄── adc_bus, ──► oe[1]
                          data_fpga #2 (16 boards, ch 144-207)◄── adc_bus, ──► oe[2]
                            └ adc_mux_reader (one per data FPGA)
```

| module | role |
|---|---|
| `dvcs_trigger_box` | top: wires the four FPGAs together; all pins are plain signals |
| `vme_ctrl` | VME slave. It turns each VME data cycle into one local-bus request |
| `ctrl_fpga` | gate registers and counters. It finds a channel on its data FPGA |
| `gate_gen` | trigger synchroniser; delay/width counter; drops triggers while busy |
| `cal_chan_map` | channel number → FPGA, local index, mezzanine column, H/L board, ADC |
| `data_fpga` | one data FPGA: reader plus local-index read port |
| `adc_mux_reader` | OE scan of the shared ADC buses and capture at the end of the gate |
| `dvcs_trig_pkg` | sizes, `adc_t`, the local-bus request struct, the register map |

## Channel numbering

This part needs the most care when the box is cabled or the RTL is changed.

The daughter boards sit in 26 mezzanine columns. Each column has an upper
board, **H**, and a lower board, **L**. The calorimeter channels come in groups
of 16. Group `g` (channels `16g … 16g+15`) is spread over columns `2g` and
`2g+1`:

| channel within the group | board |
|---|---|
| 0–3 | L of column 2g |
| 4–7 | L of column 2g+1 |
| 8–11 | H of column 2g |
| 12–15 | H of column 2g+1 |

The two low bits select the ADC. As bit fields of the channel number `c`:
column = `{c[7:4], c[2]}`, half = `c[3]` (1 = H), ADC = `c[1:0]`.

Columns 0–9 go to data FPGA 0 (channels 0–79). Columns 10–17 go to FPGA 1
(80–143), and columns 18–25 to FPGA 2 (144–207). Inside an FPGA a channel is
known by its **local index**, which is its number minus 0, 80 or 144. The local
index uses the same bit fields, counted from the FPGA's first column. This
works because every FPGA starts on an even column.

At the top-level pins the daughter board buses are indexed by **board number
`2*column + half`**: `adc_bus[0]` is 0L, `adc_bus[1]` is 0H, `adc_bus[2]` is 1L,
and so on up to `adc_bus[51]` (25H). `oe[f]` goes to every board of data FPGA
`f`.

## Gate and capture timing

All times are in clock cycles. The clock frequency is a free choice; the
testbenches use 10 ns.

1. `l1_trig` is a level. It is synchronised by two flip-flops and then
   edge-detected.
2. The gate opens `delay + 1` cycles after the edge is detected. That is
   `delay + 4` rising edges after the trigger pin rises. The gate then stays
   high for `max(width, 1)` cycles. After reset, `delay` is 0 and `width` is 6:
   60 ns at a 10 ns clock, the window used in earlier running.
3. A trigger that arrives while a gate is pending or open starts nothing. It
   is counted in `REG_DROPPED`.
4. `oe` rotates OE1→OE2→OE3→OE4 once per cycle, and keeps doing so. Each
   channel's latest sample is kept in a shadow register. The ADCs convert on
   every clock edge.
5. In the first cycle that `gate` is low, the shadow values are copied to the
   output registers. `captured` pulses one cycle later.

**Consequence.** The value captured for a channel is the bus sample taken in
one of the last four cycles of the gate, so it can be up to 4 cycles old. The
ADC adds its own conversion cycle. So the integration must be complete at
least 5 cycles before the gate closes; the testbenches leave 7 or more. In practice
the gate is set wider than the pulse, so this costs nothing. Program a wider
gate if the pulse is close to its end.

The boards' ADC clock is taken to be the system clock, forwarded outside this
RTL. The gate is active high here. Any inversion the boards need belongs in
the pin logic.

## VME access

`vme_ctrl` answers in a 64 KiB A24 window whose A23..A16 equal `VME_BASE`
(default `8'h10`). It answers D32 only: LWORD low and A1 low.

| AM | cycle |
|---|---|
| 0x39, 0x3D | single D32 read/write |
| 0x3B, 0x3F | BLT: AS stays low, one DS strobe per word, address +4 per word |

Other address modifiers, other base addresses and D16/D8 accesses get no DTACK
(there is no BERR). AS and DS are synchronised. DTACK falls in the cycle after
the local bus answers. It rises again 2–3 cycles after both DS lines are
high. `vme_data_oe` enables the read-data drivers while DTACK is low. The
256-byte BLT boundary of the VME standard is left to the master. The
testbench reads the 208 channels in blocks of 64 words.

Register map, byte offsets within the window:

| offset | access | content |
|---|---|---|
| 0x000 | r | status: `[31:16]` events, `[1]` busy, `[0]` ready. Ready is set when the data FPGAs capture and cleared by the next gate |
| 0x004 | rw | gate delay (cycles) |
| 0x008 | rw | gate width (cycles) |
| 0x00C | r | number of gates produced |
| 0x010 | r | number of triggers dropped while busy |
| 0x400 + 4·c | r | channel c (0–207), 12-bit ADC code in bits 11:0 |

Unmapped reads return 0 and unmapped writes are ignored; both are
acknowledged.

Local bus, from `vme_ctrl` to `ctrl_fpga`: a `loc_req_t` with a one-cycle
`valid` strobe, then one `loc_ack` pulse with `loc_rdata`. Only one request is
outstanding at a time. `ctrl_fpga` acknowledges a register access 1 cycle after
the request. It acknowledges a channel read 3 cycles after the request: it
puts the local index on `int_addr` and strobes `int_rd[f]`, and the data FPGA
answers one cycle later.

## ADC codes

The integrator takes positive and negative signals. The ADC's positive half,
2048 steps, covers about 24 nVs, about 12 pVs per step. This RTL passes the
raw 12-bit code through unchanged. The board model in `tb/` uses offset binary,
`2048 + integral` clipped to 0…4095, so a code below 2048 is a negative
signal.

A typical calorimeter pulse of about 12.6 nVs gives about 1050 steps, which
fits. A gate completely full of the largest signal, 600 mV over 60 ns = 36 nVs,
would need 3000 steps and saturates. In real use the gate is never full like
that.

## Not included

- **The trigger algorithm.** In the box's block diagram the data FPGAs are
  chained: a 4-bit `ctrlsum` and a 32-bit `insum`/`outsum` pass from FPGA 1 to
  FPGA 3 and on to the control FPGA. What is summed, and how a trigger is
  decided, is not known here, so `data_fpga` has no such ports.
- The front-panel NIM and ECL inputs and outputs (Trigger_IO, Data27H and
  Data27L boards), and the eight spare digitised inputs of the control FPGA.
  These are level converters with no assigned function.
- The FIFO data path of the VME board. It exists on the board but is not
  used.
- ARS start/stop signals for the sampling boards, and the JTAG chains.
- The daughter boards themselves, which are analog. `tb/daughter_board_model.sv`
  is a simple behavioural stand-in: it integrates `amp` per cycle while the
  gate is high, holds zero otherwise, converts on every clock edge and puts
  the ADC selected by OE on the bus.

## Departures and choices

Taken from the box description:

- the partition into boards and FPGAs;
- 52 boards of 4 channels with 12-bit ADCs;
- the 80/64/64 channel split;
- the channel numbering;
- the OE1–OE4 multiplexing;
- continuous sampling with capture at the end of the gate;
- the programmable gate delay and width;
- VME A24 D32/BLT.

The block diagram also mentions 56 boards and 56 inputs per FPGA. The
208-channel tables are followed here, and the difference is taken as spares.

This design's own choices:

- the register map and the local and internal bus protocols;
- the round-robin OE order;
- reset values and the counter width (16 bits);
- dropping triggers while busy;
- the VME base address and window;
- D32 only.

## Simulation

Each module has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=N failures=M`.

| testbench | what it shows |
|---|---|
| `tb_cal_chan_map` | all 256 inputs, checked against a map built forward from the column/board layout |
| `tb_gate_gen` | gate delay and width in cycles for fixed and random settings, `gate_end`, a dropped retrigger |
| `tb_adc_mux_reader` | OE one-hot and stepping, captured values for positive, negative and saturating pulses |
| `tb_data_fpga` | FPGA 1 with 16 board models, all 64 local indices, read latency |
| `tb_ctrl_fpga` | registers, gate timing, counters, ready flag, all 208 channel reads and their latencies |
| `tb_vme_ctrl` | D32 read/write in both modifiers, BLT read and write, ignored foreign accesses |
| `tb_workload_signal_range` | full size: a typical 12.6 nVs pulse, the same negative, and a 60 ns window full at 600 mV, on all 208 channels; checks the codes 3098, 998 and 4095 (saturated) |
| `tb_dvcs_trigger_box` | full size, 208 channels: two events with different gate settings, dropped triggers, BLT read-out of every channel, a foreign access. It counts each mechanism |

The full-size testbench runs in well under a second. To run one with
Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb \
  rtl/dvcs_trig_pkg.sv tb/tb_dvcs_trigger_box.sv --top-module tb_dvcs_trigger_box
./obj_dir/Vtb_dvcs_trigger_box
```

Replace the testbench name to run the others. To lint the design:
`verilator --lint-only -Wall -y rtl rtl/dvcs_trig_pkg.sv rtl/dvcs_trigger_box.sv`.
The remaining warnings are unused package constants, unconnected map outputs,
and `rst_n` used both in the flip-flops and in the `disable iff` of the DTACK
assertion.

## How far to trust it

Every module passes its testbench. Each testbench was also run against a
deliberately broken copy of its module and caught the fault. The
channel-numbering and capture logic follow the box's connector tables and its
description of the read-out closely. The VME slave follows the VME standard's
A24 D32/BLT cycles, but has only been exercised against the testbench's master
model, not against a real crate. Everything listed under *choices* was not
given by the box's description. Check those first when fitting this RTL to
real hardware.
