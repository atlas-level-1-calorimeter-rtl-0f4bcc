# Hub FPGA firmware for an L1Calo FEX shelf

An ATCA shelf of the ATLAS Level-1 Calorimeter trigger holds up to twelve
feature-extractor (FEX) modules in logical slots 3 to 14. It also holds two Hub
modules in slots 1 and 2, and each Hub carries a readout driver (ROD)
mezzanine. The Hub in slot 1 is the shelf's timing and control centre:

- It takes the TTC signals (L1A, BCR, ECR) and the privileged-readout
  requests.
- It takes the control stream its ROD sends back (link resets, busy,
  channel-up flags).
- Once per LHC bunch crossing (25 ns), it sends every module in the shelf
  the same 128-bit message with both of these merged.

This repository is the synthesizable SystemVerilog for that Hub FPGA logic:

- the two 128-bit control-register links;
- the TTC delay pipeline and the event counters;
- the per-slot routing of link resets;
- the start-up handshake with the ROD;
- the IPbus register slaves;
- the board "safe configuration" pins.

Transceivers, Aurora cores, the Ethernet MAC/PHY, the IPbus UDP master and
the TTC decoder are vendor IP or chips. They sit outside the RTL, and
`hub_fpga_top` brings their signals out as ports.

## The control-register links

Both links work the same way, with the Hub receiving one and sending the
other:

- **Readout_Ctrl:** ROD → Hub.
- **Combined_TTC:** Hub → each FEX, its own ROD and the other Hub.

The sender holds four 32-bit *Control registers*, Word_0 to Word_3. The
receiver keeps a copy of them, the *Shadow registers*. Each link sends one
full message per LHC clock. At 6.4 Gb/s with 8b/10b coding, that is exactly
5.12 Gb/s × 25 ns = 128 bits.

Format of each message:

- Word_0 bits 7:0 always hold the K28.5 comma (0xBC) that frames it.
- Word_3 bits 31:23 hold a 9-bit CRC.
- The CRC polynomial is x⁹+x⁷+x⁶+x⁵+x⁴+x³+x+1. That is 0x2FB, or 0x17D in
  Koopman notation.

**Word format and timing (this design's choice).** The links run on one
160 MHz word clock (`clk`), so one message is four 32-bit words. `bc_stb` is
high for one clock in four and marks the LHC clock. The top makes it from a
2-bit counter.

**Sending (`ctrl_reg_tx`):**

1. At `bc_stb` it takes a snapshot of the four registers.
2. It forces the comma into Word_0 and inserts the CRC.
3. It sends Word_0 with `charisk = 0001`, then Word_1..3 with `charisk = 0000`.

Because of the snapshot, a register that changes mid-message cannot make
the CRC inconsistent.

**Receiving (`shadow_reg_rx`):**

- It starts a message at the comma and collects the next three words.
- It checks the CRC on Word_3.
- On a match it updates all four Shadow registers at once and pulses
  `msg_ok`.
- On a CRC mismatch it discards the whole message, pulses `crc_err` and
  counts it. The specification requires the discard, because a missed
  message must not half-update a link reset.
- A comma inside an unfinished message gives `frame_err` and restarts
  framing.

Shadow registers follow their Control registers 5 word clocks (1.25 LHC
clocks) after the snapshot.

**CRC coverage (this design's choice).** The CRC (`crc9`) covers message
bits 8..118, taken as `{W3,W2,W1,W0}`: everything except the comma byte and
the CRC field. Bits are fed most significant first, from an initial value of
0, with no final inversion. The specification names only the polynomial, so
a ROD or FEX talking to this Hub must use the same convention.

## What each Combined_TTC output carries

`cttc_word_builder` fills the four Control registers of one output at every
LHC clock:

| Word | Bits | Content |
|---|---|---|
| 0 | 7:0 | K28.5 |
| 0 | 11:8 | version (0) |
| 0 | 15:12 | Reset 3:0 (per destination, input `sys_reset`) |
| 0 | 16..19 | L1A, BCR, ECR, privileged readout |
| 1 | 23:0 | L1ID |
| 1 | 31:24 | ECRID |
| 2 | all | control channel, sent as 0 |
| 3 | 3:0 | Link_reset 3:0 |
| 3 | 4 | ROD busy |
| 3 | 5 | Link enable |
| 3 | 6, 7 | rod 0 / rod 1 channel up |
| 3 | 22:20 | shelf number |
| 3 | 31:23 | CRC |

**Link-reset routing.** This is the part that differs between outputs.
Readout_Ctrl Word_1 carries per-slot resets:

- four for each of slots 3..8 (`slot N link reset 0..3`, bits 0..23);
- one for each of slots 9..14 (bits 24..29).

The output to FEX slot N gets its own slot's resets on Link_reset 3:0. Slots
9..14 use bit 0 only.

The Readout_Ctrl `Aurora_Init` bit (Word_0 bit 15, the Global_Link_Reset)
must reach every module, but the Combined_TTC table has no bit of its own
for it. It is therefore ORed into all four Link_reset bits of every output,
including the ROD and the other Hub. Those two outputs carry no slot resets
and no channel-up flags.

**Busy and channel-up flags.** ROD busy goes to every output.
`rod 0 channel up` is the slot's flag from this Hub's ROD (Readout_Ctrl
Word_0 bits 16..27). `rod 1 channel up` comes from the input
`other_chan_up`, which stands for the other Hub's ROD. Which ROD counts as 0
and which as 1 is this design's reading.

**Index map.** In `hub_fpga_top`, output index `d` means:

- 0: own ROD;
- 1: other Hub;
- 2..13: FEX slots 3..14.

## TTC path: pipeline, PRO FIFO and counters

`ttc_pro_pipeline` delays L1A, BCR and ECR by `PIPE_DELAY` LHC clocks
(default 8). A signal sampled at strobe k is on its output from strobe
k + `PIPE_DELAY`.

Privileged-readout (PRO) bits are pushed into a `PRO_DEPTH`-entry FIFO
(default 16) through `pro_wr`/`pro_bit`. When a delayed L1A leaves the
pipeline, one PRO bit is popped and sent in the same message as that L1A.

The specification calls a non-empty FIFO "the expected condition". For the
other cases, this design does the following:

- An L1A that finds the FIFO empty sends PRO = 0 and pulses
  `pro_empty_err`.
- A push into a full FIFO is dropped and pulses `pro_full_err`.
- Both are kept as sticky flags in the monitor registers.

`ttc_counters` follows the specification's counter rules:

- **BCID:** a 12-bit bunch counter. It counts 0..3563, rolls over, and BCR
  sets it to 0.
- **L1ID:** a 24-bit event counter. It counts L1As, and ECR sets it to −1,
  so the first L1A after an ECR is event 0.
- **ECRID:** 8 bits that extend the L1ID to the 32-bit number sent in Word_1.

Choices of this design:

- ECRID counts ECRs.
- When ECR and L1A arrive in the same crossing, the ECR is applied first.
- The outputs are the "next" values, so the message that carries an L1A
  also carries that event's own L1ID.

Latency from a TTC input at strobe k:

- The message carrying it starts on the wire at strobe k + `PIPE_DELAY` + 2.
- It is complete at the far end 1.25 LHC clocks later.

## Start-up sequence with the ROD

`hub_init_seq` is the Hub side of the numbered power-up procedure:

1. The firmware leaves reset (configuration done).
2. With the `hub_control.rod_pwr_en` bit set, the Hub raises **PWR_CON1**.
   PWR_CON1 drives `ROD_Power_Enable` and its active-low twin.
3. The ROD answers **PWR_CON2** (power good).
4. The ROD then answers **PWR_CON3** (ready). On its rising edge
   `pulse_timer` sends a Combined_TTC transceiver reset pulse,
   `cttc_gt_reset`, of `GT_PULSE_CYCLES` clocks (default 125 000 000,
   about 1 s).
5. The Combined_TTC link reset is held while `Aurora_Init` is high. It is
   also held until the first good Readout_Ctrl message has arrived; that
   hold is this design's addition.
6. On the trailing edge of the link reset, `aurora_reset_timer` starts:
   - The Aurora GT resets are released after `GT_CYCLES` (1250).
   - The Aurora core resets are released after `RST_CYCLES` (2500).
   - Tx and Rx are released together.

   Every end of every link runs the same timer from the same edge, so all
   channels come out of reset together. A firmware reset also starts the
   timer.

`init_step` reports how far the sequence has got:

- CONFIG
- ROD_PWR
- ROD_CFG
- GT_RESET
- LINK_RST
- AURORA
- RUN

Durations and gating are this design's choices:

- The specification gives no durations for the Aurora timer.
- For the GT pulse it suggests only "1 sec?".
- The generic `pulse_timer` defaults to 0x3FFFFFFF cycles. At 125 MHz that
  is 8.6 s, the ROD power-up timer of the specification.

## Registers (IPbus)

`ipbus_fabric` decodes `addr >> 4`:

- slave 0: `hub_regs`;
- slave 1: `link_mon_regs`;
- anything else gets `err` one clock after the strobe.

Both slaves answer `ack` one clock after the strobe. Writes to read-only
registers are acknowledged and ignored.

| Address | Name | Access | Content |
|---|---|---|---|
| 0x00 | hub_module | RO | {fw_version, fw_type, hw_revision, module_type} (parameters) |
| 0x01 | hub_address | RO | {0, adrs_to_rod, slot_adrs, shelf_adrs} |
| 0x02 | hub_alerts | RO | 0 in normal operation; fields below |
| 0x03 | hub_control | RW | 0 after reset; fields below |
| 0x10–0x13 | | RO | Readout_Ctrl Shadow Word_0..3 |
| 0x14 | | RO | CRC error counts {other-Hub link [31:16], Readout_Ctrl [15:0]} |
| 0x15 | | RO (write clears flags) | {init step [10:8], other-Hub link aligned [3], PRO full seen, PRO empty seen, Readout_Ctrl aligned} |
| 0x16 | | RO | {ECRID, L1ID} |
| 0x17 | | RO | BCID |
| 0x18–0x1B | | RO | Combined_TTC Control registers sent to this ROD |
| 0x1C–0x1F | | RO | Shadow registers of the Combined_TTC link received from the other Hub |

**Field order.** Fields are packed from bit 0 in the order the register
table lists them; the table prints no bit positions.

`hub_control`, from bit 0:

| Field | Bits |
|---|---|
| other_hub_clk | 1 |
| fex_clk_dis | 1 |
| mgt_equ | 13 |
| i2c_buf_dis | 3 |
| led_drv | 3 |
| rod_pwr_en | 1 (bit 21) |
| sw_loop_det | 3 |
| mpod_rst | 2 |
| spare | 5 |

`hub_alerts`, from bit 0:

| Field | Bits |
|---|---|
| no_pll_lock | 2 |
| phy_int | 2 |
| mpod_int | 2 |
| hub_smb_alert | 1 |
| hub_pwr_not_ok | 1 |
| no_rod | 1 |
| rod_smb_alert | 1 |
| rod_status | 3 |
| no_sw_loop_det | 3 |
| spare | 16 |

`rod_status` is {0, not PWR_CON3, not PWR_CON2}, so the two ROD power
alerts read 1 until the ROD has powered up.

**Address to the ROD.** `adrs_to_rod` is `{shelf[3:0], slot[3:0]}`; the
specification says only that it is generated. It is also driven on the
OVERALL_ADRS pins.

## Safe configuration of the board pins

`hub_safe_config` must work in every firmware build. With `hub_control` at
0, which is its reset value, every controlled pin sits at the safe default
of the pin table:

- equalisation, LEDs and switch loop-detect controls at 0;
- MiniPOD resets (active low) at 1;
- I2C buffer 1501 enabled, 1502/1503 disabled;
- ROD power off.

Pins with no control bit stay at 0:

- the second 40 MHz fan-out select;
- the access signals;
- the spare links;
- switch MDC;
- MiniPOD SCL.

Monitored pins pass through two-flop synchronisers. Active-low pins are
inverted so that every alert bit is 1 on a problem.

**I2C buffer conflict.** The pin table sets buffer 1501 enabled by default,
while `hub_control` is all zero after power-on. These are reconciled as
`i2c_buf_enable = 3'b001 ^ i2c_buf_dis`.

## Top level and what lies outside

`hub_fpga_top` wires the blocks above. It exposes:

- the 32-bit user side of the Readout_Ctrl receiver, of the 14
  Combined_TTC transmitters and of the receiver for the Combined_TTC link
  coming back from the other Hub;
- the GT reset;
- the TTC and PRO inputs;
- the four Aurora reset outputs;
- an IPbus master port;
- all board pins.

| Top parameter | Default | Meaning |
|---|---|---|
| PIPE_DELAY | 8 | TTC pipeline length, LHC clocks |
| PRO_DEPTH | 16 | PRO FIFO entries (power of two) |
| GT_PULSE_CYCLES | 125 000 000 | Combined_TTC GT reset pulse, clocks |
| GT_CYCLES | 1250 | Aurora GT reset hold after link reset, clocks |
| RST_CYCLES | 2500 | Aurora core reset hold, clocks |

**Link from the other Hub.** The two Hubs are joined by a pair of
Combined_TTC links. This Hub receives, CRC-checks and monitors the
incoming one over IPbus, but makes no other use of it.

Not in this RTL:

- **Transceivers and Aurora cores.** These are the GTH/GTY transceivers
  and the Aurora 8b/10b receivers for the 74 incoming readout streams (and
  the 2 own streams to the ROD). The lane mapping and the readout fan-out to
  the ROD are in the same group.
- **Ethernet and control network.** These are the Ethernet MACs, the
  KSZ9031 PHYs, the base-interface switch and the IPbus UDP/IP master. The
  RTL starts at the IPbus bus.
- **Monitoring and debug cores.** These are the ILA, VIO and SYSMON.
- **TTC decoding.** The FELIX/TTC decoder delivers L1A, BCR and ECR.
- **Board-level parts.** These are the clock buffers and I/O standards.

The PRO bits, `link_enable`, the per-destination Reset 3:0 and the other
ROD's channel-up flags are top-level inputs. Their sources are not defined
in the Hub.

## Files

`rtl/`:

- `hub_pkg.sv`: types, message pack/unpack functions, constants.
- `crc9.sv`
- `ctrl_reg_tx.sv`
- `shadow_reg_rx.sv`
- `ttc_pro_pipeline.sv`
- `ttc_counters.sv`
- `cttc_word_builder.sv`
- `pulse_timer.sv`
- `aurora_reset_timer.sv`
- `hub_init_seq.sv`
- `ipbus_fabric.sv`
- `hub_regs.sv`
- `link_mon_regs.sv`
- `hub_safe_config.sv`
- `hub_fpga_top.sv`

`tb/`:

- One self-checking testbench per module, `tb_<module>.sv`.
- Shared macros (`tb_check.svh`) and IPbus master tasks
  (`tb_ipbus_tasks.svh`).
- A reference CRC by polynomial long division (`tb_ref_pkg.sv`).
- The end-to-end test. Its body is in `tb_hub_fpga_top_body.svh`, used by
  two wrappers.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself
through a watchdog. Run from the repository root with Verilator 5:

```
verilator --binary --timing -Wno-fatal --top-module tb_hub_fpga_top \
  -y rtl -y tb -Irtl -Itb -I. rtl/hub_pkg.sv tb/tb_ref_pkg.sv tb/tb_hub_fpga_top.sv
./obj_dir/Vtb_hub_fpga_top
```

Change the top module and file name for any other testbench.

**`tb_hub_fpga_top`** runs with a pipeline of 3, a 4-entry FIFO and short
timers. It drives the Hub from the outside, like this:

- A ROD model, built from `ctrl_reg_tx`, sends Readout_Ctrl.
- An other-Hub model, also built from `ctrl_reg_tx`, sends Combined_TTC
  back to the Hub.
- 14 `shadow_reg_rx` receivers stand for the FEXs, the ROD and the other
  Hub.
- A TTC driver keeps its own model of the counters and the PRO FIFO.

The run takes the Hub through the following, all while every message on
every output is compared with the model (≈200 000 checks):

- the full start-up sequence;
- 3000 crossings of random L1A/BCR/ECR traffic;
- PRO FIFO underflow and overflow;
- a full orbit to show the BCID wrap;
- random per-slot resets, busy and channel-up patterns;
- one Readout_Ctrl message with a CRC error and one with a stray comma;
- IPbus reads, writes and an unmapped address.

Each of these mechanisms is counted, and one that never happens is a
failure.

**`tb_hub_fpga_top_full`** runs the same test on the top with all defaults.
The only exception is the 1 s GT reset pulse (125 M clocks). The test
checks that the pulse starts and is still held after 100 000 clocks, then
carries on while the pulse is still running. The whole pulse would take
about 24 minutes of simulation: Verilator runs this top at roughly 90 000
clocks per second.
