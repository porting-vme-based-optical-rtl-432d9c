# OPT-PLC programmable logic: an optical-link I/O master shared by a PLC CPU and an on-chip ARM

OPT-PLC is a master module for the OPT-VME optical-link remote I/O system, built as an
I/O module for a Linux-based PLC (Yokogawa e-RT3). The OPT-VME protocol procedures used
to live in a special VME device driver. On OPT-PLC they run as application processes on
the ARM cores of a Zynq SoC. The PLC's CPU therefore needs only a generic "read/write
registers" driver. This RTL is the programmable-logic part of that SoC. It gives two
processors one register space:

* the **PLC side**: a CPU on the PLC bus, reaching the logic through the vendor's Avalon
  interface at 32 MHz;
* the **ARM side**: the processing system, reaching the logic through an AXI-to-BRAM
  converter.

The PLC-side CPU hands work to the ARM through **descriptor areas** in a shared RAM. It
protects each area with **lock registers** and signals through **doorbells and
interrupts**. Each of the five **optical channels** also has its own I/O registers. A CPU
with no ARM support, such as a PLC sequence CPU, can drive those registers directly.

```
 Avalon (32 MHz) ──plc_ifm──► plc-local bus ─┬──────────────┬──────────────┬─────────────┐
                                             │              │              │             │
 arm-local bus (100 MHz) ────────────────────┼──────────────┼──────────────┼─────────────┤
                                             ▼              ▼              ▼             ▼
                                        dpram_desc     common_reg     opt_mainm x5   info_* ports
                                        (descriptors)  iorelay_reg    ch_reg         (management
                                                       int_cntlm      opt_datbuffm    information,
                                                       swtichled_led  ──── 80 MHz ──  outside)
                                                       watchdog_m     opt_datconvm
                                                       semaphore_reg      │ word streams
                                                       ledcntl_m          ▼
                                                                     OPT-Protocol controller
                                                                     (outside: com_cnt/com_if)
```

Clocks: `clk_plc` is 32 MHz (Avalon side), `clk` is 100 MHz (both local buses and all
registers) and `clk_opt` is 80 MHz (protocol side of the channels). Each domain has its
own asynchronous active-low reset.

## Address map

The address map below is seen from the PLC bus. It uses byte addresses and 16-bit
registers, so bit 0 of the address is ignored. The ARM side uses the same offsets.

| Address         | Area                                   | Served by                       |
|-----------------|----------------------------------------|---------------------------------|
| 0x0000-0x003F   | module management information          | outside, `info_*` ports         |
| 0x0040-0x007F   | reserved                               | outside, `info_*` ports         |
| 0x0080-0x00FF   | common register area                   | `common_reg`                    |
| 0x0100 + 0x30·n | I/O register area of channel n+1 (n=0..4) | `opt_mainm` → `ch_reg`       |
| 0x01F0-0x02FF   | reserved (reads 0)                     | —                               |
| 0x0300          | descriptor area, common                | `semaphore_reg` + `dpram_desc`  |
| 0x0580 + 0x280·n| descriptor area of channel n+1         | `semaphore_reg` + `dpram_desc`  |

The area boundaries, the 0x30-byte I/O areas and the 0x280-byte descriptor areas come
from the published OPT-PLC register map. The registers inside the common area and the
I/O areas are this design's own layout, because the publication does not give one. All
offsets are in `rtl/opt_plc_pkg.sv`.

## Two buses, one register space

Both local buses use the same simple protocol, `lbus_req_t = {req, we, addr[12:0],
wdata[15:0]}`:

* A request lasts one cycle.
* Read data comes back on the next `clk` cycle.
* There are no wait states.

Both buses reach every slave in parallel. Nothing arbitrates between them; each slave
takes both requests in the same cycle:

* **Descriptor RAM.** This is a true dual-port RAM. If both buses write the same word in
  the same cycle, the PLC value is kept.
* **Ordinary registers.** If both buses write one register in the same cycle, the PLC
  value is kept.
* **Write-1 registers** (set, clear, kick, acknowledge). Writes from both buses in the
  same cycle are OR-ed.
* **Lock registers.** Requests from both buses in the same cycle are applied in order,
  PLC first, within one clock. The test-and-set is therefore atomic.

`plc_ifm` connects the vendor's Avalon port to the plc-local bus. It holds the Avalon
master with `waitrequest` and moves the access into the 100 MHz domain by a toggle
through two flip-flops. It issues the access as one plc-local request and returns the
read data by a second toggle. `readdata` is valid in the cycle `waitrequest` drops. One
access is in flight at a time, and each takes about 3 `clk_plc` cycles plus 4 `clk`
cycles.

## Descriptor areas and their locks

This is the main path in normal operation. Each channel has a descriptor area (DA), and
there is one common DA. A DA is 0x280 bytes:

| DA offset     | Field                                              | Where            |
|---------------|----------------------------------------------------|------------------|
| 0x0000        | lock owner: unit ID / slot ID                      | `semaphore_reg`  |
| 0x0002        | lock owner: process ID                             | `semaphore_reg`  |
| 0x0004        | lock requester: unit ID / slot ID                  | `semaphore_reg`  |
| 0x0006        | lock requester: process ID                         | `semaphore_reg`  |
| 0x0008        | request function code (ioctl request number)       | `dpram_desc`     |
| 0x000A-0x0015 | executing process info: unit/slot, PID, status (0x0010), result (0x0012), progress (0x0014) | `dpram_desc` |
| 0x0020-0x014F | send data (304 bytes)                              | `dpram_desc`     |
| 0x0150-0x027F | receive data (304 bytes)                           | `dpram_desc`     |

Software sets the meaning of the fields from 0x0008 on; the hardware only stores them.
The lock fields are hardware:

1. **Take.** A process writes its unit/slot to +0x0004, then its non-zero process ID to
   +0x0006. If the owner process ID is 0 (the area is free), that second write copies
   the requester record into the owner record in the same clock.
2. **Test.** The process reads +0x0002 (and +0x0000). It owns the area only if it sees
   its own ID.
3. **Release.** The owner writes 0 to +0x0002. Any other write to the owner record is
   ignored, so a held lock cannot be taken over.

The `da_locked[5:0]` output shows which areas are held. This take/test/release rule is
this design's reading of the published "lock flag" records. The record layout follows
the publication.

One request from the PLC CPU to an ARM process runs like this:

1. **PLC CPU.** It takes the DA lock. It writes the request function code and the send
   data. Then it writes 1 to bit *n* of `RELAY_REQ` (0x0088).
2. **Hardware.** The request bit raises the ARM interrupt (ARM status bit *n*).
3. **ARM process.** It clears the request (`RELAY_REQ_CLR`) and its interrupt status. It
   reads the DA and runs the procedure, typically through the channel's I/O registers.
   It writes the result and the receive data into the DA. Then it sets bit *n* of
   `RELAY_DONE` (0x008C).
4. **Hardware.** The done bit raises the PLC interrupt.
5. **PLC CPU.** It clears the done bit and its status. It reads the result and releases
   the lock.

## Interrupts (`int_cntlm`)

There are two targets: `irq_plc` (towards the PLC interface) and `irq_arm`. Each target
has a status register and a mask register. A rising edge of a source sets its status
bit. Writing 1 clears it; a new edge in the same cycle wins over the clear. An IRQ is
the registered OR of the status bits enabled in the mask, so it follows the source edge
by 2 cycles.

| Bit  | PLC target (0x0080 status, 0x0082 mask) | ARM target (0x0084 status, 0x0086 mask) |
|------|-----------------------------------------|-----------------------------------------|
| 5:0  | relay done, DA 0..5                     | relay request, DA 0..5                  |
| 10:6 | channel 1..5 exchange finished          | channel 1..5 exchange finished          |
| 11   | a watchdog expired                      | a watchdog expired                      |
| 12   | —                                       | DIP/rotary switch changed               |

Other common registers:

* 0x0088 `RELAY_REQ`, W1 set; 0x008A `RELAY_REQ_CLR`, W1
* 0x008C `RELAY_DONE`, W1 set; 0x008E `RELAY_DONE_CLR`, W1
* 0x0090 `SW_STAT` = {rotary[3:0], dip[7:0]}
* 0x0092 `SW_CHG`, W1C
* 0x0094 `LED_CTRL`
* 0x0098 `WD_ENABLE`
* 0x009A `WD_KICK`, W1
* 0x009C `WD_EXPIRED`, W1C
* 0x009E `WD_PERIOD`

## Optical channels (`opt_mainm`)

Each channel crosses from 100 MHz to 80 MHz and back:

```
ch_reg (100 MHz) ──cmd──► opt_datbuffm ──► opt_datconvm (80 MHz) ──tx stream──► com_cnt
        ◄──reply────────  (toggle CDC) ◄──                       ◄──rx stream──
```

The I/O registers of one channel, as offsets from its base:

| Offset    | Register   | Access                                                          |
|-----------|------------|-----------------------------------------------------------------|
| 0x00      | CTRL       | write bit 0 = 1 to start (ignored while busy)                   |
| 0x02      | STATUS     | bit 0 busy, bit 1 done, bit 2 time-out; write 1 clears bits 2:1 |
| 0x04      | TX_LEN     | number of words to send, clamped to 8                           |
| 0x06      | RX_LEN     | number of words received                                        |
| 0x08-0x16 | TX_DATA[8] | read/write                                                      |
| 0x18-0x26 | RX_DATA[8] | read only                                                       |
| 0x28      | TIMEOUT    | reply time-out in units of 256 cycles at 80 MHz (3.2 µs); reset value 128 = 409.6 µs |

The time-out reset value covers the 260 µs worst-case response of the OPT-VME system.

How an exchange runs:

1. **Start.** It copies the command (length, words, time-out) into a holding register in
   `opt_datbuffm` and flips a request toggle.
2. **Crossing.** The toggle passes two flip-flops at 80 MHz. `opt_datconvm` then gets a
   one-cycle start with a command that is stable by then.
3. **Send.** `opt_datconvm` sends the words on `tx_valid/tx_data/tx_last` with
   `tx_ready` back-pressure.
4. **Receive.** It collects reply words from `rx_valid/rx_data/rx_last` into up to 8
   slots. A counter started with the command ends the exchange with the time-out flag if
   no complete reply arrives in time.
5. **Return.** The reply crosses back the same way. `ch_reg` then stores it, sets `done`
   and raises the channel interrupt source.

`busy` spans the whole exchange. It also drives the channel's activity LED.

The word-stream port stands in for the interface of the OPT-Protocol 2006 controller
(`com_cnt`/`com_if`). The original system reuses that controller from its OPT-CC board
logic, and its interface is not published. Connecting the real controller means
adapting this port.

## Watchdogs, switches, LEDs

* **`watchdog_m`.** There is one timer per channel process, with a shared prescaler
  (`WD_PRESCALE`, default 100 000 cycles = 1 ms). An enabled timer that is not kicked
  within `WD_PERIOD` ticks (reset value 1000) sets its expired flag and restarts. The
  ARM's supervising process kicks the timers and reacts to the flags.
* **`swtichled_led`.** The 8-bit DIP switch and 4-bit rotary switch pass through two
  flip-flops each; there is no debounce. A change after power-up sets `SW_CHG`.
* **`ledcntl_m`.** It drives 8 LEDs. For each LED, bit `LED_CTRL[8+i]` chooses between
  the software bit `LED_CTRL[i]` and a hardware source:
  * LEDs 0-4: channel activity, stretched to `LED_STRETCH` cycles (40 ms)
  * LED 5: a watchdog expired
  * LED 6: `irq_plc`
  * LED 7: `irq_arm`

## What is outside this RTL

The following parts have top-level ports but no logic here:

* **OPT-Protocol 2006 controller (`com_if`/`com_cnt`).** It is reused from earlier
  hardware and not described. It connects to the per-channel `tx_*`/`rx_*` streams at
  80 MHz. `tb/com_cnt_model.sv` is a behavioural stand-in for simulation: it answers
  each word with its complement after a delay, and never answers a frame that starts
  with 0xDEAD.
* **Module management information** (0x0000-0x007F). Its content is defined by the PLC
  platform. Accesses appear on `info_p_req`/`info_a_req`, and read data returns on
  `info_p_rdata`/`info_a_rdata` one clock later.
* **Vendor IP.** These are the PLC gate array, the PLC-AVALON interface and the AXI BRAM
  controller. Their sides of the bus are the top's `avs_*`, `irq_plc`, `arm_req`,
  `arm_rdata` and `irq_arm`.
* **Not built at all.** These are the processor system, the optical transceivers and the
  reserved high-speed serial links.

## Departures and limits

* **Remote slaves are not supported in hardware.** The original design folds the
  procedure for slaves behind a relay-mode OPT-CC (a 1:11 multiplexer board) into the
  channel logic. That needs the relay board's register set and protocol, which are not
  available. Here every exchange is one command/reply with the directly connected board.
  Remote access must be composed in software from several such exchanges.
* **One module reaches five slaves directly.** A planned installation of 80 slave
  boards would need the remote sequence above and several modules.
* **Register layouts are this design's own.** This covers the layouts inside the common
  area and the I/O areas, and the 8-word frame limit. The original design gives only the area
  boundaries and the descriptor layout. The same holds for the LED assignment, the
  switch widths, the watchdog tick and the interrupt bit assignment.
* **`existcommon_reg` is left out.** It appears only by name in the original block
  diagram.

## Simulation

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`, and each has a cycle watchdog.

| Testbench          | What it shows |
|--------------------|---------------|
| `tb_opt_plc_top`   | The whole design at default parameters. It covers management-information read, lock take/refuse/release, and descriptor + doorbell + interrupt round trips on all five channels. It also covers a direct I/O-register exchange from the PLC side, a time-out, five channels in flight at once, a 1 ms watchdog expiry (LED and interrupt) and a switch-change interrupt. It counts every mechanism and fails if one never happened. About 12 s. |
| `tb_opt_plc_workloads` | The whole design at default parameters against the published figures. All six descriptor areas carry full 304-byte send and receive blocks, written from one bus and read from the other. Slaves answering after 50 us and 260 us finish without a time-out, and the measured exchange time is within 2 us of the slave delay. A 450 us slave times out at 409.6 us. About 8 s. |
| `tb_opt_mainm`     | One channel across both clocks, with time-out timing. |
| `tb_plc_ifm`, `tb_opt_datbuffm`, `tb_opt_datconvm` | Clock crossings, stream conversion, latency bounds. |
| `tb_common_reg`, `tb_semaphore_reg`, `tb_int_cntlm`, `tb_iorelay_reg`, `tb_watchdog_m`, `tb_swtichled_led`, `tb_ledcntl_m`, `tb_ch_reg`, `tb_dpram_desc` | Block-level behaviour against reference models. |

To run one with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl -y tb +libext+.sv \
    rtl/opt_plc_pkg.sv tb/tb_opt_plc_top.sv --top-module tb_opt_plc_top -o sim
./obj_dir/sim
```

Top-level parameters:

* `WD_PRESCALE`: watchdog tick in `clk` cycles
* `LED_STRETCH`: activity LED hold time

The channel count, frame size and address map are constants in `opt_plc_pkg`.
