# A stored-program CAMAC channel for the PDP-15

CAMAC crates hold up to 24 instrument modules on a common backplane, the
*dataway*. A module is addressed by a command made of a function code F
(5 bits), a sub-address A (4 bits) and a station line N (one per slot), and
data moves on separate 24-bit read and write buses. Every dataway cycle ends with
two strobes, S1 and S2. Each module answers with a Q bit and can raise a
Look-At-Me (LAM) line.

This controller connects two CAMAC crates to a PDP-15 in two ways that share
one dataway driver:

* a **programmed-I/O processor**, driven by the CPU's IOT instructions, one
  CAMAC operation per short IOT sequence;
* a **stored-program channel** (SPCC) that runs small programs of CAMAC
  commands kept in PDP-15 memory. It fetches those commands and moves the data
  through the PDP-15 single-cycle data channel, so the CPU is not involved.

The channel is the interesting part. A LAM or a front-panel pulse (an
*event*) starts one of four channel programs. The program runs until a command
with its Exit bit set. The CPU is interrupted only when a data buffer is full,
and only once the program that filled it has finished. Programs can branch on
a module's Q response, jump, and add one to a memory word whose address is a
module's datum. That last feature histograms ADC values straight into memory.

## The command word

Channel commands are 18-bit PDP-15 words. In PDP-15 bit numbering (bit 0 is
the most significant) the fields are:

| bits (PDP) | bits `[17:0]` | field | meaning |
|---|---|---|---|
| 0      | 17    | Q | Q response expected; any other response skips the next command |
| 1-5    | 16:12 | F | CAMAC function code |
| 6-9    | 11:8  | A | sub-address |
| 10     | 7     | H | 24-bit transfer, as two memory words (high first) |
| 11     | 6     | E | exit after this command |
| 12     | 5     | C | crate (0 or 1) |
| 13-17  | 4:0   | N | station 1-24 |

The F code says everything about the data phase. F8 set means no data. With F8
clear, F16 set means the module is written from memory; otherwise memory is
written from the module. Three codes are not standard CAMAC and the channel
treats them specially:

* **F(12)** is an unconditional jump within the current 4K page. The low 12
  bits of the word go into PC bits 06-17. No dataway cycle is run.
* **F(4) / F(6)** is a direct memory increment. The dataway sees F(0) / F(2)
  (read, or read and clear). The module's datum, on read lines R1-R15, is the
  address of the memory word to increment.

`spcc_pkg.sv` holds the struct (`cmd_t`) and the F-code helper functions.

## How an event is served

An event goes through four phases (`channel_control.sv`, with
`event_monitor.sv`, `program_counter.sv`, `address_mux.sv` and
`control_module.sv`):

1. **Request.** A rising edge on an event input sets its latch. When the
   channel is idle, the latches of enabled events are copied into the event
   register, and the lowest-numbered event in it becomes active. The channel
   reads that event's table word at memory address 24-27 octal (events 1-4).
   If the word's top bit is 0, the word is a program address and is loaded
   into PC. If the top bit is 1, the word *is* a command, so a one-command
   program needs no program memory at all. Such a command has Q = 1, because Q
   is the top bit.
2. **Fetch.** The command at PC is read. A jump updates PC and the fetch
   repeats. Any other command goes into the command register, and PC is
   incremented.
3. **Execute.** The channel takes the dataway. The data transfers happen
   first, before the dataway cycle:
   * If H is set, the high half moves first, then the low half.
   * A module write reads the data register's contents from memory.
   * A module read writes the read lines straight into memory, while the
     command is already on the dataway.
   * Each transfer advances the word count (WC) and current address (CA) of
     the subchannel the event belongs to.

   Then the dataway cycle runs. If Q differs from the command's Q bit, PC is
   incremented again. This skips the next command and sets the Q-skip bit in
   the event active register. Finally the E bit selects fetch or exit.
4. **Exit.** The event register is cleared, but only the served event's latch
   is. Other requests that arrived meanwhile stay pending. If the subchannel's
   word count overflowed during the program, the subchannel's event enables
   are cleared and its interrupt flag is raised. This flag drives the API
   line. The buffer must therefore be longer than the word count by at least
   the size of the largest event.

With a 24-bit read, the high memory word holds R24-R19 in bits 5:0 and R18 in
bit 6. The low word holds R18-R1. The event active register, read through the
dataway like any module register, has a 1 in bit 17. A channel program can
store it as a *tag* at the start of each event, so the CPU can unpack a buffer
shared by several events. To keep tags unique, an option bit makes the channel
zero R18 in the low word of every read from a module other than the control
module. The high word still carries R18.

## The control module

The channel's registers sit in a unit that looks like an ordinary CAMAC module
at station `CTRL_N` (default 23) of crate 0. Both the CPU, through IOT
transfers, and channel programs can reach it. A channel program can even
re-arm its own subchannel. It holds two independent subchannels (so input and
output buffers can run at once), each with:

* a 12-bit word count, extended upward by a 4-bit event enable register.
  Setting enable bit *i* both enables event *i*+1 and assigns it to that
  subchannel. One write therefore re-arms a subchannel completely;
* a 15-bit current address;
* an overflow flag and an interrupt flag.

The word count counts up and overflows when it passes 7777 octal to 0000. To
fill *n* words, load −*n*.

| F | A | action |
|---|---|---|
| 0  | 0 / 2 | read {enables, WC} of subchannel 0 / 1 |
| 0  | 1 / 3 | read CA of subchannel 0 / 1 |
| 0  | 4 | read event active register: bit 17 = 1, bit 3 = Q-skip, bits 2:0 = event 1-4 |
| 0  | 5 | read option register (bit 0: null R18 on module reads) |
| 16 | 0,1,2,3,5 | write the same registers (at S1) |
| 8  | 0 / 1 | test the interrupt flag of subchannel 0 / 1 (Q = flag) |
| 10 | 0 / 1 | clear the overflow and interrupt flags (at S2) |

The original unit also had an error flag. What set it is not known, so this
module has none.

## The programmed-I/O processor

`iot_processor.sv` follows the classic sequence: send the command, send or
receive the high 6 bits (24-bit data only), send or receive the low 18 bits.
The dataway cycle starts when the low word moves, or at once for a dataless
(F8) command. Writes go through a high (6-bit) and a low (18-bit) data
register. These drive the write lines only for F8'·F16 commands. Reads have no
register: the read lines are gated onto the I/O bus during the IOP2 pulse.
The device codes are this design's choice:

| device | IOP1 (skip if) | IOP2 | IOP4 |
|---|---|---|---|
| 40 | Q of last IOT cycle | – | load command register |
| 41 | a PI-patched LAM is up | read R24-R19 | load high data |
| 42 | – | read R18-R1, start cycle | load low data, start cycle |
| 43 | channel interrupt pending | disable PI | enable PI |

`interrupt_skip.sv` turns these tests into the skip line. It raises PI for
patched LAMs when PI is enabled, and API for the channel interrupt.
`lam_patch_panel.sv` is the wired panel. Parameters choose the one LAM that
feeds each event input (ORed with its front-panel input) and the LAMs that go
to the program interrupt.

## Sharing the dataway

The IOT processor and the channel keep separate command and data registers.
The arbiter in `spcc_top.sv` gives the dataway to one of them at a time:

* the IOT processor holds it from loading its command to the end of its cycle;
* the channel holds it from the start of a command's execute phase to the end
  of that command's cycle;
* on a tie the IOT processor wins;
* a side that asks while the other holds the dataway waits.

This arbitration is not described in the source and is this design's own.
It has one consequence for software. Reads are gated onto the I/O bus without
a register, so an IOT read issued while the channel holds the dataway returns
the channel's module. Software should let the command take the dataway before
reading. (The testbench waits for `dw_owner == OWN_IOT`.)

The C bit picks the crate. Only that crate gets N lines and B/S1/S2, and only
its read lines and Q are used. The control module's read lines and Q are ORed
in like any module's.

## Interfaces and timing of `spcc_top`

* **IOT bus**: `iot_dev[5:0]`, `iot_iop[2:0]` (bit 0 = IOP1, 1 = IOP2,
  2 = IOP4; one-clock pulses), `io_wdata`, `io_rdata` (valid during IOP2),
  `skip` (valid during IOP1), `pi_req`, `api_req`.
* **Data channel**: `dch_req` is held with `dch_op` (read, write or
  increment), `dch_addr` and `dch_wdata` until a one-clock `dch_ack`. Read
  data arrives on `dch_rdata` with `ack`. `dch_burst` marks the first of two
  transfers of a 24-bit word.
* **Dataway**: `dw_n[crate][station-1]`, `dw_f`, `dw_a`, `dw_w`, per-crate
  `dw_b`, `dw_s1` and `dw_s2`, and inputs `dw_r[crate]`, `dw_q[crate]` and
  `lam[crate*24 + station-1]`. One cycle takes `CYCLE_LEN` clocks. The default
  10 clocks, with S1 at clocks 2-3 and S2 at 6-7, is the usual 1 µs CAMAC cycle
  at a 10 MHz clock. Q is sampled during S1.
* **Status**: channel command, event active register, event latches and
  register, word counts and flags, and the dataway owner.

Everything is synchronous to one clock with a synchronous, active-high reset.

## Where this RTL departs from or adds to the source

The following come from the source:

* the command format, the special F codes and the phase sequence;
* the event table at 24-27 octal and the clearing rules at exit;
* the subchannel registers and their widths;
* the event tag and the R18 handling;
* the IOT sequence and the F8'·F16 write gating.

The following are this design's own:

* the IOT device codes;
* the control module's sub-address map;
* the bit positions of the event number and the Q-skip bit;
* the up-counting word count;
* edge-triggered event latches, with event 1 as the highest priority;
* the dataway arbiter and the port protocols;
* the dataway timing;
* the rule that an event enabled on both subchannels uses subchannel 0.

Two further points need care:

* The source says both that an overflow clears the enables "upon word count
  overflow" and that it does so at program end. This RTL does it at program
  end, together with the interrupt.
* A direct increment moves no data word, so WC and CA do not change.

Not built:

* the control module's error flag;
* the PDP-15 itself, its memory and data channel;
* the CAMAC modules;
* the system software.

The testbenches use behavioural models for the computer, its memory and the
modules.

## Simulating

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. For example, the whole controller, at its
default parameters:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/spcc_pkg.sv tb/spcc_top_tb.sv --top-module spcc_top_tb -o sim
./obj_dir/sim
```

`spcc_top_tb` sets up the control module over IOT. It then runs programs that
exercise:

* a program entered through the event table, and a command in the table word;
* a jump, a direct increment and a Q skip;
* a burst read;
* two simultaneous events;
* an overflow interrupt;
* an event held while disabled;
* collisions between IOT and channel;
* crate-1 traffic and a PI LAM.

It fails if any of these never happens.

`spcc_preedit_tb` runs a coincidence pre-editing program:

* when both ADCs fire, the channel stores a tag and both readings in a buffer;
* when only one fires, the channel adds one to a histogram word instead.

`spcc_synctx_tb` receives synchronous serial data in which start and stop
control bytes frame the data. The channel records only the bytes inside a frame:

* the receiver module answers Q to "is this a control byte" and "is this a
  start byte";
* a flag register module holds the recording state, set and cleared by F(26)
  and F(24);
* a 12-word channel program branches on these Q answers.

In both testbenches the modules are simple models written for the test.
A recorded byte takes about 70 clocks (7 µs at 10 MHz), from the LAM to the
end of the program.

`tb/pdp15_memory_model.sv` and `tb/camac_module_model.sv` are the stand-ins
for memory and modules.
