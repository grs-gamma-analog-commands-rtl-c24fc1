# GRS gamma analog board: command and housekeeping FPGA

The analog pulse-processing board (APPS) of a gamma-ray spectrometer (GRS)
has a small FPGA. It does two jobs for the central electronics box (CEB):

- It executes 16-bit ground commands. These set the discriminator thresholds
  and the high-voltage bias DAC, the shaping amplifier gain, the analog
  housekeeping multiplexer address, the test pulser, the PHA mode and the high
  voltage.
- It reports its own state in 16-bit digital housekeeping (HK) words, one
  word per telemetry command.

This repository holds synthesizable SystemVerilog for that FPGA. It also holds
self-checking testbenches, one of them end to end, and a behavioural model of
the analog side that is used only in simulation.

## Command word and command set

A command is `{id[15:8], data[7:0]}`. All valid commands are listed below.
Every other id is rejected, including the reserved ids 2E and 2F.

| id    | data                 | effect |
|-------|----------------------|--------|
| 00    | 00                   | NOP |
| 00    | 0A                   | clear the reject flag |
| 00    | AA                   | clear the command counter |
| 01    | 01                   | APPS reset |
| 10–17 | level                | DAC 0–7: LLD, L1, L2, L3 and ULD thresholds, two spares, HVBS DAC (00–FF gives 0–5000 V) |
| 18    | any                  | clear all eight DACs to 00 |
| 20    | gain                 | shaping amplifier gain code |
| 28    | `[4:0]` channel      | analog HK multiplexer address (32 channels) |
| 2A    | `[3:0]` pos, `[7]` go | digital HK multiplexer position. If bit 7 is set, one HK word is also sent to the CEB |
| 2B    | `[0]`                | test pulser enable |
| 2C    | `[0]`                | 1 = PHA stop/abort mode, 0 = normal |
| 2D    | `[0]`, `[2:1]`       | HVBS enable. Bits 2:1 are stored and reported but drive nothing |

An id-00 command with any data other than 00, 0A or AA is invalid. So is an
id-01 command with data other than 01. Where the table says bits are unused,
any value is accepted and those bits are ignored.

## Command processor (`cmd_processor`, Cmd_Mach)

A command is taken on a clock edge where `cmd_valid` and `cmd_ready` are both
high. It is latched as `Cmd_Data`. Then the 4-bit state machine Cmd_Mach runs:

```
IDLE(0) -> DECODE(1) -> EXEC(2)   -> DONE(5) -> IDLE      accepted, 4 cycles
IDLE(0) -> DECODE(1) -> REJECT(3) -> DONE(5) -> IDLE      rejected, 4 cycles
IDLE(0) -> DECODE(1) -> EXEC(2) -> TLM_WAIT(4) -> DONE(5) 2A with bit 7
```

What happens in each case:

- **EXEC** writes the command registers (the `cmd_regs_t` struct in
  `gamma_pkg`) and pulses `load_mem` for one cycle. It increments the 8-bit
  command counter and sets `cmd_accept`.
- **REJECT** sets the sticky `cmd_reject` flag and clears `cmd_accept`. A
  rejected command is not counted. Only command 000A or reset clears the flag.
- **TLM_WAIT** holds until the telemetry machine is idle. It then gives it a
  one-cycle request. This is how a telemetry command that arrives during a
  transfer waits its turn instead of being lost. While it waits, `cmd_ready`
  stays low.
- **APPS reset (0101)** returns every command register to zero. It also
  drives `apps_reset` for `APPS_RST_CYCLES` cycles, which stops the test
  pulser and aborts a telemetry transfer. The command counter and the reject
  flag keep their values, because each has its own reset command.

Command 00AA leaves the counter at 0: its own increment is overridden.

## Digital housekeeping words (`dig_hk_mux`)

Each word is `{2'b11, channel[3:0], data[9:0]}`. The multiplexer position is
the one set by the last 2A command.

| ch | data[9:0] |
|----|-----------|
| 0  | Cmd_Mach[3:0], Cmd_Data[5:0] |
| 1–6| the eight DAC levels packed back to back, 10 bits per word: DAC0[7:0] DAC1[7:6] / DAC1[5:0] DAC2[7:4] / … / DAC6[5:0] DAC7[7:4] |
| 7  | DAC7[3:0], BPHA[15:10] |
| 8  | BPHA[9:0] |
| 9  | TP_Mach[3:0], TP_Enable, Cmd_Accept, Cmd_Reject, Pha_latch, Load_mem, APPS_Reset |
| A  | Reset, Telem_Mach[2:0], analog mux channel[5:0] (bit 5 always 0) |
| B  | Cmd_Mach[3:0], Telem_Mach[2:0], HV bits[2:1], HV enable |
| C  | Cmd_Mach[3:2], Cmd_Data[15:8] |
| D  | Cmd_Mach[3:2], Cmd_Data[7:0] |
| E  | Cmd_Mach[3:2], command counter |
| F  | Cmd_Mach[3:2], shaping amplifier gain |

BPHA is the 16-bit PHA buffer word and Pha_latch is a status line. Both come
from the PHA logic, which is outside this design, and enter through ports.
Reset is the board reset line. It reads 0 whenever the logic is running.

The 80 DAC bits are split into two runs. DAC 0 to DAC 4 fill channels 1 to 4
exactly. DAC 5 to DAC 7 fill channels 5 and 6 and the top four bits of
channel 7.

The state fields in a word show the moment it was captured. The word is
captured one cycle after the request. At that point Cmd_Mach has already
returned to IDLE and Telem_Mach is in LOAD. So an HK word read by its own
command shows `Cmd_Mach = 0` and `Telem_Mach = 1`.

## Telemetry transfer (`hk_telem`, Telem_Mach)

Telem_Mach steps through `IDLE(0) -> LOAD(1) -> SHIFT(2) -> DONE(3)`:

- In LOAD it captures the multiplexer output.
- In SHIFT it sends the 16 bits, most significant bit first, on `tlm_sdata`.
  The bits are framed by `tlm_frame`, and the serial clock `tlm_sclk` rises
  in the middle of each bit.
- One bit lasts `TLM_DIV` clock cycles (8 by default).

A whole transfer takes `16*TLM_DIV + 3` cycles from the request. Exactly one
word is sent per telemetry command.

## Test pulser sequencer (`test_pulser`, TP_Mach)

While it is enabled, the 4-bit TP_Mach moves forward one step every `TP_DIV`
cycles (1024 by default). `test_pulse` is high throughout step 15. That gives
one pulse of `TP_DIV` cycles every `16*TP_DIV` cycles. Disabling the pulser,
or an APPS reset, puts TP_Mach back at 0 immediately.

## Top level (`gamma_apps_fpga`)

The top connects the four blocks and brings out these ports:

- the command port;
- the three serial telemetry lines;
- the registered control levels for the analog side: `dac_level[7:0][7:0]`,
  `amp_gain`, `amux_chan`, `hv_enable`, `hv_cmds`, `tp_enable`, `pha_stop`
  and `test_pulse`;
- the PHA inputs `bpha` and `pha_latch`;
- the status outputs.

Reset (`rst_n`) is asynchronous and active low. Shared types, the command id
constants and the state encodings are in `rtl/gamma_pkg.sv`.

These parts are outside the FPGA and have no RTL here:

- the DACs;
- the high-voltage bias supply;
- the shaping amplifier;
- the 32-channel analog HK multiplexer and its sensors;
- the PHA logic;
- the CEB.

`tb/apps_analog_model.sv` models the DACs, the HVBS and the analog
multiplexer behaviourally for simulation. It uses the slope of each channel:
1 V/nA for the electrometers, 0.417 V/V for the ±12 V monitors, 1 V per kV
for the HVBS output, 12.8 mV/°C + 25 mV and −10 mV/°C for the temperatures,
fixed 1.666/3.333/5.000 V references, and so on. Supply, current and
temperature inputs are fixed nominal values. Offsets not yet determined are
taken as 0.

## What is specified and what is chosen here

These parts follow the source specification:

- the command set and the reject rule;
- the use of the data bits;
- the HK word layout and the tag bits;
- the widths of Cmd_Mach (4 bits), Telem_Mach (3 bits) and TP_Mach (4 bits);
- the analog multiplexer channel list and slopes.

These parts are this design's own choices, because the specification does not
give them:

- **Command input.** The specification does not say how commands arrive. A
  parallel word with a valid/ready handshake is used. A serial receiver in
  front of `cmd_word` would need no change inside.
- **Telemetry output.** The serial format and the bit period are not given
  either.
- **State machines.** The states and encodings of all three machines are
  chosen here. Only their widths are fixed, so a ground display that decodes
  the state fields must use the encodings above.
- **Command counter.** It counts accepted commands only.
- **APPS reset.** What it resets, and the pulse length (`APPS_RST_CYCLES` =
  16).
- **Load_mem.** It is read as the register write strobe. Captured in a word,
  it therefore reads 0.
- **Test pulser.** The step and pulse timing (`TP_DIV`) are chosen here. The
  specification gives only the enable bit and the width of TP_Mach.
- **Analog mux channel width.** Word A has a 6-bit field for it, but the
  command uses only 5 bits. The register is 5 bits and the field's top bit
  reads 0.

How far to trust it: every block's behaviour is checked against an
independent model in its testbench. Each testbench has been shown to fail on
a deliberately broken copy of its block, and on an empty module. The design
has not been run on hardware. The timing choices listed above need to be
matched to the real CEB interface before use.

## Testbenches and simulation

| testbench | what it checks |
|-----------|----------------|
| `tb/cmd_processor_tb.sv` | every command, invalid and reserved words, and 400 random commands against a model of the registers, counter and flags; 4-cycle latency; `load_mem` and `apps_reset` pulse widths; a telemetry command that waits for a busy telemetry machine |
| `tb/dig_hk_mux_tb.sv` | all 16 channels with random inputs, against words assembled from the table |
| `tb/hk_telem_tb.sv` | serial words received and compared; transfer time; a request while busy is ignored; APPS-reset abort |
| `tb/test_pulser_tb.sv` | TP_Mach cycle by cycle against a model; pulse width and period; enable toggling and reset |
| `tb/gamma_apps_fpga_tb.sv` | the top at its default parameters, driven as the CEB would drive it (see below) |

The end-to-end test plays the checkout sequences that are run on the board:

1. every valid command;
2. a NOP loop;
3. DAC 5 written in a loop with one value;
4. DAC 5 stepped through 00–FF;
5. all 16 digital HK words read back and compared, both with the pulser off
   and with it running;
6. the analog multiplexer stepped through its 32 channels, with each voltage
   from the analog model converted back with the channel's slope;
7. invalid and reserved commands.

It counts each mechanism and requires every one to occur: reject,
reject-flag reset, counter reset, APPS reset, DAC clear, telemetry transfer,
telemetry wait, test pulses, and PHA and HV mode changes. Each testbench ends
by printing `TB_RESULT checks=N failures=M`.

To run a testbench with Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb +libext+.sv \
    --top-module gamma_apps_fpga_tb rtl/gamma_pkg.sv tb/gamma_apps_fpga_tb.sv
./obj_dir/Vgamma_apps_fpga_tb
```

Replace the top module and file name to run another testbench. To change the
timing, override `TLM_DIV`, `TP_DIV` and `APPS_RST_CYCLES` on
`gamma_apps_fpga`.
