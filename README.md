# LPD interface controller for ECU data acquisition

Reading measurement data out of a running engine control unit usually goes
through the unit's own software (diagnostic or calibration protocols), which
costs the unit CPU time and gives little bandwidth. Many automotive
microcontrollers instead carry an on-chip debug unit that can read and write
memory on its own, without the CPU's help. This RTL is the host side of such
a link: a controller, meant for an FPGA next to the ECU, that talks to the
microcontroller's **Low Pin Debug (LPD)** port over four pins and turns "read
this 32-bit word" or "write that word" into the frame exchange the debug unit
expects.

The design follows a published description of an LPD controller: its frame
formats, its transmitter and receiver state machines, its block structure
(main state machine, multiplexer, counter, transmitter, receiver) and the
order of its link bring-up and register accesses. That description does not
give the command encodings, the widths of the address and data, the ID length
or the clock ratio; those are filled in here and listed under
[Choices made in this design](#choices-made-in-this-design). Treat
`lpd_pkg.sv` as the place to adapt the controller to a real target's
command set.

## The four pins

| Pin         | Direction (seen from this controller) | Role |
|-------------|------|------|
| `lpd_clk`   | out  | LPD clock, free running, `clk / CLK_DIV` |
| `lpdi`      | out  | commands and write data; the target samples it on the rising edge of `lpd_clk` |
| `lpdo_clk`  | in   | the target's LPD clock output, its transmit clock |
| `lpdo`      | in   | answers and read data; the target changes it on the rising edge of `lpdo_clk` |

Both data lines idle at 1.

## Frames

Everything on `lpdi` and `lpdo` travels in frames: a start bit of 0, the data
least significant bit first, and two stop bits of 1. No parity.

```
frame B (11 bits):  ST | D0 D1 ... D7             | SP0 SP1
frame H (19 bits):  ST | D0 D1 ... D15            | SP0 SP1
bit index:          0    1  ...  8 (B) / 16 (H)     last two
```

After reset both directions use frame B. One of the first steps of the
link bring-up switches both directions to frame H, and all later traffic
(commands included, zero-extended) uses frame H.

### Transmitter (`ldu_tx`)

Three states: IDLE, LOAD, SHIFT. A one-clock `ldu_tx_start` moves IDLE to
LOAD; in LOAD the data word is joined with the start and stop bits into a
19-bit shift register (frame B pads the unused top bits with 1). In SHIFT the
register shifts one bit out per LPD clock period while the bit counter counts
alongside; when the counter reaches 10 (B) or 18 (H) the last stop bit is on
the line and the machine returns to IDLE, pulsing `tx_done`. `tx_status` is
high from LOAD to that point.

The LPD clock comes from a free-running divider inside the transmitter, low
for the first half of its period and high for the second. `lpdi` changes only
at the falling edge, so the target's rising-edge sample lands in the middle
of the bit. A frame therefore takes 11 or 19 LPD clock periods plus up to one
period while the start waits for the next falling edge.

### Receiver (`ldu_rx`, `ldu_rx_sync`)

`lpdo` and `lpdo_clk` are asynchronous to `clk`. `ldu_rx_sync` passes both
through the same two-flop synchronizer, which keeps them aligned, and emits
`bit_en` when the synchronized `lpdo_clk` falls, half a bit after the target
changed `lpdo`. The system clock must be at least four times the target's LPD
clock output for this to see every edge; with the target echoing `lpd_clk`,
`CLK_DIV >= 4` satisfies it.

The receiver has four states: IDLE, SHIFT, LOAD, STOP. In IDLE a sample of 0
is a start bit. In SHIFT the remaining bits enter the top of a 19-bit
register, so that after 11 or 19 bits the stop bits always sit in bits 18:17,
the data of frame H in 16:1 and that of frame B in 16:9. LOAD copies the data
out (frame B zero-extended), STOP sets `error_status` if either stop bit is 0,
and `rx_valid` pulses. `rx_valid` rises at the second clock edge after the
edge that sampled the last bit.

## Link bring-up and memory access (`ldu_main_fsm`)

This is the part to read carefully. A request (`start` with `write`,
`address`, `write_data`) is turned into the frame sequence below. The first
request after reset or after an error first brings the link up; later
requests only run the access.

| Step | Controller sends | Target answers | Format |
|------|------------------|----------------|--------|
| connect            | `CONNECT` (0x10)                  | ACK | B |
| switch to frame H  | `SWITCH_H` (0x20)                 | ACK (still in B), then both sides use H | B |
| activate DCU       | `DCU_ACT` (0x30)                  | ACK | H |
| ID authentication  | `ID_AUTH` (0x40), then `ID_WORDS` words of `id_code`, word 0 first | ACK if the ID matches, else NAK | H |
| activate CPU       | `CPU_ACT` (0x50)                  | ACK; the link is now up (`linked`) | H |
| start address      | `REG_WR MA_RWA` (0x61), address low half, high half | – | H |
| access condition   | `REG_WR MA_CTRL` (0x62), 0x8004 (read) or 0x8005 (write) | – | H |
| read:  data        | `REG_RD MA_RD` (0x73)             | data low half, high half | H |
| write: data        | `REG_WR MA_WD` (0x64), data low half, high half | – | H |

A command word is `{opcode[3:0], register[3:0]}`; ACK is 0xA5 and NAK 0x5A in
the low byte. MA_CTRL's bit 15 requests the access, bits 2:1 give the size
(`2'b10`, 32 bit) and bit 0 the direction. All of these codes live in
`lpd_pkg.sv`.

Inside the state machine each send state pulses `ldu_tx_start` once, keeps
the multiplexer (`ldu_tx_mux`) pointed at its word through `tx_sel`, and moves
on at `tx_done`. Each answer state waits for `rx_valid`. Because the target
answers strictly after the command's last stop bit, and the receiver listens
all the time, no answer can be missed between the two.

### Errors

A request ends with `error` high when an answer is not ACK, when a received
frame has a bad stop bit, or when no answer arrives within `RESP_TIMEOUT`
clocks. The controller then drops the link (`linked` low) and falls back to
frame B, so the next request starts again at *connect*. A target that refused
the ID does the same on its side. After a stop-bit error or a timeout the
target may still be in frame H: it has to be brought back to frame B (for
example by resetting its debug unit) before the next request can succeed.
`error` holds until the next `start`.

## Request interface and timing

`ldu_interface` is the top. Pulse `start` for one clock while `busy` is low;
`write`, `address` and `write_data` are registered in that clock. `busy` stays
high until `done` pulses for one clock; `read_data` is valid from then on for
a read. `tx_status` and `rx_status` show the transmitter and receiver at
work. Reset (`rst`) is synchronous and active high.

On a live link, with `CLK_DIV = 4`, a read takes 627 clocks (six frames H
out, two in) and a write 611 clocks (eight frames H out), as measured in the
end-to-end testbench. A full bring-up adds seven frames and five answers.

## Blocks

```
ldu_interface
├── ldu_main_fsm     request sequencing, link state, frame format, timeout
├── ldu_tx_mux       picks the word to send
├── ldu_tx           framing, parallel-to-serial shift, LPD clock divider
│   └── lpd_bit_counter
├── ldu_rx_sync      synchronizer and sample strobe for lpdo / lpdo_clk
└── ldu_rx           start detection, serial-to-parallel shift, stop-bit check
    └── lpd_bit_counter
lpd_pkg              frame sizes, command and register codes, shared types
```

| Parameter      | Default | Meaning |
|----------------|---------|---------|
| `CLK_DIV`      | 4       | system clocks per LPD clock period (even, at least 2; at least 4 when the target echoes `lpd_clk`) |
| `ID_WORDS`     | 2       | 16-bit words in the ID code (32-bit `id_code`) |
| `RESP_TIMEOUT` | 4096    | clocks to wait for an answer |

At the defaults, synthesis gives about 200 flip-flop bits and 142 top-level
port bits. The published implementation reports 283 registers and 98 pins on
a Cyclone IV E; its port widths are not known, so these figures cannot be
matched exactly.

## Choices made in this design

Taken from the original description: the pin set; frames B and H with one
start and two stop bits, LSB first; the transmitter's IDLE/LOAD/SHIFT and the
receiver's IDLE/SHIFT/LOAD/STOP machines with a bit counter running to 10 or
18; the stop-bit error flag and the TX/RX status outputs; the block structure;
the bring-up order (connect, switch to frame H, activate DCU, ID
authentication, activate CPU) and the access through MA_RWA, MA_CTRL and
MA_RD or MA_WD.

Chosen here:

- All command, register and answer encodings, the MA_CTRL condition words, and
  which steps the target answers.
- 32-bit address and data, sent as two frames H, low half first; a 32-bit ID.
- The LPD clock divider and the rule that `lpdi` changes on the falling edge.
- The receive synchronizer and the mid-bit sample strobe.
- The link staying up between requests (the original flow ends after one
  operation), the answer timeout, and the error recovery.
- Active-high synchronous reset everywhere; `lpdi` idles at 1.
- Frame B data zero-extended to 16 bits in the receiver.
- Separate `address`, `write_data` and `read_data` ports where the original
  block diagram draws one bidirectional data bus.
- The receiver samples once per bit on a strobe; in the original it takes
  one bit per clock, which the strobe reproduces when tied high.

Not built: the target microcontroller's debug unit. A behavioural model of it
(`tb/lpd_mcu_model.sv`) implements the command set above for simulation. No
block transfers or address auto-increment are modelled, so the throughput
reported for the original implementation (about 1.46 MB/s) cannot be compared
directly: at 627 clocks per 4-byte read it would need a system clock of about
228 MHz.

## Simulating

Each testbench checks its block against values it works out itself, prints
`TB_RESULT checks=N failures=M` and stops; each has a watchdog.

| Testbench | Block | What it covers |
|-----------|-------|----------------|
| `tb_lpd_bit_counter` | `lpd_bit_counter` | counting, clear priority, reaching 10 and 18 |
| `tb_ldu_tx`      | `ldu_tx`       | frame B/H bits on `lpdi`, idle level, LPD clock period, frame time |
| `tb_ldu_rx`      | `ldu_rx`       | data, stop-bit errors, idle line, latency, strobed sampling |
| `tb_ldu_tx_mux`  | `ldu_tx_mux`   | every selection with random inputs |
| `tb_ldu_main_fsm`| `ldu_main_fsm` | exact frame sequences of bring-up, read and write; NAK, stop-bit error, timeout |
| `tb_ldu_acquisition` | `ldu_interface` with `CLK_DIV=8`, 64-bit ID | one bring-up, then 64 back-to-back reads with the target's returned clock lagging by 1.7 clocks; reports about 310 clocks per byte at `CLK_DIV=8`, i.e. about 39 LPD clock periods per byte |
| `tb_ldu_interface` | `ldu_interface` at default parameters | end to end against the target model: 80 writes and reads at random addresses, refused ID, stop-bit error, timeout, recovery; counts every mechanism |

With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
    rtl/lpd_pkg.sv tb/lpd_mcu_model.sv tb/tb_ldu_interface.sv \
    --top-module tb_ldu_interface -o sim
./obj_dir/sim
```

For a unit testbench, give `rtl/lpd_pkg.sv` and `tb/<testbench>.sv` with
`--top-module <testbench>`; `-Irtl` lets Verilator find the modules. The
end-to-end run finishes in well under a second.
