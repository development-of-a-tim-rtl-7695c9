# C6x host port to C4x comm port interface

A TMS320C6x DSP has no C4x-style communication ports, yet a TIM module
must exchange data with other TIMs over them. This design fills that gap
with a small FPGA circuit. It talks to the DSP only through the DSP's
16-bit host port interface (HPI). It then moves 32-bit words between DSP
memory and one or more comm port groups, each of which speaks the byte-wide
C4x link protocol.

The DSP never handles a comm port word itself. To start a transfer, it
writes three control words into its own memory and raises its HINT line.
The interface then does the rest:

- it reads the control words through the HPI;
- it moves the block one word at a time, split into two 16-bit half words
  on the HPI;
- it writes a status word back into DSP memory;
- it interrupts the DSP on `EXT_INT_4` when a block is done.

All sequencing is done by a microprogrammed controller. This is a sequencer
plus a 64-bit-wide clocked microprogram memory that executes one
microinstruction per clock. As a result, the cycle budget of every
transfer is fixed, and it can be read off the microprogram.

At 40 MHz the fastest paths give:

| Direction | Clocks per word | Rate |
|---|---|---|
| DSP to comm port | 19 | 8.42 MB/s |
| Comm port to DSP | 18 | 8.88 MB/s |

## Structure

```
c4x_commport_if (top)
├── hpi_boot_loader        loads DSP code through the HPI, then sets DSPINT
├── controller_group       microprogrammed controller + reg5 + status mux
│   └── micro_controller
│       ├── micro_sequencer     next-address logic, 4 instructions
│       └── microcode_rom       64-bit x 128 clocked microprogram memory
└── host_port_group        HPI datapath
    └── port_counters  (one per comm port)
        ├── addr_counter x2     input / output address, +4 per word
        └── word_counter x2     input / output word count, ZERO flag
```

`c4x_if_pkg` holds the shared types, the microinstruction layout and the
microprogram itself.

The comm port group is not part of this RTL. This is the block that runs
the C4x byte protocol, token transfer and the 8-bit bus. Each group talks
to this design through six word-level signals, which are top-level ports:

| Signal | Direction | Meaning |
|---|---|---|
| `load` | out | strobe: take the word on `outdat` |
| `loadack` | in | 1 = output register is empty |
| `outdat[31:0]` | out | word to send, shared by all groups |
| `dav` | in | 1 = an input word is waiting on `indat` |
| `datack` | out | strobe: the input word has been taken |
| `indat[31:0]` | in | input word from the group |

## Host port group (datapath)

`host_port_group` is the HPI-side datapath. It contains:

- **`hiloreg`**: 32 bits, built from two 16-bit halves. `ldouthi` and
  `ldoutlo` load it from `HD`. It holds every word read from the DSP: data
  on its way to a comm port (it drives `outdat`), and the control words on
  their way into the counters and `reg5`.
- **`inreg`**: 32 bits. It latches the word from the comm port group at
  the start of a write transfer.
- **`port_counters`**, one set per comm port, with these parts:
  - an input address counter and an output address counter. They load from
    `hiloreg` and count up by 4, one 32-bit word;
  - an input word counter and an output word counter. They load from
    `hiloreg` and count down, flagging ZERO;
  - two *done* flags. A flag is set when its word counter reaches zero and
    cleared when the counter is loaded with a non-zero count. After reset
    both flags are set.
- **Three multiplexers toward `HD[15:0]`**:
  - one selects a 32-bit word: `inreg`, the active port's input address or
    its output address;
  - one selects its upper or lower half;
  - one selects between that half and the controller group's 16-bit value.
    The controller's value is either a constant from the microinstruction
    or the status byte.

Counter **loads** are steered by `reg5`. This is the setup register: its
SETUPCOM bits choose the port and IN/nOUT chooses the direction. Counter
**increments and decrements** go to the *active* port (see
[More than one comm port](#more-than-one-comm-port)).

## Controller group

`controller_group` contains the microprogrammed controller. Around it are:

- **`reg5`**: loaded from the five least significant bits of `hiloreg`
  when the setup word is read;
- **the status multiplexer**: it places the eight done flags (two per port)
  in the low byte of a 16-bit value;
- **the active-port counter**;
- **the HPIA tag register**, described below;
- **the condition inputs** for the sequencer:

| Condition | Meaning |
|---|---|
| `C_NHINT` | the nHINT line |
| `C_NHRDY` | the nHRDY line |
| `C_WR_READY` | active port set up for input, and DAV = 1 |
| `C_RD_READY` | active port set up for output, and LOADACK = 1 |
| `C_TAG_IN` / `C_TAG_OUT` | HPIA already points into this block |
| `C_IN_DONE` / `C_OUT_DONE` | the active port's done flags |

`LOAD` and `DATACK` from the microinstruction go only to the active port.
An assertion checks that they never fire together.

### Microinstruction

The 64-bit word holds these fields:

| Bits | Field |
|---|---|
| 63:62 | instruction: continue, branch if condition = 0, branch if condition = 1, jump |
| 61:58 | condition select |
| 57:56 | unused |
| 55:48 | branch address |
| 47:0 | output bits (`uout_t` in the package) |

The output bits include:

- the 16-bit host data field;
- the HPI lines `HCNTL`, `HR/nW`, `HHWIL` and `nHCS`;
- bus drive and mux selects;
- register loads;
- counter strobes;
- `LOAD`, `DATACK` and `EXT_INT_4`;
- tag operations and the port-advance bit.

Five of the 48 bits are spare.

The sequencer's next address is registered on the same edge into the
address register and into the memory's output register. So the word for
address *n* is at the memory output during the clock after the sequencer
chose *n*, and a branch has no delay slot. While reset is low, the
controller fetches address 0 and forces the outputs to idle (`nHCS` high,
no strobes).

The microprogram is written as the function `ucode_word(address)` in
`c4x_if_pkg`. The memory is initialised from it, so changing the program
means editing that function. Its map:

| Address | Routine |
|---|---|
| 0–6 | Idle loop |
| 8–20 | read transfer (DSP → comm port) |
| 21–34 | status report after a read |
| 35–39 | HPIA reload for a read |
| 40–50 | write transfer (comm port → DSP) |
| 51–64 | status report after a write |
| 65–69 | HPIA reload for a write |
| 72–108 | transfer setup |
| other | jump to 0 |

## The Idle loop and fairness

The Idle loop takes 7 clocks and makes three checks, in this order:

| Address | Check | Branch target |
|---|---|---|
| 0 | nHINT = 0 | transfer setup |
| 4 | write ready | write transfer |
| 5 | read ready | read transfer |

Address 6 jumps back to 0 and advances the active port.

Each routine comes back into the loop at a different address, so no source
of work can starve the others:

- a read returns to address 0, so a setup request and a pending write are
  looked at before the next read;
- a write returns to address 5, the read check;
- a setup returns to address 4, the write check.

When a port is set up for both directions, reads and writes therefore
alternate word by word.

## HPI access sequences

The HPI registers are selected by `HCNTL`:

| `HCNTL` | Register |
|---|---|
| 00 | HPIC |
| 01 | HPIA |
| 10 | HPID, with HPIA post-incremented |
| 11 | HPID, without increment |

Every 32-bit access is two half words. `HHWIL` = 0 marks the first half
word and 1 the second. The first half word is the most significant one
(HPIC `HWOB` = 0).

The DSP latches `HCNTL`, `HHWIL` and `HR/nW` on the falling edge of `nHCS`.
It takes write data on the rising edge. The controller therefore:

- changes these lines only while `nHCS` is high;
- holds `HD` valid across the rising edge of `nHCS`.

Two assertions in the top level check both rules on the HPI lines. They
apply to the boot loader as well as to the controller.

| Access | Clocks | Sequence |
|---|---|---|
| HPID read | 9 | set up, `nHCS` low, settle, wait while `nHRDY` = 1, latch high half, `nHCS` high, `nHCS` low, latch low half, `nHCS` high |
| HPID write | 8 | same shape; the half words are taken on the two rising edges of `nHCS` |
| HPIA or HPIC write | 5 | data from the host port group or from the microinstruction |

`nHRDY` is polled only on the first half word of an HPID access. On the
second half word the data is already there.

### The HPIA tag

A block transfer should load HPIA once and then use HPID with
post-increment. HPIA is shared, though: setups, status reports and the
other direction all move it. The controller group therefore keeps a tag
saying whose address HPIA currently holds:

- nobody;
- port *p*, input;
- port *p*, output.

A transfer that finds its own tag goes straight to the data access. Any
other transfer first reloads HPIA from its address counter, which costs 5
clocks, and sets the tag. A setup or a status report clears the tag.

## Transfer setup and the DSP's control words

The DSP program and the interface share four words of DSP memory:

| Address | Contents |
|---|---|
| `8000_0000h` | setup word: bit 0 IN/nOUT (1 = into the DSP), bits 4:1 SETUPCOM[3:0], one bit per comm port |
| `8000_0004h` | number of 32-bit words |
| `8000_0008h` | start address of the block in DSP memory |
| `8000_000Ch` | status word, written by the interface: bit 2p = port p output done, bit 2p+1 = port p input done |

To set up a transfer, the DSP:

1. writes the first three words;
2. sets HINT in HPIC, which drives `nHINT` low.

The setup routine then takes 37 clocks:

1. It writes HPIA = `8000_0000h`.
2. It reads the three words with auto-increment. The setup word goes into
   `reg5`. The count and the address go into the counters of the chosen
   port and direction.
3. It clears HINT by writing 1 to HPIC bit 2.

The DSP may set up a new transfer as soon as `nHINT` is high again. It may
do so while other transfers are still running.

When a word counter reaches zero, the routine that moved the last word:

1. writes the status byte to `8000_000Ch`;
2. pulses `EXT_INT_4` for two clocks;
3. returns to the Idle loop.

The DSP's interrupt handler reads the status word to see which transfer
finished.

## Cycle budget

These are the fixed costs with HPIA already pointing into the block and
`nHRDY` never high:

| Path | Clocks |
|---|---|
| one pass of the Idle loop | 7 |
| read word, `LOAD` to `LOAD` | 19 (`LOADACK` is sampled 8 clocks after `LOAD`) |
| write word, `DATACK` to `DATACK` | 18 (`DAV` is sampled 10 clocks after `DATACK`) |
| HPIA reload before a word | +5 |
| each clock of `nHRDY` high | +1 |
| transfer setup | 37 |
| status report and `EXT_INT_4` | 14 |

If `LOADACK` or `DAV` comes back too late for its sample, the word waits
one more Idle-loop pass (7 clocks) for each sample it misses. For example:

- a read with `LOADACK` low for 9 clocks runs at 26 clocks per word;
- a write whose `DAV` returns about 20 clocks after `DATACK` runs at
  18 + 2 × 7 = 32 clocks per word. That is 800 ns at 40 MHz.

## More than one comm port

`NUM_PORTS` (1 to 4, default 1) sets the number of comm port groups. Each
port gets its own counters and done flags. The Idle loop serves one port
per pass:

- a two-bit active-port counter advances at address 6;
- the ready conditions, the done flags, the address multiplexer and
  `indat` all follow the active port.

The microprogram is the same for any number of ports. The cost is that a
port with a transfer in progress may wait up to `NUM_PORTS` − 1 extra Idle
loops between words.

## Host boot

The DSP can boot from its host port. In that mode it stays in reset until
DSPINT is written in HPIC.

`hpi_boot_loader` holds a 32-bit image memory (`IMAGE_WORDS`, default 256),
which is filled through `img_we`/`img_addr`/`img_wdata`. When `boot_en` is
high after reset, it:

1. writes HPIA = 0;
2. writes `img_len` words with auto-incremented HPID writes, 9 clocks per
   word plus `nHRDY` waits;
3. writes HPIC = `0002h` (DSPINT).

It then raises `boot_done`. The controller and the host port group are
held in reset until then, and the HPI lines come from the loader while it
is busy. With `boot_en` low, the controller starts right after reset.

## Top-level interface

`c4x_commport_if` has these parameters:

- `NUM_PORTS` (default 1);
- `IMAGE_WORDS` (default 256).

It uses one clock, `clk`, and a synchronous active-low reset, `rst_n`.

| Group | Signals |
|---|---|
| HPI | `hd_i[15:0]`, `hd_o[15:0]`, `hd_oe`, `hcntl[1:0]`, `hr_nw`, `hhwil`, `nhcs`, `nhrdy` (in), `nhint` (in) |
| DSP interrupt | `ext_int4` |
| Boot | `boot_en`, `img_we`, `img_addr`, `img_wdata[31:0]`, `img_len`, `boot_done` |
| Comm port groups | `load[N]`, `loadack[N]`, `outdat[31:0]`, `dav[N]`, `datack[N]`, `indat[N][32]` |

The bidirectional `HD` bus is split into an input, an output and an enable.
The pad's tri-state buffer is outside.

## Simulation

The testbenches are self-checking. Each one prints
`TB_RESULT checks=N failures=M`. Two behavioural models in `tb/` stand in
for the parts outside the FPGA:

- **`hpi_dsp_model`**: the DSP's HPI and 64 KB of its memory. It models
  HPIC/HPIA/HPID, post-increment, read prefetch, programmable `nHRDY` busy
  time, HINT/DSPINT, and a check for bus conflicts on `HD`.
- **`commport_group_model`**: a comm port group at word level, with
  programmable `LOADACK` low time and `DAV` gap.

| Testbench | What it shows |
|---|---|
| `tb_c4x_commport_if` | Whole design at default parameters. Boot load of 16 words; 16-word read at 19 clocks/word; 16-word write at 18 clocks/word; read with slow `LOADACK` at 26 clocks/word; read and write at once (interleaved); write with slow `DAV` at 32 clocks/word. Checks data, status words and interrupt counts, and that every mechanism occurred. |
| `tb_c4x_commport_if_4port` | `NUM_PORTS` = 4: ports 0 and 3 send, port 2 receives, all set up before any finishes; checks that the Idle loop visits every port |
| `tb_micro_controller` | Cycle counts of the Idle loop, read, write, HPIA reload, `nHRDY` stretch and setup |
| `tb_controller_group`, `tb_host_port_group` | Each group on its own, 2 ports |
| `tb_hpi_boot_loader` | Image load and the DSPINT write, with exact clock counts |
| `tb_micro_sequencer`, `tb_microcode_rom`, `tb_port_counters`, `tb_addr_counter`, `tb_word_counter` | Units, against reference models in the testbench |

To build and run one with Verilator 5, from the directory that holds
`rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/c4x_if_pkg.sv tb/tb_c4x_commport_if.sv --top-module tb_c4x_commport_if
./obj_dir/Vtb_c4x_commport_if
```

The full-design test ends in well under a second.

## Departures and own choices

The following follows the original design:

- the split into a host port group, a controller group and comm port
  groups;
- the register and counter set;
- the 64-bit microinstruction with 48 output bits and four sequencer
  instructions;
- the Idle loop with its three checks and three entry points;
- the control-word addresses and the status bit layout;
- all the cycle counts in the budget table.

These parts were filled in here and should be read as such:

- **The microprogram itself.** Every sequence, field position and
  condition code is this design's own. It was built to meet the original's
  cycle counts, and it meets all of them.
- **The HPIA tag register.** The original reloads HPIA only when needed,
  but does not say how it knows.
- **The half-word order**: most significant half first.
- **The HPIC bit positions**: HINT is bit 2, DSPINT is bit 1. They are
  taken from the C6x HPI definition.
- **How done flags clear**: by loading a non-zero count.
- **Reset**: synchronous, registers to zero, done flags set.
- **The two-clock `EXT_INT_4` pulse.**
- **One-hot SETUPCOM.**
- **The boot loader as its own state machine** with a writable image
  memory. It stands in for code held in FPGA memory at configuration time.
- **Ports 2 to 4.** The original built and measured one port and only
  sketched the multi-port version. Ports 2–4 follow that sketch.
