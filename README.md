# Duck Hunt SoC: a MIPS system with DDR2, DVI video, AC'97 audio and a light gun

This is a small system-on-chip built for an FPGA to play the light-gun game Duck Hunt.
A five-stage MIPS32 core has no cache. Each of its fetches, loads and stores goes over a 64-bit shared
bus to DDR2 memory, to a boot ROM or to a device register. Two DMA engines read the same
bus to stream a frame buffer to a DVI transmitter and samples to an AC'97 codec. A PS/2
keyboard and an NES Zapper light gun each raise an interrupt line into the core.

The main idea is one memory bus that everything shares. It moves 32-byte lines as four
64-bit beats, and a fixed-priority arbiter gives the real-time streams (video, then audio)
precedence over the processor. Clock-crossing FIFOs let every part run at its own rate:

| Domain | Clock | Contents |
|---|---|---|
| core | 50 MHz | `mips_core`, core side of `mips_adapter` |
| bus | 125 MHz (from the DDR2 controller) | `bus_arbiter`, `mig_ctrl`, `boot_rom`, DMA registers, `ps2_kbd`, `zapper` |
| pixel | 50 MHz | `dvi_ctrl`, `ch7301_i2c` |
| AC-link | 12.288 MHz bit clock from the codec | `ac97_ctrl` |
| keyboard | PS/2 clock (~10-17 kHz) | sampled in the bus domain, no FIFO |

```
                 core clock            |              bus clock (125 MHz)
 mips_core --imem/dmem-- mips_adapter ==FIFO==> [3 masters]                     +--> mig_ctrl --> DDR2 controller (external)
   (cp0, muldiv, regfile, alu)          |              \                         +--> boot_rom
                                        |          bus_arbiter + bus register ---+--> dma_ctrl x2 (registers)
 dvi_ctrl <==FIFO== dma_ctrl (DVI) -----|--------- [master 0]                    +--> ps2_kbd
 ac97_ctrl <==FIFO== dma_ctrl (AC'97) --|--------- [master 1]                    +--> zapper
 ch7301_i2c (DVI chip set-up over I2C)
```

## The bus and its arbiter (`bus_arbiter`)

The bus is a single registered word: `{valid, addr[28:0], data[63:0]}` (`soc_pkg::bus_t`).
Each device drives its contribution, `drv`, and the contributions are ORed. A device drives
zeros when it has nothing to say. The OR is registered inside the arbiter, so every device
sees the bus one cycle after it was driven. That register is the bus's one-cycle latency.

There are five masters, in fixed priority order:

0. DVI DMA read
1. AC'97 DMA read
2. core data read
3. core instruction read
4. core data write

A master holds `m_req` high with a stable `m_addr`, `m_we` and `m_burst` until it gets a
one-cycle `m_gnt` or a one-cycle `m_err`. Its `m_busy` falls for that cycle. An assertion
checks the hold rule.

The arbiter is a small state machine. In IDLE it takes the highest-priority request and
decodes the target from the address:

- **Refusal.** The request is refused with `m_err` if:
  - no device is at the address;
  - it is a burst to a device register;
  - it is a write to the ROM;
  - it is beyond the ROM's size.
- **Waiting for the target.** If the target's `t_ready` is low, the arbiter waits. It
  checks again on every cycle, so a higher-priority request that arrives meanwhile wins.
- **Read.** On the grant the arbiter puts the address on the bus and pulses the target's
  `t_cmd` in the same cycle. The target answers with 1 beat or 4 beats, each with `valid`
  high. Only the owning master listens.
- **Write.** From the cycle after its grant, the master drives its beats with the address
  on each beat. `t_cmd` reaches the target together with the first beat.

Only one transaction is on the bus at a time. After the last beat the arbiter returns to IDLE.

From a request in an idle system, the grant comes one cycle later. Read data arrives at
least three cycles after the grant: the first beat comes two cycles after the command for
the ROM, and later for DDR2.

## Memory map

The core uses MIPS virtual addresses. Both kseg0 (`0x80000000`) and kseg1 (`0xA0000000`)
map to physical address 0 by dropping the top three bits. The reset vector `0xBFC00000` is
physical `0x1FC00000`.

| Physical address | Device | Access |
|---|---|---|
| `0x00000000`-`0x0FFFFFFF` | DDR2 (256 MB) | single beats and 4-beat bursts |
| `0x1F000000` + `0x000` | DVI DMA registers | single 64-bit beats |
| `0x1F000000` + `0x100` | AC'97 DMA registers | single 64-bit beats |
| `0x1F000000` + `0x200` | keyboard register | single read |
| `0x1F000000` + `0x300` | light-gun register | single read |
| `0x1FC00000`, `ROM_WORDS*8` bytes | boot ROM | reads only |

Within a device page, address bits [5:3] select the register. Each register sits in the
low bits of its 64-bit word. A 32-bit load of the low word at offset `8*n` reads register
`n`.

Each line is an interrupt, and the interrupts go to Cause.IP:

| Cause.IP | Source |
|---|---|
| IP2 | DVI DMA |
| IP3 | AC'97 DMA |
| IP4 | keyboard |
| IP5 | light gun |
| IP7 | Count/Compare timer |

## The core (`mips_core`, `mips_alu`, `mips_regfile`, `mips_muldiv`, `mips_cp0`)

The core is a classic IF/ID/EX/MEM/WB pipeline. It runs the MIPS32 integer instructions
without a TLB:

- arithmetic, logic and shifts;
- branches with a delay slot, jumps, `jal`/`jalr`;
- byte, half-word and word loads and stores;
- `mult`/`multu`/`div`/`divu` and the HI/LO moves;
- `mfc0`/`mtc0`, `eret`, `syscall`, `break`.

- **Forwarding.** Results are forwarded into EX from MEM and from WB. The register file
  also writes through, so an instruction in ID sees a value being written in the same
  cycle.
- **Load-use stall.** A load or `mfc0` followed by an instruction that uses its result
  stalls one cycle.
- **Branches.** Branches resolve in EX. The delay slot executes; the instruction fetched
  after it is squashed.
- **Multiply and divide.** Multiply takes one cycle. Divide is a 32-cycle restoring
  divider. An instruction that reads HI/LO, or starts another operation while a divide
  runs, stalls.
- **Memory waits.** Both memory ports use a level request with a one-cycle `ready`. While
  an access is outstanding, the whole pipeline holds.
- **Exceptions and interrupts.** These are recorded with the instruction that carries
  them and acted on when it reaches WB. The pipeline is then flushed, EPC and Cause are
  written, and fetching restarts at the handler. Interrupts are sampled when an
  instruction is in EX. The handler is at `0xBFC00380` while Status.BEV = 1 and at
  `0x80000180` otherwise.
- **Exception causes.** The core raises:
  - syscall, break and reserved instruction;
  - signed overflow;
  - address error on misaligned loads and stores;
  - bus error (instruction or data) when the bus refuses an access.
- **Coprocessor 0.** Holds Status, Cause, EPC, BadVAddr, Count, Compare and PRId. Count
  counts every core cycle. Writing Compare clears the timer interrupt.

## The adapter (`mips_adapter`)

The adapter stands where a cache would be, with none of a cache's storage. It turns each
core access into a packet of `{kind, burst, physical address, 256-bit data}` and passes it
to the bus clock through `async_fifo`. The reply is the 256-bit line plus an error flag,
and it comes back through a second FIFO.

- **Memory reads.** Memory and ROM are read as whole 32-byte lines in 4-beat bursts. A
  shift register gathers the beats, and the adapter picks the addressed 32-bit word.
- **Device reads.** Device registers are read as a single beat.
- **Stores.** A store is a read-modify-write:
  1. the line (or the single beat) is read;
  2. the bytes of the store are merged in under the byte mask;
  3. the result goes back as a write packet.

  The store completes once the write has been granted. This is slow, but it needs no
  write mask on the bus, and the memory side always writes whole lines or whole beats.
- **Masters.** The adapter is three bus masters: data read, instruction read and data
  write. This is so the arbiter's priority applies to them.
- **Ordering.** Data accesses go before fetches, and only one packet is in flight. The
  core therefore sees its accesses complete in program order.

## Memory controller wrapper (`mig_ctrl`)

The wrapper sits between the 64-bit bus and a Xilinx-style DDR2 controller user
interface. That interface uses 128-bit words, two words per burst:

- a command/address FIFO: `app_af_cmd` (3'h1 read, 3'h0 write), `app_af_addr` and
  `app_af_wren`;
- a write-data FIFO: `app_wdf_data` with `app_wdf_mask_data`;
- read data: `rd_data_fifo_out` and `rd_data_valid`.

- **Reads.** The two returned 128-bit words go into two 128-bit buffers, then onto the bus
  as four beats on consecutive cycles. A single read sends only the addressed beat.
- **Writes.** The first three beats are shifted into three 64-bit registers. When the
  fourth beat is on the bus, the wrapper writes the command and the first 128-bit word.
  The second word follows on the next cycle.
- **Single writes.** A single-beat write sends both words, masked so that only its
  8 bytes are written.
- **Acknowledgement.** Writes are not acknowledged; they are assumed to succeed.
- **Readiness.** `t_ready` is low when any of these holds:
  - a transfer is in progress;
  - the controller has not finished initialising;
  - either of its FIFOs is almost full.

The address given to the controller is the line-aligned 64-bit-word address.

## DMA streaming (`dma_ctrl`, `async_fifo`)

Both output devices use the same DMA controller. Each has six registers:

| Register | Offset | Width | Access |
|---|---|---|---|
| buffer 0 start | 0x00 | 29 bits | read/write |
| buffer 0 end | 0x08 | 29 bits | read/write |
| buffer 1 start | 0x10 | 29 bits | read/write |
| buffer 1 end | 0x18 | 29 bits | read/write |
| control | 0x20 | 1 bit | read/write |
| status | 0x28 | 1 bit | read only |

End addresses are exclusive.

- **Starting.** Software fills both buffers and writes control = 1.
- **Fetching.** The controller then reads the current buffer in 32-byte bursts into a
  64-bit FIFO that crosses into the device clock. It asks for a burst whenever the FIFO is
  not programmed-full, meaning it has room for at least four words. A granted burst
  therefore always fits, and an assertion checks this.
- **Buffer switch.** When a buffer is finished, the controller moves to the other buffer,
  flips `status` and raises its interrupt. The interrupt stays high until software reads
  `status`. Software then refills the buffer that was just finished.
- **Errors.** A refused request clears control.

`async_fifo` is a dual-clock FIFO with Gray-coded pointers and a first-word-fall-through
read port. Its `prog_full` is computed in the write domain from the synchronised read
pointer, so it can stay high a little longer than needed, never too short.

Because the video stream has the top bus priority, the core only gets the bus in the gaps
the streams leave. At 800x600 the DVI stream needs 50 MB/s, which is 5% of the bus's
1000 MB/s peak.

## Video (`dvi_ctrl`, `ch7301_i2c`)

The frame buffer holds one byte per pixel, in 3-3-2 format (`RRRGGGBB`), packed
little-endian: pixel 0 is bits [7:0] of the 64-bit word.

`dvi_ctrl` runs at 50 MHz and generates VESA 800x600 at 72 Hz timing: 1040×666 clocks per
frame with positive sync pulses. All the timing numbers are parameters.

- **Colour.** Each byte is widened to 24 bits by repeating its bits. It is sent as two
  12-bit halves for a double-data-rate output register: `d_rise = {G[3:0], B[7:0]}` and
  `d_fall = {R[7:0], G[7:4]}`.
- **Frame alignment.** Output starts at a frame boundary once the FIFO has data. The first
  byte of a buffer is therefore the top-left pixel.
- **Underrun.** A pixel with no data shows black and increments `underruns`.

`ch7301_i2c` configures the DVI transmitter after reset. It writes five register/value
pairs over open-drain I2C at 100 kHz: `49:C0 21:09 33:08 34:16 36:60`. These are the
usual DVI settings for pixel clocks below 65 MHz. The device address is 0x76. A missing
acknowledge is counted and the sequence goes on. Override `REG_TABLE` for other settings.

## Audio (`ac97_ctrl`)

The AC-link runs on the codec's 12.288 MHz bit clock. A frame is 256 bits: a 16-bit tag
and twelve 20-bit slots. `sync` is high for the tag, and frames repeat at 48 kHz.

- **Codec set-up.** After the codec reports ready, three register writes go out in slots 1
  and 2, one per frame. They take the master, headphone and PCM-out volumes out of their
  muted reset state.
- **Samples.** Slots 3 and 4 carry 16-bit left and right samples. A 64-bit FIFO word holds
  L, R, L, R from the low bits up, so one word lasts two frames.
- **Underrun.** A frame with no sample marks slots 3 and 4 invalid.

## Keyboard and light gun (`ps2_kbd`, `zapper`)

`ps2_kbd` samples the keyboard clock and data at the bus clock through synchronisers.
It shifts a bit in on each falling edge of the keyboard clock and checks start, odd parity
and stop. A good frame stores the key code and raises the interrupt.

- Register layout: `[7:0]` key, `[8]` valid, `[9]` error.
- A read clears the register.

`zapper` latches a trigger pull (the trigger is low-active) and raises the interrupt. Any
light seen after the pull, up to the next register read, sets the detected flag.

- Register layout: `[0]` triggered, `[1]` detected.
- A read clears both flags.

## Top level (`soc_top`)

The top instantiates everything above and brings out the pins of the parts that are
outside the logic:

- the DDR2 controller user interface (`mig_*`);
- the DVI data, sync and I2C lines;
- the AC-link;
- the PS/2 lines;
- the gun lines.

The reset comes from the memory side (`rst_bus`) and is synchronised into each other
domain. Each interrupt line passes through two flip-flops into the core clock.

The boot image is loaded into the ROM from a hex file of 64-bit words with the `ROM_INIT`
parameter, through `$readmemh`.

## Where this design departs from or fills in its specification

- **Bus clock.** The bus, the arbiter and the memory wrapper run on the memory controller's
  125 MHz clock. A 200 MHz bus clock is also quoted for the original system; the
  125 MHz figure is used here because it is what the memory controller provides.
- **DMA FIFO depth.** The DMA FIFO depth is 1024 words rather than 1025, so the Gray-coded
  pointers can be used. The rule "request while at least one burst of room is left" is
  kept.
- **Own choices.** The following were not specified and are this design's own:
  - the address map;
  - the interrupt assignment;
  - the register layouts;
  - the video mode (800x600 at 72 Hz, the standard mode whose pixel clock is 50 MHz);
  - the 3-3-2 colour format;
  - the DVI-chip and codec register tables;
  - the boot ROM size (16 KB; it is a parameter);
  - the divide latency.
- **Not included:** the DDR2 controller itself, the DVI and audio chips, a CompactFlash
  boot path, and the clock generation.

## Simulating

Every testbench in `tb/` is self-checking and ends by printing
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
  --top-module tb_soc_top -y rtl -y tb +libext+.sv -Irtl -Itb \
  rtl/mips_pkg.sv rtl/soc_pkg.sv tb/tb_prog_pkg.sv tb/tb_soc_top.sv
./obj_dir/Vtb_soc_top
```

For the other testbenches, replace the top module and the last file.

Every register that the design reads is reset. Running a simulation with
`+verilator+rand+reset+2` starts all other state at random values; the results must not
depend on those values.

| Testbench | What it tests |
|---|---|
| `tb_soc_top` | The whole system with a 16×4 picture and small buffers. It boots a program from the ROM and checks every result word written to DDR2. The program runs through the syscall, overflow, bus-error, timer and keyboard exception paths. The bench also checks two video frames pixel by pixel (no pixel may go without data), 48 audio samples, the codec commands and the I2C bytes. It counts each mechanism and fails if any never happened: load-use stall, forwarding, squash, multiply/divide stall, interrupts, exceptions, competing requests, bus errors, bursts and single beats, DMA buffer switches, programmed-full, and DDR2 reads and writes. |
| `tb_soc_full` | The same program with `soc_top` at its defaults, running one full 800x600 frame (about 26 ms of simulated time). |
| `tb_mips_core` | The core with memory models that answer after random delays. |
| `tb_mips_adapter` | The adapter with the arbiter, the memory wrapper and the ROM. |
| `tb_bus_arbiter` | Random traffic from five masters to six targets. It checks priority, refusals, data and the one-cycle bus delay. A last phase checks that a lone request is answered within one to three cycles. |
| other benches | One block each, mostly with random stimulus against a reference model. |

`tb/mig_model.sv` is a behavioural model of the DDR2 controller's user interface. It has
an initialisation delay, a command FIFO, a write FIFO and read latency.
