# Variable bit rate CELP speech coder: analysis DSP and storage bit stream

This RTL is the hardware side of a low-complexity speech coder for voice
recorders and similar portable devices. The coder is a CELP coder in the
style of FS1016: 8 kHz speech, 30 ms frames of 240 samples, and 138 bits per
frame of active speech (4.6 kbit/s). A silence compression scheme adds a
variable bit rate. A voice activity decision marks each frame as speech or
background noise. Speech frames are stored whole. A run of 1 to 16 noise
frames is stored as a single 47-bit *silence description* (SID) frame, which
holds the average noise spectrum and gain.

The design has two parts that share a clock and reset:

1. **A 16-bit micro-programmed DSP** (`dsp_core`). It is organised like the
   Motorola DSP56001 so that DSP56001 analysis programs can be carried over
   with few changes, but its data path is 16 bits wide instead of 24. It runs
   the spectral analysis front end of the coder. The default program image
   windows a 240-sample frame and computes its autocorrelation.
2. **The storage bit stream path.** `vbr_bitstream_writer` packs regular
   frames and SID frames into one continuous stream of 16-bit storage words.
   `vbr_bitstream_reader` splits a stored stream back into frames for the
   decoder.

`vbr_coder` is the top level and holds both parts. The rest of the coder
stays outside the RTL and connects through ports:

- the voice activity detector;
- the SID parameter averaging and quantisation;
- the codebook searches;
- the decoder's speech or noise synthesis;
- the storage memory.

## Files

| file | contents |
|---|---|
| `rtl/dsp_pkg.sv` | widths, instruction encoding, control structs of the DSP |
| `rtl/dsp_core.sv` | the DSP: ALU, AGU, controller, memories, bus switch, host interface |
| `rtl/dsp_alu.sv` | data ALU |
| `rtl/dsp_agu.sv`, `rtl/dsp_addr_unit.sv` | address generation unit and its address arithmetic |
| `rtl/dsp_cu.sv`, `rtl/dsp_prog_rom.sv` | controller (fetch, decode, jumps, DO loops) and program ROM |
| `rtl/dsp_mem.sv` | one data memory space (256 RAM + 256 ROM words) |
| `rtl/dsp_bus_switch.sv` | X, Y and global data busses |
| `rtl/dsp_host_if.sv` | 8-bit PC port / 16-bit DSP port |
| `rtl/dsp_prog_autocorr.hex` | default program image (73 instructions) |
| `rtl/dsp_yrom_tables.hex` | Y ROM image: half of a 240-point Hamming window, high-pass filter coefficients |
| `rtl/vbr_pkg.sv` | frame sizes and the SID frame layout |
| `rtl/vbr_bitstream_writer.sv`, `rtl/vbr_bitstream_reader.sv` | storage bit stream |
| `rtl/vbr_coder.sv` | top level |
| `tb/tb_*.sv` | one self-checking testbench per module; `tb_vbr_coder` is the end-to-end test |
| `tb/dsp_cu_test.hex` | small program used by the controller testbench |

## The DSP

### Organisation

Three units run in parallel, and each instruction takes one clock:

- **Data ALU** (`dsp_alu`):
  - four 16-bit input registers X0, X1, Y0 and Y1;
  - a 16x16 fractional multiplier, whose product is shifted left by one;
  - a 40-bit adder;
  - two accumulators A and B, each 8 extension bits plus 32 bits;
  - a stage after the adder that shifts, limits, rounds and normalises.
- **Address generation unit** (`dsp_agu`):
  - R0-R7, N0-N7 and M0-M7, all 10 bits wide;
  - two address units: the X unit owns R0-R3, N0-N3 and M0-M3, and the Y unit owns R4-R7, N4-N7 and M4-M7;
  - each unit can form one address per cycle and update its pointer.
- **Controller** (`dsp_cu`):
  - fetches 24-bit instructions from a 1024-word ROM and decodes them;
  - runs conditional jumps;
  - runs nested hardware DO loops with a loop stack.

There are two data spaces, X and Y. Each has 256 words of RAM at addresses
0x000-0x0FF and 256 words of ROM at 0x100-0x1FF. Other addresses, up to the
10-bit limit of 1024, read as zero. Reads are asynchronous and writes are
taken at the clock edge.

Three busses connect the units: the X data bus, the Y data bus and a global
bus. ALU registers sit directly on the X and Y busses. The AGU registers,
the host registers and immediates travel on the global bus. The bus switch
(`dsp_bus_switch`) is built from multiplexers, not tri-states.

In the best case one instruction does four things at once: an arithmetic
operation, an X memory move, a Y memory move, and an update of both pointers.
For example, `mac x0,y0,a  x:(r0)+,x0  y:(r4)+,y0`.

### Timing of the controller

The instruction register holds the instruction that is executing. The
program ROM is read asynchronously, at the address the controller computes
for the next instruction in the same cycle. That next address is one of:

- pc + 1;
- a jump target;
- the start of a loop;
- the address after a loop.

As a result:

- taken jumps, loop returns and loop exits cost no extra cycle;
- the instruction at address 0 executes in the first clock after reset;
- STOP holds the program counter, and `halted` goes high.

A DO pushes three values onto the loop stack: the loop counter, the start
address and the end address. A DO with a count of 0 skips the body.

The stack is 4 levels deep (`LOOP_DEPTH`). A fifth nested DO sets
`loop_err`, and its push is dropped. Two nested loops must not end at the
same address.

### Instruction encoding

All instructions are 24 bits wide. The encoding is this design's own.

**Parallel format**, op = 0..13:

`op[23:20] | src[19:17] | d[16] | xmove[15:8] | ymove[7:0]`

| op | 0 NOP | 1 MPY | 2 MPYR | 3 MAC | 4 MACR | 5 RND | 6 DIV | 7 NORM | 8 ADD | 9 SUB | 10 NEG | 11 ABS | 12 CLR | 13 TFR |
|---|---|---|---|---|---|---|---|---|---|---|---|---|---|---|

- `d` selects the destination accumulator: 0 is A, 1 is B.
- For multiplies, `src` selects the operand pair:
  - 0 X0·Y0, 1 X0·Y1, 2 X1·Y0, 3 X1·Y1;
  - 4 X0·X0, 5 X1·X1, 6 Y0·Y0, 7 Y1·Y1.
- For ADD, SUB and TFR, `src` selects the operand: 0-3 are X0, X1, Y0, Y1; 4-7 are the other accumulator.
- For DIV, `src[1:0]` selects the divisor.
- For NORM, `src` selects the address register Rn that counts the exponent.

Each move field is `kind[7:6] | reg[5:4] | rr[3:2] | mode[1:0]`:

- `kind` is 1 for a load and 2 for a store.
- `reg` selects X0, X1, A or B on the X bus, and Y0, Y1, A or B on the Y bus.
- `rr` selects one of the four address registers of that space's bank.
- `mode` selects (R), (R)+, (R)- or (R)+N.

**Control format**, `4'hE | sub[19:16] | payload`:

| sub | instruction | payload |
|---|---|---|
| 0 | NOP / STOP | bit 15 = STOP |
| 1 | Jcc | cc[13:10], target[9:0] |
| 2 | DO #count | count[15:10] (0..63), last address of the body[9:0] |
| 3 | DO register | register code[14:10], last address[9:0] |
| 4 | MOVE register to register | source[9:5], destination[4:0] |
| 5 | single memory move | space[15] (0 X, 1 Y), store[14], register[13:9], rr[8:7], mode[6:4] (adds (R)-N) |
| 6 | ASL / ASR / CMP | op[3:0] (1 ASL, 2 ASR, 3 CMP), d[4], source[7:5] |

**Immediate format**, `4'hF`:

- Bit 19 = 0 loads a 16-bit value into X0-B.
- Bit 19 = 1 loads a 10-bit value into R, N or M. Bits [18:17] select the group (0 R, 1 N, 2 M), bits [16:14] select the index, and bits [9:0] hold the value.

**Register codes** (5 bits), used by register moves, single moves and DO:

| code | register |
|---|---|
| 0-5 | X0, X1, Y0, Y1, A, B |
| 6 | HOST: the receive word when read, the transmit word when written |
| 7 | HSTAT, the DSP status register |
| 8-15 | R0-R7 |
| 16-23 | N0-N7 |
| 24-31 | M0-M7 |

**Condition codes**: AL EQ NE PL MI GE LT GT LE CC CS LC LS RXE TXF NV
(codes 0-15).

- RXE is true while the host receive word is empty.
- TXF is true while the transmit word has not been taken.
- Programs poll the host with `jrxe *` and `jtxf *`.

### Arithmetic details

- **Fractional multiply**: the 32-bit product goes into bits 31..0 of the accumulator, sign-extended. −1 × −1 gives +1.0, which the extension bits hold.
- **Rounding** (MPYR, MACR, RND): add 0x8000 and clear the low 16 bits. This is ordinary two's-complement rounding, not the DSP56001's convergent rounding.
- **Limiting** happens when A or B is read onto a 16-bit bus:
  - If the extension is in use, the value read is 0x7FFF or 0x8000.
  - The sticky L flag is set.
  - The accumulator itself keeps its value.
- **DIV** performs one non-restoring step, with the quotient bit going into the carry, as on the DSP56001. Start with a dividend `a` in A1 and CLR'd carry (CLR clears C). Sixteen DIV steps by a positive divisor `s > a` then leave floor(a·2^15/s) in A0.
- **NORM** performs one step:
  - If the accumulator is unnormalised, it shifts left one bit and decrements Rn.
  - If the extension is in use, it shifts right one bit and increments Rn.
- **Flags**: N, Z, V, C, E (extension in use), U (unnormalised) and L (limited).
- There are no logical instructions.

### Address arithmetic

- M = 0x3FF selects linear arithmetic.
- Any other M selects modulo M+1. The buffer starts at the multiple of the next power of two that holds it, as on the DSP56001.
- N is added or subtracted for the (R)+N and (R)-N modes.
- After reset, R = N = 0 and M = 0x3FF.

### Host interface

The PC side is an 8-bit port:

| address | write | read |
|---|---|---|
| 0 | receive low byte | transmit low byte |
| 1 | receive high byte (completes the word) | transmit high byte (completes the read) |
| 2 | - | DSP status register |
| 3 | - | flags `{6'b0, tx_full, rx_full}` |

A PC write while `rx_full` is set is ignored. A DSP write to HOST while
`tx_full` is set is ignored. The PC port is synchronous to the DSP clock:
`host_wr` and `host_rd` are one-cycle strobes, and `host_rdata` is
combinational.

### The default program

`rtl/dsp_prog_autocorr.hex` has 73 instructions. It does one frame of the
analysis front end and the first step of the LPC recursion:

1. **Receive.** Clear X:0..3, which become the filter's initial history.
   Then poll RXE and store 240 host words at X:4..243.
2. **High-pass filter.** A second-order Butterworth high-pass filter at
   100 Hz, in direct form I:

       y[n] = b0·x[n] + b1·x[n−1] + b2·x[n−2] + c1·y[n−1] + c2·y[n−2]

   - The coefficients are stored halved in Q15 at Y:0x180..0x184, because
     b1 and c1 are larger than 1 in magnitude.
   - R4 steps through them with M4 = 4 (modulo 5), so it returns to the
     first coefficient by itself after each sample. The table is aligned
     to 8 words for this.
   - R0 walks backwards over x[n], x[n−1], x[n−2], y[n−1] and y[n−2]. Then
     (R0)+N0 with N0 = 5 moves it on to the next sample.
   - One MPY and four MACs form the sum. ASL doubles it and RND rounds it.
   - y[n] is written to X:n+2, over x[n−2], which is no longer needed. So
     the filtered frame ends up at X:2..241.
   - Each sample takes 9 instructions.
3. **Window, first half.** Restore M4 to linear. Multiply each filtered
   sample by the window with MPYR. The window sits in Y ROM at 0x100,
   holding w[0..119]. Write the result back in place in X RAM (X:2..). Also
   write it to Y RAM starting at Y:0, so that the two copies can later be
   read in parallel. This half runs as nested loops, DO 60 around DO 2.
4. **Window, second half.** Read the window backwards from 0x177, because the
   window is symmetric. The loop count comes from a register.
5. **Autocorrelation.** For each lag k = 0..10, form
   `r[k] = Σ x[n]·x[n−k]` over n = k..239 with MAC, in a register-count loop
   of 240−k iterations. R2 holds k + 2, the X address of the lag-shifted
   operand. R3 holds 240−k. Both are stepped by
   moves whose only purpose is the pointer update.
6. **Send.** Shift A right arithmetically 8 times (`DO #8` around ASR). Poll
   TXF, then send the limited high word of A to the host. The same word is
   kept at Y:240+k; the R2 step move does this store in parallel, so the
   loop costs no extra instruction.
7. **First reflection coefficient.** Compute k1 = −r1/r0 in Q15. The steps:
   - Load r1 and take its absolute value.
   - CLR B to clear the carry.
   - Run 16 DIV steps by r0. The quotient ends up in A0.
   - Read the high word of A, which holds the remainder. Subtract it, so that
     A holds only the quotient.
   - Shift left 16 times (`DO #16` around ASL) to move the quotient into the
     high word.
   - Negate it when r1 > 0. A conditional jump on the flags of `NEG B`
     decides this.
   - Send k1 as the twelfth word.

   The result is |r1|·2^15/r0 truncated toward zero. It is valid because
   |r1| < r0 for any autocorrelation that is not zero.
8. **Finish.** Write 1 to the status register, then STOP.

The window table in Y ROM is

    w[n] = round(32768 · (0.54 − 0.46·cos(2πn/239))), n = 0..119,

with the value capped at 32767. The filter coefficients come from the
bilinear transform, with K = tan(π·100/8000) and g = 1/(1 + √2·K + K²):

    b0 = b2 = g,  b1 = −2g,  c1 = 2(1 − K²)·g,  c2 = −(1 − √2·K + K²)·g

Each coefficient is stored as round(coefficient/2 · 32768). The stored
words are 0x3C8B, 0x86EA, 0x3C8B, 0x78E6 and 0xC6BA.

A frame takes 8288 instructions when the host is never slow.

## The storage bit stream

There are two frame types (`vbr_pkg`):

- **Regular frame**: 138 bits, E_PAR, the coded parameters of one active speech frame.
- **SID frame**: 47 bits, laid out as

      SID_MARK 1110 (4) | AV_LSP (34) | AV_SCG (5) | SID_LEN (4)

  SID_LEN holds the run length minus one, so 0..15 means 1..16 frames of 30 ms.

The marker 1110 can never begin the LSP field of a regular frame, so the
first four bits of each frame tell the reader which type it is. The writer
asserts that no regular frame starts with 1110.

**Writer** (`vbr_bitstream_writer`):

- It accepts one frame each 30 ms on a valid/ready handshake, with its VAD flag.
- Speech frames are queued for storage as they are.
- Silent frames are only counted (`run_len`).
- The SID frame for a run is queued in three cases:
  - ahead of the regular frame, when speech resumes;
  - together with the 16th silent frame;
  - on `flush`, the end of the recording.
- AV_LSP and AV_SCG are sampled when the SID frame is queued. Averaging them over the run is done outside.
- Frames are written back to back, most significant bit first, into 16-bit words. Each word appears for one cycle on `word_valid`.
- Flush pads the last partial word with zeros.
- It moves one bit per clock, so a frame takes at most 185 cycles plus one. `frame_ready` stays low meanwhile.

**Reader** (`vbr_bitstream_reader`):

- It takes a 16-bit word whenever it has used up the previous one, through `word_ready`, and reads one bit per clock.
- For each frame it emits a one-cycle `frame_valid` with `is_sid`.
  - A regular frame comes out on `e_par`.
  - A SID frame comes out on `av_lsp`, `av_scg` and `sid_frames` (1..16).
- The zero padding after the last frame is not a frame. The reader simply stops receiving words.

## Top level: `vbr_coder`

- The DSP brings out its host port, `halted`, `loop_err`, the program address and both accumulators.
- The writer takes frames on `frame_*` and writes words on `store_*`.
- The reader takes words on `load_*` and gives frames on `dec_*`.

Connect `store_*` to `load_*` through a memory to record and play back.

Parameters and their defaults:

| parameter | default |
|---|---|
| `PROG_FILE` | `rtl/dsp_prog_autocorr.hex` |
| `XROM_FILE` | empty |
| `YROM_FILE` | `rtl/dsp_yrom_tables.hex` |
| `RAM_WORDS` | 256 |
| `ROM_WORDS` | 256 |
| `LOOP_DEPTH` | 4 |

## Where this design departs from, or adds to, its source description

The architecture follows the published design: the unit split, the word
widths, the register set, the memory sizes, the addressing modes, the ALU
operation list, the host interface registers, single-cycle instructions with
overlapped fetch, nested hardware loops, and the frame sizes and SID layout.

The following are this design's own choices:

- The instruction encoding, the condition codes, and the STOP, ASL/ASR/CMP and single-word DO instructions.
- Rounding rule, limiting point and flag set, all modelled on the DSP56001.
- Parallel moves can load X0 and X1 only from the X bus, and Y0 and Y1 only from the Y bus. The single memory move reaches any register from either space.
- The loop stack depth of 4, and its overflow flag.
- The memory map: RAM low, ROM high.
- The host register addresses, byte order and flag rules.
- The ROM contents. The original tables (filter coefficients, LSP quantisation table, bandwidth expansion factors) are not available. The Y ROM holds the Hamming window and this design's own filter coefficients.
- The program. Only high-pass filtering, windowing, autocorrelation and the first reflection coefficient are written. The rest of the LPC recursion, bandwidth expansion and LSP quantisation are not. The filter (2nd-order Butterworth at 100 Hz) is this design's choice, because the original coefficients are not available. The shift by 8 before a lag is sent keeps every lag within 16 bits for full-scale input, at the cost of precision for quiet frames.
- The storage word width, bit order and handshakes, the SID_LEN = length − 1 coding, and the moment at which a SID frame is written.

Known limits:

- At the default sizes the memories hold 24576 bits of program ROM plus 16384 bits of data memory. That is more than the 32768 bits of memory in the FPGA the original ran on. A real fit needs a shorter program ROM (`DEPTH` of `dsp_prog_rom`) or ROM in logic.
- The voice activity detector, the SID parameter averaging and quantisation, the codebook searches and the decoder's synthesis are outside this RTL.

## Simulation

Run from the repository root, because the ROM images are loaded by paths
relative to it (`rtl/...hex`). Compile the two packages first:

    verilator --binary --timing --assert -Wno-fatal \
      rtl/dsp_pkg.sv rtl/vbr_pkg.sv \
      $(ls rtl/*.sv | grep -v _pkg) tb/tb_vbr_coder.sv \
      --top-module tb_vbr_coder -o sim
    ./obj_dir/sim

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself.
Each has a watchdog.

**`tb_vbr_coder`** is the end-to-end test, run at the default parameters
(a few tens of thousands of clock cycles). It runs two things at once:

- **DSP path.** A host sends a random 240-sample frame to the DSP. The testbench checks the 11 lags and k1 against its own fixed-point model of the program, filter included. It also checks the cycle spacing of the transmitted lags: lag k+1 follows lag k by 256−k clocks, which shows that loops and jumps cost nothing.
- **Storage path.** It records 200 frames with a random speech/silence pattern through the writer into a memory model. It then plays the words back through the reader and compares every decoded frame. The decoded frames must account for all 200 input frames.

It fails if any of these never happened:

- host receive polling;
- transmit polling;
- a loop return;
- a nested loop;
- the 16 division steps;
- a SID frame closed by speech;
- a SID frame closed by the 16-frame limit;
- a SID frame closed by the flush;
- padding of the last word;
- the writer holding off a frame.

The default program uses modulo addressing, (R)+N, MPY, MAC, MPYR, RND, ABS,
NEG, SUB, CLR, DIV, ASL and ASR. It does not use NORM, TFR, ADD, MACR or the
(R)−N mode. Limiting happens only if a value overflows. The features the
program leaves out are covered by the ALU and AGU testbenches.

**Per-module testbenches:**

| testbench | what it checks |
|---|---|
| `tb_dsp_core` | the DSP alone, the same frame |
| `tb_dsp_alu` | every operation and flag against a reference model, with random operands |
| `tb_dsp_agu` | all address modes, linear and modulo, both banks |
| `tb_dsp_mem` | RAM writes, ROM image, unmapped addresses |
| `tb_dsp_bus_switch` | every routing case, with random values |
| `tb_dsp_host_if` | both directions, the blocking flags, the status register |
| `tb_dsp_cu` | a cycle-by-cycle pc trace of `tb/dsp_cu_test.hex`: nested DO, DO #0, register DO, taken and untaken jumps, polling, stack overflow, STOP |
| `tb_dsp_prog_rom` | every ROM address against the image |
| `tb_vbr_bitstream_writer` | 400 frames, word for word, against a bit-level model; one cycle per stored bit |
| `tb_vbr_bitstream_reader` | 300 frames from a generated stream |

To run other code on the DSP, assemble it into a 24-bit hex image using the
encoding above, one word per line. Pass the image as `PROG_FILE`, and load
any tables through `XROM_FILE` or `YROM_FILE`. Each image holds up to 256
words, loaded at ROM offset 0, which is address 0x100 of the space.
