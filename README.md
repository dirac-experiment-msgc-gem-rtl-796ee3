# MSGC/GEM strip readout: VME zero-suppression board and front-end sequencer

A microstrip gas chamber plane with 512 readout strips is read through
sixteen analog pipeline chips. On a trigger, the pipeline cell that holds
the triggered sample is read back, every strip's pulse height is digitised,
and only the strips that stand out from their own baseline are kept. This
RTL implements the digital part of that readout chain:

* the **VME board**, which subtracts a per-strip pedestal from every
  digitised pulse height (DPH), compares the result with a threshold and
  stores the strips above it, in four independent segments of 128 strips
  each, behind a VME A24/D16 interface;
* the **Control Board sequencer**, which stores the control pattern of the
  front-end chips and plays it on each trigger: stop sampling, re-read the
  pipeline, read out the channels, reset the chips, and signal *end of
  busy* (EOB) back to the VME board.

The analog front end (pipeline chips, analog multiplexers, ADCs) is not
logic and is not part of the RTL; a behavioural model in the testbench
stands in for it.

```
            Tc Fc                         Tv Fv        BUSY
             |  |                          |  |          ^
   +---------v--v----------+  dl_wr/dl_bit +--v--v-------+--------------+
   |   cs_sequencer        |<--------------|  vme_board                 |
   |  (Control Board)      |      eob      |   vme_slave -> access_decode
   |  RAM: 32 signals/line |-------------->|   segment 0  strips   0..127
   +---+-------------------+               |   segment 1  strips 128..255
       | apc_ctrl[31:0], cs_phase          |   segment 2  strips 256..383
       v                                   |   segment 3  strips 384..511
   front-end chips, MUX + ADC  --dph[4]--> |                            |
   (not logic; testbench model)            +-------------^--------------+
                                                         | VME A24/D16
```

The trigger and the fast clear are sent twice by the data-acquisition
system, once to each board, so that neither board has to relay them. The
only link from the VME board to the Control Board is the line that carries
the downloaded control sequence; the only link back, besides the four data
streams, is EOB.

## From strip to data word

This is the part of the design that is easiest to get wrong from outside,
because three different strip numberings meet here.

**Multiplexing.** Each segment is fed by four front-end chips of 32 used
channels. The chips are read in parallel at 400 ns per channel, staggered,
and multiplexed onto one stream, so a segment receives one DPH every
100 ns (every second clock of the 20 MHz board clock), 128 per event, in
this order of chips: chip 0, chip 2, chip 1, chip 3, then the next channel
of each. With chip *c* holding detector strips 32·c … 32·c+31 of its
segment, the *k*-th DPH of segment *s* (the "VME strip number") belongs to
detector strip

    det = 128·s + 32·order[k mod 4] + k div 4,   order = {0, 2, 1, 3}

so VME strips 0, 1, 2, 3, 4 are detector strips 0, 64, 32, 96, 1. The
function `msgc_pkg::vme_to_det_strip` computes this.

**Pedestals.** The board never sees detector numbers: it counts DPHs as
they arrive. Its pedestal store therefore holds the pedestals in arrival
order, and the host must load them in that multiplexed order
(`ped[vme_to_det_strip(n)]` for n = 0 … 511). One VME address feeds all four
stores through a daisy chain: a store takes bytes until it holds 128 and
then passes further writes to the next, so bytes 0–127 go to segment 0,
128–255 to segment 1, and so on.

**Per DPH** (`zs_datapath`): the strip counter, cleared by the trigger,
numbers the DPH and addresses the pedestal store; one clock later

    PPH = DPH - pedestal        (0 if the DPH is below its pedestal)
    keep if PPH >= threshold

and a kept strip becomes a data word two clocks after its DPH arrived. The
datapath takes one DPH per clock, twice the rate of the stream.

**Memory words** (16 bits, 32 K words per segment):

| bit 15 | bits 14..8 | bits 7..0 | meaning |
|---|---|---|---|
| 1 | event number (15 bits) | | header, written when a trigger starts an event |
| 0 | VME strip number in segment (0–127) | PPH | one strip above threshold |

The event number is the segment's trigger count after the trigger that
started the event.

## The segment: modes, registers, counters

Each segment behaves as an independent unit (on the original board, one
FPGA each). It has a mode set by one-byte commands:

| command byte | effect |
|---|---|
| 0 | reset: word pointer, trigger counter, BUSY and overflow cleared; the memory is handed to the VME bus (R16 reads memory words) |
| 85 | the pedestal store is emptied, ready for the daisy-chain load |
| 170 | acquisition: the memory is handed to the incoming data; triggers are taken |
| 255 | acquisition stopped; an R16 of the segment returns a status word |

The threshold and the acquisition options sit in one 13-bit
threshold+status register per segment:

| bits | 0 | 1 |
|---|---|---|
| 7..0 | threshold | |
| 8 | a trigger later fast-cleared stays counted | it is taken off the count |
| 9 | a trigger arriving while BUSY is counted | it is not counted |
| 11..10 | status word: `00` words written, `01` this register, `10` trigger count, `11` zero | |
| 12 | BUSY only from trigger to EOB | BUSY also held while the memory is full |

**Event flow in acquisition.** A trigger that finds BUSY low increments the
trigger counter, raises BUSY, writes the header and clears the strip
counter; data words follow as the DPHs arrive. EOB from the Control Board
lowers BUSY. A trigger that finds BUSY high starts nothing and is only
counted (unless bit 9 is set). A fast clear during an event throws the event
away: the word pointer returns to where the header was written. When the
memory is full, further words are dropped and an overflow flag is set; with
bit 12 set BUSY stays high until a reset command, so the data-acquisition
system stops sending triggers.

All four segments receive the same triggers, so their trigger counts must
agree; comparing them is a cheap health check.

## Host view

The board answers in a 256 KB window of the A24 space. Its base is set by
six jumper pins that give address bits A23..A18 (pin 16 = A23 … pin 11 =
A18; open = 1, grounded = 0), so bases run from 0x000000 to 0xFC0000 in
steps of 0x040000, default 0xFC0000. Only three access types are used: W8
(a byte written), W16 (a word written) and R16 (a word read). With BADD the
base and byte offsets:

| access | offset | function |
|---|---|---|
| W8 | 0x00000 | command byte to all four segments |
| W8 | 0x10000, 0x20000, 0x30000 | command byte to segment 1, 2, 3 only |
| W8 | 0x00001 | one bit (0 or 1) of the control sequence, passed to the Control Board |
| W8 | 0x20001 | one pedestal byte into the daisy chain |
| W16 | 0x10000·s | threshold+status register of segment s |
| R16 | 0x10000·s + 2·i | segment s: memory word i (after command 0) or status word (otherwise) |

Segment s thus starts at word position 0x8000·s. The operating procedures:

* **pedestal load**: W8 0, W8 85, then 512 × W8 at +0x20001 in multiplexed
  order;
* **threshold+status load**: W8 0, W8 255, W16 to segment 0; then for
  s = 1..3 W8 255 at the segment's base and W16 to it;
* **acquisition**: W8 170;
* **status check**: W8 255, then R16 of each segment; switching bits 11..10
  with W16 walks through words written, register, trigger count;
  acquisition may resume with W8 170;
* **memory read**: after the word counts are known, W8 0, then R16 of words
  0 … n−1 of each segment.

The green LED lights for 50 ms after every access to the board.

## Control Board sequencer

The front-end control pattern is a table of 32-bit lines, one line per
clock, each bit one control signal of the chips. The table is downloaded
one bit per VME W8 and arrives as 36-bit frames, most significant bit
first: a 4-bit command code and a 32-bit payload.

| code | command | payload |
|---|---|---|
| 0 | reset | none; stops running mode, next line goes to RAM line 0 |
| 1 | RAM write | the next line |
| 2 | FIFO write | ignored |
| 3 | DELAY write | [15:0] number of re-read lines |
| 4 | running mode | [31:16] readout lines, [15:0] reset lines; triggers accepted from now on |

The table is laid out as: line 0, the sampling pattern, output while
waiting; then the re-read lines, the readout lines and the reset lines. A
trigger starts the walk through them; EOB pulses on the last reset line
and sampling resumes. A fast clear during re-read jumps straight to the
first reset line, so the chips are reset without being read; a fast clear
later in the sequence is ignored. After power-up the lengths are 240
re-read lines (12 µs), 256 readout lines (32 channels × 400 ns) and 20 reset
lines; the RAM holds 1024 lines. The frame format, the command codes, the
table layout and the reset length are this implementation's own; the
original description gives only the command names, the 32 signals per line
and the order of the steps.

## Timing at a glance (20 MHz clock)

| quantity | clocks |
|---|---|
| trigger/fast-clear input to internal pulse | 2–3 (inputs must be ≥ 50 ns) |
| trigger pulse to header write | 1 |
| DPH to data word written | 2 |
| DPH rate accepted / delivered by the front end | 1 per clock / 1 per 2 clocks |
| one event: re-read + readout + reset | 240 + 256 + 20 = 516 |
| VME read: request to data | 2 (plus strobe synchronisation) |

## Choices made here, and limits

Taken from the original description: the split into four segments of 128
strips; the 32 K × 16 memories; the word layout; the command bytes and
addresses; the register bits and counting rules; the daisy-chained
pedestal load; the base-address pins; the order and fast-clear rule of the
front-end sequence; the strip multiplexing order; the 20 MHz clock.

Chosen here, where the description is silent or ambiguous:

* one clock for both boards; 8-bit DPH with a valid strobe per stream; a
  bit-plus-strobe download line;
* a DPH below its pedestal gives PPH 0;
* the event number is the trigger count; a fast clear rewinds the word
  pointer; command 0 keeps threshold and pedestals;
* a W8 at the base goes to all segments, at a segment base to that segment
  only; memory reads follow command 0 (not 255);
* 16-bit accesses are addressed by byte, with segment offsets of
  0x10000 bytes (0x8000 words);
* BUSY is the OR of the four segments;
* accepted address modifiers 0x39, 0x3A, 0x3D, 0x3E; W8 even byte on
  D15..D8, odd byte on D7..D0;
* the pedestal store is an indexed RAM read by the strip counter, which
  behaves like a FIFO whose output is written back;
* the whole Control Board download protocol (see above); the meaning of
  FIFO write is unknown and the command does nothing.

Not in the RTL: the pipeline chips, the analog multiplexers and ADCs, the
cables and ECL receivers.

## Files

| file | contents |
|---|---|
| `rtl/msgc_pkg.sv` | shared constants, register struct, modes, word and strip-mapping functions |
| `rtl/msgc_readout.sv` | top: VME board + sequencer |
| `rtl/vme_board.sv` | VME board: slave, decoder, four segments, pedestal chain, BUSY |
| `rtl/vme_slave.sv`, `rtl/base_addr_match.sv` | VME handshake, board select |
| `rtl/access_decode.sv` | access → command |
| `rtl/vme_segment.sv` | one segment: modes, registers, counters, memory sharing |
| `rtl/zs_datapath.sv`, `rtl/pedestal_fifo.sv`, `rtl/data_memory.sv` | per-strip datapath, pedestal store, data memory |
| `rtl/cs_sequencer.sv` | Control Board sequencer |
| `rtl/pulse_sync.sv` | trigger/fast-clear synchroniser |
| `tb/tb_<module>.sv` | self-checking testbench of each module |
| `tb/tb_msgc_readout.sv` | end-to-end run with small memories: overflow, fast clear, busy triggers, status walk |
| `tb/tb_msgc_readout_full.sv` | one complete operation at full size |
| `tb/tb_segment_occupancy.sv` | every strip above threshold: 254 events fill a 32 K-word segment, the 255th overflows |
| `tb/tb_pulse_sync.sv` | 50 ns trigger pulses at random clock phases |
| `tb/vme_bus_if.sv`, `tb/mux_adc_model.sv`, `tb/tb_msgc_pkg.sv` | VME master, front-end/ADC model, stimulus |

## Simulating

Every testbench prints one line `TB_RESULT checks=N failures=M` and ends
itself. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
  rtl/msgc_pkg.sv tb/tb_msgc_readout_full.sv --top-module tb_msgc_readout_full
./obj_dir/Vtb_msgc_readout_full
```

Replace the testbench name to run another one. All testbenches together
take well under a minute. They count only two-state values, so every
register the logic reads is reset.

What the testbenches establish: every module is checked against values
computed independently (reference memory images built from the stimulus
functions, expected counts and cycle counts), and the end-to-end runs
exercise the complete host procedure, including pedestal chain across all
segments, fast clear during re-read, triggers during BUSY, memory overflow
with BUSY held, and all four status selections. Concurrent assertions
guard the VME handshake, memory ownership and the sequencer. What they do
not establish: behaviour against real front-end timing, or the original
Control Board's download format, which is not known.
