# FF-LYNX link test chip and Intelligent Power Switch control in SystemVerilog

This repository contains two digital designs for electronics that must keep working in hostile conditions.

1. **FF-TC1, a radiation-tolerant test chip for the FF-LYNX serial protocol.**
   - FF-LYNX is a serial link for particle-physics front-end electronics.
   - It carries three kinds of traffic on one wire:
     - triggers, which must arrive with a fixed, known latency;
     - fixed-latency frames (FL);
     - variable-latency data packets (VL).
   - The chip holds the transmitter and receiver interfaces in three speed options, plus everything needed to test them under irradiation. That includes rad-hard FIFOs with error correction and scrubbing, a triplicated built-in traffic generator, and an I2C control port with five-copy configuration registers.
2. **The digital controller of an automotive Intelligent Power Switch (IPS)** that drives a lamp load. It handles:
   - on/off control;
   - time-limited over-current, followed by a soft-start mode with programmable period and duty cycle;
   - over-temperature shutdown;
   - key-switch / lamp diagnosis.

The two designs are independent. The top module `harsh_top` places them side by side, each with its own ports.

## The FF-LYNX link

### Reference cycles, THS and FRM channels

The link runs at N times the reference (bunch-crossing) frequency F, with N = 4, 8 or 16. That gives N bits per reference cycle, sent MSB first:

```
 bit:   N-1  N-2 | N-3 ...................... 0
        THS channel | FRM channel (N-2 bits)
```

**THS channel.** The two THS bits of three consecutive cycles form a 6-bit code:

| Code   | Command                 |
|--------|-------------------------|
| 110100 | trigger (TRG)           |
| 101011 | frame header (HDR)      |
| 011101 | synchronization (SYN)   |

- The three codes are at Hamming distance 3 or more from each other.
- The receiver accepts a code with one wrong bit.

**FRM channel.** The FRM bits carry frame contents:

- After a header, the channel carries:
  - the 12-bit Hamming-coded frame descriptor (FD);
  - 1 to 16 words of 16 bits;
  - optionally a CRC-8 (polynomial x^8+x^2+x+1, initial value 0).
- All of these are packed back to back across cycles.

**Frame descriptor.** Before coding it holds 7 bits: `{len-1[3:0], label, data_type, last_frame}`. They are extended-Hamming coded to 12 bits, which corrects one bit and detects two.

- A packet longer than 16 words is cut into several frames.
- Only the final frame of a packet has `last_frame` set.
- If the host marks a packet with `label`, its first word is a label (for example a time stamp). Only the first frame of the packet carries the label flag.

### Triggers and fixed-latency frames

Triggers have priority over headers and sync patterns. Each THS command takes three cycles.

To give every trigger the same latency, the scheduler (`ff_ths_sch`) works as follows:

- It delays every trigger by exactly three reference cycles in a shift register.
- It starts a header or sync only when no trigger is waiting in that register.

A 3-cycle sequence that starts can therefore never collide with a trigger. The cost is a constant 3-cycle trigger latency.

In *FL mode* (up-link), each trigger also carries a fixed-latency frame in the FRM bits of its three cycles:

- The frame is 3·(N-2) bits long.
- It is filled with (N-2)/2 six-bit words from the FL port: 1, 3 or 7 words at 4x, 8x and 16x.
- At 8x that is the 18 bits that encode two hits.
- Any VL frame in progress is simply suspended for those three cycles.
- With FL mode off (down-link), triggers carry nothing.

If the FL FIFO is empty when a trigger fires, zeros are sent and `flf_underrun` pulses. A trigger that falls due while another sequence is still running means the host broke the 3-cycle spacing. That trigger is dropped and reported on `trg_lost`.

### Transmitter (`ff_tx`)

The transmitter is built from three blocks:

- **Frame builder (`ff_frm_bld`):**
  - Handshake with the host: a word moves when `data_valid` and `get_data` are both high at the reference strobe.
  - A packet is one uninterrupted `data_valid` burst.
  - Words go into an external data-word FIFO.
  - When a frame is complete, its coded descriptor goes into an external descriptor FIFO.
  - FL words are packed into FL frames in a small embedded FIFO (`FLF_DEPTH` = 4 frames).
- **THS scheduler (`ff_ths_sch`):**
  - Sequences triggers, headers and syncs as described above.
  - When the channel would otherwise be idle and `sync_en` is set, it sends sync patterns.
- **Serializer (`ff_ser`):** builds each cycle word from the pieces above and shifts it out.

### Receiver (`ff_rx`)

The receiver is built from four blocks:

- **Deserializer (`ff_des`):** keeps a sliding window of the last 3·N bits.
- **Synchronizer (`ff_sync`):**
  - Locks the cycle phase on the first SYN code seen in the THS positions.
  - After `ERR_MAX` = 3 invalid THS sequences in a row, it drops lock and searches again.
- **THS detector (`ff_ths_det`):**
  - Classifies each 3-cycle sequence, tolerating one bit error.
  - Outputs triggers with a fixed delay.
  - Tags the FRM chunk of every cycle as header, trigger (FL) or plain data.
- **Frame analyzer (`ff_frm_ana`):**
  - Decodes the descriptor. A double error drops the frame and is counted.
  - Stores the payload in an external RX data-word FIFO and the descriptor in an RX descriptor FIFO.
  - Checks the CRC. A mismatch is counted; the words are still delivered.
  - Unpacks FL frames into a small FL FIFO.
  - On the host side, it presents each word with `first`, `is_label`, `data_type` and `last_frame`, under a `data_valid`/`get_data` handshake.

### Clocking

There is a single clock, `clk`, running at 16·F:

- Each interface receives a `bit_en`, which is high on every clock at 16x, every 2nd clock at 8x and every 4th at 4x.
- Each interface counts N enabled bits per reference cycle and shows the last one on `ref_stb`.
- Host inputs are sampled, and `get_data`/`flf_get` apply, at the clock where `ref_stb` is high.

In the original chip, each speed option has its own link clock, and the receiver takes the clock forwarded with the data. Here the receiver is simply clocked by the same `clk` as the transmitter. It still finds the cycle phase by itself from the sync patterns.

## Radiation hardening

| Technique | Module | Where used |
|---|---|---|
| SEC/DED extended Hamming code (any width K; 16→22, 12→18, 7→12 bits) | `secded_enc`, `secded_dec` | frame descriptors, all FIFOs |
| Circular FIFO with coded storage, correcting read path, SEU/DEU counters and a background scrubber | `rh_fifo` | all six FIFOs of the chip (four link FIFOs, two in the test module) |
| Triple modular redundancy of a state register with majority voter | `tmr_reg` | link FSM state, e.g. the THS scheduler |
| Five copies with 3-of-5 majority (survives two upsets) | `mmr5_reg` | I2C configuration registers |
| Full TMR: three copies of the controller, each next state computed from the voted state, outputs voted again | inside `ff_bist` | built-in test module |

**How the `rh_fifo` scrubber works:**

- It walks the array one address per clock.
- It rewrites any word that has a single error.
- It skips the address being read or written in that clock, so scrubbing never disturbs normal traffic.
- A single error seen on the read port is corrected on the fly and counted.
- A double error is flagged (`rd_ded`) and counted.
- The counters are 16 bits and saturate.
- The `seu_*` ports flip chosen bits of a stored word, for fault-injection tests.

## The FF-TC1 chip (`fftc1`)

`fftc1` contains:

- the three TX/RX pairs (N = 4, 8, 16);
- two shared 64-word FIFOs for the transmitters (data words and descriptors);
- two more for the receivers;
- the Built-In Test Module (`ff_bist`);
- the I2C slave (`i2c_regs`, address 0x3A).

Only the speed option selected in the configuration runs. The other two are held in reset, and the built-in test module restarts when the speed changes. The serial pads `lvds_tx_dat`/`lvds_rx_dat` belong to the selected option.

**Built-In Test Module (`ff_bist`).**

- A one-clock pulse on `tx_dav_pin` starts a VL packet. Its length is `(PRG & len_mask) + 1` words, and its words come from a second PRG.
- A pulse on `tx_trg_pin` makes a trigger. In FL mode, a third PRG supplies the FL words.
- Lengths and words are buffered in two 64-word FIFOs.
- The PRGs are 16-bit maximal-length Galois LFSRs (`prg_lfsr`, taps 0xB400).

**Configuration registers** (I2C writes a pointer byte first; reads and writes auto-increment):

| Reg | Bits | Meaning |
|---|---|---|
| 0 | [1:0] | speed: 0 = 4x, 1 = 8x, 2 = 16x (3 acts as 16x) |
| 0 | [3:2] | test mode: 0 TX from parallel-port pins, 1 TX from the built-in test module, 2 RX (receiver from `lvds_rx_dat`, output on the parallel port), 3 TX→RX loop inside the chip |
| 0 | [4] | FL mode |
| 0 | [5] | CRC on |
| 0 | [6] | sync patterns on |
| 1 | [5:0] | packet length mask of the test module |

**Status registers** (read only):

| Reg | Content |
|---|---|
| 16, 17 | TX data-word FIFO and TX descriptor FIFO single-error counts |
| 18 | their double-error counts, 4 bits each |
| 19–22 | RX data-word and RX descriptor FIFO single/double-error counts |
| 23, 24 | test-module FIFO single/double-error counts |
| 25 | receiver descriptor errors |
| 26 | CRC errors |
| 27 | words lost |
| 28 | FL words lost |
| 29 | triggers lost in the transmitter |
| 30 | {configuration copy mismatch, receiver locked} |
| 31 | packets sent by the test module |

## IPS controller (`ips_ctrl`)

All timing is counted in periods of the `tick` input (`CW` = 16-bit counters). The analog comparator outputs `over_curr`, `over_temp`, `kid` and `lid` pass two-flop synchronizers.

**States and soft start:**

- With `lamp_ctrl` high, the controller turns the gate on.
- If over-current lasts `oc_time` ticks, it enters soft start: `t_off` ticks off, then `t_on` ticks on, repeating.
- It returns to normal on-state when an on phase ends without over-current.
- `over_temp` forces the gate off for as long as it lasts and is reported on `ot_shutdown`.

**Diagnosis** (`diag`) is taken from {KID, LID}:

| `diag` | Meaning |
|---|---|
| 0 | key switch off |
| 1 | key on, power switch off |
| 2 | key on, power switch on |
| 3 | inconsistent combination |

`lamp_fault` is set when:

- the combination is inconsistent; or
- the driver is on (with no over-temperature and KID active) but the diagnosis does not show "power switch on".

Which KID/LID levels map to which case is this design's own choice.

## Departures from the original and known limits

- **One master clock with enables.** It replaces separate per-option link clocks and the forwarded receive clock. There is no clock or data recovery.
- **Frame limits and check word:**
  - The 16-word frame limit is this design's choice.
  - The descriptor bit layout is this design's choice.
  - The CRC-8 is an addition.
  - The THS code values are chosen here, for distance 3.
- **FL port packing.** The FL port carries 6-bit words packed (N-2)/2 per FL frame. This is this design's reading of how hits fill the FL frame.
- **Header mid-frame.** A header that arrives in the middle of a frame aborts it. Words of that frame already stored stay in the RX data FIFO, which can then be out of step with the descriptors until it drains.
- **FIFO size.** The transmitter's data FIFO must hold a whole frame plus two words before that frame's descriptor can be written. With `DEPTH` below about 20 the transmitter can stall for good. The default of 64 is safe.
- **No test access to the upset-injection inputs.** Inside `fftc1` the FIFOs' upset-injection inputs are tied off. Fault injection is exercised in the FIFO and BIST testbenches.
- **Not modelled:**
  - analog and pad parts: LVDS pads, PLLs, the IPS power stage and its comparators, the temperature sensor and high-voltage protection;
  - the FPGA test bed and host software used to exercise the chip;
  - a data concentrator, which is only named;
  - duplicated/one-hot FSMs and memory interleaving, which belong to a later revision.

## Files

| Area | Files |
|---|---|
| Shared types (THS codes, kinds, CRC-8 step) | `rtl/fflynx_pkg.sv` |
| Coding and hardening | `secded_enc`, `secded_dec`, `rh_fifo`, `tmr_reg`, `mmr5_reg` |
| Transmitter | `ff_frm_bld`, `ff_ths_sch`, `ff_ser`, `ff_tx` |
| Receiver | `ff_des`, `ff_sync`, `ff_ths_det`, `ff_frm_ana`, `ff_rx` |
| Chip | `prg_lfsr`, `ff_bist`, `i2c_regs`, `fftc1` |
| IPS | `ips_ctrl` |
| Top | `harsh_top` |

Each module `rtl/X.sv` has a self-checking testbench `tb/tb_X.sv`. Every testbench:

- compares the module against a reference model written independently in the testbench;
- has a watchdog;
- ends by printing `TB_RESULT checks=<n> failures=<m>`.

The larger testbenches:

- **`tb_ff_tx` / `tb_ff_rx`:** a full link at 8x / 16x, with random traffic, triggers and stalls.
- **`tb_ff_frm_ana`:** a 4x link with injected bit errors, which must give exactly the expected CRC error count.
- **`tb_fftc1`:** two chips, one transmitting from its pins and one receiving, through all three speeds.
- **`tb_harsh_top`:** the end-to-end test, which fails if any mechanism never occurred:
  - internal TX→RX loop at every speed, configured over I2C;
  - fragmented packets, FL frames, triggers, host stalls;
  - status-register read-back;
  - IPS soft start, over-temperature shutdown and diagnosis.
- **`tb_wl_packet_latency`:** an 8x link that carries packets of 4 to 64 words under a steady trigger load. It checks data integrity and the lower bound the link bandwidth sets, and prints the packet latency curve. At one packet every 150 cycles with a trigger every 10 cycles, the mean latency is 27, 83, 129, 293 and 376 reference cycles for 4, 16, 32, 52 and 64 words. Latency jumps once a packet exceeds what the link drains between arrivals. A whole frame is buffered before its header goes out, which is why even short packets take longer than the raw bit count.
- **`tb_harsh_top_full`:** the same top at default sizes, with 64-word packets requested faster than the link can carry them. The FIFOs fill and the flow control is tested.

## Simulating

With Verilator 5 (the package must come first):

```
verilator --binary --timing --top-module tb_harsh_top \
  rtl/fflynx_pkg.sv $(ls rtl/*.sv | grep -v fflynx_pkg) tb/tb_harsh_top.sv
./obj_dir/Vtb_harsh_top
```

Replace `tb_harsh_top` with any other testbench name. Most testbenches run in seconds. The full-load test runs for about a minute.
