# Asynchronous DSSS packet link for wireless sensor motes

Motes in a body-area or sensor network send short packets at random times, with no
shared clock and no handshake before a packet. The receiver therefore has to find
each packet on its own, chip by chip, from a known preamble. This RTL models such a
link at baseband:

* a **mote transmitter chip** (`mote_tx_top`). It builds test packets from
  JTAG-programmed registers. The preamble and the physical-layer header (PLH) are
  DBPSK modulated and spread by a 16-chip sequence. An optional pre-spread payload
  follows. The chips are pulse-shaped by a 12-tap FIR.
* a **receiver** (`mote_rx_top`). It samples the signal at two samples per chip and
  can add a frequency offset and external noise in a built-in channel emulator. It
  runs a matched filter. An *asynchronous* differential-correlation preamble detector
  runs on each of the two sample phases. After a detection it extracts the 64-bit
  PLH, counts false alarms and missed packets, and offers the PLH on a 4-bit
  read-out port.
* a **link top** (`wsn_link_top`) that connects the two. TX `symbol_out` drives the
  RX real ADC input and the imaginary input is 0. Both chips keep their own clocks,
  resets and JTAG ports.

All of it is synthesizable SystemVerilog in `rtl/`. Self-checking testbenches are in
`tb/`.

## Packet format

| field    | length                      | content |
|----------|-----------------------------|---------|
| preamble | 40 bits x 16 chips          | `preamble_sequence`, default `40'h2481F1539C`, bit 0 first |
| PLH      | 64 bits x 16 chips          | the 16-bit packet counter in a rate-4 repetition code (counter bit *i* fills PLH bits 4*i*..4*i*+3), or the constant `plh_sequence` register |
| payload  | 512 chips (optional)        | `payload_chip_sequence`, already spread, sent as is |
| gap      | `inter_packet_spacing` x 104 bit periods | silence between packets |

Header bits are DBPSK coded before spreading: a_i = b_i XOR a_(i-1), starting from
a = 0 at each packet. Bit value 0 stands for +1 and 1 for -1. Each symbol is XORed
with the spreading sequence (default `16'h066B`). Bit 0 of the sequence is the first
chip.

## Transmitter

Clocking uses a single domain. `clk_2x_chip` is the only clock of the core.
`tx_clock_generator` counts 32 cycles per bit and produces the enables `ce_chip`
(every 2nd cycle) and `ce_bit` (every 32nd cycle). It also produces `chip_idx` and
`first_half`. The divided clocks `clk_chip` (/2) and `clk_bit` (/32) exist only as
pins.

The JTAG interface is an IEEE 1149.1 TAP (`jtag_tap`, 4-bit IR). The IR captures
`0001` and resets to BYPASS. Data registers (`jtag_dr`) have a shift stage and a
working register. The TX register file (`tx_jtag_top`) holds ten data registers,
each selected by its IR value:

| IR | register | width | default |
|----|----------|-------|---------|
| 0 | preamble_sequence | 40 | 2481F1539C |
| 1 | preamble_spreading_sequence | 16 | 066B |
| 2 | plh_sequence | 64 | 00FF00F0000F0000 |
| 3 | inter_packet_spacing | 16 | 0 |
| 4 | total_packet_number | 32 | 00F00000 |
| 5 | tx_filter_coeff (12 x 8 bit, coeff_1 in the low byte) | 96 | FF 04 F9 F6 34 66 34 F6 F9 04 FF 00 |
| 6 | payload_chip_sequence | 512 | 8 x 222222DDDD22DD22 |
| 7 | mux_sel | 4 | C |
| 8 | plh_sequence_counter (read only) | 16 | - |
| 9 | enable_status (read only) | 3 | - |

`mux_sel` bits:
* [0] selects the constant PLH.
* [1] is the silent level of `chip_out` between packets.
* [2] turns the shaping filter on.
* [3] turns the payload on.

A scan through a writable register also updates it. To read such a register without
changing it, scan the value back in.

`tx_control_unit` copies the whole configuration into local registers on a one-cycle
`test_start`. JTAG writes during a test therefore have no effect. It then runs a
small state machine: GAP → HEADER → PAYLOAD → GAP … → DONE. It loads the header
register, clears the DBPSK state at each packet start and steps the PLH counter.
It pulses `pkt_sent_ack` in the last bit period of each packet and sets `test_done`
after the last packet. If the spacing is 0, packets follow back to back.

`tx_unit` contains the datapath:
* the 104-bit header register (`header_generator`);
* the DBPSK encoder and the spreader;
* the 512-chip payload register;
* a chip register;
* `tx_filter`.

The filter upsamples by two with zero insertion (+1 or -1 in the first half of a
chip, 0 in the second). It runs the 12-tap FIR, shifts the sum right by one and
saturates it to 8 bits. With the filter off, `symbol_out` is +16/-16 (±1.0 in 4.4
format). Latencies:
* `chip_out` is registered at the end of each chip period.
* `symbol_out` follows `chip_out` two `clk_2x_chip` cycles later.

## Receiver

`rx_clock_generator` divides `clk_4x_chip` into `clk_2x_chip`, the sample clock.
It marks alternate sample cycles as even and odd. Each chip thus yields one
even and one odd sample. Their timing against the transmitter is unknown.

The **channel emulator** has two stages, each with its own enable bit in `mux_sel`:
* The *symbol rotator* multiplies the complex sample by exp(j·2π·Δf·Tc·k). A 12-bit
  phase accumulator advances by `frequency_offset` (units of 1/4096 cycle) once per
  chip. Its top four bits address a 16-entry sin/cos table holding
  round(16·sin(2πi/16)).
* The *noise adder* adds the external `noise_re`/`noise_im` samples with saturation.
  These are 8-bit 4.4 samples from an outside Gaussian noise source.

The **matched filter** (`matching_filter`, one per rail) is a 12-tap FIR at the
sample rate. Each result goes to an even or an odd output. `out_valid` pulses once
per chip, when the pair is complete.

**Preamble detection** (`rx_unit`, two `preamble_detector`s) is the core of the
design, so here it is step by step. Each path takes the sign of its matched-filter
outputs, +1 for ≥ 0 and −1 for < 0, one chip per `en`. Then, at every chip:

1. `despreader` correlates the latest 16 chips with the spreading sequence. The
   oldest chip is paired with `seq[0]`. This gives a complex symbol estimate d in
   −16..16 on each rail.
2. d is shifted right arithmetically by `TRUNC` = 3 bits. This truncated detector
   saves area and costs about 1 dB. It is pushed into a history of 625 entries,
   (W−1)·16+1, so that the 40 preamble symbols of a candidate position sit 16
   entries apart.
3. Differential decoding gives p_m = Re(a_m·a*_(m−1)) for m = 2..40.
4. The correlation is η = Σ ±p_m, with + for a 0 preamble bit.
5. `detected` is η > `correlator_threshold`.

The window that ends at chip k yields η three chip enables later (DET_LAT = 3). The
first path to detect starts the PLH extractor (the even path wins a tie).
Detections that come while a PLH is being extracted are ignored.

Only the real part of a_m·a*_(m−1) is used. A phase rotation that is constant over
one symbol therefore cancels, and a slow frequency offset costs only cos(2π·Δf·Tc·16)
per bit. For the same reason the signal's absolute sign (carrier phase) does not
matter.

The threshold needs care. The maximum η is 39·4 = 156 for a real signal with
TRUNC = 3, and up to twice that when a frequency offset spreads the signal over both
rails. The PLH bits that follow a preamble create correlation side lobes. With a
mostly-zero PLH (low packet numbers), the side lobe right after a packet can exceed
the default threshold 0x28. In a noise-free simulation this counts as a false alarm,
so the testbenches use 0x50 (and 0x64 with a frequency offset). The threshold is
meant to be set per operating point.

**PLH extraction** (`plh_extractor`) has its own two despreaders. They are fed by the
chip streams delayed by DET_LAT chips, so that at the moment of detection the last
preamble symbol sits in the despreader of the detecting path. That symbol becomes the
reference. Every 16 chips the new symbol d is differentially decoded against the
reference, Re(d·ref*). Its sign gives one PLH bit (negative → 1), and d becomes the
next reference. After 64 bits `plh_received` pulses.

**Read-out and monitoring.**
* `plh_buffer` stores the header. Each `read_en` returns the next nibble, lowest
  first, one cycle later with `plh_out_valid`. `plh_ready` stays high until all 16
  nibbles have been read.
* `packet_monitor` checks every header. A header that is not a rate-4 codeword (any
  nibble other than 0 or F) increments `false_alarm_counter`. Otherwise the packet
  id is decoded, and the ids skipped since the last good header are added to
  `miss_alarm_counter`. `last_id` starts at FFFF, so id 0 is expected first. Both
  counters are readable through JTAG and saturate.

RX JTAG registers (`rx_jtag_top`):

| IR | register | width | default |
|----|----------|-------|---------|
| 0 | preamble_sequence | 40 | 2481F1539C |
| 1 | preamble_spreading_sequence | 16 | 066B |
| 2 | correlator_threshold | 8 | 28 |
| 3 | frequency_offset | 12 | 0 |
| 4 | rx_filter_coeff | 96 | same as TX |
| 5 | mux_sel | 3 | 0 |
| 6 | false_alarm_counter (read only) | 16 | - |
| 7 | miss_alarm_counter (read only) | 16 | - |

RX `mux_sel` bits:
* [0] turns the matched filter on.
* [1] adds the noise.
* [2] turns the frequency offset on.

The JTAG registers cross into the core clock without synchronisers. Change them only
while the core is idle or in reset. A scan that passes through the threshold
register while packets arrive briefly applies the value being shifted.

## Where this RTL follows the source design and where it chooses

The following come from the source design:
* the packet structure, sizes and defaults;
* the register map;
* the DBPSK/DSSS transmit chain and the 2× upsampling 12-tap shaping filter;
* two samples per chip with two parallel detectors;
* the despread / differential decode / correlate detector, its truncation and the
  threshold test;
* the PLH extractor principle;
* the 16-entry rotator table and the 4-bit PLH read-out.

This design's own choices include:
* a single clock domain with enables on the TX side;
* the control unit's state chart and exact cycle timing;
* zero insertion and the output scaling of the shaping filter;
* the even/odd convention and the DET_LAT alignment;
* TRUNC = 3 and the 1-bit (sign) input to the detectors;
* the false-alarm and miss rules of the packet monitor;
* the order rotation-then-noise in the channel emulator;
* the PLH buffer's slice order and ready flag.

The source describes two spreading sequences, `8DC6` and `066B`. The register
default `066B` is used. It also states the threshold test both as ≥ and as >; the
RTL uses >.

Not included:
* The Gaussian noise generator core. The noise enters as ports.
* The analog/RF front ends (DAC, modulator, ADCs).
* The FPGA test platform used to test the TX chip.

The detector input width is 1 bit (sign only). The measured FPGA set-up of the
source used 2-bit inputs. This costs sensitivity: with the default threshold and
unit-power Gaussian noise, `tb_link_psnr_sweep` measures these misses out of 12
packets per point:

| pSNR | 14.9 dB | 19.0 dB | 22.5 dB | 24.4 dB |
|------|---------|---------|---------|---------|
| missed | 12 | 12 | 10 | 2 |

At 24.4 dB a frequency offset of Δf·Tc = 0, 0.001, 0.002 and 0.004 gave 4, 4, 5
and 7 misses. Most misses at the higher SNRs are caused by false alarms: each one
holds the detector for one header length. The threshold is not re-tuned per point
here. The source re-tuned it for a constant false-alarm rate. The counts depend on
the random seed and vary by a packet or two between runs.

## Simulating

Every testbench includes `tb/tb_check.svh` and prints
`TB_RESULT checks=<n> failures=<m>`. Build one with Verilator 5, for example:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
  -y rtl -y tb +libext+.sv -Irtl -Itb \
  rtl/mote_pkg.sv tb/mote_ref_pkg.sv tb/tb_wsn_link_top.sv --top-module tb_wsn_link_top
./obj_dir/Vtb_wsn_link_top
```

Some testbenches need extra support files:
* `tb/jtag_bfm.sv` is a JTAG driver with scan tasks.
* `tb/mote_ref_pkg.sv` is a bit-level reference model of the transmitted packet.

`tb_wsn_link_top` is the end-to-end test and runs with the top's default parameters.
It programs both chips over JTAG and sends packets through seven scenarios:
1. both filters on, with payload;
2. filters bypassed, back-to-back packets, silent level 1;
3. external noise;
4. a frequency offset;
5. a constant non-codeword PLH (false alarms);
6. the receiver held in reset for the first packets (misses);
7. a threshold above the maximum η (no detection).

It checks every received packet id and both counters, and counts each mechanism.
It takes about 20 s.

`tb_link_psnr_sweep` runs the detection measurement in reduced form, in about 15 s:
* the TX amplitude is scaled to set the pSNR (pSNR = 10log(A²/2) + 10log16 + 10log40
  for unit-power noise);
* Gaussian noise goes into the RX noise ports;
* 12 packets per point, at four pSNR values and four frequency offsets.

It prints the misses and false alarms for each point. It checks only the trends,
because 12 packets cannot resolve miss rates near 10⁻².

The block testbenches check each module against an independent model. Examples:
* the FIR filters against a convolution;
* the rotator against a table built with `$sin`;
* the detector against a chip-level computation of η for TRUNC = 3 and TRUNC = 0.
