# RoCEv2 streaming path for a 192-channel digital ultrasound probe

An ultrafast ultrasound probe with 192 channels, sampling 12 bits at 40 MS/s,
produces about 92 Gbit/s of raw data. That is too much for USB or for a PC
receiving plain UDP: the host CPU cannot keep up. This RTL is the FPGA side of
a way around that. Each of the probe's two FPGAs packs the samples of 96
channels into **RoCEv2** frames, that is InfiniBand transport over UDP/IPv4 over
100G Ethernet. An RDMA-capable NIC in the host can then write the data straight
into memory with no CPU involvement. The hard part is the RoCEv2 **ICRC**,
a CRC-32 over the invariant fields of every frame. It has to be computed on a
512-bit (64-byte) bus, one word per clock at 160 MHz, for frames of any
length. The design does this with a 16-stage pipeline of parallel CRC matrices
and a matching delay line, and writes the result over a placeholder at the end
of each frame.

The architecture follows Cossettini et al., *A RDMA Interface for Ultra-Fast
Ultrasound Data-Streaming over an Optical Link*: the block chain, the three
clock domains, the 64-byte bus, the 4096-byte payloads, and the ICRC pipeline
(per-byte CRC, position matrices, XOR tree, conditional shift stages,
accumulator, 16-cycle delay). That source gives only the function of several
blocks, so the header layout, the sample packing, the FIFO depths and the
handshakes are this implementation's own. They are listed under
"Departures and own choices".

## Data path

```
 clk_afe 120 MHz                 clk_sp 160 MHz                                clk_tx 322.27 MHz
 3 x JESD204 PHY ─► jesd_stream_merge ─► afe_fifo ═╪═► packetizer ─► roce_tx ─► cmac_fifo ═╪═► 100G MAC (CMAC)
   (3x128 bit)       512-bit packed      (async,    │   shots of N_s    Eth/IP/UDP/  (async,    │   AXIS 512 bit
                     samples             drop+count)│   sample periods  BTH/DETH+ICRC store&fwd)│
```

| module | clock | job |
|---|---|---|
| `jesd_stream_merge` | 120 MHz | splits the two channels on each JESD lane, builds a 96-channel sample vector, packs vectors into 512-bit words |
| `afe_fifo` | 120 → 160 | clock crossing; the ADCs cannot be stalled, so a word offered to a full FIFO is dropped and counted |
| `packetizer` | 160 MHz | on a trigger, passes one *shot* of N_s sample periods; discards everything else; counts triggers that arrive during a shot |
| `synth_data_gen` | 160 MHz | optional source in place of the AFE stream, selected by `synth_mode`: consecutive 32-bit integers at one word per clock, for full-bandwidth tests |
| `roce_tx` | 160 MHz | the RDMA transmitter: `packet_fifo` → `frame_gen` → `icrc_calc` ∥ `stream_delay` → ICRC insertion |
| `cmac_fifo` | 160 → 322.27 | clock crossing that releases a frame only once it is fully stored, because the MAC must not see gaps |
| `ufus_fpga_top` | all | wires the chain; PHY words, MAC port, trigger and header configuration are ports |

A probe carries two of these paths, one per FPGA and optical link.
`ufus_fpga_top` is one of them.

The bus is AXI-Stream with 64-byte words (`tdata[511:0]`, `tkeep[63:0]`,
`tlast`). Byte 0 of a frame is `tdata[7:0]`, the lane order of the Xilinx
CMAC port. The MAC appends the Ethernet FCS itself.

## Sample packing

Each AFE has 16 JESD204 lanes. At 120 MHz every lane delivers one octet per
clock, 128 bits per AFE, which is exactly 32 ch × 12 bit × 40 MS/s =
15.36 Gbit/s. One 40 MHz sample period is therefore three octets on a lane,
and each lane carries two channels, A and B:

```
octet 0: A[11:4]    octet 1: {A[3:0], B[11:8]}    octet 2: B[7:0]     (phy_sof marks octet 0)
lane l of AFE a: A = channel 32a + 2l, B = channel 32a + 2l + 1
```

The merged vector puts channel c in bits `12c+11:12c`, 1152 bits for 96
channels, and consecutive vectors are packed with no padding. Four sample
periods fill exactly nine 512-bit words. The flag `m_group` marks the word
that begins such a group. A shot always starts on a group word, so a shot of
N_s periods is exactly **N_s × 144 bytes**, starting at byte 0 of its first
payload. A receiver reads channel c of period k at bit offset `(96k + c) × 12`
of the shot, least significant bit first.

## Frames

`packet_fifo` cuts a shot into payloads of at most 4096 bytes. The last
payload of a shot is shorter. Each payload becomes one unreliable-datagram
SEND:

| bytes | field | value |
|---|---|---|
| 0–13 | Ethernet | dst MAC, src MAC (`cfg`), EtherType 0x0800 |
| 14–33 | IPv4 | 0x45, ToS 0, length P+52, id 0, DF, TTL 64, UDP, checksum (computed), src/dst IP (`cfg`) |
| 34–41 | UDP | src port (`cfg`), dst port 4791, length P+32, checksum 0 |
| 42–53 | BTH | opcode 0x64 (UD SEND only), flags 0, P_Key, Resv8a 0, dest QP, AckReq 0, PSN (+1 per frame) |
| 54–61 | DETH | Q_Key, 0, source QP |
| 62 … 61+P | payload | shot data |
| 62+P … 65+P | ICRC | computed CRC, least significant byte first |

The header is 62 bytes, so the payload is realigned across words. Output word
n is bytes 2–63 of payload word n−1 followed by bytes 0–1 of payload word n,
and one or two extra words flush the tail and the ICRC. `frame_gen` starts a
frame only when `packet_fifo` holds the whole payload, because the header
carries its length. Payloads must be multiples of 4 bytes, as a shot of
N_s × 144 bytes always is: the BTH pad count is fixed at 0.

## The ICRC pipeline (`icrc_calc`)

**What is covered.** The RoCEv2 ICRC is the Ethernet CRC-32 (reflected
polynomial 0xEDB88320, start value 0xFFFFFFFF, result inverted). It is taken
over eight bytes of 0xFF, which stand in for the InfiniBand local route header,
followed by the frame from the IPv4 header to the end of the payload. The
fields that routers may change are replaced by ones: IPv4 ToS, TTL and header
checksum, the UDP checksum, and BTH Resv8a.

**Linearity.** Let L(M) be the CRC register after clocking in M from a
zero start, and Z the 32×32 GF(2) matrix that advances the register by one
zero byte. Then

```
L(A ‖ B) = Z^|B| · L(A)  ⊕  L(B)        and        L(0…0 ‖ M) = L(M)
```

A CRC-32 with start value 0xFFFFFFFF equals the zero-start L of the message
with its first four bytes inverted. So the whole covered region equals L of the
*Ethernet frame itself* with bytes 0–9 forced to 0x00 and bytes 10–13 forced
to 0xFF: leading zeros cost nothing, and the four 0xFF bytes followed by the
IPv4 header make up the tail of the 0xFF placeholder. The header word is
masked this way (`roce_pkg::ICRC_ZERO`, `ICRC_ONES`), so the pipeline needs
no special start value.

**Per word.** A 64-byte word contributes Z^r · L(word), where r is the number
of covered frame bytes after the word. The stages are:

| stage | work |
|---|---|
| input | header mask on the first word; bytes from the ICRC field on are zeroed; the last covered word is shifted so its k valid bytes end at byte 63 (leading zeros again) |
| 1 | L of each of the 64 bytes, in parallel |
| 2 | byte i multiplied by H_i = Z^(63−i) |
| 3 | XOR of the 64 results = L(word) |
| 4 | multiply by Z^(r mod 4): one of four matrices |
| 5–15 | multiply by Z^(2^b) if bit b of r is set, b = 2…12 |
| 16 | accumulator: load on the first word of a frame, XOR otherwise |

Thirteen bits of r allow frames up to 8191 bytes. The largest frame here is
4162 bytes. All matrices are constants worked out at elaboration by functions
in `roce_pkg`: Z^n column by column for H_i, and Z^(2^b) by repeated squaring.
In hardware each matrix is a fixed XOR network.

**Insertion.** `stream_delay` holds the frame stream back by the same 16
advances. When a word leaves the delay line, the accumulator holds the ICRC of
its frame. This is because the last covered word is at or before the word that
holds the ICRC field. The output multiplexer in `roce_tx` writes the four bytes
at frame offsets P+62 … P+65. They may straddle two words, which happens for
every full 4096-byte payload, and both words are patched. The ICRC pipeline and
the delay line share one enable, `!m_tvalid || m_tready`, so backpressure from
the MAC side freezes both together and they stay aligned. An assertion in
`roce_tx` checks this.

## Throughput and limits

- ADC data per FPGA: 96 × 12 bit × 40 MS/s = 46.08 Gbit/s.
- Bus capacity at 160 MHz: 512 × 160 MHz = 81.92 Gbit/s. In simulation a
  stream of 4096-byte payloads leaves `roce_tx` at about 71 clocks per
  4162-byte frame, about 74 Gbit/s of payload. That is 66 words plus the refill
  of the packet FIFO, which holds exactly one payload. A 4000-period shot
  (576 000 bytes, 141 frames) then needs about 141 × 71 = 10 011 clocks,
  62.6 µs of transmitter time, against 100 µs of acquisition. In the
  full-chain simulation its last frame reaches the MAC port about 100.5 µs
  after the trigger.
- With the synthetic source, which offers a word every clock, the transmitter
  is the limit. A 288 000-byte shot (N_s = 2000) leaves in 30.1 µs from
  trigger to last frame, which is 76.5 Gbit/s of payload.
- The published article speaks of ">100 Gbps" at 160 MHz and reports 90.4
  Gbit/s per link with synthetic data. Both are above what a 512-bit bus at
  160 MHz can carry. To get there, the 160 MHz domain must run faster; nothing
  in the RTL depends on the frequency.
- The highest shot rate is set by the acquisition time, N_s × 25 ns, plus
  at most one 4-period alignment wait. For N_s = 500, 1000, 2000 and 4000 that
  gives about 80, 40, 20 and 10 kHz. A trigger that arrives during a shot is
  ignored and counted in `missed_triggers`.
- The article's datarates (for example 84.26 Gbit/s over two links at
  9.82 kHz with N_s = 4000) match this packing exactly if they are read as
  binary units (2^30 bit/s): 4000 × 144 B × 2 links × 8 × 9.82 kHz =
  90.5 × 10^9 bit/s = 84.3 × 2^30 bit/s. The same holds for the other three
  table entries (74.76, 79.90 and 82.74).

## Departures and own choices

- Lane format and packing, the 12-bit layout above: the source says only that
  the lanes are de-interleaved and combined.
- Header contents (UD SEND-only with DETH, port 4791, DF, TTL 64, UDP checksum 0,
  PSN from 0) and the ICRC field list come from the RoCEv2/InfiniBand packet
  format, not from the source.
- ICRC mask: the source shows the header word ORed with a mask. Zeroing the
  Ethernet bytes is added here to realise the placeholder and the start value.
- Stage numbering: the source prints amount bit 0 at stage 4 and
  bit 12 at stage 15 (13 bits over 12 stages). Here stage 4 takes bits 1:0
  together, which keeps 16 stages.
- The last covered word is right-aligned before stage 1. The source says only
  that any length is handled by applying or bypassing the shift matrices.
- Payload split: the source places the split in its UDP packetizer. Here it is
  in `packet_fifo`, which holds one payload (64 words) as in the source.
- FIFO depths: AFE FIFO 512 words, CMAC FIFO 128 words, payload-length queue
  4 entries. Drop-and-count on AFE FIFO overflow and store-and-forward in the
  CMAC FIFO are own choices.
- The shot starts at the next 4-period group after the trigger, so it may begin
  up to 100 ns after the trigger.
- Synthetic source: the pattern (consecutive integers), the group spacing and
  the `synth_mode` switch are own choices. The source names the generator and
  its result only.
- Resets: synchronous, active high, one per clock domain.
- Not included: the JESD204 PHYs and the 100G MAC (vendor IP), the optical
  module, the control processor (its settings are the `cfg`, `n_samples` and
  `trigger` ports), the AFE and pulser chips, the command path from the host,
  and the host software (RDMA receive buffers, NVMe storage).

## Interface of `ufus_fpga_top`

| port | dir | clock | meaning |
|---|---|---|---|
| `phy_data[3][128]`, `phy_valid[3]`, `phy_sof[3]` | in | clk_afe | PHY words. The three PHYs must be frame aligned; an assertion checks this |
| `trigger`, `n_samples[16]` | in | clk_sp | start a shot of `n_samples` sample periods (≥ 1) |
| `synth_mode` | in | clk_sp | 1: shots come from the synthetic generator; the AFE stream is drained. Taken over only while no shot is busy |
| `cfg` (`roce_pkg::hdr_cfg_t`) | in | clk_sp | MACs, IPs, UDP source port, P_Key, dest QP, Q_Key, source QP; change only while idle |
| `cmac_t*` | out/in | clk_tx | AXIS to the MAC TX port |
| `afe_overflows` | out | clk_afe | AFE words dropped |
| `busy`, `shots`, `missed_triggers`, `frames` | out | clk_sp | status |

Parameters: `N_AFE` (3), `MAX_PAYLOAD` (4096), `AFE_FIFO_DEPTH` (512),
`PKT_FIFO_DEPTH` (64), `CMAC_FIFO_DEPTH` (128, must hold the largest frame).

## Simulation

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`. The reference models are in
`tb/tb_ref_pkg.sv`: a bit-serial ICRC and an IPv4 checksum test. To run one
with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_ufus_fpga_top \
    -y rtl -y tb +libext+.sv -Irtl -Itb rtl/roce_pkg.sv tb/tb_ref_pkg.sv tb/tb_ufus_fpga_top.sv
./obj_dir/Vtb_ufus_fpga_top
```

Replace the top module and the last file for other testbenches.
`tb_ufus_fpga_top` runs the whole chain at the default parameters, which takes
about 30 s. It sends shots of N_s = 8, 500, 93 (with MAC backpressure) and
4000, checks every frame header and ICRC, and unpacks and compares every
sample. Between the last two, it switches to the synthetic source for one
2000-period shot, checks that its integers are consecutive, and checks that
its payload rate is at least 70 Gbit/s. It also counts that a trigger was missed, that full and short payloads
occurred, that an ICRC straddled two words, that the MAC applied backpressure,
that a group boundary was waited for, and that the CMAC FIFO held a frame
back, and that a synthetic shot was sent.

`tb_ufus_table1` runs the published measurement table through the same
chain at its default sizes. N_s = 500, 1000, 2000 and 4000 are each triggered
three times at 69.68, 37.24, 19.28 and 9.82 kHz, and no trigger may be missed.
At these settings it reports 40.1 to 45.3 Gbit/s per link. It also triggers
N_s = 500 at 100 kHz, faster than a shot takes, and checks that every second
trigger is missed.

| testbench | what it checks |
|---|---|
| `tb_icrc_calc` | ICRC of 100 random frames of 66–4166 bytes against the bit-serial model, with and without stalls; 16-cycle latency |
| `tb_stream_delay` | exact 16-advance delay with a random enable |
| `tb_packet_fifo` | split into 4096-byte payloads plus a remainder, lengths, data, full FIFO backpressure |
| `tb_frame_gen` | every header byte, the realignment, the placeholder, keep/last, no gaps |
| `tb_roce_tx` | frames from random shots with backpressure: headers, PSN, ICRC, payload; rate |
| `tb_afe_fifo`, `tb_cmac_fifo` | order across the clock crossing, overflow count; frames never gapped or started early |
| `tb_jesd_stream_merge` | every sample of 400 periods, group flags, nine words per four periods |
| `tb_synth_data_gen` | consecutive integers, group flag on every ninth word, words held while stalled, a word every clock |
| `tb_packetizer` | shot start on a group, length, tkeep, tlast, missed triggers, backpressure |
