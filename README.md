# Inline AES-XTS encryption bridge for SATA storage

This bridge sits on the SATA cable between a PC and an SSD. Sector data that the PC writes is encrypted with XTS-AES-256 before it reaches the SSD. Sector data that the SSD returns is decrypted before it reaches the PC. Commands, status and every other frame (FIS) pass through unchanged, so neither the host software nor the drive firmware needs to know the bridge is there. The design follows "FPGA-Based inline encryption bridge using AES-XTS for storage systems". It covers everything between the two SATA link layers: both cipher paths, the bridge with its dual handshake, and the registers that the processor uses to load keys and read status.

```
 PC link layer --rx--> fis_xts_path (Encrypt XTS-mode) --> bridge_data --tx--> SSD link layer
 PC link layer <--tx-- bridge_data <-- fis_xts_path (Decrypt XTS-mode) <--rx-- SSD link layer
                           ^
         ctrl_regs (Key1, Key2, mode, counters) -- aes256_key_expand x2 -- lba_tracker
```

The top module is `inline_crypt_bridge`. Its `h_*` ports face the PC-side link layer and its `d_*` ports face the SSD-side link layer. The `reg_*` bus faces the processor.

## XTS-AES data path

Each 16-byte block j of sector i is processed as `C = E_K1(P xor T) xor T`. The tweak is `T = E_K2(i) * alpha^j` in GF(2^128). A sector holds 512 bytes, which is 32 blocks.

- `aes256_enc_pipe` is the fully unrolled AES-256 core. It has 14 round stages, and a register follows each one, so it accepts one block per clock and has a latency of 14 clocks. The final round leaves out MixColumns. The S-box is computed at elaboration from its definition: the inverse in GF(2^8), then the affine map.
- `aes256_dec_pipe` is the inverse cipher. It is also 14 stages and uses the same round keys in reverse order. The read path uses it with Key1, while its tweaks are still made by encryption under Key2.
- `aes256_key_expand` turns a 256-bit key into the 15 round keys, one per clock. The round keys are ready 14 clocks after a load.
- `xts_alpha_mult` implements Eq. (1): every byte shifts left by one bit and takes the carry from the byte below it. The carry out of byte 15 folds back into byte 0 as 135 (0x87).
- `xts_core` adds one register in front of the AES pipeline for the first tweak XOR and one behind it for the second XOR. A block therefore takes 16 clocks. That is the latency in the resource table; the 14 cycles quoted in the text are the AES rounds alone. Back-pressure freezes every stage together.

## Tweak prefetch (Enc2)

The tweak must be ready when the data block arrives. `xts_tweak_gen` therefore has its own AES-256 pipeline under Key2 (Enc2), which runs in parallel with the data pipeline (Enc1):

1. Once a command gives the starting sector number, Enc2 encrypts sector numbers i, i+1, i+2, and so on, without waiting for the data.
2. The encrypted tweaks go into a small FIFO, four entries by default.
3. An alpha multiplier steps the current tweak forward once per block and moves on to the next FIFO entry after 32 blocks.

A new command restarts the sequence. An epoch tag drops any result of the old sequence that is still inside the pipeline. The only stall left is the roughly 15 clocks just after a command, which the `TWEAK_STALLS` counter records.

## FIS handling

`fis_xts_path` sits on the receive stream of each link layer. It works on 32-bit dwords that carry start-of-frame and end-of-frame marks, one per clock.

- **Data FIS (0x46):** the header dword is forwarded as is. The payload is gathered four dwords at a time into 16-byte blocks. Payload byte 0 is bits [7:0] of the first dword. Each block goes through `xts_core`, and the result is split back into dwords.
- **Other FIS:** they pass unchanged. So do headers. A dword that bypasses the cipher leaves only when the cipher pipeline is empty, so the order of dwords never changes.
- **Payload tails:** a tail of one to three dwords is carried through the pipeline in clear, because ciphertext stealing is not built.
- **Transparent mode:** when encryption is off (`CTRL.crypt_en = 0`), Data FIS pass in clear.
- **No cipher context:** a Data FIS also passes in clear when its direction has no cipher context, which the next section explains. The `CLEAR_DATA_FIS` counter records this case.

## LBA tracking

`lba_tracker` watches the words accepted on both sides to learn which sector number the coming data belongs to.

- **Register Host-to-Device FIS (0x27):**
  - READ/WRITE DMA EXT carries a 48-bit LBA.
  - READ/WRITE DMA carries a 28-bit LBA.
  - Either one starts the tweak sequence of the decrypt path (reads) or the encrypt path (writes).
- **Queued commands:** READ/WRITE FPDMA QUEUED store their LBA under their tag, in 32 entries. When the SSD later sends a DMA Setup FIS (0x41), the tracker takes the tag, the direction and the byte offset from it. It then starts the matching path at LBA + offset/512.
- **Other commands:** any other command, such as IDENTIFY DEVICE, SMART or FLUSH CACHE, pulses `seq_stop`. The top then drops the cipher context of both directions until the next read or write command. Without this, the IDENTIFY data, which the PC needs to detect the drive and its capacity, would be deciphered as if it were the last sector read.

## Bridge_data and the dual handshake

`bridge_data` moves one frame at a time through a shared buffer (`frame_fifo`, 4096 dwords).

- **SSD to PC:**
  1. The SSD's request is acknowledged at once, and the frame is buffered.
  2. The bridge raises a request towards the PC and sends the frame when the PC is ready.
  3. The PC's acknowledgement (good or error) is passed back to the SSD as the final ACK.
- **PC to SSD:**
  1. The PC's request is not acknowledged straight away. The bridge first asks the SSD and waits until the SSD is ready.
  2. Only then does it acknowledge the PC and stream the frame.
  3. The SSD's final ACK is passed back to the PC.
- **Collisions:** if both sides request in the same clock, the SSD goes first. This choice is this design's own. The `COLLISIONS` counter records these events.

Assertions check that only one direction is active at a time and that the PC never gets its ACK before the SSD is ready.

## Processor registers

`ctrl_regs` uses 32-bit word addresses.

| addr | name | access | content |
|---|---|---|---|
| 0x00 | CTRL | r/w | bit 0 crypt_en; writing bit 1 expands both keys |
| 0x01 | STATUS | r | bit 0 keys ready, bit 1 bridge busy, bit 2 encryption active |
| 0x02 | ENC_BLOCKS | r, write clears | blocks encrypted |
| 0x03 | DEC_BLOCKS | r, write clears | blocks decrypted |
| 0x04 | H2D_FRAMES | r, write clears | frames PC to SSD |
| 0x05 | D2H_FRAMES | r, write clears | frames SSD to PC |
| 0x06 | FRAME_ERRORS | r, write clears | frames ended with error status |
| 0x07 | COLLISIONS | r, write clears | simultaneous requests |
| 0x08 | TWEAK_STALLS | r, write clears | clocks a block waited for its tweak |
| 0x09 | CLEAR_DATA_FIS | r, write clears | Data FIS passed in clear while encryption on |
| 0x0A | COMMANDS | r, write clears | data commands seen |
| 0x0B | NCQ_SETUPS | r, write clears | DMA Setup FIS of queued commands |
| 0x10-0x17 | KEY1 | write only | 0x10 = bits 255:224 |
| 0x18-0x1F | KEY2 | write only | 0x18 = bits 255:224 |

The keys live only in volatile registers. They read back as zero, and reset clears them.

## Departures and own choices

- The text asks for two AES blocks working in parallel, while the pipeline figure shows one core with a selector between tweak encryption and data encryption. This design follows the text: Enc1 and Enc2 are separate.
- Not given, and chosen here:
  - the datapath width: 32 bits;
  - the buffer depth: 4096 dwords;
  - the tweak FIFO depth: 4;
  - the register map;
  - how the sector number is found: command parsing;
  - which frames are ciphered: Data FIS payloads only.
- Not built:
  - the SATA link layer and PHY, which are taken from earlier work and run on the FPGA's transceivers;
  - the processor and its firmware;
  - ciphertext stealing.
- PIO data transfers are not tracked and pass in clear. This includes PIO reads and writes of sectors, which such drives rarely use for bulk data.

## Simulation

Each block has a self-checking testbench, `tb/tb_<block>.sv`. Each one prints `TB_RESULT checks=N failures=M`. `tb/xts_ref_pkg.sv` is a behavioural AES/XTS model that is checked against the FIPS-197 and IEEE 1619 vectors. For example:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv rtl/xts_pkg.sv \
          tb/xts_ref_pkg.sv tb/tb_inline_crypt_bridge.sv --top-module tb_inline_crypt_bridge
./obj_dir/Vtb_inline_crypt_bridge
```

`tb_inline_crypt_bridge` runs the top with its default parameters. It loads keys over the register bus and checks:

- DMA EXT and queued writes and reads, against the reference model;
- IEEE 1619 vector 10 on the wire;
- transparent mode;
- collisions;
- IDENTIFY data passing in clear after a non-data command;
- error acknowledgements;
- the event counters.

`tb_workloads` drives the traffic patterns of a disk benchmark with link-layer models that are always ready, so that the bridge sets the pace. All data is checked against the reference model, and rates assume the 150 MHz clock.

| pattern | bytes | clocks | rate |
|---|---|---|---|
| sequential write, one 64-sector command as four 8 KiB Data FIS | 32768 | 8300 | 592 MB/s |
| sequential read, the same | 32768 | 8302 | 592 MB/s |
| random 4 KiB, 32 queued commands (22 reads, 10 writes), random order | 131072 | 34260 | 574 MB/s |

The bridge therefore keeps up with SATA 3's 600 MB/s, apart from per-frame handshakes and the 16-clock pipeline fill. A real drive's own speed is not modelled.

## Verification status

- All twelve block testbenches, the end-to-end testbench and the workload testbench pass.
- Every module passes `verilator --lint-only -Wall`. The only warnings are about unused package constants, two unused signal bits, and asynchronous reset reaching the assertions. Every module also elaborates and synthesizes with yosys, with no latches.
- For each block, a deliberately broken copy of the module was run against its testbench, and the testbench detects the fault.
- Link and PHY behaviour, real drive timing, and throughput on hardware are not simulated.
