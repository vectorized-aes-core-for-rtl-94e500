# AES-MS: a multi-stream AES-128 unit for a shared IO bus

An iterative AES-128 core needs 10 clock cycles per block, one per round.
On a 64-bit bus, reading that block takes 2 cycles and writing the result takes 2 more.
So a single core uses the bus only 4 cycles in 10. In CBC mode a stream cannot do better.
Each block must be XORed with the ciphertext of the block before it, so its blocks cannot overlap.

This unit fills the spare bus cycles with a second independent stream.
Two folded AES cores sit side by side. Each has its own key, IV, mode (ECB or CBC) and direction (encrypt or decrypt).
A small control unit interleaves their bus traffic on a fixed schedule:

* the bus is busy 8 cycles out of 10;
* each stream completes one 128-bit block every 10 cycles;
* the unit moves 2 × 128 bits per 10 cycles, which is 2.56 Gbit/s at 100 MHz.

The cores do not know how many streams exist. All of the multiplexing is in the control unit and the two bus multiplexors.

The same scheme scales with the bus width. A stream needs `2·128/BUS_W` bus cycles per 10-cycle block time, so the number of streams that fit is

    MaxStreams = floor(5 · BUS_W / 128)

This is 2 for a 64-bit bus and 5 for a 128-bit bus. Both are parameters of the RTL.

## Block structure

```
   IO bus ==+=========================================+==
            | 64-bit read data                        ^ 64-bit write data
            v                                         |
     +--------------+   in 0   +--------+   out 0  +---------------+
     | mem_read_mux |--------->| core 0 |--------->| mem_write_mux |
     |              |   in 1   +--------+   out 1  |               |
     |              |--------->| core 1 |--------->|               |
     +--------------+          +--------+          +---------------+
             ^                      ^                      ^
             +------------- aes_ms_ctrl -------------------+
```

The read multiplexor feeds the inputs of both cores. The write multiplexor takes the outputs of both. The control unit drives the cores and both multiplexors.

| file | role |
|---|---|
| `rtl/aes_pkg.sv` | Block type, mode and direction enums, S-box tables computed at elaboration, and the AES round functions. |
| `rtl/aes_round.sv` | One forward or inverse AES round. Combinational. |
| `rtl/aes_key_schedule.sv` | Key expansion: one round key per cycle, stored in an 11 × 128-bit memory with two read ports. |
| `rtl/folded_aes_core.sv` | Iterative AES-128 core with a 10-cycle latency and a 10-cycle initiation interval. Contains the CBC chaining register. |
| `rtl/mem_read_mux.sv` | Places bus read words into the input buffer of the right stream. |
| `rtl/mem_write_mux.sv` | Puts the selected half of a stream's result on the bus. |
| `rtl/aes_ms_ctrl.sv` | Control unit: slot frame, core starts, addresses, multiplexor selects. |
| `rtl/aes_ms_top.sv` | Top level that wires the blocks above together. |

## The slot frame

This is the part to understand before changing anything.

A free-running counter divides time into frames of 10 cycles, one AES block time.
Let `WPB = 128/BUS_W` be the number of bus words per block.
Stream `s` owns the slots starting at `base = 2·WPB·s`:

* slots `base … base+WPB-1` read the next input block of stream `s`;
* slots `base+WPB … base+2·WPB-1` write the latest result of stream `s`.

With the default 64-bit bus:

| slot | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 | 9 |
|---|---|---|---|---|---|---|---|---|---|---|
| bus | rd s0 w0 | rd s0 w1 | wr s0 w0 | wr s0 w1 | rd s1 w0 | rd s1 w1 | wr s1 w0 | wr s1 w1 | idle | idle |

Core `s` is started in slot `base` if its input buffer holds a complete block and its key schedule is ready.

The start cycle computes the initial AddRoundKey and round 1. Rounds 2–10 follow, and the result is registered at the end of slot `base+9`.
The core is therefore free again in slot `base` of the next frame.
The result is written out in that frame's write slots, before the core overwrites it at the end of slot `base+9`. An assertion in the control unit checks this.

Reads run ahead of the core. The next block is fetched in the same frame in which the current one starts.
The core samples its input buffer at the end of the start cycle, and the first new word lands one cycle later.
Reads also proceed during the 11-cycle key expansion. The core itself waits for `key_ready`.

For a command of `n` blocks, the timing of one stream is:

* frame 0: reads block 0;
* frame 1: starts block 0 and reads block 1;
* frame 2: writes block 0, starts block 1, and so on.

The last write comes `n+1` frames after the first read (plus any frames lost waiting for the key), and `stream_done_o` pulses with it.

## Interfaces

**Per-stream command.** The arrays are indexed by stream.

* `cfg_start_i` is a one-cycle pulse. It is ignored while the stream is busy.
* The other command inputs are sampled with that pulse:
  * `cfg_key_i` and `cfg_iv_i`;
  * `cfg_mode_i`: `MODE_ECB` or `MODE_CBC`;
  * `cfg_dir_i`: `DIR_ENC` or `DIR_DEC`;
  * `cfg_src_i` and `cfg_dst_i`: word addresses;
  * `cfg_nblocks_i`: the length in blocks.
* The same pulse starts the core's key expansion and loads its chaining register with the IV.
* `stream_busy_o` stays high until the last block is written. `stream_done_o` pulses in that write cycle.

**IO bus (unit is master).**

* Each cycle the unit drives `bus_req_o`, `bus_we_o` and `bus_addr_o`.
* For a write, the data is on `bus_wdata_o` in the same cycle.
* For a read, the memory must return the word on `bus_rdata_i` exactly one cycle later.
* Addresses count `BUS_W`-bit words and increase by one per word.
* Word 0 of a block is its most significant part (AES byte 0 first).
* There is no wait or stall signal. The memory must keep up with the fixed schedule.

**Parameters of `aes_ms_top`.**

| parameter | default | meaning |
|---|---|---|
| `N_STREAMS` | 2 | Number of streams and cores. At most `floor(5·BUS_W/128)`, checked at elaboration. |
| `BUS_W` | 64 | Bus width. Must divide 128. |
| `ADDR_W` | 32 | Width of the bus word address. |
| `LEN_W` | 16 | Width of the block count. |

## Inside the folded core

`folded_aes_core` iterates the round in `aes_round` over a 128-bit state register.

* **Encryption.** Forward rounds use round keys 1…10. The final round skips MixColumns.
* **Decryption.** The plain inverse cipher runs: InvShiftRows, InvSubBytes, AddRoundKey, InvMixColumns. It uses the same round keys in reverse order, so no separate decryption key schedule is needed.
* **Key memory.** It has two read ports. In the start cycle one port supplies the whitening key and the other the first round key.
* **CBC encryption.** The input is XORed with the chaining register, and each ciphertext becomes the next chaining value.
* **CBC decryption.** The decipher output is XORed with the chaining register, and the ciphertext just consumed becomes the next chaining value.

The S-box and the inverse S-box are not written out as tables. `aes_pkg` computes them at elaboration time from the GF(2^8) inverse (via exponent and log tables over the generator 3) followed by the affine map. The inverse S-box is that permutation inverted. Synthesis turns them into ROMs.

## Choices made here and departures from the original design

The organisation follows the original two-stream design:

* two folded cores, a read multiplexor and a write multiplexor, and a small control unit;
* a 64-bit bus with 8/10 occupancy;
* a 10-cycle latency and 2.56 Gbit/s at 100 MHz.

The following are this implementation's own choices:

* **Round hardware.** Iterative AES, one round per cycle, with S-boxes as logic ROMs. The original core keeps its S-boxes and key schedule in FPGA block RAMs (12 per core). Its resource figures (about 1083 slices and 12 block RAMs per stream on a Virtex-II Pro) are not a target of this RTL.
* **Key handling.** Expansion runs on chip, one round key per cycle, so every new key costs an 11-cycle initialisation. Key and IV come in on ports rather than over the bus. Each stream has its own key memory. The variant in which several streams share one key register is not built.
* **Bus and schedule.** The bus protocol and the order of slots within a frame are this design's own, as are the command interface, the word order and the asynchronous active-low reset.
* **Scaling.** Bus widths above 128 bits (needed for more than 5 streams) are not supported. The slot frame would need more than one read and one write per slot.

## Verification

Each block has a self-checking testbench in `tb/`. The reference model `tb/aes_ref_pkg.sv` is independent of the RTL helpers.

| testbench | what it covers |
|---|---|
| `tb_aes_round` | FIPS-197 round-1 value and 200 random rounds in both directions. |
| `tb_aes_key_schedule` | FIPS-197 key expansions. Checks the 11-cycle init time and both read ports. |
| `tb_folded_aes_core` | FIPS-197 C.1. SP 800-38A ECB and CBC vectors in both directions. Random streams. Checks the 10-cycle latency with back-to-back blocks. |
| `tb_mem_read_mux`, `tb_mem_write_mux` | Random routing against a testbench model. |
| `tb_aes_ms_ctrl` | Slot positions, addresses, capture strobes, start slots, block counts and done pulses, with stand-in cores. |
| `tb_aes_ms_top` | End to end at default parameters, three rounds of two concurrent streams covering all four mode/direction pairs, including a CBC round trip. Checks that the steady state reaches 8 busy bus cycles in every 10, and that every block takes 10 cycles. It counts key-wait stalls, read-ahead, overlap and idle slots. |
| `tb_aes_ms_wide` | `BUS_W=128`, five concurrent streams, all 10 slots busy in steady state. |

`tb/bus_mem_model.sv` is the behavioural memory used on the bus.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb --top-module tb_aes_ms_top \
    rtl/aes_pkg.sv tb/aes_ref_pkg.sv tb/bus_mem_model.sv tb/tb_aes_ms_top.sv
./obj_dir/Vtb_aes_ms_top
```

Verilator finds the other modules through `-Irtl`. Each testbench ends with a line `TB_RESULT checks=N failures=M`. To try another bus width, override `N_STREAMS` and `BUS_W` on `aes_ms_top`, as `tb_aes_ms_wide` does.
