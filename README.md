# Open-core SoC platform: LEON-2 with AES and FIR bus-master IP blocks

This RTL extends a LEON-2 (SPARC V8) processor system with two hardware
accelerators: an AES block and an FIR filter block. Both sit on the
AMBA 2 bus as **AHB bus masters**. The processor does not move data for
them. It writes a few registers over the APB: where the input is, where the
result goes, how much data there is, and a command. The block then fetches
its input from system memory on its own, processes it, writes the result
back and reports completion in a status register. While that runs, the
processor stays free to use the bus, at a lower priority.

The platform also contains the RAMs that the processor needs: the register
file and the cache tag and data arrays. They are built from dual-port
Artisan SRAM macros. A small timing wrapper makes each macro behave the way
the LEON-2 expects.

The processor core, its cache controllers, the memory controller, the debug
support unit and the standard LEON-2 APB peripherals are not part of this
RTL. They are existing designs that the platform reuses unchanged. The top
level brings their bus connections out as ports, so they, or behavioural
models of them, can be attached.

## Block diagram

```
                 cpu_mo/cpu_mi (LEON-2, master 0)
                        |
   aes_amba (master 1) -+- fir_amba (master 2)
        |  ahb_arbiter: fixed priority, higher number wins
        |  ahb_mux: central address/control/write-data mux, read-data/response mux, decoder
        v
   +----------------+----------------+------------------+------------------+
   | memctrl (port) | apb_bridge     | dsu (port)       | default slave    |
   | 0x0000_0000-   | 0x8000_0000-   | 0x9000_0000-     | (in ahb_mux):    |
   | 0x7FFF_FFFF    | 0x8FFF_FFFF    | 0x9FFF_FFFF      | ERROR response   |
   +----------------+-------+--------+------------------+------------------+
                            |  APB, 16 slots (LEON-2 table)
          LEON-2 peripherals (ports) | FIR slot 13 | AES slot 14

   rf RAMs:    2 x leon_dpram_box   (256 x 32, one write and one read port each)
   cache RAMs: 2 x leon_syncram_box (256 x 27 tags)
               2 x leon_syncram_box (2048 x 32 data, 8 KB per cache)
               each box wraps an artisan_dpram macro model
```

## AHB: who owns the bus and when

`ahb_arbiter` grants by fixed priority: **FIR (2) > AES (1) > LEON-2 (0)**.
The grant is re-evaluated only on a clock edge where HREADY is high, as
AMBA 2 requires. The bus parks on the processor when nobody requests it. A
master that holds HLOCK keeps the bus while it is requesting. The arbiter
also produces two values:

- `hmaster`, the owner of the address phase;
- `hmaster_d`, the owner of the current data phase, which is `hmaster`
  delayed by one HREADY-qualified edge.

`ahb_mux` builds the shared slave-side bus. Address and control come from
`hmaster` and write data from `hmaster_d`. The slave decoded from the
address-phase HADDR is recorded when the address phase is accepted. Read
data and response are returned from that recorded slave. Addresses that no
slave decodes (0xA000_0000 and above) go to a built-in default slave. It
answers a non-IDLE transfer with the two-cycle AHB ERROR response.

Fixed priority with re-arbitration between any two beats means a
continuously requesting FIR block can starve the AES block and the
processor. The system testbench shows this happening: while both jobs run,
the AES request is pending for hundreds of cycles in which FIR owns the
bus.

## APB and the register window of an IP block

`apb_bridge` is an AHB slave and the only APB master. Each access takes a
SETUP cycle and an ENABLE cycle, which means one AHB wait state per
transfer. There is no PREADY or PSLVERR; this is AMBA 2 APB. Address bits
9:0 select one of 16 slots through the LEON-2 slot table in
`amba_pkg::APB_SLOTS`. Only enabled slots get a PSEL. Reads from a
disabled or unlisted address return zero.

| slot | offset | user |
|---|---|---|
| 0–9 | 0x000–0x0AC | LEON-2 memory controller, cache controller, configuration, timers, UARTs, interrupt controller, I/O port (outside, through ports) |
| 13 | 0x200–0x2FC | FIR block |
| 14 | 0x300–0x3FF | AES block |

Both IP blocks have the same seven registers. They are implemented in
`ip_amba_ctrl`, and the offsets are relative to the block's base:

| offset | name | meaning |
|---|---|---|
| 0x00 | SRC | AHB byte address the input is loaded from |
| 0x04 | DST | AHB byte address the output is stored to |
| 0x08 | LOADN | words to copy from SRC into the input RAM |
| 0x0C | STOREN | words to copy from the output RAM to DST |
| 0x10 | CMD | bit0 LOAD, bit1 GO, bit2 STORE; steps run in that order |
| 0x14 | STATUS | bit0 busy, bit1 load done, bit2 go done, bit3 store done, bit4 bus error |
| 0x18 | PARAM | AES: number of blocks, bit 31 = decrypt. FIR: number of samples |

A CMD write while the block is busy is ignored. A bus error during LOAD or
STORE skips the remaining steps and sets STATUS bit 4.

Software sequence to encrypt N blocks with the default 128-bit key
(N ≤ 15; with a 192- or 256-bit key the key takes 6 or 8 words, blocks
start after it, LOADN = 6 + 4N or 8 + 4N and N ≤ 14):

```
mem[SRC .. SRC+15]         = key (most significant word first)
mem[SRC+16 .. SRC+16+16N-1] = plaintext blocks, 4 words each
AES.SRC = SRC; AES.DST = DST; AES.LOADN = 4 + 4N; AES.STOREN = 4N
AES.PARAM = N            (| 0x8000_0000 to decrypt instead)
AES.CMD = 7
while (AES.STATUS & 1) ;       // result now at DST, 4 words per block
```

For the FIR block, the input is the NTAPS coefficients followed by N samples,
one signed 16-bit value per word. Set LOADN = NTAPS + N, STOREN = N and
PARAM = N.

## The IP-block wrapper

Each IP block (`aes_amba`, `fir_amba`) has four parts:

1. `ip_amba_ctrl`: the registers and a small sequencer. It runs LOAD, then
   GO, then STORE.
2. `ahb_dma_master`: the bus-master engine. It moves words between AHB
   memory and the local RAMs as word-sized INCR bursts.
   - The first beat is NONSEQ, and so is the first beat after every
     re-grant or 1 KB boundary; the other beats are SEQ.
   - Slave wait states stall it.
   - It stops on the first non-OKAY response.
   - The RAM read address is looked ahead by one cycle. The RAM has a
     registered read, so write data is ready in the data phase even when
     the bus stalls.
3. Two `dw_ram` buffers: an input RAM in front of the core and an output
   RAM behind it. Each has one write port and one registered read port,
   and reset clears it.
4. A small engine between the RAMs and the core.
   - AES: reads the key once, then for each block reads four words,
     pulses LD, waits for DONE and writes four words.
   - FIR: loads the coefficients, clears the delay line, then streams one
     sample per clock.

Each step is a separate command bit. Data can therefore be loaded once and
processed several times, or the result stored later.

## AES core

The key size is a parameter, `KEY_BITS` (`AES_KEY_BITS` on the top): 128
(default), 192 or 256. It sets the number of rounds NR to 10, 12 or 14.
The block is always 128 bits.

`aes_cipher` is iterative. The parts are:

- one round module (`aes_round`) used NR times. Its last pass skips
  MixColumns.
- on-the-fly key expansion (`aes_key_expand`), one round key per clock.
  It keeps a window of the last NK key-schedule words (NK = KEY_BITS/32).
  The current round key is the oldest four words of that window, and each
  step computes the next four words and slides the window by four. This
  handles all three key sizes with the same one-key-per-clock timing.
- an initial AddRoundKey.

Timing:

| Edge after the LD edge | What happens |
|---|---|
| LD edge | Captures the key and text |
| 1 | Initial AddRoundKey |
| 2–NR+1 | Rounds 1–NR |
| NR+2 | Result to TEXT_OUT, DONE pulse |

So **DONE comes exactly 12 clocks after LD** for a 128-bit key (14 and 16
for 192 and 256). One block through the wrapper
costs about 22 clocks: 5 to read it, 13 in the cipher and 4 to write it.

`aes_inv_cipher` decrypts. Decryption needs the round keys in reverse, so
it runs the same forward key expansion first and stores all NR+1 round
keys (NR clocks). It then applies round key NR and NR inverse rounds
(`aes_inv_round`: InvShiftRows, InvSubBytes, AddRoundKey, InvMixColumns;
the last round has no InvMixColumns). **DONE comes 22 clocks after LD**
for a 128-bit key (26 and 30 for 192 and 256).
The AES block contains both cores, and PARAM bit 31 selects which one
runs.

The S-box is not stored as a table of numbers. `aes_pkg` computes it during
elaboration from its definition: the multiplicative inverse in GF(2^8)
modulo x^8+x^4+x^3+x+1, followed by the affine map with constant 0x63. The
inverse S-box is made by inverting that table. Byte order is the one used
by FIPS-197: bit 127 is the first byte, and the state byte at row r,
column c is byte 4c+r. RAM word 0 holds the key's most significant 32 bits.

The Rijndael block lengths of 192 and 256 bits are not built. Neither is a
key size that can change at run time: each instance has one key size.

## FIR core

`fir_filter` is a direct-form filter, y[n] = Σ c[k]·x[n−k]. It has NTAPS =
16 taps, signed 16-bit samples and coefficients, and a full-precision
accumulator of 36 bits. All products are formed in parallel, so it takes one
sample per clock with one clock of latency. The wrapper stores the low 32
bits of each output. The platform does not describe this core's insides,
so its tap count, widths and structure are choices of this design.

## RAM macros and the LEON-2 timing wrapper

`artisan_dpram` is a behavioural model of an Artisan dual-port synchronous
SRAM. Both ports sample address, data, chip enable (CEN, active low) and
write enable (WEN, active low) on their clock's rising edge. Read data
appears after that edge and holds until the next read. Delays and timing
checks are not modelled. Two writes to the same word at the same time give
an undefined result, as in the real part. The wrappers never do this.

The LEON-2 RAM interface launches address and data **on** the rising edge
and reads the data during the next cycle. A macro clocked by the same edge
would sample inputs that are still changing. `leon_syncram_box` (for the
caches) and `leon_dpram_box` (for the register file) therefore work like
this:

- They clock the macro on the **falling** edge, half a cycle after LEON-2
  launched its inputs.
- They register the macro output on the next rising edge. DATAOUT then
  holds the word addressed in cycle N for all of cycle N+1, which is the
  same timing as the LEON-2's own behavioural RAM.
- They convert the active-high enables to the macro's active-low pins.

These sizes follow the RAM generator settings:

| RAM | Size | Built as |
|---|---|---|
| Register file | 256 × 32 | Two boxes |
| Cache tags | 256 × 27 | One box per cache |
| Cache data | 2048 × 32 | One box per cache, 8 KB |

This design places both edges in one clock domain. A real implementation
has to meet half-cycle timing into the macro.

## Top level: `soc_platform`

Default parameters:

| Parameter | Value |
|---|---|
| AES_RAM_WORDS | 64 (key + 15 blocks) |
| AES_KEY_BITS | 128 |
| FIR_TAPS | 16 |
| FIR_RAM_WORDS | 256 (16 coefficients + 240 samples) |

The ports are AMBA structs from `amba_pkg` and RAM structs from `soc_pkg`:

| Port | What it connects |
|---|---|
| `cpu_mo`/`cpu_mi` | Processor master |
| `ahb_si` | Shared slave-side request |
| `memctrl_hsel`/`memctrl_so`, `dsu_hsel`/`dsu_so` | The two external slaves |
| `apb_o`, `apb_psel_o[16]`, `apb_prdata_i[16]` | External APB peripherals; the FIR and AES slots are handled inside |
| `rf_i`/`rf_o`, `itag_*`, `idata_*`, `dtag_*`, `ddata_*` | The processor's RAMs |

It uses one clock and an asynchronous active-low reset. Reset clears all
registers and the IP blocks' buffer RAMs, which are built from flip-flops
for that reason. The processor's Artisan RAM macros have no reset.

## Where this departs from, or goes beyond, the original platform

- The IP blocks' register meanings, the command encoding, the RAM layouts,
  the RAM depths, PARAM and its decrypt bit are this design's own. The
  original fixes only the AES register window 0x300–0x318, the 32-bit
  widths, the load/GO/DONE handshake and the rule that a register write
  starts an operation.
- The FIR block's APB slot (13) is this design's choice. In the LEON-2
  table that slot belongs to the (disabled) PCI arbiter.
- Interrupts from the IP blocks are not provided. Completion is polled.
- Bursts, locking, parking and error handling follow AMBA 2 practice
  rather than anything platform-specific. There are no SPLIT or RETRY
  responders and no retry in the masters.
- The FIR core's structure and size are this design's.
- The AES core has one key size per instance, chosen by a parameter, and
  128-bit blocks only.
- Processor-side blocks are outside the RTL: the integer unit, cache
  controllers, memory controller, DSU and APB peripherals. So are the
  clock tree and the pads, and an FFT core that the original names as a
  further bus-master core without describing it.

## Simulating

Every testbench is self-checking. It prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog if it
hangs. The packages must come first on the command line; other modules are
found through `-y`:

```
verilator --binary --timing -Wno-fatal -y rtl -y tb +libext+.sv \
  rtl/amba_pkg.sv rtl/aes_pkg.sv rtl/soc_pkg.sv tb/aes_ref_pkg.sv \
  tb/tb_soc_platform.sv --top-module tb_soc_platform -o sim
./obj_dir/sim
```

Replace `tb_soc_platform` by any `tb_<block>` to test one block.

Helpers in `tb/`:

| File | Role |
|---|---|
| `aes_ref_pkg` | Independent AES model: it builds its S-box another way and expands the whole key schedule up front |
| `tb_ahb_mem` | AHB memory with random wait states and an error region |
| `tb_ahb_cpu` | Processor stand-in with word read and write tasks |

`tb_soc_platform` runs the whole platform at its default parameters:

- The processor stand-in programs both IP blocks.
- 15 AES blocks and a 240-sample FIR job run at the same time. Each takes
  about 1400 clocks while they share the bus.
- The ciphertext is decrypted again with the inverse cipher.
- It also touches a LEON-2 peripheral slot, the DSU range, an unmapped
  address and every RAM wrapper.
- It counts each mechanism and fails if any never occurred: FIR pre-empting
  AES, the processor waiting for the bus, memory wait states, APB traffic to
  each kind of slave, both AES directions, default-slave errors, DSU
  accesses and RAM read-backs.
