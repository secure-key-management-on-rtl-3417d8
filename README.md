# Hidden-key security module for general-purpose processors

A general-purpose processor is flexible enough to run communication protocols
and block-cipher modes, but anything it can read, software can leak. This
design lets such a processor *manage* secret keys without ever *seeing* them.
Keys live in registers inside a small security module. The processor names
them only by address, and a secret key leaves the module only after the
module's own cipher has enciphered it.

The processor still does the data handling. It parses packets, sequences the
block-cipher mode and does the XOR of CFB mode. The module only does the AES
block operations and the key handling.

The same security module is provided with three processor attachments:

| attachment | bus | RTL | character |
|---|---|---|---|
| custom instruction (NIOS II-style) | internal processor bus | `nios_ci_sec` | point-to-point, lowest latency |
| FSL channels (MicroBlaze-style) | coprocessor-dedicated bus | `fsl_sec` | point-to-point, FIFO latency, commands travel through the FIFO |
| AHB-Lite slave (Cortex-M1-style) | peripheral bus | `ahb_sec` | shared bus, memory-mapped, wait states |

The top level, `sec_ext_top`, holds all three side by side. Each has its own
ports and its own key registers.

Clocking at the top:

* All three security modules run on `clk`.
* The processor side of the FSL channels has its own clock, `mb_clk`.

## Key hierarchy

There are two levels of key:

* **Master keys** encipher session keys and nothing else. A master key is
  written into the module over a separate key-loading channel (`mk_init_*`),
  which does not pass through the processor. After that it is only ever
  connected to a cipher key input.
* **Session keys** encipher data. A session key arrives inside a packet,
  enciphered under a master key. The processor hands that ciphertext to the
  module. The module deciphers it straight into a session-key register, and
  the plain key never appears on a processor-visible signal. Session keys can
  be replaced as often as wanted, which is the point: frequent key changes
  limit side-channel exposure.

A session key can leave the module only enciphered under a master key
(`OP_EXPORT_SKEY`).

## Inside the security module (`sec_core`)

```
 processor zone        |        cipher zone         |   key storage zone
                       |                            |
 cmd (control bus) --> decoder ---- start/select ---|-------------+
                       |                            |             |
 wdata --> data-in reg ==data bus==> aes_enc  <==cipher key bus== master keys
                       |            aes_dec  <==                   session keys
 rdata <-- data-out reg <==data bus== outputs       |             ^   |
                       |              aes_dec out ==key data bus==+   |
                       |              aes_enc in  <==key data bus=====+
```

The module is split into three zones joined by three internal buses:

* **Data bus.** Carries data and *enciphered* session keys between the
  128-bit data-in/data-out registers and the cipher data ports. The processor
  fills and empties these registers one 32-bit word at a time.
* **Key data bus.** Carries keys between the key registers and the cipher
  data ports:
  * decipher output → session-key register (key import);
  * session-key register → cipher input (key export).
* **Cipher key bus.** Carries the addressed key register to the cipher key
  inputs.

The security property comes from what is *not* wired:

* `key_store` has no path to the data-out register.
* Its key-data-bus read port (`kd_*`) can only reach session keys.
* Master keys have no read port except the cipher key bus.
* In `sec_core`, the decipher result of a key import is written only to the
  key store.

An assertion, `a_skey_hidden`, checks that the data-out register does not
change when a session key is written.

### Commands

Every command is one 32-bit command word (`sec_pkg::cmd_t`):

| bits | field | meaning |
|---|---|---|
| [3:0] | `op` | operation |
| [5:4] | `widx` | word index 0..3 within the 128-bit block (word 0 = bits 127:96) |
| [9:8] | `sk_addr` | session-key register |
| [13:12] | `mk_addr` | master-key register |

| op | name | action | response |
|---|---|---|---|
| 0 | `OP_NOP` | nothing | 0 |
| 1 | `OP_WR_DATA` | data-in word `widx` ← `wdata` | 0 |
| 2 | `OP_RD_DATA` | — | data-out word `widx` |
| 3 | `OP_ENC_DATA` | data-out ← AES-enc(session key `sk_addr`, data-in) | 0 / 1 |
| 4 | `OP_DEC_DATA` | data-out ← AES-dec(session key `sk_addr`, data-in) | 0 / 1 |
| 5 | `OP_LOAD_SKEY` | session key `sk_addr` ← AES-dec(master key `mk_addr`, data-in) | 0 / 1 |
| 6 | `OP_EXPORT_SKEY` | data-out ← AES-enc(master key `mk_addr`, session key `sk_addr`) | 0 / 1 |
| 7 | `OP_STATUS` | — | `{mk_valid[3:0]` at bits 11:8, `sk_valid[3:0]` at bits 3:0`}` |

### Key-use rules

The two-level hierarchy only holds if the module refuses the operations that
would break it. The key address fields therefore mean different things for
different operations:

* Data operations (`OP_ENC_DATA`, `OP_DEC_DATA`) can name only a session-key
  register. If a data decryption could use a master key, the processor could
  decrypt an enciphered session key from a packet and read it in clear.
* Key operations (`OP_LOAD_SKEY`, `OP_EXPORT_SKEY`) always use a master key as
  the cipher key. Their data side is either the data-in register (import) or
  a session-key register (export).

The module refuses a command, with response `RSP_ERR` and `rsp_err` high, in
these cases:

* it names a key register that is empty (never written since reset);
* it names a register beyond `N_MK`/`N_SK`;
* it carries an unknown opcode.

A refused command changes nothing.

Limits of these rules:

* An imported session key is not authenticated. Any 128-bit ciphertext the
  processor supplies becomes *some* session key. The design provides no
  integrity check of enciphered keys.
* Nothing stops the processor from using `OP_ENC_DATA` as an encryption
  oracle under a session key. That is inherent in letting the processor run
  the cipher mode.

### Cipher zone

* **`aes_enc`** is iterative AES-128 (FIPS-197). It computes one round per
  clock on a 128-bit state and expands round keys on the fly.
* **`aes_dec`** is the FIPS-197 inverse cipher, also one round per clock. It
  walks the key schedule backwards. For that it needs the last round key:
  * for a new key it first runs the forward schedule for 10 cycles;
  * it keeps the last key and its last round key, so repeated decryptions
    under the same key skip that step.
* The S-box and inverse S-box are built at elaboration time from their
  definition in `aes_pkg`: the GF(2^8) inverse modulo x^8+x^4+x^3+x+1, then
  the affine map. In hardware each S-box use is a 256×8 ROM.

## Timing

Cycle counts are from the cycle a command is accepted to the cycle its
response strobe is high:

| operation | `sec_core` | custom instruction `done` |
|---|---|---|
| WR_DATA, RD_DATA, STATUS, NOP, refused command | 1 | 1 |
| ENC_DATA, EXPORT_SKEY | 12 | 12 |
| DEC_DATA, LOAD_SKEY, new key | 22 | 22 |
| DEC_DATA, LOAD_SKEY, same key as last decryption | 12 | 12 |

Inside the cipher cores, `done` rises 11 cycles after `start` (21 for a new
decryption key). `sec_core` registers the result one cycle later.

The end-to-end testbench measures a whole CFB-128 block, with the processor
XOR modelled as free. The processor model, including the FSL processor side,
runs at 50 MHz. It is idealised: one bus operation at a time and no software
overhead.

| attachment | cycles per block | at 50 MHz |
|---|---|---|
| custom instruction | 29 | ≈220 Mb/s |
| FSL | 44 | ≈145 Mb/s |
| AHB | 48 | ≈133 Mb/s |

Real processors spend most of each block in software and, on AHB, in sharing
the bus with instruction fetch. Measured systems of this kind reach roughly
25, 18 and 12 Mb/s for these attachments at 50 MHz. That corresponds to
255–525 cycles per block, so the module is not the bottleneck. The ranking of
the three attachments is the same, and the testbench checks it.

## The three attachments

### Custom instruction (`nios_ci_sec`)

This uses the multi-cycle custom-instruction handshake (`start`/`done`, with
`clk_en` qualifying `start`). One instruction is one `sec_core` command:

| signal | carries |
|---|---|
| `n[3:0]` | operation; this is the control bus coming directly from the processor's decoder |
| `datab` | the other command-word fields |
| `dataa` | the data word |
| `result` | the response word |

`reset` is active high, as on that port.

A CFB block costs 4 write instructions, 1 encrypt instruction and 4 read
instructions.

### FSL channels (`fsl_sec`)

There are two `fsl_fifo` channels, each 16 deep by default (`FIFO_DEPTH`),
with 33-bit words (32 data bits plus the FSL control bit). The processor
writes to `s_*` and reads from `m_*`.

The channels are dual-clock FIFOs:

* The processor side runs on `proc_clk` (`mb_clk` at the top).
* The security module runs on `clk`.

So the processor clock is not limited by the cipher's critical path.

With both clocks equal and four data words already written, the first result
word of an encryption can be read 22 cycles after the command word is
written. Pointers
cross between the clock domains as Gray codes through two-flop synchronisers.
A word therefore becomes visible on the far side about three clocks after it
is written.

Commands travel inside the FIFO as a word stream:

* **control = 0:** a data word. It is written to data-in at an index that
  counts 0,1,2,3 and is reset by every command word. There is no reply.
* **control = 1:** a command word. When it finishes:
  * a successful ENC_DATA, DEC_DATA or EXPORT_SKEY first returns the four
    data-out words, with control = 0;
  * then every command returns its response word, with control = 1.

A command word with `OP_WR_DATA` writes 0 into word `widx`.

If the processor writes faster than it reads, the wrapper stalls in two
steps:

1. The return FIFO fills, so the wrapper stops taking commands.
2. Then the input FIFO fills and `s_full` rises.

The processor must therefore read replies while it streams.

### AHB-Lite slave (`ahb_sec`)

Register map, as word offsets from the slave base:

| offset | write | read |
|---|---|---|
| 0x00–0x0C | data-in word 0..3 | data-out word 0..3 |
| 0x10 | command word (posted) | last command word |
| 0x14 | — | status: bit 0 busy, bit 1 last command refused (never waits) |
| 0x18 | — | key-valid flags (`OP_STATUS`) |

A command write completes as soon as the module takes it. Any later access
that needs the module gets wait states (`HREADYOUT` low) until the command
has finished:

* data-word writes and reads;
* flag reads.

Both pipelined and single transfers work. `HRESP` is always OKAY. `HSIZE` is
ignored: all accesses are words. Unmapped offsets read 0.

## Parameters

| parameter | default | where | meaning |
|---|---|---|---|
| `N_MK` | 1 | all | master-key registers (1..4) |
| `N_SK` | 1 | all | session-key registers (1..4) |
| `FIFO_DEPTH` | 16 | `fsl_sec`, top | words per FSL channel (power of two) |

Key addresses are 2 bits wide, so at most four registers of each kind can be
configured.

## Departures and open points

* **Session-key authentication is not implemented.** The intended protocol
  authenticates an imported session key, but no mechanism is defined for it.
  This design only deciphers.
* **Physical separation is not RTL.** The zones are meant to be placed in
  separate regions with empty "insulation" space between them, with only the
  bus signals crossing. That is a floorplanning constraint. The module
  boundaries (`key_store`, `aes_enc`/`aes_dec`, the registers in `sec_core`)
  are the natural units for such placement.
* **Choices made here.** The original description of the design leaves these open:
  * the command set, the command-word encoding and the refusal rules;
  * the FSL stream format and the AHB register map;
  * the decipher key cache;
  * asynchronous active-low reset that clears all keys.
* **Processors not included.** The processors, their buses beyond the ports
  shown, and the key-loading path into `mk_init_*` are outside this RTL.

## Files

* `rtl/aes_pkg.sv`: AES types, S-box generation and round functions.
* `rtl/sec_pkg.sv`: command word, opcodes and widths.
* `rtl/aes_enc.sv`, `rtl/aes_dec.sv`: the cipher and decipher cores.
* `rtl/key_store.sv`: the master-key and session-key registers.
* `rtl/sec_core.sv`: the security module.
* `rtl/nios_ci_sec.sv`, `rtl/fsl_fifo.sv`, `rtl/fsl_sec.sv`, `rtl/ahb_sec.sv`:
  the three attachments.
* `rtl/sec_ext_top.sv`: the top level.
* `tb/aes_ref_pkg.sv`: an independent software AES-128 model. It builds its
  S-box from log/antilog tables. The testbenches compare against it and
  against the FIPS-197 example vectors.
* `tb/tb_<module>.sv`: one self-checking testbench per module. Each prints
  `TB_RESULT checks=N failures=M`.

`tb_sec_ext_top` runs the whole flow at default parameters through all three
attachments:

1. master-key load;
2. packets carrying enciphered session keys, with a new key per packet;
3. CFB-128 encryption and decryption of the payload;
4. decryption with key-cache hits;
5. key export;
6. refused commands;
7. FSL FIFO overflow back-pressure, including streaming with the FSL
   processor side on a faster, unrelated clock;
8. AHB wait states.

It counts how often each of these happened.

## Simulating

With Verilator 5, for example for the top-level test:

```
verilator --binary --timing --assert -Wno-fatal \
  rtl/aes_pkg.sv rtl/sec_pkg.sv tb/aes_ref_pkg.sv \
  rtl/aes_enc.sv rtl/aes_dec.sv rtl/key_store.sv rtl/sec_core.sv \
  rtl/nios_ci_sec.sv rtl/fsl_fifo.sv rtl/fsl_sec.sv rtl/ahb_sec.sv \
  rtl/sec_ext_top.sv tb/tb_sec_ext_top.sv --top-module tb_sec_ext_top
./obj_dir/Vtb_sec_ext_top
```

For a single block, list the packages, the block, the modules it instantiates
and its testbench. Every test finishes within a few seconds.
