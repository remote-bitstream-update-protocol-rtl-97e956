# Replay-proof remote bitstream update for flash-based FPGAs

An FPGA that is updated over a network can be attacked without ever breaking bitstream
encryption. The attacker records an old, legitimately signed bitstream and sends it again later,
perhaps one with a known bug. The vendor decryptor accepts it, because it *is* authentic. This is a
downgrade, or replay, attack. Encryption and MAC checking give confidentiality and integrity. They
do not give freshness.

This design adds freshness with two version numbers and a small subsystem in the user logic:

* **TAG_UL** is compiled into every bitstream. It is the version of the logic that is running.
* **TAG_F** lives in the FPGA's on-chip non-volatile user flash. It is the version the device
  has agreed to run.

At every power-up the subsystem compares the two. If they differ, it raises `alarm`, which
stops the user design. TAG_F changes only one way: an authenticated update command, which moves
it to TAG_F + 1 and then stops the system. From then on only a bitstream that carries the next
version can run. Every older bitstream, including the one that was just running, is refused for
good. The configuration logic and the bitstream format stay as the vendor made them. The only
requirements are a flash-based FPGA with user-writable non-volatile memory and one extra
constant in the bitstream.

The RTL also contains a second, independent design from the same work: a SHA-256 engine and an
RSA-1024 signature checker. They belong to a secure-boot case study in which a boot loader
hashes the kernel image and checks its signature before it starts the kernel. See
[The secure-boot engines](#the-secure-boot-engines).

## The protocol

Three secret 3-DES keys, generated by the system designer and stored in the device's flash, tie
each message to one version:

| key    | message                          | meaning                                                |
|--------|----------------------------------|--------------------------------------------------------|
| K_req  | designer → device: E_Kreq(TAG)   | "you may leave version TAG"                            |
| K_ack1 | device → designer: E_Kack1(TAG)  | "I accepted the update command for version TAG"        |
| K_ack2 | device → designer: E_Kack2(TAG)  | "version TAG has been received and has started"        |

Every message is a single 64-bit 3-DES block: the encryption of the 64-bit tag. No nonce is
needed, because each tag value is used in exactly one round of the protocol.

The device runs these steps after every reset (`master_fsm`):

1. **Power-up check.** Read TAG_F. If TAG_F ≠ TAG_UL, shut down.
2. **First start of a new version.** Read the flag. If it is set, this is the first start after
   an authorised update. Read K_ack2. Clear the flag while encrypting TAG_UL with K_ack2. Send
   E_Kack2(TAG_UL).
3. **Prepare for a command.** Read K_req and compute E_Kreq(TAG_UL), reading K_ack1 at the
   same time. Then compute E_Kack1(TAG_UL). Wait for a 64-bit command. Any command other than
   E_Kreq(TAG_UL) is ignored, and the device keeps waiting.
4. **Authorise the update.** Write TAG_F + 1. Set the flag. Send E_Kack1(TAG_UL). Shut down.

While it waits, the running system works normally. Shutdown (`alarm` high) lasts until the next
reset. The designer then sends the new bitstream, which carries TAG_UL + 1, through the FPGA's
ordinary encrypted configuration path. That path is outside this RTL.

### Why replay fails

* **An old bitstream** carries a TAG_UL below TAG_F. It fails step 1 on every power-up.
* **An old update command** is E_Kreq of an old tag. It never equals E_Kreq of the tag now
  running, so step 3 ignores it.
* **The current update command, sent again,** can be replayed only while the same version is
  running. Its only effect is the update that was already authorised.
* **A new version that was never authorised** has TAG_UL = TAG_F + 1 before TAG_F has moved.
  It fails step 1.
* **The designer knows how the update went.** E_Kack1 confirms that the device has committed
  to the step. E_Kack2 confirms that the new version actually started. An attacker without the
  keys can forge neither.

Because TAG_F lives in flash, the version check survives power cycles. In this RTL a power
cycle is a pulse on `rst_n`: all logic is reset, but the `user_flash` array is not.

## Hardware structure

```
fpga_security_top
 |
 +-- secure_update
 |     rxd --> rs232_ctrl --cmd--------> master_fsm --start/key/din--> des3_core
 |     txd <-- rs232_ctrl <--tx_block--  master_fsm <--done/dout------ des3_core
 |                                       master_fsm --a,b-->  tag_comparator --eq--> master_fsm
 |     alarm <-------------------------- master_fsm
 |                                       master_fsm --field req/done--> nvm_ctrl
 |                                       nvm_ctrl --word req/ack--> user_flash <-- prog_*
 |
 +-- sha256_core   <-- sha_blk, sha_blk_valid, sha_first
 |                 --> sha_digest, sha_done, sha_ready
 |
 +-- rsa_verify    <-- rsa_start, rsa_modulus, rsa_r2, rsa_exponent, rsa_sig, rsa_em
       |           --> rsa_result, rsa_match, rsa_done, rsa_busy
       +-- mont_mul
```

| module           | role |
|------------------|------|
| `master_fsm`     | The four protocol steps. It selects the comparator's operands and starts flash accesses and encryptions. Two of them overlap: the flag write runs under E_Kack2, and the K_ack1 read runs under E_Kreq. |
| `des3_core`      | Triple-DES in EDE form, E_K3(D_K2(E_K1(P))). One datapath does one DES round per cycle, so a block takes 48 cycles. The round keys are computed on the fly. |
| `tag_comparator` | 64-bit equality check. It is used for TAG_F = TAG_UL and for command = E_Kreq(TAG_UL). |
| `rs232_ctrl`     | Sends and receives 64-bit messages as 8 bytes, most significant byte first, 8N1. A partial message is dropped after 40 idle bit times. Uses `uart_rx` and `uart_tx`. |
| `nvm_ctrl`       | Reads or writes one protocol field as a sequence of 32-bit flash words. |
| `user_flash`     | A behavioural model of the on-chip flash. It is not a vendor macro. It has a read latency and a program latency, its contents survive reset, and it has a factory port `prog_*` for loading the keys. |
| `sha256_core`    | SHA-256 compression, one round per cycle (see below). |
| `rsa_verify`     | S^E mod N by square-and-multiply over Montgomery products, compared with the expected message. |
| `mont_mul`       | Bit-serial Montgomery product A·B·2^-1024 mod N, one bit of A per cycle. |
| `des_pkg`, `su_pkg` | The DES tables and round functions, and the shared widths, the flash map and the FSM state encoding. |

### Flash map (32-bit words)

| words | field  | notes |
|-------|--------|-------|
| 0–1   | TAG_F  | 64 bits, high word first |
| 2     | flag   | bit 0; 1 = new version authorised, not yet acknowledged |
| 4–9   | K_req  | K1‖K2‖K3, 64 bits each with DES parity bits, high word first |
| 10–15 | K_ack1 | same layout |
| 16–21 | K_ack2 | same layout |

Before deployment, write the keys, TAG_F = TAG_UL and flag = 0 through `prog_we`, `prog_addr`
and `prog_wdata`.

### Serial messages

A command or acknowledgement is one 64-bit ciphertext, sent as eight 8N1 bytes, most
significant byte first. At the defaults (60 MHz, 115200 bit/s) one bit lasts 521 clock cycles,
and a message takes about 0.7 ms.

## Timing

Every encryption takes 48 cycles. Sending does not block the FSM. At the default flash
latencies (read 7 cycles per word, program 35), a field of w words takes 8w + 1 cycles to read
and 36w + 1 cycles to write.

| step (state)                           | cycles here | reference implementation (60 MHz) |
|----------------------------------------|------------:|-----------------------------------:|
| read TAG_F, compare, read flag         | 29          | 54                                 |
| read K_ack2                            | 50          | 47                                 |
| clear flag ‖ E_Kack2(TAG_UL)           | 49          | 140                                |
| send (hands off to the UART)           | 1           | hidden                             |
| read K_req                             | 50          | 79                                 |
| read K_ack1 ‖ E_Kreq(TAG_UL)           | 50          | 48                                 |
| E_Kack1(TAG_UL)                        | 49          | 48                                 |
| **power-up to command wait**           | **278**     | **524**                            |
| write TAG_F + 1, then write flag       | 112         | 108                                |

The differences come from the flash, which is modelled here with one read latency and one write
latency. A real device has its own flash timing. To bring the model closer to a particular part,
change `FLASH_RD_LAT` and `FLASH_WR_LAT` on `secure_update`. Either way, the overhead is a few
microseconds per power-up.

## The secure-boot engines

In the case study, a soft processor copies the kernel from flash to RAM, hashes it with a
hardware SHA-256 engine, checks the RSA signature of the hash and only then branches to the
kernel. The two engines are built here. The processor, its bus and the DMA are not; the
engines' ports are brought straight out of the top, and the loader software is expected to
feed blocks and build the padded message `em` from the digest.

### SHA-256

`sha256_core` is a FIPS 180-4 SHA-256 compression engine. It performs one round per cycle and
keeps a 16-word sliding message schedule. It takes a padded 512-bit block (word 0 in
`[511:480]`). The block is taken while `ready` is high. `first` restarts the hash from H(0).
`done` pulses 66 cycles after the block was taken, and `digest` then holds the running hash
value.

In the case study, the hardware hash with DMA needs about 92 cycles per 64-byte block,
including bus transfers. At 66 cycles per block, a 2.8 MiB kernel (45 876 blocks) costs 3.0 M
cycles here, plus whatever the feeding bus adds.

### RSA-1024 signature check

`rsa_verify` computes S^E mod N and raises `match` when it equals `em`. Modular
multiplication uses Montgomery form, which replaces division by N with shifts:

* `mont_mul` computes A·B·R^-1 mod N with R = 2^1024. It walks through A one bit per cycle,
  least significant first. Each cycle adds a_i·B to a running sum, adds N if the sum is odd,
  and halves it. The sum stays below 2N, and one final cycle subtracts N if needed. A product
  takes 1026 cycles.
* `rsa_verify` first multiplies S by R² mod N, which gives S·R mod N (S in Montgomery form).
  Then it scans the exponent from its top bit down: a squaring per bit, and a product by S·R
  for each 1 bit. A last product by 1 removes the factor R.
* R² mod N depends only on the public key, so it is an input (`rsa_r2`), computed once along
  with the key. Computing it in hardware would need a separate reduction step.
* The exponent is `E_W` = 17 bits wide, and its top bit must be 1 (an assertion checks this).
  E = 65537 is the usual public exponent. The modulus must be odd.

With E = 65537 a check takes 19 products of 1027 cycles plus one cycle: 19 514 cycles, about
0.2 ms at 100 MHz. The case study reports 92 867 cycles for its RSA-1024 engine, which is much
smaller (684 flip-flops). This engine trades area for time: its 1026-bit adders and about
6 000 flip-flops of operands, sums and result are large. A word-serial multiplier would be closer
in size and speed to the reported one.

## Departures and choices to know about

* **Widths.** The tag is 64 bits, one cipher block. Each key is a full 192-bit 3-DES key.
* **Serial link.** The bit rate (115200), the byte order and the idle timeout are choices of
  this design.
* **Flash.** The flash is a model. A real integration replaces `user_flash` with the vendor's
  flash block and its controller, and adapts `nvm_ctrl` to that block's word interface.
* **Flag.** The flag is cleared in step 2 and set in step 4. This follows the timing figures of
  the reference implementation. Its pseudo-code listing does not show the flag writes.
* **Acknowledgement values.** Acknowledgements encrypt TAG_UL. At the moments they are sent,
  TAG_UL equals TAG_F, so this is the same value as encrypting TAG_F.
* **Wrong commands.** A wrong command is ignored silently. There is no retry counter or lockout.
* **`alarm`.** It is high only in shutdown. During the roughly 280 cycles of the power-up check,
  the user design is not held off. If the user design must not run unverified even briefly,
  gate it with `state` as well.
* **Not built.** The static logic is not built: the configuration controller/JTAG, the AES
  bitstream decryptor and its key K_B. Neither is the system-designer side: the bitstream
  encryptor and the TRNG for the keys. Nor the user design that `alarm` stops. Nor the case
  study's MicroBlaze processor system and its DMA.

## Simulating

Every testbench is self-checking and prints `TB_RESULT checks=N failures=M`. With Verilator 5:

```sh
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/des_pkg.sv rtl/su_pkg.sv tb/tb_fpga_security_top.sv --top-module tb_fpga_security_top
./obj_dir/Vtb_fpga_security_top
```

Replace the testbench name to run another one:

| testbench              | what it checks |
|------------------------|----------------|
| `tb_fpga_security_top` | The whole design at its defaults. Version mismatch leads to shutdown. A first start sends E_Kack2 and clears the flag. A replayed command, a wrong-key command and a truncated command are all ignored. The right command moves TAG_F to 2, sets the flag, returns E_Kack1 and stops the system. Powering up the old bitstream again is refused. The overlaps and the 278-cycle power-up are checked. A 1000-byte message is hashed while the device waits for a command. A valid 1024-bit signature is accepted and a corrupted one rejected, each in 19 514 cycles. |
| `tb_secure_update`     | The same protocol sequence on `secure_update` alone. |
| `tb_master_fsm`        | The protocol steps against simple stand-ins for the cipher, flash and link. |
| `tb_des3_core`         | The standard DES and NIST SP 800-67 Triple-DES vectors, and the 48-cycle latency. |
| `tb_sha256_core`       | The FIPS 180-4 examples and generated messages, and the 66-cycle block time. |
| `tb_rsa_verify`        | A 1024-bit signature with E = 65537 against a reference result, corrupted signatures, the 19 514-cycle time, and random 64-bit cases checked against a modular exponentiation in the testbench. |
| `tb_rs232_ctrl`, `tb_nvm_ctrl`, `tb_user_flash`, `tb_tag_comparator` | The individual blocks. |

The expected ciphertexts in `tb_secure_update` and `tb_fpga_security_top` were computed with a
separate Triple-DES implementation. That implementation reproduces the NIST example. A
full-speed run of the top-level test takes well under a second, even at the real bit rate.
