# Off-line bus test through a debug transport side channel

Transaction-level models in SystemC/TLM 2.0 have a *debug transport interface*:
a second path from an initiator to a target that reads or writes target storage
with no timing or side effects. The idea behind this design is to use that
second path as a test channel. At the transaction level, the initiator sends
each test word twice: once over the normal transport, and once as a serial copy
over the debug transport. The target compares the two copies. At register-transfer
level, the normal transport becomes the system bus. The debug transport becomes
a narrow serial link with a small wrapper at each end.

This repository holds the RTL form of that idea for an encryption/decryption
system. An I/O core is the bus master. An AES encryption core and a
microprocessor, which runs the decryption in software, are the slaves. After
reset the system is in **test mode**. The I/O core sends an interconnect test
pattern set to each slave over the AMBA bus. At the same time its DTI wrapper
shifts a copy of every word down a one-bit link to the same slave. The wrapper
in front of the encryption core compares the two copies itself. The processor
does the comparison in software, reading the copies from its wrapper's buffer.
Only when both channels pass does the I/O core switch to **normal mode** and
accept host commands.

## Block diagram

```
  host port, start_test
         |
    +---------+   m2s (observed)   +----------------+
    | io_core |------------------->| io_dti_wrapper |==== link[0] ====+
    |         |<-------------------|  (serialiser)  |==== link[1] ==+ |
    +---------+     dti_ready      +----------------+               | |
         | AHB master                                               | |
    +------------------------------------------------+              | |
    | ahb_bus: decoder, response mux, default slave  |              | |
    +------------------------------------------------+              | |
         | hsel[0]                        | hsel[1]                 | |
    +-----------------+          +-----------------+                | |
    | enc_dti_wrapper |<=========|=================|================|=+
    | store + compare |          | cpu_dti_wrapper |<===============+
    +-----------------+          | pass-through,   |
         |                       | copy buffer     |
    +-----------------+          +-----------------+
    |   aes_enc_ip    |               | cpu_* AHB slave port, cpu_dti_* buffer port
    |   (aes_core)    |               v to the processor and memory (not in this RTL)
    +-----------------+
```

`link[0]` goes to the encryption wrapper and `link[1]` to the processor wrapper.

## Files

| file | what it is |
|---|---|
| `rtl/dti_pkg.sv` | bus structs, serial-link struct, address map, the test-pattern function |
| `rtl/aes_pkg.sv` | GF(2^8) arithmetic, S-box computed from its definition, MixColumns |
| `rtl/dti_soc_top.sv` | the system (top) |
| `rtl/io_core.sv` | bus master: test sequence, verdict polling, host commands |
| `rtl/io_dti_wrapper.sv` | I/O-side DTI wrapper, serialiser for the two links |
| `rtl/dti_serial_rx.sv` | serial receiver used by both target wrappers |
| `rtl/dti_parity_check.sv` | on-line variant: holds each write until its parity copy agrees |
| `rtl/enc_dti_wrapper.sv` | encryption-side wrapper: stores both copies and compares them |
| `rtl/cpu_dti_wrapper.sv` | processor-side wrapper: bus pass-through and a buffer for the copies |
| `rtl/ahb_bus.sv` | single-master AHB-Lite interconnect |
| `rtl/pattern_rom.sv` | the constant test-pattern table |
| `rtl/aes_enc_ip.sv`, `rtl/aes_core.sv` | AES-128 encryption slave and its iterative core |
| `tb/tb_*.sv` | one self-checking testbench per block, plus `tb_dti_soc_top` (off-line) and `tb_dti_soc_online` (on-line) for the whole system |
| `tb/leon3_model.sv` | behavioural processor and memory, simulation only |

## The test patterns

The patterns are the counting-sequence interconnect test. For N lines it uses
2·⌈log2 N⌉ patterns and detects shorts, opens and delay faults between lines:

1. Line L is labelled with the number L, written with B = ⌈log2 N⌉ bits.
2. The labels form an N×B bit matrix. Each column of that matrix is one
   pattern. The most significant label bit comes first.
3. Each pattern is followed by its bitwise complement. This makes every line
   toggle, so delay faults show up as well.

For the 32-bit bus this gives 10 words. Bus bit L is line L:

```
FFFF0000 0000FFFF FF00FF00 00FF00FF F0F0F0F0 0F0F0F0F CCCCCCCC 33333333 AAAAAAAA 55555555
```

`dti_pkg::tp_pattern(n_lines, idx)` implements the rule. `pattern_rom` turns it
into a constant table when the design is elaborated, so no run-time hardware
generates the patterns. The same 10 words test both channels.

## Test mode, step by step

1. When reset is released, or when `start_test` is pulsed, `io_core` raises
   `test_mode`. On that rising edge both target wrappers clear their stores.
2. For i = 0..9, `io_core` waits for `dti_ready`. It then writes pattern i to
   `0x8000_0000 + 4i`, the encryption region.
3. `io_dti_wrapper` sees the write. It takes the word in the data phase and
   shifts it out on `link[0]`: `valid` is high for 32 cycles, one bit per
   cycle, most significant bit first. `dti_ready` stays low until the last bit
   has gone. The bus is therefore throttled to the rate of the serial link,
   about 35 cycles per word.
4. `enc_dti_wrapper` keeps the encryption core off the bus in test mode. It
   stores every write into the region as the bus copy. Its `dti_serial_rx`
   stores the serial copy. Once 10 words have arrived on each path, it compares
   them word by word and latches `{pass, done}`.
5. Steps 2 and 3 repeat for the processor. The words go to
   `0x4000_1000 + 4i` in processor memory and the copies go on `link[1]`.
   `cpu_dti_wrapper` buffers the copies. The processor reads them on
   `cpu_dti_idx`/`cpu_dti_word`, compares them with its memory, and writes
   `{pass, done}` to `0x4000_1100`.
6. Once the last serial word has left, `io_core` polls the verdict of the
   encryption wrapper. Any read of the encryption region in test mode returns
   it. It then polls `0x4000_1100`. If both verdicts pass, `test_mode` falls
   and the host port opens (`cmd_ready`). If either fails, the core holds in
   a fail state with the host port closed, until `start_test` is pulsed.

A full test at the default sizes takes 693 cycles in simulation, with the
processor model answering at once. Almost all of that is the 20 × 32 serial
bit times.

## Normal mode and the address map

In normal mode the wrappers are transparent. `io_core` performs one single-word
AHB transfer per host command (`cmd_valid/cmd_ready`, then `rsp_valid` with the
read data and `rsp_err`).

| address | slave | contents |
|---|---|---|
| `0x8000_0000-0x8000_000C` | AES | KEY, word 0 = key[127:96] |
| `0x8000_0010-0x8000_001C` | AES | DIN (plaintext) |
| `0x8000_0020` | AES | write bit 0 = start; read {busy, done} |
| `0x8000_0030-0x8000_003C` | AES | DOUT (ciphertext), ready 11 cycles after start |
| `0x4000_xxxx` | processor | its port (`cpu_m2s`, `cpu_hsel`, `cpu_hready`, `cpu_s2m`) |
| other | default slave | two-cycle ERROR response |

`aes_core` is a plain FIPS-197 AES-128 encryptor. It computes one round per
cycle and expands the key on the fly. Its S-box is computed in `aes_pkg` from
the GF(2^8) inverse and the affine map, so it is not a typed-in table.

## The on-line variant (`ONLINE = 1`)

The same parts can be built for a concurrent check instead of the power-on
test. Set the `ONLINE` parameter of `dti_soc_top`. It is passed down to the
I/O core and to all three wrappers. In this variant:

- There is no test mode. The I/O core starts in normal mode, and
  `start_test` is ignored.
- For every write to either slave, `io_dti_wrapper` sends the four
  even-parity bits of the word's bytes over that slave's link. Bit k covers
  bits [8k+7:8k], and bit 3 is sent first.
- In each target wrapper, `dti_parity_check` holds the write's data phase
  (`hreadyout` low) until the parity bits arrive. It then compares them with
  the parity of the `hwdata` it sees on the bus. If they agree, the write
  completes with the slave's own response. If they do not, it completes with
  an AHB ERROR response, which the host sees as `rsp_err`.
- A write therefore takes PAR_W + 2 = 6 data-phase cycles, and reads are not
  slowed down. An ERROR does not undo the write at the slave. It tells the
  master that the transfer was not certified.
- `enc_dti_done`/`enc_dti_pass` mean "at least one write checked" and "no
  check failed since reset". `cpu_dti_count` counts the checked writes to
  the processor.

The default, `ONLINE = 0`, is the off-line scheme described above.

## Interfaces and types

- `ahb_m2s_t` bundles `haddr`, `htrans`, `hwrite`, `hsize` and `hwdata`.
  `ahb_s2m_t` bundles `hrdata`, `hreadyout` and `hresp`. A slave receives the
  shared `m2s`, its own `hsel` and the shared `hready`.
- `dti_link_t` is `{valid, data}`, in the bus clock domain.
- All blocks run on one clock with an active-low asynchronous reset.
- Assertions check that the address decoder is one-hot, that the master holds
  its request during wait states, and that the I/O core never starts a test
  write while the serialiser is busy.

## Where this departs from, or adds to, the system description

- The off-line test is the default configuration. The on-line parity
  variant (`ONLINE = 1`) is this design's own translation of a scheme
  described only at the transaction level. Holding each write until it is
  certified is one reading of "the operation completes only once the channel
  is certified". It does slow writes down, although the scheme is also meant
  not to disturb normal operation.
- The AMBA bus is taken to be AHB-Lite with one master. The address map and
  all register maps are choices made here.
- The serial link format is a choice made here: one link per target,
  valid/data, MSB first. So are the dti_ready flow control, the status read
  in test mode, the verdict word in processor memory, and the host port.
- The encryption core in the described system is a third-party AES IP that
  also has a built-in self-test. Here it is a plain AES-128 encryptor without
  a self-test. The key size is not specified, and 128 bits is this design's
  choice.
- The processor (LEON3), its memory and the decryption software are not
  included. `tb/leon3_model.sv` stands in for them in simulation. It is a
  memory plus the verdict computation. A real processor must do the same:
  compare its memory at `0x4000_1000` with the wrapper buffer and post
  `{pass, done}` at `0x4000_1100` after `test_mode` rises.
- The transaction-level model ends the serial stream with a zero character.
  Here the wrappers count NUM_PAT words instead, because an all-zero word is
  a valid pattern.

## How far it has been checked

- Every block has its own self-checking testbench. The reference values in
  those testbenches are computed independently of the RTL. The AES core is
  checked against the three published FIPS-197 / AES-128 vectors. The pattern
  table is checked bit by bit against the counting rule, and also checked
  for the property that every pair of lines is told apart.
- Each testbench has been shown to fail on a deliberately broken copy of its
  block.
- The whole system has been simulated at its default sizes in both schemes,
  with Verilator (two-state, random initial values) and assertions enabled.
- The code lints cleanly in Verilator and elaborates in Yosys/slang. No
  latches or combinational loops are reported.
- Not checked: a real LEON3 and its software, or gate-level timing. No
  timing was measured, because no clock frequency is specified for the system.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. For
example, the whole system at its default sizes:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/dti_pkg.sv rtl/aes_pkg.sv tb/tb_dti_soc_top.sv --top-module tb_dti_soc_top
./obj_dir/Vtb_dti_soc_top
```

`tb_dti_soc_top` first runs the power-on test and checks the cycle count. It
then encrypts two FIPS-197 example blocks through the host port and stores a
word in processor memory. It checks the ERROR response for an unmapped
address. It injects a stuck-at-1 fault on data line 5 of the processor
connection, which the test must report as a failure that blocks normal mode.
Finally it repeats the test after the fault is removed. It counts each
mechanism (test-mode entry, serial words, DTI stall, pass, fail, mode switch,
bus error, encryption) and fails if any of them never happened.

`tb_dti_soc_online` builds the system with `ONLINE = 1`. It encrypts a block
and writes and reads processor memory. It checks that no write is reported as
an error and that writes are held for their parity copy: about 8 cycles per
write against 3 per read. It also checks that both wrappers counted their
checks.

The unit testbenches are `tb_pattern_rom`, `tb_dti_serial_rx`,
`tb_io_dti_wrapper`, `tb_enc_dti_wrapper`, `tb_cpu_dti_wrapper`,
`tb_dti_parity_check`, `tb_ahb_bus`, `tb_aes_enc_ip` and `tb_io_core`. Build
each the same way. `tb_dti_parity_check` is the one that feeds deliberately
wrong parity and checks the ERROR responses.

## Changing it

- `NUM_PAT` on `dti_soc_top` defaults to 2·⌈log2 32⌉ = 10. The bus width is
  `dti_pkg::DATA_W`. If you change the width, keep NUM_PAT equal to
  `num_patterns(DATA_W)` so that the pattern set stays complete.
- The address map is in `dti_pkg`, together with the offsets of the test data
  and the verdict.
- To attach another slave, widen `NUM_SLAVES`/`BASE` of `ahb_bus`. If the new
  slave's channel is also to be tested, give `io_dti_wrapper` another link.
