# Key-agile counter-mode ATM cell encryptor

An ATM link carries cells of many virtual circuits interleaved in any order,
and every circuit may need its own key and its own cryptographic state. This
encryptor sits in such a link and encrypts the 48-octet payload of each cell
with the key and state of the cell's connection. It does this at full line
rate, even when every cell belongs to a different connection. Two ideas make
that possible:

* **Counter mode instead of a feedback mode.** The key stream of a cell is the
  DES encryption of a per-connection counter (the *state vector*, SV), and the
  payload is XORed with it. Nothing is fed back from one block to the next. So
  the six 64-bit blocks of a payload can be computed side by side in any number
  of parallel DES units. An implementation with one unit and one with six
  produce the same ciphertext.
* **The key rides through the DES pipeline with its data.** Each of the 16
  round stages holds its own copy of the 56-bit key and computes its own
  subkey. Consecutive blocks can therefore use different keys. Switching
  connections never drains or stalls the pipeline.

Cells without a header error field are handled as 32-bit header plus 384-bit
payload (416 bits). Headers are never changed. The top module `atm_encryptor`
contains two identical paths:

* the **downstream** path encrypts traffic from the protected side;
* the **upstream** path decrypts traffic from the network.

In counter mode both are the same operation.

## Data path of one direction

```
 cells in ──> identification ──> cell router ──┬─> crypto module 0 ──┐
              & association       ^    │        └─> crypto module 1 ──┴─> cell combiner ──> cells out
              (VPI/VCI table)     │    └──> diverted cells (to control software)
                                  └──────── inserted cells / resync requests (from control software)
```

The identification and association stage, the router and the combiner form the
*shell*. They handle everything that is specific to ATM. The cryptographic
modules form the *security module*. Each module holds the keys and state
vectors of the contexts it owns.

The following are outside the RTL. Their signals are top-level ports:

* the line interface (PHY);
* the control processor that sets up connections, called non-real-time control here;
* the key management unit.

### Cell classes

Identification (`id_assoc`) looks up the VPI/VCI and tags each cell with a
context number and a class (`cell_cls_e` in `atm_pkg`):

| class | when | what happens |
|---|---|---|
| `CLS_USER` | known connection marked encrypted, user cell (PTI 0xx) | payload XOR key stream |
| `CLS_BYPASS` | known connection marked clear | passes the crypto module unchanged |
| `CLS_RESYNC_RX` | known connection, F5 OAM cell (PTI 100/101) whose first payload octet is `0xA5` | checked and consumed by the crypto module; never forwarded |
| `CLS_NRT` | unknown VPI/VCI, other OAM or PTI 11x cells | diverted to the non-real-time port |
| `CLS_RESYNC_TX` | only from the non-real-time port | the crypto module steps the SV and sends a resync cell in its place |

## Counter mode and the state vector

The SV is exactly one 64-bit DES block:

| bits | field | meaning |
|---|---|---|
| 63:43 | `lfsr` | 21-bit LFSR, taps 21 and 19, preset all ones |
| 42 | `ir` | initiator/responder bit |
| 41:34 | `jn` | jump number, advanced by every resynchronisation |
| 33:3 | `seq` | cell sequence number |
| 2:0 | `seg` | 64-bit segment within the payload, 0..5 |

For a user cell with SV `s` and connection key `K`, the payload is split into
blocks `P0..P5`. `P0` is the most significant 64 bits. Each block is transformed as

    C_i = P_i XOR DES_K( s with seg = i )

After the cell, the SV stored for the connection advances:

* `seq + 1`;
* one LFSR step;
* `seg` back to 0.

Only this final value is written back. The next cell of the same connection
always sees it, even back to back.

## The pipelined DES (`des_round`, `des_pipeline`)

`des_pipeline` is sixteen `des_round` stages between the initial and final
permutations. Every stage registers four things:

* the 64-bit L/R pair;
* the 56-bit key, without its parity bits;
* a valid bit;
* a bypass bit.

Each stage computes its own 48-bit subkey straight from the key it holds
(PC-1 order, rotation by the cumulative shift of that round, PC-2). No key
register rotates from stage to stage.

Timing:

* one block enters per clock;
* a block leaves 16 clocks later;
* `en` freezes all stages together.

A block with the bypass bit set skips the round function in every stage and
both permutations, so it leaves unchanged. The key generator uses this for
cells that are not encrypted. Their key-stream slots then keep their place in
the stream without any pipeline bubble.

The DES tables live in `des_pkg` as constants from the published standard.
`des_ip`, `des_fp`, `des_subkey` and `des_f` are plain functions.

## The cryptographic module

`crypto_module` wires six parts together:

* `cell_processor`: the controller, described below;
* `sv_memory`: one SV per context;
* `cv_memory`: the keys, in a dual-port RAM. Port A is read/write for key
  management. Port B is read-only and feeds the key generator.
* `key_generator`: `SLICES` DES pipelines sharing the connection key;
* `cell_fifo`: holds the cells while their key stream is computed;
* `mixer`: XORs the FIFO's head cell with the key stream.

The cell processor only puts the context number on the CV read port. The key
goes straight from the memory to the DES pipelines. The controller never holds
a key.

### Cycle plan (default `SLICES = 2`, a 128-bit key generator interface)

```
cycle  0   accept cell, read SV[ctx]
cycle  1   beat 0: blocks seg 0,1 -> key generator; CV read; cell -> FIFO
cycle  2   beat 1: blocks seg 2,3; CV read
cycle  3   beat 2: blocks seg 4,5; CV read; updated SV written back
cycle  4   next cell accepted
...
beat k + 17   key stream beat k leaves the key generator (1 alignment register + 16 DES stages)
last beat     mixer registers payload XOR key stream, pops the FIFO
```

Costs per cell:

* a user, bypass or inserted resync cell costs `1 + 6/SLICES` cycles: 4 at
  `SLICES = 2`, 2 at `SLICES = 6`;
* a received resync cell costs 2 cycles.

From acceptance to the output register, a cell takes `6/SLICES + 17` clock
edges inside a module. Through `atm_encryptor` it takes `6/SLICES + 18`: 21 at
the defaults.

Back-pressure works like this:

* one enable (`!out_valid || out_ready`) stops the whole module;
* the CV read port holds its data while stopped, so a frozen pipeline keeps
  its keys;
* the cell processor also refuses cells while the FIFO is full.

`SLICES` may be 1, 2, 3 or 6. With 6, one beat covers the whole payload.

## Resynchronisation

Counter mode needs the decryptor's SV to match the encryptor's. Both ends
re-align by exchanging *resync cells*. Each resync cell is handled within a few
cycles, so it never backs up user traffic.

**Insertion.** The non-real-time side sends a `CLS_RESYNC_TX` request for a
context. The cell processor then does the following:

1. It steps the SV:
   * jump number + 1;
   * I/R bit from the `role_ir` input;
   * sequence and segment numbers cleared;
   * LFSR preset.
2. It writes the new SV back.
3. It builds the resync cell:
   * the request's header with PTI 101 (end-to-end OAM);
   * payload octet 0 = `0xA5`;
   * octets 1..8 = the new SV;
   * octets 9..45 = `0x6A` fill;
   * 6 zero bits;
   * the 10-bit CRC in the last bits.
4. It sends the cell on as a bypass cell.

**Reception.** The cell processor checks two things:

* the CRC-10;
* that the carried jump number is strictly greater than the stored one.

If both hold, the SV becomes the carried jump number and I/R bit, with
sequence and segment numbers cleared and the LFSR preset. Otherwise nothing
changes. Either way the cell is consumed.

The events `ev_resync_tx`, `ev_resync_ok` and `ev_resync_bad` pulse once per case.

`crc10` is combinational. It covers payload bits 383..10, MSB first, initial
value 0, with polynomial x^10+x^9+x^5+x^4+x+1 (`0x233`). Insertion and
reception share one instance.

## The shell

**Identification and association (`id_assoc`).** A content-addressable memory
would be the natural structure. This design uses a direct-mapped table in
synchronous RAM instead:

* 2^`TBL_AW` entries (1024 by default);
* indexed by `VCI[9:0] XOR VPI`;
* each entry stores the full VPI/VCI to confirm a hit, the context number and
  an encrypt flag.

Two connections whose indices collide cannot both be entered. The non-real-time
control writes entries through `tw_*`. The stage has one cycle of latency.

**Router (`cell_router`).** The router takes cells from two sources:

* identification;
* the non-real-time port.

When both wait, it alternates between them. Then:

* `CLS_NRT` cells go out on the diverted-cell port;
* all others go to crypto module `ctx mod N_CRYPTO`.

One connection therefore always uses one module, and with it one SV and one
order.

**Combiner (`cell_combiner`).** A round-robin merge of the module outputs.
Cells of one connection stay in order. Cells of different connections may
overtake each other when they use different modules.

**Context set-up.** Each crypto module has its own contexts. Even contexts live
in module 0 and odd ones in module 1. The shell routes traffic like this:

* `init_*` (SV load) goes only to the owning module;
* `km_*` (key writes) goes to every module;
* `km_rdata` reads back from module 0.

## Throughput

Counting the cells with a 53-octet line cell (424 bits), an OC-192 line carries
23.6 million cells/s. With the defaults (two modules, 4 cycles per cell each),
the design takes 0.5 cell per clock.

| line / figure | needs | clock needed |
|---|---|---|
| OC-192, 10 Gb/s | 23.6 Mcells/s | 47 MHz |
| OC-48, 2.5 Gb/s | 5.9 Mcells/s | 11.8 MHz |
| resync within one OC-192 cell time (42.6 ns) | 4 cycles | 94 MHz |
| one DES pipeline | 64 bits per clock | 1.28 Gb/s at 20 MHz |

For reference, a 16-stage DES pipeline of this kind has been reported at:

* a 50 ns clock on large programmable logic devices;
* about 6.7 Gb/s (about 105 MHz) as a 0.6 µm CMOS ASIC.

At 20 MHz the defaults reach OC-48 but not OC-192. At ASIC speed they reach
both, resync budget included.

Other ways to raise throughput:

* raise `N_CRYPTO`;
* raise `SLICES` to 6, which is 2 cycles per cell. Each 64-bit slice then
  needs only 1.7 Gb/s for a 10 Gb/s line.

## Choices made here

The architecture comes from published work on context-agile ATM encryptors:

* the block structure;
* counter mode;
* the key-carrying DES pipeline with a bypass bit;
* the read-only key port;
* the 128-bit key-generator width;
* the resync stepping and acceptance rules.

The following are this design's own and can be changed:

* The SV field widths, the LFSR polynomial and preset, and the per-cell SV
  update (sequence + 1, one LFSR step). A standards-conformant ATM Forum
  counter mode would fix these differently, and so would the counter block
  format.
* The resync cell layout (code octet, fill, CRC position), the CRC-10 coverage,
  and the use of PTI 100/101 to recognise it.
* The RAM table and its index function, in place of a ternary CAM. A CAM would
  let one entry match resync cells of all connections.
* Context-to-module mapping by `ctx mod N_CRYPTO`, the router's alternation, the
  combiner's round-robin, and broadcasting key writes to all modules.
* Sizes:
  * 256 contexts per module (`atm_pkg::NUM_CTX`);
  * a FIFO depth of 16;
  * valid/ready handshakes everywhere;
  * an asynchronous active-low reset.
* When resync cells are sent. The control side decides this by issuing a
  request.

Not included:

* the line interface;
* the connection-management processor;
* key generation and distribution;
* HEC generation, which belongs to the physical layer.

## Files

| file | contents |
|---|---|
| `rtl/atm_pkg.sv` | cell, tag and SV types; LFSR, SV stepping and resync payload functions |
| `rtl/des_pkg.sv` | DES tables and functions |
| `rtl/des_round.sv`, `rtl/des_pipeline.sv` | key-carrying 16-stage DES |
| `rtl/key_generator.sv`, `rtl/mixer.sv`, `rtl/cell_fifo.sv` | key stream and mixing |
| `rtl/sv_memory.sv`, `rtl/cv_memory.sv` | state and key memories |
| `rtl/crc10.sv`, `rtl/cell_processor.sv` | controller and resync handling |
| `rtl/crypto_module.sv` | one cryptographic module |
| `rtl/id_assoc.sv`, `rtl/cell_router.sv`, `rtl/cell_combiner.sv` | shell |
| `rtl/crypto_path.sv` | one direction |
| `rtl/atm_encryptor.sv` | top: downstream and upstream paths |
| `tb/tb_model_pkg.sv` | reference models: iterative DES, key stream, SV stepping, CRC-10 by long division |
| `tb/tb_<block>.sv` | one self-checking testbench per block |

## Simulation

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and stops itself. It
also has a watchdog that counts a failure if the test hangs. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/atm_pkg.sv rtl/des_pkg.sv tb/tb_model_pkg.sv tb/tb_atm_encryptor.sv \
    --top-module tb_atm_encryptor -o sim
./obj_dir/sim
```

Swap in any other `tb_*` name. What the tests cover:

* DES against the standard's known-answer vectors. The pipeline's latency (16)
  and the key generator's (17) are checked by cycle count.
* Crypto module latency (`6/SLICES + 18` sampled edges) and its throughput of
  one cell per 4 cycles.
* The resync cell budget.

`tb_atm_encryptor` runs the whole encryptor at its default parameters. The
downstream output is looped into the upstream input. The test does the
following:

* mixes six connections so that the key changes between cells;
* checks every ciphertext against the model;
* checks that the decrypted output equals the plaintext;
* diverts signalling cells and inserts a clear cell;
* inserts resync cells, which the far side accepts;
* replays a stale resync cell and a corrupted one, which must both be rejected;
* applies random back-pressure on both outputs;
* sends a burst of 40 back-to-back cells that alternate between the two
  modules. It must be accepted at one cell every two cycles; 77 cycles for
  the 40 cells are observed.

It counts each of these and fails if any never happened. `tb_crypto_path` runs
a direction with three modules and `SLICES = 6`.

`tb_slice_interop` checks the property that motivates counter mode:

* Modules built with `SLICES` = 1, 2, 3 and 6 get the same stream and must
  produce the same ciphertext.
* Each must accept cells at 7, 4, 3 and 2 cycles per cell respectively.
* The 6-slice output, resync cells included, is decrypted by a 1-slice module.
