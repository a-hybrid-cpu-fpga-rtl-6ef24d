# A pipelined sha256crypt password-checking accelerator

sha256crypt is the `$5$` password hash used by most Linux distributions:

- It hashes the password and salt a few times.
- It then runs N further SHA-256 computations, each depending on the one before. N is 5000 by default.

Checking one candidate password therefore means about 5000 dependent SHA-256 block transforms. How many blocks each step needs depends on the password length, the salt length and one data-dependent byte.

This RTL is a hardware core that checks many candidate passwords against one hash at once. It is built around a single 64-stage pipelined SHA-256 unit that accepts a new block every cycle. Three ideas keep that pipeline full:

- **Group scheduling.** A core holds a group of G passwords (G = 2048). Every *round* feeds the pipeline one block for each of the G passwords, in G consecutive cycles. By the time the next round needs password 0's digest, that digest has left the pipeline. There are no stalls; the only loss is 64 idle cycles per round, so utilization is G/(G+64) = 97 %.
- **Look-ahead execution.** The one data-dependent step of sha256crypt is the digest DS of the salt repeated 16 + DB[0] times. DB is an earlier digest, and DB[0] is its first byte. That byte can take only 256 values and the salt is fixed, so the host CPU computes all 256 possible DS values once and loads them into the core's *LAE buffer*. In hardware, DS becomes a table lookup indexed by DB[0]. Every password in a group then follows exactly the same sequence of rounds.
- **Specialisation per length.** The round sequence and the wiring that assembles each block depend only on the password length LP and the salt length LS. The design is elaborated for one (LP, LS) pair; the defaults are LP = 6 and LS = 8. Constant functions compute, at elaboration time:
  - a look-up-table FSM that lists every round;
  - 64 byte multiplexers pruned to exactly the sources each block byte can take.

  A different length is a different elaboration, one bitstream per length.

## sha256crypt as a sequence of rounds

With `|` as concatenation and `D(x)` = SHA-256(x):

| step | message | digest | done by |
|---|---|---|---|
| loop1 | A = pwd \| salt \| pwd | DA | core |
| loop2 | B = pwd \| salt \| first LP bytes of DA (repeated every 32 bytes), then for each bit of LP from LSB up: DA if 1, pwd if 0 | DB | core |
| loop3 | P = pwd repeated LP times | DP; TP = first LP bytes of DP | core |
| loop4 | S = salt repeated 16 + DB[0] times | DS; TS = first LS bytes | host, via the LAE table |
| loop5, i = 0..N-1 | C = (i odd ? TP : DC) \| (i%3 ? TS : -) \| (i%7 ? TP : -) \| (i odd ? DC : TP) | DC | core |

DC starts as DB. A message of L bytes takes `(L + 8) / 64 + 1` blocks. A round is one of those blocks for all G passwords.

The loop5 message pattern repeats with period lcm(2, 3, 7) = 42. The FSM therefore has:

- one state per block of loop1, loop2 and loop3;
- 42 *state groups* for loop5, one per phase, each with one state per block;
- an end state S_E.

For LP = 6 and LS = 8 that is 1 + 2 + 1 + 42 = 46 states plus S_E. A whole run is 5004 rounds at N = 5000.

The final DC is sent back to the host. The host base64-encodes it and compares it with the hash.

## Hierarchy

```
sha256crypt_accel            AXI4-Lite slave, address decode, NUM_CORES x
├── axi_host_if              AXI4-Lite -> simple register bus
└── accel_core               one core (group of G passwords)
    ├── dispatch_fsm         LUT FSM: state counter, next state, control signals, EOL, IC
    ├── data_dispatch_unit   64 pruned byte multiplexers -> one 64-byte block
    ├── block_transform_unit 64-stage SHA-256 pipeline, tag carried alongside
    ├── data_buffer x5       pwd/TP, DA (DA, DP, DC), DB (DB, DC), DS/TS, state
    └── lae_buffer           256 x 32-byte DS table, indexed by DB[0]
sc_pkg                       types, SHA-256 constants, the message model as constant functions
```

## The core, cycle by cycle

`accel_core` runs rounds of exactly G + 64 cycles.

**Issue (cycles 0 .. G-1 of a round).** Cycle g reads entry g of every buffer. It then:

1. concatenates the bytes into the source vector {DS, DB, DA, salt, pwd};
2. lets the dispatch unit build block g under the current FSM control word;
3. feeds the block into the pipeline.

The chaining state comes from one of two places. It is the SHA-256 IV when the state is the first block of its message. Otherwise it is entry g of the state buffer. Each block carries a tag {password index, last, destination}.

**Write-back (64 cycles later).** The pipeline returns the digest with its tag:

- A digest that is not the last block of its message goes to the state buffer.
- Otherwise it goes to the buffer named by `dest`:
  - loop1 writes DA.
  - loop2 writes DB. It also hands DB to the LAE buffer, which writes the selected DS into the DS buffer one cycle later.
  - loop3 writes DP into DA, and its first LP bytes into the pwd buffer, which from then on holds TP.
  - loop5 writes DC to DA on even iterations and to DB on odd ones.

  DA and DB swap roles as source and destination every iteration, so no copy is needed.

**Step (cycle G + 63).** The FSM moves to its next state. When the state was the end of a loop5 state group (the EOL flag), the iteration counter IC increments. When IC reaches N, the FSM goes to S_E and the core finishes.

A run lasts `rounds × (G + 64) + 3` cycles. At the defaults that is 5004 × 2112 + 3 ≈ 10.57 M cycles, or 48 ms at 220 MHz, for 2048 passwords per core. The result is in DA when N is odd and in DB when N is even. The host reads it through the result region.

G must be at least 4, so that the first digest of a round has been written back before the last block of the round is built. LP and LS are limited to 32 each.

## The FSM look-up table and the pruned multiplexers

`sc_pkg` holds the message model as constant functions: `state_info`, `msg_code`, `pad_code` and `compute_maps`. For every state and every block byte position p, they give a *source code*. The code is either a byte of one of the sources (pwd, salt, DA, DB, DS) or a constant: 0x80, 0x00 or a byte of the bit length.

`compute_maps` collects, for each position p, the set of codes that appear in any state. The multiplexer for byte p has exactly those inputs, in ascending code order, and a control value of k selects the k-th one.

The control field is `ceil(log2(max inputs))` bits wide:

- 4 bits for LP = 6, LS = 8;
- 377 connections in total, against 64 × 218 for a multiplexer that supports every length.

Each LUT word holds:

- the next state;
- the 64 control fields;
- the EOL flag;
- three flags added by this design: first block (use the IV), last block (write to a data buffer), and the destination.

The word is ROM data computed at elaboration and read through a registered state counter.

## Host interface and address map

`sha256crypt_accel` is an AXI4-Lite slave with 32-bit data. The byte address is split into these fields:

```
 [ADDR_W-1 : 8+IW]  core
 [8+IW-1   : 5+IW]  region
 [5+IW-1   : 5]     index (password / LAE row), IW = max(log2 G, 8)
 [4 : 2]            32-bit word within a 32-byte entry (byte 4w in bits [7:0])
```

With the defaults, ADDR_W is 20.

| region | contents |
|---|---|
| 0 control | word 0: write bit 0 = 1 to start; read {done, busy}. Word 1: N, which resets to 5000. |
| 1 salt | LS bytes (index 0) |
| 2 pwd | LP bytes per password, index 0 .. G-1 |
| 3 LAE | 256 rows of DS = D(salt repeated 16 + row times) |
| 4 result | DC per password, readable once done |

A host session has these steps:

1. write the salt, the 256 LAE rows and G passwords;
2. write N;
3. write 1 to control word 0;
4. poll for done, or wait on `core_done`;
5. read the G results.

Writes to a busy core are ignored, and write strobes are ignored.

## Where this design departs from, or adds to, the published description

The following follow the published design:

- the split into data buffers, LAE buffer, state buffer, dispatch unit, LUT FSM and pipelined block transform;
- group scheduling with G = 2048 and 64 pipeline stages;
- the 256-entry look-ahead table indexed by DB[0];
- the 42 loop5 state groups, EOL and the iteration counter;
- DA and DB alternating as the DC buffers;
- two cores;
- the specialisation per length.

The following are this design's own:

- **The SHA-256 pipeline insides.** The description treats the block transform as known art. Here it is one round per stage, with a sliding 16-word message schedule, and the input state is carried along for the final addition.
- **The round timing.** Every round is exactly G + 64 cycles, even when the pipeline could start sooner.
- **The LUT fields.** The LUT carries first, last and destination flags in addition to next state, control and EOL. The published LUT word for LP = 6 is 4 × 64 + 6 + 1 bits; here it is 4 bits wider.
- **Constant block bytes.** The length field and pad bytes are wired into the multiplexers as constants rather than read from a length buffer. That gives 377 connections for LP = 6, against the published 394.
- **DP storage.** DP is stored in the DA buffer and TP in the password buffer. A separate DP buffer is not needed.
- **The host side.** The AXI4-Lite port, its address map, the control registers and the rejection of writes while busy are all this design's own.
- **Larger lengths.** FSM state counts for LP = 14, 15 and 16 (LS = 8) come out as 86, 86 and 91. A published table lists 88, 88 and 90. The block counts published for the same lengths agree with this model, which is followed.

Not in the RTL:

- the host CPU software: candidate generation, the look-ahead computation, result checking and base64;
- FPGA reconfiguration between lengths;
- the SoC interconnect.

The testbenches model the host side.

## Verification

Every block has a self-checking testbench in `tb/`. Each prints `TB_RESULT checks=… failures=…`, and each has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_block_transform_unit` | random blocks and states against a software SHA-256 compression; 64-cycle latency; back-to-back issue |
| `tb_data_buffer` | random byte-enabled writes and reads against a copy |
| `tb_lae_buffer` | 256 rows, 300 lookups by DB[0], one-cycle latency |
| `tb_data_dispatch_unit` | every state's block for LP = 6, LS = 8 against the reference message built byte by byte; 46 states; 4-bit control |
| `tb_dispatch_fsm` | every visited state for N = 1, 2, 43, 100: loop order, first/last, destination, EOL, IC, S_E after 4 + N rounds, restart; state counts for LP = 6..16 |
| `tb_axi_host_if` | writes with address first, data first and both together, with a slow response ready; reads with a slow R ready |
| `tb_accel_core` | complete runs at G = 8 (LP 6, N 50) and G = 4 (LP 12, LS 10, N 5000). Each DC is checked against a sha256crypt model, the cycle count against rounds × (G+64) + 3, and one password against a known `$5$` hash string. |
| `tb_accel_core_workloads` | the four published length configurations LP = 8/16 × LS = 8/16 at N = 5000 (G = 4): every DC, every run time, and round counts that add up with the host's loop4 blocks (19 for an 8-byte salt, 37 for 16) to the published blocks per password |
| `tb_sha256crypt_accel` | end to end through AXI with 2 cores at G = 8; counts group-scheduled rounds, IV rounds, state-buffer writes, LAE lookups, TP write-backs, DC to DA and to DB, EOL steps, the 42-group wrap and concurrent cores, and fails on any that never happens |
| `tb_sha256crypt_accel_full` | the top at its default parameters: 2 × 2048 passwords, N = 5000 and 5001, all 4096 results checked, run length 5005 × 2112 cycles. About 3 minutes. |

The reference model `tb/sc_ref_pkg.sv` implements SHA-256 and sha256crypt directly in SystemVerilog. It reproduces the standard test vector `$5$saltstring$5B8vYYiY.CVt1RlTTf8KbXBH3hsxY/GNooZaBBGWEc5` for "Hello world!".

To simulate one testbench with Verilator:

```
verilator --binary --timing --assert -j 4 -Wno-fatal \
  rtl/sc_pkg.sv tb/sc_ref_pkg.sv rtl/*.sv tb/accel_driver.sv tb/core_harness.sv \
  tb/tb_sha256crypt_accel.sv --top tb_sha256crypt_accel -o sim
./obj_dir/sim +verilator+rand+reset+2
```

Replace the last testbench file and `--top` for the others. The core testbenches take a few minutes to compile, because the 64-stage pipeline is wide.

## Changing the configuration

- Set `LP` and `LS` on `sha256crypt_accel` to build a core for another password or salt length. The LUT, the multiplexers and all widths follow automatically.
- Set `G` for the group size. The buffers are G deep, and utilization is G/(G + 64).
- Set `NUM_CORES` for more cores. They share the AXI port, and the address map grows by one core bit for each doubling.
- N is a run-time register, not a parameter.
