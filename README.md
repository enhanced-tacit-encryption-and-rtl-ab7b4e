# E-TACIT: hash-keyed character cipher for a 3-D network-on-chip

A multi-core IoT chip that moves data between its cores over a network-on-chip
(NoC) exposes that data in every router it passes. This design protects a
router-to-router channel: the source router's network interface encrypts each
block before it enters the network, and the destination's interface decrypts
it after it leaves. The key is never sent. Each end draws a random character
sequence, the two sequences are exchanged, and both ends derive the same
1024-bit key from them through four hash functions ("4H key").

The cipher is E-TACIT, an enhanced form of the TACIT scheme. It works on
8-bit characters, so key and block size are free parameters. The default is a
1024-bit key and 1024-bit blocks of 128 characters. The network is a
2 x 4 x 2 mesh: two layers of 2 x 4 routers, joined by vertical
through-silicon-via (TSV) links. Each router has seven ports: local, east,
west, north, south, up and down.

```
          R1 (node 0, layer 0)                              R2 (node 15, layer 1)
 plaintext -> etacit_encryptor -> ni_tx -> [ mesh3d: 16 x router3d ] -> ni_rx -> etacit_decryptor -> plaintext
                  ^                                                                   ^
                  | key, J                                                    key, J  |
             key_gen <- J, K -------- exchanged sequences -------- J, K -> key_gen
                  ^                                                                   ^
            rand_seq_gen (J)                                                   rand_seq_gen (K)
```

## 1. Key agreement (`rand_seq_gen`, `key_gen`, `hash_unit`)

**Sequences.** On `session_start`, R1 draws sequence J and R2 draws sequence K.
Each has `SEQ_LEN` (16) printable ASCII characters, 0x21..0x7e. A 16-bit LFSR
(taps 16, 14, 13, 11) is stepped 8 times per character, and the character is
`0x21 + (lfsr[7:0] mod 94)`. In the top module the exchange is a set of wires.

**Character classes.** `key_gen` counts the characters of J and K together
(32 characters by default) in four classes:

| symbol | class |
|---|---|
| s | lower-case letters |
| t | digits |
| u | upper-case letters |
| v | everything else (special characters) |

**The four hash functions.** Each function H-1..H-4 has ten rows. Row r has one
of two forms, depending on r:

- rows 0-8: `base ^ exp (+ or -) q`, where `^` is exponentiation;
- row 9: `a * b * c + q`.

All arithmetic is 32-bit and wraps around. The full table is `hash_terms` in
`rtl/etacit_pkg.sv`. As an example, H-1 has these rows:

| row | H-1 |
|---|---|
| 0 | s^t − s·t |
| 1 | s^u + (s+u) |
| 2 | s^v − (u+v) |
| 3 | t^u + v·s |
| 4 | t^v + t·s |
| 5 | t^s − s |
| 6 | u^s − s |
| 7 | u^t + (t+s−u) |
| 8 | u^v + (t+s+v−u) |
| 9 | s·t·v + s·u |

H-3 and H-4 are H-1 with the variables renamed:

- H-3: s→u, t→v, u→s, v→t.
- H-4: s→v, t→s, u→t, v→u.

H-2 uses the renaming s→t, t→u, u→v, v→s, except in two rows:

- Row 1 is t^v + (t+u).
- Row 6 is v^t − u.

These two rows are deliberate. They match the published definition of the
scheme, not the regular renaming.

**Key words.** The key has `KEY_BITS/32` words. Word w is hash function
H-(w mod 4 + 1), evaluated at this row:

    row = (J[w mod SEQ_LEN] + K[w mod SEQ_LEN]) mod 10

So the first values of the sequences select the row of word 0. Word 0 occupies
`key[31:0]`.

**Hash unit.** `hash_unit` forms a power by repeated multiplication, one multiply
per cycle. A power row takes exp + 3 cycles; row 9 takes 3 cycles. With 32
characters of sequence, exponents are at most 32. A 1024-bit key is therefore
ready within about 1,300 cycles, typically about 400.

**Clock gating.** The hash unit and the key register run on a gated clock from
`clock_gate`, a latch-and-AND cell. This clock runs only while a key is being
generated.

**Keeping the two ends in step.** Both ends run identical key generators on
identical inputs. The top checks with an assertion that the two keys agree.
`key_ready` stays low from `session_start` until both new keys are complete.
Only then does the encryptor accept plaintext.

## 2. The cipher (`etacit_encryptor`, `etacit_decryptor`)

Character i of a block, in cipher order, uses three values:

- `k`, key byte (i mod KEY_BITS/8);
- `j`, byte J[i mod SEQ_LEN];
- `pmask`, the low log2(N_CHARS) bits of the key.

| step | encryption | decryption (reverse order) |
|---|---|---|
| shuffle | c = block[i XOR pmask] | write result to block[i XOR pmask] |
| key XOR | n = c XOR k | c = n XOR k |
| TACIT term | m = n XOR (k^k mod 256) | n = m XOR (k^k mod 256) |
| bit XOR with J | b = m XOR j | m = b XOR j |
| bit reverse | cipher = reverse(b) | b = reverse(cipher) |

`k^k mod 256` is computed by square-and-multiply (`self_pow` in the package).

**Why the steps look like this.** The scheme lists the order of the steps: shuffle, XOR with
the 4H key, the TACIT logic "n^k XOR k^k", a bit XOR, and a bit reverse. It
does not fix the exact form of every step. Two choices here depart from it:

- **TACIT term.** A literal n^k (n raised to the power k) cannot be inverted
  modulo 256, so the decryptor could not undo it. This design keeps only the
  key term: it XORs n with k^k.
- **Shuffle.** The shuffle is an XOR of the character index with a key-derived
  mask. It is its own inverse, so it needs no table.

**Security caveat.** With these choices every step is a XOR or a fixed bit
permutation. The cipher is therefore a key-dependent keystream plus a shuffle.
One known plaintext/cipher block reveals the keystream for that key, so
re-keying often (a new `session_start`) matters. The design reproduces the
scheme; it is not a vetted cipher.

**Encryptor pipeline.** The encryptor stores a block in a dual-port RAM
(`dpram`), then reads it out in shuffled order through three stages:

1. RAM read;
2. key XOR and TACIT term;
3. J XOR and bit reverse.

The pipeline moves one character per cycle. When `out_ready` is low, the whole
pipeline stalls.

**Decryptor pipeline.** The decryptor undoes J and the bit reverse in one
stage. It undoes the TACIT term and the key XOR on the RAM write, at the
re-shuffled address. Once the block is complete, it streams it out in order.

**Timing, at full rate:**

| block | phase | cycles |
|---|---|---|
| encryptor | load | 128 (one character per cycle) |
| encryptor | first cipher character valid | 3 after the edge that accepted the last plaintext character |
| encryptor | output | 1 character per cycle |
| decryptor | receive | 1 character per cycle |
| decryptor | first plaintext valid | 2 after the last cipher character is accepted |
| decryptor | output | 1 character per cycle |

Each unit has a single buffer, so loading and draining a block do not overlap.

## 3. The network (`router3d`, `mesh3d`, `ni_tx`, `ni_rx`)

**Flits.** A flit has 12 bits: a 2-bit type (`FT_HEAD`, `FT_BODY`, `FT_TAIL`),
a 2-bit virtual-channel label and an 8-bit payload. A HEAD flit carries the
destination as `{2'b0, z, y, x}`, with 2 bits per coordinate. `ni_tx` turns
one encrypted block into one packet: a HEAD flit, then one flit per character,
with the last one a TAIL. `ni_rx` drops the HEAD flit and flags the TAIL
character.

**Links and flow control.** A link carries at most one flit per cycle, with a
`valid` bit and the flit's VC label. Going the other way is a `ready` bit per
VC: the registered not-full flag of the receiving FIFO of that VC. A sender may
put a flit on VC v only while `ready[v]` is high. Because the flag is
registered, there is no combinational path from one router to the next.

**Router.** Each input port has `NUM_VC` (default 2) virtual channels. Each VC
has its own 4-deep FIFO. A packet travels on one VC of each link. It can take
a different VC on every hop. A router works in four steps:

1. **Routing.** Dimension-order XYZ: the head flit moves east/west until x
   matches, then north/south, then up/down, then leaves at the local port.
2. **VC allocation.** An input VC with a HEAD flit at its front asks its
   output port for a VC there. Each output port grants one request per cycle.
   The grant is round-robin over all 14 input VCs, with the iSLIP pointer rule:
   after a grant, the pointer moves one past the winner. The winner gets the
   lowest-numbered free output VC. It keeps that VC until its TAIL flit has
   left.
3. **Switch allocation.** This is one iteration of iSLIP. First each input port
   picks one of its VCs, round-robin. A VC can be picked only if it holds an
   output VC, has a flit, and sees `ready` for its output VC downstream. Then
   each output port grants one of the input ports that picked it, again
   round-robin. Both pointers move only when a grant is made.
4. **Traversal.** The crossbar sends each granted flit in the same cycle,
   relabelled with its output VC.

A head flit written into an idle router leaves two edges later: VC allocation
at the first edge, switch allocation and traversal at the second. Body flits
then follow at one per cycle, as long as they keep winning the switch.

VCs are what remove head-of-line blocking. A packet that is stalled downstream
holds only its own VC. Flits of a packet on another VC of the same input, or
of the same output, keep moving. The router testbench counts such
interleavings and fails if none occur.

**Mesh.** Node n sits at x + X·(y + Y·z). East, west, north and south links
stay inside a layer. Up and down are the TSV links between layers. Edge
ports are tied off; XYZ routing never uses them.

**Top module.** The secure channel runs from node 0 (`SRC_NODE`) to node 15
(`DST_NODE`), so it crosses both planar dimensions and the TSV. The local ports
of all other nodes are top-level ports, where processing elements or other
traffic can attach. At node 0 the injection port and at node 15 the
ejection port belong to the secure channel. Other traffic must not be
addressed to node 15. The secure packet enters on VC 0. At node 15 the receiver
accepts on every VC while it is ready. Other nodes' ports expose one `ready`
per VC.

## 4. Files

Files in `rtl/`:

| file | contents |
|---|---|
| `etacit_pkg.sv` | byte and flit types, port enum, hash table, `self_pow`, `bit_rev8`, class tests |
| `rand_seq_gen.sv` | sequence J / K generator |
| `hash_unit.sv` | one hash evaluation |
| `key_gen.sv` | 4H key generator, gated datapath |
| `clock_gate.sv` | latch-based clock gate |
| `dpram.sv` | 1W/1R RAM, registered read with hold |
| `etacit_encryptor.sv`, `etacit_decryptor.sv` | block cipher engines |
| `flit_fifo.sv` | router input FIFO, one per port and VC |
| `router3d.sv` | 7-port virtual-channel router |
| `mesh3d.sv` | X·Y·Z mesh |
| `ni_tx.sv`, `ni_rx.sv` | packetizer and de-packetizer |
| `etacit_noc_top.sv` | the whole secure channel |

Every parameter defaults to the configuration described above:

- `KEY_BITS=1024`, `N_CHARS=128`;
- `X=2`, `Y=4`, `Z=2`;
- `SEQ_LEN=16`, `NUM_VC=2`, `FIFO_DEPTH=4`.

`N_CHARS` must be a power of two (the shuffle is an XOR). Mesh dimensions may
be at most 4 (2-bit coordinates), and `NUM_VC` at most 4 (2-bit VC label).

## 5. Simulation

Each module has a self-checking testbench, `tb/tb_<module>.sv`. Each prints
`TB_RESULT checks=N failures=M`. The testbenches share reference models in
`tb/etacit_ref_pkg.sv`, written independently of the RTL. Any testbench runs
with Verilator 5, for example:

```
verilator --binary --timing --assert --top-module tb_etacit_noc_top \
  rtl/etacit_pkg.sv tb/etacit_ref_pkg.sv $(ls rtl/*.sv | grep -v pkg) \
  tb/tb_etacit_noc_top.sv -o sim
./obj_dir/sim
```

What the testbenches cover:

| testbench | what it exercises |
|---|---|
| `tb_etacit_noc_top` | Full default size. Two key sessions; each key compared word by word with the reference and between the two ends. Two 1024-bit blocks per session. The cipher entering the network is compared with the reference encryption; the plaintext delivered at R2 must match what was sent. Cross traffic from other nodes runs on the secure packet's path, and the receiver applies back-pressure. Key sessions, gated-clock activity, non-zero shuffle masks, TSV crossings, router contention (for a VC or for the switch) and receiver stalls are counted; each must occur. Block latency is printed and checked: 401 cycles (3N + 17) with no other traffic. About 20 s of wall time. |
| `tb_hash_unit` | All 40 rows against an independent table, plus their latency. |
| `tb_key_gen` | Full 1024-bit keys; the gated clock is off while idle. |
| `tb_etacit_encryptor`, `tb_etacit_decryptor` | Three blocks, including timing, input gaps and output stalls. |
| `tb_router3d` | All seven inputs, on both VCs at once, under random traffic and per-VC back-pressure; packets reassembled per output VC and checked against a scoreboard. Also head latency, VC-allocation and switch contention, and VC interleaving on an output. |
| `tb_mesh3d` | All 16 nodes sending on both VCs with random traffic; the 0→15 latency is 12 edges. |
| other block testbenches | Cover the sequence generator, RAM, clock gate and the two network interfaces. |

## 6. How far it follows the scheme

Taken from the scheme:

- the 2×4×2 two-layer mesh;
- 7-port virtual-channel routers with XYZ routing;
- iSLIP round-robin matching for both VC allocation and switch allocation;
- random sequences J and K exchanged between the two routers;
- the four hash tables over character-class counts, with the row from the
  sequence value;
- the order of the encryption and decryption steps;
- the 1024-bit key and block;
- pipelining, clock gating and a dual-port block buffer.

Choices of this design, where the scheme gives no detail:

- the sequence generator and its length;
- counting J and K together and the row rule for key words after the first;
- the 32-bit hash word;
- the XOR form of the shuffle and the TACIT term;
- byte-wise key use;
- the flit format, number of VCs, FIFO depth and flow control;
- a single iSLIP iteration per cycle;
- the choice of which two nodes form the secure channel.

Not built:

- the MPEG-4 processing elements, which attach at the local ports;
- the genetic-algorithm IP-to-router mapping, which is an offline
  optimisation.

Retiming is left to synthesis.

**Lint notes.** `clock_gate` contains an intentional latch. The routers and
FIFOs mix asynchronous reset of control registers with unreset data storage.
Verilator reports both, and both are expected.
