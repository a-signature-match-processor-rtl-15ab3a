# Signature Match Processor

This is a hardware string matcher for network intrusion detection. It
takes packets in as a byte stream, P bytes per clock, and checks each
packet against a fixed set of signatures (byte strings of any length).
For every signature that occurs anywhere in the packet it reports one
address, and it reports them one per clock cycle.

The key idea is that the matcher does not compare whole strings. Each
character of the signature set gets its own small processing element
(PE), and the PEs of one signature form a chain. A PE passes a
"matched so far" carry to the next PE when its own character shows up
one byte after the previous character did. A signature has matched when
the carry reaches its last PE. So the design costs one PE and one
flip-flop per signature character, whatever the parallelism P is. A
signature can be as long as you like, and an occurrence may start at any
byte offset and span any number of words.

The top module is `smp`. All RTL is synthesizable SystemVerilog-2017.

## Data path

```
 pkt_data ─► char_match_array ──MX──► signature_match_array ──sig_match──► word_match_buffer ──MP──► mao ─► match_addr
 (P bytes)   256 comparators x P     one smp_pe per character             per-packet latch,        binary-tree
                                                                           end -> start rewiring    priority encoder
              ▲                              ▲ PE Reset                        ▲ SM Reset            │ Finish
              └──────────────────── control_circuit ◄───────────────────────────────────────────────┘
```

| module | role |
|---|---|
| `smp_pkg` | default sizes and the function that builds the default signature set |
| `control_circuit` | word handshake, lane masking, per-packet resets, hand-over to the encoder, stall |
| `char_match_array` | P rows of 256 byte comparators; column X gives `MX[1:P]` |
| `smp_pe` | one PE: the carry equations and the single carry register |
| `signature_match_array` | the chain of `NCHARS` PEs, wired to the comparator columns |
| `word_match_buffer` | remembers which signatures matched during the packet; moves each bit from the signature's end position to its start position |
| `mao_node` | one node of the encoder tree |
| `mao` | match address output logic: MP register, tree, two pipeline stages |

### Character match array

There is one comparator per byte value in each byte lane. Lane j holds
byte j+1 of the word, and lane 0 is the earliest byte in the stream.
For each word, exactly one comparator per valid lane fires. Column X
feeds every PE whose character is X. Columns that no signature uses have
no load, so synthesis removes them. `lane_valid` forces a lane to "no
match". It is used for the unused bytes of a short last word and for
cycles in which no word is taken.

### Processing elements: how a match travels

Within a word, lane j of a PE's carry means "the signature matches up to
my character, and my character is byte j+1 of this word". Each PE
computes these carries:

```
cout[0] = MX[0] & (cin[P-1] | sig_beg)     // cin[P-1] = previous PE's stored last-lane carry
cout[j] = MX[j] & (cin[j-1] | sig_beg)     // j = 1 .. P-1, same word
sig_match = sig_end & (cout[0] | ... | cout[P-1])
```

Each PE registers only its last-lane carry `cout[P-1]`, on every word
it takes. This works because a character can only continue a match
started in the previous word if the previous character was that word's
last byte. The other lanes chain combinationally from PE to PE. Each
lane steps one PE to the right and one lane down, so a carry never
travels more than P PEs within a cycle. `sig_beg` lets a signature's
first PE start a match from nothing. It also isolates that PE from the
signature stored before it in the chain, so all signatures can sit back
to back in one chain.

Worked example (P = 2). The set is `144` followed by `ads1`. The packet
`f144` arrives in two words:

1. Word 1 is `f`,`1`. The first `1` PE sees MX = 01 and has `sig_beg`,
   so its lane-1 carry is set and stored.
2. Word 2 is `4`,`4`. The first `4` PE takes the stored carry on lane 0.
   The second `4` PE takes that PE's lane-0 carry on lane 1. It is the
   end of `144`, so `sig_match` rises.

The testbench checks this exact sequence and the stored register values.

### Word match buffer

`sig_match` is only meaningful at the last character of a signature. It
can rise in any word of the packet, so the buffer ORs it into one
flip-flop per end position. Because the signature set is fixed, moving
each bit from the signature's end to its start is plain wiring. The
result is the matched-position vector MP: one bit at the first-character
position of every signature that matched. `mp_next` is the same vector
including the current word's matches. It lets the encoder take the
packet in the same clock edge in which the buffer is cleared.

### Match address output logic: the encoder tree

MP can hold any number of set bits, and all of them must be reported.
`mao` copies MP into its own register at packet end. It then runs a
binary tree of `mao_node` cells over that register, and each cycle does
three things:

* **Upward, MAA.** Each node ORs its two children, so the root says
  whether any match is still waiting (`match_irq`).
* **Downward, leftmost pointer LP.** The root gives the pointer to its
  left subtree if that subtree has a match, otherwise to its right
  subtree. Every node does the same, so exactly the lowest-numbered set
  leaf receives the pointer.
* **Address.** Bit k of the address is set when the pointer turned right
  at tree level k, where level 0 joins pairs of leaves. The pointer that
  reaches a leaf clears that MP bit, so the next cycle encodes the next
  match.

With M matches, the encoder therefore takes M cycles, whatever the size
of the set. The leaves are padded to a power of two. The logic has two
pipeline stages. Stage 1 is the MP register and the tree. Stage 2
registers `match_addr`, `match_valid` and `pkt_done`.

`match_addr` is the character position, within the set, of the matched
signature's first character. For the default set, address 0 is `144`
and address 3 is `ads1`. Software maps positions to rules.

## Packet interface and timing

| port | meaning |
|---|---|
| `pkt_data[P]` | the word; element 0 is the earliest byte |
| `pkt_rdy` | a word is offered (PKT_RDY) |
| `pkt_end` | the offered word is the last of its packet (PKT_END) |
| `pkt_nbytes` | real bytes in that last word, 1..P |
| `pkt_ack` | the word is taken in this cycle (PKT_ACK); the source holds the word until then |
| `match_valid`, `match_addr` | one matched signature's start address |
| `pkt_done` | pulses with a packet's last address, or alone if it had none |
| `match_irq` | addresses are waiting (interrupt to the host) |
| `pkt_active`, `pkt_count`, `stall_count` | status |

Timing:

* A packet of b bytes takes ceil(b/P) cycles to stream in.
* The clock edge that takes the last word does three things at once: it
  loads the encoder, clears the PE registers and clears the word match
  buffer.
* The next packet can therefore start in the very next cycle. It streams
  while the encoder reports the previous packet.
* The M addresses appear on M consecutive cycles, starting two cycles
  after the last word. From the first word to the last address, a packet
  takes ceil(b/P) + M + 1 cycles.
* If b/P > M + 1, which is normal for real traffic, the throughput is P
  bytes per cycle.
* **Stall.** If a packet ends while the encoder still has more than the
  one address it is encoding in that cycle, `pkt_ack` stays low on the
  last word until the encoder is ready. This is the only back-pressure.
  Words that are not last are always taken.
* Reset is synchronous and active high.

## Parameters and the signature set

| parameter | default | meaning |
|---|---|---|
| `P` | 4 | bytes per clock |
| `NCHARS` | 1021 | characters in the signature set (one PE each) |
| `SIG_CHARS` | `smp_pkg::def_sig_chars()` | the characters, packed like a string literal: position 0 is the most significant byte |
| `SIG_BEG` | `smp_pkg::def_sig_beg()` | bit i set where a signature begins; bit 0 must be set |

A signature runs from one set `SIG_BEG` bit to the next. A custom set is
a string literal plus a mask. For example, `FOO`, `BAR`, `ads1`, `144`,
`OO` and `4` are:

```systemverilog
smp #(.P(4), .NCHARS(16), .SIG_CHARS("FOOBARads1144OO4"),
      .SIG_BEG(16'b1010_0100_0100_1001)) u_smp (...);
```

Changing the set means re-synthesizing, because the signatures are wired
into the comparators.

The default is the configuration with P = 4 and a 1021-character,
94-signature set. The real rule strings of that set are not available
here, so the default keeps its size and count but not its contents:

* the first two signatures are `144` and `ads1`;
* the other 92 are synthetic lower-case strings, 2 of 12 characters
  followed by 90 of 11 (`smp_pkg::set_sig_len` splits any other size the
  same way);
* their bytes come from a 32-bit linear congruential generator,
  x ← 1664525·x + 1013904223, starting from x = 0x12345678. Each byte is
  'a' + (x[23:16] mod 26).

## Where this RTL makes its own choices

These points are not fixed by the architecture. They were chosen here:

* **Handshake.** The signals are named PKT_RDY, PKT_END and PKT_ACK, but
  the signalling around them is this design's own: a valid/ready word
  handshake with a last-word flag, plus `pkt_nbytes` for a partial last
  word.
* **When the resets happen.** The PE registers and the word match buffer
  are cleared at the end of each packet, not at the start of the next.
  The next packet still finds a clean state, and no cycle is lost.
* **A separate MP register.** The encoder keeps its own copy of MP, so
  the buffer can start on the next packet right away. The stall above is
  the consequence.
* **Where the pipeline is cut.** The encoder has two pipeline stages.
  The cut between them, after the tree and before the address output, is
  a choice made here.
* **Idle cycles.** A cycle with no word leaves the PE registers
  unchanged, so a packet may arrive with gaps.
* **Extra outputs.** The status counters and `pkt_active` are additions.
* **Not built.** There is no host register interface; `match_irq` stands
  in for the interrupt. The MAC/PHY, the packet SDRAM and the host CPU
  are outside this RTL.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_smp_pe` | all 1024 input combinations for P = 4, both register states, enable and clear |
| `tb_char_match_array` | all 256·P outputs for random words and lane masks |
| `tb_signature_match_array` | the `f1`/`44` example, and random packets compared word by word with a direct string search, for P = 1, 2, 3 and 4 (`sma_check`) |
| `tb_word_match_buffer` | accumulation, clearing, and the end-to-start mapping, against a model |
| `tb_mao_node`, `tb_mao` | the node truth table; the encoder with random MP vectors loaded back to back, checking address order, one address per cycle and the Finish timing |
| `tb_control_circuit` | handshake, lane masks, resets, counters and stalls, against a model |
| `tb_smp` | end to end, with a 16-character set at P = 4 and P = 2 |
| `tb_smp_full` | end to end at the default parameters (P = 4, 1021 characters), 300 packets |
| `tb_smp_workloads` | end to end with the 1021-character, 94-signature set at P = 1, and a 2044-character, 246-signature set at P = 2 (`smp_workload` builds the set) |

The two end-to-end testbenches share one driver, `smp_driver`. It plants
signatures in random packets, offers the words with random gaps, and
compares each packet's addresses with a string search. It also checks
the ceil(b/P) + M + 1 timing. It counts each behaviour and fails if any
never happened:

* several matches in one packet, and a packet with none;
* a match spanning a word boundary, which uses the carry register;
* overlapping signatures, and a signature occurring twice but reported
  once;
* a partial last word, and gaps inside a packet;
* a stall on a busy encoder;
* a packet streaming while the previous packet's addresses are output.

To run a testbench with Verilator:

```sh
verilator --binary --timing --assert -Irtl --top-module tb_smp \
    rtl/smp_pkg.sv rtl/*.sv tb/smp_driver.sv tb/tb_smp.sv
./obj_dir/Vtb_smp
```

`tb_smp_full` builds in about a minute and runs in under a second.
`tb_smp_workloads` takes about four minutes to build.

## Limits

* The default set has the evaluated size, but its contents are
  synthetic.
* Larger sets work by overriding `NCHARS`, `SIG_CHARS` and `SIG_BEG`:
  2044, 8163, 16347, or 37680 characters for a complete rule database.
  The chain, the buffer and the tree scale linearly, but only sets up to
  2044 characters have been simulated.
* Only exact strings are matched. There are no wildcards, no
  case-insensitive matching and no regular expressions.
* Clock rates depend on the target. In this RTL, the critical path is
  the PE carry chain, which is about P PEs deep, plus the comparator
  fan-out. In the encoder, it is the up-and-down tree path of
  2·log2(NCHARS) node levels.
