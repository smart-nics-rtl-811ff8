# Power-proxying smart NIC: header classifier and partitioned-TCAM content inspection

A PC that sleeps through the night still receives network traffic: ARP
queries, pings, keep-alives, and probes from management tools. Most of it needs
only a canned answer, or no answer at all. A power-proxying smart NIC (SNIC)
answers these packets itself and wakes the host only when it has to. To do that
cheaply, the NIC must decide at line rate what kind of packet it has received.
Sometimes it must also check the payload for known byte patterns (signatures).

This RTL holds the two inspection engines that make those decisions:

* **Header classifier.** A CAM-based classifier watches the receive byte
  stream. It compares each frame's addresses and ports with up to 100 power
  proxying rules, then writes a *packet descriptor* for the proxy firmware. The
  descriptor gives the class, the action (proxy, wake or drop) and the matching
  rule.
* **Content inspection.** A partitioned TCAM signature matcher scans a payload
  one byte per clock. It uses a small *suffix cache*, so the large suffix TCAM
  is searched only rarely. That is where most of the energy saving comes from.

The Rx, Tx and descriptor FIFOs around the MAC complete the datapath. All of
it is in `snic_top`.

```
 MAC rx bytes ──┬────────────────► Rx FIFO (2048 B) ──► proxy handler (sw)
                │                                          │   ▲   │
                └► header classifier ─► descriptor FIFO ───┘   │   │ payload bytes
                   (3 rule CAMs, MAU)   wake_irq ──────────────┘   ▼
 MAC tx bytes ◄── Tx FIFO (2048 B) ◄── responses      content inspection
                                                       short matches / candidates
```

These parts are not in this RTL: the MAC core, the PHY, the proxy handler
firmware, the payload reassembly that feeds the content inspection, and the
final signature-matching stage. Their signals are ports of `snic_top`.

## Header classifier

`header_classifier` has four parts:

* `header_processing_unit`, a byte-indexed parser and control FSM;
* three `cam` instances holding the rule fields: source IP (32 bits), source
  port (16) and destination port (16);
* `match_address_unit`;
* a host IP register.

### Parsing and decision points

The parser counts bytes of an Ethernet II frame. It assumes IPv4 and places the
transport header with the IHL field. A decision is made as soon as the bytes
it needs have arrived:

| Frame | Decided after | Action | Descriptor latency |
|---|---|---|---|
| ARP (EtherType 0x0806) | byte 13 | proxy | +1 cycle |
| Neither IPv4 nor ARP | byte 13 | wake | +1 |
| IPv4, destination ≠ host register | byte 33 | drop | +1 |
| ICMP to the host | byte 33 | proxy | +1 |
| Another IP protocol to the host | byte 33 | wake | +1 |
| UDP to the host | last port byte (37 when IHL = 5) | proxy on a rule hit, else wake | +2 |
| TCP to the host | last port byte | proxy on a full rule hit, else wake | +2 / +3 / +4 (see below) |
| Frame ends before its decision byte | `rx_last` | drop | +1 |

Each frame gives exactly one descriptor, as a one-cycle `desc_valid` pulse.
`wake` pulses at the same time for a wake decision.

### Sequential CAM search

A TCP frame first searches the source address CAM. It searches the source port
CAM only if that gave a hit, and the destination port CAM only if the source
port search kept one. The three unencoded match vectors are ANDed, so a rule
matches only if all three of its fields match in the *same row*. The search
stops at the first empty intersection, and the host is then woken. The later
CAMs are not searched at all, which saves their switching power. The search
costs one cycle per CAM, which is where the +2, +3 and +4 latencies come from.

A UDP frame searches only the destination port CAM.

Each rule row has a kind (none, TCP or UDP) next to it:

* a UDP lookup is masked to UDP rows;
* a TCP lookup is masked to TCP rows;
* the source-field CAM entries are valid only in TCP rows.

The match address unit reports three things:

* `hit`;
* `multi`: more than one bit is set, meaning several flows map to one
  application;
* the lowest matching row, as the rule address.

### Descriptor

`pkt_desc_t` (in `snic_pkg`) holds:

* `cls`: ARP, ICMP, TCP, UDP or other;
* `action`: proxy, wake or drop;
* `rule_hit` and `multi_match`;
* `rule_addr`, an 8-bit rule row.

### Rate

The worst case is a TCP frame that matches in all three CAMs. Its descriptor
is out 42 cycles into a minimum-size (64-byte) frame. The classifier is
therefore idle before the next frame starts, and keeps up with back-to-back
minimum-size frames. At 125 MHz that is 1.95 Mframes/s, above the 1.48 Mframes/s
of gigabit Ethernet. `tb_header_classifier` checks that every descriptor
arrives within 50 cycles of the frame start. That bound corresponds to
2.5 Mframes/s at 125 MHz.

## Partitioned-TCAM content inspection

This is the least obvious part of the design.

### Signatures in pieces

A signature is cut into w-byte pieces, with w = 4. The first piece goes into
the **P_TCAM** (prefixes). Every later piece goes into the **S_TCAM**
(suffixes). A final piece shorter than w is padded with don't-care bytes.
Each entry carries two flag bits:

* *intermediate*: another piece of some signature follows this one;
* *concluding*: this piece ends some signature.

A signature of w bytes or fewer is a *short pattern*. It lives entirely in the
P_TCAM as a concluding prefix, and one hit completes the match.

The same 4-byte string can be both a prefix of one signature and a suffix of
another. This case is called an *alias*. Each entry's flags describe every
signature that uses it.

Example: `GET /index.html` becomes

* P `GET ` (intermediate);
* S `/ind` (intermediate);
* S `ex.h` (intermediate);
* S `tml*` (concluding, with one don't-care byte).

### Datapath per window

The payload moves through a w-byte `inspection_window`, one byte per step. The
P_TCAM is searched on every window.

A suffix can only follow a hit exactly w bytes earlier. The **activator** pushes
"intermediate hit in this window" into bit 0 of the w-bit `enable_buffer`. The
bit that comes out w steps later enables a search of the **suffix cache**. This
is a 40-entry, fully associative store of recently used S_TCAM entries,
together with their S_TCAM addresses. Almost every window therefore costs only
one P_TCAM search.

On a suffix cache miss, the `enabler` raises `pause` for one cycle:

* the window, the enable buffer and the retirement buffer hold;
* the S_TCAM is searched on the same window;
* the held P_TCAM result of that window is used again, without searching the
  P_TCAM twice.

An S_TCAM hit is copied into the cache only if the entry has no don't-care
bytes. A padded entry such as `tml*` would also match `tmlX`, an entry that the
exact-compare cache could never tell apart from it. Caching padded entries
would return wrong addresses; this is the *mutual inclusion* problem.

`cache_ctrl` chooses the entry to replace. It uses an empty entry first.
Otherwise it picks a pseudo-random entry from a 16-bit LFSR that steps every
clock, scaled onto the 40 entries. Any write to the S_TCAM empties the cache,
so the cache never holds stale addresses.

Throughput is one byte per clock plus one clock per cache miss.

### Contention resolution

Each step, `contention_resolution` turns the window's hits into one retirement
buffer entry `{address, descriptor}`. It checks the cases in this order:

| Hits in this window | Pushed | Descriptor |
|---|---|---|
| Intermediate P_TCAM hit (with or without a suffix hit: alias) | P address | `11` |
| Suffix hit (cache or S_TCAM), intermediate or concluding | S address | `01` |
| Concluding P hit only (short pattern) | NULL; `short_match` pulses instead | `00` |
| Nothing | NULL | `00` |

When a window has both an intermediate prefix hit and a suffix hit, the
prefix wins. The prefix may be the start of a new match, while the suffix's
chain is still visible from its own start.

### Retirement buffer and retirement logic

`retirement_buffer` is a shift register of 1 + w·(L/w − 1) = 125 entries
(L = 128-byte maximum signature). Each entry holds a 21-bit address and 2
descriptor bits. It shifts one place toward the *sentry* (entry 0) per window
step.

When the sentry holds a `11`, `retirement_logic` collects the entries at
positions 0, w, 2w, … up to the first NULL. Those are the hits spaced exactly
one piece apart. It emits the collection as a candidate: a one-cycle
`cand_valid` pulse with `cand_len` and the address and descriptor lists.

A lone prefix with no following suffix is not emitted. A downstream
final-matching stage would look the candidate up in its table of valid
permutations. That stage is not part of this RTL.

For the payload `XYZWGET /index.html`, where `XYZW` is a prefix of a second
signature `XYZWGET /index.html` and `S:GET ` is loaded as an alias, two
candidates come out:

* `[P30/11, P20/11, S100/01, S200/01, S300/01]`;
* `[P20/11, S100/01, S200/01, S300/01]`.

### Payload boundaries

After a payload's last byte, the window steps through w empty (NULL) positions
before it accepts the next payload. No window or enable bit crosses two
payloads. With no input, the window keeps stepping on padding, so the
retirement buffer drains.

`stats` counts:

* P_TCAM, cache and S_TCAM searches;
* cache hits;
* pauses;
* alias windows;
* short matches;
* candidates.

These are the quantities an energy or throughput estimate needs.

## Sizes

| Parameter | Default | Basis |
|---|---|---|
| `NUM_RULES` | 100 | the evaluated power proxying rule set |
| `W` | 4 bytes | the evaluated TCAM width with the most suffix traffic |
| `C_DEPTH` | 40 | the smaller end of the 40 to 60 entries evaluated |
| `S_DEPTH` | 2,097,152 (2^21) | 40 cache entries are quoted as 0.002% of the suffix store, about 2 M entries |
| `P_DEPTH` | 4096 | own choice |
| `MAX_SIG_LEN` | 128 bytes | own choice (nearly all SNORT signatures are under 100 bytes) |
| RB depth | 125 | 1 + W·(L/W − 1) |
| address width | 21 + 2 descriptor bits | log2(max(P, S)) + 2 |
| `RX_DEPTH`, `TX_DEPTH` | 2048 bytes | own choice; holds a 1518-byte frame |
| `DESC_DEPTH` | 16 | own choice |

The TCAMs are plain arrays with a combinational, lowest-address-first priority
search. That is a behavioural stand-in for a TCAM macro. It simulates well
because the S_TCAM is searched only on cache misses. A real 2 M-entry TCAM
would be a hard macro.

## Own choices and departures

These points go beyond, or read into, what the underlying design specifies:

* Rule kinds per row, the lowest-row priority on multiple matches, and the
  descriptor layout.
* Wake (rather than drop) for non-IP frames, unknown IP protocols, and misses in
  the source port and destination port CAMs.
* Drop for runt frames.
* ARP frames are classified on the EtherType alone.
* A concluding suffix is pushed as `01`, the same as an intermediate one, so a
  chain can end on it.
* A prefix hit wins over any suffix hit, not only over an intermediate one.
* Zero padding between payloads. The hold of the retirement buffer during a
  pause.
* Cache flush on every S_TCAM write, and the LFSR replacement.
* Overflow handling: an Rx byte offered to a full FIFO is dropped and shown on
  `rx_drop`; a descriptor lost to a full descriptor FIFO sets the sticky
  `desc_overflow`.
* Not built: final signature matching, payload reassembly, and the proxy
  handler's responses. Those are software or external blocks; the testbench
  plays their role.

## Simulating

Every file in `rtl/` is one module or package; `snic_pkg.sv` must come first.
Each testbench in `tb/` prints `TB_RESULT checks=N failures=M` and finishes.
For example:

```
verilator --binary --timing --assert rtl/snic_pkg.sv $(ls rtl/*.sv | grep -v snic_pkg) \
          tb/tb_snic_top.sv --top-module tb_snic_top -o sim && ./obj_dir/sim
```

`tb_snic_top` runs the whole top at its default sizes, in well under a second
of simulation time. It takes frames of every class through the classifier
(including a multiple match and an early stop) and reads them back from the Rx
FIFO. It sends an ARP reply out through the Tx FIFO, and streams the proxied
payloads through content inspection. It checks the short matches, the
candidates and the cache hit/miss counts, including after an S_TCAM rewrite.
It finally overflows the Rx and descriptor FIFOs. It counts each mechanism and
fails if one never happened.

The unit testbenches check each block against a reference model written in the
testbench itself:

* `tb_content_inspection` checks the default-size engine against a full
  software model of windows, cache and chains, including the cycle count.
* `tb_header_classifier` checks 317 random and directed frames with their
  descriptor latency.
