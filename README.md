# Two-stage packet inspection with multi-threading string-matching FSMs

Signature-based intrusion detection has to compare every byte of every
packet with thousands of attack strings, at line rate. This design splits
that work in two:

* a **classifier** looks only at the header (addresses, ports, protocol) and
  sorts each packet into *benign*, *malicious* or *suspected*. Most traffic
  is settled here and never reaches the expensive stage;
* a **verifier** scans the payload of the suspected packets, byte by byte,
  with Aho-Corasick automata, but only against the strings of the rule class
  the classifier named. Each verifier therefore holds a small automaton.

The verifier's automata use a **multi-threading FSM**. The next-state logic
of a string-matching FSM cannot simply be pipelined, because the next byte
needs the state the current byte produces. Instead the loop is cut into M
pipeline stages, and M independent packets are put on it in turn. Each stage
does useful work in every cycle, the clock can run about M times faster than
that of a single-cycle FSM, and the FSM processes one byte per cycle in
total, shared by M packets.

Everything is synthesizable SystemVerilog in `rtl/`, with self-checking
testbenches in `tb/`.

## Data flow

```
                 +--------------+   +-----+   +-----------+ i(B) descriptors
 packets ------> |  dispatcher  |-->| cls |-->| BUF/steer |-----------------------> forwarder --> out
 (bytes +        | round robin, |   +-----+   |           | i(S) bytes            ^
  header)        | sequence id  |-->  ...  -->|           |-----> verifier 0..P-1 |
                 +--------------+  M_CLS      |           |        (A FSMs each)  |
                                   classifiers|           |             |         |
                                              |           |        wrapper -------+
                                              |           | i(M) descriptors      v
                                              +-----------+-----------------> discarder --> out
```

| Module | Role |
|---|---|
| `dispatcher` | numbers each packet and sends it whole to one classifier, round robin, skipping a classifier that is busy between packets |
| `classifier` | parallel compare of the header with all rules; verdict and verifier class on the first byte, held for the packet |
| `sync_fifo` | classifier buffer (BUF); also the verifier's queues |
| `cls_steer` | reads a classifier buffer; suspected bytes go to the verifier of their class, benign/malicious packets become one descriptor each |
| `verifier` | input arbitration, per-thread queues, thread scheduler, A multi-threading FSMs in lockstep, out-of-order verdict queue |
| `mt_fsm` | the multi-threading Aho-Corasick FSM |
| `wrapper` | collects the verifiers' verdicts, clean ones to the forwarder, matches to the discarder |
| `forwarder`, `discarder` | merge their m+1 sources into one descriptor stream and count by cause |
| `rr_arbiter` | round-robin arbiter used by the merging blocks |
| `pi_pkg` | shared types |
| `pi_top` | the whole system |

The exits deliver **descriptors**, not bytes: `{id, header, length, cause,
ref_id}`. The design assumes that the packet bytes sit in a packet memory
outside it, which sends or drops a packet when its descriptor appears at
`fwd_*` or `dsc_*`. Only suspected packets' bytes travel past the classifier
buffers, because only they need scanning.

## The multi-threading FSM (`mt_fsm`)

### Ring structure

```
            in_byte --> class map --+
                                    |  {state, class}       table read
 in_first --> root/ring mux --------+--> [s1_q] ---------> [rd_q, s2_q] --> [d_q 0] ... [d_q M-3] --+
                   ^                      C1                      C2           M-2 plain registers     |
                   +----------------------------------- fb (state register) <----------------------+
```

* **C1** maps the byte to a character class (a 256-entry map) and picks the
  thread's current state: the state coming back round the ring, or the root
  (0) on the first byte of a packet.
* **C2** reads the transition table at `{state, class}`. The read is
  synchronous, like a block RAM.
* **M-2 further registers** close the ring. A synthesis tool with register
  retiming can move them into C1 and C2. That is how the pipelining was
  meant: registers inserted after synthesis until each stage is about one
  LUT deep.

The ring has exactly M registers. In cycle t the scheduler presents thread
`t mod M` (`in_tid`). That thread's context went in M cycles earlier and is
just arriving at `fb`, so the byte is combined with the right state. A slot
with no byte (`in_valid` low) passes its context round unchanged, so a thread
can wait for data without losing its state. The design needs M ≥ 2. The
single-cycle FSM (M = 1) is the baseline this structure improves on, and it
is not supported.

Timing for one thread with M = 4 (bytes `b0 b1 ...` of packet P on thread 0):

```
cycle      0    1    2    3    4    5    6    7    8
in_tid     0    1    2    3    0    1    2    3    0
in_byte   b0    .    .    .   b1    .    .    .   b2      (other slots carry other threads)
fb.state   -    -    -    -   S0    -    -    -   S1      S0 = state after b0
```

A single packet advances one byte every M cycles. With M packets in flight
the FSM takes one byte per cycle.

### Tables and how to fill them

The automaton is not fixed in the RTL. The FSM is loaded through two write
ports:

* `cmap[b]` (CLASS_W bits): the character class of byte b. Bytes that occur in
  no string may share class 0.
* `tbl[{s, c}]` (STATE_W+1+PAT_W bits): `{next, match, pattern}`.

For a string set with trie `goto`, failure function `fail` and output sets
`out`, the entry for state s and class c is

```
next(s, c)   = goto(s, c)            if that trie edge exists
             = next(fail(s), c)      otherwise, for s != root
             = root                  for s = root without an edge
match, pattern = (out*(next) nonempty, lowest string number in out*(next))
out*(s)      = out(s) ∪ out*(fail(s))
```

Only the entries of states the automaton actually has must be written,
because the ring starts at the root and never reaches any other state.
`tb/tb_ac_pkg.sv` contains a compact builder (`ac_model`) that produces
exactly these tables from a list of strings.

`out_hit` is a sticky per-packet flag, and `out_pat` is the string that
completed first (lowest number on a tie). Both are reported with `out_done`
on the packet's last byte. Scanning does not stop early after a match.

### Default size

M = 20 threads, up to 1024 states, 64 character classes and 64 strings per
FSM. That covers a subset of 50 strings, the subset size the partitioning
aims for, at a typical 10–15 bytes per string. At 20 threads the FSMs for
50 strings were reported to run above 500 MHz on a Virtex-4-class FPGA,
which at one byte per cycle is above 4 Gbit/s per verifier. This RTL has not
been placed and routed, so clock rates are not claimed for it.

## The verifier (`verifier`)

One verifier serves one rule class. Its strings are split into A subsets,
one per `mt_fsm`. All A FSMs see the same bytes in the same slots, so each
packet is checked against the whole class in one pass. A match in any FSM
makes the packet malicious.

1. **Input.** Up to `M_CLS` classifiers offer suspected packets. A round-robin
   arbiter takes one whole packet at a time. The packet goes into the byte
   queue of a thread: the first thread, from a rotating pointer, that holds
   fewer than `DQ` packets and has room. When the last byte is written, the
   packet's `{id, header, length}` goes into that thread's descriptor queue.
2. **Issue.** Every cycle the slot counter picks thread `t mod M`. If its
   queue has a byte, the byte goes through the M-to-1 multiplexer into all
   FSMs, marked first/last.
3. **Verdict.** When a last byte comes back round the ring, the thread's
   descriptor is popped. The cause is set to `WHY_CONTENT_MATCH` or
   `WHY_CONTENT_CLEAN`, and `ref_id = {verifier[2:0], FSM[3:0], string[5:0]}`
   names the lowest-numbered FSM that matched. The result goes into a
   verdict queue of 2M+4 entries. Short packets finish before long ones
   that started earlier, so **verdicts leave out of order**. The id tells
   them apart.
4. **Flow control.** The ring cannot stall. Bytes are issued only while the
   verdict queue has room for M+1 more verdicts, which is more than can
   complete within one trip round the ring.

Throughput is one byte per cycle per verifier while at least M packets are
queued. The verifier testbench measures 0.85 bytes per cycle with 600 random
packets of 4–60 bytes. The shortfall comes from threads running out of
queued bytes near the end.

## Classifier rules (`classifier`)

A rule (`rule_t`) tests:

| field | match |
|---|---|
| `src_ip/src_len`, `dst_ip/dst_len` | prefix of the given length (0 = any) |
| `sp_lo..sp_hi`, `dp_lo..dp_hi` | inclusive port range (equal bounds = exact port) |
| `proto`, `proto_any` | exact protocol or wildcard |
| `has_content`, `cls` | whether the rule also carries payload strings, and the verifier class that holds them |

All `NRULES` rules (default 329, the number of distinct Snort 2.4 header
rules) are compared in parallel. If any matching rule has no payload
strings, the packet is **malicious** and `rule` is the lowest such rule.
Otherwise, if a content rule matches, the packet is **suspected**, and the
lowest-numbered matching content rule gives the class. Otherwise it is
**benign**. The verdict is taken on the first byte and kept for the whole
packet, so a rule rewritten in the middle of a packet does not split it.
Rules are written one at a time through `rule_we/rule_idx/rule_data`. A
reset clears every rule's `valid` bit.

Rule order is the only priority. A packet that matches content rules of
several classes goes to one verifier only, so rules must be partitioned so
that a header group belongs to one class.

## Interfaces

Every stream is valid/ready: a transfer happens on a rising clock edge where
both are high. A source must hold its data while valid is high and ready is
low. The one exception is the dispatcher: it may withdraw the *first* byte of
a packet from a classifier that did not take it and offer it to the next
one. All resets are synchronous and active low (`rst_n`). Memories are not
reset.

| type (`pi_pkg`) | contents |
|---|---|
| `hdr_t` | `src_ip, dst_ip, src_port, dst_port, proto` (104 bits) |
| `beat_t` | `{id, hdr, data, last}`: one byte, with the packet's id and header |
| `cbeat_t` | `beat_t` plus `cat` (benign/suspected/malicious), `cls`, `rule` |
| `desc_t` | `{id, hdr, len, cause, ref_id}` |
| `cause_t` | `WHY_NO_RULE`, `WHY_CONTENT_CLEAN` (forwarded); `WHY_HEADER_RULE`, `WHY_CONTENT_MATCH` (discarded) |

`pi_top` ports: the packet input (`in_*`, with `in_hdr` held for the whole
packet); the rule write port (broadcast to every classifier); the FSM write
port (`cfg_ver`, `cfg_fsm`, `cmap_*`, `tbl_*`); the two descriptor exits;
the forwarder and discarder counters; the reference of the last drop; and
`thr_busy[P]`, the threads of each verifier that hold a packet.

Latencies: classifier 1 cycle; buffer at least 1 cycle; each verifier byte M
cycles round the ring after issue; wrapper, forwarder and discarder 1 cycle
each.

## Parameters

| parameter | default | origin |
|---|---|---|
| `P` verifiers / rule classes | 8 | rules partitioned into eight classes |
| `M` threads per FSM | 20 | largest thread count reported for 50-string FSMs |
| `A` FSMs per verifier | 2 | at most 97 payload strings per header group, in subsets of 50 |
| `NRULES` | 329 | distinct Snort 2.4 header rules |
| `M_CLS` classifiers | 4 | this design's choice (not specified) |
| `CBUF`, `TBUF` | 2048 bytes | this design's choice: one maximal Ethernet frame and more |
| `DQ` packets per thread | 4 | this design's choice |
| `STATE_W`, `CLASS_W`, `PAT_W` | 10, 6, 6 | this design's choice (1024 states, 64 classes, 64 strings) |

## Where this design goes beyond or falls short of the architecture

* **Approximate content classification is not built.** The architecture's
  classifier also checks the payload approximately, in software on a
  network processor, to send fewer packets to the verifiers. Here every
  header match on a content rule goes to a verifier. The verdicts are still
  correct, because the verifier is exact, but the verifiers see more
  traffic.
* **Input width.** The system takes one byte per cycle. One verifier also
  does one byte per cycle, so the eight verifiers together are never kept
  busy. The aggregate rate quoted for eight evenly loaded verifiers, eight
  times that of one, would need an input eight bytes wide, or several
  dispatchers. The dispatcher is not built that way.
* **Descriptors at the exits.** The forwarder and discarder output
  descriptors. Moving the bytes is left to the packet memory.
* **Programmable tables instead of generated logic.** The automata are
  memories loaded at run time, not logic generated per rule set. The
  pipelining relies on the synthesis tool's retiming of the M-2 spare
  ring registers.
* **Interconnect and FSM interface circuits.** The architecture mentions a
  high-speed FSM interface and pipelined interconnect without describing
  them. The per-thread queues, the M-to-1 thread multiplexer and the
  out-of-order verdict queue here are one way to provide them.
* Dispatcher, buffers, steering, wrapper, forwarder and discarder: their
  policies and sizes are this design's own.

## Simulation

Each testbench prints `TB_RESULT checks=N failures=F` and stops. Every one
has a watchdog. Example with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/pi_pkg.sv tb/tb_ac_pkg.sv tb/tb_pi_top.sv --top-module tb_pi_top
./obj_dir/Vtb_pi_top
```

The same pattern applies to the other testbenches. Leave out
`tb/tb_ac_pkg.sv` for those that do not use it: `tb_classifier`,
`tb_dispatcher`, `tb_sync_fifo`, `tb_cls_steer`, `tb_wrapper`,
`tb_forwarder` and `tb_discarder`. `tb_mt_fsm`, `tb_verifier`,
`tb_fsm_workload` and `tb_pi_top` need it.

| testbench | what it shows |
|---|---|
| `tb_mt_fsm` | default size. Textbook automaton for SHE/HERS/HIS state by state; 20 threads of random traffic with idle slots, every byte's state and the M-cycle latency checked against a software automaton, every verdict against a direct search |
| `tb_verifier` | default size, two FSMs with different string sets. A lone packet takes M cycles per byte; 600 packets from four inputs: verdicts, references, out-of-order completion, all 20 threads busy, more than 0.8 bytes per cycle |
| `tb_fsm_workload` | one default-size FSM loaded in turn with a 20-string and a 50-string set (the automaton sizes the architecture is tuned for), 400 random packets each with planted strings; every verdict and first matching string checked against a direct search |
| `tb_classifier` | 329 random rules, 1500 packets against a model, stalls, a rule rewritten mid-packet, 1-cycle latency |
| `tb_dispatcher`, `tb_sync_fifo`, `tb_cls_steer`, `tb_wrapper`, `tb_forwarder`, `tb_discarder` | protocol, ordering, routing, counters, latency |
| `tb_pi_top` | the whole system at its default parameters. 700 packets end to end, each checked at the right exit with the right cause and reference, and a count of each mechanism: every verdict kind, out-of-order verdicts, several threads of one FSM busy, classifiers contending for a verifier, back-pressure reaching the dispatcher, output stalls |

`tb_pi_top` uses every default parameter and finishes in about ten seconds
of simulation time after a build of about twenty seconds.
