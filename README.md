# TAN — a packet-switched Test Area Network in SystemVerilog

Testing many chips in parallel on one automatic test equipment (ATE) is limited by
how tightly the tester is wired to each test head. A Test Area Network replaces
that wiring with an ordinary switched Ethernet: the ATE becomes a *server*, every
test head holding a device under test (DUT) becomes a *client*, and the two talk
through a small protocol that sits directly on the MAC layer.

Two ideas keep the tester's load low:

* **Broadcast, not address.** Test patterns go out once, as broadcast frames, to
  every test head of a subnetwork. So do the *expected* responses.
* **Verify at the test head.** Each head applies the patterns to its own DUT,
  keeps the responses, and compares them with the broadcast expected responses
  itself. Only a verdict travels back: `PAS`, or `FAI` with the captured
  responses, or `ERR`.

While the heads of one subnetwork are busy applying patterns, the server serves
another subnetwork (time-division multiplexing). Heads that fail are told to
stop (`STP`) and stay silent for the rest of the session.

This repository holds synthesizable RTL for the server and the test heads, and
a top level that puts one server and 64 heads together. The Ethernet switches,
MACs and PHYs, the pattern generator and the DUTs are standard or external
parts; they are ports of the top level and behavioural models in the
testbenches.

## Block structure

```
tan_top
├── tan_server                       ATE side
│   ├── tan_subnet_ctrl  × NSUB      session state machine of one subnetwork
│   ├── tan_tdm_arbiter              shares the wrapper between subnetworks
│   ├── tan_frame_tx                 packet wrapper (one, shared)
│   └── tan_frame_rx     × NSUB      packet parser per subnetwork port
└── tan_client  × NSUB·CLIENTS_PER_SUBNET     test head
    ├── tan_frame_rx                 packet parser
    ├── tan_client_ctrl              command interpreter, compare, verdict
    ├── tan_pattern_buffer × 2       pattern buffer and response buffer
    ├── tan_dut_ctrl                 applies patterns to the DUT pins
    └── tan_frame_tx                 packet wrapper for the verdict frames
tan_pkg                              header struct, command codes, helpers
```

Outside the RTL (ports of `tan_top`): one Ethernet switch per subnetwork, the
MAC/PHY of every node, the pattern generator, the ATE control software and the
DUTs.

## The TAN frame

A TAN frame is the payload of an Ethernet frame. Every stream in this design
carries exactly that payload, one byte per clock, most significant byte of each
field first:

| bytes | field | meaning |
|---|---|---|
| 0–1 | destination | 16-bit address; `FFFF` = broadcast |
| 2–3 | source | 16-bit address |
| 4 | CMD | command, see below |
| 5–6 | number of patterns | patterns in this frame's payload |
| 7 | pattern length | bits per pattern, 1–255; 0 means 256 |
| 8… | payload | the patterns (or expected / captured responses) |

The 8-byte header leaves at most 1492 payload bytes in a 1500-byte Ethernet
payload. Each pattern occupies `ceil(len/8)` bytes, least significant byte first,
and a frame carries whole patterns only, so one frame holds at most
`floor(1492 / ceil(len/8))` patterns (46 patterns of 256 bits, 59 of 200 bits).
Longer pattern sets are split over several frames. Frames shorter than the
Ethernet minimum of 46 bytes are padded with zeros by the wrapper; the parser
ignores everything after the declared payload.

Addresses: the server is 0; test head `k` (`k = s·CLIENTS_PER_SUBNET + c`, head
`c` of subnetwork `s`) is `k+1`.

| CMD | code | sent by | meaning here |
|---|---|---|---|
| RST | 01 | server, broadcast | new batch: heads clear everything, including isolation |
| SYN | 02 | server, broadcast | new test sequence: heads clear the sequence; isolated heads ignore it |
| BRP | 10 | server, broadcast | patterns, appended to the heads' pattern buffers |
| BRS | 11 | server, broadcast | expected responses, compared on arrival |
| PAS | 20 | head → server | all responses matched |
| FAI | 21 | head → server | a response differed; payload = all captured responses |
| ERR | 22 | head → server | the head could not judge (see below) |
| STP | 30 | server → one head | isolate: the head ignores everything but RST and sends nothing |
| ALR | 31 | server → one head | "you did not answer": the head repeats its verdict, or sends ERR |

The command names come from the TAN protocol; the numeric codes, the broadcast
address and the byte order are this implementation's choices.

## A test session (`tan_subnet_ctrl`)

Each subnetwork runs its own session; `start[s]` begins one.

1. Broadcast `RST`. All heads of the subnetwork are marked active.
2. Broadcast the sequence's patterns in as many `BRP` frames as needed.
3. Wait `patterns × TEST_CYCLES + WAIT_MARGIN` clocks. Test heads start applying
   patterns as soon as the first `BRP` frame has arrived, one every `TEST_CYCLES`
   clocks, so this is the predicted time for the last one to finish. During the
   wait the subnetwork does not request the wrapper, and the arbiter gives it to
   other subnetworks.
4. Broadcast the expected responses in `BRS` frames, then collect verdicts. The
   collection ends when every active head has answered, or when `RESP_TIMEOUT`
   clocks pass without any answer arriving (the timer restarts on each answer).
5. Send `STP` to every head that answered `FAI`; it leaves the session.
   Then, for each active head that did not answer, send `ALR` and wait up to
   `RESP_TIMEOUT` clocks:
   * `PAS` — the head stays;
   * `FAI` — `STP`, the head leaves;
   * `ERR` — the head stays and is flagged in `err_mask`;
   * silence — the head is isolated without a frame (forced isolation).
6. If more sequences remain (`prog_nseq`), broadcast `SYN` and go to 2 with the
   next sequence; otherwise the session is done: `done[s]` is high and
   `pass_mask[s]` holds the heads that passed every sequence.

A head answering `ERR` is kept in the session, so `pass_mask` does not by itself
mean "verified": check `err_mask` too.

## The test head (`tan_client`)

**Buffers.** The pattern buffer and the response buffer hold one 256-bit entry
per pattern (`PAT_DEPTH` = 1024 entries each). `BRP` bytes are written straight
into the pattern buffer with byte enables; the patterns of a sequence are
appended frame after frame, and `avail` counts them once each frame has ended.

**Application (`tan_dut_ctrl`).** Pattern `i` is driven on `dut_pi[len-1:0]`
(higher pins low) for `TEST_CYCLES` clocks. The response on `dut_po` is sampled
on the last of those clocks, masked to the pattern length, and written to entry
`i` of the response buffer. The next pattern is read while the current one is
applied, so back-to-back patterns change the pins every `TEST_CYCLES` clocks.
`TEST_CYCLES` must be at least 2.

**Compare (`tan_client_ctrl`).** A `BRS` byte for pattern `p` is compared with
byte `p` of the response buffer one clock after it arrives; nothing from `BRS`
is stored. Once the `BRS` frames have covered every buffered pattern, the
verdict is sent:

* `ERR` if an expected response arrived for a pattern not yet applied, if `BRP`
  data overflowed the buffer, if a `BRP`/`BRS` frame was cut short, or if there
  were no patterns;
* else `FAI` if any byte differed — followed by every captured response, split
  into frames of whole patterns;
* else `PAS` (a header-only frame, padded to 46 bytes).

`ALR` repeats the last verdict, or sends `ERR` if the head has none (for example
because it never received the `BRS` frames).

**Response-buffer sharing.** The response buffer has one read port. The wrapper
uses it while it sends a `FAI` payload and the comparator uses it otherwise; the
server never sends `BRS` while a head is still answering the previous one.

## The server (`tan_server`)

All subnetwork controllers share one `tan_frame_tx`. `tan_tdm_arbiter` grants it
one whole frame at a time, round-robin among the controllers that have a frame
to send; the wrapper's byte stream appears only on the granted subnetwork's
`tx_*` port. The payload is read from the pattern generator through `pg_*`:
the server presents `pg_sub`, `pg_seq`, `pg_pat`, `pg_byte` and `pg_exp` (0 =
pattern, 1 = expected response) with `pg_rd_en`, and expects the byte on
`pg_data` one clock later.

Each subnetwork port has its own parser. Headers go to the controller; the
payload of `FAI` frames goes to `log_*` with the source address and the
pattern's index in the sequence. A head's `FAI` frames can be interleaved with
other heads' frames by the switch, so the server keeps a per-head pattern count
for the log; the counts restart when the next `BRS` is sent.

The test program is read per subnetwork: controller `s` shows the sequence it
needs on `prog_seq_idx[s]` and expects that sequence's pattern count and length
on `prog_npat[s]` / `prog_plen[s]`; `prog_nseq` is the number of sequences.

## Interfaces and timing

* **Streams.** `tx_valid/tx_ready/tx_data/tx_last` out of every wrapper (valid
  stays high until accepted). `rx_valid/rx_data/rx_last` into every parser,
  without back-pressure, as a MAC receive path delivers them. One byte per
  clock; at 12.5 MHz this matches the 100 Mb/s Ethernet used for the
  performance numbers below.
* **Wrapper latency.** A frame's first byte is valid 3 clocks after `start`; at
  full speed a frame of `n` bytes is done within `n + 3` clocks.
* **Parser latency.** `hdr_valid` one clock after the 8th byte; each payload
  byte one clock after it arrives.
* **Reset.** `rst_n` is asynchronous and active low. Buffer contents are not
  reset; every entry is written before it is read.

## Measured session times

`tb_tan_workload` runs the three ISCAS'89 test sets of the published
evaluation through the default network: 64 heads, 58 of them with good DUTs,
test data cut into 256-bit patterns, one byte per clock on every link
(100 Mb/s at 12.5 MHz), `TEST_CYCLES` = 4. Each set is one session on both
subnetworks at once, including RST, the failing heads' full FAI response sets
and their STP.

| test set | bits | patterns | clocks per session | at 100 Mb/s | 64 DUTs one after another, bits only |
|---|---|---|---|---|---|
| s13207 | 165,672 | 648 | 152,005 | 12.2 ms | 106 ms |
| s38584 | 199,376 | 779 | 179,574 | 14.4 ms | 128 ms |
| s35932 | 28,240 | 111 | 27,229 | 2.2 ms | 18 ms |

The last column is the time to move the test data of 64 DUTs over the same
link one DUT at a time, without any protocol overhead. The session time
includes the FAI answers: each failing head sends back its whole response set
(for s13207, 648 x 32 bytes), and the three failing heads of a subnetwork
answer one after another over that subnetwork's link.

The same testbench runs the two sweeps of the published analysis at N = 64,
where k is the test data per frame in units of the 368-bit minimum frame
(k * 368 bits of test data per DUT), and prints the time of the published
model t = (H + k*Fmin) * (1 + N + k*(3 + N - Y)) / (T*k) next to the
measured one (H = Fmin = 368 bits, T = 100 Mb/s, Y good DUTs):

| k | good DUTs Y | patterns | measured | model |
|---|---|---|---|---|
| 2 | 58 | 3 | 0.22 ms | 0.46 ms |
| 4 | 58 | 6 | 0.26 ms | 0.47 ms |
| 11 | 58 | 16 | 0.43 ms | 0.66 ms |
| 22 | 58 | 32 | 0.72 ms | 1.01 ms |
| 32 | 58 | 46 | 0.98 ms | 1.34 ms |
| 22 | 64 | 32 | 0.55 ms | 0.50 ms |
| 22 | 48 | 32 | 1.13 ms | 1.86 ms |
| 22 | 32 | 32 | 1.82 ms | 3.21 ms |

Both show the same trends: the time per DUT falls as k grows, and it rises
quickly as the yield drops, because every failing DUT sends its responses
back one at a time. The model treats all traffic as one serial link,
while here the two subnetworks each have their own link and run at the same
time, which explains at least part of the gap when DUTs fail. With all DUTs
good the measured time is slightly above the model, since it also contains
the pattern application time and the server's wait margin. k = 1 is left out: its two patterns do not
expose the stuck pin of the test DUT.

## Parameters (`tan_top`)

| parameter | default | meaning |
|---|---|---|
| `NSUB` | 2 | subnetworks, each behind one switch |
| `CLIENTS_PER_SUBNET` | 32 | test heads per subnetwork (64 heads in all) |
| `PAT_DEPTH` | 1024 | patterns one head can hold per sequence |
| `TEST_CYCLES` | 4 | clocks per applied pattern (≥ 2) |
| `WAIT_MARGIN` | 256 | clocks added to the predicted application time |
| `RESP_TIMEOUT` | 8192 | clocks of silence before the server gives up on an answer |

Fixed in `tan_pkg`: 256-bit maximum pattern length, 46-byte minimum frame,
1492-byte maximum payload.

64 heads matches the 64 chips of the published evaluation. A 1024 × 256-bit
buffer holds 262,144 bits, enough for the largest of the ISCAS'89 test sets used
there (s38584: 199,376 bits, i.e. 779 patterns of 256 bits). The other sizes,
timeouts and the pin mapping are this design's own choices.

## Where this design departs from, or adds to, the protocol

* Command codes, the broadcast address, the byte order, the packing of a
  pattern into whole bytes and the 0 = 256 length encoding are choices made here.
* The protocol does not say how a head knows that the last `BRS` frame has
  arrived; here the verdict is sent when the `BRS` frames have covered all
  buffered patterns.
* `FAI` carries the captured responses, following the protocol's own traffic
  estimate (a failing head returns its whole response set); `PAS` and `ERR` are
  header-only.
* The protocol leaves open what the server does after an `ERR`; here the head
  stays in the session and is flagged. A head silent after `ALR` is isolated
  without a frame, so it may keep answering later sequences; the server ignores
  those answers.
* No `SYN` follows the last sequence of a session.
* The `ALR` round is sequential: one head at a time, each with its own timeout.
* The TDM slot is one frame.

## Simulation

Every module has a self-checking testbench in `tb/` that ends with a line
`TB_RESULT checks=N failures=M`. Behavioural models used by the testbenches:
`tan_switch_model` (store-and-forward switch with fault injection),
`tan_dut_model` (a combinational DUT with an optional stuck-at-1 output pin) and
`tan_pattern_gen_model`; `tb_tan_pkg` holds the reference pattern and response
functions.

| testbench | what it exercises |
|---|---|
| `tb_tan_top` | the whole network at the default sizes: two sessions, two sequences, a faulty DUT on each subnetwork, a DUT that turns faulty in sequence 2, a lost answer (`ALR` → `PAS`), a head that never answers (forced isolation), a head that never sees `BRS` (`ALR` → `ERR`), multi-frame `BRP`/`BRS`/`FAI`, padding, TDM interleaving, the predicted wait, and `RST` of a new batch |
| `tb_tan_workload` | the three ISCAS'89 test sets of the evaluation, each run as a session on all 64 heads with about 90 % of the DUTs good; then the test-data-size sweep (k = 2 to 32) and the yield sweep (64 down to 32 good DUTs) at N = 64; prints the clocks each session takes next to the published analytic model |
| `tb_tan_server` | server with 2 × 2 clients played by the testbench: payloads, frame order, TDM, failure log |
| `tb_tan_subnet_ctrl` | frame sequence, predicted wait, `STP`/`ALR`/`ERR`/forced isolation, masks |
| `tb_tan_tdm_arbiter` | one-hot grants, one frame at a time, round-robin order |
| `tb_tan_client` | a head at frame level: `PAS`, `FAI` with payload, `ALR`, `STP`/`RST`, late `BRS`, overflow |
| `tb_tan_client_ctrl` | the command interpreter alone |
| `tb_tan_frame_tx`, `tb_tan_frame_rx` | wrapper and parser byte for byte, padding, short frames, address filter |
| `tb_tan_pattern_buffer`, `tb_tan_dut_ctrl` | buffer with byte enables; pattern application and its timing |

To run one with Verilator 5 from the repository root:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/tan_pkg.sv tb/tb_tan_pkg.sv tb/tb_tan_top.sv --top-module tb_tan_top
./obj_dir/Vtb_tan_top
```

Replace `tb_tan_top` by any testbench name. The full-network test takes about a
second; the workload test somewhat longer.

## Limits

* No Ethernet MAC, PHY or switch: the RTL ends at the MAC client byte stream.
  A real deployment must map TAN addresses to MAC addresses (the switch model
  routes on the TAN destination directly).
* No error detection beyond frame length; the Ethernet CRC is the MAC's job.
* Patterns are applied to the pins in parallel, one pattern per `TEST_CYCLES`
  clocks; a DUT that needs scan shifting would need a different `tan_dut_ctrl`.
* `PAT_DEPTH` bounds the patterns of one sequence; longer tests must be split
  into several sequences.
