# DIG-IF: a request-driven digital front end for a beamforming radio, plus a streaming edge detector

This repository holds synthesizable SystemVerilog for two independent designs.

* **DIG-IF** is the main one. It is the digital interface of a digital-beamforming 5G radio chip. It sits between eight antenna ADC/DAC pairs and a baseband processor. The baseband does not stream samples continuously. Instead it sends *requests* such as "from sample time 1565 on, give me 149 combined samples using filter bank 32 and combiner bank 11". The DIG-IF stores the requests, which may arrive early and in any order. It starts each one at exactly its start time, filters and beam-combines the antenna samples (or, for transmit, filters and splits the baseband's samples onto the antennas), and answers with tagged response packets.
* **conv2d_stream** is a streaming 3×3 image convolution (an edge detector). It takes an 8-bit, 640-pixel-wide image one pixel per clock and keeps the two previous rows in line memories.

`rtl/flow_top.sv` places both side by side. They share only the clock and reset.

## The DIG-IF at a glance

```
 baseband words ──► unpacker ──► request_buffer ──► frame_ctrl ──► act ─┬─► downlink ──► RES ─┐
   (64 bit)           │  │           ▲ ▲                 ▲               │   (filter, combine)  │
                      │  │ SET_TI    │ │ cancel          │ ti            └─► uplink ──► DACs    │
                      │  └────► time_ctrl ───────────────┘                  (filter, split)     │
                      │ coefficient rows ──► banks in downlink/uplink                           │
                      │ transmit samples ──► uplink                                            │
                      └─ ACK/NACK/FAIL/FETCH ────────────────────────────► packer ◄─────────────┘
                                                                              │
                                                                   baseband words out
```

| block | file | job |
|---|---|---|
| packager, in | `unpacker.sv` | decodes words by their 4-bit type into requests, cancellations, time shifts, coefficient rows and transmit samples |
| time control | `time_ctrl.sv` | sample time counter `ti`, with the SET_TI shift |
| request buffer | `request_buffer.sv`, `binary_index_search.sv` | 64-entry request store, free-slot finder, linear search for the next request and for cancellations |
| frame controller | `frame_ctrl.sv` | holds the active request for `ls` sample periods and starts the next one exactly at `ts` |
| downlink | `downlink.sv`, `fir_filter.sv`, `combiner.sv`, `coeff_bank.sv` | 16 FIRs (8 antennas × I/Q), decimation, a blocker outside requests, an 8→4 complex combiner or an uncombined mode, RES header |
| uplink | `uplink.sv`, `fir_filter.sv`, `splitter.sv`, `coeff_bank.sv` | FETCH handshake, 2 FIRs (I/Q), a 1→8 complex splitter to the DACs |
| packager, out | `packer.sv`, `sync_fifo.sv` | merges RES packets and one-word responses onto the output port |
| shared | `digif_pkg.sv`, `sdp_ram.sv` | constants, packet/error enums, request and event structs, a simple dual-port RAM |

### Time base

A divider in `dig_if` makes a *tick* every `DEC` = 2 clocks. `ti` counts ticks, which are sample periods, not clock cycles. The ADCs deliver one sample per antenna per clock. The downlink filters run at that rate and their output is decimated by 2, so each receive request yields one output sample per tick. All `ts`, `ls` and `tis` values are in ticks.

The frame controller acts on a tick. The downlink and uplink see the new active request one cycle later (`frame_tick`). The first data word of a RES leaves the downlink 6 cycles after that.

### Life of a request

1. **Insert.** The unpacker collects the two request words and hands them to the request buffer. The buffer writes the request into the lowest free slot of its 64-entry memory. `binary_index_search` finds that slot in one cycle by repeatedly halving the `occupied` vector. The memory is split in two:
   * The start time, id and frame number of each entry sit in registers, because both searches read them every cycle.
   * The type, bank addresses and length sit in a RAM. The RAM is read one slot ahead of the scan pointer.

   The reply is one of:
   * `ACK`;
   * `NACK(TIMING_OUT_OF_BOUND)` if `ts` is already in the past;
   * `NACK(REQ_MEM_FULL)` if all 64 slots are taken.

   Untimed requests (REQ_UT) get `ts = max(end of the last queued request, ti + 64)`.
2. **Stage.** A scan pointer visits one slot per clock, going round all 64. A request that starts less than 64 ticks ahead is moved into the single *staging register*. If a request with an earlier `ts` is found, it swaps places with the staged one, so the staging register always ends up holding the earliest request. A request must be inserted at least 64 ticks (128 clocks) before its start so that a full scan round is guaranteed to reach it in time.
3. **Start.** On the tick where `ti == stg.ts`, the frame controller makes it the active request (`act`) for `ls` ticks. Error cases:
   * If the previous request is still running, the new one is dropped with `FAIL(OVERLAP)`.
   * If a staged request's time has already passed, it is dropped with `FAIL(TIMING_OUT_OF_BOUND)`.
4. **Serve.** The request type decides the service:
   * **REQ / REQ_UT:** one combined word per tick (4 streams × I/Q × 8 bits), preceded by `RES(id, fn, nb = ls)`.
   * **REQ_UC:** the 8 filtered antennas uncombined, as two words per tick (antennas 0–3, then 4–7, each 6-bit value sign-extended into an 8-bit lane), with `nb = 2·ls`.
   * **REQ_SEND:** `FETCH(id, fn, ls)` is sent at `ts`. The baseband must then send `ls` transmit words. Until they have all arrived, every incoming word is treated as a transmit sample.
5. **Cancel.** `CANCEL_REQ(id)` starts a second linear search, one slot per clock, that also looks at the staging register. It answers `ACK` when the id is found and removed, or `FAIL(ID_NOT_FOUND)` after 64 clocks. The cancel search starts half the memory away from the staging scan and moves at the same speed, so the two never meet and staging goes on during a cancel. A request that the staging scan moves into the staging register is caught there. A request moved out of the staging register lands behind the staging scan, where the cancel search reaches it first. While the search runs, `bb_in_ready` is low. A request that is already active cannot be cancelled.

### Baseband word format

All words are 64 bits. The type sits in bits [63:60].

| code | packet | words |
|---|---|---|
| 1 | REQ | w0 = {type, –, id[55:40], fn[39:24], –, filter bank[15:8], combiner bank[7:0]}; w1 = {ts[63:32], ls[31:0]} |
| 2 | REQ_UC | as REQ; the combiner bank is ignored |
| 3 | REQ_UT | as REQ; ts is ignored |
| 4 | REQ_SEND | as REQ with the uplink filter bank and the splitter bank |
| 5 | CANCEL_REQ | id[55:40] |
| 6 | SET_TI | tis[31:0]: `ti` wraps to 0 on the tick at which it equals `tis` |
| 7–A | SET_DL_FILTER, SET_UL_FILTER, SET_COMBINER, SET_SPLITTER | bank[7:0], then 1, 1, 8 or 2 row words |
| B | RES (out) | {type, err[58:56], id, fn, nb[23:0]}, followed by nb data words |
| C/D/E/F | ACK, NACK, FAIL, FETCH (out) | {type, err[58:56], id, fn, ls[23:0] for FETCH} |
| – | transmit sample (in, during a SEND) | I[5:0], Q[11:6] |

Error codes: 1 OVERLAP, 2 TIMING_OUT_OF_BOUND, 3 REQ_MEM_FULL, 4 ID_NOT_FOUND.

The packer sends stream words (RES header and data) first. Otherwise it sends the oldest one-word response, taking the sources in this order: insert, cancel, frame controller, uplink. After a RES header it holds responses back until all `nb` data words have gone out. As a result a RES packet is never interleaved and the baseband can parse the stream by counting. The output port has no back-pressure. A response lost to a full FIFO sets the sticky `overflow` flag.

### Coefficient banks and number formats

There are 256 banks of each kind (8-bit bank address). Each bank is 1 to 8 rows of 64 bits, held in one `sdp_ram` per row, so a whole bank is read in one cycle. Coefficient *k* sits at bits [k·w +: w]. For complex weights the real part comes first, then the imaginary part.

| | coefficients | format | rows |
|---|---|---|---|
| DL filter | 9 real | signed 4 bits, 4 fraction bits | 1 |
| UL filter | 10 real | signed 4 bits, 4 fraction bits | 1 |
| combiner | 8 × 4 complex (stream s, antenna a at index 8s+a) | unsigned 8 bits, 7 fraction bits | 8 |
| splitter | 8 complex | unsigned 8 bits, 7 fraction bits | 2 |

Samples are signed 6-bit Q1.5 (−1 … 0.96875).

* **FIR:** exact sum, then floor to Q1.5, then saturate to 6 bits.
* **Combiner:** each complex product is floored to a 10-bit value with 6 fraction bits, and the eight products are summed. The sum is floored to 3 fraction bits and saturated to 8 bits, so the output has 3 fraction bits against the input's 5.
* **Splitter:** each product is floored to 3 fraction bits and saturated to 6 bits.

All rounding is truncation toward −∞.

## The edge detector

`conv2d_stream` computes the true convolution g[n] = Σ K[2−r][2−c] · x[n − r·WIDTH − c] with the kernel

```
 1  1  0
 1  0 -1
 0 -1 -1
```

The result appears one clock after each pixel is taken. Two `line_delay` RAM ring buffers of WIDTH−1 pixels, each with a registered output, supply the pixel exactly one and two rows back. Short shift registers then give all nine window pixels in parallel.

The window does not stop at the image borders. At a row start it wraps to the end of the previous row, and the first two rows of an image use whatever the line memories still hold from before, because the memories are never cleared. The output is a signed 15-bit value, not clamped. `KERNEL`, `KH`, `KW`, `CW` and `WIDTH` are parameters.

## Choices made in this design

These points are where the original specification was silent or contradicted itself:

* **Word formats and codes.** The original specification only names the packets and the type-identifier idea. Every bit position and type code above is this design's own.
* **Time base.** `ti` counts sample periods (ticks), not clock cycles. Counting clocks would make `nb = ls` impossible at a decimation of 2.
* **SET_TI.** It implements "wrap to 0 when `ti` equals `tis`". One description elsewhere calls the shift "adding an amount of time"; that reading was not followed.
* **Field widths.** Bank addresses are 8 bits, not the 64 that one constant table lists. Filter coefficients are signed. The uplink filter has 10 taps. The combiner output is 8 bits wide (one description mentions 6).
* **Packer.** The FIFO depths, the response priority and the whole-packet rule are this design's own.
* **REQ_UT start time.** The `max(last end, ti+64)` rule is this design's own; the original does not say when an untimed request starts.
* **Stale requests.** A staged request whose time has passed is answered with `FAIL(TIMING_OUT_OF_BOUND)`.
* **ADC timing.** The ADCs deliver one sample per clock. The ADCs, DACs and the baseband are outside the design: their signals are top-level ports.

## Known limitations

* REQ_UC needs `DEC ≥ 2`, because it sends two words per tick.
* The response FIFOs hold 4 words per source. A long RES packet followed by a burst of more than 4 responses from one source will set `overflow`.
* Some request fields are not used by every path, for example `ts` in the uplink and the upper coefficient bits of a filter bank row. Lint tools report these as unused signals.

## Simulation

Every block has a self-checking testbench in `tb/` that prints `TB_RESULT checks=N failures=M`. Run one with plain Verilator, for example:

```
verilator --binary --timing -Irtl rtl/digif_pkg.sv tb/tb_flow_top.sv -y rtl --top-module tb_flow_top
./obj_dir/Vtb_flow_top
```

| testbench | what it covers |
|---|---|
| `tb_flow_top` | Full-size, end to end: loads banks; runs a 13-request schedule (receive, uncombined and send requests, out of order, one cancelled); cancels an unknown id; sends a late request, an untimed request and an overlapping pair; applies a time shift; fills the memory (64 requests, then a 65th); runs a full 640×480 image. Every RES data word, DAC word and pixel is compared with integer models, and each mechanism is counted. About 310k clocks, a few seconds. |
| `tb_dig_if` | the same DIG-IF scenario without the image |
| `tb_downlink`, `tb_uplink` | data paths with random data against integer models, including latency |
| `tb_request_buffer`, `tb_frame_ctrl`, `tb_time_ctrl`, `tb_binary_index_search` | request control |
| `tb_unpacker`, `tb_packer`, `tb_sync_fifo` | packaging |
| `tb_fir_filter`, `tb_combiner`, `tb_splitter`, `tb_coeff_bank`, `tb_sdp_ram` | arithmetic and memories |
| `tb_conv2d_stream`, `tb_line_delay` | edge detector at small widths and with a second kernel |

The testbenches use only `$urandom` and work with a two-state simulator. Every register that gets read is reset; memories are not, and the checks allow for that.
