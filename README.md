# HiFP2.0 audio fingerprinting engine

HiFP2.0 reduces a song to a compact fingerprint using nothing but integer
additions, halvings and comparisons. A song of 131,072 16-bit PCM samples
becomes a 4096-bit fingerprint (FPID), one bit per 32-sample frame: the bit
says whether the low-frequency content of the signal falls or rises from that
frame to the next. Because there is no Fourier transform and no floating
point, the work per sample is tiny and the algorithm is limited mainly by how
fast samples can be moved.

This RTL implements the engine the way an OpenCL ND-range kernel for it is
organised: one *work-group* per song, a row of *work-item lanes* that each
handle a contiguous chunk of frames, a *local memory* shared by the lanes,
a *barrier* between the two halves of the algorithm, and a final copy of the
group's fingerprint into global memory. The default build has 512 lanes,
the work-group size that gave the best throughput for this kernel on an
FPGA, and one launch processes any number of songs (50 was the best
configuration measured).

## The algorithm, exactly

For song `s` with samples `x[0..131071]` (signed 16 bit):

1. **Haar low band.** For frame `f = 0..4095`, take the first eight samples
   of the frame, `w[i] = x[32f + i]`, `i = 0..7`. Average pairs three times:
   `(w0,w1) (w2,w3) (w4,w5) (w6,w7)` → 4 values → 2 values → 1 value
   `d[f]`. Every average is `(a+b)/2` in integer arithmetic. The other 24
   samples of the frame are not used.
2. **Padding.** `d[4096] = 0`.
3. **Feature extraction.** `FPID[f] = 1` if `d[f] > d[f+1]`, else `0`.

Three points are easy to get wrong and are fixed here as follows:

* **Rounding.** Samples are signed and `(a+b)/2` truncates toward zero, as C
  integer division does (`(-3 + 0)/2 = -1`, not `-2`). The sum is formed on 17
  bits, so no level can overflow and each average fits back into 16 bits. With
  `SIGNED_SAMPLES = 0` the samples are treated as unsigned and the halving is
  a plain right shift.
* **Equal neighbours** give `0` (strictly greater is required for a `1`).
* **Last frame.** Frame 4095 is compared with the zero padding, so its bit is
  `1` exactly when `d[4095]` is positive. It is not forced to a constant.

## How the work is divided

`GROUP_SIZE` lanes share the 4096 frames of a song. Lane `l` owns the
contiguous frames `l*CHUNK .. l*CHUNK + CHUNK - 1`, with
`CHUNK = FRAMES / GROUP_SIZE`:

| GROUP_SIZE (lanes) | CHUNK (frames per lane) |
|---:|---:|
| 4096 | 1 |
| 1024 | 4 |
| 512 (default) | 8 |
| 64 | 64 |
| 1 | 4096 |

All lanes work in lock-step on the same chunk position, so one clock moves
one frame forward in every lane. `GROUP_SIZE = FRAMES` is the fully parallel
arrangement (every frame has its own averaging tree); `GROUP_SIZE = 1` is the
sequential one.

## One song through the compute unit

`hifp_wg_ctrl` steps each song (work-group) through four phases:

| phase | what happens | clocks (one-clock memory, no stalls) |
|---|---|---|
| LOAD | `CHUNK` read requests; in each, every lane asks for the 8 samples of one of its frames | `CHUNK` |
| BARRIER | wait for the last read to return and pass through the 3-stage DWT into local memory | memory latency + 3 |
| EXTRACT | `CHUNK` comparison steps, each producing one bit per lane into `sub_fpid`; one more clock for the registered result | `CHUNK` + 1 |
| MERGE | `sub_fpid` leaves as `FRAMES/FPID_WORD` words | `FRAMES/FPID_WORD` + 2 |

Per song this adds up to `2*CHUNK + L + 6 + FRAMES/FPID_WORD` clocks, where
`L` is the read latency; a launch of `N` songs takes `1 + N*(...)` clocks from
the `start` pulse to the `done` pulse. At the default size with `L = 1` that
is 31 clocks per song and 1551 clocks for 50 songs. The Haar tree takes three
clocks (one per averaging level) and the comparison one clock, which is the
cycle budget of an ideal FPGA mapping of the algorithm. Stalls on either
memory port simply stretch LOAD or MERGE.

Songs are processed strictly one after another by a single compute unit; the
next song's LOAD starts after the previous song's MERGE has finished.

### The barrier and local memory

Feature extraction for the last frame of lane `l` needs the first frame of
lane `l+1`, so no comparison may start before every lane has written its
whole chunk. The controller counts DWT results written into
`hifp_local_mem` and moves to EXTRACT only when `CHUNK` of them have arrived.

`hifp_local_mem` holds `dwt_wave[0..4096]`. It is split into one
`CHUNK`-word bank per lane. A write stores one word per lane at the same chunk
position. A read returns, per lane, the word at the requested position and
the word after it. At the end of a chunk, "the word after it" comes from the
next lane's bank, or for the last lane from the zero padding. The padding
word is a constant, not storage. At the default size the local state is
4096 × 16 bits of DWT values plus 4096 bits of `sub_fpid`, 8.5 KiB in total,
within a typical 16 KiB OpenCL local memory.

## Interfaces of the top, `hifp_ndrange_kernel`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset of the control state |
| `start` | in | 1 | one-clock launch pulse, ignored while `busy` |
| `num_groups` | in | `NG_W` (16) | songs in this launch; 0 finishes at once |
| `busy` / `done` | out | 1 | launch running / one-clock pulse at the end |
| `wave_rd_req` / `wave_rd_ready` | out / in | 1 | read request for all lanes, taken when both are high |
| `wave_rd_addr` | out | `ADDR_W` × `GROUP_SIZE` | per lane, sample address of its frame's first sample: `song*131072 + frame*32` |
| `wave_rd_valid` | in | 1 | read data for all lanes, returned in request order, any latency |
| `wave_rd_data` | in | 16 × `GROUP_SIZE` × 8 | the 8 samples per lane |
| `fpid_wr_valid` / `fpid_wr_ready` | out / in | 1 | fingerprint word handshake |
| `fpid_wr_addr` | out | `ADDR_W` | word address `song*FRAMES/FPID_WORD + word` |
| `fpid_wr_data` | out | `FPID_WORD` (512) | bit `k` is frame `word*FPID_WORD + k` of that song |

Global memory itself (the song store and the fingerprint store) is not part
of the design. Note the width of the read port: at the default size one
request carries 512 × 8 × 16 = 65,536 bits. A real board memory delivers far
less per clock, so a practical system would put a buffering/widening stage
in front of this port; the datapath itself does not care how long the data
takes.

## Parameters

| parameter | default | notes |
|---|---:|---|
| `FRAMES` | 4096 | frames (FPID bits) per song |
| `GROUP_SIZE` | 512 | lanes; must divide `FRAMES` |
| `SAMPLES_PER_FRAME` | 32 | address stride of frames; only the first 8 are read |
| `SAMPLE_W` | 16 | sample width |
| `SIGNED_SAMPLES` | 1 | signed samples with truncating halving; 0 = unsigned |
| `FPID_WORD` | 512 | bits per fingerprint write; must divide `FRAMES` |
| `ADDR_W` | 32 | address width of both memory ports |
| `NG_W` | 16 | width of `num_groups` |

`FRAMES`, `GROUP_SIZE`, `SAMPLES_PER_FRAME`, the 8-sample Haar tree and the
16-bit samples are the algorithm's own numbers. `FPID_WORD`, `ADDR_W`, `NG_W`,
the signedness rule and all handshakes are choices of this implementation.

## Modules

| file | role |
|---|---|
| `rtl/hifp_pkg.sv` | shared constants and the phase enum |
| `rtl/hifp_dwt.sv` | 8-to-1 Haar low band, three pipeline stages, with a tag carried along |
| `rtl/hifp_local_mem.sv` | per-lane banks of DWT values, current/next read per lane, zero padding |
| `rtl/hifp_feature_extract.sv` | one comparator per lane, registered |
| `rtl/hifp_fpid_merge.sv` | `sub_fpid` bit buffer and the word-by-word copy to global memory |
| `rtl/hifp_wg_ctrl.sv` | per-song phase sequencer, song offsets, barrier |
| `rtl/hifp_ndrange_kernel.sv` | top: the lanes' address generators and DWT pipelines, and the blocks above |

## Where this departs from the original implementation

The original engine was written as an OpenCL kernel and turned into hardware
by a vendor compiler, so its actual circuit is unknown. What is taken from it
is the algorithm, the division into work-groups and work-items, the local
buffers, the barrier, the song and fingerprint offsets, and the 512-lane,
multi-song configuration. Everything below is this design's own:

* Each work-item is a physical lane and all lanes advance together.
* Songs are not overlapped: one song's MERGE finishes before the next LOAD.
* The fingerprint is packed one bit per frame; the original moved each frame
  as a 16-bit value.
* The memory ports, their handshakes, and the start/done protocol.
* Rounding, ties and the last frame follow the rules above. An earlier RTL
  version of this algorithm forced the last bit to 0 and used unsigned
  samples; `SIGNED_SAMPLES = 0` reproduces the unsigned reading, but not the
  forced last bit.

The host side (reading WAV files, launching the kernel), the board memory and
the PCIe transfers are not included.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. Stimulus comes from
`tb/hifp_tb_pkg.sv`. It computes every sample from its address by a hash. A
song mixes silence (which gives equal neighbours), full-scale ±32767/−32768
stretches (which test the averaging range), slow ramps and noise. The
reference is written with plain C-style `int` arithmetic. `tb/hifp_tb_gmem.sv`
models global memory: in-order reads with random latency and random
`ready` stalls, and a store for fingerprint words.

| testbench | what it covers |
|---|---|
| `tb_hifp_dwt` | 2000+ vectors incl. rounding edge cases; exact 3-clock latency and tag; signed and unsigned builds |
| `tb_hifp_feature_extract` | ties, extremes, random; exact 1-clock latency; signed and unsigned builds |
| `tb_hifp_local_mem` | random write order, cross-lane next word, zero padding |
| `tb_hifp_fpid_merge` | word order and addresses under write stalls; one word per clock without stalls |
| `tb_hifp_wg_ctrl` | request/response order, barrier, merge ordering, exact clock counts for latencies 1–4 |
| `tb_hifp_ndrange_kernel` | 256-frame songs, 16 lanes: zero-song launch, exact timing, 6 songs under random stalls, re-launch; counts read stalls, write stalls, barrier waits, multi-song launches, ties and padding decisions, and fails if any never occurs |
| `tb_hifp_group_sweep` | the same songs through builds with 1, 8 and 64 lanes; identical fingerprints, clock counts following `2*CHUNK + 7 + WORDS` |
| `tb_hifp_full` | default parameters, one launch of 50 full songs: all 204,800 bits and exactly 1551 clocks |

To run one with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/hifp_pkg.sv tb/hifp_tb_pkg.sv rtl/*.sv tb/hifp_tb_gmem.sv \
  tb/tb_hifp_full.sv --top-module tb_hifp_full -Mdir obj_full
./obj_full/Vtb_hifp_full
```

The full-size build takes about half a minute to compile and a fraction of a
second to run.
