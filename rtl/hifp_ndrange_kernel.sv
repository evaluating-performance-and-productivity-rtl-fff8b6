// hifp_ndrange_kernel: HiFP2.0 audio-fingerprint compute unit, organised like
// an OpenCL ND-range kernel with one work-group per song.
//
// A launch processes num_groups songs stored one after another in global
// memory (FRAMES*SAMPLES_PER_FRAME samples each) and writes one
// FRAMES-bit fingerprint per song. The unit has GROUP_SIZE lanes, one per
// work-item. Lane l owns frames l*CHUNK .. l*CHUNK+CHUNK-1, CHUNK = FRAMES /
// GROUP_SIZE (8 at the default 512 lanes). For each song:
//   1. LOAD: in CHUNK request cycles every lane reads the first DWT_TAPS (8)
//      samples of one of its 32-sample frames; the lane's own three-stage Haar
//      pipeline (hifp_dwt) reduces them to one value, which is written to the
//      work-group local memory (hifp_local_mem).
//   2. BARRIER: wait until the last DWT value has been written.
//   3. EXTRACT: in CHUNK cycles every lane compares a frame's value with the
//      next frame's (hifp_feature_extract); the value after the last frame is
//      zero. The bits go to the local sub_fpid buffer (hifp_fpid_merge).
//   4. MERGE: sub_fpid is written to the global FPID array at song*FRAMES bits.
// hifp_wg_ctrl sequences the songs and the phases.
//
// Global memory ports (the memory itself is outside this design):
//   wave read: wave_rd_req/wave_rd_ready handshake with one sample address
//     per lane (wave_rd_addr, in samples); each lane's DWT_TAPS samples return
//     on wave_rd_data with wave_rd_valid, any number of clocks later but in
//     request order, for all lanes in the same clock.
//   FPID write: fpid_wr_valid/fpid_wr_ready, word address fpid_wr_addr in
//     FPID_WORD-bit words, bit k of a word is frame (addr*FPID_WORD+k) of the
//     concatenated fingerprints.
// Timing: with read latency L and no stalls a song takes
//   CHUNK (LOAD) + L + 3 (BARRIER) + CHUNK + 1 (EXTRACT) + FRAMES/FPID_WORD + 2 (MERGE)
// clocks, 31 at the defaults with L = 1, and a launch of N songs takes
// 1 + N*31 clocks from start to done. The DWT adds 3 clocks and feature
// extraction 1 clock, the cycle budget the algorithm gives these steps.
// The algorithm, the partitioning into work-items and work-groups, the local
// buffers and GROUP_SIZE = 512 follow the design being implemented; the port
// protocols, the strictly sequential songs and the signed 16-bit sample
// format (SIGNED_SAMPLES) are this implementation's choices.
module hifp_ndrange_kernel
#(
  parameter int unsigned FRAMES            = hifp_pkg::FRAMES,
  parameter int unsigned GROUP_SIZE        = 512,
  parameter int unsigned SAMPLES_PER_FRAME = hifp_pkg::SAMPLES_PER_FRAME,
  parameter int unsigned SAMPLE_W          = hifp_pkg::SAMPLE_W,
  parameter bit          SIGNED_SAMPLES    = 1'b1,
  parameter int unsigned FPID_WORD         = 512,
  parameter int unsigned ADDR_W            = 32,
  parameter int unsigned NG_W              = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // launch
  input  logic                 start,
  input  logic [NG_W-1:0]      num_groups,
  output logic                 busy,
  output logic                 done,
  // global memory: wave samples
  output logic                 wave_rd_req,
  input  logic                 wave_rd_ready,
  output logic [ADDR_W-1:0]    wave_rd_addr [GROUP_SIZE],
  input  logic                 wave_rd_valid,
  input  logic [SAMPLE_W-1:0]  wave_rd_data [GROUP_SIZE][hifp_pkg::DWT_TAPS],
  // global memory: fingerprint
  output logic                 fpid_wr_valid,
  input  logic                 fpid_wr_ready,
  output logic [ADDR_W-1:0]    fpid_wr_addr,
  output logic [FPID_WORD-1:0] fpid_wr_data
);

  localparam int unsigned CHUNK = FRAMES / GROUP_SIZE;
  localparam int unsigned IDX_W = (CHUNK > 1) ? $clog2(CHUNK) : 1;

  hifp_pkg::phase_e              phase;
  logic [NG_W-1:0]     group;
  logic [IDX_W-1:0]    rd_iter, resp_idx, fe_idx;
  logic [ADDR_W-1:0]   rd_base, merge_base;
  logic                fe_valid, merge_start, merge_busy, merge_done;

  logic                dwt_vld [GROUP_SIZE];
  logic [IDX_W-1:0]    dwt_tag [GROUP_SIZE];
  logic [SAMPLE_W-1:0] dwt_out [GROUP_SIZE];
  logic [SAMPLE_W-1:0] lm_cur  [GROUP_SIZE];
  logic [SAMPLE_W-1:0] lm_nxt  [GROUP_SIZE];
  logic                fe_out_valid;
  logic [IDX_W-1:0]    fe_out_idx;
  logic [GROUP_SIZE-1:0] fe_bits;

  hifp_wg_ctrl #(
    .FRAMES(FRAMES), .LANES(GROUP_SIZE), .SAMPLES_PER_FRAME(SAMPLES_PER_FRAME),
    .FPID_WORD(FPID_WORD), .ADDR_W(ADDR_W), .NG_W(NG_W)
  ) u_ctrl (
    .clk, .rst_n,
    .start, .num_groups, .busy, .done, .phase, .group,
    .rd_req(wave_rd_req), .rd_ready(wave_rd_ready), .rd_iter, .rd_base,
    .rd_valid(wave_rd_valid), .resp_idx,
    .dwt_wr(dwt_vld[0]),
    .fe_valid, .fe_idx, .fe_wr(fe_out_valid),
    .merge_start, .merge_base, .merge_done
  );

  // Work-item lanes: address generation and the Haar DWT.
  for (genvar l = 0; l < GROUP_SIZE; l++) begin : g_lane
    assign wave_rd_addr[l] = rd_base
                           + ADDR_W'((l*CHUNK + int'(rd_iter)) * SAMPLES_PER_FRAME);

    hifp_dwt #(
      .SAMPLE_W(SAMPLE_W), .SIGNED_SAMPLES(SIGNED_SAMPLES), .TAG_W(IDX_W)
    ) u_dwt (
      .clk, .rst_n,
      .in_valid(wave_rd_valid), .in_tag(resp_idx), .in_wave(wave_rd_data[l]),
      .out_valid(dwt_vld[l]), .out_tag(dwt_tag[l]), .out_dwt(dwt_out[l])
    );
  end

  hifp_local_mem #(
    .FRAMES(FRAMES), .LANES(GROUP_SIZE), .SAMPLE_W(SAMPLE_W)
  ) u_local (
    .clk,
    .wr_en(dwt_vld[0]), .wr_idx(dwt_tag[0]), .wr_data(dwt_out),
    .rd_idx(fe_idx), .rd_cur(lm_cur), .rd_nxt(lm_nxt)
  );

  hifp_feature_extract #(
    .LANES(GROUP_SIZE), .SAMPLE_W(SAMPLE_W), .SIGNED_SAMPLES(SIGNED_SAMPLES),
    .IDX_W(IDX_W)
  ) u_fe (
    .clk, .rst_n,
    .in_valid(fe_valid), .in_idx(fe_idx), .cur(lm_cur), .nxt(lm_nxt),
    .out_valid(fe_out_valid), .out_idx(fe_out_idx), .out_bits(fe_bits)
  );

  hifp_fpid_merge #(
    .FRAMES(FRAMES), .LANES(GROUP_SIZE), .FPID_WORD(FPID_WORD), .ADDR_W(ADDR_W)
  ) u_merge (
    .clk, .rst_n,
    .wr_en(fe_out_valid), .wr_idx(fe_out_idx), .wr_bits(fe_bits),
    .merge_start, .merge_base, .merge_busy, .merge_done,
    .out_valid(fpid_wr_valid), .out_ready(fpid_wr_ready),
    .out_addr(fpid_wr_addr), .out_data(fpid_wr_data)
  );

  // A read request may only be raised while a song is being loaded.
  a_req_phase: assert property (@(posedge clk) disable iff (!rst_n)
                                wave_rd_req |-> phase == hifp_pkg::PH_LOAD)
    else $error("hifp_ndrange_kernel: read request outside LOAD");

endmodule
