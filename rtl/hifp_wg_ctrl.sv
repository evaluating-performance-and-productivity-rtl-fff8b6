// hifp_wg_ctrl: work-group sequencer of the HiFP2.0 compute unit.
//
// A kernel launch (start with num_groups songs) runs the work-groups one
// after another through one compute unit. For work-group g:
//   LOAD     issues CHUNK read requests, chunk position 0..CHUNK-1, for all
//            lanes at once; the song's first sample is at rd_base = g*SONG_SAMPLES.
//            Read data may return any number of clocks later but in order;
//            resp_idx numbers the responses so the DWT result can be written
//            to the right chunk position.
//   BARRIER  all requests are out; wait until the CHUNK-th DWT result has
//            been written to local memory (the kernel's barrier()).
//   EXTRACT  issue CHUNK feature-extraction steps, one per clock, and wait
//            for the last result to be written into sub_fpid.
//   MERGE    pulse merge_start with merge_base = g*FRAMES/FPID_WORD and wait
//            for merge_done.
// After the last group done pulses for one clock and the unit returns to IDLE.
// A launch with num_groups = 0 finishes at once. start is ignored while busy.
// Timing: LOAD lasts CHUNK clocks without stalls, BARRIER ends in the clock of
// the last DWT write, EXTRACT lasts CHUNK + 1 clocks and MERGE ends one clock
// after merge_done; the controller itself adds no other waiting clocks.
//
// The per-work-group steps, chunk_size = FRAMES/GROUP_SIZE, the barrier and
// the group offsets follow the algorithm; running the groups strictly one
// after another on one unit and the request/response numbering are this
// implementation's choices.
module hifp_wg_ctrl
#(
  parameter int unsigned FRAMES            = hifp_pkg::FRAMES,
  parameter int unsigned LANES             = 512,
  parameter int unsigned SAMPLES_PER_FRAME = hifp_pkg::SAMPLES_PER_FRAME,
  parameter int unsigned FPID_WORD         = 512,
  parameter int unsigned ADDR_W            = 32,
  parameter int unsigned NG_W              = 16,
  parameter int unsigned CHUNK             = FRAMES / LANES,
  parameter int unsigned IDX_W             = (CHUNK > 1) ? $clog2(CHUNK) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // launch
  input  logic              start,
  input  logic [NG_W-1:0]   num_groups,
  output logic              busy,
  output logic              done,
  output hifp_pkg::phase_e            phase,
  output logic [NG_W-1:0]   group,
  // load requests
  output logic              rd_req,
  input  logic              rd_ready,
  output logic [IDX_W-1:0]  rd_iter,
  output logic [ADDR_W-1:0] rd_base,
  // load responses
  input  logic              rd_valid,
  output logic [IDX_W-1:0]  resp_idx,
  // DWT results written to local memory
  input  logic              dwt_wr,
  // feature extraction
  output logic              fe_valid,
  output logic [IDX_W-1:0]  fe_idx,
  input  logic              fe_wr,
  // merge
  output logic              merge_start,
  output logic [ADDR_W-1:0] merge_base,
  input  logic              merge_done
);

  localparam int unsigned CNT_W = IDX_W + 1;
  localparam int unsigned SONG_SAMPLES = FRAMES * SAMPLES_PER_FRAME;
  localparam int unsigned WORDS = FRAMES / FPID_WORD;

  logic [NG_W-1:0]  n_groups;
  logic [CNT_W-1:0] iss_cnt;   // load requests accepted
  logic [CNT_W-1:0] rsp_cnt;   // load responses seen
  logic [CNT_W-1:0] dwt_cnt;   // DWT results written
  logic [CNT_W-1:0] fe_cnt;    // feature extraction steps issued
  logic [CNT_W-1:0] few_cnt;   // feature extraction results written

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase       <= hifp_pkg::PH_IDLE;
      n_groups    <= '0;
      group       <= '0;
      iss_cnt     <= '0;
      rsp_cnt     <= '0;
      dwt_cnt     <= '0;
      fe_cnt      <= '0;
      few_cnt     <= '0;
      done        <= 1'b0;
      merge_start <= 1'b0;
    end else begin
      done        <= 1'b0;
      merge_start <= 1'b0;
      if (rd_valid) rsp_cnt <= rsp_cnt + 1'b1;
      if (dwt_wr)   dwt_cnt <= dwt_cnt + 1'b1;
      if (fe_wr)    few_cnt <= few_cnt + 1'b1;
      unique case (phase)
        hifp_pkg::PH_IDLE: begin
          if (start) begin
            n_groups <= num_groups;
            group    <= '0;
            iss_cnt  <= '0;
            rsp_cnt  <= '0;
            dwt_cnt  <= '0;
            if (num_groups == '0) done  <= 1'b1;
            else                  phase <= hifp_pkg::PH_LOAD;
          end
        end
        hifp_pkg::PH_LOAD: begin
          if (rd_ready) begin
            iss_cnt <= iss_cnt + 1'b1;
            if (int'(iss_cnt) == CHUNK - 1) phase <= hifp_pkg::PH_BARRIER;
          end
        end
        hifp_pkg::PH_BARRIER: begin
          if (dwt_wr && int'(dwt_cnt) == CHUNK - 1) begin
            phase   <= hifp_pkg::PH_EXTRACT;
            fe_cnt  <= '0;
            few_cnt <= '0;
          end
        end
        hifp_pkg::PH_EXTRACT: begin
          if (int'(fe_cnt) < CHUNK) fe_cnt <= fe_cnt + 1'b1;
          if (fe_wr && int'(few_cnt) == CHUNK - 1) begin
            phase       <= hifp_pkg::PH_MERGE;
            merge_start <= 1'b1;
          end
        end
        hifp_pkg::PH_MERGE: begin
          if (merge_done) begin
            if (group + 1'b1 == n_groups) begin
              phase <= hifp_pkg::PH_IDLE;
              done  <= 1'b1;
            end else begin
              phase   <= hifp_pkg::PH_LOAD;
              group   <= group + 1'b1;
              iss_cnt <= '0;
              rsp_cnt <= '0;
              dwt_cnt <= '0;
            end
          end
        end
        default: phase <= hifp_pkg::PH_IDLE;
      endcase
    end
  end

  assign busy       = (phase != hifp_pkg::PH_IDLE);
  assign rd_req     = (phase == hifp_pkg::PH_LOAD);
  assign rd_iter    = iss_cnt[IDX_W-1:0];
  assign rd_base    = ADDR_W'(group) * ADDR_W'(SONG_SAMPLES);
  assign resp_idx   = rsp_cnt[IDX_W-1:0];
  assign fe_valid   = (phase == hifp_pkg::PH_EXTRACT) && (int'(fe_cnt) < CHUNK);
  assign fe_idx     = fe_cnt[IDX_W-1:0];
  assign merge_base = ADDR_W'(group) * ADDR_W'(WORDS);

  // Responses never outnumber the requests of the current group.
  a_resp: assert property (@(posedge clk) disable iff (!rst_n)
                           rd_valid |-> rsp_cnt < iss_cnt)
    else $error("hifp_wg_ctrl: read response without a request");

endmodule
