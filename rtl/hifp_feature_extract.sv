// hifp_feature_extract: HiFP2.0 feature extraction for a row of lanes.
//
// Every lane receives one DWT sample (cur) and the sample of the following
// frame (nxt) and produces the fingerprint bit cur > nxt: 1 where the low band
// falls from this frame to the next, 0 where it rises or stays equal. The
// comparison is signed when SIGNED_SAMPLES is set, unsigned otherwise.
//
// Interface: in_valid/in_idx/cur/nxt are taken every clock; out_valid,
// out_idx and out_bits are registered and appear one clock later, which is
// the one-clock cost the algorithm's cycle budget gives this step. in_idx is
// carried along to tell the caller which chunk position the bits belong to.
// The comparison rule follows the algorithm's pseudo-code; the lane
// organisation and the registered output are this implementation's choice.
module hifp_feature_extract
#(
  parameter int unsigned LANES          = 512,
  parameter int unsigned SAMPLE_W       = hifp_pkg::SAMPLE_W,
  parameter bit          SIGNED_SAMPLES = 1'b1,
  parameter int unsigned IDX_W          = 3
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic [IDX_W-1:0]    in_idx,
  input  logic [SAMPLE_W-1:0] cur [LANES],
  input  logic [SAMPLE_W-1:0] nxt [LANES],
  output logic                out_valid,
  output logic [IDX_W-1:0]    out_idx,
  output logic [LANES-1:0]    out_bits
);

  function automatic logic greater(input logic [SAMPLE_W-1:0] a,
                                   input logic [SAMPLE_W-1:0] b);
    if (SIGNED_SAMPLES) return $signed(a) > $signed(b);
    else                return a > b;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

  always_ff @(posedge clk) begin
    out_idx <= in_idx;
    for (int l = 0; l < LANES; l++) out_bits[l] <= greater(cur[l], nxt[l]);
  end

endmodule
