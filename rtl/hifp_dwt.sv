// hifp_dwt: three-level Haar wavelet low band of 8 samples, one level per clock.
//
// Level 1 averages the four pairs (w0,w1) (w2,w3) (w4,w5) (w6,w7), level 2 the
// two pairs of those averages, level 3 the last pair, so the output is the
// low-band value that HiFP2.0 keeps for one frame. Each average is (a+b)/2 in
// integer arithmetic: with SIGNED_SAMPLES the sum is a 17-bit signed number and
// the division truncates toward zero, as C integer division does; without it
// the samples are unsigned and the division is a right shift. The average of
// two in-range values is always in range, so no level needs a wider result.
//
// Interface: in_valid/in_tag/in_wave are taken every clock (no back-pressure);
// out_valid/out_tag/out_dwt appear exactly 3 clocks later. The tag rides along
// unchanged so a caller can tell which frame a result belongs to.
// The averaging, its three levels and the three-clock latency follow the
// algorithm's description; the pipeline registers, the tag and the signed
// rounding rule are choices of this implementation.
module hifp_dwt
#(
  parameter int unsigned SAMPLE_W       = hifp_pkg::SAMPLE_W,
  parameter bit          SIGNED_SAMPLES = 1'b1,
  parameter int unsigned TAG_W          = 8
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic [TAG_W-1:0]    in_tag,
  input  logic [SAMPLE_W-1:0] in_wave [hifp_pkg::DWT_TAPS],
  output logic                out_valid,
  output logic [TAG_W-1:0]    out_tag,
  output logic [SAMPLE_W-1:0] out_dwt
);

  // (a+b)/2 with the rounding rule chosen by SIGNED_SAMPLES.
  function automatic logic [SAMPLE_W-1:0] avg2(input logic [SAMPLE_W-1:0] a,
                                               input logic [SAMPLE_W-1:0] b);
    logic [SAMPLE_W:0] sum;
    logic [SAMPLE_W:0] adj;  // bit 0 is dropped by the halving
    if (SIGNED_SAMPLES) begin
      sum = {a[SAMPLE_W-1], a} + {b[SAMPLE_W-1], b};
      // A negative odd sum is rounded toward zero by adding one first.
      adj = sum + {{SAMPLE_W{1'b0}}, sum[SAMPLE_W] & sum[0]};
      return adj[SAMPLE_W:1];
    end else begin
      sum = {1'b0, a} + {1'b0, b};
      return sum[SAMPLE_W:1];
    end
  endfunction

  logic [SAMPLE_W-1:0] lvl1 [4];
  logic [SAMPLE_W-1:0] lvl2 [2];
  logic [2:0]          vld;
  logic [TAG_W-1:0]    tag [3];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vld <= '0;
    end else begin
      vld <= {vld[1:0], in_valid};
    end
  end

  always_ff @(posedge clk) begin
    for (int p = 0; p < 4; p++) lvl1[p] <= avg2(in_wave[2*p], in_wave[2*p+1]);
    for (int p = 0; p < 2; p++) lvl2[p] <= avg2(lvl1[2*p], lvl1[2*p+1]);
    out_dwt <= avg2(lvl2[0], lvl2[1]);
    tag[0]  <= in_tag;
    tag[1]  <= tag[0];
    tag[2]  <= tag[1];
  end

  assign out_valid = vld[2];
  assign out_tag   = tag[2];

endmodule
