// hifp_fpid_merge: local sub_fpid buffer and its merge into the global FPID.
//
// During feature extraction the lanes write their fingerprint bits into a
// FRAMES-bit local buffer: lane l owns bits l*CHUNK .. l*CHUNK+CHUNK-1 and one
// write cycle stores bit wr_idx of every lane's chunk. After the last write the
// controller pulses merge_start with the song's base address in the global
// FPID array (group_id * FRAMES / FPID_WORD words). The block then sends the
// buffer as FRAMES/FPID_WORD words of FPID_WORD bits, lowest frames first, on a
// valid/ready write port: out_data bit k of word w is frame w*FPID_WORD+k.
// merge_done pulses in the clock after the last word is accepted.
//
// Timing: with out_ready held high the merge takes one clock per word. While
// out_valid is high and out_ready low, out_addr and out_data are held.
// The local buffer and the copy at group_id*4096 follow the algorithm; the
// word width and the handshake are this implementation's choices.
module hifp_fpid_merge
#(
  parameter int unsigned FRAMES    = hifp_pkg::FRAMES,
  parameter int unsigned LANES     = 512,
  parameter int unsigned FPID_WORD = 512,
  parameter int unsigned ADDR_W    = 32,
  parameter int unsigned CHUNK     = FRAMES / LANES,
  parameter int unsigned IDX_W     = (CHUNK > 1) ? $clog2(CHUNK) : 1,
  parameter int unsigned WORDS     = FRAMES / FPID_WORD
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // lane writes
  input  logic                 wr_en,
  input  logic [IDX_W-1:0]     wr_idx,
  input  logic [LANES-1:0]     wr_bits,
  // merge control
  input  logic                 merge_start,
  input  logic [ADDR_W-1:0]    merge_base,
  output logic                 merge_busy,
  output logic                 merge_done,
  // global FPID write port
  output logic                 out_valid,
  input  logic                 out_ready,
  output logic [ADDR_W-1:0]    out_addr,
  output logic [FPID_WORD-1:0] out_data
);

  localparam int unsigned WCNT_W = (WORDS > 1) ? $clog2(WORDS) : 1;

  logic [FRAMES-1:0] sub_fpid;
  logic [WCNT_W-1:0] word;
  logic [ADDR_W-1:0] base;

  // Lane l's chunk of sub_fpid: bit i is frame l*CHUNK+i.
  for (genvar l = 0; l < LANES; l++) begin : g_lane
    logic [CHUNK-1:0] bits;
    always_ff @(posedge clk) begin
      if (wr_en && (int'(wr_idx) < CHUNK)) bits[wr_idx] <= wr_bits[l];
    end
    assign sub_fpid[l*CHUNK +: CHUNK] = bits;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      merge_busy <= 1'b0;
      merge_done <= 1'b0;
      word       <= '0;
      base       <= '0;
    end else begin
      merge_done <= 1'b0;
      if (!merge_busy) begin
        if (merge_start) begin
          merge_busy <= 1'b1;
          word       <= '0;
          base       <= merge_base;
        end
      end else if (out_ready) begin
        if (int'(word) == WORDS - 1) begin
          merge_busy <= 1'b0;
          merge_done <= 1'b1;
        end else begin
          word <= word + 1'b1;
        end
      end
    end
  end

  assign out_valid = merge_busy;
  assign out_addr  = base + ADDR_W'(word);
  assign out_data  = sub_fpid[int'(word)*FPID_WORD +: FPID_WORD];

  // A write word must stay stable until it is accepted.
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
                           out_valid && !out_ready |=> out_valid && $stable(out_addr))
    else $error("hifp_fpid_merge: write word dropped before acceptance");

endmodule
