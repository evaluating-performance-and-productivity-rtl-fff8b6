// hifp_local_mem: work-group local memory for the DWT samples of one song.
//
// Holds dwt_wave[0..FRAMES], FRAMES+1 samples. Entries 0..FRAMES-1 are written
// by the lanes: lane l owns the contiguous chunk l*CHUNK .. l*CHUNK+CHUNK-1
// (CHUNK = FRAMES/LANES frames per work-item), and one write cycle stores one
// sample per lane at position wr_idx of its chunk. Entry FRAMES is the
// padding sample the algorithm appends after the last frame; it is always
// zero, so it is a constant here rather than a stored word.
//
// The array is split into one CHUNK-word bank per lane, so a lane's write
// and its own reads never go through a FRAMES-wide decoder. Reads are
// combinational: for position rd_idx every lane gets its own sample (rd_cur)
// and the one after it (rd_nxt). For the last position of a chunk the next
// sample is word 0 of the following lane's bank, and for the last lane it is
// the zero padding. Each lane therefore sees a CHUNK-entry (plus one) mux.
//
// The size and the ownership of chunks by work-items follow the algorithm;
// the register-array organisation and the constant padding word are this
// implementation's choices. The array has no reset: every word is written
// before it is read.
module hifp_local_mem
#(
  parameter int unsigned FRAMES   = hifp_pkg::FRAMES,
  parameter int unsigned LANES    = 512,
  parameter int unsigned SAMPLE_W = hifp_pkg::SAMPLE_W,
  parameter int unsigned CHUNK    = FRAMES / LANES,
  parameter int unsigned IDX_W    = (CHUNK > 1) ? $clog2(CHUNK) : 1
) (
  input  logic                clk,
  input  logic                wr_en,
  input  logic [IDX_W-1:0]    wr_idx,
  input  logic [SAMPLE_W-1:0] wr_data [LANES],
  input  logic [IDX_W-1:0]    rd_idx,
  output logic [SAMPLE_W-1:0] rd_cur  [LANES],
  output logic [SAMPLE_W-1:0] rd_nxt  [LANES]
);

  // Word 0 of every lane's bank, read by the lane before it.
  logic [SAMPLE_W-1:0] head [LANES];

  for (genvar l = 0; l < LANES; l++) begin : g_lane
    // bank[i] is frame l*CHUNK+i.
    logic [SAMPLE_W-1:0] bank [CHUNK];
    logic [IDX_W-1:0]    nxt_idx;
    logic                at_end;

    always_ff @(posedge clk) begin
      if (wr_en && (int'(wr_idx) < CHUNK)) bank[wr_idx] <= wr_data[l];
    end

    assign head[l]  = bank[0];
    assign at_end   = (int'(rd_idx) >= CHUNK - 1);
    assign nxt_idx  = at_end ? '0 : rd_idx + 1'b1;
    assign rd_cur[l] = (int'(rd_idx) < CHUNK) ? bank[rd_idx] : '0;

    if (l + 1 < LANES) begin : g_mid
      assign rd_nxt[l] = at_end ? head[l+1] : bank[nxt_idx];
    end else begin : g_last
      // The sample after the last frame is the zero padding.
      assign rd_nxt[l] = at_end ? '0 : bank[nxt_idx];
    end
  end

endmodule
