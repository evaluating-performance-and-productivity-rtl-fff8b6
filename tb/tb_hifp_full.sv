// tb_hifp_full: the HiFP2.0 compute unit at its default size - 4096 frames
// (131,072 samples) per song, 512 work-item lanes, 512-bit FPID words - on
// one kernel launch of 50 songs, the work-group count that gave the best
// throughput in the original evaluation.
//
// The memory model answers every read in one clock and never stalls, so the
// launch must take exactly 1 + 50*(2*8 + 1 + 6 + 8) = 1551 clocks. All
// 50*4096 fingerprint bits are compared with the C-style reference.
module tb_hifp_full;
  import hifp_tb_pkg::*;

  localparam int FRAMES = 4096;
  localparam int GS     = 512;
  localparam int WORD   = 512;
  localparam int CHUNK  = FRAMES / GS;
  localparam int WORDS  = FRAMES / WORD;
  localparam int SONG   = FRAMES * 32;
  localparam int SONGS  = 50;
  localparam int SEED   = 3;

  logic              clk = 1'b0;
  logic              rst_n = 1'b0;
  logic              start;
  logic [15:0]       num_groups;
  logic              busy, done;
  logic              wave_rd_req, wave_rd_ready, wave_rd_valid;
  logic [31:0]       wave_rd_addr [GS];
  logic [15:0]       wave_rd_data [GS][8];
  logic              fpid_wr_valid, fpid_wr_ready;
  logic [31:0]       fpid_wr_addr;
  logic [WORD-1:0]   fpid_wr_data;

  hifp_ndrange_kernel dut (.*);
  hifp_tb_gmem #(.GROUP_SIZE(GS), .FPID_WORD(WORD), .SEED(SEED)) mem (.*);

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("%s", what); end
  endtask

  initial begin
    int clocks;
    start = 0; num_groups = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    start = 1'b1; num_groups = 16'(SONGS);
    @(negedge clk);
    start = 1'b0;
    clocks = 1;
    while (!done && clocks < 10000) begin @(negedge clk); clocks++; end
    check(clocks == 1 + SONGS * (2*CHUNK + 1 + 6 + WORDS),
          $sformatf("launch took %0d clocks, want %0d", clocks, 1 + SONGS * (2*CHUNK + 1 + 6 + WORDS)));
    check(mem.writes == SONGS * WORDS, $sformatf("%0d FPID words written", mem.writes));
    for (int g = 0; g < SONGS; g++) begin
      int d [FRAMES+1];
      for (int f = 0; f < FRAMES; f++) d[f] = ref_frame(32'(g*SONG), 32'(f), 32, SEED);
      d[FRAMES] = 0;
      for (int w = 0; w < WORDS; w++) begin
        logic [WORD-1:0] want;
        for (int k = 0; k < WORD; k++) want[k] = d[w*WORD+k] > d[w*WORD+k+1];
        if (!mem.fpid_mem.exists(32'(g*WORDS + w))) check(0, $sformatf("song %0d word %0d missing", g, w));
        else check(mem.fpid_mem[32'(g*WORDS + w)] == want, $sformatf("song %0d word %0d differs", g, w));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
