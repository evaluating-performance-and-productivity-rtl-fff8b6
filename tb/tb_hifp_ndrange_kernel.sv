// tb_hifp_ndrange_kernel: end-to-end test of the HiFP2.0 compute unit at a
// reduced size (256 frames per song, 16 work-item lanes, 64-bit FPID words).
//
// The global memory model returns the sample stream of hifp_tb_pkg and
// collects the FPID words. Launches:
//   1. zero songs: must finish at once and write nothing;
//   2. three songs with no stalls and one-clock memory: every FPID bit and the
//      exact clock count, 1 + songs*(2*CHUNK + 1 + 6 + WORDS);
//   3. six songs with random read/write stalls and read latency 1..4;
//   4. a second launch of two songs after the FPID store has been cleared.
// Every bit is compared with the C-style reference (Haar average of the
// first 8 of every 32 samples, bit = value > next value, zero after the last
// frame). The testbench counts how often each mechanism occurred - read
// stall, write stall, barrier wait, multi-song launch, equal neighbours, the
// zero padding deciding the last bit - and fails if one never did.
module tb_hifp_ndrange_kernel;
  import hifp_tb_pkg::*;

  localparam int FRAMES = 256;
  localparam int GS     = 16;
  localparam int WORD   = 64;
  localparam int CHUNK  = FRAMES / GS;
  localparam int WORDS  = FRAMES / WORD;
  localparam int SONG   = FRAMES * 32;
  localparam int SEED   = 7;

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

  hifp_ndrange_kernel #(.FRAMES(FRAMES), .GROUP_SIZE(GS), .FPID_WORD(WORD)) dut (.*);
  hifp_tb_gmem #(.GROUP_SIZE(GS), .FPID_WORD(WORD), .SEED(SEED)) mem (.*);

  int checks = 0, failures = 0;
  int n_barrier = 0, n_multi = 0, n_ties = 0, n_pad = 0;

  always #5 clk = ~clk;
  always @(posedge clk) if (dut.phase == hifp_pkg::PH_BARRIER) n_barrier++;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("%s", what); end
  endtask

  task automatic launch(int n, output int clocks);
    @(negedge clk);
    start = 1'b1; num_groups = 16'(n);
    @(negedge clk);
    start = 1'b0;
    clocks = 1;
    while (!done && clocks < 100000) begin @(negedge clk); clocks++; end
    check(done, "launch never finished");
    if (n > 1) n_multi++;
  endtask

  task automatic check_songs(int n);
    for (int g = 0; g < n; g++) begin
      int d [FRAMES+1];
      for (int f = 0; f < FRAMES; f++) d[f] = ref_frame(32'(g*SONG), 32'(f), 32, SEED);
      d[FRAMES] = 0;
      if (d[FRAMES-1] != 0) n_pad++;
      for (int w = 0; w < WORDS; w++) begin
        logic [WORD-1:0] want;
        for (int k = 0; k < WORD; k++) begin
          int f = w*WORD + k;
          want[k] = d[f] > d[f+1];
          if (d[f] == d[f+1]) n_ties++;
        end
        if (!mem.fpid_mem.exists(32'(g*WORDS + w))) begin
          failures++; checks++; $display("song %0d word %0d never written", g, w);
        end else begin
          check(mem.fpid_mem[32'(g*WORDS + w)] == want,
                $sformatf("song %0d word %0d: %h want %h", g, w,
                          mem.fpid_mem[32'(g*WORDS + w)], want));
        end
      end
    end
  endtask

  initial begin
    int clocks, w0;
    start = 0; num_groups = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    mem.stalls = 1'b0;
    launch(0, clocks);
    check(clocks == 1 && mem.writes == 0, "empty launch");

    launch(3, clocks);
    check(clocks == 1 + 3 * (2*CHUNK + 1 + 6 + WORDS),
          $sformatf("3 songs took %0d clocks, want %0d", clocks, 1 + 3 * (2*CHUNK + 1 + 6 + WORDS)));
    check(mem.writes == 3 * WORDS, "write count");
    check_songs(3);

    mem.stalls = 1'b1;
    mem.fpid_mem.delete();
    w0 = mem.writes;
    launch(6, clocks);
    check(mem.writes - w0 == 6 * WORDS, "write count with stalls");
    check_songs(6);

    mem.fpid_mem.delete();
    launch(2, clocks);
    check_songs(2);

    $display("mechanisms: read stalls %0d, write stalls %0d, barrier clocks %0d, multi-song launches %0d, ties %0d, padded last frames %0d",
             mem.rd_stalls, mem.wr_stalls, n_barrier, n_multi, n_ties, n_pad);
    check(mem.rd_stalls > 0, "no read stall happened");
    check(mem.wr_stalls > 0, "no write stall happened");
    check(n_barrier > 0,     "no barrier wait happened");
    check(n_multi > 0,       "no multi-song launch happened");
    check(n_ties > 0,        "no equal neighbours happened");
    check(n_pad > 0,         "zero padding never decided a bit");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
