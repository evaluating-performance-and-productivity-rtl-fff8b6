// tb_hifp_group_sweep: the work-group-size sweep on a reduced song.
//
// Songs of 64 frames are fingerprinted by three builds of the compute unit
// with 1, 8 and 64 work-item lanes (64, 8 and 1 frames per work-item): the
// sequential extreme, a middle point and the fully parallel extreme in which
// every frame has its own lane. Each build runs a launch of three songs with
// a one-clock memory; all fingerprints must match the reference, and each
// launch must take 1 + songs*(2*CHUNK + 1 + 6 + WORDS) clocks, so the time
// per song falls as the lane count rises.
module tb_hifp_group_sweep;
  import hifp_tb_pkg::*;

  localparam int FRAMES = 64;
  localparam int WORD   = 16;
  localparam int WORDS  = FRAMES / WORD;
  localparam int SONG   = FRAMES * 32;
  localparam int SONGS  = 3;
  localparam int NCFG   = 3;
  localparam int GSV [NCFG] = '{1, 8, 64};

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0;
  logic [15:0] num_groups = '0;
  logic done_v [NCFG];
  logic finished_v [NCFG] = '{default: 1'b0};
  int   clocks_v [NCFG];

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar c = 0; c < NCFG; c++) begin : g_cfg
    localparam int GS = GSV[c];
    logic              busy, done;
    logic              wave_rd_req, wave_rd_ready, wave_rd_valid;
    logic [31:0]       wave_rd_addr [GS];
    logic [15:0]       wave_rd_data [GS][8];
    logic              fpid_wr_valid, fpid_wr_ready;
    logic [31:0]       fpid_wr_addr;
    logic [WORD-1:0]   fpid_wr_data;

    hifp_ndrange_kernel #(.FRAMES(FRAMES), .GROUP_SIZE(GS), .FPID_WORD(WORD)) dut (
      .clk, .rst_n, .start, .num_groups, .busy, .done,
      .wave_rd_req, .wave_rd_ready, .wave_rd_addr, .wave_rd_valid, .wave_rd_data,
      .fpid_wr_valid, .fpid_wr_ready, .fpid_wr_addr, .fpid_wr_data);
    hifp_tb_gmem #(.GROUP_SIZE(GS), .FPID_WORD(WORD), .SEED(11)) mem (
      .clk, .rst_n,
      .wave_rd_req, .wave_rd_ready, .wave_rd_addr, .wave_rd_valid, .wave_rd_data,
      .fpid_wr_valid, .fpid_wr_ready, .fpid_wr_addr, .fpid_wr_data);

    assign done_v[c] = done;

    // Clocks from the start pulse to done, per build.
    initial begin
      clocks_v[c] = 0;
      @(posedge start);
      @(negedge clk);
      clocks_v[c] = 1;
      while (!done) begin @(negedge clk); clocks_v[c]++; end
      @(negedge clk);
      for (int g = 0; g < SONGS; g++) begin
        int d [FRAMES+1];
        for (int f = 0; f < FRAMES; f++) d[f] = ref_frame(32'(g*SONG), 32'(f), 32, 11);
        d[FRAMES] = 0;
        for (int w = 0; w < WORDS; w++) begin
          logic [WORD-1:0] want;
          for (int k = 0; k < WORD; k++) want[k] = d[w*WORD+k] > d[w*WORD+k+1];
          checks++;
          if (!mem.fpid_mem.exists(32'(g*WORDS + w)) || mem.fpid_mem[32'(g*WORDS + w)] != want) begin
            failures++;
            $display("group size %0d: song %0d word %0d wrong", GS, g, w);
          end
        end
      end
      finished_v[c] = 1'b1;
    end

  end

  initial begin
    int want;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    start = 1'b1; num_groups = 16'(SONGS);
    @(negedge clk);
    start = 1'b0;
    repeat (3000) begin
      @(negedge clk);
      if (finished_v[0] && finished_v[1] && finished_v[2]) break;
    end
    repeat (2) @(negedge clk);
    for (int c = 0; c < NCFG; c++) begin
      want = 1 + SONGS * (2 * (FRAMES / GSV[c]) + 1 + 6 + WORDS);
      checks++;
      if (clocks_v[c] != want) begin
        failures++;
        $display("group size %0d: %0d clocks, want %0d", GSV[c], clocks_v[c], want);
      end else begin
        $display("group size %0d: %0d clocks for %0d songs", GSV[c], clocks_v[c], SONGS);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
