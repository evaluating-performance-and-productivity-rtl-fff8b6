// tb_hifp_wg_ctrl: self-checking test of the work-group sequencer.
//
// 64 frames over 8 lanes (chunk 8), 16-bit FPID words. The testbench plays
// the rest of the compute unit: an in-order read memory with random latency
// and random rd_ready, a 3-clock DWT delay, a 1-clock feature extraction
// delay and a merge that finishes a random number of clocks after
// merge_start. It checks the order and count of requests and chunk indices,
// the song base addresses, that extraction never starts before the last DWT
// write of the group (the barrier), that merge starts only after the last
// feature bit, one merge per group, and the done pulse. A launch with zero
// groups must finish at once; a launch with no stalls and a one-clock memory
// must take 2*CHUNK + latency + 6 + words clocks per group, plus one clock
// for the done pulse.
module tb_hifp_wg_ctrl;
  localparam int FRAMES = 64;
  localparam int LANES  = 8;
  localparam int CHUNK  = FRAMES / LANES;
  localparam int WORD   = 16;
  localparam int WORDS  = FRAMES / WORD;
  localparam int SONG   = FRAMES * 32;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        start;
  logic [15:0] num_groups;
  logic        busy, done;
  hifp_pkg::phase_e phase;
  logic [15:0] group;
  logic        rd_req, rd_ready;
  logic [2:0]  rd_iter;
  logic [31:0] rd_base;
  logic        rd_valid;
  logic [2:0]  resp_idx;
  logic        dwt_wr;
  logic        fe_valid;
  logic [2:0]  fe_idx;
  logic        fe_wr;
  logic        merge_start;
  logic [31:0] merge_base;
  logic        merge_done;

  hifp_wg_ctrl #(.FRAMES(FRAMES), .LANES(LANES), .FPID_WORD(WORD)) dut (.*);

  int checks = 0, failures = 0;
  int cycle = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("cycle %0d: %s", cycle, what); end
  endtask

  // Environment: memory, DWT and FE delays, merge.
  bit   random_mode;
  int   mem_lat;
  int   pending [$];          // due cycles of outstanding responses
  logic [2:0] dwt_pipe;
  int   merge_wait;
  bit   merging;

  always_comb begin
    rd_valid = (pending.size() != 0) && (pending[0] <= cycle);
  end
  assign dwt_wr = dwt_pipe[2];

  always @(posedge clk) begin
    if (rd_req && rd_ready) pending.push_back(cycle + (random_mode ? $urandom_range(1, 5) : mem_lat));
    if (rd_valid) void'(pending.pop_front());
    dwt_pipe <= {dwt_pipe[1:0], rd_valid};
    fe_wr    <= fe_valid;
    merge_done <= 1'b0;
    if (merge_start) begin merging <= 1'b1; merge_wait <= random_mode ? $urandom_range(1, 9) : WORDS; end
    else if (merging) begin
      if (merge_wait == 1) begin merging <= 1'b0; merge_done <= 1'b1; end
      merge_wait <= merge_wait - 1;
    end
  end

  always @(negedge clk) rd_ready = random_mode ? ($urandom_range(3) != 0) : 1'b1;

  // Scoreboard of one launch.
  int g_req, g_resp, g_dwt, g_fe, g_few, g_merges, cur_group;
  always @(posedge clk) begin
    if (rst_n) begin
      if (rd_req && rd_ready) begin
        check(int'(rd_iter) == g_req, "request index out of order");
        check(rd_base == 32'(cur_group * SONG), "wrong song base");
        g_req++;
      end
      if (rd_valid) begin check(int'(resp_idx) == g_resp, "response index"); g_resp++; end
      if (dwt_wr) g_dwt++;
      if (fe_valid) begin
        check(g_dwt == CHUNK, "feature extraction before the barrier");
        check(int'(fe_idx) == g_fe, "fe index out of order");
        g_fe++;
      end
      if (fe_wr) g_few++;
      if (merge_start) begin
        check(g_few == CHUNK && g_fe == CHUNK && g_req == CHUNK, "merge before extraction ended");
        check(merge_base == 32'(cur_group * WORDS), "wrong merge base");
        g_merges++;
      end
      if (merge_done) begin
        cur_group++;
        g_req = 0; g_resp = 0; g_dwt = 0; g_fe = 0; g_few = 0;
      end
    end
  end

  task automatic launch(int n, output int clocks);
    cur_group = 0; g_merges = 0;
    g_req = 0; g_resp = 0; g_dwt = 0; g_fe = 0; g_few = 0;
    @(negedge clk);
    start = 1'b1; num_groups = 16'(n);
    @(negedge clk);
    start = 1'b0;
    clocks = 1;
    while (!done && clocks < 20000) begin @(negedge clk); clocks++; end
    @(negedge clk);
    check(!busy, "busy after done");
    check(g_merges == n, $sformatf("%0d merges for %0d groups", g_merges, n));
  endtask

  initial begin
    int clocks;
    start = 0; num_groups = 0; random_mode = 0; mem_lat = 1;
    dwt_pipe = '0; merging = 0; merge_done = 0; fe_wr = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // Zero groups: done in the clock after start.
    launch(0, clocks);
    check(clocks == 1, $sformatf("empty launch took %0d", clocks));
    // Exact timing, several memory latencies.
    for (mem_lat = 1; mem_lat <= 4; mem_lat++) begin
      launch(3, clocks);
      check(clocks == 1 + 3 * (2*CHUNK + mem_lat + 6 + WORDS),
            $sformatf("latency %0d: %0d clocks, want %0d", mem_lat, clocks,
                      1 + 3 * (2*CHUNK + mem_lat + 6 + WORDS)));
    end
    // Random stalls and latencies.
    random_mode = 1;
    for (int r = 0; r < 10; r++) launch(1 + $urandom_range(6), clocks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
