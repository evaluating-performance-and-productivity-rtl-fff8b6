// tb_hifp_fpid_merge: self-checking test of the sub_fpid buffer and merge.
//
// 64 frames over 8 lanes, 16-bit words (4 words per song). Each round writes
// the 8 chunk positions with random bits, then merges to a random base
// address while out_ready is randomly withheld. Checks every word's address
// and data against a bit-array model, the merge_done pulse, and that with
// out_ready always high the merge takes exactly one clock per word.
module tb_hifp_fpid_merge;
  localparam int FRAMES = 64;
  localparam int LANES  = 8;
  localparam int CHUNK  = FRAMES / LANES;
  localparam int WORD   = 16;
  localparam int WORDS  = FRAMES / WORD;

  logic             clk = 1'b0;
  logic             rst_n = 1'b0;
  logic             wr_en;
  logic [2:0]       wr_idx;
  logic [LANES-1:0] wr_bits;
  logic             merge_start;
  logic [31:0]      merge_base;
  logic             merge_busy, merge_done;
  logic             out_valid, out_ready;
  logic [31:0]      out_addr;
  logic [WORD-1:0]  out_data;

  int checks = 0, failures = 0;
  int stalls = 0;
  logic [FRAMES-1:0] model;

  hifp_fpid_merge #(.FRAMES(FRAMES), .LANES(LANES), .FPID_WORD(WORD)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int got, clocks;
    bit stall_mode;
    wr_en = 0; wr_idx = 0; wr_bits = 0; merge_start = 0; merge_base = 0; out_ready = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int round = 0; round < 60; round++) begin
      stall_mode = round[0];
      for (int i = 0; i < CHUNK; i++) begin
        @(negedge clk);
        wr_en = 1'b1; wr_idx = 3'(i); wr_bits = LANES'($urandom);
        for (int l = 0; l < LANES; l++) model[l*CHUNK+i] = wr_bits[l];
      end
      @(negedge clk);
      wr_en = 1'b0;
      merge_start = 1'b1; merge_base = $urandom_range(1000) * WORDS;
      @(negedge clk);
      merge_start = 1'b0;
      got = 0; clocks = 0;
      while (1) begin
        out_ready = stall_mode ? ($urandom_range(2) != 0) : 1'b1;
        @(posedge clk);
        clocks++;
        if (out_valid && !out_ready) stalls++;
        if (out_valid && out_ready) begin
          checks++;
          if (out_addr != merge_base + 32'(got) || out_data != model[got*WORD +: WORD]) begin
            failures++;
            $display("word %0d: addr %0d data %h want %0d %h", got, out_addr, out_data,
                     merge_base + 32'(got), model[got*WORD +: WORD]);
          end
          got++;
        end
        @(negedge clk);
        if (got == WORDS) break;
        if (clocks > 1000) break;
      end
      // merge_done follows the last accepted word by one clock.
      checks++;
      if (!merge_done || merge_busy) begin failures++; $display("merge_done missing"); end
      if (!stall_mode) begin
        checks++;
        if (clocks != WORDS) begin failures++; $display("merge took %0d clocks", clocks); end
      end
      out_ready = 1'b0;
    end
    checks++;
    if (stalls == 0) begin failures++; $display("no write stall exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
