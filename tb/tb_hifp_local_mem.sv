// tb_hifp_local_mem: self-checking test of the work-group local DWT memory.
//
// 64 frames over 8 lanes (chunk of 8). Each round writes every chunk position
// once, in a random order, with random data, then reads every position and
// checks each lane's current and next sample against a plain array model in
// which the sample after the last frame is zero.
module tb_hifp_local_mem;
  localparam int FRAMES = 64;
  localparam int LANES  = 8;
  localparam int CHUNK  = FRAMES / LANES;

  logic        clk = 1'b0;
  logic        wr_en;
  logic [2:0]  wr_idx;
  logic [15:0] wr_data [LANES];
  logic [2:0]  rd_idx;
  logic [15:0] rd_cur [LANES];
  logic [15:0] rd_nxt [LANES];

  int checks = 0, failures = 0;
  logic [15:0] model [FRAMES+1];

  hifp_local_mem #(.FRAMES(FRAMES), .LANES(LANES)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int order [CHUNK];
    wr_en = 1'b0; wr_idx = '0; rd_idx = '0;
    foreach (wr_data[l]) wr_data[l] = '0;
    model[FRAMES] = '0;
    for (int round = 0; round < 20; round++) begin
      foreach (order[i]) order[i] = i;
      order.shuffle();
      foreach (order[i]) begin
        @(negedge clk);
        wr_en = 1'b1; wr_idx = 3'(order[i]);
        for (int l = 0; l < LANES; l++) begin
          wr_data[l] = 16'($urandom);
          model[l*CHUNK + order[i]] = wr_data[l];
        end
        // An idle clock with junk on the data lines must not write.
        if ($urandom_range(2) == 0) begin
          @(negedge clk);
          wr_en = 1'b0;
          foreach (wr_data[l]) wr_data[l] = 16'($urandom);
        end
      end
      @(negedge clk);
      wr_en = 1'b0;
      for (int i = 0; i < CHUNK; i++) begin
        rd_idx = 3'(i);
        #1;
        for (int l = 0; l < LANES; l++) begin
          checks += 2;
          if (rd_cur[l] != model[l*CHUNK+i]) begin
            failures++; $display("cur lane %0d idx %0d: %h want %h", l, i, rd_cur[l], model[l*CHUNK+i]);
          end
          if (rd_nxt[l] != model[l*CHUNK+i+1]) begin
            failures++; $display("nxt lane %0d idx %0d: %h want %h", l, i, rd_nxt[l], model[l*CHUNK+i+1]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
