// tb_hifp_feature_extract: self-checking test of the feature extraction row.
//
// Drives 16 lanes with random, equal, and full-scale sample pairs, with idle
// clocks in between, and checks every bit against cur > nxt (signed) and
// that results appear exactly one clock after their inputs, with their index.
// A second row built with SIGNED_SAMPLES = 0 is checked against an unsigned
// comparison of the same inputs.
module tb_hifp_feature_extract;
  localparam int LANES = 16;

  logic              clk = 1'b0;
  logic              rst_n = 1'b0;
  logic              in_valid;
  logic [2:0]        in_idx;
  logic [15:0]       cur [LANES];
  logic [15:0]       nxt [LANES];
  logic              out_valid;
  logic [2:0]        out_idx;
  logic [LANES-1:0]  out_bits;

  int checks = 0, failures = 0;
  int cycle = 0;
  logic [LANES-1:0] exp_bits;
  logic [2:0]       exp_idx;
  logic             exp_valid = 1'b0;

  hifp_feature_extract #(.LANES(LANES), .IDX_W(3)) dut (.*);

  logic             u_valid;
  logic [2:0]       u_idx;
  logic [LANES-1:0] u_bits;
  logic [LANES-1:0] exp_ubits;
  hifp_feature_extract #(.LANES(LANES), .IDX_W(3), .SIGNED_SAMPLES(1'b0)) dut_u (
    .clk, .rst_n, .in_valid, .in_idx, .cur, .nxt,
    .out_valid(u_valid), .out_idx(u_idx), .out_bits(u_bits));

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // The result of the inputs taken at one edge must be present at the next.
  always @(posedge clk) begin
    if (rst_n) begin
      checks++;
      if (out_valid != exp_valid) begin
        failures++; $display("cycle %0d: valid %0b want %0b", cycle, out_valid, exp_valid);
      end else if (exp_valid && (out_bits != exp_bits || out_idx != exp_idx)) begin
        failures++; $display("cycle %0d: bits %h want %h", cycle, out_bits, exp_bits);
      end
      if (exp_valid) begin
        checks++;
        if (!u_valid || u_bits != exp_ubits) begin
          failures++; $display("cycle %0d: unsigned bits %h want %h", cycle, u_bits, exp_ubits);
        end
      end
      exp_valid <= in_valid;
      exp_idx   <= in_idx;
      for (int l = 0; l < LANES; l++)
        exp_bits[l] <= (int'($signed(cur[l])) > int'($signed(nxt[l])));
      for (int l = 0; l < LANES; l++)
        exp_ubits[l] <= (int'(cur[l]) > int'(nxt[l]));
    end
  end

  initial begin
    in_valid = 1'b0; in_idx = '0;
    foreach (cur[l]) begin cur[l] = '0; nxt[l] = '0; end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      in_valid = ($urandom_range(4) != 0);
      in_idx   = 3'(n);
      for (int l = 0; l < LANES; l++) begin
        case ($urandom_range(3))
          0: begin cur[l] = 16'($urandom); nxt[l] = cur[l]; end            // tie
          1: begin cur[l] = 16'h8000; nxt[l] = 16'h7fff; end               // extremes
          2: begin cur[l] = 16'h7fff; nxt[l] = 16'(16'h8000 + $urandom_range(1)); end
          default: begin cur[l] = 16'($urandom); nxt[l] = 16'($urandom); end
        endcase
      end
    end
    @(negedge clk); in_valid = 1'b0;
    repeat (3) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
