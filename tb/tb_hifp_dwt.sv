// tb_hifp_dwt: self-checking test of the three-level Haar DWT pipeline.
//
// Feeds edge vectors (all zero, full scale, mixed signs with odd sums) and
// random vectors, with random idle clocks between them, and checks that each
// result equals the C-style reference and leaves the pipeline exactly three
// clocks after it entered, with its tag. A second instance built with
// SIGNED_SAMPLES = 0 sees the same inputs and is checked against an unsigned
// reference (halving rounds down).
module tb_hifp_dwt;
  import hifp_tb_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        in_valid;
  logic [7:0]  in_tag;
  logic [15:0] in_wave [8];
  logic        out_valid;
  logic [7:0]  out_tag;
  logic [15:0] out_dwt;

  int checks = 0, failures = 0;
  int cycle = 0;

  typedef struct { int value; int uvalue; logic [7:0] tag; int due; } exp_t;

  logic        u_valid;
  logic [7:0]  u_tag;
  logic [15:0] u_dwt;
  exp_t exp_q [$];

  hifp_dwt #(.TAG_W(8)) dut (.*);
  hifp_dwt #(.TAG_W(8), .SIGNED_SAMPLES(1'b0)) dut_u (
    .clk, .rst_n, .in_valid, .in_tag, .in_wave,
    .out_valid(u_valid), .out_tag(u_tag), .out_dwt(u_dwt));

  function automatic int ref_dwt8_unsigned(logic [15:0] w [8]);
    int v [8];
    for (int i = 0; i < 8; i++) v[i] = int'(w[i]);
    for (int k = 8; k > 1; k = k / 2)
      for (int l = 0; l < k / 2; l++) v[l] = (v[2*l] + v[2*l+1]) / 2;
    return v[0];
  endfunction

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  // Watchdog.
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Output checker.
  always @(posedge clk) begin
    if (rst_n) begin
      if (out_valid) begin
        if (exp_q.size() == 0) begin
          failures++; $display("unexpected output %0d", $signed(out_dwt));
        end else begin
          exp_t e;
          e = exp_q.pop_front();
          checks++;
          if (!u_valid || int'(u_dwt) != e.uvalue || u_tag != e.tag) begin
            failures++;
            $display("unsigned mismatch: got %0d, want %0d", u_dwt, e.uvalue);
          end
          checks++;
          if (int'($signed(out_dwt)) != e.value || out_tag != e.tag || cycle != e.due) begin
            failures++;
            $display("mismatch: got %0d tag %0d at %0d, want %0d tag %0d at %0d",
                     $signed(out_dwt), out_tag, cycle, e.value, e.tag, e.due);
          end
        end
      end else if (exp_q.size() != 0 && exp_q[0].due == cycle) begin
        failures++; $display("missing output due at %0d", cycle);
      end
    end
  end

  // Inputs change on the falling edge; a vector driven while the cycle
  // counter reads C is taken at the edge that ends cycle C and its result
  // must be seen at the edge that ends cycle C+3.
  task automatic send(logic [15:0] w [8], logic [7:0] tag);
    exp_t e;
    in_valid = 1'b1; in_tag = tag; in_wave = w;
    e.value = ref_dwt8(w); e.uvalue = ref_dwt8_unsigned(w); e.tag = tag; e.due = cycle + 3;
    exp_q.push_back(e);
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  initial begin
    logic [15:0] w [8];
    in_valid = 1'b0; in_tag = '0;
    foreach (in_wave[i]) in_wave[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    // Edge vectors.
    foreach (w[i]) w[i] = 16'h7fff;             send(w, 1);
    foreach (w[i]) w[i] = 16'h8000;             send(w, 2);
    foreach (w[i]) w[i] = i[0] ? 16'hffff : 16'h0000; send(w, 3);   // -1,0 pairs: -0.5 -> 0
    foreach (w[i]) w[i] = i[0] ? 16'hfffd : 16'h0000; send(w, 4);   // -3,0 pairs: -1.5 -> -1
    foreach (w[i]) w[i] = 16'(i * 1000);        send(w, 5);
    foreach (w[i]) w[i] = i[0] ? 16'h8000 : 16'h7fff; send(w, 6);
    // Random vectors, back to back and with gaps.
    for (int n = 0; n < 2000; n++) begin
      foreach (w[i]) w[i] = 16'($urandom);
      if ($urandom_range(3) == 0) foreach (w[i]) w[i] = {{13{w[i][15]}}, w[i][2:0]};
      send(w, 8'(n));
      if ($urandom_range(3) == 0) repeat ($urandom_range(3)) @(negedge clk);
    end
    repeat (6) @(negedge clk);
    if (exp_q.size() != 0) begin failures++; $display("%0d results never came", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
