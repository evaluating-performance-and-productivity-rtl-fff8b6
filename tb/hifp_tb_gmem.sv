// hifp_tb_gmem: behavioural model of the device global memory for the
// HiFP2.0 kernel testbenches (not synthesizable, testbench only).
//
// Wave reads: a request is accepted when wave_rd_req and wave_rd_ready are
// both high at a clock edge; the DWT_TAPS samples of every lane are produced
// by hifp_tb_pkg::wave_sample() from the lane's address and returned, in
// request order, with wave_rd_valid between 1 and MAX_LAT clocks later. With
// stalls set (initially STALLS), wave_rd_ready and fpid_wr_ready are withheld at random; without
// it they are always high and the latency is exactly one clock.
// FPID writes: each accepted word is stored in fpid_mem, indexed by word
// address. Counters of stalls and writes are public for the testbench.
module hifp_tb_gmem #(
  parameter int unsigned GROUP_SIZE = 512,
  parameter int unsigned FPID_WORD  = 512,
  parameter int unsigned SEED       = 1,
  parameter bit          STALLS     = 1'b0,  // initial value of stalls
  parameter int unsigned MAX_LAT    = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 wave_rd_req,
  output logic                 wave_rd_ready,
  input  logic [31:0]          wave_rd_addr [GROUP_SIZE],
  output logic                 wave_rd_valid,
  output logic [15:0]          wave_rd_data [GROUP_SIZE][8],
  input  logic                 fpid_wr_valid,
  output logic                 fpid_wr_ready,
  input  logic [31:0]          fpid_wr_addr,
  input  logic [FPID_WORD-1:0] fpid_wr_data
);
  import hifp_tb_pkg::*;

  typedef logic [15:0] lane_data_t [GROUP_SIZE][8];
  typedef struct { lane_data_t data; longint due; } resp_t;

  resp_t  q [$];
  longint cycle = 0;
  longint last_due = 0;

  logic [FPID_WORD-1:0] fpid_mem [int unsigned];
  bit stalls = STALLS;   // may be changed by the testbench between launches
  int rd_stalls = 0, wr_stalls = 0, writes = 0, rewrites = 0, reads = 0;

  always @(negedge clk) begin
    wave_rd_ready = stalls ? ($urandom_range(3) != 0) : 1'b1;
    fpid_wr_ready = stalls ? ($urandom_range(2) != 0) : 1'b1;
  end

  always @(posedge clk) begin
    cycle <= cycle + 1;
    wave_rd_valid <= 1'b0;
    if (!rst_n) begin
      q.delete();
    end else begin
      if (wave_rd_req && !wave_rd_ready) rd_stalls++;
      if (wave_rd_req && wave_rd_ready) begin
        resp_t r;
        longint lat;
        for (int l = 0; l < GROUP_SIZE; l++)
          for (int k = 0; k < 8; k++) r.data[l][k] = wave_sample(wave_rd_addr[l] + 32'(k), SEED);
        lat = stalls ? longint'($urandom_range(1, MAX_LAT)) : 1;
        r.due = cycle + lat - 1;
        if (r.due <= last_due && q.size() != 0) r.due = last_due + 1;
        last_due = r.due;
        q.push_back(r);
        reads++;
      end
      if (q.size() != 0 && q[0].due <= cycle) begin
        resp_t r;
        r = q.pop_front();
        wave_rd_valid <= 1'b1;
        wave_rd_data  <= r.data;
      end
      if (fpid_wr_valid && !fpid_wr_ready) wr_stalls++;
      if (fpid_wr_valid && fpid_wr_ready) begin
        if (fpid_mem.exists(fpid_wr_addr)) rewrites++;
        fpid_mem[fpid_wr_addr] = fpid_wr_data;
        writes++;
      end
    end
  end
endmodule
