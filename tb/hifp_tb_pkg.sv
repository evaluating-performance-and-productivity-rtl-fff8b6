// hifp_tb_pkg: reference model and stimulus for the HiFP2.0 testbenches.
//
// wave_sample() gives the sample stored at a global sample address as a pure
// function of the address, so a testbench never has to hold a song in memory.
// Songs contain quiet stretches (all zero, which make equal neighbours), full
// scale stretches (+32767 / -32768, which stress the averaging range) and
// pseudo-random audio. The reference model uses plain C-style int arithmetic,
// independent of the RTL's bit-level formulation.
package hifp_tb_pkg;

  function automatic int unsigned mix32(int unsigned x);
    x = x ^ (x >> 16);
    x = x * 32'h7feb352d;
    x = x ^ (x >> 15);
    x = x * 32'h846ca68b;
    x = x ^ (x >> 16);
    return x;
  endfunction

  // Signed 16-bit sample at a global sample address.
  function automatic logic [15:0] wave_sample(int unsigned addr, int unsigned seed);
    int unsigned h;
    int unsigned region;
    h      = mix32(addr ^ (seed * 32'h9e3779b9));
    region = mix32((addr >> 11) ^ seed) % 8;
    case (region)
      0:       return 16'h0000;                              // silence
      1:       return h[0] ? 16'h7fff : 16'h8000;            // full scale
      2:       return 16'(int'(addr >> 9) % 64);             // slow ramp, many ties
      default: return h[15:0];                               // noise
    endcase
  endfunction

  // (a+b)/2 with C semantics on signed 16-bit inputs.
  function automatic int ref_avg(int a, int b);
    return (a + b) / 2;
  endfunction

  // Three-level Haar low band of 8 signed samples.
  function automatic int ref_dwt8(logic [15:0] w [8]);
    int v [8];
    for (int i = 0; i < 8; i++) v[i] = int'($signed(w[i]));
    for (int k = 8; k > 1; k = k / 2)
      for (int l = 0; l < k / 2; l++) v[l] = ref_avg(v[2*l], v[2*l+1]);
    return v[0];
  endfunction

  // DWT value of frame f of the song starting at sample address base.
  function automatic int ref_frame(int unsigned base, int unsigned f, int unsigned spf,
                                   int unsigned seed);
    logic [15:0] w [8];
    for (int i = 0; i < 8; i++) w[i] = wave_sample(base + f*spf + i, seed);
    return ref_dwt8(w);
  endfunction

endpackage
