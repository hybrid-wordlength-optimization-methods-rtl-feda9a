// fft_pkg: types and constants shared by the pipelined FFT processors.
//
// All data in the datapath are signed fractions: a value of W bits has one
// sign bit and W-1 fraction bits and lies in [-1, 1). The per-stage
// wordlength W is what the processors' WL parameter lists. Trivial twiddle
// factors (+1, -j, -1, +j) are carried as a rotation code instead of a ROM
// word so that they are applied exactly, without a multiplier.
package fft_pkg;

  // Rotation applied by a trivial twiddle factor W_L^e with e a multiple of L/4.
  typedef enum logic [1:0] {
    ROT_P1 = 2'd0,  // e = 0      : x * 1
    ROT_MJ = 2'd1,  // e = L/4    : x * -j
    ROT_M1 = 2'd2,  // e = L/2    : x * -1
    ROT_PJ = 2'd3   // e = 3L/4   : x * +j
  } rot_e;

  // Widest datapath word the processors support (the wordlength range of the
  // design flow is 8 to 32 bits per stage).
  localparam int unsigned MAX_W = 32;

  // Most stages a processor can have: N up to 2^13 = 8192 points. Stage
  // wordlength lists are arrays of this size; entries past log2(N) are unused.
  localparam int unsigned MAX_LOGN = 13;

  function automatic int unsigned imax(int unsigned a, int unsigned b);
    return (a > b) ? a : b;
  endfunction

endpackage
