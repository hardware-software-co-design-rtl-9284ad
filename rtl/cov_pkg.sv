// cov_pkg: constants and helpers shared by the covariance engine.
//
// The engine computes the unnormalised sample covariance of a 12-element
// antenna array over blocks of 1024 complex samples. The defaults below are
// the sizes the design is built for: 12 antennas, 16-bit signed I/Q samples,
// 2^10 = 1024 samples per block and a 44-bit result. Only the upper triangle
// including the diagonal is computed (the matrix is Hermitian), so a matrix
// has N*(N+1)/2 = 78 entries. Entries are numbered row-major over the upper
// triangle: (0,0)=0, (0,1)=1, ..., (0,11)=11, (1,1)=12, ..., (11,11)=77; this
// numbering is this design's own choice and is also the RAM address of an entry.
package cov_pkg;

  localparam int unsigned DEF_N_ANT      = 12;
  localparam int unsigned DEF_SAMPLE_W   = 16;
  localparam int unsigned DEF_LOG2_NSAMP = 10;
  localparam int unsigned DEF_COV_W      = 44;

  // Number of upper-triangle entries (diagonal included) of an n x n matrix.
  function automatic int unsigned num_pairs(input int unsigned n);
    return n * (n + 1) / 2;
  endfunction

  // Row-major upper-triangle index of entry (i, j), i <= j < n.
  function automatic int unsigned pair_index(input int unsigned n,
                                             input int unsigned i,
                                             input int unsigned j);
    return i * n - (i * (i - 1)) / 2 + (j - i);
  endfunction

endpackage
