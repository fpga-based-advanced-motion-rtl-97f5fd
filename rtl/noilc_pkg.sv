// noilc_pkg: constants shared by the NOILC (norm-optimal iterative learning
// control) engine.
//
// The engine computes u_ff,j+1 = L*e_j + Q*u_ff,j, where e_j is the position
// error of iteration j, u_ff,j the feedforward signal applied in iteration j,
// and L and Q are N x N filter matrices computed offline. All datapath words
// are signed fixed point with BW bits of which FRAC are fraction bits.
//
// The default sizes (325 samples per iteration, 24-bit words with 12 fraction
// bits) follow the motion-control case this engine was designed for. The
// pipeline latency PIPE_LAT is a property of this implementation.
package noilc_pkg;

  // Samples per iteration (vector length, matrix order).
  localparam int unsigned N_DEFAULT = 325;
  // Word width and fraction bits of e_j, u_ff,j, L and Q (sfix24, 12 fraction bits).
  localparam int unsigned BW_DEFAULT = 24;
  localparam int unsigned FRAC_DEFAULT = 12;

  // Clocks between the last of the N coefficient reads of a column and the
  // cycle in which the column's product vector has been added into the
  // accumulator: RAM read (1) + multiplier (1) + product adder (1) +
  // deserializer output register (1).
  localparam int unsigned PIPE_LAT = 4;

  // Width of the iteration counter.
  localparam int unsigned ITER_W = 16;

  // Shortest legal distance, in clocks, between two sample strobes.
  function automatic int unsigned min_sample_period(int unsigned n);
    return n + PIPE_LAT + 1;
  endfunction

endpackage
