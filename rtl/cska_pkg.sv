// cska_pkg: shared constants and helper functions of the hybrid variable
// latency carry skip adder.
//
// The adder is split into Q stages of sizes STAGE_M[0..Q-1] (LSB stage
// first). Stage 0 is a plain ripple-carry block fed by the adder carry input,
// the stage at index NUC is the parallel-prefix (Han-Carlson) nucleus, and
// every other stage is a concatenation/incrementation stage. The stage sizes
// rise towards the nucleus and fall after it, as the variable stage size
// style asks; the exact numbers are this design's choice, only the
// power-of-two nucleus of 16 bits follows the source description.
package cska_pkg;

  // Number of stages and default stage sizes (LSB stage first).
  localparam int unsigned Q_DEFAULT   = 6;
  localparam int unsigned M_DEFAULT [Q_DEFAULT] = '{2, 3, 4, 16, 4, 3};
  // Index of the nucleus (prefix) stage.
  localparam int unsigned NUC_DEFAULT = 3;
  // Number of Kogge-Stone rows removed from the speculative prefix network.
  localparam int unsigned DROP_DEFAULT = 1;

  // Integer base-2 logarithm of a power of two (floor for other values).
  function automatic int unsigned log2_floor(input int unsigned v);
    int unsigned r;
    r = 0;
    while ((1 << (r + 1)) <= v) r++;
    return r;
  endfunction

endpackage
