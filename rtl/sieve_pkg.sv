// sieve_pkg: constants and helper functions shared by the lattice-sieving
// accelerator. The defaults describe the main configuration: a 120-dimensional
// lattice, a 32-bit host data bus, and 8-bit signed vector coordinates (so four
// coordinates travel in one bus word and a 120-dimensional vector takes 30
// words). The dimension and bus width follow the design description; the
// coordinate width is chosen so that sending v and u and returning the reduced
// v costs 90 bus words, which is the communication time quoted for this
// configuration. The other widths are derived so that no intermediate result
// can overflow.
package sieve_pkg;

  parameter int unsigned N_DIM   = 120;  // lattice dimension
  parameter int unsigned COORD_W = 8;    // bits per signed coordinate
  parameter int unsigned BUS_W   = 32;   // host data bus width
  parameter int unsigned Q_W     = 4;    // signed rounded quotient, range -4..4
  parameter int unsigned QMAX    = 4;    // largest |q| the divider resolves

  // Width of an inner product of two n-vectors of w-bit signed numbers.
  function automatic int unsigned dot_width(int unsigned n, int unsigned w);
    return 2 * w + $clog2(n) + 1;
  endfunction

  // Number of adder-tree levels (pipeline stages) for n products.
  function automatic int unsigned tree_levels(int unsigned n);
    return (n <= 1) ? 0 : $clog2(n);
  endfunction

  // Latency of the reduce pipeline in clock cycles: input register, multiply,
  // adder tree, rounded division, update, output register.
  function automatic int unsigned reduce_latency(int unsigned n);
    return 5 + tree_levels(n);
  endfunction

  // Bus words needed for one vector.
  function automatic int unsigned vec_words(int unsigned n, int unsigned w, int unsigned bus);
    return (n + (bus / w) - 1) / (bus / w);
  endfunction

  // Host-side operation selected at the top level.
  typedef enum logic {
    MODE_SINGLE = 1'b0,  // one reduction per transfer (vector pair in, result out)
    MODE_SET    = 1'b1   // a whole set is loaded, sieved on chip, read back
  } mode_e;

endpackage
