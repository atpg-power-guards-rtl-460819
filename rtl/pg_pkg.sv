// Power guard package: default sizes and the width rule shared by the blocks
// of the ATPG power guard.
//
// The defaults size the guard for a circuit with 41 primary inputs and 32
// primary outputs (the ISCAS-85 c1355 benchmark). Power values are unsigned
// integers; the testbenches use 1 nW per LSB, so 16-bit coefficients reach
// 65.5 uW per input. These sizes are this design's choice.
package pg_pkg;

  localparam int unsigned PG_N_IN   = 41;
  localparam int unsigned PG_N_OUT  = 32;
  localparam int unsigned PG_COEF_W = 16;

  // Width of P_eq: the sum of n_in + 1 coefficients of coef_w bits never
  // overflows this many bits.
  function automatic int unsigned power_width(int unsigned n_in, int unsigned coef_w);
    return coef_w + $clog2(n_in + 2);
  endfunction

endpackage
