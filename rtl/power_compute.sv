// Power computation: the analytical power model
//
//   P_eq = c0 + c1*i1^T + c2*i2^T + ... + cn*in^T
//
// evaluated every cycle from the transition bits. Each coefficient c_k is the
// power (learned from power simulations) that a transition on input k adds;
// c0 is the constant part. Because i_k^T is a single bit, each product is the
// coefficient gated by that bit, and the gated terms are added in one sum.
//
// Interface: trans (N_IN transition bits), coef0 and coef (unsigned, COEF_W
// bits each, one unit per LSB chosen by the user), p_eq (P_W bits, wide enough
// for the sum of all N_IN + 1 coefficients). The model comes from the method;
// the integer format, the widths and loading the coefficients through ports
// are this design's choices.
//
// Timing: purely combinational.
module power_compute #(
  parameter int unsigned N_IN   = pg_pkg::PG_N_IN,
  parameter int unsigned COEF_W = pg_pkg::PG_COEF_W,
  parameter int unsigned P_W    = pg_pkg::power_width(N_IN, COEF_W)
) (
  input  logic [N_IN-1:0]             trans,
  input  logic [COEF_W-1:0]           coef0,
  input  logic [N_IN-1:0][COEF_W-1:0] coef,
  output logic [P_W-1:0]              p_eq
);

  always_comb begin
    p_eq = P_W'(coef0);
    for (int unsigned k = 0; k < N_IN; k++) begin
      if (trans[k]) p_eq = p_eq + P_W'(coef[k]);
    end
  end

endmodule
