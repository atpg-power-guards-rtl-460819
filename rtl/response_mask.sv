// Response masking.
//
// valid is 1 when the estimated power of the current vector transition is
// below the threshold (p_eq < p_th) and the previous vector is defined
// (prev_known). Each CUT output o_k then reaches the guard output; otherwise
// the guard output takes the value of X_ff, a flip-flop whose D input is its
// own Q. X_ff cannot be set or controlled by any input, so a test generator
// working on this netlist sees an unknown value there and cannot observe a
// fault effect through a power-unsafe pattern:
//
//   o'' = valid ? o : X        o' <= o''  (on the rising clock edge)
//
// The strict '<' comparison, the single X_ff shared by all outputs and the
// output register follow the method. Gating valid with prev_known is this
// design's two-state rendering of the unknown valid of the setup cycle: the
// output is masked in that cycle, as it would be X.
//
// X_ff has no reset on purpose: giving it a reset would make it controllable.
// In a two-state simulator it keeps its random initial value; x_val brings it
// out for observation only.
//
// Timing: valid is combinational; guard_out is registered, so the response
// to the vector applied in cycle n appears after the clock edge ending n.
module response_mask #(
  parameter int unsigned N_OUT = pg_pkg::PG_N_OUT,
  parameter int unsigned P_W   = pg_pkg::power_width(pg_pkg::PG_N_IN, pg_pkg::PG_COEF_W)
) (
  input  logic             clk,
  input  logic [P_W-1:0]   p_eq,
  input  logic [P_W-1:0]   p_th,
  input  logic             prev_known,
  input  logic [N_OUT-1:0] cut_out,
  output logic             valid,
  output logic             x_val,
  output logic [N_OUT-1:0] guard_out
);

  logic             x_q;
  logic [N_OUT-1:0] masked;

  // X_ff: self-looped, never reset.
  always_ff @(posedge clk) begin
    x_q <= x_q;
  end

  assign valid  = prev_known && (p_eq < p_th);
  assign masked = valid ? cut_out : {N_OUT{x_q}};
  assign x_val  = x_q;

  always_ff @(posedge clk) begin
    guard_out <= masked;
  end

endmodule
