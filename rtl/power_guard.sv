// ATPG power guard (top).
//
// A wrapper placed around a circuit under test (CUT) in the netlist given to
// a test-pattern generator, so that the generator can only produce delay-test
// pattern pairs whose estimated power stays below a threshold P_th. It exists
// only for test generation and is not meant for silicon. Three parts:
//
//   transition_gen  previous-vector flip-flops and XORs give i^T per input
//   power_compute   P_eq = c0 + sum c_k * i_k^T
//   response_mask   valid = P_eq < P_th; o' <= valid ? o : X_ff
//
// The test vector in_vec is passed to the CUT on cut_in, and the CUT's
// response comes back on cut_out; the CUT itself is outside this module.
// A delay test uses three vectors V0 (setup), V1 (launch), V2 (capture): the
// setup cycle's output is always masked because no earlier vector exists,
// and the responses to V1 and V2 are passed only if their transitions from
// V0 and V1 respectively are power-safe.
//
// Timing: in_vec applied in cycle n; guard_out shows the masked response
// after the clock edge that ends cycle n. p_eq and valid are observation
// outputs for cycle n, and x_val shows the value X_ff holds. rst (synchronous, active high) forgets the previous
// vector. Bringing the CUT ports out, the observation outputs and rst are
// this design's choices; the structure follows the method.
module power_guard #(
  parameter int unsigned N_IN   = pg_pkg::PG_N_IN,
  parameter int unsigned N_OUT  = pg_pkg::PG_N_OUT,
  parameter int unsigned COEF_W = pg_pkg::PG_COEF_W,
  parameter int unsigned P_W    = pg_pkg::power_width(N_IN, COEF_W)
) (
  input  logic                        clk,
  input  logic                        rst,
  input  logic [N_IN-1:0]             in_vec,
  input  logic [COEF_W-1:0]           coef0,
  input  logic [N_IN-1:0][COEF_W-1:0] coef,
  input  logic [P_W-1:0]              p_th,
  output logic [N_IN-1:0]             cut_in,
  input  logic [N_OUT-1:0]            cut_out,
  output logic [N_OUT-1:0]            guard_out,
  output logic [P_W-1:0]              p_eq,
  output logic                        valid,
  output logic                        x_val
);

  logic [N_IN-1:0] trans;
  logic            prev_known;

  assign cut_in = in_vec;

  transition_gen #(.N_IN(N_IN)) u_trans (
    .clk       (clk),
    .rst       (rst),
    .in_vec    (in_vec),
    .prev_vec  (),
    .trans     (trans),
    .prev_known(prev_known)
  );

  power_compute #(.N_IN(N_IN), .COEF_W(COEF_W), .P_W(P_W)) u_power (
    .trans(trans),
    .coef0(coef0),
    .coef (coef),
    .p_eq (p_eq)
  );

  response_mask #(.N_OUT(N_OUT), .P_W(P_W)) u_mask (
    .clk       (clk),
    .p_eq      (p_eq),
    .p_th      (p_th),
    .prev_known(prev_known),
    .cut_out   (cut_out),
    .valid     (valid),
    .x_val     (x_val),
    .guard_out (guard_out)
  );

endmodule
