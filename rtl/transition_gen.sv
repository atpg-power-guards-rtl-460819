// Input-transition signal generation.
//
// Every primary input i_k feeds a flip-flop that holds i'_k, its value in the
// previous clock cycle, and an XOR that compares the two: trans[k] = i_k ^ i'_k
// is 1 when input k changes between the previous vector V1 and the current
// vector V2. This follows the guard structure described for the method.
//
// The previous-vector flip-flops have no reset: before the first vector their
// content is undefined. Because a two-state circuit cannot carry an unknown
// value, prev_known records whether a vector has been clocked in since rst;
// it is this design's stand-in for the unknown state and lets the masking
// logic suppress the response of the setup cycle.
//
// Timing: trans is combinational from in_vec; prev_vec and prev_known update
// on the rising edge of clk. rst is synchronous and active high.
module transition_gen #(
  parameter int unsigned N_IN = pg_pkg::PG_N_IN
) (
  input  logic            clk,
  input  logic            rst,
  input  logic [N_IN-1:0] in_vec,
  output logic [N_IN-1:0] prev_vec,
  output logic [N_IN-1:0] trans,
  output logic            prev_known
);

  always_ff @(posedge clk) begin
    prev_vec <= in_vec;
  end

  always_ff @(posedge clk) begin
    if (rst) prev_known <= 1'b0;
    else     prev_known <= 1'b1;
  end

  assign trans = in_vec ^ prev_vec;

endmodule
