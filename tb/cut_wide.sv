// Behavioural stand-in for a circuit under test with 41 inputs and 32
// outputs, the pin counts of the ISCAS-85 c1355 benchmark. It is not c1355:
// each output is an arbitrary mix of XOR and AND terms of the inputs, enough
// to give the guard a response that changes with the vector.
module cut_wide #(
  parameter int unsigned N_IN  = 41,
  parameter int unsigned N_OUT = 32
) (
  input  logic [N_IN-1:0]  in_vec,
  output logic [N_OUT-1:0] out_vec
);
  always_comb begin
    for (int j = 0; j < N_OUT; j++) begin
      out_vec[j] = in_vec[j % N_IN]
                 ^ (in_vec[(j + 7) % N_IN] & in_vec[(j + 13) % N_IN])
                 ^ in_vec[(N_IN - 1) - (j % 9)];
    end
  end
endmodule
