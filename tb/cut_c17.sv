// Circuit under test for the small end-to-end testbench: the ISCAS-85 c17
// benchmark, six two-input NAND gates, five inputs, two outputs.
// in_vec[0..4] = N1, N2, N3, N6, N7; out_vec[0] = N22, out_vec[1] = N23.
module cut_c17 (
  input  logic [4:0] in_vec,
  output logic [1:0] out_vec
);
  logic n10, n11, n16, n19;
  assign n10 = ~(in_vec[0] & in_vec[2]);
  assign n11 = ~(in_vec[2] & in_vec[3]);
  assign n16 = ~(in_vec[1] & n11);
  assign n19 = ~(n11 & in_vec[4]);
  assign out_vec[0] = ~(n10 & n16);
  assign out_vec[1] = ~(n16 & n19);
endmodule
