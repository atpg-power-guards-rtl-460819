// Testbench for transition_gen: applies random vectors and checks each
// transition bit against the XOR of the vector with the one a reference
// model remembers from the previous cycle, and the prev_known flag around
// reset. A watchdog ends the run if it hangs.
module tb_transition_gen;
  localparam int unsigned N = 41;
  localparam int unsigned CYCLES = 300;

  logic         clk = 1'b0;
  logic         rst;
  logic [N-1:0] in_vec, prev_vec, trans;
  logic         prev_known;

  int checks = 0, failures = 0;
  logic [N-1:0] model_prev;
  logic         model_known;
  int           n_trans_seen = 0;

  transition_gen #(.N_IN(N)) dut (.*);

  always #5 clk = ~clk;

  function automatic logic [N-1:0] rand_vec();
    logic [N-1:0] v;
    for (int k = 0; k < N; k++) v[k] = 1'($urandom);
    return v;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1;
    in_vec = '0;
    @(posedge clk);
    model_known = 1'b0;
    @(negedge clk);
    check(prev_known == 1'b0, "prev_known low after reset");
    rst = 1'b0;
    for (int c = 0; c < CYCLES; c++) begin
      // every 50 cycles hold the vector, to see all-zero transitions
      if (c % 50 != 7) in_vec = rand_vec();
      if (c == 150) rst = 1'b1;
      if (c == 151) rst = 1'b0;
      #1;
      check(prev_known == model_known, "prev_known");
      if (model_known) begin
        check(trans == (in_vec ^ model_prev), "trans");
        check(prev_vec == model_prev, "prev_vec");
        n_trans_seen += $countones(trans);
        if (c % 50 == 7) check(trans == '0, "no transition on held vector");
      end
      @(posedge clk);
      model_prev  = in_vec;
      model_known = !rst;
      @(negedge clk);
    end
    check(n_trans_seen > 0, "transitions were exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
