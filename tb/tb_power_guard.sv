// End-to-end testbench for power_guard, wrapped around the c17 benchmark
// (5 inputs, 2 outputs, 8-bit coefficients).
//
// Each delay test is a three-vector sequence: a reset cycle, then the setup
// vector V0, the launch vector V1 and the capture vector V2. For every cycle
// the testbench computes the transition power from its own copy of the
// coefficients and the c17 response from its own sum-of-products form of the
// netlist, and checks valid, p_eq and the registered guard output: the CUT
// response when the transition is below P_th, otherwise the X flip-flop's
// value on every output.
//
// Mechanisms counted, each of which must occur at least once: setup cycle
// masked (no previous vector), launch passed, launch masked for power,
// capture passed, capture masked for power, estimate equal to the threshold
// (masked), a held vector (estimate equals c0), a whole test passed, and a
// whole test rejected.
module tb_power_guard;
  localparam int unsigned NI = 5;
  localparam int unsigned NO = 2;
  localparam int unsigned W  = 8;
  localparam int unsigned PW = pg_pkg::power_width(NI, W);
  localparam int unsigned TESTS = 400;

  logic                clk = 1'b0;
  logic                rst;
  logic [NI-1:0]       in_vec, cut_in;
  logic [W-1:0]        coef0;
  logic [NI-1:0][W-1:0] coef;
  logic [PW-1:0]       p_th, p_eq;
  logic [NO-1:0]       cut_out, guard_out;
  logic                valid, x_val;

  power_guard #(.N_IN(NI), .N_OUT(NO), .COEF_W(W)) dut (.*);
  cut_c17 u_cut (.in_vec(cut_in), .out_vec(cut_out));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  typedef enum int {
    M_SETUP_MASKED, M_LAUNCH_PASS, M_LAUNCH_MASK, M_CAPTURE_PASS,
    M_CAPTURE_MASK, M_EQUAL, M_HELD, M_TEST_PASS, M_TEST_REJECT, M_COUNT
  } mech_e;
  int mech [M_COUNT];
  string mech_name [M_COUNT] = '{"setup_masked", "launch_pass", "launch_mask",
    "capture_pass", "capture_mask", "equal_threshold", "held_vector",
    "test_pass", "test_reject"};

  logic x_ref;

  function automatic logic [1:0] c17_ref(input logic [4:0] v);
    // N22 = N1.N3 + N2.~(N3.N6); N23 = N2.~(N3.N6) + ~(N3.N6).N7
    logic n1, n2, n3, n6, n7, a;
    {n7, n6, n3, n2, n1} = v;
    a = ~(n3 & n6);
    return {(n2 & a) | (a & n7), (n1 & n3) | (n2 & a)};
  endfunction

  function automatic int unsigned power_ref(input logic [NI-1:0] a, input logic [NI-1:0] b);
    int unsigned s = coef0;
    for (int k = 0; k < NI; k++) if (a[k] != b[k]) s += coef[k];
    return s;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Apply one vector for one cycle and check it. known: a previous vector
  // exists. Returns whether the response was passed.
  task automatic apply(input logic [NI-1:0] v, input logic [NI-1:0] prev,
                       input bit known, output bit passed);
    int unsigned p;
    bit exp_valid;
    in_vec = v;
    p = power_ref(prev, v);
    exp_valid = known && (p < p_th);
    #1;
    if (known) check(int'(p_eq) == int'(p), "p_eq");
    check(valid == exp_valid, "valid");
    if (known && p == p_th) mech[M_EQUAL]++;
    if (known && v == prev) mech[M_HELD]++;
    @(posedge clk);
    #1;
    check(guard_out == (exp_valid ? c17_ref(v) : {NO{x_ref}}), "guard_out");
    check(x_val == x_ref, "X_ff unchanged");
    @(negedge clk);
    passed = exp_valid;
  endtask

  initial begin
    repeat (TESTS * 4 + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [NI-1:0] v0, v1, v2;
    bit p0, p1, p2;
    foreach (mech[m]) mech[m] = 0;
    coef0 = W'(20);
    for (int k = 0; k < NI; k++) coef[k] = W'($urandom_range(5, 40));
    rst = 1'b1;
    in_vec = '0;
    @(negedge clk);
    x_ref = x_val;
    for (int t = 0; t < TESTS; t++) begin
      v0 = NI'($urandom);
      v1 = NI'($urandom);
      v2 = (t % 17 == 3) ? v1 : NI'($urandom);
      // threshold between c0 and the largest possible estimate
      p_th = PW'($urandom_range(coef0, coef0 + 5 * 40));
      if (t % 23 == 5) p_th = PW'(power_ref(v0, v1));
      // reset cycle: forget the previous test
      rst = 1'b1;
      @(negedge clk);
      rst = 1'b0;
      apply(v0, '0, 1'b0, p0);
      if (!p0) mech[M_SETUP_MASKED]++;
      check(!p0, "setup vector never passed");
      apply(v1, v0, 1'b1, p1);
      apply(v2, v1, 1'b1, p2);
      mech[p1 ? M_LAUNCH_PASS  : M_LAUNCH_MASK]++;
      mech[p2 ? M_CAPTURE_PASS : M_CAPTURE_MASK]++;
      mech[(p1 && p2) ? M_TEST_PASS : M_TEST_REJECT]++;
    end
    for (int m = 0; m < M_COUNT; m++) begin
      $display("mechanism %-16s %0d", mech_name[m], mech[m]);
      check(mech[m] > 0, "mechanism exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
