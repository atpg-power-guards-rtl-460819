// Full-size testbench: power_guard at its default size (41 inputs, 32
// outputs, 16-bit coefficients) around a 41-input, 32-output stand-in CUT.
//
// It replays the threshold experiment on a c1355-sized circuit. A set of 75
// three-vector delay tests (V0 setup, V1 launch, V2 capture) is first applied
// with the threshold at its maximum (unguarded): every launch and capture
// response must pass, and the largest transition power P_max is recorded.
// The same set is then applied with P_th = 80 % and 70 % of P_max. For each
// cycle the estimate is recomputed here from the coefficients and compared
// with p_eq; a response must reach the guard output exactly when its estimate
// is below P_th, and no passed response may come from a transition at or
// above P_th. Coefficients are random, with c0 = 400 and c_k in 20..70 (in
// nW), which puts the estimates near the microwatt range of c1355.
module tb_power_guard_full;
  localparam int unsigned NI = pg_pkg::PG_N_IN;
  localparam int unsigned NO = pg_pkg::PG_N_OUT;
  localparam int unsigned W  = pg_pkg::PG_COEF_W;
  localparam int unsigned PW = pg_pkg::power_width(NI, W);
  localparam int unsigned TESTS = 75;

  logic                  clk = 1'b0;
  logic                  rst;
  logic [NI-1:0]         in_vec, cut_in;
  logic [W-1:0]          coef0;
  logic [NI-1:0][W-1:0]  coef;
  logic [PW-1:0]         p_th, p_eq;
  logic [NO-1:0]         cut_out, guard_out;
  logic                  valid, x_val;

  power_guard dut (.*);
  cut_wide #(.N_IN(NI), .N_OUT(NO)) u_cut (.in_vec(cut_in), .out_vec(cut_out));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [NI-1:0] tv [TESTS][3];
  logic x_ref;

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

  function automatic logic [NI-1:0] rand_vec();
    logic [NI-1:0] v;
    for (int k = 0; k < NI; k++) v[k] = 1'($urandom);
    return v;
  endfunction

  // Applies the whole test set with threshold th. Returns the number of
  // launch/capture responses masked, the largest estimate seen and the
  // largest and summed estimates of the responses that passed.
  task automatic run_set(input logic [PW-1:0] th, output int masked,
                         output int unsigned p_max, output int unsigned p_peak,
                         output longint p_sum, output int n_pass);
    int unsigned p;
    bit exp_valid;
    logic [NO-1:0] resp;
    masked = 0; p_max = 0; p_peak = 0; p_sum = 0; n_pass = 0;
    p_th = th;
    for (int t = 0; t < TESTS; t++) begin
      rst = 1'b1;
      @(negedge clk);
      rst = 1'b0;
      for (int c = 0; c < 3; c++) begin
        in_vec = tv[t][c];
        p = (c == 0) ? 0 : power_ref(tv[t][c-1], tv[t][c]);
        exp_valid = (c != 0) && (p < th);
        #1;
        if (c != 0) begin
          check(int'(p_eq) == int'(p), "p_eq");
          if (p > p_max) p_max = p;
        end
        check(valid == exp_valid, "valid");
        resp = cut_out;
        @(posedge clk);
        #1;
        check(guard_out == (exp_valid ? resp : {NO{x_ref}}), "guard_out");
        if (c != 0) begin
          if (exp_valid) begin
            n_pass++;
            p_sum += p;
            if (p > p_peak) p_peak = p;
          end else begin
            masked++;
          end
        end
        @(negedge clk);
      end
    end
  endtask

  initial begin
    repeat (TESTS * 4 * 3 + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int masked_u, masked_80, masked_70, n_u, n_80, n_70;
    int unsigned pmax_u, pmax_x, peak_u, peak_80, peak_70, th80, th70;
    longint sum_u, sum_80, sum_70;
    coef0 = W'(400);
    for (int k = 0; k < NI; k++) coef[k] = W'($urandom_range(20, 70));
    for (int t = 0; t < TESTS; t++)
      for (int c = 0; c < 3; c++) tv[t][c] = rand_vec();
    rst = 1'b1;
    in_vec = '0;
    p_th = '1;
    @(negedge clk);
    x_ref = x_val;

    run_set('1, masked_u, pmax_u, peak_u, sum_u, n_u);
    check(masked_u == 0, "unguarded set passes every response");
    th80 = pmax_u * 8 / 10;
    th70 = pmax_u * 7 / 10;
    run_set(PW'(th80), masked_80, pmax_x, peak_80, sum_80, n_80);
    run_set(PW'(th70), masked_70, pmax_x, peak_70, sum_70, n_70);
    check(peak_80 < th80 && peak_70 < th70, "no passed response at or above P_th");
    check(masked_80 > 0, "80 % threshold masks some responses");
    check(masked_70 >= masked_80, "70 % threshold masks at least as many");
    check(x_val == x_ref, "X_ff unchanged");
    $display("unguarded: P_max=%0d passed=%0d avg=%0d", pmax_u, n_u, n_u ? sum_u / n_u : 0);
    $display("80%%: P_th=%0d passed=%0d masked=%0d peak=%0d avg=%0d",
             th80, n_80, masked_80, peak_80, n_80 ? sum_80 / n_80 : 0);
    $display("70%%: P_th=%0d passed=%0d masked=%0d peak=%0d avg=%0d",
             th70, n_70, masked_70, peak_70, n_70 ? sum_70 / n_70 : 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
