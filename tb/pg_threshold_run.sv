// Helper for tb_power_guard_table1: one power_guard of NI inputs and NO
// outputs around a stand-in CUT, put through the threshold experiment.
//
// TESTS three-vector tests (setup, launch, capture) are applied unguarded
// (P_th at its maximum) to find the largest estimate P_max, then again with
// P_th at 80 % and 70 % of P_max. The estimate is recomputed here each cycle;
// a response must reach guard_out exactly when it is below P_th. Coefficients
// are scaled to PMAX_NW, a circuit's peak power in nW: c0 = PMAX_NW/5 and
// c_k drawn from PMAX_NW/NI .. 2*PMAX_NW/NI. done rises when finished, with
// the counts on the other outputs.
module pg_threshold_run #(
  parameter int unsigned NI      = 41,
  parameter int unsigned NO      = 32,
  parameter int unsigned PMAX_NW = 1970,
  parameter int unsigned TESTS   = 60,
  parameter string       NAME    = "cut"
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures,
  output int   masked_80,
  output int   masked_70
);
  localparam int unsigned W  = 16;
  localparam int unsigned PW = pg_pkg::power_width(NI, W);

  logic                 rst;
  logic [NI-1:0]        in_vec, cut_in;
  logic [W-1:0]         coef0;
  logic [NI-1:0][W-1:0] coef;
  logic [PW-1:0]        p_th, p_eq;
  logic [NO-1:0]        cut_out, guard_out;
  logic                 valid, x_val;

  power_guard #(.N_IN(NI), .N_OUT(NO), .COEF_W(W)) dut (.*);
  cut_wide #(.N_IN(NI), .N_OUT(NO)) u_cut (.in_vec(cut_in), .out_vec(cut_out));

  logic [NI-1:0] tv [TESTS][3];
  logic          x_ref;

  function automatic int unsigned power_ref(input logic [NI-1:0] a, input logic [NI-1:0] b);
    int unsigned s = coef0;
    for (int k = 0; k < NI; k++) if (a[k] != b[k]) s += coef[k];
    return s;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s %s at %0t", NAME, what, $time);
    end
  endtask

  task automatic run_set(input logic [PW-1:0] th, output int masked,
                         output int unsigned p_max, output int unsigned p_peak);
    int unsigned p;
    bit exp_valid;
    logic [NO-1:0] resp;
    masked = 0; p_max = 0; p_peak = 0;
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
    int masked_u;
    int unsigned pmax_u, pmax_x, peak_x, peak_80, peak_70, th80, th70;
    done = 1'b0;
    checks = 0;
    failures = 0;
    coef0 = W'(PMAX_NW / 5);
    for (int k = 0; k < NI; k++) coef[k] = W'($urandom_range(PMAX_NW / NI, 2 * PMAX_NW / NI));
    for (int t = 0; t < TESTS; t++)
      for (int c = 0; c < 3; c++)
        for (int k = 0; k < NI; k++) tv[t][c][k] = 1'($urandom);
    rst = 1'b1;
    in_vec = '0;
    p_th = '1;
    @(negedge clk);
    x_ref = x_val;
    run_set('1, masked_u, pmax_u, peak_x);
    check(masked_u == 0, "unguarded set passes every response");
    th80 = pmax_u * 8 / 10;
    th70 = pmax_u * 7 / 10;
    run_set(PW'(th80), masked_80, pmax_x, peak_80);
    run_set(PW'(th70), masked_70, pmax_x, peak_70);
    check(peak_80 < th80 && peak_70 < th70, "no passed response at or above P_th");
    check(masked_80 > 0 && masked_70 >= masked_80, "lower threshold masks more");
    $display("%s (%0d in, %0d out): P_max=%0d, 80%% P_th=%0d masked %0d of %0d, 70%% P_th=%0d masked %0d of %0d",
             NAME, NI, NO, pmax_u, th80, masked_80, 2 * TESTS, th70, masked_70, 2 * TESTS);
    done = 1'b1;
  end
endmodule
