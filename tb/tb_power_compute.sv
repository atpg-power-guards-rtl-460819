// Testbench for power_compute: random coefficients and transition bits; the
// expected power is summed here in 64-bit arithmetic and compared with p_eq.
// Corner cases: no transitions (p_eq = c0) and all inputs switching with all
// coefficients at their maximum (largest sum, checks the width).
module tb_power_compute;
  localparam int unsigned N = 41;
  localparam int unsigned W = 16;
  localparam int unsigned PW = pg_pkg::power_width(N, W);

  logic [N-1:0]        trans;
  logic [W-1:0]        coef0;
  logic [N-1:0][W-1:0] coef;
  logic [PW-1:0]       p_eq;

  int checks = 0, failures = 0;

  power_compute #(.N_IN(N), .COEF_W(W)) dut (.*);

  function automatic longint expected();
    longint s = longint'(coef0);
    for (int k = 0; k < N; k++) if (trans[k]) s += longint'(coef[k]);
    return s;
  endfunction

  task automatic check_now(input string what);
    #1;
    checks++;
    if (longint'(p_eq) != expected()) begin
      failures++;
      $display("FAIL %s: p_eq=%0d expected=%0d", what, p_eq, expected());
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < N; k++) coef[k] = W'($urandom);
    coef0 = W'($urandom);
    trans = '0;
    check_now("no transitions");
    checks++;
    if (p_eq != PW'(coef0)) failures++;
    for (int k = 0; k < N; k++) begin
      trans = '0;
      trans[k] = 1'b1;
      check_now("single transition");
    end
    for (int t = 0; t < 500; t++) begin
      for (int k = 0; k < N; k++) begin
        trans[k] = 1'($urandom);
        if (t % 10 == 0) coef[k] = W'($urandom);
      end
      coef0 = W'($urandom);
      check_now("random");
    end
    trans = '1;
    coef0 = '1;
    for (int k = 0; k < N; k++) coef[k] = '1;
    check_now("full scale");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
