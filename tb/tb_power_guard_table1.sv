// Threshold experiment at the pin counts of six ISCAS-85 benchmarks, run in
// parallel: c1355 (41/32), c1908 (33/25), c3540 (50/22), c5315 (178/123),
// c6288 (32/32) and c7552 (207/108) inputs/outputs. Coefficients are scaled
// to each circuit's peak power of an unguarded test set (1.97, 3.25, 6.82,
// 4.19, 36.3 and 9.8 uW, at 1 nW per LSB). Each guard must pass every response
// unguarded and only responses below P_th at 80 % and 70 % of P_max. The CUTs
// are stand-ins with the right pin counts, not the benchmark netlists.
module tb_power_guard_table1;
  localparam int N = 6;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [N-1:0] done;
  int ch [N], fl [N], m80 [N], m70 [N];
  int masked_total;

  pg_threshold_run #(.NI(41),  .NO(32),  .PMAX_NW(1970),  .NAME("c1355")) r0 (clk, done[0], ch[0], fl[0], m80[0], m70[0]);
  pg_threshold_run #(.NI(33),  .NO(25),  .PMAX_NW(3250),  .NAME("c1908")) r1 (clk, done[1], ch[1], fl[1], m80[1], m70[1]);
  pg_threshold_run #(.NI(50),  .NO(22),  .PMAX_NW(6820),  .NAME("c3540")) r2 (clk, done[2], ch[2], fl[2], m80[2], m70[2]);
  pg_threshold_run #(.NI(178), .NO(123), .PMAX_NW(4190),  .NAME("c5315")) r3 (clk, done[3], ch[3], fl[3], m80[3], m70[3]);
  pg_threshold_run #(.NI(32),  .NO(32),  .PMAX_NW(36300), .NAME("c6288")) r4 (clk, done[4], ch[4], fl[4], m80[4], m70[4]);
  pg_threshold_run #(.NI(207), .NO(108), .PMAX_NW(9800),  .NAME("c7552")) r5 (clk, done[5], ch[5], fl[5], m80[5], m70[5]);

  int checks, failures;

  initial begin
    repeat (5000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", 0, 1);
    $finish;
  end

  initial begin
    wait (&done);
    checks = 0;
    failures = 0;
    masked_total = 0;
    for (int i = 0; i < N; i++) begin
      checks += ch[i];
      failures += fl[i];
      masked_total += m80[i] + m70[i];
    end
    $display("responses masked in all guarded runs: %0d", masked_total);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
