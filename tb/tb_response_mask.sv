// Testbench for response_mask: random CUT outputs, power estimates and
// thresholds, including p_eq == p_th. The expected guard output of the next
// cycle is the CUT output when prev_known && p_eq < p_th, otherwise every bit
// equals the X flip-flop's value, which must never change.
module tb_response_mask;
  localparam int unsigned M = 32;
  localparam int unsigned PW = 22;

  logic          clk = 1'b0;
  logic [PW-1:0] p_eq, p_th;
  logic          prev_known;
  logic [M-1:0]  cut_out;
  logic          valid, x_val;
  logic [M-1:0]  guard_out;

  int checks = 0, failures = 0;
  int n_pass = 0, n_mask_power = 0, n_mask_unknown = 0, n_equal = 0;
  logic         x_first;
  logic         exp_valid;
  logic [M-1:0] exp_out;

  response_mask #(.N_OUT(M), .P_W(PW)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    x_first = x_val;
    for (int c = 0; c < 1000; c++) begin
      cut_out    = M'($urandom);
      p_th       = PW'($urandom_range(1000, 3000));
      case (c % 4)
        0: p_eq = p_th;
        1: p_eq = p_th - PW'($urandom_range(1, 500));
        default: p_eq = PW'($urandom_range(0, 4000));
      endcase
      prev_known = (c % 13 != 0);
      exp_valid  = prev_known && (p_eq < p_th);
      exp_out    = exp_valid ? cut_out : {M{x_first}};
      if (!prev_known)           n_mask_unknown++;
      else if (exp_valid)        n_pass++;
      else                       n_mask_power++;
      if (prev_known && p_eq == p_th) n_equal++;
      #1;
      check(valid == exp_valid, "valid");
      @(posedge clk);
      #1;
      check(guard_out == exp_out, "guard_out");
      check(x_val == x_first, "X_ff holds its value");
      @(negedge clk);
    end
    check(n_pass > 0 && n_mask_power > 0 && n_mask_unknown > 0 && n_equal > 0,
          "all cases exercised");
    $display("passed=%0d masked_power=%0d masked_unknown=%0d equal=%0d",
             n_pass, n_mask_power, n_mask_unknown, n_equal);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
