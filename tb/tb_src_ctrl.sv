// tb_src_ctrl: checks the output schedule of the Farrow rate changer control.
// For several values of M_I (integer, rational and a 24-bit approximation of
// an irrational ratio) the k-th output must be flagged at input number
// floor(k*M_I) with fractional delay k*M_I - floor(k*M_I), both computed here
// with exact 64-bit products; no other input may be flagged. Inputs arrive with
// random idle cycles. Also counts how often s_k = 1 and s_k > 1 occurred.
module tb_src_ctrl;
  import dif_pkg::*;

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [MI_W-1:0] mi = '0;
  logic out_fire;
  logic [MI_FRAC_W-1:0] mu;
  int checks = 0, failures = 0;
  int n_s1 = 0, n_s2 = 0;

  always #5 clk = ~clk;

  src_ctrl dut (.clk, .rst_n, .in_valid, .mi, .out_fire, .mu);

  task automatic run_phase(longint mi_fx, int n_in);
    longint k = 0;
    longint tk;
    longint prev_int = 0;
    rst_n = 0; in_valid = 0; mi = MI_W'(mi_fx);
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (longint n = 0; n < n_in; ) begin
      @(posedge clk);
      #1;
      if ($urandom_range(3, 0) != 0) begin
        in_valid = 1;
        #1;
        tk = k * mi_fx;
        checks++;
        if ((tk >> MI_FRAC_W) == n) begin
          if (!out_fire || longint'(mu) != (tk & ((64'sd1 << MI_FRAC_W) - 1))) begin
            failures++;
            $display("M_I=%0h output %0d at input %0d: fire=%0b mu=%0h", mi_fx, k, n, out_fire, mu);
          end
          if (k > 0) begin
            if ((tk >> MI_FRAC_W) - prev_int == 1) n_s1++; else n_s2++;
          end
          prev_int = tk >> MI_FRAC_W;
          k++;
        end else if (out_fire) begin
          failures++;
          $display("M_I=%0h unexpected output at input %0d", mi_fx, n);
        end
        n++;
      end else in_valid = 0;
    end
    @(posedge clk) #1 in_valid = 0;
  endtask

  initial begin
    run_phase(64'h1000000, 100);        // M_I = 1
    run_phase(64'h2000000, 200);        // M_I = 2
    run_phase(64'h1800000, 300);        // M_I = 1.5
    run_phase(64'h16a09e6, 500);        // M_I ~ sqrt(2)
    run_phase(64'h3fff000, 500);        // M_I just below 4
    run_phase(64'h1000001, 300);        // M_I just above 1
    checks++;
    if (n_s1 == 0 || n_s2 == 0) begin
      failures++; $display("shift counts s_k=1: %0d, s_k>1: %0d", n_s1, n_s2);
    end
    $display("s_k = 1 seen %0d times, s_k > 1 seen %0d times", n_s1, n_s2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
