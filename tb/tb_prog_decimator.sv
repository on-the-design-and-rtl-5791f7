// tb_prog_decimator: one channel of the programmable decimator in three
// configurations:
//   A  CIC /4, LPF#3, LPF#2, LPF#1, FDDF M_I = 1.5, HBF and /2  (ratio 96)
//   B  everything bypassed except the HBF, no final /2          (ratio 1)
//   C  CIC /2, LPF#1 only, FDDF M_I = 1.75, HBF and /2          (ratio 14)
// For each it checks the number of outputs against inputs / ratio, the
// settled response to a constant input against the product of the stage DC
// gains computed from the coefficients (CIC gain M^4 / 2^shift), and that a
// tone in the stopband of the first active filter is suppressed by at
// least 60 dB.
module tb_prog_decimator;
  import dif_pkg::*;

  logic clk = 0, rst_n = 0, in_valid = 0;
  cfg_t cfg;
  logic signed [DATA_W-1:0] in_data = '0;
  logic out_valid;
  logic signed [DATA_W-1:0] out_data;
  int checks = 0, failures = 0;
  int n_out = 0;
  longint sum_out = 0;
  int max_abs = 0, min_out = 0, max_out = 0;
  bit measuring = 0;

  always #5 clk = ~clk;

  prog_decimator dut (.clk, .rst_n, .cfg, .in_valid, .in_data, .out_valid, .out_data);

  always @(posedge clk) begin
    #2;
    if (rst_n && out_valid) begin
      n_out++;
      if (measuring) begin
        sum_out += longint'(out_data);
        if (out_data > max_out) max_out = out_data;
        if (out_data < min_out) min_out = out_data;
      end
    end
  end

  function automatic real fabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  function automatic real dc_gain(filter_e f);
    longint s = 0;
    for (int i = 0; i < num_taps(f); i++) s += coef(f, i);
    return real'(s) / 32768.0;
  endfunction

  function automatic real chain_gain(cfg_t c);
    real g = 1.0;
    if (!c.cic_bypass) g = g * real'(c.cic_m) ** 4 / real'(64'sd1 << c.cic_shift);
    if (!c.lpf3_bypass) g = g * dc_gain(F_LPF3);
    if (!c.lpf2_bypass) g = g * dc_gain(F_LPF2);
    if (!c.lpf1_bypass) g = g * dc_gain(F_LPF1);
    if (!c.fddf_bypass) g = g * dc_gain(F_C0);   // d-terms have near-zero DC gain
    g = g * dc_gain(F_HBF);
    return g;
  endfunction

  // mode 0: constant amp; mode 1: tone at w rad/sample
  task automatic run(cfg_t c, int n_in, int settle_in, int mode, real w, real ratio, string name);
    real g, avg, expect_amp;
    int n_meas;
    cfg = c; rst_n = 0; in_valid = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    n_out = 0; sum_out = 0; max_out = -100000; min_out = 100000; measuring = 0;
    for (int n = 0; n < n_in; n++) begin
      @(posedge clk); #1;
      in_valid = 1;
      in_data = (mode == 0) ? 16'sd8000 : DATA_W'($rtoi(16000.0 * $sin(w * real'(n))));
      if (n == settle_in) begin measuring = 1; n_meas = n_out; end
    end
    @(posedge clk) #1 in_valid = 0;
    repeat (60) @(posedge clk);
    measuring = 0;
    // rate
    checks++;
    if (fabs(real'(n_out) - real'(n_in) / ratio) > 3.0) begin
      failures++; $display("%s: %0d outputs for %0d inputs, ratio %f expected", name, n_out, n_in, ratio);
    end
    g = chain_gain(c);
    if (mode == 0) begin
      avg = real'(sum_out) / real'(n_out - n_meas);
      expect_amp = 8000.0 * g;
      checks++;
      if (fabs(avg - expect_amp) > 0.002 * expect_amp + 4.0 || (max_out - min_out) > 8) begin
        failures++;
        $display("%s: DC output mean %f (range %0d..%0d), expected %f", name, avg, min_out, max_out, expect_amp);
      end
    end else begin
      checks++;
      if (max_out > 16 || min_out < -16) begin
        failures++; $display("%s: stopband tone leaks, output range %0d..%0d", name, min_out, max_out);
      end
    end
    $display("%s: %0d inputs, %0d outputs, gain %f", name, n_in, n_out, g);
  endtask

  initial begin
    cfg_t a, b, c;
    a = '0; a.cic_m = 4; a.cic_shift = 8; a.mi = MI_W'(64'h1800000);
    b = '0; b.cic_bypass = 1; b.lpf3_bypass = 1; b.lpf2_bypass = 1; b.lpf1_bypass = 1;
    b.fddf_bypass = 1; b.dec2_bypass = 1; b.mi = MI_W'(64'h1000000);
    c = '0; c.cic_m = 2; c.cic_shift = 4; c.lpf3_bypass = 1; c.lpf2_bypass = 1;
    c.mi = MI_W'(64'h1c00000);
    run(a, 20000, 8000, 0, 0.0, 96.0, "A dc");
    run(a, 20000, 8000, 1, 0.6 * 3.14159265, 96.0, "A stopband tone");
    run(b, 2000, 200, 0, 0.0, 1.0, "B dc");
    run(b, 2000, 200, 1, 0.8 * 3.14159265, 1.0, "B stopband tone");
    run(c, 4000, 1000, 0, 0.0, 14.0, "C dc");
    run(c, 4000, 1000, 1, 0.9 * 3.14159265, 14.0, "C stopband tone");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
