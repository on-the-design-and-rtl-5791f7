// tb_design_example: frequency response of the complete decimator in its
// reference configuration: no CIC, LPF#3, LPF#2, LPF#1, FDDF with M_I = 1 and
// with M_I = 2, HBF and the final /2. A complex tone of amplitude 30000
// (I = A cos wn, Q = A sin wn) is applied; because the chain is linear and
// real, the settled output envelope sqrt(I^2 + Q^2) is A * |H(w)| at every
// output sample, so each tone gives one point of the magnitude response.
// Passband tones up to 0.048*pi (M_I = 1) or 0.024*pi (M_I = 2) must stay
// within 0.01 dB of the DC gain; stopband tones from the HBF stopband edge
// (0.075*pi resp. 0.0375*pi) up to 0.9*pi must be at least 75 dB down. The
// worst values are printed. Output counts are checked against inputs / 16
// resp. / 32.
module tb_design_example;
  import dif_pkg::*;

  localparam real PI = 3.14159265358979;
  localparam real A = 30000.0;

  logic clk = 0, rst_n = 0, in_valid = 0;
  cfg_t cfg;
  logic signed [DATA_W-1:0] in_i = '0, in_q = '0;
  logic out_valid;
  logic signed [DATA_W-1:0] out_i, out_q;
  int checks = 0, failures = 0, n_out = 0;
  bit measuring = 0;
  real env_min, env_max;

  always #5 clk = ~clk;

  digital_if dut (.clk, .rst_n, .cfg, .in_valid, .in_i, .in_q, .out_valid, .out_i, .out_q);

  always @(posedge clk) begin
    #2;
    if (rst_n && out_valid) begin
      real env;
      n_out++;
      env = $sqrt(real'(out_i) * real'(out_i) + real'(out_q) * real'(out_q));
      if (measuring) begin
        if (env < env_min) env_min = env;
        if (env > env_max) env_max = env;
      end
    end
  end

  function automatic real db(real v);
    return 20.0 * $log10(v);
  endfunction

  // measure the envelope range of the output for a tone at w
  task automatic tone(real w, int n_in);
    rst_n = 0; in_valid = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    n_out = 0; measuring = 0; env_min = 1.0e9; env_max = 0.0;
    for (int n = 0; n < n_in; n++) begin
      @(posedge clk); #1;
      in_valid = 1;
      in_i = DATA_W'($rtoi(A * $cos(w * real'(n))));
      in_q = DATA_W'($rtoi(A * $sin(w * real'(n))));
      if (n == n_in / 2) measuring = 1;
    end
    @(posedge clk) #1 in_valid = 0;
    repeat (40) @(posedge clk);
    measuring = 0;
  endtask

  task automatic response(real mi, real pass_edge, real stop_edge);
    real ref_db, dev, worst_dev = 0.0, worst_att = 1000.0, ratio;
    real pass_f [5];
    real stop_f [5];
    cfg = '0;
    cfg.cic_bypass = 1;
    cfg.mi = MI_W'(longint'(mi * 16777216.0));
    ratio = 16.0 * mi;
    pass_f = '{0.002, 0.25 * pass_edge, 0.5 * pass_edge, 0.75 * pass_edge, 0.96 * pass_edge};
    stop_f = '{stop_edge, 1.3 * stop_edge, 0.3, 0.55, 0.9};
    ref_db = 0.0;
    foreach (pass_f[i]) begin
      tone(pass_f[i] * PI, 6000);
      if (i == 0) begin
        ref_db = db(0.5 * (env_min + env_max) / A);
        checks++;
        if (fabs(real'(n_out) - 6000.0 / ratio) > 3.0) begin
          failures++; $display("M_I=%0.1f: %0d outputs for 6000 inputs", mi, n_out);
        end
      end
      dev = fabs(db(env_min / A) - ref_db);
      if (fabs(db(env_max / A) - ref_db) > dev) dev = fabs(db(env_max / A) - ref_db);
      if (dev > worst_dev) worst_dev = dev;
    end
    foreach (stop_f[i]) begin
      real att;
      tone(stop_f[i] * PI, 6000);
      att = (env_max < 0.5) ? 120.0 : -db(env_max / A) + ref_db;
      if (att < worst_att) worst_att = att;
    end
    $display("M_I = %0.1f: passband deviation %0.4f dB up to %0.4f*pi, stopband attenuation %0.2f dB from %0.4f*pi",
             mi, worst_dev, 0.96 * pass_edge, worst_att, stop_edge);
    checks += 2;
    if (worst_dev > 0.01) begin failures++; $display("passband deviation too large"); end
    if (worst_att < 75.0) begin failures++; $display("stopband attenuation too small"); end
  endtask

  function automatic real fabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  initial begin
    response(1.0, 0.05, 0.075);
    response(2.0, 0.025, 0.0375);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
