// tb_digital_if: end-to-end test of the I/Q digital IF decimator at its
// default sizes. A complex tone (I = A cos wn, Q = A sin wn) in the passband
// is decimated in four configurations that together use every stage and every
// bypass multiplexer, with integer and non-integer sample rate change
// factors. For each it checks
//   - the number of output pairs against inputs / overall ratio,
//   - that the settled output envelope sqrt(I^2 + Q^2) equals A times the
//     product of the stage DC gains computed from the coefficients (0.5 %),
//     which also shows that I and Q stay aligned,
// and, in configuration A, that an input tone in the stopband is suppressed.
// It counts how often each mechanism ran (CIC decimation and its bypass, each
// LPF filtering and bypassed, FDDF outputs with one and with several new input
// samples, FDDF bypass, final /2 used and bypassed) and fails any that never
// happened.
module tb_digital_if;
  import dif_pkg::*;

  localparam real PI = 3.14159265358979;

  logic clk = 0, rst_n = 0, in_valid = 0;
  cfg_t cfg;
  logic signed [DATA_W-1:0] in_i = '0, in_q = '0;
  logic out_valid;
  logic signed [DATA_W-1:0] out_i, out_q;
  int checks = 0, failures = 0;
  int n_out = 0;
  bit measuring = 0;
  real env_min, env_max;
  int peak;

  // mechanism counters
  int c_cic = 0, c_cic_bp = 0, c_lpf_f [3] = '{0, 0, 0}, c_lpf_bp [3] = '{0, 0, 0};
  int c_sk1 = 0, c_skn = 0, c_fd_bp = 0, c_dec2 = 0, c_dec2_bp = 0;
  int fd_inputs_since = 0;

  always #5 clk = ~clk;

  digital_if dut (.clk, .rst_n, .cfg, .in_valid, .in_i, .in_q, .out_valid, .out_i, .out_q);

  always @(posedge clk) begin
    #2;
    if (rst_n) begin
      if (dut.u_chan_i.u_cic.out_valid) begin
        if (cfg.cic_bypass) c_cic_bp++; else c_cic++;
      end
      if (dut.u_chan_i.u_lpf3.out_valid) begin
        if (cfg.lpf3_bypass) c_lpf_bp[0]++; else c_lpf_f[0]++;
      end
      if (dut.u_chan_i.u_lpf2.out_valid) begin
        if (cfg.lpf2_bypass) c_lpf_bp[1]++; else c_lpf_f[1]++;
      end
      if (dut.u_chan_i.u_lpf1.out_valid) begin
        if (cfg.lpf1_bypass) c_lpf_bp[2]++; else c_lpf_f[2]++;
      end
      if (dut.u_chan_i.u_fddf.out_valid && cfg.fddf_bypass) c_fd_bp++;
      if (out_valid) begin
        real env;
        if (cfg.dec2_bypass) c_dec2_bp++; else c_dec2++;
        n_out++;
        env = $sqrt(real'(out_i) * real'(out_i) + real'(out_q) * real'(out_q));
        if (measuring) begin
          if (env < env_min) env_min = env;
          if (env > env_max) env_max = env;
          if (out_i > peak) peak = out_i;
          if (-out_i > peak) peak = -out_i;
        end
      end
    end
  end

  // FDDF control: count new inputs between outputs (s_k)
  always @(posedge clk) begin
    if (rst_n && !cfg.fddf_bypass && dut.u_chan_i.u_fddf.run) begin
      if (dut.u_chan_i.u_fddf.fire) begin
        if (fd_inputs_since == 1) c_sk1++;
        else if (fd_inputs_since > 1) c_skn++;
        fd_inputs_since = 1;
      end else fd_inputs_since++;
    end
  end

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
    if (!c.fddf_bypass) g = g * dc_gain(F_C0);
    return g * dc_gain(F_HBF);
  endfunction

  function automatic real fabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  // stop = 1: real tone in the stopband, check suppression only
  task automatic run(cfg_t c, real ratio, int n_in, bit stop, real w, string name);
    real g, a_exp;
    int settle = n_in / 2;
    cfg = c; rst_n = 0; in_valid = 0;
    fd_inputs_since = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    n_out = 0; measuring = 0; env_min = 1.0e9; env_max = 0.0; peak = 0;
    for (int n = 0; n < n_in; n++) begin
      @(posedge clk); #1;
      in_valid = 1;
      in_i = DATA_W'($rtoi(12000.0 * $cos(w * real'(n))));
      in_q = stop ? DATA_W'($rtoi(12000.0 * $cos(w * real'(n) + 1.0)))
                  : DATA_W'($rtoi(12000.0 * $sin(w * real'(n))));
      if (n == settle) measuring = 1;
    end
    @(posedge clk) #1 in_valid = 0;
    repeat (60) @(posedge clk);
    measuring = 0;
    checks++;
    if (fabs(real'(n_out) - real'(n_in) / ratio) > 3.0) begin
      failures++; $display("%s: %0d outputs for %0d inputs, ratio %f", name, n_out, n_in, ratio);
    end
    g = chain_gain(c);
    a_exp = 12000.0 * g;
    checks++;
    if (stop) begin
      if (env_max > 16.0) begin
        failures++; $display("%s: stopband tone leaks, envelope up to %f", name, env_max);
      end
    end else if (fabs(env_min - a_exp) > 0.005 * a_exp || fabs(env_max - a_exp) > 0.005 * a_exp) begin
      failures++;
      $display("%s: envelope %f..%f, expected %f", name, env_min, env_max, a_exp);
    end
    $display("%s: %0d inputs, %0d outputs, envelope %f..%f (expected %f)", name, n_in, n_out,
             env_min, env_max, stop ? 0.0 : a_exp);
  endtask

  task automatic mech(string name, int cnt);
    checks++;
    $display("mechanism %-28s %0d", name, cnt);
    if (cnt == 0) begin failures++; $display("mechanism %s never happened", name); end
  endtask

  initial begin
    cfg_t a, b, c, d;
    // A: every stage: 4 * 2 * 2 * 2 * 1.5 * 2 = 96
    a = '0; a.cic_m = 4; a.cic_shift = 8; a.mi = MI_W'(64'h1800000);
    // B: only the HBF
    b = '0; b.cic_bypass = 1; b.lpf3_bypass = 1; b.lpf2_bypass = 1; b.lpf1_bypass = 1;
    b.fddf_bypass = 1; b.dec2_bypass = 1; b.mi = MI_W'(64'h1000000);
    // C: CIC /2, LPF#1, FDDF 1.75, HBF, /2: 2 * 2 * 1.75 * 2 = 14
    c = '0; c.cic_m = 2; c.cic_shift = 4; c.lpf3_bypass = 1; c.lpf2_bypass = 1;
    c.mi = MI_W'(64'h1c00000);
    // D: no CIC, LPF#3, LPF#2, FDDF sqrt(2), HBF, no /2: 4 * 1.41421 = 5.657
    d = '0; d.cic_bypass = 1; d.lpf1_bypass = 1; d.dec2_bypass = 1;
    d.mi = MI_W'(64'h16a09e6);

    run(a, 96.0, 30000, 0, 0.05 * PI / 96.0, "A all stages");
    run(a, 96.0, 20000, 1, 0.6 * PI, "A stopband tone");
    run(b, 1.0, 2000, 0, 0.05 * PI, "B HBF only");
    run(c, 14.0, 6000, 0, 0.05 * PI / 14.0, "C CIC+LPF1+FDDF");
    run(d, 4.0 * real'(64'h16a09e6) / real'(64'h1000000), 6000, 0, 0.05 * PI / 5.657, "D LPF3+LPF2+FDDF");

    mech("CIC decimation", c_cic);
    mech("CIC bypass", c_cic_bp);
    mech("LPF#3 filter and /2", c_lpf_f[0]);
    mech("LPF#3 bypass", c_lpf_bp[0]);
    mech("LPF#2 filter and /2", c_lpf_f[1]);
    mech("LPF#2 bypass", c_lpf_bp[1]);
    mech("LPF#1 filter and /2", c_lpf_f[2]);
    mech("LPF#1 bypass", c_lpf_bp[2]);
    mech("FDDF output, s_k = 1", c_sk1);
    mech("FDDF output, s_k > 1", c_skn);
    mech("FDDF bypass", c_fd_bp);
    mech("HBF with /2", c_dec2);
    mech("HBF without /2", c_dec2_bp);
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
