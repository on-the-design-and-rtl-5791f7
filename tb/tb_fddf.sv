// tb_fddf: checks the Farrow sample rate changer.
//  1. Random full-scale input, several M_I: each output must appear 4 clocks
//     after the input floor(k*M_I), and equal the Farrow sum
//     sum_l v_l * d^l with v_l the direct convolution of the input with the
//     sub-filter C_l and d = 0.5 - frac(k*M_I), evaluated in real arithmetic
//     (within 2 LSB, the rounding of the fixed-point Horner chain).
//  2. A passband sine: the output must match the sine at time k*M_I - 18 input
//     samples (filter delay), within 40 LSB (0.12 % of full scale).
//  3. Bypass: the input appears unchanged one clock later.
module tb_fddf;
  import dif_pkg::*;
  import tb_ref_pkg::*;

  localparam int T = num_taps(F_C0);
  localparam real PI = 3.14159265358979;

  logic clk = 0, rst_n = 0, in_valid = 0, bypass = 0;
  logic [MI_W-1:0] mi = '0;
  logic signed [DATA_W-1:0] in_data = '0;
  logic out_valid;
  logic signed [DATA_W-1:0] out_data;
  int checks = 0, failures = 0, cycle = 0;
  real max_err_sine = 0.0;

  typedef struct { real val; int due; real tol; } exp_t;
  exp_t expq [$];
  longint hist [$];

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  fddf dut (.clk, .rst_n, .in_valid, .in_data, .bypass, .mi, .out_valid, .out_data);

  always @(posedge clk) begin
    #2;
    if (rst_n && out_valid) begin
      checks++;
      if (expq.size() == 0) begin
        failures++; $display("unexpected output at cycle %0d", cycle);
      end else begin
        exp_t e;
        real err;
        e = expq.pop_front();
        err = real'(out_data) - e.val;
        if (err < 0) err = -err;
        if (e.tol >= 40.0 && err > max_err_sine) max_err_sine = err;
        if (err > e.tol || cycle != e.due) begin
          failures++;
          $display("M_I=%0h: output %0d at cycle %0d, expected %f at cycle %0d", mi, out_data, cycle, e.val, e.due);
        end
      end
    end
  end

  // mode 0: random, mode 1: sine at w (rad/sample), mode 2: bypass
  task automatic run_phase(int mode, longint mi_fx, int n_in, real w);
    longint k = 0;
    rst_n = 0; in_valid = 0; bypass = (mode == 2); mi = MI_W'(mi_fx);
    hist.delete();
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (longint n = 0; n < n_in; ) begin
      @(posedge clk);
      #1;
      if ($urandom_range(3, 0) != 0) begin
        in_valid = 1;
        if (mode == 1) in_data = DATA_W'($rtoi(20000.0 * $sin(w * real'(n)) + 0.5 * (n >= 0 ? 1 : -1)));
        else in_data = DATA_W'(rand_sample(32768));
        hist.push_back(longint'(in_data));
        if (mode == 2) begin
          exp_t e; e.val = real'(in_data); e.due = cycle + 1; e.tol = 0.0; expq.push_back(e);
        end else if (((k * mi_fx) >> MI_FRAC_W) == n) begin
          exp_t e;
          longint frac = (k * mi_fx) & ((64'sd1 << MI_FRAC_W) - 1);
          real d = (16384.0 - real'(frac >> (MI_FRAC_W - 15))) / 32768.0;
          real y = 0.0;
          for (int l = 3; l >= 0; l--) begin
            longint s = 0;
            for (int i = 0; i < T && i < hist.size(); i++)
              s += longint'(coef(filter_e'(int'(F_C0) + l), i)) * hist[hist.size() - 1 - i];
            y = y * d + real'(s) / 32768.0;
          end
          if (y > 32767.0) y = 32767.0;
          if (y < -32768.0) y = -32768.0;
          e.due = cycle + 4;
          if (mode == 1) begin
            real t = real'(k * mi_fx) / real'(64'sd1 << MI_FRAC_W) - 18.0;
            e.val = (t < 18.0) ? y : 20000.0 * $sin(w * t);
            e.tol = (t < 18.0) ? 2.0 : 40.0;
          end else begin
            e.val = y; e.tol = 2.0;
          end
          expq.push_back(e);
          k++;
        end
        n++;
      end else in_valid = 0;
    end
    @(posedge clk) #1 in_valid = 0;
    repeat (8) @(posedge clk);
    #3;
    checks++;
    if (expq.size() != 0) begin
      failures++; $display("%0d expected outputs missing", expq.size()); expq.delete();
    end
  endtask

  initial begin
    run_phase(0, 64'h1000000, 200, 0.0);   // M_I = 1
    run_phase(0, 64'h2000000, 200, 0.0);   // M_I = 2
    run_phase(0, 64'h16a09e6, 400, 0.0);   // M_I ~ sqrt(2)
    run_phase(0, 64'h1333333, 400, 0.0);   // M_I = 1.2
    run_phase(1, 64'h16a09e6, 600, 0.3 * PI);
    run_phase(1, 64'h1c00000, 600, 0.11 * PI);
    run_phase(2, 64'h1800000, 100, 0.0);
    $display("largest deviation from the ideal delayed sine: %f LSB", max_err_sine);
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
