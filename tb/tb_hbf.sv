// tb_hbf: self-checking test of the HBF stage (fir_stage, FILT=F_HBF).
// Three phases, each after a reset: filter with downsampling by two, filter
// without downsampling, and bypass. Every output is compared with a direct
// convolution of the input history with the coefficients, rounded half up and
// saturated to 16 bits; the latency (2 clocks filtered, 1 clock bypassed) and
// the number of outputs are checked as well. Inputs are random full-scale
// samples with random idle cycles, so saturation is exercised too.
module tb_hbf;
  import dif_pkg::*;
  import tb_ref_pkg::*;

  localparam filter_e FILT = F_HBF;
  localparam int T = num_taps(FILT);

  logic clk = 0, rst_n = 0, in_valid = 0, bypass_filter = 0, bypass_decim = 0;
  logic signed [DATA_W-1:0] in_data = '0;
  logic out_valid;
  logic signed [DATA_W-1:0] out_data;
  int checks = 0, failures = 0;
  int cycle = 0;

  typedef struct { longint val; int due; } exp_t;
  exp_t expq [$];
  longint hist [$];

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  fir_stage #(.FILT(FILT)) dut (
    .clk, .rst_n, .in_valid, .in_data, .bypass_filter, .bypass_decim,
    .out_valid, .out_data
  );

  // compare outputs with the expectation queue
  always @(posedge clk) begin
    #2;
    if (rst_n && out_valid) begin
      checks++;
      if (expq.size() == 0) begin
        failures++; $display("unexpected output %0d at cycle %0d", out_data, cycle);
      end else begin
        exp_t e;
        e = expq.pop_front();
        if (longint'(out_data) != e.val || cycle != e.due) begin
          failures++;
          $display("output %0d at cycle %0d, expected %0d at cycle %0d", out_data, cycle, e.val, e.due);
        end
      end
    end
  end

  task automatic run_phase(bit bf, bit bd, int n_in, int amp);
    int n = 0;
    int kept = 0;
    rst_n = 0; in_valid = 0;
    bypass_filter = bf; bypass_decim = bd;
    hist.delete();
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    while (n < n_in) begin
      @(posedge clk);
      #1;
      if ($urandom_range(4, 0) != 0) begin
        longint s = 0;
        in_data = DATA_W'(rand_sample(amp));
        in_valid = 1;
        hist.push_back(longint'(in_data));
        for (int k = 0; k < T && k < hist.size(); k++)
          s += longint'(coef(FILT, k)) * hist[hist.size() - 1 - k];
        if (bf || bd || (n % 2 == 0)) begin
          exp_t e;
          e.val = bf ? longint'(in_data) : ref_round_sat(s, COEF_FRAC);
          e.due = bf ? cycle + 1 : cycle + 2;
          expq.push_back(e);
          kept++;
        end
        n++;
      end else in_valid = 0;
    end
    @(posedge clk) #1 in_valid = 0;
    repeat (4) @(posedge clk);
    #3;
    checks++;
    if (expq.size() != 0) begin
      failures++; $display("%0d expected outputs missing", expq.size());
      expq.delete();
    end
  endtask

  initial begin
    run_phase(0, 0, 300, 32768);   // filter and /2, full scale
    run_phase(0, 0, 200, 2000);    // filter and /2, small signal
    run_phase(0, 1, 200, 32768);   // filter only
    run_phase(1, 1, 100, 32768);   // bypass
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
