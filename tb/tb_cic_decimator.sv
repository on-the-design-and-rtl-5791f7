// tb_cic_decimator: checks the CIC decimator for M_CIC = 1, 2, 3, 8 and 16
// against its equivalent FIR (the STAGES-fold convolution of a length-M
// boxcar) evaluated at every M-th input, followed by the same right shift,
// rounding and saturation. Also checks the constant latency of STAGES+1 clocks
// from the M-th input to the output, the output count, and the bypass path.
module tb_cic_decimator;
  import dif_pkg::*;
  import tb_ref_pkg::*;

  localparam int K = 4;

  logic clk = 0, rst_n = 0, in_valid = 0, bypass = 0;
  logic [CIC_M_W-1:0] m = 1;
  logic [CIC_SH_W-1:0] shift = 0;
  logic signed [DATA_W-1:0] in_data = '0;
  logic out_valid;
  logic signed [DATA_W-1:0] out_data;
  int checks = 0, failures = 0, cycle = 0;

  typedef struct { longint val; int due; } exp_t;
  exp_t expq [$];
  longint hist [$];
  longint h [$];

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  cic_decimator #(.STAGES(K)) dut (.clk, .rst_n, .in_valid, .in_data, .bypass, .m, .shift,
                                   .out_valid, .out_data);

  always @(posedge clk) begin
    #2;
    if (rst_n && out_valid) begin
      checks++;
      if (expq.size() == 0) begin
        failures++; $display("unexpected output at cycle %0d", cycle);
      end else begin
        exp_t e;
        e = expq.pop_front();
        if (longint'(out_data) != e.val || cycle != e.due) begin
          failures++;
          $display("M=%0d: output %0d at cycle %0d, expected %0d at cycle %0d", m, out_data, cycle, e.val, e.due);
        end
      end
    end
  end

  // impulse response of K cascaded length-M moving sums
  task automatic make_h(int mm);
    longint t [$];
    h.delete(); h.push_back(1);
    for (int s = 0; s < K; s++) begin
      t.delete();
      for (int i = 0; i < h.size() + mm - 1; i++) begin
        longint acc = 0;
        for (int j = 0; j < mm; j++)
          if (i - j >= 0 && i - j < h.size()) acc += h[i - j];
        t.push_back(acc);
      end
      h = t;
    end
  endtask

  task automatic run_phase(bit bp, int mm, int sh, int n_in);
    int n = 0;
    rst_n = 0; in_valid = 0; bypass = bp; m = CIC_M_W'(mm); shift = CIC_SH_W'(sh);
    hist.delete();
    make_h(mm);
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    while (n < n_in) begin
      @(posedge clk);
      #1;
      if ($urandom_range(3, 0) != 0) begin
        in_data = DATA_W'(rand_sample(32768));
        in_valid = 1;
        hist.push_back(longint'(in_data));
        if (bp) begin
          exp_t e; e.val = longint'(in_data); e.due = cycle + 1; expq.push_back(e);
        end else if (n % mm == mm - 1) begin
          exp_t e;
          longint s = 0;
          for (int k = 0; k < h.size() && k < hist.size(); k++)
            s += h[k] * hist[hist.size() - 1 - k];
          e.val = ref_round_sat(s, sh); e.due = cycle + K + 1; expq.push_back(e);
        end
        n++;
      end else in_valid = 0;
    end
    @(posedge clk) #1 in_valid = 0;
    repeat (K + 3) @(posedge clk);
    #3;
    checks++;
    if (expq.size() != 0) begin
      failures++; $display("%0d expected outputs missing", expq.size()); expq.delete();
    end
  endtask

  initial begin
    run_phase(0, 1, 0, 100);
    run_phase(0, 2, 4, 200);
    run_phase(0, 3, 7, 300);
    run_phase(0, 8, 12, 600);
    run_phase(0, 16, 16, 1200);
    run_phase(0, 16, 14, 400);   // too little shift: saturates
    run_phase(1, 8, 12, 100);    // bypass
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
