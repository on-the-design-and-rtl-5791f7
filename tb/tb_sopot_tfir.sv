// tb_sopot_tfir: drives the transposed-form sub-filters of LPF#3 (even
// symmetry) and Farrow C_1 (odd symmetry) with random samples and random idle
// cycles and compares each full-precision output, one clock after its input,
// with a direct-form convolution of the input history.
module tb_sopot_tfir;
  import dif_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [DATA_W-1:0] x = '0;
  logic va, vb;
  logic signed [ACC_W-1:0] ya, yb;
  int checks = 0, failures = 0;
  longint hist [$];
  longint exp_a, exp_b;
  bit pending = 0;

  always #5 clk = ~clk;

  sopot_tfir #(.FILT(F_LPF3)) dut_a (.clk, .rst_n, .in_valid, .x, .out_valid(va), .v(ya));
  sopot_tfir #(.FILT(F_C1))   dut_b (.clk, .rst_n, .in_valid, .x, .out_valid(vb), .v(yb));

  function automatic longint conv(filter_e f);
    longint s = 0;
    for (int k = 0; k < num_taps(f) && k < hist.size(); k++)
      s += longint'(coef(f, k)) * hist[hist.size() - 1 - k];
    return s;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < 400; i++) begin
      @(posedge clk);
      #1;
      // check the output produced for the previous input
      if (pending) begin
        checks += 2;
        if (!va || longint'(ya) != exp_a) begin failures++; $display("LPF3 n=%0d got %0d exp %0d", i, ya, exp_a); end
        if (!vb || longint'(yb) != exp_b) begin failures++; $display("C1 n=%0d got %0d exp %0d", i, yb, exp_b); end
      end else if (va || vb) begin
        checks++; failures++; $display("unexpected output strobe");
      end
      pending = 0;
      if ($urandom_range(3, 0) != 0) begin
        x        = (i < 40) ? DATA_W'(i == 0 ? 1 : 0) : DATA_W'($urandom);
        in_valid = 1;
      end else in_valid = 0;
      if (in_valid) begin
        hist.push_back(longint'(x));
        exp_a = conv(F_LPF3);
        exp_b = conv(F_C1);
        pending = 1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
