// tb_sopot_mb: checks every product of the multiplier blocks of the HBF and of
// the odd-symmetric Farrow sub-filter C_1 against ordinary multiplication by
// the coefficient, for extreme and random inputs.
module tb_sopot_mb;
  import dif_pkg::*;

  localparam int NA = num_taps(F_HBF) / 2;
  localparam int NB = num_taps(F_C1) / 2;

  logic signed [DATA_W-1:0] x;
  logic signed [PROD_W-1:0] pa [NA];
  logic signed [PROD_W-1:0] pb [NB];
  int checks = 0, failures = 0;

  sopot_mb #(.FILT(F_HBF)) dut_a (.x(x), .prod(pa));
  sopot_mb #(.FILT(F_C1))  dut_b (.x(x), .prod(pb));

  task automatic check_all();
    #1;
    for (int u = 0; u < NA; u++) begin
      checks++;
      if (longint'(pa[u]) != longint'(x) * longint'(coef(F_HBF, u))) begin
        failures++;
        $display("HBF product %0d: x=%0d got %0d", u, x, pa[u]);
      end
    end
    for (int u = 0; u < NB; u++) begin
      checks++;
      if (longint'(pb[u]) != longint'(x) * longint'(coef(F_C1, u))) begin
        failures++;
        $display("C1 product %0d: x=%0d got %0d", u, x, pb[u]);
      end
    end
  endtask

  initial begin
    x = 16'sh7fff; check_all();
    x = -16'sh8000; check_all();
    x = 16'sd1; check_all();
    x = -16'sd1; check_all();
    for (int i = 0; i < 200; i++) begin
      x = DATA_W'($urandom);
      check_all();
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
