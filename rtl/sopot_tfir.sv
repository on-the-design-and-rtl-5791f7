// sopot_tfir: transposed-form FIR sub-filter with a SOPOT multiplier block.
//
// The input sample is multiplied by all coefficients at once in sopot_mb
// (shifts and adds only) and the products are summed along a chain of
// registers and adders: z[i] <= c[i+1]*x + z[i+1], v = c[0]*x + z[0]. This is
// the transposed structure of C_l(z) of the Farrow filter and is used for all
// other fixed FIR filters of the decimator as well. Accumulation is kept at
// full precision (ACC_W bits, scale 2^COEF_FRAC relative to the input).
//
// Timing: the filter advances once per in_valid; v is registered and
// out_valid follows in_valid by one clock. Registers are cleared by the
// synchronous active-low reset (reset behaviour is this design's choice).
module sopot_tfir
  import dif_pkg::*;
#(
  parameter filter_e FILT = F_LPF1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic signed [DATA_W-1:0] x,
  output logic                     out_valid,
  output logic signed [ACC_W-1:0]  v
);

  localparam int  T   = num_taps(FILT);
  localparam int  NU  = T / 2;
  localparam bit  SYM = is_sym(FILT);

  logic signed [PROD_W-1:0] prod [NU];
  logic signed [ACC_W-1:0]  tap  [T];   // c[n] * x for each tap n
  logic signed [ACC_W-1:0]  z    [T-1]; // transposed delay line

  sopot_mb #(.FILT(FILT), .NU(NU)) u_mb (.x(x), .prod(prod));

  always_comb begin
    for (int n = 0; n < NU; n++) begin
      tap[n]       = ACC_W'(prod[n]);
      tap[T-1-n]   = SYM ? ACC_W'(prod[n]) : -ACC_W'(prod[n]);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < T-1; i++) z[i] <= '0;
      v         <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        v <= tap[0] + z[0];
        for (int i = 0; i < T-2; i++) z[i] <= tap[i+1] + z[i+1];
        z[T-2] <= tap[T-1];
      end
    end
  end

endmodule
