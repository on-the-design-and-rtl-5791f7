// sopot_mb: multiplier block of one fixed-coefficient filter.
//
// Forms x*c for every distinct coefficient c of the filter selected by FILT
// with shifts and additions only. Each 16-bit SOPOT coefficient is split at
// elaboration into canonical signed digits (CSD). The block first builds a
// shared bank of two-term sub-expressions of the input,
//     sp[j] = x + x*2^j   and   sm[j] = x*2^j - x,   j = 1 .. COEF_W,
// and then takes the digits of every coefficient two at a time, lowest first:
// digits (s1, k1), (s2, k2) become one shifted bank term, s1*sp[k2-k1]*2^k1
// when the signs agree and s2*sm[k2-k1]*2^k1 when they differ; an unpaired
// last digit adds a shifted copy of x. A coefficient of t digits thus costs
// ceil(t/2)-1 adders instead of t-1, plus its share of the bank, whose unused
// entries synthesis removes. For a linear-phase filter of T taps only the
// first T/2 coefficients are distinct; the mirrored taps reuse these products
// (negated for odd symmetry, in sopot_tfir).
//
// This is a simple common-sub-expression multiplier block of this design's
// own making: it shares two-digit patterns, but does not search for the
// minimum-adder graph.
//
// Interface: purely combinational, prod[u] = x * coef(FILT, u) for
// u = 0 .. T/2-1, full precision (PROD_W bits), scaled by 2^COEF_FRAC.
module sopot_mb
  import dif_pkg::*;
#(
  parameter filter_e FILT = F_LPF1,
  parameter int      NU   = num_taps(FILT) / 2
) (
  input  logic signed [DATA_W-1:0] x,
  output logic signed [PROD_W-1:0] prod [NU]
);

  logic signed [PROD_W-1:0] xe;
  logic signed [PROD_W-1:0] sp [COEF_W+1];   // x + x*2^j
  logic signed [PROD_W-1:0] sm [COEF_W+1];   // x*2^j - x

  assign xe = PROD_W'(x);

  always_comb begin
    sp[0] = xe <<< 1;
    sm[0] = '0;
    for (int j = 1; j <= COEF_W; j++) begin
      sp[j] = xe + (xe <<< j);
      sm[j] = (xe <<< j) - xe;
    end
  end

  for (genvar u = 0; u < NU; u++) begin : g_coef
    localparam int              C   = coef(FILT, u);
    localparam logic [COEF_W:0] POS = csd_pos(C);
    localparam logic [COEF_W:0] NEG = csd_neg(C);

    always_comb begin
      logic signed [PROD_W-1:0] acc;
      logic signed [PROD_W-1:0] term;
      logic                     open;   // a digit waits for its partner
      logic                     s1;     // its sign, 1 = negative
      int                       k1;
      acc  = '0;
      open = 1'b0;
      s1   = 1'b0;
      k1   = 0;
      for (int k = 0; k <= COEF_W; k++) begin
        if (POS[k] || NEG[k]) begin
          if (!open) begin
            open = 1'b1;
            s1   = NEG[k];
            k1   = k;
          end else begin
            open = 1'b0;
            if (s1 == NEG[k]) begin
              term = sp[k - k1] <<< k1;
              acc  = s1 ? acc - term : acc + term;
            end else begin
              term = sm[k - k1] <<< k1;
              acc  = NEG[k] ? acc - term : acc + term;
            end
          end
        end
      end
      if (open) acc = s1 ? acc - (xe <<< k1) : acc + (xe <<< k1);
      prod[u] = acc;
    end
  end

endmodule
