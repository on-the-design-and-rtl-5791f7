// fddf: Farrow-structure fractional-delay filter used as sample rate changer.
//
// Four fixed sub-filters C_0(z) .. C_3(z) (36 taps each, transposed form with
// SOPOT multiplier blocks) run on every input sample. Whenever src_ctrl says
// that an output is due, the interpolation part evaluates the cubic in the
// delay parameter d by Horner's rule,
//     y = ((v3*d + v2)*d + v1)*d + v0,
// with the only three general multipliers of the decimator. The sub-filter
// coefficients never change; only d does, once per output.
//
// d is derived from the fractional phase mu in [0, 1) as d = 0.5 - mu, so
// that d covers the design range [-0.5, 0.5] and the output equals the band-
// limited input at time k*M_I - 18 input samples (group delay 17.5 + d).
// Number formats (this implementation's choice): d is Q1.15; the sub-filter
// outputs are rounded to V_W bits with 2 fraction bits below the 16-bit data
// LSB; each Horner product is rounded back to that scale; the result is
// rounded and saturated to 16 bits.
//
// Interface: in_valid/in_data one sample per clock at most; out_valid/out_data
// one strobe per output sample. With bypass set the input goes straight to the
// output (1 clock), as the MUX around the FDDF does.
// Timing: an output appears 4 clocks after the input sample that triggered it
// (sub-filter register, then three Horner stages).
module fddf
  import dif_pkg::*;
#(
  parameter int V_W   = 24,   // width of the rounded sub-filter outputs
  parameter int GUARD = 2     // fraction bits kept below the data LSB
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic signed [DATA_W-1:0] in_data,
  input  logic                     bypass,
  input  logic [MI_W-1:0]          mi,
  output logic                     out_valid,
  output logic signed [DATA_W-1:0] out_data
);

  localparam int NL = 4;              // interpolation order L = 3
  localparam int DF = DATA_W - 1;     // fraction bits of d
  localparam int PW = V_W + DATA_W;   // product width

  logic                   run;
  logic                   fire;
  logic [MI_FRAC_W-1:0]   mu;
  logic [NL-1:0]          sf_valid;
  logic signed [ACC_W-1:0] sf_v [NL];
  logic signed [V_W-1:0]  v    [NL];

  assign run = in_valid && !bypass;

  src_ctrl u_ctrl (.clk, .rst_n, .in_valid(run), .mi, .out_fire(fire), .mu);

  for (genvar l = 0; l < NL; l++) begin : g_sub
    localparam filter_e F = filter_e'(int'(F_C0) + l);
    sopot_tfir #(.FILT(F)) u_c (
      .clk, .rst_n, .in_valid(run), .x(in_data),
      .out_valid(sf_valid[l]), .v(sf_v[l])
    );
    // round the sub-filter output to V_W bits, GUARD bits below the data LSB
    localparam int SH = COEF_FRAC - GUARD;
    assign v[l] = V_W'((sf_v[l] + (ACC_W'(1) <<< (SH - 1))) >>> SH);
  end

  // multiply a V_W value by d (Q1.15) and round back to the V_W scale
  function automatic logic signed [V_W-1:0] mul_d(logic signed [V_W-1:0] a,
                                                  logic signed [DATA_W-1:0] d);
    logic signed [PW-1:0] p;
    p = PW'(a) * PW'(d);
    return V_W'((p + (PW'(1) <<< (DF - 1))) >>> DF);
  endfunction

  // stage 0: delay parameter registered alongside the sub-filter outputs
  logic                    s0_fire;
  logic signed [DATA_W-1:0] s0_d;
  // stage 1 and 2 of the Horner chain
  logic                    s1_fire, s2_fire;
  logic signed [V_W-1:0]   s1_h, s1_v1, s1_v0, s2_h, s2_v0;
  logic signed [DATA_W-1:0] s1_d, s2_d;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s0_fire <= 1'b0;  s1_fire <= 1'b0;  s2_fire <= 1'b0;
      s0_d    <= '0;    s1_d    <= '0;    s2_d    <= '0;
      s1_h    <= '0;    s1_v1   <= '0;    s1_v0   <= '0;
      s2_h    <= '0;    s2_v0   <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      s0_fire <= fire;
      // d = 0.5 - mu, mu truncated to DF fraction bits
      s0_d    <= DATA_W'(1 << (DF - 1)) - DATA_W'({1'b0, mu[MI_FRAC_W-1 -: DF]});

      s1_fire <= s0_fire && (&sf_valid);
      s1_h    <= mul_d(v[3], s0_d) + v[2];
      s1_v1   <= v[1];
      s1_v0   <= v[0];
      s1_d    <= s0_d;

      s2_fire <= s1_fire;
      s2_h    <= mul_d(s1_h, s1_d) + s1_v1;
      s2_v0   <= s1_v0;
      s2_d    <= s1_d;

      if (bypass) begin
        out_valid <= in_valid;
        if (in_valid) out_data <= in_data;
      end else begin
        out_valid <= s2_fire;
        if (s2_fire)
          out_data <= round_sat(ACC_W'(mul_d(s2_h, s2_d) + s2_v0), GUARD);
      end
    end
  end

endmodule
