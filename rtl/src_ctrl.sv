// src_ctrl: delay-parameter and shift control of the Farrow sample rate
// changer (the unit driven by M_I).
//
// Output k of the rate changer falls at time k*M_I, counted in input samples.
// Its fractional delay is mu_k = k*M_I - floor(k*M_I) and between outputs
// k-1 and k exactly s_k = floor(k*M_I) - floor((k-1)*M_I) new input samples
// enter the filter's delay line. The unit keeps frac(k*M_I) in a phase
// register and s_k in a down-counter: at each input it either counts down or,
// when the count is zero, flags that an output is due at this input, presents
// mu_k, adds M_I to the phase and reloads the counter with floor(sum) - 1.
//
// M_I is unsigned fixed point MI_INT_W.MI_FRAC_W and must be at least 1.0
// (decimation); a smaller value is treated as 1. The fixed-point phase and
// this clamp are this implementation's choices. out_fire and mu are
// combinational, valid in the cycle of in_valid. Output k = 0 is at the first
// input after reset.
module src_ctrl
  import dif_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic [MI_W-1:0]      mi,
  output logic                 out_fire,
  output logic [MI_FRAC_W-1:0] mu
);

  logic [MI_INT_W:0]    cnt;     // inputs still to skip before the next output
  logic [MI_FRAC_W-1:0] frac;    // frac(k * M_I)
  logic [MI_W:0]        sum;
  logic [MI_INT_W:0]    step;    // floor(frac + M_I) = s_{k+1}

  assign out_fire = in_valid && (cnt == '0);
  assign mu       = frac;
  assign sum      = {1'b0, mi} + (MI_W+1)'(frac);
  assign step     = sum[MI_W:MI_FRAC_W];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt  <= '0;
      frac <= '0;
    end else if (in_valid) begin
      if (cnt == '0) begin
        frac <= sum[MI_FRAC_W-1:0];
        cnt  <= (step == '0) ? '0 : step - 1'b1;
      end else begin
        cnt <= cnt - 1'b1;
      end
    end
  end

endmodule
