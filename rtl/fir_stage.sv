// fir_stage: fixed anti-aliasing filter followed by a downsampler by two,
// each with a bypass multiplexer.
//
// The filter (LPF#3, LPF#2, LPF#1 or the HBF, chosen by FILT) is a
// transposed-form FIR with a multiplier-less SOPOT multiplier block
// (sopot_tfir). Its full-precision output is rounded (half up) and saturated
// back to 16 bits. The downsampler keeps the first of every two filter
// outputs after reset or after leaving bypass. In the programmable decimator
// the LPF stages drive bypass_filter and bypass_decim together (one MUX around
// "LPF /2"), while the HBF stage is never bypassed and only its /2 has a MUX.
//
// Interface: in_valid/in_data at most one sample per clock, out_valid/out_data
// one strobe per kept sample; no back-pressure.
// Timing: filtered output 2 clocks after the input sample; in bypass 1 clock.
// Structure and band edges follow the design; the rounding, the kept phase of
// the downsampler and the register timing are this implementation's choices.
module fir_stage
  import dif_pkg::*;
#(
  parameter filter_e FILT = F_LPF1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic signed [DATA_W-1:0] in_data,
  input  logic                     bypass_filter,
  input  logic                     bypass_decim,
  output logic                     out_valid,
  output logic signed [DATA_W-1:0] out_data
);

  logic                    fir_valid;
  logic signed [ACC_W-1:0] fir_v;
  logic                    phase;     // 1: next filter output is dropped

  sopot_tfir #(.FILT(FILT)) u_fir (
    .clk, .rst_n,
    .in_valid (in_valid && !bypass_filter),
    .x        (in_data),
    .out_valid(fir_valid),
    .v        (fir_v)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase     <= 1'b0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else if (bypass_filter) begin
      phase     <= 1'b0;
      out_valid <= in_valid;
      if (in_valid) out_data <= in_data;
    end else begin
      out_valid <= fir_valid && (bypass_decim || !phase);
      if (fir_valid) begin
        phase    <= bypass_decim ? 1'b0 : !phase;
        out_data <= round_sat(fir_v, COEF_FRAC);
      end
    end
  end

endmodule
