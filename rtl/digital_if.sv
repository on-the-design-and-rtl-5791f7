// digital_if: I/Q programmable decimator and sample rate changer of a
// software radio receiver's digital IF.
//
// After quadrature mixing, the in-phase and quadrature samples each pass
// through an identical multiplier-less programmable decimator
// (prog_decimator). Both channels share one configuration, so their output
// strobes coincide; out_valid is the I channel's strobe and an assertion
// checks that the Q channel agrees.
//
// Interface: in_valid with in_i/in_q at the ADC-side rate (at most one sample
// pair per clock), cfg static while running, out_valid with out_i/out_q at
// the output rate. The mixers, the oscillator and the ADC are outside.
module digital_if
  import dif_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst_n,
  input  cfg_t                     cfg,
  input  logic                     in_valid,
  input  logic signed [DATA_W-1:0] in_i,
  input  logic signed [DATA_W-1:0] in_q,
  output logic                     out_valid,
  output logic signed [DATA_W-1:0] out_i,
  output logic signed [DATA_W-1:0] out_q
);

  logic valid_q;

  prog_decimator u_chan_i (
    .clk, .rst_n, .cfg, .in_valid, .in_data(in_i),
    .out_valid, .out_data(out_i)
  );

  prog_decimator u_chan_q (
    .clk, .rst_n, .cfg, .in_valid, .in_data(in_q),
    .out_valid(valid_q), .out_data(out_q)
  );

  a_iq_aligned: assert property (@(posedge clk) disable iff (!rst_n)
    valid_q == out_valid)
    else $error("I and Q output strobes differ");

endmodule
