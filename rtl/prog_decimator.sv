// prog_decimator: one channel of the multiplier-less programmable decimator
// and sample rate changer.
//
// Chain, each stage with a bypass multiplexer:
//   CIC (/M_CIC) -> LPF#3 (/2) -> LPF#2 (/2) -> LPF#1 (/2)
//     -> Farrow FDDF (/M_I) -> HBF -> /2
// The HBF is always in the path; only the /2 after it can be bypassed. The
// overall ratio is M_CIC * 2^m * M_I, times 2 when the final /2 is used,
// where m is the number of LPF stages in use. The FDDF takes the output of
// the integer decimators directly, with no interpolating L-band filter in
// between, and the fixed HBF after it replaces a programmable channel FIR.
// Every filter except the interpolation part of the FDDF is built from shifts
// and adds.
//
// Interface: in_valid/in_data at the input rate (at most one per clock), cfg
// the static configuration (change it only while idle or in reset),
// out_valid/out_data at the output rate. No back-pressure.
module prog_decimator
  import dif_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst_n,
  input  cfg_t                     cfg,
  input  logic                     in_valid,
  input  logic signed [DATA_W-1:0] in_data,
  output logic                     out_valid,
  output logic signed [DATA_W-1:0] out_data
);

  logic                     v_cic, v_l3, v_l2, v_l1, v_fd;
  logic signed [DATA_W-1:0] d_cic, d_l3, d_l2, d_l1, d_fd;

  cic_decimator u_cic (
    .clk, .rst_n, .in_valid, .in_data,
    .bypass(cfg.cic_bypass), .m(cfg.cic_m), .shift(cfg.cic_shift),
    .out_valid(v_cic), .out_data(d_cic)
  );

  fir_stage #(.FILT(F_LPF3)) u_lpf3 (
    .clk, .rst_n, .in_valid(v_cic), .in_data(d_cic),
    .bypass_filter(cfg.lpf3_bypass), .bypass_decim(cfg.lpf3_bypass),
    .out_valid(v_l3), .out_data(d_l3)
  );

  fir_stage #(.FILT(F_LPF2)) u_lpf2 (
    .clk, .rst_n, .in_valid(v_l3), .in_data(d_l3),
    .bypass_filter(cfg.lpf2_bypass), .bypass_decim(cfg.lpf2_bypass),
    .out_valid(v_l2), .out_data(d_l2)
  );

  fir_stage #(.FILT(F_LPF1)) u_lpf1 (
    .clk, .rst_n, .in_valid(v_l2), .in_data(d_l2),
    .bypass_filter(cfg.lpf1_bypass), .bypass_decim(cfg.lpf1_bypass),
    .out_valid(v_l1), .out_data(d_l1)
  );

  fddf u_fddf (
    .clk, .rst_n, .in_valid(v_l1), .in_data(d_l1),
    .bypass(cfg.fddf_bypass), .mi(cfg.mi),
    .out_valid(v_fd), .out_data(d_fd)
  );

  fir_stage #(.FILT(F_HBF)) u_hbf (
    .clk, .rst_n, .in_valid(v_fd), .in_data(d_fd),
    .bypass_filter(1'b0), .bypass_decim(cfg.dec2_bypass),
    .out_valid, .out_data
  );

endmodule
