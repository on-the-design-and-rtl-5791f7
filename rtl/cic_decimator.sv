// cic_decimator: optional cascaded integrator-comb decimator by M_CIC.
//
// Hogenauer structure with STAGES integrators running at the input rate, a
// decimation counter that passes every m-th integrator value, and STAGES
// combs (differential delay 1) running at the output rate. The integrators
// use wrap-around two's-complement arithmetic on REG_W bits, which is exact
// for m <= M_MAX. The CIC gain m^STAGES is removed by a programmable right
// shift with rounding and saturation to 16 bits (exact for power-of-two m).
// With bypass set the input is passed to the output one clock later, as the
// multiplexer around the CIC does in the programmable decimator.
//
// The design only names this filter as a well-known, optional first stage;
// the number of stages, M_MAX, the gain handling and the timing are this
// implementation's choices. m = 0 is treated as 1.
// Timing: an output strobe follows the m-th input by STAGES+1 clocks
// (integrator pipeline, then one registered comb chain).
module cic_decimator
  import dif_pkg::*;
#(
  parameter int STAGES = 4,
  parameter int M_MAX  = 16,
  parameter int REG_W  = DATA_W + STAGES * $clog2(M_MAX)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic signed [DATA_W-1:0] in_data,
  input  logic                     bypass,
  input  logic [CIC_M_W-1:0]       m,
  input  logic [CIC_SH_W-1:0]      shift,
  output logic                     out_valid,
  output logic signed [DATA_W-1:0] out_data
);

  logic signed [REG_W-1:0] integ [STAGES];
  logic [STAGES-1:0]       iv;          // integrator pipeline valid
  logic signed [REG_W-1:0] comb_d [STAGES];
  logic [CIC_M_W-1:0]      cnt;
  logic                    fire;
  logic [CIC_M_W-1:0]      m_eff;

  assign m_eff = (m == '0) ? CIC_M_W'(1) : m;
  assign fire  = iv[STAGES-1] && (cnt == m_eff - 1'b1);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < STAGES; i++) begin
        integ[i]  <= '0;
        comb_d[i] <= '0;
      end
      iv        <= '0;
      cnt       <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else if (bypass) begin
      out_valid <= in_valid;
      if (in_valid) out_data <= in_data;
    end else begin
      // integrators: stage i adds the registered value of stage i-1
      iv <= {iv[STAGES-2:0], in_valid};
      if (in_valid) integ[0] <= integ[0] + REG_W'(in_data);
      for (int i = 1; i < STAGES; i++)
        if (iv[i-1]) integ[i] <= integ[i] + integ[i-1];
      // decimation and combs
      out_valid <= fire;
      if (iv[STAGES-1]) cnt <= fire ? '0 : cnt + 1'b1;
      if (fire) begin
        logic signed [REG_W-1:0] c;
        c = integ[STAGES-1];
        for (int i = 0; i < STAGES; i++) begin
          comb_d[i] <= c;
          c = c - comb_d[i];
        end
        out_data <= round_sat(ACC_W'(c), int'(shift));
      end
    end
  end

endmodule
