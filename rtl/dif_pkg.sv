// dif_pkg: shared types, constants and coefficient sets of the multiplier-less
// digital IF decimator (programmable decimator + Farrow sample rate changer).
//
// All fixed filters are linear-phase FIRs of even length whose 16-bit
// coefficients are sum-of-powers-of-two (SOPOT) values with an LSB of 2^-15.
// The orders and band edges are the design's (LPF#3: 7th order, edges
// 0.05/0.925; LPF#2: 11th, 0.1/0.85; LPF#1: 17th, 0.2/0.7; HBF: 47th,
// 0.4/0.6; FDDF: 35th order, cubic in d, 0.4/0.7; edges relative to an input
// rate of 2). The coefficient values themselves are this implementation's own:
// equiripple designs (LPFs, HBF) and a cubic polynomial fit of least-squares
// fractional-delay low-pass filters over d in [-0.5, 0.5] (FDDF), each value
// rounded to the nearest SOPOT number with at most 5 (LPF#2, LPF#3), 6
// (FDDF) or 8 (HBF, LPF#1) signed power-of-two terms.
//
// The functions at the end run at elaboration: they pick a coefficient set,
// test its symmetry and split each coefficient into canonical signed digits
// (CSD), from which the shift-and-add products are built.
package dif_pkg;

  localparam int DATA_W  = 16;   // sample wordlength between stages
  localparam int COEF_W  = 16;   // coefficient wordlength
  localparam int COEF_FRAC = 15; // coefficient LSB = 2^-15
  localparam int PROD_W  = DATA_W + COEF_W;        // one product x*c
  localparam int ACC_W   = PROD_W + 6;             // sum of up to 64 products

  // Sample rate changer: M_I as unsigned fixed point MI_INT_W.MI_FRAC_W
  localparam int MI_INT_W  = 8;
  localparam int MI_FRAC_W = 24;
  localparam int MI_W      = MI_INT_W + MI_FRAC_W;

  localparam int CIC_M_W = 5;    // M_CIC, 1..16
  localparam int CIC_SH_W = 5;

  typedef enum logic [2:0] {
    F_HBF, F_LPF1, F_LPF2, F_LPF3, F_C0, F_C1, F_C2, F_C3
  } filter_e;

  // Run-time configuration of one programmable decimator (Fig. 7 MUXes).
  typedef struct packed {
    logic                  cic_bypass;   // bypass the CIC filter
    logic [CIC_M_W-1:0]    cic_m;        // M_CIC
    logic [CIC_SH_W-1:0]   cic_shift;    // CIC gain removal (right shift)
    logic                  lpf3_bypass;
    logic                  lpf2_bypass;
    logic                  lpf1_bypass;
    logic                  fddf_bypass;
    logic [MI_W-1:0]       mi;           // M_I >= 1.0
    logic                  dec2_bypass;  // bypass the /2 after the HBF
  } cfg_t;

  localparam int HBF_C [48] = '{
    -5, -4, 14, 13, -32, -30, 65, 62, -117, -115, 197, 198, -315, -326, 489, 521, -750, -834,
    1175, 1400, -2020, -2785, 4914, 14667, 14667, 4914, -2785, -2020, 1400, 1175, -834, -750,
    521, 489, -326, -315, 198, 197, -115, -117, 62, 65, -30, -32, 13, 14, -4, -5
  };
  localparam int LPF1_C [18] = '{
    -42, -79, 176, 539, -193, -1893, -840, 5721, 12999, 12999, 5721, -840, -1893, -193, 539,
    176, -79, -42
  };
  localparam int LPF2_C [12] = '{
    148, 134, -1091, -1300, 4802, 13688, 13688, 4802, -1300, -1091, 134, 148
  };
  localparam int LPF3_C [8] = '{
    -651, -865, 4532, 13368, 13368, 4532, -865, -651
  };
  localparam int FARROW_C0 [36] = '{
    3, 9, -3, -35, 2, 100, -7, -235, 42, 484, -160, -908, 471, 1636, -1264, -3210, 4194, 15268,
    15268, 4194, -3210, -1264, 1636, 471, -908, -160, 484, 42, -235, -7, 100, 2, -35, -3, 9, 3
  };
  localparam int FARROW_C1 [36] = '{
    -6, -7, 30, 28, -97, -64, 257, 99, -581, -80, 1168, -100, -2191, 641, 4204, -1984, -11775,
    -7523, 7523, 11775, 1984, -4204, -641, 2191, 100, -1168, 80, 581, -99, -257, 64, 97, -28,
    -30, 7, 6
  };
  localparam int FARROW_C2 [36] = '{
    -3, -11, 2, 45, 4, -128, -10, 302, -2, -631, 73, 1214, -265, -2300, 583, 5073, 1951, -5900,
    -5900, 1951, 5073, 583, -2300, -265, 1214, 73, -631, -2, 302, -10, -128, 4, 45, 2, -11, -3
  };
  localparam int FARROW_C3 [36] = '{
    3, 3, -13, -13, 41, 33, -108, -59, 245, 80, -497, -79, 942, 73, -1800, -617, 2530, 1922,
    -1922, -2530, 617, 1800, -73, -942, 79, 497, -80, -245, 59, 108, -33, -41, 13, 13, -3, -3
  };

  function automatic int num_taps(filter_e f);
    case (f)
      F_HBF:  return 48;
      F_LPF1: return 18;
      F_LPF2: return 12;
      F_LPF3: return 8;
      default: return 36;
    endcase
  endfunction

  function automatic int coef(filter_e f, int n);
    case (f)
      F_HBF:  return HBF_C[n];
      F_LPF1: return LPF1_C[n];
      F_LPF2: return LPF2_C[n];
      F_LPF3: return LPF3_C[n];
      F_C0:   return FARROW_C0[n];
      F_C1:   return FARROW_C1[n];
      F_C2:   return FARROW_C2[n];
      default: return FARROW_C3[n];
    endcase
  endfunction

  // 1: c[n] == c[T-1-n] (even symmetry); 0: c[n] == -c[T-1-n] (odd symmetry)
  function automatic bit is_sym(filter_e f);
    return coef(f, 0) == coef(f, num_taps(f) - 1);
  endfunction

  // Canonical signed digits of v: bit k of csd_pos / csd_neg set when digit k
  // is +1 / -1, so that v = sum(csd_pos[k]*2^k) - sum(csd_neg[k]*2^k).
  function automatic logic [COEF_W:0] csd_pos(int v);
    logic [COEF_W:0] p;
    int r;
    p = '0;
    r = v;
    for (int k = 0; k <= COEF_W; k++) begin
      if ((r & 1) != 0) begin
        if ((r & 3) == 1) begin p[k] = 1'b1; r = r - 1; end
        else r = r + 1;
      end
      r = r >>> 1;
    end
    return p;
  endfunction

  function automatic logic [COEF_W:0] csd_neg(int v);
    logic [COEF_W:0] m;
    int r;
    m = '0;
    r = v;
    for (int k = 0; k <= COEF_W; k++) begin
      if ((r & 1) != 0) begin
        if ((r & 3) == 3) begin m[k] = 1'b1; r = r + 1; end
        else r = r - 1;
      end
      r = r >>> 1;
    end
    return m;
  endfunction

  // Round half up a wide value by SH bits and saturate to DATA_W bits.
  function automatic logic signed [DATA_W-1:0] round_sat(logic signed [ACC_W-1:0] v, int sh);
    logic signed [ACC_W-1:0] r;
    localparam logic signed [ACC_W-1:0] MAXV = (ACC_W)'((1 << (DATA_W-1)) - 1);
    localparam logic signed [ACC_W-1:0] MINV = -(ACC_W)'(1 << (DATA_W-1));
    r = (sh > 0) ? ((v + (ACC_W'(1) <<< (sh - 1))) >>> sh) : v;
    if (r > MAXV) return MAXV[DATA_W-1:0];
    if (r < MINV) return MINV[DATA_W-1:0];
    return r[DATA_W-1:0];
  endfunction

endpackage
