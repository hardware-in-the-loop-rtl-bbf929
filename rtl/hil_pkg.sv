// hil_pkg: types, fixed-point formats and default look-up table contents shared by the
// blocks of the MMC / battery hardware-in-the-loop emulator.
//
// Number formats (this design's choice; the source only says fixed point is used):
//   fix_t   signed Q16.16, 32 bit: currents [A], voltages [V], temperatures [degC],
//           resistances [Ohm], SoC as a fraction (1.0 = 65536), duty cycles (1.0 = 65536)
//   frac_t  unsigned interpolation fraction, 0 .. 1.0 = 65536 (17 bit)
//   State integrators (SoC, polarization voltage, capacitor voltage) keep extra fraction
//   bits, see the blocks.
//
// Default LUT contents are a synthetic lithium-ion cell (4.64 Ah, one of the 14 parallel
// cells of a 65 Ah 14s14p module). They are multilinear in each axis so that trilinear
// interpolation reproduces them exactly; measured tables are loaded through the LUT write
// ports instead.
package hil_pkg;

  typedef logic signed [31:0] fix_t;
  typedef logic        [16:0] frac_t;

  localparam int FRAC      = 16;
  localparam fix_t FIX_ONE = 32'sd65536;

  // LUT grid (this design's choice): temperature -10..50 degC in 20 degC steps,
  // cell current -20..20 A in 10 A steps, SoC 0..1 in 0.1 steps.
  localparam int NT = 4;
  localparam int NI = 5;
  localparam int NS = 11;
  localparam real T0_C   = -10.0;
  localparam real T_STEP = 20.0;
  localparam real I0_A   = -20.0;
  localparam real I_STEP = 10.0;
  localparam real S0     = 0.0;
  localparam real S_STEP = 0.1;

  typedef enum logic [1:0] {BMS_OK = 2'd0, BMS_OVERCURRENT = 2'd1,
                            BMS_OVERVOLTAGE = 2'd2, BMS_UNDERVOLTAGE = 2'd3} bms_cause_e;

  typedef enum logic [1:0] {MAT_A = 2'd0, MAT_B = 2'd1, MAT_F = 2'd2, MAT_C = 2'd3} mat_sel_e;

  function automatic fix_t to_fix(input real v);
    return fix_t'($rtoi(v * 65536.0));
  endfunction

  // Q16.16 product
  function automatic fix_t fmul(input fix_t a, input fix_t b);
    logic signed [63:0] p;
    p = 64'(a) * 64'(b);
    return fix_t'(p >>> FRAC);
  endfunction

  function automatic fix_t fsat1(input fix_t a);  // clamp to [-1, 1]
    if (a > FIX_ONE) return FIX_ONE;
    if (a < -FIX_ONE) return -FIX_ONE;
    return a;
  endfunction

  // Breakpoint values of the grid
  function automatic real grid_t(input int it); return T0_C + T_STEP * it; endfunction
  function automatic real grid_i(input int ii); return I0_A + I_STEP * ii; endfunction
  function automatic real grid_s(input int is); return S0 + S_STEP * is; endfunction

  // Synthetic cell characteristics (V, Ohm, 1/s, efficiency)
  function automatic real ocv_v(input real t, input real s);
    return 3.2 + 0.9 * s + 0.0004 * (t - 25.0) * s;
  endfunction
  function automatic real ri_ohm(input real t, input real i, input real s);
    real ai;
    ai = (i < 0.0) ? -i : i;
    return 0.030 - 0.0003 * (t - 25.0) + 0.005 * (1.0 - s) + 0.0002 * ai;
  endfunction
  function automatic real rp_ohm(input real t, input real i, input real s);
    return 0.015 + 0.005 * (1.0 - s) - 0.0001 * (t - 25.0) + 0.0001 * i;
  endfunction
  function automatic real itau_hz(input real t, input real i, input real s);
    return 0.05 + 0.0005 * (t - 25.0) + 0.01 * s + 0.0002 * i;
  endfunction
  // charge = 1: charging efficiency, 0: discharging efficiency
  function automatic real eta(input int charge, input real t);
    return (charge != 0) ? 0.98 + 0.0002 * (t - 25.0) : 1.0;
  endfunction

  // Table identifiers for cell_lut_mem default contents
  localparam int LUT_OCV = 0;  // 2D (T, SoC),           NT*NS words
  localparam int LUT_RI  = 1;  // 3D (T, I, SoC),        NT*NI*NS words
  localparam int LUT_POL = 2;  // 3D, word {Rp, 1/tau},  NT*NI*NS words
  localparam int LUT_ETA = 3;  // 1D (T), {discharge[NT], charge[NT]}

  // Default word at flattened address a: a = (it*NI + ii)*NS + is for 3D, it*NS + is for 2D.
  function automatic logic [63:0] lut_default(input int table_id, input int a);
    int it, ii, is;
    real t, i, s;
    logic [63:0] w;
    w = '0;
    case (table_id)
      LUT_OCV: begin
        it = a / NS; is = a % NS;
        w[31:0] = to_fix(ocv_v(grid_t(it), grid_s(is)));
      end
      LUT_RI: begin
        it = a / (NI*NS); ii = (a / NS) % NI; is = a % NS;
        w[31:0] = to_fix(ri_ohm(grid_t(it), grid_i(ii), grid_s(is)));
      end
      LUT_POL: begin
        it = a / (NI*NS); ii = (a / NS) % NI; is = a % NS;
        t = grid_t(it); i = grid_i(ii); s = grid_s(is);
        w[63:32] = to_fix(rp_ohm(t, i, s));
        w[31:0]  = to_fix(itau_hz(t, i, s));
      end
      default: begin
        w[31:0] = to_fix(eta(a / NT, grid_t(a % NT)));
      end
    endcase
    return w;
  endfunction

endpackage
