// tb_ref_pkg: floating-point reference of the battery cell equations for the testbenches.
// It evaluates the cell characteristics of hil_pkg directly at the operating point (no
// tables, no interpolation), so a correct table lookup and interpolation must reproduce
// it to within fixed-point rounding.
package tb_ref_pkg;
  import hil_pkg::*;

  function automatic real fr(input fix_t v); return real'(v) / 65536.0; endfunction
  function automatic fix_t tofix(input real v); return fix_t'($rtoi(v * 65536.0)); endfunction
  function automatic real clampr(input real v, input real lo, input real hi);
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction

  // one cell step: returns terminal voltage, updates soc and up
  function automatic real cell_step(input real t, input real i, input real k_soc,
                                    input real ts, inout real soc, inout real up);
    real tc, ic, sc, u;
    tc = clampr(t, T0_C, T0_C + T_STEP * (NT - 1));
    ic = clampr(i, I0_A, I0_A + I_STEP * (NI - 1));
    sc = clampr(soc, S0, S0 + S_STEP * (NS - 1));
    u  = ocv_v(tc, sc) - ri_ohm(tc, ic, sc) * i - up;
    soc = soc - eta((i < 0.0) ? 1 : 0, tc) * i * k_soc;
    up  = up + ts * itau_hz(tc, ic, sc) * (rp_ohm(tc, ic, sc) * i - up);
    return u;
  endfunction
endpackage
