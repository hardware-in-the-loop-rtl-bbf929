// pesb_cap_bms: extended power electronic storage block (PESB) - buffer capacitor in front
// of the battery module and the disconnect switch of the module's battery management.
//
// Circuit (per the source's PESB diagram): the PESB terminals carry I_PESB at voltage
// U_PESB. One branch is the capacitor C with parallel resistance R_p, in series with R_s.
// The other is the BMS switch, R_bat and the battery module voltage U_bat. With u_c the
// voltage across C (the state) and I_bat counted into the battery:
//   I_bat  = (u_c + R_s * I_PESB - U_bat) / (R_bat + R_s)     (switch closed, else 0)
//   I_C    = I_PESB - I_bat,      U_PESB = u_c + R_s * I_C
//   u_c   += Ts / C * (I_C - u_c / R_p)                         (forward Euler)
// The battery voltage of the same step comes from the battery module model, evaluated
// without its own R_bat (one-step lag between I_bat and U_bat). The BMS opens the switch,
// and keeps it open until clear_fault, when |I_bat| > i_max (overcurrent), U_bat > u_max
// (overvoltage) or U_bat < u_min (undervoltage); cause reports the first reason.
//
// Interface and timing: one update per en pulse, outputs registered one clock later with
// out_valid. Coefficients are run-time inputs: r_s and inv_rsum = 1/(R_bat + R_s) in Q16.16,
// inv_rp = 1/R_p and ts_c = Ts/C as unsigned Q0.32. init sets u_c to u_c0 and closes the
// switch. Euler integration and the number formats are this design's choice.
module pesb_cap_bms
  import hil_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        init,
  input  fix_t        u_c0,
  input  logic        en,
  input  fix_t        i_pesb,
  input  fix_t        u_bat,
  input  fix_t        r_s,
  input  fix_t        inv_rsum,
  input  logic [31:0] inv_rp,
  input  logic [31:0] ts_c,
  input  fix_t        i_max,
  input  fix_t        u_max,
  input  fix_t        u_min,
  input  logic        clear_fault,
  output fix_t        u_pesb,
  output fix_t        u_c,
  output fix_t        i_c,
  output fix_t        i_bat,
  output logic        connected,
  output bms_cause_e  cause,
  output logic        out_valid
);
  logic signed [63:0] uc_q;     // Q32.32
  fix_t               uc_fix, ib_n, ic_n, leak_n, ib_abs;
  logic signed [63:0] duc_n;

  always_comb begin
    uc_fix = fix_t'(uc_q >>> 16);
    ib_n   = connected ? fmul(uc_fix + fmul(r_s, i_pesb) - u_bat, inv_rsum) : '0;
    ic_n   = i_pesb - ib_n;
    leak_n = fix_t'((64'(uc_fix) * signed'({32'd0, inv_rp})) >>> 32);
    duc_n  = (64'(ic_n - leak_n) * signed'({32'd0, ts_c})) >>> 16;   // Q.32
    ib_abs = ib_n[31] ? -ib_n : ib_n;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      uc_q <= '0; connected <= 1'b1; cause <= BMS_OK; out_valid <= 1'b0;
      u_pesb <= '0; u_c <= '0; i_c <= '0; i_bat <= '0;
    end else begin
      out_valid <= 1'b0;
      if (init) begin
        uc_q      <= 64'(u_c0) <<< 16;
        connected <= 1'b1;
        cause     <= BMS_OK;
      end else if (en) begin
        uc_q      <= uc_q + duc_n;
        u_pesb    <= uc_fix + fmul(r_s, ic_n);
        u_c       <= uc_fix;
        i_c       <= ic_n;
        i_bat     <= ib_n;
        out_valid <= 1'b1;
        if (connected) begin
          if (ib_abs > i_max) begin
            connected <= 1'b0; cause <= BMS_OVERCURRENT;
          end else if (u_bat > u_max) begin
            connected <= 1'b0; cause <= BMS_OVERVOLTAGE;
          end else if (u_bat < u_min) begin
            connected <= 1'b0; cause <= BMS_UNDERVOLTAGE;
          end
        end
      end
      if (clear_fault && !init) begin
        connected <= 1'b1;
        cause     <= BMS_OK;
      end
    end
  end

  // an open switch carries no battery current
  assert property (@(posedge clk) disable iff (!rst_n) (out_valid && !$past(connected)) |-> i_bat == '0);
endmodule
