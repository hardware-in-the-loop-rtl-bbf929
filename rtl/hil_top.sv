// hil_top: FPGA side of a hardware-in-the-loop emulator for a modular multilevel converter
// (MMC) whose 120 submodules each carry a battery module (PESB, power electronic storage
// block), together with the in-arm SoC balancing that closes the loop.
//
// Data flow, all on one clock (100 MHz) with enable strobes:
//   * mmc_statespace steps every MMC_DIV clocks (10 MHz) from the six arm reference voltages
//     and the grid voltages and yields six arm currents and three AC currents.
//   * Arm p1 has every one of its N_PESB battery modules modelled: battery_arm computes them
//     serially on one shared module model, one frame every FRAME_DIV clocks (500 kHz).
//     PESB m carries the arm current times its switching state (pwm_en = 1: the 8 kHz
//     pwm_modulator output, -1/0/+1) or times its duty cycle (pwm_en = 0, averaged).
//   * PESB 1 of arm p1 can be extended (cap_en) by the buffer capacitor and BMS switch of
//     pesb_cap_bms, which then sits between the arm current and battery module 1.
//   * The other five arms are each represented by one averaged, scaled battery module,
//     computed serially by a second battery_arm with N_AVG channels.
//   * soc_balancer turns each arm reference voltage into duty cycles: per PESB with SoC
//     balancing for arm p1, evenly for the averaged arms. It runs once per PWM period.
// Battery currents are positive when discharging, pesb_cap_bms works with currents counted
// into the PESB (charging positive); the sign is turned at its ports.
//
// The link to the controller (a serial transceiver) and the processor's configuration and
// monitoring bus are not part of this RTL: their signals are the ports below (reference
// voltages in, coefficient and table writes, initial states, results out).
module hil_top
  import hil_pkg::*;
#(
  parameter int N_ARM     = 6,
  parameter int N_PESB    = 20,     // modules of arm p1, all modelled
  parameter int N_AVG     = 5,      // arms p2..n3 with one averaged module each
  parameter int NS_CELLS  = 14,
  parameter int NP_CELLS  = 14,
  parameter int MMC_DIV   = 10,     // 100 MHz / 10 = 10 MHz model rate
  parameter int FRAME_DIV = 200,    // 100 MHz / 200 = 500 kHz battery update rate
  parameter int PWM_DIV   = 12500   // 100 MHz / 12500 = 8 kHz PWM
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              init,            // load initial SoCs, clear integrators
  // from the controller
  input  fix_t              u_arm_ref [N_ARM],
  input  fix_t              z_grid    [4],
  // MMC matrices
  input  logic              mat_we,
  input  mat_sel_e          mat_sel,
  input  logic [3:0]        mat_row,
  input  logic [3:0]        mat_col,
  input  logic signed [31:0] mat_data,
  // battery tables (shared layout, written to both battery engines)
  input  logic              lut_we,
  input  logic [1:0]        lut_sel,
  input  logic [8:0]        lut_addr,
  input  logic [63:0]       lut_wdata,
  // battery set-up
  input  fix_t              soc0_p1   [N_PESB],
  input  fix_t              soc0_avg  [N_AVG],
  input  logic [31:0]       k_soc_p1  [N_PESB],
  input  logic [31:0]       k_soc_avg [N_AVG],
  input  logic [31:0]       ts_bat,
  input  fix_t              r_bat,
  input  fix_t              temp_p1   [N_PESB],
  input  fix_t              temp_avg  [N_AVG],
  // extended PESB 1 of arm p1
  input  logic              cap_en,
  input  fix_t              cap_u0,
  input  fix_t              cap_r_s,
  input  fix_t              cap_inv_rsum,
  input  logic [31:0]       cap_inv_rp,
  input  logic [31:0]       cap_ts_c,
  input  fix_t              bms_i_max,
  input  fix_t              bms_u_max,
  input  fix_t              bms_u_min,
  input  logic              bms_clear,
  // control
  input  logic              pwm_en,
  input  fix_t              kp,
  input  fix_t              ki,
  input  fix_t              pi_lim,
  // results
  output fix_t              i_arm     [N_ARM],
  output fix_t              i_ac      [3],
  output logic              mmc_valid,
  output fix_t              u_pesb_p1 [N_PESB],
  output fix_t              soc_p1    [N_PESB],
  output fix_t              i_bat_p1  [N_PESB],
  output fix_t              u_pesb_avg [N_AVG],
  output fix_t              soc_avg_mod [N_AVG],
  output fix_t              duty_p1   [N_PESB],
  output fix_t              duty_avg  [N_AVG],
  output logic signed [1:0] sw_state_p1 [N_PESB],
  output logic              pwm_period,
  output logic              frame_done,
  output fix_t              cap_u_c,
  output fix_t              cap_i_c,
  output fix_t              cap_i_bat,
  output logic              bms_connected,
  output bms_cause_e        bms_cause,
  output fix_t              soc_mean_p1,
  output logic              ctrl_done,
  output logic [15:0]       overrun
);
  // ---------------- converter ----------------
  logic mmc_tick;
  mmc_statespace #(.NX(N_ARM), .NU(N_ARM), .NZ(4), .NY(3), .RATE_DIV(MMC_DIV)) u_mmc (
    .clk, .rst_n, .cfg_we(mat_we), .cfg_sel(mat_sel), .cfg_row(mat_row), .cfg_col(mat_col),
    .cfg_data(mat_data), .clear_state(init), .u_arm_ref, .z_grid, .i_arm, .i_ac,
    .step_tick(mmc_tick), .out_valid(mmc_valid)
  );

  // ---------------- battery frame timebase ----------------
  logic [$clog2(FRAME_DIV)-1:0] fdiv;
  logic frame_start;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) fdiv <= '0;
    else        fdiv <= (int'(fdiv) == FRAME_DIV - 1) ? '0 : fdiv + 1'b1;
  assign frame_start = (fdiv == '0);

  // ---------------- arm p1: modulation and module currents ----------------
  logic pwm_start;
  pwm_modulator #(.NCH(N_PESB), .CARRIER_DIV(PWM_DIV)) u_pwm (
    .clk, .rst_n, .duty(duty_p1), .state(sw_state_p1), .period_start(pwm_start)
  );
  assign pwm_period = pwm_start;

  fix_t i_sw [N_PESB];       // PESB current, discharging positive
  always_comb begin
    for (int m = 0; m < N_PESB; m++) begin
      if (pwm_en) i_sw[m] = (sw_state_p1[m] == 2'sd1)  ?  i_arm[0] :
                            (sw_state_p1[m] == -2'sd1) ? -i_arm[0] : '0;
      else        i_sw[m] = fmul(duty_p1[m], i_arm[0]);
    end
  end

  // extended PESB 1
  fix_t u_bat_raw [N_PESB];
  fix_t ext_u_pesb, ext_i_bat;
  logic ext_valid;
  pesb_cap_bms u_ext (
    .clk, .rst_n, .init, .u_c0(cap_u0), .en(frame_start && cap_en),
    .i_pesb(-i_sw[0]), .u_bat(u_bat_raw[0]),
    .r_s(cap_r_s), .inv_rsum(cap_inv_rsum), .inv_rp(cap_inv_rp), .ts_c(cap_ts_c),
    .i_max(bms_i_max), .u_max(bms_u_max), .u_min(bms_u_min), .clear_fault(bms_clear),
    .u_pesb(ext_u_pesb), .u_c(cap_u_c), .i_c(cap_i_c), .i_bat(ext_i_bat),
    .connected(bms_connected), .cause(bms_cause), .out_valid(ext_valid)
  );
  assign cap_i_bat = ext_i_bat;

  fix_t i_bat_in [N_PESB];
  fix_t r_bat_v  [N_PESB];
  always_comb begin
    for (int m = 0; m < N_PESB; m++) begin
      i_bat_in[m] = i_sw[m];
      r_bat_v[m]  = r_bat;
    end
    if (cap_en) begin
      i_bat_in[0] = -ext_i_bat;   // battery current behind the capacitor
      r_bat_v[0]  = '0;           // R_bat is inside pesb_cap_bms for this module
    end
  end
  assign i_bat_p1 = i_bat_in;

  logic [15:0] ovr_p1, ovr_avg;
  logic        fd_avg;
  battery_arm #(.NCH(N_PESB), .NS_CELLS(NS_CELLS), .NP_CELLS(NP_CELLS)) u_bat_p1 (
    .clk, .rst_n, .init, .soc0(soc0_p1), .k_soc(k_soc_p1), .ts(ts_bat), .r_bat(r_bat_v),
    .lut_we, .lut_sel, .lut_addr, .lut_wdata,
    .start(frame_start), .i_pesb(i_bat_in), .t_pesb(temp_p1),
    .u_pesb(u_bat_raw), .soc(soc_p1), .frame_done, .overrun(ovr_p1)
  );

  logic ext_valid_seen;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)       ext_valid_seen <= 1'b0;
    else if (!cap_en) ext_valid_seen <= 1'b0;
    else if (ext_valid) ext_valid_seen <= 1'b1;

  always_comb begin
    u_pesb_p1 = u_bat_raw;
    if (cap_en && ext_valid_seen) u_pesb_p1[0] = ext_u_pesb;
  end

  // ---------------- arms p2..n3: one averaged module each ----------------
  fix_t i_avg  [N_AVG];
  fix_t rb_avg [N_AVG];
  always_comb begin
    for (int a = 0; a < N_AVG; a++) begin
      i_avg[a]  = fmul(duty_avg[a], i_arm[a + 1]);
      rb_avg[a] = r_bat;
    end
  end

  battery_arm #(.NCH(N_AVG), .NS_CELLS(NS_CELLS), .NP_CELLS(NP_CELLS)) u_bat_avg (
    .clk, .rst_n, .init, .soc0(soc0_avg), .k_soc(k_soc_avg), .ts(ts_bat), .r_bat(rb_avg),
    .lut_we, .lut_sel, .lut_addr, .lut_wdata,
    .start(frame_start), .i_pesb(i_avg), .t_pesb(temp_avg),
    .u_pesb(u_pesb_avg), .soc(soc_avg_mod), .frame_done(fd_avg), .overrun(ovr_avg)
  );
  assign overrun = ovr_p1 + ovr_avg;

  // ---------------- SoC balancing (controller side) ----------------
  logic bal_busy_p1, done_p1;
  soc_balancer #(.NCH(N_PESB), .N_SERIES(N_PESB)) u_bal_p1 (
    .clk, .rst_n, .start(pwm_start), .u_arm_ref(u_arm_ref[0]), .soc(soc_p1), .u_pesb(u_pesb_p1),
    .kp, .ki, .pi_lim, .duty(duty_p1), .soc_avg(soc_mean_p1), .busy(bal_busy_p1), .done(done_p1)
  );
  assign ctrl_done = done_p1;

  logic [N_AVG-1:0] bal_busy_a, bal_done_a;
  fix_t             bal_avg_a [N_AVG];
  for (genvar a = 0; a < N_AVG; a++) begin : g_avg_ctrl
    fix_t s1 [1], u1 [1], d1 [1];
    assign s1[0] = soc_avg_mod[a];
    assign u1[0] = u_pesb_avg[a];
    soc_balancer #(.NCH(1), .N_SERIES(N_PESB)) u_bal (
      .clk, .rst_n, .start(pwm_start), .u_arm_ref(u_arm_ref[a + 1]), .soc(s1), .u_pesb(u1),
      .kp, .ki, .pi_lim, .duty(d1), .soc_avg(bal_avg_a[a]), .busy(bal_busy_a[a]),
      .done(bal_done_a[a])
    );
    assign duty_avg[a] = d1[0];
  end

  logic unused;
  assign unused = ^{mmc_tick, fd_avg, bal_busy_p1, bal_busy_a, bal_done_a, bal_avg_a[0]};
endmodule
