// tb_hil_top: end-to-end run of the emulator at its default size (6 arms, 20 modelled
// PESBs in arm p1, 5 averaged arms, 10 MHz converter model, 500 kHz battery frames, 8 kHz
// PWM at a 100 MHz clock) for 8 PWM periods (1 ms of emulated time).
//
// The converter matrices describe six decoupled R-L arms driven by the arm reference
// voltage against the AC grid phase; the AC current is the sum of the two arm currents of a
// leg. SoC integration is sped up (k_soc near its largest value) so that SoC changes are
// visible within the run. The run passes through: PWM switching with active and bypassed
// PESBs, a switch to averaged (duty-cycle) operation and back, SoC balancing rounds, the
// buffer capacitor being recharged by the battery while its PESB is bypassed, a BMS
// overcurrent trip and its clearing, and a reload of the OCV table. Each is counted and a
// mechanism that never occurs is a failure. Along the way it checks the AC currents
// against C * x, the battery frame period, the module currents against the switching
// states or duty cycles, and module voltages against the open-circuit voltage.
module tb_hil_top;
  import hil_pkg::*;
  import tb_ref_pkg::*;
  localparam int NA = 6, NP = 20, NV = 5;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic init = 0;
  fix_t u_arm_ref [NA], z_grid [4];
  logic mat_we = 0; mat_sel_e mat_sel = MAT_A; logic [3:0] mat_row = 0, mat_col = 0;
  logic signed [31:0] mat_data = 0;
  logic lut_we = 0; logic [1:0] lut_sel = 0; logic [8:0] lut_addr = 0; logic [63:0] lut_wdata = 0;
  fix_t soc0_p1 [NP], soc0_avg [NV], temp_p1 [NP], temp_avg [NV];
  logic [31:0] k_soc_p1 [NP], k_soc_avg [NV], ts_bat;
  fix_t r_bat;
  logic cap_en = 0, bms_clear = 0, pwm_en = 1;
  fix_t cap_u0, cap_r_s, cap_inv_rsum, bms_i_max, bms_u_max, bms_u_min, kp, ki, pi_lim;
  logic [31:0] cap_inv_rp, cap_ts_c;
  fix_t i_arm [NA], i_ac [3], u_pesb_p1 [NP], soc_p1 [NP], i_bat_p1 [NP], u_pesb_avg [NV];
  fix_t soc_avg_mod [NV], duty_p1 [NP], duty_avg [NV];
  logic signed [1:0] sw_state_p1 [NP];
  logic mmc_valid, pwm_period, frame_done, bms_connected, ctrl_done;
  fix_t cap_u_c, cap_i_c, cap_i_bat, soc_mean_p1;
  bms_cause_e bms_cause;
  logic [15:0] overrun;

  hil_top dut (.*);

  int checks = 0, failures = 0;
  int n_mmc = 0, n_frame = 0, n_active = 0, n_bypass = 0, n_avg_mode = 0, n_ctrl = 0;
  int n_recharge = 0, n_trip = 0, n_clear = 0, n_reload = 0, n_soc_drop = 0, n_balance = 0;
  int cyc = 0, last_frame = -1;
  bit ocv_reloaded = 0;
  bit settled = 0;          // set once matrices are loaded and the first frames are through

  task automatic wmat(input mat_sel_e s, input int r, input int c, input real v);
    @(negedge clk);
    mat_we = 1; mat_sel = s; mat_row = 4'(r); mat_col = 4'(c);
    mat_data = 32'($rtoi(v * 16777216.0));
    @(negedge clk) mat_we = 0;
  endtask

  function automatic bit close(input real a, input real b, input real tol);
    return (a - b <= tol) && (b - a <= tol);
  endfunction

  // ---------------- continuous checks ----------------
  real r_ocv;
  always @(negedge clk) begin
    cyc++;
    if (settled && mmc_valid) begin
      n_mmc++;
      for (int k = 0; k < 3; k++) begin
        checks++;
        if (!close(fr(i_ac[k]), fr(i_arm[k]) + fr(i_arm[k + 3]), 0.01)) begin
          failures++; $display("i_ac[%0d] %f", k, fr(i_ac[k]));
        end
      end
    end
    if (settled && frame_done) begin
      n_frame++;
      if (last_frame >= 0) begin
        checks++;
        if (cyc - last_frame != 200) begin failures++; $display("frame period %0d", cyc - last_frame); end
      end
      last_frame = cyc;
      // module voltage near Ns * OCV(SoC) (drop over R_i, R_p and R_bat only)
      for (int m = 1; m < NP; m++) begin
        checks++;
        r_ocv = ocv_reloaded ? 14.0 * 4.1 : 14.0 * ocv_v(25.0, fr(soc_p1[m]));
        if (!close(fr(u_pesb_p1[m]), r_ocv, 4.0)) begin
          failures++; $display("U_PESB[%0d] %f vs OCV %f", m, fr(u_pesb_p1[m]), r_ocv);
        end
      end
    end
    if (rst_n && ctrl_done) n_ctrl++;
    // module currents follow switching state or duty cycle
    if (rst_n && cyc > 100) begin
      for (int m = 1; m < NP; m++) begin
        real e;
        if (pwm_en) e = (sw_state_p1[m] == 2'sd1) ? fr(i_arm[0]) :
                        (sw_state_p1[m] == -2'sd1) ? -fr(i_arm[0]) : 0.0;
        else        e = fr(duty_p1[m]) * fr(i_arm[0]);
        if (!close(fr(i_bat_p1[m]), e, 0.01)) begin
          checks++; failures++; $display("I_PESB[%0d] %f exp %f", m, fr(i_bat_p1[m]), e);
        end
      end
      if (pwm_en) begin
        if (sw_state_p1[5] != 0) n_active++; else n_bypass++;
      end else n_avg_mode++;
      if (cap_en && bms_connected && sw_state_p1[0] == 0 && fr(cap_i_bat) < -1.0) n_recharge++;
    end
  end

  // ---------------- scenario ----------------
  initial begin
    real soc_start [NP], u_before, r;
    for (int a = 0; a < NA; a++) u_arm_ref[a] = tofix(600.0);
    for (int k = 0; k < 4; k++) z_grid[k] = 0;
    for (int m = 0; m < NP; m++) begin
      soc0_p1[m] = tofix(0.40 + 0.01 * m);    // ascending with the PESB index
      temp_p1[m] = tofix(25.0);
      k_soc_p1[m] = 32'($rtoi(1.2e-5 * 281474976710656.0));
    end
    for (int a = 0; a < NV; a++) begin
      soc0_avg[a] = tofix(0.45 + 0.05 * a);
      temp_avg[a] = tofix(25.0);
      k_soc_avg[a] = 32'($rtoi(1.2e-5 * 281474976710656.0));
    end
    ts_bat = 32'($rtoi(2.0e-6 * 281474976710656.0));
    r_bat = tofix(0.02);
    cap_u0 = tofix(50.0); cap_r_s = tofix(0.002); cap_inv_rsum = tofix(1.0 / 0.022);
    cap_inv_rp = 32'($rtoi(4294967296.0 / 1000.0));
    cap_ts_c = 32'($rtoi(2.0e-6 / 6.0e-3 * 4294967296.0));
    bms_i_max = tofix(400.0); bms_u_max = tofix(58.8); bms_u_min = tofix(40.0);
    kp = tofix(5.0); ki = tofix(0.5); pi_lim = tofix(0.2);
    repeat (3) @(negedge clk);
    rst_n = 1;
    // six decoupled arms: x' = 0.999 x + 1e-4 u_arm - 1e-4 v_ac(phase); i_ac = i_p + i_n
    for (int r2 = 0; r2 < NA; r2++) begin
      wmat(MAT_A, r2, r2, 0.999);
      wmat(MAT_B, r2, r2, 1.0e-4);
      wmat(MAT_F, r2, r2 % 3, -1.0e-4);
    end
    for (int k = 0; k < 3; k++) begin wmat(MAT_C, k, k, 1.0); wmat(MAT_C, k, k + 3, 1.0); end
    @(negedge clk) init = 1;
    @(negedge clk) init = 0;
    cap_en = 1;
    for (int m = 0; m < NP; m++) soc_start[m] = fr(soc0_p1[m]);
    repeat (500) @(negedge clk);
    settled = 1;

    // PWM operation, 3 periods
    repeat (3 * 12500) @(negedge clk);
    checks++;
    if (!(fr(i_arm[0]) > 20.0)) begin failures++; $display("arm current %f", fr(i_arm[0])); end
    // balancing: the fullest module gets the largest duty cycle
    checks++;
    if (fr(duty_p1[NP - 1]) > fr(duty_p1[1])) n_balance++;
    else begin failures++; $display("duty %f !> %f", fr(duty_p1[NP - 1]), fr(duty_p1[1])); end

    // averaged operation, 2 periods
    @(negedge clk) pwm_en = 0;
    repeat (2 * 12500) @(negedge clk);
    @(negedge clk) pwm_en = 1;

    // BMS overcurrent trip on the extended PESB, then clear
    @(negedge clk) bms_i_max = tofix(1.0);
    while (bms_connected && cyc < 200000) @(negedge clk);
    checks++;
    if (!bms_connected && bms_cause == BMS_OVERCURRENT) n_trip++;
    else begin failures++; $display("no BMS trip"); end
    repeat (400) @(negedge clk);
    checks++;
    if (cap_i_bat != 0) begin failures++; $display("battery current with open switch"); end
    bms_i_max = tofix(400.0);
    @(negedge clk) bms_clear = 1;
    @(negedge clk) bms_clear = 0;
    checks++;
    if (bms_connected) n_clear++; else begin failures++; $display("BMS not cleared"); end

    // OCV table reload: every entry 4.1 V
    while (!frame_done) @(negedge clk);
    @(negedge clk);
    u_before = fr(u_pesb_avg[2]);
    for (int a = 0; a < NT * NS; a++) begin
      @(negedge clk);
      lut_we = 1; lut_sel = 2'd0; lut_addr = 9'(a); lut_wdata = 64'(to_fix(4.1));
    end
    @(negedge clk) lut_we = 0;
    ocv_reloaded = 1;
    repeat (600) @(negedge clk);
    r = 14.0 * (4.1 - ocv_v(25.0, fr(soc_avg_mod[2])));
    checks++;
    if (close(fr(u_pesb_avg[2]) - u_before, r, 1.0)) n_reload++;
    else begin failures++; $display("OCV reload: %f -> %f, expected +%f", u_before, fr(u_pesb_avg[2]), r); end

    repeat (2 * 12500) @(negedge clk);

    // SoC has dropped on every discharging module of arm p1
    for (int m = 0; m < NP; m++) if (fr(soc_p1[m]) < soc_start[m] - 0.001) n_soc_drop++;
    checks++;
    if (n_soc_drop < NP - 1) begin failures++; $display("SoC dropped on %0d modules", n_soc_drop); end
    checks++;
    if (overrun != 0) begin failures++; $display("overrun %0d", overrun); end

    $display("mechanisms: mmc steps %0d, battery frames %0d, PWM active %0d / bypass %0d,",
             n_mmc, n_frame, n_active, n_bypass);
    $display("  averaged-mode clocks %0d, control rounds %0d, capacitor recharge %0d,",
             n_avg_mode, n_ctrl, n_recharge);
    $display("  BMS trips %0d, clears %0d, table reloads %0d, balancing %0d, SoC drops %0d",
             n_trip, n_clear, n_reload, n_balance, n_soc_drop);
    checks += 10;
    if (n_mmc == 0)      failures++;
    if (n_frame == 0)    failures++;
    if (n_active == 0)   failures++;
    if (n_bypass == 0)   failures++;
    if (n_avg_mode == 0) failures++;
    if (n_ctrl == 0)     failures++;
    if (n_recharge == 0) failures++;
    if (n_trip == 0)     failures++;
    if (n_reload == 0)   failures++;
    if (n_balance == 0)  failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
