// tb_pesb_cap_bms: the extended PESB with the source's 6 mF buffer capacitor at a 2 us
// step. Drives a PWM-like current (active: -80 A drawn, bypassed: 0) and compares
// capacitor voltage, capacitor and battery currents and U_PESB with a floating-point model
// of the same circuit; checks that the battery recharges the capacitor while bypassed, and
// that the BMS opens on overcurrent, overvoltage and undervoltage, stays open (no battery
// current) until clear_fault, and reports the cause.
module tb_pesb_cap_bms;
  import hil_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic init = 0, en = 0, clear_fault = 0, connected, out_valid;
  fix_t u_c0, i_pesb = 0, u_bat = 0, r_s, inv_rsum, i_max, u_max, u_min;
  fix_t u_pesb, u_c, i_c, i_bat;
  logic [31:0] inv_rp, ts_c;
  bms_cause_e cause;
  int checks = 0, failures = 0, n_recharge = 0, n_drawn = 0;

  pesb_cap_bms dut (.clk, .rst_n, .init, .u_c0, .en, .i_pesb, .u_bat, .r_s, .inv_rsum,
    .inv_rp, .ts_c, .i_max, .u_max, .u_min, .clear_fault, .u_pesb, .u_c, .i_c, .i_bat,
    .connected, .cause, .out_valid);

  localparam real RS = 0.002, RBAT = 0.02, RP = 1000.0, C = 6.0e-3, TS = 2.0e-6;
  real ucr;

  task automatic step(input real ip, input real ub, input bit conn_exp);
    real ib, ic, up;
    @(negedge clk);
    i_pesb = tofix(ip); u_bat = tofix(ub); en = 1;
    @(negedge clk);
    en = 0;
    @(negedge clk);
    ib = conn_exp ? (ucr + RS * ip - ub) / (RS + RBAT) : 0.0;
    ic = ip - ib;
    up = ucr + RS * ic;
    checks += 4;
    if (fr(u_c) - ucr > 0.01 || ucr - fr(u_c) > 0.01) begin failures++; $display("u_c %f exp %f", fr(u_c), ucr); end
    if (fr(i_bat) - ib > 0.1 || ib - fr(i_bat) > 0.1) begin failures++; $display("i_bat %f exp %f", fr(i_bat), ib); end
    if (fr(i_c) - ic > 0.1 || ic - fr(i_c) > 0.1) begin failures++; $display("i_c %f exp %f", fr(i_c), ic); end
    if (fr(u_pesb) - up > 0.01 || up - fr(u_pesb) > 0.01) begin failures++; $display("u_pesb %f exp %f", fr(u_pesb), up); end
    ucr = ucr + TS / C * (ic - ucr / RP);
    ucr = fr(u_c) + TS / C * (ic - fr(u_c) / RP);     // follow the model's rounding
    if (conn_exp && ip == 0.0 && ib < -0.5) n_recharge++;   // out of the battery
    if (conn_exp && ip < 0.0 && ib < 0.0) n_drawn++;
  endtask

  initial begin
    u_c0 = tofix(51.8); r_s = tofix(RS); inv_rsum = tofix(1.0 / (RS + RBAT));
    inv_rp = 32'($rtoi(4294967296.0 / RP)); ts_c = 32'($rtoi(TS / C * 4294967296.0));
    i_max = tofix(150.0); u_max = tofix(58.8); u_min = tofix(42.0);
    ucr = 51.8;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk) init = 1;
    @(negedge clk) init = 0;
    for (int n = 0; n < 400; n++) step(((n % 62) < 31) ? -80.0 : 0.0, 51.8, 1'b1);
    checks += 2;
    if (n_recharge == 0) begin failures++; $display("no recharge while bypassed"); end
    if (n_drawn == 0) begin failures++; $display("no battery discharge while active"); end
    // overvoltage (current limit raised so that only the voltage limit applies)
    i_max = tofix(2000.0);
    step(0.0, 60.0, 1'b1);
    checks += 2;
    if (connected || cause != BMS_OVERVOLTAGE) begin failures++; $display("overvoltage trip"); end
    step(-80.0, 51.8, 1'b0);
    if (connected) begin failures++; $display("reclosed without clear"); end
    @(negedge clk) clear_fault = 1;
    @(negedge clk) clear_fault = 0;
    checks++;
    if (!connected || cause != BMS_OK) begin failures++; $display("clear"); end
    // undervoltage
    step(0.0, 40.0, 1'b1);
    checks++;
    if (connected || cause != BMS_UNDERVOLTAGE) begin failures++; $display("undervoltage trip"); end
    @(negedge clk) clear_fault = 1;
    @(negedge clk) clear_fault = 0;
    // overcurrent: capacitor far below battery voltage
    i_max = tofix(150.0);
    @(negedge clk) u_c0 = tofix(45.0);
    init = 1;
    @(negedge clk) init = 0;
    ucr = 45.0;
    step(0.0, 51.8, 1'b1);
    checks++;
    if (connected || cause != BMS_OVERCURRENT) begin failures++; $display("overcurrent trip"); end
    step(0.0, 51.8, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
