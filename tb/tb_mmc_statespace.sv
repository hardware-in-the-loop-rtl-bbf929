// tb_mmc_statespace: checks the state-space MMC model against a floating-point reference.
// Loads A, B, F, C with known coefficients, drives random arm reference and grid voltages
// that change every step, and compares arm currents (= x) and AC currents (= C x) after
// every step. Also checks the 10-clock step period and the 9-clock tick-to-output latency.
module tb_mmc_statespace;
  import hil_pkg::*;
  localparam int NX = 6, NU = 6, NZ = 4, NY = 3;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic cfg_we = 0; mat_sel_e cfg_sel = MAT_A; logic [3:0] cfg_row = 0, cfg_col = 0;
  logic signed [31:0] cfg_data = 0;
  fix_t u [NU]; fix_t z [NZ]; fix_t ia [NX]; fix_t iac [NY];
  logic tick, ov;
  int checks = 0, failures = 0;

  mmc_statespace dut (.clk, .rst_n, .cfg_we, .cfg_sel, .cfg_row, .cfg_col, .cfg_data,
    .clear_state(1'b0), .u_arm_ref(u), .z_grid(z), .i_arm(ia), .i_ac(iac),
    .step_tick(tick), .out_valid(ov));

  real A [NX][NX], B [NX][NU], F [NX][NZ], C [NY][NX];
  real xr [NX], ur [NU], zr [NZ];

  task automatic wr(input mat_sel_e s, input int r, input int c, input real v);
    @(negedge clk);
    cfg_we = 1; cfg_sel = s; cfg_row = 4'(r); cfg_col = 4'(c);
    cfg_data = 32'($rtoi(v * 16777216.0));
    @(negedge clk);
    cfg_we = 0;
  endtask

  function automatic real fr(input fix_t v); return real'(v) / 65536.0; endfunction

  initial begin
    for (int r = 0; r < NX; r++) begin
      xr[r] = 0.0;
      for (int c = 0; c < NX; c++) A[r][c] = (r == c) ? 0.9 : 0.01 * (r - c);
      for (int c = 0; c < NU; c++) B[r][c] = (r == c) ? 0.05 : -0.002 * c;
      for (int c = 0; c < NZ; c++) F[r][c] = 0.003 * (c + 1) - 0.001 * r;
    end
    for (int r = 0; r < NY; r++)
      for (int c = 0; c < NX; c++) C[r][c] = (c == r) ? 0.5 : (c == r + 3) ? -0.5 : 0.0;
    for (int c = 0; c < NU; c++) u[c] = '0;
    for (int c = 0; c < NZ; c++) z[c] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < NX; r++) begin
      for (int c = 0; c < NX; c++) wr(MAT_A, r, c, A[r][c]);
      for (int c = 0; c < NU; c++) wr(MAT_B, r, c, B[r][c]);
      for (int c = 0; c < NZ; c++) wr(MAT_F, r, c, F[r][c]);
    end
    for (int r = 0; r < NY; r++) for (int c = 0; c < NX; c++) wr(MAT_C, r, c, C[r][c]);
  end

  // stimulus and reference: new inputs just after each sampling tick
  int steps = 0, since_tick = -1, last_ov = -1, cyc = 0;
  bit started = 0;
  always @(negedge clk) begin
    cyc++;
    if (rst_n && !cfg_we && cyc > 400) started = 1;
    if (started && tick) begin
      // the values present now are sampled at the coming edge
      for (int c = 0; c < NU; c++) ur[c] = fr(u[c]);
      for (int c = 0; c < NZ; c++) zr[c] = fr(z[c]);
      since_tick = 0;
    end else if (since_tick >= 0) since_tick++;
    if (started && !tick && since_tick == 1) begin
      for (int c = 0; c < NU; c++) u[c] = fix_t'($urandom_range(0, 1600 * 65536)) - fix_t'(800 * 65536);
      for (int c = 0; c < NZ; c++) z[c] = fix_t'($urandom_range(0, 800 * 65536)) - fix_t'(400 * 65536);
    end
    if (started && ov && since_tick >= 0) begin
      real xn [NX];
      checks++;
      if (since_tick != 9) begin
        failures++; $display("latency %0d, expected 9", since_tick);
      end
      if (last_ov >= 0) begin
        checks++;
        if (cyc - last_ov != 10) begin failures++; $display("step period %0d", cyc - last_ov); end
      end
      last_ov = cyc;
      for (int r = 0; r < NX; r++) begin
        xn[r] = 0.0;
        for (int c = 0; c < NX; c++) xn[r] += A[r][c] * xr[c];
        for (int c = 0; c < NU; c++) xn[r] += B[r][c] * ur[c];
        for (int c = 0; c < NZ; c++) xn[r] += F[r][c] * zr[c];
      end
      xr = xn;
      for (int r = 0; r < NX; r++) begin
        checks++;
        if ((fr(ia[r]) - xr[r]) > 0.01 || (xr[r] - fr(ia[r])) > 0.01) begin
          failures++; $display("step %0d x[%0d] = %f, expected %f", steps, r, fr(ia[r]), xr[r]);
        end
        xr[r] = fr(ia[r]);   // follow the model's rounding
      end
      for (int r = 0; r < NY; r++) begin
        real y;
        y = 0.0;
        for (int c = 0; c < NX; c++) y += C[r][c] * xr[c];
        checks++;
        if ((fr(iac[r]) - y) > 0.01 || (y - fr(iac[r])) > 0.01) begin
          failures++; $display("step %0d y[%0d] = %f, expected %f", steps, r, fr(iac[r]), y);
        end
      end
      steps++;
      if (steps == 60) begin
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
