// tb_battery_module_model: drives module currents into the 14s14p module model for two
// modules and checks U_PESB = Ns * U_cell(I/Np) - R_bat * I and the SoC against the
// floating-point cell reference, with a different R_bat per module.
module tb_battery_module_model;
  import hil_pkg::*;
  import tb_ref_pkg::*;
  localparam int NCH = 2;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic init = 0, in_valid = 0, in_ready, out_valid;
  logic in_ch = 0, out_ch;
  fix_t soc0 [NCH], r_bat [NCH], in_i = 0, in_t = 0, out_u, out_soc;
  logic [31:0] k_soc [NCH], ts;
  int checks = 0, failures = 0;

  battery_module_model #(.NCH(NCH)) dut (.clk, .rst_n, .init, .soc0, .k_soc, .ts, .r_bat,
    .lut_we(1'b0), .lut_sel(2'd0), .lut_addr(9'd0), .lut_wdata(64'd0),
    .in_valid, .in_ready, .in_ch, .in_i_pesb(in_i), .in_temp(in_t),
    .out_valid, .out_ch, .out_u_pesb(out_u), .out_soc);

  real soc_r [NCH], up_r [NCH], eu [$], es [$];
  int n_out = 0;

  initial begin
    soc0[0] = tofix(0.9); soc0[1] = tofix(0.4);
    r_bat[0] = tofix(0.01); r_bat[1] = tofix(0.05);
    for (int c = 0; c < NCH; c++) begin
      k_soc[c] = 32'($rtoi(5.0e-6 * 281474976710656.0)); soc_r[c] = fr(soc0[c]); up_r[c] = 0.0;
    end
    ts = 32'($rtoi(2.0e-6 * 281474976710656.0));
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk) init = 1;
    @(negedge clk) init = 0;
    for (int n = 0; n < 300; n++) begin
      real i, t, ic, uc;
      int c;
      c = n % NCH;
      i = (real'($urandom_range(0, 40000)) - 20000.0) / 100.0;   // +-200 A module current
      t = 25.0;
      in_valid = 1; in_ch = c[0]; in_i = tofix(i); in_t = tofix(t);
      @(negedge clk);
      while (!in_ready) @(negedge clk);
      @(posedge clk);
      ic = real'(fmul(in_i, fix_t'((65536 + 7) / 14))) / 65536.0;
      uc = cell_step(t, ic, real'(k_soc[c]) / 281474976710656.0,
                     real'(ts) / 281474976710656.0, soc_r[c], up_r[c]);
      eu.push_back(14.0 * uc - fr(r_bat[c]) * fr(in_i));
      es.push_back(soc_r[c]);
      @(negedge clk);
      in_valid = 0;
    end
    repeat (40) @(negedge clk);
    checks++;
    if (n_out != 300) begin failures++; $display("outputs %0d", n_out); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (out_valid) begin
    real u, s;
    u = eu.pop_front(); s = es.pop_front();
    n_out++;
    checks += 2;
    if (fr(out_u) - u > 0.03 || u - fr(out_u) > 0.03) begin failures++; $display("U_PESB %f exp %f", fr(out_u), u); end
    if (fr(out_soc) - s > 0.0005 || s - fr(out_soc) > 0.0005) begin failures++; $display("SoC %f exp %f", fr(out_soc), s); end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
