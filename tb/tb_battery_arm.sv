// tb_battery_arm: the 20 serialized battery modules of one arm at the source's rate: a
// frame starts every 200 clocks (500 kHz at 100 MHz). Checks every module voltage and SoC
// against the floating-point reference after each frame, that each frame completes within
// 8*20+22 clocks of its start (so 200 clocks suffice), that modules with different initial
// SoC keep separate states, and that a start arriving mid-frame is refused as overrun.
module tb_battery_arm;
  import hil_pkg::*;
  import tb_ref_pkg::*;
  localparam int NCH = 20;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic init = 0, start = 0, frame_done;
  fix_t soc0 [NCH], r_bat [NCH], i_pesb [NCH], t_pesb [NCH], u_pesb [NCH], soc [NCH];
  logic [31:0] k_soc [NCH], ts;
  logic [15:0] overrun;
  int checks = 0, failures = 0;

  battery_arm #(.NCH(NCH)) dut (.clk, .rst_n, .init, .soc0, .k_soc, .ts, .r_bat,
    .lut_we(1'b0), .lut_sel(2'd0), .lut_addr(9'd0), .lut_wdata(64'd0),
    .start, .i_pesb, .t_pesb, .u_pesb, .soc, .frame_done, .overrun);

  real soc_r [NCH], up_r [NCH], eu [NCH];

  initial begin
    for (int c = 0; c < NCH; c++) begin
      soc0[c] = tofix(0.3 + 0.03 * c); r_bat[c] = tofix(0.02);
      k_soc[c] = 32'($rtoi(8.0e-6 * 281474976710656.0));
      soc_r[c] = fr(soc0[c]); up_r[c] = 0.0; i_pesb[c] = 0; t_pesb[c] = tofix(20.0 + c);
    end
    ts = 32'($rtoi(2.0e-6 * 281474976710656.0));
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk) init = 1;
    @(negedge clk) init = 0;
    for (int f = 0; f < 30; f++) begin
      int t0, dt;
      repeat (5) @(negedge clk);
      for (int c = 0; c < NCH; c++) begin
        real ic, uc;
        i_pesb[c] = tofix((real'($urandom_range(0, 30000)) - 15000.0) / 100.0);
        ic = real'(fmul(i_pesb[c], fix_t'((65536 + 7) / 14))) / 65536.0;
        uc = cell_step(fr(t_pesb[c]), ic, real'(k_soc[c]) / 281474976710656.0,
                       real'(ts) / 281474976710656.0, soc_r[c], up_r[c]);
        eu[c] = 14.0 * uc - 0.02 * fr(i_pesb[c]);
      end
      start = 1;
      @(negedge clk);
      start = 0;
      for (int c = 0; c < NCH; c++) i_pesb[c] = 0;    // captured at start
      t0 = 0; dt = 0;
      while (!frame_done && dt < 400) begin
        @(negedge clk);
        dt++;
        if (f == 10 && dt == 50) start = 1;     // mid-frame start
        else start = 0;
      end
      checks++;
      if (dt < 8 * NCH + 15 || dt > 8 * NCH + 22) begin failures++; $display("frame time %0d", dt); end
      for (int c = 0; c < NCH; c++) begin
        checks += 2;
        if (fr(u_pesb[c]) - eu[c] > 0.03 || eu[c] - fr(u_pesb[c]) > 0.03) begin
          failures++; $display("frame %0d U[%0d] %f exp %f", f, c, fr(u_pesb[c]), eu[c]);
        end
        if (fr(soc[c]) - soc_r[c] > 0.0005 || soc_r[c] - fr(soc[c]) > 0.0005) begin
          failures++; $display("frame %0d SoC[%0d] %f exp %f", f, c, fr(soc[c]), soc_r[c]);
        end
      end
    end
    checks++;
    if (overrun != 16'd1) begin failures++; $display("overrun %0d", overrun); end
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
