// tb_soc_balancer: four PESBs of an arm with spread SoCs and slightly different module
// voltages. Over 15 control rounds compares every duty cycle with a floating-point model
// of d = (u_ref/N) * (1 - PI(SoC_avg - SoC_m)) / U_PESB (PI integrator accumulating over
// the rounds), checks that the module with the highest SoC gets the largest duty, the
// clamping to +-1 and the PI limit, and the number of clocks per round.
module tb_soc_balancer;
  import hil_pkg::*;
  import tb_ref_pkg::*;
  localparam int NCH = 4, NSER = 20;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, busy, done;
  fix_t u_arm_ref = 0, kp, ki, pi_lim, soc_avg;
  fix_t soc [NCH], u_pesb [NCH], duty [NCH];
  int checks = 0, failures = 0;

  soc_balancer #(.NCH(NCH), .N_SERIES(NSER)) dut (.clk, .rst_n, .start, .u_arm_ref, .soc,
    .u_pesb, .kp, .ki, .pi_lim, .duty, .soc_avg, .busy, .done);

  real integ [NCH];

  initial begin
    kp = tofix(2.0); ki = tofix(0.5); pi_lim = tofix(0.3);
    for (int c = 0; c < NCH; c++) begin
      integ[c] = 0.0;
      soc[c] = tofix(0.4 + 0.1 * c);
      u_pesb[c] = tofix(50.0 + 0.5 * c);
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 15; r++) begin
      real uref, avg, e, pi, d, dmax;
      int cyc, imax;
      uref = (r == 14) ? 3000.0 : 400.0 + 20.0 * r;   // last round saturates
      u_arm_ref = tofix(uref);
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc != NCH * 52 + 1) begin failures++; $display("round took %0d clocks", cyc); end
      avg = 0.0;
      for (int c = 0; c < NCH; c++) avg += fr(soc[c]);
      avg = avg / NCH;
      checks++;
      if (fr(soc_avg) - avg > 1e-4 || avg - fr(soc_avg) > 1e-4) begin failures++; $display("avg"); end
      dmax = -10.0; imax = 0;
      for (int c = 0; c < NCH; c++) begin
        e = avg - fr(soc[c]);
        integ[c] = clampr(integ[c] + 0.5 * e, -0.3, 0.3);
        pi = 2.0 * e + integ[c];
        d = clampr((uref / NSER) * (1.0 - pi) / fr(u_pesb[c]), -1.0, 1.0);
        checks++;
        if (fr(duty[c]) - d > 0.002 || d - fr(duty[c]) > 0.002) begin
          failures++; $display("round %0d duty[%0d] %f exp %f", r, c, fr(duty[c]), d);
        end
        if (fr(duty[c]) > dmax) begin dmax = fr(duty[c]); imax = c; end
      end
      checks++;
      if (r < 14 && imax != NCH - 1) begin failures++; $display("largest duty at %0d", imax); end
    end
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
