// tb_pwm_modulator: checks, with a short carrier of 100 clocks, that each PESB is active
// for round-down(|d| * 100) clocks per period with the polarity of its duty cycle, bypassed
// otherwise, that duties over 1 are clamped, that new duties take effect from the next
// period on, and the period length.
module tb_pwm_modulator;
  import hil_pkg::*;
  import tb_ref_pkg::*;
  localparam int NCH = 4, DIV = 100;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  fix_t duty [NCH];
  logic signed [1:0] state [NCH];
  logic period_start;
  int checks = 0, failures = 0;

  pwm_modulator #(.NCH(NCH), .CARRIER_DIV(DIV)) dut (.clk, .rst_n, .duty, .state, .period_start);

  initial begin
    fix_t dp [NCH];
    int act [NCH], neg [NCH], len;
    for (int m = 0; m < NCH; m++) duty[m] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    while (!period_start) @(negedge clk);
    for (int p = 0; p < 30; p++) begin
      // new duties written somewhere inside the previous period
      for (int m = 0; m < NCH; m++) begin
        dp[m] = (m == 3) ? tofix(1.5) : fix_t'($urandom_range(0, 2 * 65536)) - 32'sd65536;
        duty[m] = dp[m];
      end
      // finish the running period, then measure the next one
      do @(negedge clk); while (!period_start);
      for (int m = 0; m < NCH; m++) begin act[m] = 0; neg[m] = 0; end
      len = 0;
      do begin
        for (int m = 0; m < NCH; m++) begin
          if (state[m] != 0) act[m]++;
          if (state[m] == -2'sd1) neg[m]++;
        end
        len++;
        if (len == 50) for (int m = 0; m < NCH; m++) duty[m] = 0;   // ignored until next period
        @(negedge clk);
      end while (!period_start);
      checks++;
      if (len != DIV) begin failures++; $display("period %0d", len); end
      for (int m = 0; m < NCH; m++) begin
        fix_t d;
        int e;
        d = fsat1(dp[m]);
        e = (d < 0 ? -int'(d) : int'(d)) * DIV / 65536;
        checks += 2;
        if (act[m] != e) begin failures++; $display("active %0d exp %0d (d=%f)", act[m], e, fr(d)); end
        if (neg[m] != (d < 0 ? e : 0)) begin failures++; $display("polarity"); end
      end
      // duty 0 from the next period: wait for it and restore values for the next round
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
