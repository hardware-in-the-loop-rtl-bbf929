// tb_lut_index_calc: drives random operating points (inside and outside the table grid)
// into the index calculation and checks the interpolation fractions and the addresses of
// all 8 / 4 / 2 adjacent entries against indices computed here from the grid definition,
// including clamping at both edges and the one-clock latency.
module tb_lut_index_calc;
  import hil_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;
  fix_t temp = 0, cur = 0, soc = 0;
  frac_t ft, fi, fs;
  logic [7:0] a3 [8];
  logic [5:0] a2 [4];
  logic [1:0] a1 [2];
  int checks = 0, failures = 0;
  int n_lo = 0, n_hi = 0;

  lut_index_calc dut (.clk, .temp, .cur, .soc, .frac_t_o(ft), .frac_i_o(fi), .frac_s_o(fs),
                      .addr3(a3), .addr2(a2), .addr1(a1));

  // expected index and fraction of one axis (inverse step as the hardware holds it)
  task automatic axis(input fix_t x, input real x0, input real step, input int n,
                      output int idx, output int frac);
    real inv, pos;
    inv = real'(to_fix(1.0 / step)) / 65536.0;
    pos = (fr(x) - x0) * inv;
    if (pos < 0.0) begin idx = 0; frac = 0; n_lo++; end
    else if (pos >= real'(n - 1)) begin idx = n - 2; frac = 65536; n_hi++; end
    else begin idx = $floor(pos); frac = $floor((pos - idx) * 65536.0); end
  endtask

  initial begin
    for (int n = 0; n < 2000; n++) begin
      int it, ii, is, ft_e, fi_e, fs_e;
      @(negedge clk);
      temp = tofix(real'($urandom_range(0, 10000)) / 100.0 - 30.0);
      cur  = tofix(real'($urandom_range(0, 6000)) / 100.0 - 30.0);
      soc  = tofix(real'($urandom_range(0, 1400)) / 1000.0 - 0.2);
      axis(temp, T0_C, T_STEP, NT, it, ft_e);
      axis(cur, I0_A, I_STEP, NI, ii, fi_e);
      axis(soc, S0, S_STEP, NS, is, fs_e);
      @(negedge clk);    // registered one clock later
      checks += 3;
      if (int'(ft) - ft_e > 2 || ft_e - int'(ft) > 2) begin failures++; $display("ft %0d exp %0d", ft, ft_e); end
      if (int'(fi) - fi_e > 2 || fi_e - int'(fi) > 2) begin failures++; $display("fi %0d exp %0d", fi, fi_e); end
      if (int'(fs) - fs_e > 2 || fs_e - int'(fs) > 2) begin failures++; $display("fs %0d exp %0d", fs, fs_e); end
      for (int k = 0; k < 8; k++) begin
        int e;
        e = ((it + k / 4) * NI + ii + (k / 2) % 2) * NS + is + k % 2;
        checks++;
        if (int'(a3[k]) != e) begin failures++; $display("addr3[%0d] %0d exp %0d", k, a3[k], e); end
      end
      for (int j = 0; j < 4; j++) begin
        checks++;
        if (int'(a2[j]) != (it + j / 2) * NS + is + j % 2) begin failures++; $display("addr2[%0d]", j); end
      end
      for (int j = 0; j < 2; j++) begin
        checks++;
        if (int'(a1[j]) != it + j) begin failures++; $display("addr1[%0d]", j); end
      end
    end
    checks++;
    if (n_lo == 0 || n_hi == 0) failures++;     // clamping at both edges was exercised
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
