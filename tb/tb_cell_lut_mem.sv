// tb_cell_lut_mem: checks the default contents of the 3D polarization table and the 2D
// OCV table against the cell characteristics evaluated at the grid points, the one-clock
// read latency, and that written words read back while other words stay unchanged.
module tb_cell_lut_mem;
  import hil_pkg::*;
  import tb_ref_pkg::*;
  localparam int D3 = NT * NI * NS, D2 = NT * NS;

  logic clk = 0;
  always #5 clk = ~clk;
  logic we3 = 0, we2 = 0;
  logic [7:0] wa3 = 0, ra3 = 0;
  logic [5:0] wa2 = 0, ra2 = 0;
  logic [63:0] wd3 = 0, q3;
  logic [31:0] wd2 = 0, q2;
  int checks = 0, failures = 0;

  cell_lut_mem #(.DEPTH(D3), .WIDTH(64), .TABLE_ID(LUT_POL)) u3 (.clk, .we(we3), .waddr(wa3),
    .wdata(wd3), .raddr(ra3), .rdata(q3));
  cell_lut_mem #(.DEPTH(D2), .WIDTH(32), .TABLE_ID(LUT_OCV)) u2 (.clk, .we(we2), .waddr(wa2),
    .wdata(wd2), .raddr(ra2), .rdata(q2));

  function automatic bit near(input logic [31:0] v, input real e);
    real d;
    d = fr(fix_t'(v)) - e;
    return d < 0.0001 && d > -0.0001;
  endfunction

  initial begin
    for (int it = 0; it < NT; it++)
      for (int ii = 0; ii < NI; ii++)
        for (int is = 0; is < NS; is++) begin
          real t, i, s;
          t = T0_C + T_STEP * it; i = I0_A + I_STEP * ii; s = S0 + S_STEP * is;
          @(negedge clk);
          ra3 = 8'((it * NI + ii) * NS + is);
          ra2 = 6'(it * NS + is);
          @(negedge clk);
          checks += 2;
          if (!near(q3[63:32], rp_ohm(t, i, s)) || !near(q3[31:0], itau_hz(t, i, s))) begin
            failures++; $display("pol table at %0d %0d %0d", it, ii, is);
          end
          if (!near(q2, ocv_v(t, s))) begin failures++; $display("ocv table at %0d %0d", it, is); end
        end
    // writes
    for (int n = 0; n < 50; n++) begin
      logic [7:0] a;
      logic [63:0] d, prev_w;
      a = 8'($urandom_range(0, D3 - 1));
      @(negedge clk); ra3 = a + 8'd1 < 8'(D3) ? a + 8'd1 : 8'd0;
      @(negedge clk); prev_w = q3;
      we3 = 1; wa3 = a; d = {$urandom, $urandom}; wd3 = d;
      @(negedge clk); we3 = 0; ra3 = a;
      @(negedge clk);
      checks++;
      if (q3 != d) begin failures++; $display("readback at %0d", a); end
      ra3 = a + 8'd1 < 8'(D3) ? a + 8'd1 : 8'd0;
      @(negedge clk);
      checks++;
      if (q3 != prev_w) begin failures++; $display("neighbour of %0d changed", a); end
    end
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
