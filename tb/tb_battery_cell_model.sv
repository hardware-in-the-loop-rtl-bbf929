// tb_battery_cell_model: runs three cells through the serialized cell model with random
// currents and temperatures and compares terminal voltage and SoC with the floating-point
// reference of tb_ref_pkg. Checks the 8-clock initiation interval, the 20-clock latency
// from an accepted input to its result, that each cell keeps its own integrator state,
// and that the charging efficiency table is used for negative currents.
module tb_battery_cell_model;
  import hil_pkg::*;
  import tb_ref_pkg::*;
  localparam int NCH = 3;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic init = 0;
  fix_t soc0 [NCH];
  logic [31:0] k_soc [NCH];
  logic [31:0] ts;
  logic in_valid = 0, in_ready, out_valid;
  logic [1:0] in_ch = 0, out_ch;
  fix_t in_cur = 0, in_temp = 0, out_u, out_soc;
  logic [31:0] in_aux = 0, out_aux;
  int checks = 0, failures = 0;

  battery_cell_model #(.NCH(NCH)) dut (.clk, .rst_n, .init, .soc0, .k_soc, .ts,
    .lut_we(1'b0), .lut_sel(2'd0), .lut_addr(9'd0), .lut_wdata(64'd0),
    .in_valid, .in_ready, .in_ch, .in_cur, .in_temp, .in_aux,
    .out_valid, .out_ch, .out_u, .out_soc, .out_aux);

  real soc_r [NCH], up_r [NCH];
  real exp_u [$], exp_soc [$];
  int  exp_ch [$], acc_cyc [$];
  int  cyc = 0, last_acc = -1, n_out = 0, n_charge = 0;

  always @(posedge clk) cyc++;

  initial begin
    for (int c = 0; c < NCH; c++) begin
      soc0[c]  = tofix(0.3 + 0.25 * c);
      k_soc[c] = 32'(($rtoi(1.0e-5 * 281474976710656.0)) / (c + 1));   // differing capacities
      soc_r[c] = fr(soc0[c]); up_r[c] = 0.0;
    end
    ts = 32'($rtoi(1.0e-5 * 281474976710656.0));
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk) init = 1;
    @(negedge clk) init = 0;
    for (int n = 0; n < 600; n++) begin
      real i, t, ksr, tsr;
      int c;
      c = n % NCH;
      i = (real'($urandom_range(0, 3000)) - 1500.0) / 100.0;
      // last third: steady charging, so an error in the charging efficiency accumulates
      if (n >= 400) i = -(real'($urandom_range(500, 1500)) / 100.0);
      t = real'($urandom_range(0, 4000)) / 100.0;
      in_valid = 1; in_ch = 2'(c); in_cur = tofix(i); in_temp = tofix(t); in_aux = 32'(n);
      @(negedge clk);
      while (!in_ready) @(negedge clk);
      @(posedge clk);
      #1;
      // accepted at this edge
      if (last_acc >= 0) begin
        checks++;
        if (cyc - last_acc != 8) begin failures++; $display("II %0d", cyc - last_acc); end
      end
      last_acc = cyc;
      ksr = real'(k_soc[c]) / 281474976710656.0;
      tsr = real'(ts) / 281474976710656.0;
      exp_u.push_back(cell_step(t, fr(in_cur), ksr, tsr, soc_r[c], up_r[c]));
      exp_soc.push_back(soc_r[c]);
      exp_ch.push_back(c);
      acc_cyc.push_back(cyc);
      if (i < 0.0) n_charge++;
      @(negedge clk);
      in_valid = 0;
    end
    in_valid = 0;
    repeat (40) @(posedge clk);
    checks++;
    if (n_out != 600) begin failures++; $display("outputs %0d", n_out); end
    checks++;
    if (n_charge == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    if (out_valid) begin
      real eu, es; int ec, ac;
      eu = exp_u.pop_front(); es = exp_soc.pop_front(); ec = exp_ch.pop_front();
      ac = acc_cyc.pop_front();
      n_out++;
      checks += 4;
      if (cyc - ac != 20) begin failures++; $display("latency %0d", cyc - ac); end
      if (int'(out_ch) != ec) begin failures++; $display("channel %0d exp %0d", out_ch, ec); end
      if (fr(out_u) - eu > 0.002 || eu - fr(out_u) > 0.002) begin
        failures++; $display("U_cell %f exp %f (ch %0d)", fr(out_u), eu, ec);
      end
      if (fr(out_soc) - es > 0.00005 || es - fr(out_soc) > 0.00005) begin
        failures++; $display("SoC %f exp %f (ch %0d)", fr(out_soc), es, ec);
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
