// mmc_statespace: averaged state-space model of the modular multilevel converter.
//
// Evaluates the discretized model  x(n+1) = A x(n) + B u(n) + F z(n),  y(n) = C x(n)
// (D is zero). u are the six arm reference voltages p1..n3 set by the controller, z the
// grid voltages (three AC phases and the DC link), x the six arm currents and y the three
// AC phase currents. Following the model's block diagram the state vector is output
// directly as the arm currents and y as the AC currents; any transformation between the
// physical quantities and the state variables is folded into the matrices, which are
// loaded at run time through the cfg_* write port (they come from the converter's
// parameters and sample time, none are fixed in hardware).
//
// Timing: the model is stepped at CLK / RATE_DIV (100 MHz / 10 = 10 MHz, as in the source).
// u and z are sampled at the end of the clock in which step_tick is high; then one row of
// [A B F] is evaluated per clock with NX+NU+NZ parallel multipliers, x(n+1) is committed
// and y = C x(n+1) is formed one clock later. i_arm and i_ac change, with out_valid high,
// NX+3 clocks after the step_tick clock (9 clocks, 90 ns, at the defaults).
// The source's generated implementation reaches 2.6 us open-loop time through deeper
// pipelining; this row-serial schedule is this design's own choice.
//
// Fixed point: signals are Q16.16 (hil_pkg::fix_t), coefficients signed CW-bit with CFRAC
// fraction bits (Q8.24 at the defaults). Sums are kept at full width and truncated once.
module mmc_statespace
  import hil_pkg::*;
#(
  parameter int NX       = 6,   // states = arm currents
  parameter int NU       = 6,   // arm reference voltages
  parameter int NZ       = 4,   // grid voltages: 3 AC phases + DC
  parameter int NY       = 3,   // AC phase currents
  parameter int CW       = 32,
  parameter int CFRAC    = 24,
  parameter int RATE_DIV = 10
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // coefficient write port
  input  logic                 cfg_we,
  input  mat_sel_e             cfg_sel,
  input  logic [3:0]           cfg_row,
  input  logic [3:0]           cfg_col,
  input  logic signed [CW-1:0] cfg_data,
  input  logic                 clear_state,   // sets x to zero
  // model inputs / outputs
  input  fix_t                 u_arm_ref [NU],
  input  fix_t                 z_grid    [NZ],
  output fix_t                 i_arm     [NX],
  output fix_t                 i_ac      [NY],
  output logic                 step_tick,     // u and z sampled this clock
  output logic                 out_valid      // new i_arm / i_ac this clock
);
  localparam int NK  = NX + NU + NZ;
  localparam int ACW = 64 + $clog2(NK + 1);

  initial assert (RATE_DIV >= NX + 3) else $error("RATE_DIV too small for row-serial schedule");

  logic signed [CW-1:0] a_m [NX][NX];
  logic signed [CW-1:0] b_m [NX][NU];
  logic signed [CW-1:0] f_m [NX][NZ];
  logic signed [CW-1:0] c_m [NY][NX];

  fix_t x_q  [NX];
  fix_t xn_q [NX];
  fix_t u_q  [NU];
  fix_t z_q  [NZ];

  logic [$clog2(RATE_DIV)-1:0] div_q;
  logic [$clog2(NX+1)-1:0]     row_q;
  logic                        run_q, commit_q, ystage_q;

  // coefficient registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < NX; r++) begin
        for (int c = 0; c < NX; c++) a_m[r][c] <= '0;
        for (int c = 0; c < NU; c++) b_m[r][c] <= '0;
        for (int c = 0; c < NZ; c++) f_m[r][c] <= '0;
      end
      for (int r = 0; r < NY; r++)
        for (int c = 0; c < NX; c++) c_m[r][c] <= '0;
    end else if (cfg_we) begin
      unique case (cfg_sel)
        MAT_A: if (int'(cfg_row) < NX && int'(cfg_col) < NX) a_m[cfg_row][cfg_col] <= cfg_data;
        MAT_B: if (int'(cfg_row) < NX && int'(cfg_col) < NU) b_m[cfg_row][cfg_col] <= cfg_data;
        MAT_F: if (int'(cfg_row) < NX && int'(cfg_col) < NZ) f_m[cfg_row][cfg_col] <= cfg_data;
        MAT_C: if (int'(cfg_row) < NY && int'(cfg_col) < NX) c_m[cfg_row][cfg_col] <= cfg_data;
      endcase
    end
  end

  // one row of A x + B u + F z
  logic signed [ACW-1:0] row_acc;
  always_comb begin
    row_acc = '0;
    for (int c = 0; c < NX; c++) row_acc += ACW'(64'(a_m[row_q][c]) * 64'(x_q[c]));
    for (int c = 0; c < NU; c++) row_acc += ACW'(64'(b_m[row_q][c]) * 64'(u_q[c]));
    for (int c = 0; c < NZ; c++) row_acc += ACW'(64'(f_m[row_q][c]) * 64'(z_q[c]));
  end

  // all rows of C x
  logic signed [ACW-1:0] y_acc [NY];
  always_comb begin
    for (int r = 0; r < NY; r++) begin
      y_acc[r] = '0;
      for (int c = 0; c < NX; c++) y_acc[r] += ACW'(64'(c_m[r][c]) * 64'(x_q[c]));
    end
  end

  assign step_tick = (div_q == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div_q     <= '0;
      row_q     <= '0;
      run_q     <= 1'b0;
      commit_q  <= 1'b0;
      ystage_q  <= 1'b0;
      out_valid <= 1'b0;
      for (int c = 0; c < NX; c++) begin x_q[c] <= '0; xn_q[c] <= '0; i_arm[c] <= '0; end
      for (int c = 0; c < NU; c++) u_q[c] <= '0;
      for (int c = 0; c < NZ; c++) z_q[c] <= '0;
      for (int r = 0; r < NY; r++) i_ac[r] <= '0;
    end else begin
      div_q     <= (int'(div_q) == RATE_DIV - 1) ? '0 : div_q + 1'b1;
      out_valid <= 1'b0;
      commit_q  <= 1'b0;
      if (step_tick) begin
        u_q   <= u_arm_ref;
        z_q   <= z_grid;
        row_q <= '0;
        run_q <= 1'b1;
      end else if (run_q) begin
        xn_q[row_q] <= fix_t'(row_acc >>> CFRAC);
        if (int'(row_q) == NX - 1) begin
          run_q    <= 1'b0;
          commit_q <= 1'b1;
        end else begin
          row_q <= row_q + 1'b1;
        end
      end
      if (commit_q) begin
        x_q <= xn_q;
      end
      // y = C x(n+1), registered one clock after the commit
      ystage_q <= commit_q;
      if (ystage_q) begin
        i_arm <= x_q;
        for (int r = 0; r < NY; r++) i_ac[r] <= fix_t'(y_acc[r] >>> CFRAC);
        out_valid <= 1'b1;
      end
      if (clear_state) begin
        for (int c = 0; c < NX; c++) x_q[c] <= '0;
      end
    end
  end

endmodule
