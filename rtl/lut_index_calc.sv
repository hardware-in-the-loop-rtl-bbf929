// lut_index_calc: centralized index calculation for all look-up tables of the cell model.
//
// For the three table axes (temperature, cell current, SoC) it maps the operating point to
// the lower breakpoint index and the interpolation fraction, pos = (x - x0) * (1/step),
// index = floor(pos), fraction = pos - index. Points outside the grid are clamped to its
// edge (no extrapolation). From the indices it forms, in one step, the flattened addresses
// of every table entry adjacent to the point: 8 for the 3D tables (T, I, SoC), 4 for the
// 2D table (T, SoC) and 2 for the 1D tables (T). Corner k of the 3D table has its
// temperature index raised by k[2], current by k[1], SoC by k[0]; corner j of the 2D table
// uses j[1] for temperature and j[0] for SoC. One block serving all tables is the source's
// idea; the arithmetic and the clamping are this design's choice.
//
// Timing: one register stage; outputs belong to the inputs of the previous clock.
module lut_index_calc
  import hil_pkg::*;
#(
  parameter int   N_T        = NT,
  parameter int   N_I        = NI,
  parameter int   N_S        = NS,
  parameter fix_t T_ORIGIN   = to_fix(T0_C),
  parameter fix_t T_INV_STEP = to_fix(1.0 / T_STEP),
  parameter fix_t I_ORIGIN   = to_fix(I0_A),
  parameter fix_t I_INV_STEP = to_fix(1.0 / I_STEP),
  parameter fix_t S_ORIGIN   = to_fix(S0),
  parameter fix_t S_INV_STEP = to_fix(1.0 / S_STEP),
  localparam int  A3W = $clog2(N_T * N_I * N_S),
  localparam int  A2W = $clog2(N_T * N_S),
  localparam int  A1W = $clog2(N_T)
) (
  input  logic           clk,
  input  fix_t           temp,
  input  fix_t           cur,
  input  fix_t           soc,
  output frac_t          frac_t_o,
  output frac_t          frac_i_o,
  output frac_t          frac_s_o,
  output logic [A3W-1:0] addr3 [8],
  output logic [A2W-1:0] addr2 [4],
  output logic [A1W-1:0] addr1 [2]
);
  typedef struct packed {
    logic [7:0] idx;
    frac_t      frac;
  } axis_t;

  function automatic axis_t locate(input fix_t x, input fix_t x0, input fix_t inv_step,
                                   input int n);
    logic signed [63:0] pos;
    logic signed [47:0] ip;
    axis_t r;
    pos = (64'(x) - 64'(x0)) * 64'(inv_step);   // Q.32
    ip  = 48'(pos >>> 32);
    if (pos < 0) begin
      r.idx = '0;
      r.frac = '0;
    end else if (ip >= 48'(n - 1)) begin
      r.idx = 8'(n - 2);
      r.frac = 17'h10000;
    end else begin
      r.idx = 8'(ip);
      r.frac = {1'b0, pos[31:16]};
    end
    return r;
  endfunction

  axis_t at, ai, as_;
  always_comb begin
    at  = locate(temp, T_ORIGIN, T_INV_STEP, N_T);
    ai  = locate(cur,  I_ORIGIN, I_INV_STEP, N_I);
    as_ = locate(soc,  S_ORIGIN, S_INV_STEP, N_S);
  end

  always_ff @(posedge clk) begin
    frac_t_o <= at.frac;
    frac_i_o <= ai.frac;
    frac_s_o <= as_.frac;
    for (int k = 0; k < 8; k++)
      addr3[k] <= A3W'(((int'(at.idx) + int'(k[2])) * N_I + int'(ai.idx) + int'(k[1])) * N_S
                       + int'(as_.idx) + int'(k[0]));
    for (int j = 0; j < 4; j++)
      addr2[j] <= A2W'((int'(at.idx) + int'(j[1])) * N_S + int'(as_.idx) + int'(j[0]));
    for (int j = 0; j < 2; j++)
      addr1[j] <= A1W'(int'(at.idx) + j);
  end
endmodule
