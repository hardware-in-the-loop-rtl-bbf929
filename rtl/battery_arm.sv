// battery_arm: all battery modules of one converter arm, computed serially on one shared
// battery module model.
//
// Serializer -> battery_module_model -> deserializer. Every start pulse captures the
// module currents and temperatures of the NCH modules, pushes them through the module model
// one per 8-clock slot and, 22 clocks after the last one entered, presents the NCH module
// voltages and SoCs as vectors with frame_done. Depending on where in the 8-clock slot the
// start falls, frame_done follows start by 8*NCH+15 to 8*NCH+22 clocks (at most 182 for
// 20 modules); starting a frame every 200 clocks gives
// the 500 kHz per-module update rate of the source at a 100 MHz clock. The tables are
// shared by all modules; only the integrators are per module.
module battery_arm
  import hil_pkg::*;
#(
  parameter int NCH = 20,
  parameter int NS_CELLS = 14,
  parameter int NP_CELLS = 14
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        init,
  input  fix_t        soc0  [NCH],
  input  logic [31:0] k_soc [NCH],
  input  logic [31:0] ts,
  input  fix_t        r_bat [NCH],
  input  logic        lut_we,
  input  logic [1:0]  lut_sel,
  input  logic [8:0]  lut_addr,
  input  logic [63:0] lut_wdata,
  input  logic        start,
  input  fix_t        i_pesb [NCH],
  input  fix_t        t_pesb [NCH],
  output fix_t        u_pesb [NCH],
  output fix_t        soc    [NCH],
  output logic        frame_done,
  output logic [15:0] overrun
);
  localparam int CHW = (NCH > 1) ? $clog2(NCH) : 1;

  logic           s_valid, s_ready, s_busy, m_valid;
  logic [CHW-1:0] s_ch, m_ch;
  fix_t           s_i, s_t, m_u, m_soc;

  pesb_serializer #(.NCH(NCH)) u_ser (
    .clk, .rst_n, .start, .i_vec(i_pesb), .t_vec(t_pesb),
    .out_valid(s_valid), .out_ready(s_ready), .out_ch(s_ch), .out_i(s_i), .out_t(s_t),
    .busy(s_busy), .overrun
  );

  battery_module_model #(.NCH(NCH), .NS_CELLS(NS_CELLS), .NP_CELLS(NP_CELLS)) u_mod (
    .clk, .rst_n, .init, .soc0, .k_soc, .ts, .r_bat,
    .lut_we, .lut_sel, .lut_addr, .lut_wdata,
    .in_valid(s_valid), .in_ready(s_ready), .in_ch(s_ch), .in_i_pesb(s_i), .in_temp(s_t),
    .out_valid(m_valid), .out_ch(m_ch), .out_u_pesb(m_u), .out_soc(m_soc)
  );

  pesb_deserializer #(.NCH(NCH)) u_des (
    .clk, .rst_n, .in_valid(m_valid), .in_ch(m_ch), .in_u(m_u), .in_soc(m_soc),
    .u_vec(u_pesb), .soc_vec(soc), .frame_done
  );

  logic unused;
  assign unused = s_busy;
endmodule
