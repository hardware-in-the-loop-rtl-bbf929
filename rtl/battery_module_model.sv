// battery_module_model: serializable battery module built around the cell model.
//
// A module of Ns cells in series and Np in parallel is represented by one cell whose
// inputs and outputs are scaled: the cell current is I_PESB / Np, the module voltage is
// Ns * U_cell minus the drop over the interconnection resistance R_bat of that module,
//   U_PESB = Ns * U_cell - R_bat * I_PESB,
// as in the source's module diagram. The module current rides through the cell pipeline as
// side information so the drop is taken with the current of the same sample. Ns and Np
// default to the 14s14p module of the source; R_bat is given per channel at run time. The
// stream handshake and timing are those of battery_cell_model plus one output register
// (21 clocks from input to output).
module battery_module_model
  import hil_pkg::*;
#(
  parameter int NCH = 20,
  parameter int NS_CELLS = 14,
  parameter int NP_CELLS = 14,
  localparam int CHW = (NCH > 1) ? $clog2(NCH) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           init,
  input  fix_t           soc0  [NCH],
  input  logic [31:0]    k_soc [NCH],
  input  logic [31:0]    ts,
  input  fix_t           r_bat [NCH],
  input  logic           lut_we,
  input  logic [1:0]     lut_sel,
  input  logic [8:0]     lut_addr,
  input  logic [63:0]    lut_wdata,
  input  logic           in_valid,
  output logic           in_ready,
  input  logic [CHW-1:0] in_ch,
  input  fix_t           in_i_pesb,
  input  fix_t           in_temp,
  output logic           out_valid,
  output logic [CHW-1:0] out_ch,
  output fix_t           out_u_pesb,
  output fix_t           out_soc
);
  localparam fix_t INV_NP = fix_t'((65536 + NP_CELLS / 2) / NP_CELLS);

  logic           c_valid;
  logic [CHW-1:0] c_ch;
  fix_t           c_u, c_soc, c_i;

  battery_cell_model #(.NCH(NCH), .AUXW(32)) u_cell (
    .clk, .rst_n, .init, .soc0, .k_soc, .ts,
    .lut_we, .lut_sel, .lut_addr, .lut_wdata,
    .in_valid, .in_ready, .in_ch,
    .in_cur(fmul(in_i_pesb, INV_NP)), .in_temp, .in_aux(in_i_pesb),
    .out_valid(c_valid), .out_ch(c_ch), .out_u(c_u), .out_soc(c_soc), .out_aux(c_i)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; out_ch <= '0; out_u_pesb <= '0; out_soc <= '0;
    end else begin
      out_valid  <= c_valid;
      out_ch     <= c_ch;
      out_u_pesb <= fix_t'(NS_CELLS) * c_u - fmul(r_bat[c_ch], c_i);
      out_soc    <= c_soc;
    end
  end
endmodule
