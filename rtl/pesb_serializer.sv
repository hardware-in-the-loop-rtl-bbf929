// pesb_serializer: turns the per-module input vectors of one arm (module currents and
// temperatures, NCH entries each) into a stream of one module per handshake.
//
// On start the vectors are captured, so the whole frame is computed from one consistent
// sample; entries then leave in index order 0..NCH-1 on a valid/ready handshake. A start
// that arrives while a frame is still being sent is counted in overrun and ignored.
// busy is high from start to the last handshake. The capture and the overrun rule are this
// design's choice.
module pesb_serializer
  import hil_pkg::*;
#(
  parameter int NCH = 20,
  localparam int CHW = (NCH > 1) ? $clog2(NCH) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  fix_t           i_vec [NCH],
  input  fix_t           t_vec [NCH],
  output logic           out_valid,
  input  logic           out_ready,
  output logic [CHW-1:0] out_ch,
  output fix_t           out_i,
  output fix_t           out_t,
  output logic           busy,
  output logic [15:0]    overrun
);
  fix_t i_q [NCH];
  fix_t t_q [NCH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; out_ch <= '0; overrun <= '0;
      for (int c = 0; c < NCH; c++) begin i_q[c] <= '0; t_q[c] <= '0; end
    end else begin
      if (busy && out_ready) begin
        if (int'(out_ch) == NCH - 1) busy <= 1'b0;
        else                         out_ch <= out_ch + 1'b1;
      end
      if (start) begin
        if (busy && !(out_ready && int'(out_ch) == NCH - 1)) begin
          overrun <= overrun + 1'b1;
        end else begin
          i_q <= i_vec; t_q <= t_vec; out_ch <= '0; busy <= 1'b1;
        end
      end
    end
  end

  assign out_valid = busy;
  assign out_i = i_q[out_ch];
  assign out_t = t_q[out_ch];
endmodule
