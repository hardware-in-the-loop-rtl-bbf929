// pesb_deserializer: collects the stream of per-module results (module voltage and SoC)
// back into vectors of NCH entries.
//
// Each valid beat writes entry in_ch; frame_done pulses for one clock after the beat of the
// last entry (in_ch = NCH-1), and from then on the output vectors hold the whole frame.
// Results are written straight into the output registers, so entries change as they
// arrive; a reader that needs a consistent vector samples it at frame_done.
module pesb_deserializer
  import hil_pkg::*;
#(
  parameter int NCH = 20,
  localparam int CHW = (NCH > 1) ? $clog2(NCH) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  input  logic [CHW-1:0] in_ch,
  input  fix_t           in_u,
  input  fix_t           in_soc,
  output fix_t           u_vec   [NCH],
  output fix_t           soc_vec [NCH],
  output logic           frame_done
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      frame_done <= 1'b0;
      for (int c = 0; c < NCH; c++) begin u_vec[c] <= '0; soc_vec[c] <= '0; end
    end else begin
      frame_done <= 1'b0;
      if (in_valid && int'(in_ch) < NCH) begin
        u_vec[in_ch]   <= in_u;
        soc_vec[in_ch] <= in_soc;
        frame_done     <= (int'(in_ch) == NCH - 1);
      end
    end
  end
endmodule
