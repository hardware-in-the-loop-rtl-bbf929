// cell_lut_mem: one look-up table of the battery cell model, held in block RAM.
//
// A multi-dimensional table is stored flattened to one dimension (the axes are
// concatenated into the address: a = (it*NI + ii)*NS + is for the 3D tables, it*NS + is for
// the 2D table), so every table is a plain single-port-read, single-port-write memory.
// The read is synchronous: rdata holds the word of raddr one clock after it was presented,
// as block RAM does. The write port loads measured data at run time; at configuration the
// memory starts with the synthetic default table TABLE_ID from hil_pkg::lut_default.
module cell_lut_mem
  import hil_pkg::*;
#(
  parameter int DEPTH    = NT * NI * NS,
  parameter int WIDTH    = 32,
  parameter int TABLE_ID = LUT_RI
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [WIDTH-1:0]         wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [WIDTH-1:0]         rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  initial begin
    for (int a = 0; a < DEPTH; a++) mem[a] = WIDTH'(lut_default(TABLE_ID, a));
  end

  always_ff @(posedge clk) begin
    if (we && int'(waddr) < DEPTH) mem[waddr] <= wdata;
    rdata <= (int'(raddr) < DEPTH) ? mem[raddr] : '0;
  end
endmodule
