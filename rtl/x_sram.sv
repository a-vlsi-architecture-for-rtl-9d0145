// x_sram: dual-port store for the input vector X.
//
// M_ELEM words of DATA_W bits with an independent write port (wr_add_x, wr_en_x, din_x)
// and read port (rd_add). Both ports use one clock here. The read is registered, like the
// template SRAMs, so the X element and the template elements of one address arrive at
// the distance units in the same clock. Because the ports are separate, a new X can be
// written while the current one is being matched; a word written and read at the same
// address in the same clock reads the old value.
// The document asks for a dual-port RAM (or FIFO) with separate write and read clocks;
// a single clock is this design's choice. Contents are not reset.
module x_sram #(
  parameter int unsigned M_ELEM = mdwta_pkg::M_ELEM_DEF,
  parameter int unsigned DATA_W = mdwta_pkg::DATA_W_DEF,
  localparam int unsigned AW    = (M_ELEM > 1) ? $clog2(M_ELEM) : 1
) (
  input  logic              clk,
  input  logic [AW-1:0]     wr_add_x,
  input  logic              wr_en_x,
  input  logic [DATA_W-1:0] din_x,
  input  logic [AW-1:0]     rd_add,
  output logic [DATA_W-1:0] dout_x
);

  logic [DATA_W-1:0] mem [M_ELEM];

  always_ff @(posedge clk) begin
    if (wr_en_x) mem[wr_add_x] <= din_x;
    dout_x <= mem[rd_add];
  end

endmodule
