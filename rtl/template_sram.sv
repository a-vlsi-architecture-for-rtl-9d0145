// template_sram: storage for one template vector T_j.
//
// A single-port synchronous RAM of M_ELEM words of DATA_W bits. The one address port is
// shared by download and matching: the caller selects the write address while loading and
// the read address while matching. A write happens on the rising clock edge when wr_en is
// high. The read is registered: dout shows the word at the address of the previous clock,
// which is the one clock "for reading data from SRAM" in the distance latency.
// The document gives only the block's role; the synchronous single-port organisation is
// this design's choice (it maps onto FPGA block RAM). Contents are not reset.
module template_sram #(
  parameter int unsigned M_ELEM = mdwta_pkg::M_ELEM_DEF,
  parameter int unsigned DATA_W = mdwta_pkg::DATA_W_DEF,
  localparam int unsigned AW    = (M_ELEM > 1) ? $clog2(M_ELEM) : 1
) (
  input  logic              clk,
  input  logic [AW-1:0]     addr,
  input  logic              wr_en,
  input  logic [DATA_W-1:0] din,
  output logic [DATA_W-1:0] dout
);

  logic [DATA_W-1:0] mem [M_ELEM];

  always_ff @(posedge clk) begin
    if (wr_en) mem[addr] <= din;
    dout <= mem[addr];
  end

endmodule
