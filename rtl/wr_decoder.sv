// wr_decoder: selects which template SRAM a download word is written to.
//
// While Load is high and the write strobe enb is high, exactly one bit of wr_en, the one
// numbered by ram_sel, is high; otherwise all are low. Purely combinational.
// The document names the decoder, its RAMSel and ENB inputs and its WrEn outputs; gating
// it with Load, so that no template changes while matching, is this design's choice.
module wr_decoder #(
  parameter int unsigned N_TEMPL = mdwta_pkg::N_TEMPL_DEF,
  localparam int unsigned SW     = (N_TEMPL > 1) ? $clog2(N_TEMPL) : 1
) (
  input  logic               load,
  input  logic               enb,
  input  logic [SW-1:0]      ram_sel,
  output logic [N_TEMPL-1:0] wr_en
);

  always_comb begin
    wr_en = '0;
    for (int unsigned j = 0; j < N_TEMPL; j++)
      wr_en[j] = load && enb && (ram_sel == SW'(j));
  end

endmodule
