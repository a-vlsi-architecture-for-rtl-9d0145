// template_memory: the bank of n template SRAMs with its download logic.
//
// Each template T_j has its own single-port SRAM. The Load input chooses what drives the
// shared address: while Load is high the download address write_add is used and the
// decoder routes the write strobe enb to the SRAM chosen by ram_sel, so the host writes one
// word of one template per clock from data_in. While Load is low the read address rd_add
// from counter1 is used, every SRAM is read at once, and dout[j] shows element rd_add of
// T_j one clock later (registered read).
// Address multiplexer, decoder and per-template SRAMs follow the download diagram of the
// document; the exact gating of the decoder by Load is this design's choice.
module template_memory #(
  parameter int unsigned N_TEMPL = mdwta_pkg::N_TEMPL_DEF,
  parameter int unsigned M_ELEM  = mdwta_pkg::M_ELEM_DEF,
  parameter int unsigned DATA_W  = mdwta_pkg::DATA_W_DEF,
  localparam int unsigned AW     = (M_ELEM > 1) ? $clog2(M_ELEM) : 1,
  localparam int unsigned SW     = (N_TEMPL > 1) ? $clog2(N_TEMPL) : 1
) (
  input  logic              clk,
  input  logic              load,
  input  logic              enb,
  input  logic [SW-1:0]     ram_sel,
  input  logic [AW-1:0]     write_add,
  input  logic [DATA_W-1:0] data_in,
  input  logic [AW-1:0]     rd_add,
  output logic [DATA_W-1:0] dout [N_TEMPL]
);

  logic [N_TEMPL-1:0] wr_en;
  logic [AW-1:0]      addr;

  // Address multiplexer ("Sel" in the download diagram): 1 = download, 0 = matching.
  assign addr = load ? write_add : rd_add;

  wr_decoder #(.N_TEMPL(N_TEMPL)) u_dec (
    .load    (load),
    .enb     (enb),
    .ram_sel (ram_sel),
    .wr_en   (wr_en)
  );

  for (genvar j = 0; j < N_TEMPL; j++) begin : g_t
    template_sram #(.M_ELEM(M_ELEM), .DATA_W(DATA_W)) u_sram (
      .clk   (clk),
      .addr  (addr),
      .wr_en (wr_en[j]),
      .din   (data_in),
      .dout  (dout[j])
    );
  end

endmodule
