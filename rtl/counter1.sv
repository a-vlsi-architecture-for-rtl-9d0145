// counter1: read-address generator and pipeline sequencer of the distance stage.
//
// While Load is low the counter steps 0, 1, ..., M_ELEM+2 and wraps to 0, so one vector
// pass takes M_ELEM+3 clocks (35 for 32 elements). For counts 0..M_ELEM-1 it is the read
// address of all SRAMs (rd_add, rd_valid high). The three extra counts let the last
// element pass the SRAM read, the absolute-difference register and the accumulator; at
// the last count latch_clr is high for one clock, which loads the finished distances into
// the winner-take-all stage and clears the accumulators on the same edge. elem_valid is
// rd_valid delayed by one clock: it marks the SRAM outputs that carry a real element.
// While Load is high the counter is held at 0 and nothing is flagged valid.
// The count range 0..m+2 and the latch at the last count follow the document's timing
// (distance ready after the 34th clock, counter returning to 0 after 34); holding the
// counter during Load and the valid flag are this design's choices.
module counter1 #(
  parameter int unsigned M_ELEM = mdwta_pkg::M_ELEM_DEF,
  localparam int unsigned AW    = (M_ELEM > 1) ? $clog2(M_ELEM) : 1,
  localparam int unsigned CW    = $clog2(M_ELEM + 3)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,
  output logic [AW-1:0] rd_add,
  output logic          rd_valid,
  output logic          elem_valid,
  output logic          latch_clr
);

  localparam logic [CW-1:0] LAST = CW'(M_ELEM + 2);

  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)              cnt <= '0;
    else if (load)           cnt <= '0;
    else if (cnt == LAST)    cnt <= '0;
    else                     cnt <= cnt + 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) elem_valid <= 1'b0;
    else        elem_valid <= rd_valid;
  end

  assign rd_add    = AW'(cnt);
  assign rd_valid  = !load && (cnt < CW'(M_ELEM));
  assign latch_clr = !load && (cnt == LAST);

endmodule
