// winner_observer: priority encoder of the WTA status flags.
//
// code is the position of the lowest-numbered flag that is 1 (positions count from 0, so
// template T_1 is code 0). When several templates tie for the minimum distance, the
// smallest position is thus chosen. any is high when at least one flag is set; after a
// competition at least one always is. Purely combinational.
// Lowest-position priority is the document's rule; the 0-based numbering follows its
// example, where the fourth template yields code 011.
module winner_observer #(
  parameter int unsigned N_TEMPL = mdwta_pkg::N_TEMPL_DEF,
  localparam int unsigned SW     = (N_TEMPL > 1) ? $clog2(N_TEMPL) : 1
) (
  input  logic [N_TEMPL-1:0] flags,
  output logic [SW-1:0]      code,
  output logic               any
);

  always_comb begin
    code = '0;
    any  = 1'b0;
    for (int j = N_TEMPL - 1; j >= 0; j--) begin
      if (flags[j]) begin
        code = SW'(j);
        any  = 1'b1;
      end
    end
  end

endmodule
