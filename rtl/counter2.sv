// counter2: bit counter of the winner-take-all search.
//
// A pulse on clear (the same Latch-and-Clear pulse that loads the WTA shift registers)
// starts a run of N_BITS clocks. step is high during each clock of the run: one distance
// bit, MSB first, is judged per step. latch is high on the step of the last bit (the LSB)
// and makes the result register take the winner code. A new clear restarts the run.
// The document gives the counter's role (clear from Load, latch to the result register);
// the counter's width and the one-clock step timing are this design's choices.
module counter2 #(
  parameter int unsigned N_BITS = 13,
  localparam int unsigned CW    = (N_BITS > 1) ? $clog2(N_BITS) : 1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic clear,
  output logic step,
  output logic latch
);

  logic [CW-1:0] cnt;
  logic          active;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt    <= '0;
      active <= 1'b0;
    end else if (clear) begin
      cnt    <= '0;
      active <= 1'b1;
    end else if (active) begin
      if (cnt == CW'(N_BITS - 1)) begin
        cnt    <= '0;
        active <= 1'b0;
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end

  assign step  = active;
  assign latch = active && (cnt == CW'(N_BITS - 1));

endmodule
