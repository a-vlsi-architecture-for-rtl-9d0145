// wta: bit-serial winner-take-all search for the smallest of N_TEMPL distances.
//
// On a load pulse every distance is copied into its own shift register, all status flags
// are set to 1 (everyone is still a candidate), and counter2 starts. On each of the next
// ACC_W clocks the MSBs of the shift registers are judged together and the registers shift
// left by one bit, so the distances stream out MSB first. If any candidate still in the
// competition shows a 0, every candidate showing a 1 has the larger value and its flag is
// cleared; if all candidates show the same bit, nobody drops out. After the LSB, the flags
// still at 1 mark the minimum distance (several flags when distances tie). On that last
// step the winner observer encodes the lowest such position and the result register
// takes it: code is valid, and code_valid pulses, ACC_W clocks after the load pulse
// (13 clocks for 13-bit distances). winners holds the final flags alongside code.
// A load during a search restarts it.
// Shift registers, status flags, counter2, winner observer and result register follow the
// document's WTA diagram; the elimination rule is written behaviourally from its text.
module wta #(
  parameter int unsigned N_TEMPL = mdwta_pkg::N_TEMPL_DEF,
  parameter int unsigned ACC_W   = mdwta_pkg::acc_width(mdwta_pkg::DATA_W_DEF, mdwta_pkg::M_ELEM_DEF),
  localparam int unsigned SW     = (N_TEMPL > 1) ? $clog2(N_TEMPL) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               load,
  input  logic [ACC_W-1:0]   dists [N_TEMPL],
  output logic [SW-1:0]      code,
  output logic               code_valid,
  output logic [N_TEMPL-1:0] winners,
  output logic               busy
);

  logic [ACC_W-1:0]   sreg [N_TEMPL];
  logic [N_TEMPL-1:0] flags, flags_next, msb;
  logic               step, last;
  logic [SW-1:0]      wo_code;
  logic               wo_any;

  counter2 #(.N_BITS(ACC_W)) u_cnt2 (
    .clk   (clk),
    .rst_n (rst_n),
    .clear (load),
    .step  (step),
    .latch (last)
  );

  // Elimination: a candidate showing 1 loses if some candidate shows 0.
  always_comb begin
    for (int j = 0; j < N_TEMPL; j++) msb[j] = sreg[j][ACC_W-1];
    if ((flags & ~msb) != '0) flags_next = flags & ~msb;
    else                      flags_next = flags;
  end

  winner_observer #(.N_TEMPL(N_TEMPL)) u_wo (
    .flags (flags_next),
    .code  (wo_code),
    .any   (wo_any)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < N_TEMPL; j++) sreg[j] <= '0;
      flags <= '1;
    end else if (load) begin
      for (int j = 0; j < N_TEMPL; j++) sreg[j] <= dists[j];
      flags <= '1;
    end else if (step) begin
      for (int j = 0; j < N_TEMPL; j++) sreg[j] <= sreg[j] << 1;
      flags <= flags_next;
    end
  end

  // Result register, latched by counter2 on the LSB step.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      code       <= '0;
      winners    <= '0;
      code_valid <= 1'b0;
    end else begin
      code_valid <= 1'b0;
      if (last && !load) begin
        code       <= wo_code;
        winners    <= flags_next;
        code_valid <= wo_any;
      end
    end
  end

  assign busy = step;

endmodule
