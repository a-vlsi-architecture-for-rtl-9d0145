// mdwta_top: pattern matcher that finds the stored template vector nearest to an input
// vector X in Manhattan (L1) distance.
//
// Download (load = 1): the host writes template words through data_in / write_add, with
// ram_sel choosing the template and enb strobing the write, one word per clock. X is
// written through its own port (data_in_x / write_add_x / wr_en_x) at any time.
// Matching (load = 0): counter1 reads element i of X and of every template at once; one
// AVA unit per template accumulates |t_ij - x_i|. A pass over M_ELEM elements takes
// M_ELEM+3 clocks (35 for 32 elements); at its last clock latch_clr_o pulses, the
// distances (also visible on dist_o during that clock) move into the WTA stage and the
// accumulators restart. The WTA stage finds the smallest distance bit-serially in ACC_W
// clocks (13) while the next pass is already being accumulated: the two stages form a
// two-stage pipeline. code_o, the 0-based number of the winning template (lowest
// number on a tie), is valid when code_valid_o pulses, ACC_W clocks after latch_clr_o;
// winners_o shows every template that reached the minimum.
// As long as load stays low the matcher repeats this for the current contents of X,
// one result every M_ELEM+3 clocks. Writing X during a pass mixes old and new elements
// in that pass; the result of the following pass is clean.
// Block structure, sizes and latencies follow the document; the port names follow its
// download diagram. The single clock, the active-low asynchronous reset and the
// dist_o / winners_o observation ports are this design's choices.
module mdwta_top #(
  parameter int unsigned N_TEMPL = mdwta_pkg::N_TEMPL_DEF,
  parameter int unsigned M_ELEM  = mdwta_pkg::M_ELEM_DEF,
  parameter int unsigned DATA_W  = mdwta_pkg::DATA_W_DEF,
  localparam int unsigned AW     = (M_ELEM > 1) ? $clog2(M_ELEM) : 1,
  localparam int unsigned SW     = (N_TEMPL > 1) ? $clog2(N_TEMPL) : 1,
  localparam int unsigned ACC_W  = mdwta_pkg::acc_width(DATA_W, M_ELEM)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               load,
  // template download
  input  logic [DATA_W-1:0]  data_in,
  input  logic [AW-1:0]      write_add,
  input  logic [SW-1:0]      ram_sel,
  input  logic               enb,
  // X download
  input  logic [DATA_W-1:0]  data_in_x,
  input  logic [AW-1:0]      write_add_x,
  input  logic               wr_en_x,
  // results
  output logic [SW-1:0]      code_o,
  output logic               code_valid_o,
  output logic [N_TEMPL-1:0] winners_o,
  output logic [ACC_W-1:0]   dist_o [N_TEMPL],
  output logic               latch_clr_o
);

  // The search must end before the next pass delivers new distances.
  if (M_ELEM + 3 < ACC_W) begin : g_size_check
    $error("mdwta_top: M_ELEM+3 must be at least the distance width");
  end

  logic [AW-1:0]     rd_add;
  logic              elem_valid, latch_clr;
  logic [DATA_W-1:0] t_data [N_TEMPL];
  logic [DATA_W-1:0] x_data;
  logic [ACC_W-1:0]  acc [N_TEMPL];
  logic              wta_busy;

  counter1 #(.M_ELEM(M_ELEM)) u_cnt1 (
    .clk        (clk),
    .rst_n      (rst_n),
    .load       (load),
    .rd_add     (rd_add),
    .rd_valid   (),
    .elem_valid (elem_valid),
    .latch_clr  (latch_clr)
  );

  template_memory #(.N_TEMPL(N_TEMPL), .M_ELEM(M_ELEM), .DATA_W(DATA_W)) u_tmem (
    .clk       (clk),
    .load      (load),
    .enb       (enb),
    .ram_sel   (ram_sel),
    .write_add (write_add),
    .data_in   (data_in),
    .rd_add    (rd_add),
    .dout      (t_data)
  );

  x_sram #(.M_ELEM(M_ELEM), .DATA_W(DATA_W)) u_xmem (
    .clk      (clk),
    .wr_add_x (write_add_x),
    .wr_en_x  (wr_en_x),
    .din_x    (data_in_x),
    .rd_add   (rd_add),
    .dout_x   (x_data)
  );

  for (genvar j = 0; j < N_TEMPL; j++) begin : g_ava
    ava #(.DATA_W(DATA_W), .M_ELEM(M_ELEM)) u_ava (
      .clk        (clk),
      .rst_n      (rst_n),
      .clear      (load),
      .t          (t_data[j]),
      .x          (x_data),
      .elem_valid (elem_valid),
      .latch_clr  (latch_clr),
      .acc        (acc[j])
    );
  end

  wta #(.N_TEMPL(N_TEMPL), .ACC_W(ACC_W)) u_wta (
    .clk        (clk),
    .rst_n      (rst_n),
    .load       (latch_clr),
    .dists      (acc),
    .code       (code_o),
    .code_valid (code_valid_o),
    .winners    (winners_o),
    .busy       (wta_busy)
  );

  assign dist_o      = acc;
  assign latch_clr_o = latch_clr;

  // A new pass must never arrive while the search is running.
  property p_no_overlap;
    @(posedge clk) disable iff (!rst_n) latch_clr |-> !wta_busy || u_wta.u_cnt2.latch;
  endproperty
  a_no_overlap: assert property (p_no_overlap);

endmodule
