// tb_mdwta_top: end-to-end self-checking test of the pattern matcher at its default size
// (8 templates, 32 elements of 8 bits, 13-bit distances).
//
// Scenarios:
//  1. Letter workload: the input vector printed for the fourth letter is stored as
//     template 3 and as X; the other seven templates are perturbed copies of it, like the
//     near-identical letter profiles of the experiment. The winner must be code 3 (011)
//     with distance 0. The first distances must appear 34 clocks after load falls
//     (35th clock), passes must repeat every 35 clocks, and the code must follow each
//     pass by 13 clocks.
//  2. X is rewritten through its own port while the matcher runs; the pass that reads
//     a mix of old and new X is skipped and the next pass must match the new X.
//  3. Ties: two templates equal to X; the lower-numbered one must win.
//  4. Random templates and random X vectors, reloaded with load high between rounds.
// Every pass that is checked compares all eight distances on dist_o with distances
// computed here, and the code and the set of winners with the argmin computed here.
// The mechanisms of the design are counted: template downloads, X writes during
// matching, negative differences corrected to their absolute value, passes whose WTA
// search overlaps the next accumulation, ties resolved by the winner observer, and
// returns to download mode. Each must happen at least once.
module tb_mdwta_top;
  localparam int unsigned N = mdwta_pkg::N_TEMPL_DEF;
  localparam int unsigned M = mdwta_pkg::M_ELEM_DEF;
  localparam int unsigned W = mdwta_pkg::DATA_W_DEF;
  localparam int unsigned AW = $clog2(M), SW = $clog2(N);
  localparam int unsigned ACC_W = mdwta_pkg::acc_width(W, M);
  localparam int unsigned PERIOD = M + 3;

  logic clk = 1'b0, rst_n = 1'b0, load = 1'b1;
  logic [W-1:0] data_in = '0, data_in_x = '0;
  logic [AW-1:0] write_add = '0, write_add_x = '0;
  logic [SW-1:0] ram_sel = '0;
  logic enb = 1'b0, wr_en_x = 1'b0;
  logic [SW-1:0] code_o;
  logic code_valid_o, latch_clr_o;
  logic [N-1:0] winners_o;
  logic [ACC_W-1:0] dist_o [N];

  // Reference copies of the memories.
  logic [W-1:0] tmem [N][M];
  logic [W-1:0] xmem [M];

  // The input vector given for the fourth letter.
  localparam logic [W-1:0] LETTER_X [M] = '{
    8'h00, 8'h00, 8'h00, 8'h03, 8'h08, 8'h2d, 8'h3c, 8'h3e, 8'h2c, 8'h44, 8'h34, 8'h1b,
    8'h06, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h11, 8'h1f, 8'h0a, 8'h0c, 8'h08, 8'h0d,
    8'h10, 8'h17, 8'h35, 8'h0d, 8'h20, 8'h53, 8'h00, 8'h00};

  int checks = 0, failures = 0;
  int n_tdownload = 0, n_xwrite_running = 0, n_abs_neg = 0, n_overlap = 0, n_ties = 0,
      n_reload = 0;
  int unsigned clk_count = 0;

  mdwta_top dut (
    .clk, .rst_n, .load, .data_in, .write_add, .ram_sel, .enb,
    .data_in_x, .write_add_x, .wr_en_x,
    .code_o, .code_valid_o, .winners_o, .dist_o, .latch_clr_o
  );

  always #5 clk = ~clk;
  always @(posedge clk) clk_count <= clk_count + 1;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic write_template(input int j);
    load = 1;
    for (int i = 0; i < M; i++) begin
      ram_sel = SW'(j); write_add = AW'(i); data_in = tmem[j][i]; enb = 1;
      @(negedge clk);
    end
    enb = 0;
    n_tdownload++;
  endtask

  // Writes X through the X port; does not touch load.
  task automatic write_x();
    for (int i = 0; i < M; i++) begin
      write_add_x = AW'(i); data_in_x = xmem[i]; wr_en_x = 1;
      if (!load) n_xwrite_running++;
      @(negedge clk);
    end
    wr_en_x = 0;
  endtask

  // Waits for the next latch pulse (checked at a negative edge) and returns the clocks
  // waited. When do_check is set, compares distances, then code and winners.
  task automatic next_pass(input bit do_check, output int waited);
    int unsigned dref [N];
    int unsigned mn;
    logic [N-1:0] exp_w;
    logic [SW-1:0] exp_c;
    int lat;
    waited = 0;
    while (!latch_clr_o) begin
      @(negedge clk);
      waited++;
    end
    if (!do_check) begin
      @(negedge clk);
      return;
    end
    mn = '1;
    for (int j = 0; j < N; j++) begin
      dref[j] = 0;
      for (int i = 0; i < M; i++) begin
        if (tmem[j][i] < xmem[i]) n_abs_neg++;
        dref[j] += (tmem[j][i] > xmem[i]) ? tmem[j][i] - xmem[i] : xmem[i] - tmem[j][i];
      end
      check(dist_o[j] == ACC_W'(dref[j]),
            $sformatf("distance of template %0d: %0d expected %0d", j, dist_o[j], dref[j]));
      if (dref[j] < mn) mn = dref[j];
    end
    exp_w = '0;
    for (int j = 0; j < N; j++) exp_w[j] = (dref[j] == mn);
    exp_c = '0;
    for (int j = N - 1; j >= 0; j--) if (exp_w[j]) exp_c = SW'(j);
    if ($countones(exp_w) > 1) n_ties++;
    lat = 0;
    @(negedge clk);
    lat++;
    while (!code_valid_o && lat < 40) begin
      @(negedge clk);
      lat++;
    end
    // The distances enter the WTA on the edge closing the latch clock; the result
    // register is written ACC_W edges later and is read in the clock after that.
    check(lat == ACC_W + 1, $sformatf("WTA latency %0d expected %0d", lat, ACC_W + 1));
    check(code_o == exp_c, $sformatf("code %0d expected %0d", code_o, exp_c));
    check(winners_o == exp_w, $sformatf("winners %b expected %b", winners_o, exp_w));
    // The code arrived while the next pass was being accumulated (load low, no latch).
    if (!load && !latch_clr_o) n_overlap++;
  endtask

  task automatic start_matching();
    load = 0;
  endtask

  initial begin
    int waited;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // 1. Letter workload.
    for (int j = 0; j < N; j++)
      for (int i = 0; i < M; i++) begin
        int v;
        v = int'(LETTER_X[i]);
        if (j != 3) v += $urandom_range(0, 16) - 8;
        if (v < 0) v = 0;
        if (v > 255) v = 255;
        tmem[j][i] = W'(v);
      end
    for (int i = 0; i < M; i++) xmem[i] = LETTER_X[i];
    for (int j = 0; j < N; j++) write_template(j);
    write_x();
    start_matching();
    next_pass(1, waited);
    check(waited == PERIOD - 1, $sformatf("first distances after %0d clocks, expected %0d",
                                          waited, PERIOD - 1));
    check(code_o == 3 && dist_o[3] == 0, "letter 4 recognised as code 011");
    for (int r = 0; r < 3; r++) begin
      next_pass(1, waited);
      check(waited == PERIOD - 1 - ACC_W, // code seen ACC_W+1 clocks after the latch
            $sformatf("pass period: waited %0d after the code", waited));
    end

    // 2. Rewrite X while running.
    for (int r = 0; r < 4; r++) begin
      next_pass(0, waited);
      for (int i = 0; i < M; i++) xmem[i] = W'($urandom);
      write_x();
      next_pass(0, waited);   // pass that mixed old and new X
      next_pass(1, waited);
    end

    // 3. Ties: templates 2 and 6 equal to X.
    for (int i = 0; i < M; i++) begin
      xmem[i] = W'($urandom);
      tmem[2][i] = xmem[i];
      tmem[6][i] = xmem[i];
    end
    n_reload++;
    write_template(2);
    write_template(6);
    write_x();
    @(negedge clk);
    start_matching();
    next_pass(1, waited);
    check(code_o == 2 && winners_o[6] && winners_o[2], "tie resolved to the lower position");

    // 4. Random rounds.
    for (int r = 0; r < 10; r++) begin
      for (int j = 0; j < N; j++)
        for (int i = 0; i < M; i++) tmem[j][i] = W'($urandom);
      for (int i = 0; i < M; i++) xmem[i] = W'($urandom);
      n_reload++;
      for (int j = 0; j < N; j++) write_template(j);
      write_x();
      start_matching();
      next_pass(1, waited);
      next_pass(1, waited);
    end

    check(n_tdownload > 0, "template download exercised");
    check(n_xwrite_running > 0, "X written during matching");
    check(n_abs_neg > 0, "negative differences corrected");
    check(n_overlap > 0, "WTA overlapped with accumulation");
    check(n_ties > 0, "tie resolved by the winner observer");
    check(n_reload > 0, "return to download mode");
    $display("mechanisms: downloads=%0d x_writes_running=%0d abs_neg=%0d overlap=%0d ties=%0d reloads=%0d",
             n_tdownload, n_xwrite_running, n_abs_neg, n_overlap, n_ties, n_reload);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
