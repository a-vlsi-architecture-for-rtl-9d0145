// tb_wta: self-checking test of the bit-serial winner-take-all stage.
// Loads sets of 8 distances of 13 bits (random, random with forced ties, all equal, one
// at the maximum value) and checks that code_valid pulses exactly 13 clocks after the
// load pulse, that code is the lowest-numbered minimum and that winners marks every
// minimum. Loads are spaced 35 clocks apart as in the full matcher.
module tb_wta;
  localparam int unsigned N = 8, AW = 13, SW = 3;
  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0;
  logic [AW-1:0] dists [N];
  logic [SW-1:0] code;
  logic code_valid, busy;
  logic [N-1:0] winners;
  int checks = 0, failures = 0, ties = 0;

  wta #(.N_TEMPL(N), .ACC_W(AW)) dut (.clk, .rst_n, .load, .dists, .code, .code_valid, .winners, .busy);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
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

  task automatic compete(input int kind);
    logic [AW-1:0] d [N];
    logic [AW-1:0] mn;
    logic [N-1:0]  exp_w;
    logic [SW-1:0] exp_c;
    int lat;
    for (int j = 0; j < N; j++) begin
      case (kind)
        0: d[j] = AW'($urandom);
        1: d[j] = AW'($urandom_range(0, 7));      // many ties
        2: d[j] = AW'(85);                        // all equal
        default: d[j] = '1;
      endcase
    end
    if (kind == 3) d[$urandom_range(0, N-1)] = '1 - 1'b1;
    mn = d[0];
    for (int j = 1; j < N; j++) if (d[j] < mn) mn = d[j];
    exp_w = '0;
    for (int j = 0; j < N; j++) exp_w[j] = (d[j] == mn);
    exp_c = '0;
    for (int j = N - 1; j >= 0; j--) if (exp_w[j]) exp_c = SW'(j);
    if ($countones(exp_w) > 1) ties++;
    dists = d;
    load = 1;
    @(negedge clk);
    load = 0;
    for (int j = 0; j < N; j++) dists[j] = AW'($urandom);  // must not matter now
    lat = 0;
    while (!code_valid && lat < 40) begin
      @(negedge clk);
      lat++;
    end
    check(lat == AW, $sformatf("latency %0d clocks, expected %0d", lat, AW));
    check(code == exp_c, $sformatf("code %0d expected %0d", code, exp_c));
    check(winners == exp_w, $sformatf("winners %b expected %b", winners, exp_w));
    @(negedge clk);
    check(!code_valid, "code_valid is a single pulse");
    repeat (35 - AW - 2) @(negedge clk);
  endtask

  initial begin
    for (int j = 0; j < N; j++) dists[j] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    compete(2);
    compete(3);
    for (int r = 0; r < 30; r++) compete(0);
    for (int r = 0; r < 30; r++) compete(1);
    check(ties > 0, "ties exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
