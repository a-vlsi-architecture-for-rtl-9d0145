// tb_counter1: self-checking test of the read-address generator.
// Checks that the counter rests at 0 while load is high, that after load falls it issues
// addresses 0..31 with rd_valid, that latch_clr pulses exactly once per 35-clock pass on
// the clock after the three pipeline counts, that elem_valid is rd_valid one clock late,
// and that raising load mid-pass restarts the sequence.
module tb_counter1;
  localparam int unsigned M = 32, AW = 5, PERIOD = M + 3;
  logic clk = 1'b0, rst_n = 1'b0, load = 1'b1;
  logic [AW-1:0] rd_add;
  logic rd_valid, elem_valid, latch_clr;
  logic prev_rd_valid;
  int checks = 0, failures = 0;

  counter1 #(.M_ELEM(M)) dut (.clk, .rst_n, .load, .rd_add, .rd_valid, .elem_valid, .latch_clr);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
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

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (3) begin
      @(negedge clk);
      check(!rd_valid && !latch_clr && rd_add == 0, "idle during load");
    end
    load = 0;
    prev_rd_valid = 0;
    for (int c = 0; c < 3 * PERIOD; c++) begin
      int k;
      k = c % PERIOD;
      #1;
      check(rd_valid == (k < M), $sformatf("rd_valid at clock %0d", c));
      if (k < M) check(rd_add == AW'(k), $sformatf("rd_add at clock %0d: %0d", c, rd_add));
      check(latch_clr == (k == PERIOD - 1), $sformatf("latch_clr at clock %0d", c));
      check(elem_valid == prev_rd_valid, $sformatf("elem_valid at clock %0d", c));
      prev_rd_valid = rd_valid;
      @(negedge clk);
    end
    // restart in the middle of a pass
    repeat (10) @(negedge clk);
    load = 1;
    @(negedge clk);
    check(!rd_valid && !latch_clr, "load blocks the pass");
    load = 0;
    #1;
    check(rd_add == 0 && rd_valid, "restart from address 0");
    for (int c = 0; c < PERIOD - 1; c++) begin
      @(negedge clk);
      #1;
      check(latch_clr == (c == PERIOD - 2), $sformatf("latch after restart, clock %0d", c + 1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
