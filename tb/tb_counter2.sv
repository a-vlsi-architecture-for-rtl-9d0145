// tb_counter2: self-checking test of the WTA bit counter.
// After each clear pulse, step must be high for exactly N_BITS clocks and latch high only
// on the last of them; a clear during a run must restart the count.
module tb_counter2;
  localparam int unsigned NB = 13;
  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0;
  logic step, latch;
  int checks = 0, failures = 0;

  counter2 #(.N_BITS(NB)) dut (.clk, .rst_n, .clear, .step, .latch);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
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

  task automatic run_and_check(input int unsigned stop_after);
    clear = 1;
    @(negedge clk);
    clear = 0;
    for (int c = 0; c < NB + 3 && c < stop_after; c++) begin
      check(step == (c < NB), $sformatf("step at %0d", c));
      check(latch == (c == NB - 1), $sformatf("latch at %0d", c));
      @(negedge clk);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!step && !latch, "idle after reset");
    run_and_check(100);
    run_and_check(5);    // interrupted run
    run_and_check(100);  // must still count the full length
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
