// tb_ava: self-checking test of the absolute-value-and-accumulate unit.
// Streams vectors of 32 elements with the timing counter1 produces (32 valid elements,
// three idle clocks, latch_clr on the last one) and compares the accumulator at the
// latch clock with a Manhattan distance computed in the testbench. Vectors include the
// extremes (all 0 against all 255 in both orders, equal vectors) and random ones, and
// back-to-back passes check that the latch clears the sum.
module tb_ava;
  localparam int unsigned M = 32, W = 8, AW = 13, PERIOD = M + 3;
  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0;
  logic [W-1:0] t, x;
  logic elem_valid = 1'b0, latch_clr = 1'b0;
  logic [AW-1:0] acc;
  logic [W-1:0] tv [M], xv [M];
  int checks = 0, failures = 0, neg_seen = 0;

  ava #(.DATA_W(W), .M_ELEM(M)) dut (.clk, .rst_n, .clear, .t, .x, .elem_valid, .latch_clr, .acc);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One pass: clock 0 is the read clock, elements are on t/x in clocks 1..M.
  task automatic pass(input int kind);
    int unsigned expd;
    expd = 0;
    for (int i = 0; i < M; i++) begin
      case (kind)
        0: begin tv[i] = '0;  xv[i] = '1; end
        1: begin tv[i] = '1;  xv[i] = '0; end
        2: begin tv[i] = W'($urandom); xv[i] = tv[i]; end
        default: begin tv[i] = W'($urandom); xv[i] = W'($urandom); end
      endcase
      if (tv[i] < xv[i]) neg_seen++;
      expd += (tv[i] > xv[i]) ? tv[i] - xv[i] : xv[i] - tv[i];
    end
    for (int c = 0; c < PERIOD; c++) begin
      elem_valid = (c >= 1 && c <= M);
      t = elem_valid ? tv[c-1] : W'($urandom);
      x = elem_valid ? xv[c-1] : W'($urandom);
      latch_clr = (c == PERIOD - 1);
      if (c == PERIOD - 1) begin
        #1;
        checks++;
        if (acc !== AW'(expd)) begin
          failures++;
          $display("FAIL kind %0d: distance %0d expected %0d", kind, acc, expd);
        end
      end
      @(negedge clk);
    end
    latch_clr = 0;
  endtask

  initial begin
    t = 0; x = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    pass(0);
    pass(1);
    pass(2);
    for (int r = 0; r < 20; r++) pass(3);
    // clear in the middle of a pass empties the pipeline
    elem_valid = 1; t = 200; x = 3;
    repeat (3) @(negedge clk);
    clear = 1; elem_valid = 0;
    @(negedge clk);
    clear = 0;
    @(negedge clk);
    checks++;
    if (acc !== '0) begin
      failures++;
      $display("FAIL clear: acc %0d", acc);
    end
    checks++;
    if (neg_seen == 0) begin
      failures++;
      $display("FAIL no negative difference exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
