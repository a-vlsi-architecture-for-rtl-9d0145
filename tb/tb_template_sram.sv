// tb_template_sram: self-checking test of one template SRAM.
// Fills every word with random data, reads each back and checks the one-clock read
// latency, then checks that a cycle with wr_en low leaves the contents unchanged and that
// a write followed by a read of the same address returns the new word.
module tb_template_sram;
  localparam int unsigned M = 32, W = 8, AW = 5;
  logic clk = 1'b0;
  logic [AW-1:0] addr;
  logic wr_en;
  logic [W-1:0] din, dout;
  logic [W-1:0] ref_mem [M];
  int checks = 0, failures = 0;

  template_sram #(.M_ELEM(M), .DATA_W(W)) dut (.clk, .addr, .wr_en, .din, .dout);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [W-1:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    wr_en = 0; addr = 0; din = 0;
    @(negedge clk);
    for (int i = 0; i < M; i++) begin
      ref_mem[i] = W'($urandom);
      addr = AW'(i); din = ref_mem[i]; wr_en = 1;
      @(negedge clk);
    end
    wr_en = 0;
    for (int i = M - 1; i >= 0; i--) begin
      addr = AW'(i); din = ~ref_mem[i];
      @(negedge clk);
      check(dout, ref_mem[i], $sformatf("read addr %0d", i));
    end
    // write then read back a changed word
    addr = 7; din = ~ref_mem[7]; wr_en = 1;
    @(negedge clk);
    ref_mem[7] = ~ref_mem[7];
    wr_en = 0;
    @(negedge clk);
    check(dout, ref_mem[7], "rewritten word");
    addr = 8;
    @(negedge clk);
    check(dout, ref_mem[8], "neighbour unchanged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
