// tb_x_sram: self-checking test of the dual-port X store.
// Writes all words through the write port while the read port scans other addresses,
// then checks every word through the read port with its one-clock latency, and checks
// that reading and writing the same address in one clock returns the old word.
module tb_x_sram;
  localparam int unsigned M = 32, W = 8, AW = 5;
  logic clk = 1'b0;
  logic [AW-1:0] wr_add_x, rd_add;
  logic wr_en_x;
  logic [W-1:0] din_x, dout_x;
  logic [W-1:0] ref_mem [M];
  int checks = 0, failures = 0;

  x_sram #(.M_ELEM(M), .DATA_W(W)) dut (.clk, .wr_add_x, .wr_en_x, .din_x, .rd_add, .dout_x);

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
    wr_en_x = 0; wr_add_x = 0; rd_add = 0; din_x = 0;
    @(negedge clk);
    for (int i = 0; i < M; i++) begin
      ref_mem[i] = W'($urandom);
      wr_add_x = AW'(i); din_x = ref_mem[i]; wr_en_x = 1;
      rd_add = AW'(M - 1 - i);
      @(negedge clk);
    end
    wr_en_x = 0;
    for (int i = 0; i < M; i++) begin
      rd_add = AW'(i);
      wr_add_x = AW'(M - 1 - i); din_x = ~ref_mem[i];
      @(negedge clk);
      check(dout_x, ref_mem[i], $sformatf("read addr %0d", i));
    end
    // simultaneous read and write of one address: old data, then new data
    rd_add = 3; wr_add_x = 3; din_x = ~ref_mem[3]; wr_en_x = 1;
    @(negedge clk);
    check(dout_x, ref_mem[3], "read during write returns old word");
    wr_en_x = 0;
    @(negedge clk);
    check(dout_x, ~ref_mem[3], "new word after write");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
