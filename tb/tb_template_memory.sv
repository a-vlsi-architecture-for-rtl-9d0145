// tb_template_memory: self-checking test of the template bank.
// Downloads random words into all 8 templates with load high, then with load low reads
// every address and checks every template's output one clock later. Also checks that
// write strobes are ignored while load is low or enb is low, and that the download
// address is the one used while load is high.
module tb_template_memory;
  localparam int unsigned N = 8, M = 32, W = 8, AW = 5, SW = 3;
  logic clk = 1'b0, load = 1'b1, enb = 1'b0;
  logic [SW-1:0] ram_sel = '0;
  logic [AW-1:0] write_add = '0, rd_add = '0;
  logic [W-1:0] data_in = '0;
  logic [W-1:0] dout [N];
  logic [W-1:0] ref_mem [N][M];
  int checks = 0, failures = 0;

  template_memory #(.N_TEMPL(N), .M_ELEM(M), .DATA_W(W)) dut (
    .clk, .load, .enb, .ram_sel, .write_add, .data_in, .rd_add, .dout);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic read_all(input string what);
    load = 0;
    for (int i = 0; i < M; i++) begin
      rd_add = AW'(i);
      write_add = AW'(M - 1 - i);
      @(negedge clk);
      for (int j = 0; j < N; j++) begin
        checks++;
        if (dout[j] !== ref_mem[j][i]) begin
          failures++;
          $display("FAIL %s: T%0d[%0d] = %h expected %h", what, j, i, dout[j], ref_mem[j][i]);
        end
      end
    end
  endtask

  initial begin
    @(negedge clk);
    for (int j = 0; j < N; j++)
      for (int i = 0; i < M; i++) begin
        ref_mem[j][i] = W'($urandom);
        load = 1; enb = 1; ram_sel = SW'(j); write_add = AW'(i); data_in = ref_mem[j][i];
        rd_add = AW'($urandom);
        @(negedge clk);
      end
    enb = 0;
    read_all("after download");
    // strobes with load low must not write
    load = 0; enb = 1; ram_sel = 2; write_add = 5; rd_add = 9; data_in = ~ref_mem[2][5];
    repeat (2) @(negedge clk);
    // strobe off with load high must not write either
    load = 1; enb = 0; ram_sel = 4; write_add = 6; data_in = ~ref_mem[4][6];
    repeat (2) @(negedge clk);
    // read during download uses the download address
    enb = 0; write_add = 11; rd_add = 0;
    @(negedge clk);
    for (int j = 0; j < N; j++) begin
      checks++;
      if (dout[j] !== ref_mem[j][11]) begin
        failures++;
        $display("FAIL address select during load: T%0d", j);
      end
    end
    read_all("after ignored strobes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
