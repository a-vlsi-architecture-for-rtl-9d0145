// tb_wr_decoder: exhaustive self-checking test of the template write decoder.
// For every combination of load, enb and ram_sel the output must be one-hot at ram_sel
// when load and enb are both high, and all zero otherwise.
module tb_wr_decoder;
  localparam int unsigned N = 8, SW = 3;
  logic load, enb;
  logic [SW-1:0] ram_sel;
  logic [N-1:0] wr_en, expv;
  int checks = 0, failures = 0;

  wr_decoder #(.N_TEMPL(N)) dut (.load, .enb, .ram_sel, .wr_en);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int l = 0; l < 2; l++)
      for (int e = 0; e < 2; e++)
        for (int s = 0; s < N; s++) begin
          load = l[0]; enb = e[0]; ram_sel = SW'(s);
          #1;
          expv = (l == 1 && e == 1) ? (N'(1) << s) : '0;
          checks++;
          if (wr_en !== expv) begin
            failures++;
            $display("FAIL load=%0d enb=%0d sel=%0d: got %b expected %b", l, e, s, wr_en, expv);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
