// tb_winner_observer: exhaustive self-checking test of the priority encoder.
// For every pattern of 8 flags the code must be the lowest set position and any must be
// high exactly when a flag is set.
module tb_winner_observer;
  localparam int unsigned N = 8, SW = 3;
  logic [N-1:0] flags;
  logic [SW-1:0] code, exp_code;
  logic any;
  int checks = 0, failures = 0;

  winner_observer #(.N_TEMPL(N)) dut (.flags, .code, .any);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < (1 << N); p++) begin
      flags = N'(p);
      #1;
      exp_code = '0;
      for (int j = 0; j < N; j++)
        if (flags[j]) begin
          exp_code = SW'(j);
          break;
        end
      checks++;
      if (any !== (p != 0) || (p != 0 && code !== exp_code)) begin
        failures++;
        $display("FAIL flags=%b: code %0d any %b, expected %0d", flags, code, any, exp_code);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
