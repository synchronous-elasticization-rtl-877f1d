// tb_lfork: exhaustive test of the lazy fork LFork (1-to-3) over all stem
// valids and branch stalls: branches see a token only when no branch stalls,
// and the stem stalls when any branch stalls.
module tb_lfork;
  localparam int N = 3;
  logic         vl, sl;
  logic [N-1:0] vr, sr;
  int checks = 0, failures = 0;

  lfork #(.N(N)) dut (.vl, .sl, .vr, .sr);

  initial begin
    for (int v = 0; v < 2; v++)
      for (int s = 0; s < (1 << N); s++) begin
        vl = v[0]; sr = N'(s);
        #1;
        checks++;
        if (sl != (s != 0)) begin failures++; $display("sl wrong vl=%0d sr=%b", v, s); end
        for (int i = 0; i < N; i++) begin
          checks++;
          if (vr[i] != (v == 1 && s == 0)) begin failures++; $display("vr[%0d] wrong vl=%0d sr=%b", i, v, s); end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
