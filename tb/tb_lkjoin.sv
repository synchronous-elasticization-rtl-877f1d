// tb_lkjoin: exhaustive test of the lazy join LKJoin (4-to-1) over all input valids and
// the output stall: the output is valid only when all inputs are valid, and an
// input is stalled exactly as the join's stall rule says.
module tb_lkjoin;
  localparam int N = 4;
  logic [N-1:0] vl, sl;
  logic         vr, sr;
  int checks = 0, failures = 0;

  lkjoin #(.N(N)) dut (.vl, .sl, .vr, .sr);

  initial begin
    for (int v = 0; v < (1 << N); v++)
      for (int s = 0; s < 2; s++) begin
        bit all_v, blocked;
        vl = N'(v); sr = s[0];
        #1;
        all_v   = (v == (1 << N) - 1);
        blocked = (s == 1) || !all_v;
        checks++;
        if (vr != all_v) begin failures++; $display("vr wrong vl=%b sr=%0d", v, s); end
        for (int i = 0; i < N; i++) begin
          bit exp;
          exp = blocked;           // every input shares the stall
          checks++;
          if (sl[i] != exp) begin failures++; $display("sl[%0d] wrong vl=%b sr=%0d", i, v, s); end
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
