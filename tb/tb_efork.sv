// tb_efork: self-checking test of the eager fork (1-to-3).
// Random stem valids (held while the stem is stalled, as SELF requires) and
// random branch stalls. A token-level model checks that every branch receives
// each stem token exactly once, that a branch that is ready and still owes the
// token sees it at once (early start), that the stem is stalled exactly while
// some owing branch stalls, and that with no stalls a token passes every cycle.
module tb_efork;
  localparam int N = 3;
  logic         clk = 1'b0, rst_n = 1'b0;
  logic         vl, sl;
  logic [N-1:0] vr, sr;
  logic [N-1:0] got;
  int checks = 0, failures = 0, early = 0, tokens = 0;

  efork #(.N(N)) dut (.clk, .rst_n, .vl, .sl, .vr, .sr);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL t=%0t %s vl=%b sl=%b vr=%b sr=%b got=%b", $time, msg, vl, sl, vr, sr, got);
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (vl) begin
      check(vr == (~got), "valid offered exactly to branches still owing the token");
      check(sl == |(~got & sr), "stem stalled iff an owing branch stalls");
      if (sl && |(vr & ~sr)) early++;
      for (int i = 0; i < N; i++)
        if (vr[i] && !sr[i]) begin
          check(!got[i], "branch receives a token once");
          got[i] = 1'b1;
        end
      if (!sl) begin
        check(&got, "stem released only after every branch took the token");
        got = '0;
        tokens++;
      end
    end else begin
      check(vr == '0, "no branch valid without a stem token");
    end
  end

  int stream_tokens;
  initial begin
    vl = 1'b0; sr = '0; got = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    repeat (3000) begin
      @(negedge clk);
      if (!(vl && sl)) vl = ($urandom % 4) != 0;
      sr = N'($urandom) & N'($urandom);
    end
    // no stalls: one token per cycle
    @(negedge clk);
    vl = 1'b1; sr = '0;
    @(negedge clk);
    stream_tokens = tokens;
    repeat (50) @(negedge clk);
    check(tokens - stream_tokens == 50, "one token per cycle without stalls");
    check(early > 0, "early start observed");
    $display("tokens=%0d early=%0d", tokens, early);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
