// tb_reconvergent_fanout: placing a bubble on one of several datapaths that
// run between the same two registers.
//
// Register A (an elastic buffer fed with the numbers 1, 2, 3, ...) drives
// three datapaths into register B: path 1 carries a, path 2 carries a ^ 8'h5A,
// path 3 carries a + 1. B stores the three as one word. Three versions:
//   (a) one control channel from A to B, no bubble;
//   (b) an empty elastic buffer (bubble) on path 2 only, with its control
//       simply placed in series on the single channel: B then combines the
//       bubble's older path-2 value with A's newer path-1 and path-3 values;
//   (c) the channel is forked at A (eager fork): one branch goes through the
//       bubble's control with path 2, the other carries paths 1 and 3; a lazy
//       join in front of B waits for both.
// Version (c) delivers one word every two clocks: the branch carrying paths
// 1 and 3 keeps A's token until the bubble's copy reaches the join a clock
// later, and A cannot hand out its next token before both branches took it.
// Checks: in (a) and (c) every word B receives is consistent (path 2 and
// path 3 belong to the same a as path 1) and the values of a arrive in order
// without loss or repetition; (a) delivers a word per clock and (c) one per
// two clocks, within a word; (b) receives at least one inconsistent word.
module tb_reconvergent_fanout;
  import elastic_pkg::*;

  localparam int NTOK = 60;

  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  function automatic logic [23:0] paths(logic [7:0] a);
    return {a, a ^ 8'h5A, a + 8'd1};
  endfunction

  // g_v[0]: (a), g_v[1]: (b), g_v[2]: (c)
  for (genvar n = 0; n < 3; n++) begin : g_v
    logic a_sl, a_vr, a_sr, b_vl, b_sl, b_vr;
    logic [7:0] a_q, a_l, p2_q, p2_l;
    logic [23:0] b_d, b_q, b_l;
    logic p2_vl, p2_sl, p2_vr, p2_sr;
    int nrecv, nbad;
    logic [7:0] expect_a, src;

    // producer: always valid, next number once A accepts
    always @(posedge clk)
      if (!rst_n) src <= 8'd1;
      else if (!a_sl) src <= src + 8'd1;

    elastic_buffer #(.WIDTH(8), .INIT(EB_EMPTY)) eb_a (
      .clk, .rst_n, .vl(1'b1), .sl(a_sl), .dl(src), .vr(a_vr), .sr(a_sr), .dr(a_q), .d_last(a_l));

    if (n == 0) begin : g_a
      assign b_vl = a_vr;
      assign a_sr = b_sl;
      assign b_d  = paths(a_q);
      assign {p2_vl, p2_sr, p2_vr, p2_sl, p2_q, p2_l} = '0;
    end else if (n == 1) begin : g_b
      // bubble on path 2 only; its control in series on the single channel
      elastic_buffer #(.WIDTH(8), .INIT(EB_EMPTY)) eb_bubble (
        .clk, .rst_n, .vl(a_vr), .sl(a_sr), .dl(a_q ^ 8'h5A), .vr(b_vl), .sr(b_sl), .dr(p2_q), .d_last(p2_l));
      assign b_d = {a_q, p2_q, a_q + 8'd1};
      assign {p2_vl, p2_sr, p2_vr, p2_sl} = '0;
    end else begin : g_c
      logic [1:0] f_vr, f_sr, j_sl;
      efork #(.N(2)) u_fork (.clk, .rst_n, .vl(a_vr), .sl(a_sr), .vr(f_vr), .sr(f_sr));
      assign p2_vl = f_vr[0];
      assign f_sr[0] = p2_sl;
      elastic_buffer #(.WIDTH(8), .INIT(EB_EMPTY)) eb_bubble (
        .clk, .rst_n, .vl(p2_vl), .sl(p2_sl), .dl(a_q ^ 8'h5A), .vr(p2_vr), .sr(p2_sr), .dr(p2_q), .d_last(p2_l));
      ljoin #(.N(2)) u_join (.vl({f_vr[1], p2_vr}), .sl(j_sl), .vr(b_vl), .sr(b_sl));
      assign p2_sr   = j_sl[0];
      assign f_sr[1] = j_sl[1];
      assign b_d = {a_q, p2_q, a_q + 8'd1};
    end

    elastic_buffer #(.WIDTH(24), .INIT(EB_EMPTY)) eb_b (
      .clk, .rst_n, .vl(b_vl), .sl(b_sl), .dl(b_d), .vr(b_vr), .sr(1'b0), .dr(b_q), .d_last(b_l));

    always @(posedge clk) if (rst_n && b_vr) begin
      nrecv <= nrecv + 1;
      if (b_q != paths(b_q[23:16])) nbad <= nbad + 1;
      else if (n != 1) begin
        checks++;
        if (b_q[23:16] != expect_a) begin
          failures++;
          $display("version %0d: a=%0d received, expected %0d", n, b_q[23:16], expect_a);
        end
      end
      expect_a <= b_q[23:16] + 8'd1;
    end

    initial begin
      nrecv = 0;
      nbad = 0;
      expect_a = 8'd1;
    end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    repeat (NTOK) @(negedge clk);
    $display("(a) one channel, no bubble:      %0d words, %0d inconsistent", g_v[0].nrecv, g_v[0].nbad);
    $display("(b) bubble control in series:    %0d words, %0d inconsistent", g_v[1].nrecv, g_v[1].nbad);
    $display("(c) bubble on its own channel:   %0d words, %0d inconsistent", g_v[2].nrecv, g_v[2].nbad);
    checks++;
    if (g_v[0].nbad != 0 || g_v[0].nrecv < NTOK - 3) begin failures++; $display("(a) wrong"); end
    checks++;
    if (g_v[2].nbad != 0 || g_v[2].nrecv < NTOK / 2 - 2 || g_v[2].nrecv > NTOK / 2 + 1) begin
      failures++; $display("(c) wrong");
    end
    checks++;
    if (g_v[1].nbad == 0) begin failures++; $display("(b) showed no inconsistency"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NTOK + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
