// tb_eager_lazy_bubbles: why eager forks run faster than lazy ones once
// bubbles are present, on the part of the MiniMIPS control network around
// the ALU input registers.
//
// Network (one copy with eager forks, one with LKFork lazy forks; LJoin joins
// in both): controller EB C forks (FC) into C1, which goes straight to the ALU
// join JABCI4P, and C2, which is joined with the instruction registers I2 and
// I3 (JCI2I3LM). That channel forks (FCI2I3LM) into two chains of K empty EBs
// b1 and b2, the bubbles, followed by A and B. JABCI4P joins A, B and C1, and
// its output is C's next token, so C, the b1 chain and A form a ring with two
// tokens in K + 2 EBs. I2 and I3 are always supplied. Both networks are built
// for K = 1 and K = 3.
//
// When A and B have no token, JABCI4P stalls C1. The eager FC still hands the
// token to C2 at once, so b1 and b2 are refilled in the same cycle; the lazy
// FC holds C2 invalid until C1 is no longer stalled, which costs a cycle per
// round. The stem valid of FC is held low while reset is asserted: the loop
// through the lazy FC and the two LJoins has two consistent solutions, and
// from arbitrary power-up values a zero-delay simulator can race between
// them forever instead of settling. Expected rates: the eager ring runs at its token/buffer bound of
// 2 / (K + 2) token per clock; the lazy one is slower.
// Checks, for each K: after a warm-up, the eager network completes exactly
// 2 * WINDOW / (K + 2) tokens in the window; the lazy network completes fewer
// but some; the eager FC serves C2 while C1 is stalled at least once; the
// lazy FC never does. The printed lazy/eager ratio of clocks per token can be
// compared with the whole machine's.
module tb_eager_lazy_bubbles;
  import elastic_pkg::*;

  localparam int WARMUP = 12;
  localparam int WINDOW = 600;

  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;
  bit counting = 1'b0;

  always #5 clk = ~clk;

  localparam int NK = 2;
  localparam int KS [NK] = '{1, 3};

  // g_k[m].g_net[0]: eager forks, g_k[m].g_net[1]: LKFork lazy forks
  for (genvar m = 0; m < NK; m++) begin : g_k
  for (genvar n = 0; n < 2; n++) begin : g_net
    localparam int K = KS[m];
    logic c_v, c_s, i2_v, i2_s, i3_v, i3_s, i2_sl, i3_sl;
    logic [1:0] fc_vr, fc_sr, fr_vr, fr_sr;
    logic [2:0] jrf_sl, jalu_sl;
    logic rf_v, rf_s, alu_v, alu_s;
    logic b1_v, b1_s, b2_v, b2_s, a_v, a_s, b_v, b_s;
    logic [7:0] c_q, i2_q, i3_q, b1_q, b2_q, a_q, b_q;
    logic [7:0] c_l, i2_l, i3_l, a_l, b_l;
    int ntok, nearly;

    elastic_buffer #(.WIDTH(8), .INIT(EB_HALF)) eb_c (
      .clk, .rst_n, .vl(alu_v), .sl(alu_s), .dl(c_q + 8'd1), .vr(c_v), .sr(c_s), .dr(c_q), .d_last(c_l));
    elastic_buffer #(.WIDTH(8), .INIT(EB_HALF)) eb_i2 (
      .clk, .rst_n, .vl(1'b1), .sl(i2_sl), .dl(8'h02), .vr(i2_v), .sr(i2_s), .dr(i2_q), .d_last(i2_l));
    elastic_buffer #(.WIDTH(8), .INIT(EB_HALF)) eb_i3 (
      .clk, .rst_n, .vl(1'b1), .sl(i3_sl), .dl(8'h03), .vr(i3_v), .sr(i3_s), .dr(i3_q), .d_last(i3_l));

    // FC: [0] = C1 to JABCI4P, [1] = C2 to JCI2I3LM; FCI2I3LM: [0] to b1, [1] to b2
    if (n == 0) begin : g_eager
      efork #(.N(2)) u_fc (.clk, .rst_n, .vl(c_v & rst_n), .sl(c_s), .vr(fc_vr), .sr(fc_sr));
      efork #(.N(2)) u_fr (.clk, .rst_n, .vl(rf_v), .sl(rf_s), .vr(fr_vr), .sr(fr_sr));
    end else begin : g_lazy
      lkfork #(.N(2)) u_fc (.vl(c_v & rst_n), .sl(c_s), .vr(fc_vr), .sr(fc_sr));
      lkfork #(.N(2)) u_fr (.vl(rf_v), .sl(rf_s), .vr(fr_vr), .sr(fr_sr));
    end

    ljoin #(.N(3)) u_jrf (.vl({i3_v, i2_v, fc_vr[1]}), .sl(jrf_sl), .vr(rf_v), .sr(rf_s));
    assign {i3_s, i2_s, fc_sr[1]} = jrf_sl;

    // bubble chains: stage 0 is fed by the fork, stage K-1 feeds A or B
    logic [K:0] c1_v, c1_s, c2_v, c2_s;
    logic [7:0] c1_d [K+1];
    logic [7:0] c2_d [K+1];
    assign c1_v[0] = fr_vr[0];
    assign fr_sr[0] = c1_s[0];
    assign c1_d[0] = c_q;
    assign c2_v[0] = fr_vr[1];
    assign fr_sr[1] = c2_s[0];
    assign c2_d[0] = i2_q + i3_q;
    for (genvar k = 0; k < K; k++) begin : g_bub
      logic [7:0] l1, l2;
      elastic_buffer #(.WIDTH(8), .INIT(EB_EMPTY)) eb_b1 (
        .clk, .rst_n, .vl(c1_v[k]), .sl(c1_s[k]), .dl(c1_d[k]), .vr(c1_v[k+1]), .sr(c1_s[k+1]), .dr(c1_d[k+1]), .d_last(l1));
      elastic_buffer #(.WIDTH(8), .INIT(EB_EMPTY)) eb_b2 (
        .clk, .rst_n, .vl(c2_v[k]), .sl(c2_s[k]), .dl(c2_d[k]), .vr(c2_v[k+1]), .sr(c2_s[k+1]), .dr(c2_d[k+1]), .d_last(l2));
    end
    assign b1_v = c1_v[K];
    assign c1_s[K] = b1_s;
    assign b1_q = c1_d[K];
    assign b2_v = c2_v[K];
    assign c2_s[K] = b2_s;
    assign b2_q = c2_d[K];
    elastic_buffer #(.WIDTH(8), .INIT(EB_HALF)) eb_a (
      .clk, .rst_n, .vl(b1_v), .sl(b1_s), .dl(b1_q), .vr(a_v), .sr(a_s), .dr(a_q), .d_last(a_l));
    elastic_buffer #(.WIDTH(8), .INIT(EB_HALF)) eb_b (
      .clk, .rst_n, .vl(b2_v), .sl(b2_s), .dl(b2_q), .vr(b_v), .sr(b_s), .dr(b_q), .d_last(b_l));

    ljoin #(.N(3)) u_jalu (.vl({b_v, a_v, fc_vr[0]}), .sl(jalu_sl), .vr(alu_v), .sr(alu_s));
    assign {b_s, a_s, fc_sr[0]} = jalu_sl;

    always @(posedge clk) if (rst_n && counting) begin
      if (alu_v && !alu_s) ntok <= ntok + 1;
      if (fc_vr[1] && !fc_sr[1] && fc_sr[0]) nearly <= nearly + 1;
    end

    initial begin
      ntok = 0;
      nearly = 0;
    end
  end
  end

  task automatic check_k(int k, int ne, int nl, int early_e, int early_l);
    $display("%0d bubble(s): eager forks %0d tokens, lazy forks %0d tokens in %0d clocks; lazy/eager clocks per token = %0d.%02d; C2 served early %0d (eager) / %0d (lazy) times",
             k, ne, nl, WINDOW, (nl > 0) ? ne / nl : 0, (nl > 0) ? (ne * 100 / nl) % 100 : 0, early_e, early_l);
    checks++;
    if (ne != WINDOW * 2 / (k + 2)) begin
      failures++; $display("K=%0d eager network: %0d tokens, expected %0d", k, ne, WINDOW * 2 / (k + 2));
    end
    checks++;
    if (nl >= ne) begin failures++; $display("K=%0d lazy network not slower", k); end
    checks++;
    if (nl == 0) begin failures++; $display("K=%0d lazy network did not run", k); end
    checks++;
    if (early_e == 0) begin failures++; $display("K=%0d eager FC never served C2 early", k); end
    checks++;
    if (early_l != 0) begin failures++; $display("K=%0d lazy FC served C2 while C1 stalled", k); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    repeat (WARMUP) @(negedge clk);
    counting = 1'b1;
    repeat (WINDOW) @(negedge clk);
    counting = 1'b0;
    check_k(KS[0], g_k[0].g_net[0].ntok, g_k[0].g_net[1].ntok, g_k[0].g_net[0].nearly, g_k[0].g_net[1].nearly);
    check_k(KS[1], g_k[1].g_net[0].ntok, g_k[1].g_net[1].ntok, g_k[1].g_net[0].nearly, g_k[1].g_net[1].nearly);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WARMUP + WINDOW + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
