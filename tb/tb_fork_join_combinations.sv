// tb_fork_join_combinations: the reconvergence example of four elastic buffers
// A, B, C, D: A forks into A1 and A2; A1 is joined with C into D; A2 feeds B.
// Two copies of this network are built:
//   net 0: EFork + LJoin  - the combination used in the elastic MiniMIPS;
//   net 1: LFork + LKJoin - the combination that can lock up.
// Producers feed A and C and consumers drain B and D. Midway, A's producer
// goes idle for a few cycles, so that A empties (VA = 0). In net 1 the loop
// through the LFork valid and the LKJoin stall (VA1 = VA & !SA, SA = SA1 =
// SD | !VD, VD = VA1 & VC) has two consistent solutions; once it sits at
// VA1 = 0, SA = 1 it stays there whatever the inputs do: no token reaches B
// or D. The stem valid of each first fork is held low during reset, as if A
// were empty, so the lazy networks enter that state during reset and never
// move at all (this also keeps arbitrary power-up values from racing around
// the loops in a zero-delay simulator). In net 0 the eager fork's flip-flop breaks the
// loop and tokens keep flowing.
// A second network has six elastic buffers: A forks into A1 and A2; A1 joins
// B into AB, A2 joins C into AC; AB forks into AB1 (to D) and AB2, AC forks
// into AC1 and AC2 (to E); AB2 and AC1 join into ABC (to F). Built twice:
//   net 2: LKFork + LKJoin everywhere - a loop through the fork valids and
//          join stalls of both paths that, with VA = 0, holds all of it
//          stalled, the same kind of lock-up as net 1;
//   net 3: EFork + LKJoin - the flip-flops of the eager forks cut the loop.
// Checks: net 0 delivers A's tokens to B in order, as many to D as to B, and
// keeps delivering after the idle period; net 1 delivers nothing, with its
// fork stem stalled and the A1 branch invalid at the end; net 3 keeps
// delivering to D, E and F after the idle period and gives each of them the
// same number of tokens; net 2 delivers nothing after the idle period.
module tb_fork_join_combinations;
  import elastic_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic pa_v, pc_v;          // producers into A and C
  logic [7:0] pa_d, pc_d;
  int checks = 0, failures = 0;
  int phase = 0;             // 0: before idle, 1: idle, 2: after idle

  always #5 clk = ~clk;

  for (genvar n = 0; n < 2; n++) begin : g_net
    logic a_sl, a_vr, a_sr, b_vl, b_sl, b_vr, c_sl, c_vr, c_sr, d_vl, d_sl, d_vr;
    logic [1:0] f_vr, f_sr, j_sl;
    logic [7:0] a_q, b_q, c_q, d_q, unused_a, unused_b, unused_c, unused_d;
    int nb_after, nd_after, nb, nd;
    logic [7:0] sent_a [$];

    elastic_buffer #(.WIDTH(8), .INIT(EB_HALF), .INIT_DATA(8'h00)) eb_a (
      .clk, .rst_n, .vl(pa_v), .sl(a_sl), .dl(pa_d), .vr(a_vr), .sr(a_sr), .dr(a_q), .d_last(unused_a));
    elastic_buffer #(.WIDTH(8), .INIT(EB_HALF), .INIT_DATA(8'h00)) eb_c (
      .clk, .rst_n, .vl(pc_v), .sl(c_sl), .dl(pc_d), .vr(c_vr), .sr(c_sr), .dr(c_q), .d_last(unused_c));

    if (n == 0) begin : g_safe
      efork #(.N(2)) u_fork (.clk, .rst_n, .vl(a_vr & rst_n), .sl(a_sr), .vr(f_vr), .sr(f_sr));
      ljoin #(.N(2)) u_join (.vl({c_vr, f_vr[0]}), .sl(j_sl), .vr(d_vl), .sr(d_sl));
    end else begin : g_lock
      lfork  #(.N(2)) u_fork (.vl(a_vr & rst_n), .sl(a_sr), .vr(f_vr), .sr(f_sr));
      lkjoin #(.N(2)) u_join (.vl({c_vr, f_vr[0]}), .sl(j_sl), .vr(d_vl), .sr(d_sl));
    end
    assign f_sr[0] = j_sl[0];
    assign c_sr    = j_sl[1];
    assign b_vl    = f_vr[1];
    assign f_sr[1] = b_sl;

    elastic_buffer #(.WIDTH(8), .INIT(EB_EMPTY), .INIT_DATA(8'h00)) eb_b (
      .clk, .rst_n, .vl(b_vl), .sl(b_sl), .dl(a_q), .vr(b_vr), .sr(1'b0), .dr(b_q), .d_last(unused_b));
    elastic_buffer #(.WIDTH(8), .INIT(EB_EMPTY), .INIT_DATA(8'h00)) eb_d (
      .clk, .rst_n, .vl(d_vl), .sl(d_sl), .dl(a_q + c_q), .vr(d_vr), .sr(1'b0), .dr(d_q), .d_last(unused_d));

    // token order check for the safe network: B sees A's tokens in order,
    // D sees A + C (C carries 0)
    always @(posedge clk) if (rst_n) begin
      if (pa_v && !a_sl) sent_a.push_back(pa_d);
      if (b_vr) begin
        nb++;
        if (phase == 2) nb_after++;
      end
      if (d_vr) begin
        nd++;
        if (phase == 2) nd_after++;
      end
      if (n == 0 && b_vr) begin
        checks++;
        if (nb == 1) begin
          if (b_q != 8'h00) begin failures++; $display("net 0: first B token %h", b_q); end
        end else if (sent_a.size() == 0 || b_q != sent_a[0]) begin
          failures++; $display("net 0: B token %h out of order", b_q);
        end else void'(sent_a.pop_front());
      end
    end

    initial begin
      nb = 0; nd = 0; nb_after = 0; nd_after = 0;
    end
  end

  // second network: g_six[0] lazy (LKFork/LKJoin), g_six[1] eager forks
  for (genvar n = 0; n < 2; n++) begin : g_six
    logic a_sl, a_vr, a_sr, b_sl, b_vr, b_sr, c_sl, c_vr, c_sr;
    logic ab_v, ab_s, ac_v, ac_s, abc_v, abc_s;
    logic [1:0] fa_vr, fa_sr, fab_vr, fab_sr, fac_vr, fac_sr, jab_sl, jac_sl, jabc_sl;
    logic d_sl, e_sl, d_vr, e_vr, f_vr;
    logic [7:0] a_q, b_q, c_q, d_q, e_q, f_q, ua, ub, uc, ud, ue, uf;
    int nd, ne, nf, nd_after, ne_after, nf_after;

    elastic_buffer #(.WIDTH(8), .INIT(EB_HALF), .INIT_DATA(8'h00)) eb_a (
      .clk, .rst_n, .vl(pa_v), .sl(a_sl), .dl(pa_d), .vr(a_vr), .sr(a_sr), .dr(a_q), .d_last(ua));
    elastic_buffer #(.WIDTH(8), .INIT(EB_HALF), .INIT_DATA(8'h00)) eb_b (
      .clk, .rst_n, .vl(pc_v), .sl(b_sl), .dl(pc_d), .vr(b_vr), .sr(b_sr), .dr(b_q), .d_last(ub));
    elastic_buffer #(.WIDTH(8), .INIT(EB_HALF), .INIT_DATA(8'h00)) eb_c (
      .clk, .rst_n, .vl(pc_v), .sl(c_sl), .dl(pc_d), .vr(c_vr), .sr(c_sr), .dr(c_q), .d_last(uc));

    if (n == 0) begin : g_lazy
      lkfork #(.N(2)) u_fa  (.vl(a_vr & rst_n), .sl(a_sr), .vr(fa_vr), .sr(fa_sr));
      lkfork #(.N(2)) u_fab (.vl(ab_v), .sl(ab_s), .vr(fab_vr), .sr(fab_sr));
      lkfork #(.N(2)) u_fac (.vl(ac_v), .sl(ac_s), .vr(fac_vr), .sr(fac_sr));
    end else begin : g_eager
      efork #(.N(2)) u_fa  (.clk, .rst_n, .vl(a_vr & rst_n), .sl(a_sr), .vr(fa_vr), .sr(fa_sr));
      efork #(.N(2)) u_fab (.clk, .rst_n, .vl(ab_v), .sl(ab_s), .vr(fab_vr), .sr(fab_sr));
      efork #(.N(2)) u_fac (.clk, .rst_n, .vl(ac_v), .sl(ac_s), .vr(fac_vr), .sr(fac_sr));
    end
    // JAB: {B, A1}; JAC: {C, A2}; JABC: {AC1, AB2}
    lkjoin #(.N(2)) u_jab  (.vl({b_vr, fa_vr[0]}), .sl(jab_sl), .vr(ab_v), .sr(ab_s));
    lkjoin #(.N(2)) u_jac  (.vl({c_vr, fa_vr[1]}), .sl(jac_sl), .vr(ac_v), .sr(ac_s));
    lkjoin #(.N(2)) u_jabc (.vl({fac_vr[0], fab_vr[1]}), .sl(jabc_sl), .vr(abc_v), .sr(abc_s));
    assign fa_sr   = {jac_sl[0], jab_sl[0]};
    assign b_sr    = jab_sl[1];
    assign c_sr    = jac_sl[1];
    assign fab_sr  = {jabc_sl[0], d_sl};
    assign fac_sr  = {e_sl, jabc_sl[1]};

    elastic_buffer #(.WIDTH(8), .INIT(EB_EMPTY), .INIT_DATA(8'h00)) eb_d (
      .clk, .rst_n, .vl(fab_vr[0]), .sl(d_sl), .dl(a_q + b_q), .vr(d_vr), .sr(1'b0), .dr(d_q), .d_last(ud));
    elastic_buffer #(.WIDTH(8), .INIT(EB_EMPTY), .INIT_DATA(8'h00)) eb_e (
      .clk, .rst_n, .vl(fac_vr[1]), .sl(e_sl), .dl(a_q + c_q), .vr(e_vr), .sr(1'b0), .dr(e_q), .d_last(ue));
    elastic_buffer #(.WIDTH(8), .INIT(EB_EMPTY), .INIT_DATA(8'h00)) eb_f (
      .clk, .rst_n, .vl(abc_v), .sl(abc_s), .dl(a_q), .vr(f_vr), .sr(1'b0), .dr(f_q), .d_last(uf));

    always @(posedge clk) if (rst_n) begin
      if (d_vr) begin nd++; if (phase == 2) nd_after++; end
      if (e_vr) begin ne++; if (phase == 2) ne_after++; end
      if (f_vr) begin nf++; if (phase == 2) nf_after++; end
    end

    initial begin
      nd = 0; ne = 0; nf = 0; nd_after = 0; ne_after = 0; nf_after = 0;
    end
  end

  int t;
  initial begin
    pa_v = 1'b0; pc_v = 1'b0; pa_d = 8'h00; pc_d = 8'h00;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (t = 0; t < 30; t++) begin
      pa_v = 1'b1; pa_d = 8'(t + 1);
      pc_v = 1'b1; pc_d = 8'h00;
      @(negedge clk);
    end
    phase = 1;
    pa_v = 1'b0;
    repeat (4) @(negedge clk);
    phase = 2;
    for (t = 0; t < 40; t++) begin
      pa_v = 1'b1; pa_d = 8'(t + 100);
      @(negedge clk);
    end
    $display("net 0 (EFork+LJoin): B=%0d D=%0d tokens, after idle B=%0d D=%0d",
             g_net[0].nb, g_net[0].nd, g_net[0].nb_after, g_net[0].nd_after);
    $display("net 1 (LFork+LKJoin): B=%0d D=%0d tokens, after idle B=%0d D=%0d",
             g_net[1].nb, g_net[1].nd, g_net[1].nb_after, g_net[1].nd_after);
    checks++;
    if (g_net[0].nb_after < 30 || g_net[0].nd_after < 30) begin failures++; $display("net 0 stopped"); end
    checks++;
    if (g_net[0].nb != g_net[0].nd) begin failures++; $display("net 0: B and D token counts differ"); end
    checks++;
    if (g_net[1].nb >= g_net[0].nb) begin failures++; $display("net 1 not slower than net 0"); end
    checks++;
    if (g_net[1].nb_after != 0 || g_net[1].nd_after != 0) begin failures++; $display("net 1 did not lock up"); end
    checks++;
    if (!(g_net[1].a_sr && !g_net[1].f_vr[0])) begin failures++; $display("net 1: loop not held at SA=1, VA1=0"); end
    $display("net 2 (LKFork+LKJoin): D=%0d E=%0d F=%0d tokens, after idle D=%0d E=%0d F=%0d",
             g_six[0].nd, g_six[0].ne, g_six[0].nf, g_six[0].nd_after, g_six[0].ne_after, g_six[0].nf_after);
    $display("net 3 (EFork+LKJoin):  D=%0d E=%0d F=%0d tokens, after idle D=%0d E=%0d F=%0d",
             g_six[1].nd, g_six[1].ne, g_six[1].nf, g_six[1].nd_after, g_six[1].ne_after, g_six[1].nf_after);
    checks++;
    if (g_six[1].nf_after < 30 || g_six[1].nd_after < 30 || g_six[1].ne_after < 30) begin
      failures++; $display("net 3 stopped");
    end
    checks++;
    if (g_six[1].nd != g_six[1].nf || g_six[1].ne != g_six[1].nf) begin
      failures++; $display("net 3: D, E and F token counts differ");
    end
    checks++;
    if (g_six[0].nd_after != 0 || g_six[0].ne_after != 0 || g_six[0].nf_after != 0) begin
      failures++; $display("net 2 did not lock up");
    end
    checks++;
    if (!(g_six[0].a_sr && !g_six[0].abc_v)) begin failures++; $display("net 2: stem not stalled at the end"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
