// elastic_minimips: the 8-bit multicycle MiniMIPS turned into a synchronous
// elastic (SELF) circuit.
//
// Every register of the clocked machine is replaced by an elastic buffer (EB):
//   P (program counter), C (controller state), I1..I4 (instruction bytes
//   31:24, 23:16, 15:8, 7:0), A and B (register-file outputs), L (ALU output),
//   M (memory data register) and Mem (the memory, whose read byte is
//   registered). The register file R has no EB: it is combinational logic on
//   the channel that joins its writers (RFWrite).
// Each EB resets to Half, holding the reset value of its register, so the
// network starts with one token per register. A token of an EB is one value
// of that register in the clocked machine; the data entering an EB is computed
// from the head tokens of the EBs feeding it, so the elastic machine computes
// exactly what the clocked one computes, token by token. Registers with a load
// enable (I1..I4 with IRWrite, P with PCEn) hold by taking their own last
// accepted word (d_last of the EB).
//
// Control network (joins J.., forks F.., channel names as in the MiniMIPS
// elastic control network):
//   JCI1      (Cint, I1)              -> C
//   C  -> Cint, and FC -> C1, C2, C3, C4
//   JCX       (C3, X1)                -> FCX -> CX1..CX4 -> I1..I4
//   JCI2I3LM  (C2, I2, I3, L2, M)     -> RFWrite (writes R) -> FCI2I3LM
//             -> CI2I3LM1 -> [NUM_BUBBLES bubbles b1] -> A
//             -> CI2I3LM2 -> [NUM_BUBBLES bubbles b2] -> B
//   JABCI4P   (A, B1, C1, I4, P1)     -> FABCI4P -> ABCI4P1, ABCI4P2 -> L
//   JABCI4LP  (ABCI4P1, L1)           -> P
//   FL: L -> L1, L2, L3     FB: B -> B1, B2     FP: P -> P1, P2
//   JBCLP     (B2, C4, L3, P2)        -> Y -> Mem -> FX -> X1, X2 -> M
// The main configuration uses eager forks (EFork) and lazy joins (LJoin).
// FORK and JOIN select the other fork and join implementations; lazy forks
// put combinational loops through the reconvergent joins (a lazy fork's valid
// depends on its branches' stalls, which an LJoin derives from the valid of a
// sibling branch). Those loops are the subject of the fork/join combination
// study and are deliberate in those configurations; with eager forks every
// loop of the network passes through a flip-flop.
//
// Bubbles: NUM_BUBBLES empty EBs are placed in series before A and before B
// (at the register-file outputs). They change the cycle count, not the result.
//
// Interface: the memory is programmed through ld_* while rst_n is low. The
// machine runs from reset with PC = 0. Outputs report memory accesses
// (mem_access: Mem accepts a token, with mem_adr and mem_wd; mem_store: that
// access is a store), the head of P and C,
// c_xfer (C accepts a token: one clocked-machine cycle has been completed),
// and event flags for the testbench: ev_eb_full (some EB holds two tokens),
// ev_fork_early (an eager fork served a branch while another stalled),
// ev_join_wait (some join has part of its tokens), ev_rf_write (R written).
module elastic_minimips
  import elastic_pkg::*;
  import minimips_pkg::*;
#(
  parameter int unsigned NUM_BUBBLES = 0,
  parameter fork_kind_e  FORK        = FORK_EAGER,
  parameter join_kind_e  JOIN        = JOIN_L
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       ld_en,
  input  logic [7:0] ld_adr,
  input  logic [7:0] ld_data,
  output logic       mem_access,
  output logic       mem_store,
  output logic [7:0] mem_adr,
  output logic [7:0] mem_wd,
  output logic [7:0] pc,
  output state_e     state,
  output logic       c_xfer,
  output logic       ev_eb_full,
  output logic       ev_fork_early,
  output logic       ev_join_wait,
  output logic       ev_rf_write
);

  // ---------------------------------------------------------------------
  // EB channel signals
  // ---------------------------------------------------------------------
  logic c_vl, c_sl, c_vr, c_sr;
  logic [3:0] i_vl, i_sl, i_vr, i_sr;
  logic a_vl, a_sl, a_vr, a_sr;
  logic b_vl, b_sl, b_vr, b_sr;
  logic l_vl, l_sl, l_vr, l_sr;
  logic m_vl, m_sl, m_vr, m_sr;
  logic p_vl, p_sl, p_vr, p_sr;
  logic y_vl, y_sl, x_vr, x_sr;   // Mem EB: input Y, output X

  // EB data
  state_e     c_q, c_last, c_next;
  logic [4:0] c_q_raw, c_last_raw;
  logic [7:0] i_q [4];
  logic [7:0] i_last [4];
  logic [7:0] i_d [4];
  logic [7:0] a_q, b_q, l_q, m_q, p_q, p_last, x_q;
  logic [7:0] a_last, b_last, l_last, m_last, x_last;
  logic [7:0] a_d, b_d, l_d, p_d, x_d;

  ctl_t ctl;

  // fork / join observation
  localparam int unsigned NF = 9;
  localparam int unsigned NJ = 6;
  logic [NF-1:0] f_early;
  logic [NJ-1:0] j_wait;

  // ---------------------------------------------------------------------
  // Controller C: EB + next-state/decoder
  // ---------------------------------------------------------------------
  assign c_q  = state_e'(c_q_raw);
  assign c_last = state_e'(c_last_raw);

  controller u_ctl (
    .state(c_q), .op(i_q[0][7:2]), .next_state(c_next), .ctl(ctl)
  );

  elastic_buffer #(.WIDTH(5), .INIT(EB_HALF), .INIT_DATA(5'(S_FETCH1))) eb_c (
    .clk, .rst_n, .vl(c_vl), .sl(c_sl), .dl(5'(c_next)),
    .vr(c_vr), .sr(c_sr), .dr(c_q_raw), .d_last(c_last_raw)
  );

  // C -> Cint, Cm ; Cm -> C1..C4
  logic [1:0] fci_vr, fci_sr;
  logic       cint_v, cint_s, cm_v, cm_s;
  elastic_fork #(.N(2), .KIND(FORK)) f_cint (
    .clk, .rst_n, .vl(c_vr), .sl(c_sr), .vr(fci_vr), .sr(fci_sr), .early(f_early[0])
  );
  assign cint_v = fci_vr[0];
  assign cm_v   = fci_vr[1];
  assign fci_sr = {cm_s, cint_s};

  logic [3:0] fc_vr, fc_sr;   // [0]=C1 [1]=C2 [2]=C3 [3]=C4
  elastic_fork #(.N(4), .KIND(FORK)) f_c (
    .clk, .rst_n, .vl(cm_v), .sl(cm_s), .vr(fc_vr), .sr(fc_sr), .early(f_early[1])
  );

  // JCI1 (Cint, I1) -> C
  logic [1:0] jci1_sl;
  elastic_join #(.N(2), .KIND(JOIN)) j_ci1 (
    .vl({i_vr[0], cint_v}), .sl(jci1_sl), .vr(c_vl), .sr(c_sl), .wait_any(j_wait[0])
  );
  assign cint_s = jci1_sl[0];
  assign i_sr[0] = jci1_sl[1];

  // ---------------------------------------------------------------------
  // Instruction registers I1..I4: JCX (C3, X1) -> FCX -> CX1..CX4
  // ---------------------------------------------------------------------
  logic [1:0] jcx_sl;
  logic       cx_v, cx_s;
  logic [1:0] fx_vr, fx_sr;   // [0]=X1 [1]=X2
  elastic_join #(.N(2), .KIND(JOIN)) j_cx (
    .vl({fx_vr[0], fc_vr[2]}), .sl(jcx_sl), .vr(cx_v), .sr(cx_s), .wait_any(j_wait[1])
  );
  assign fc_sr[2] = jcx_sl[0];
  assign fx_sr[0] = jcx_sl[1];

  elastic_fork #(.N(4), .KIND(FORK)) f_cx (
    .clk, .rst_n, .vl(cx_v), .sl(cx_s), .vr(i_vl), .sr(i_sl), .early(f_early[2])
  );

  for (genvar k = 0; k < 4; k++) begin : g_ir
    // IRWrite[3] loads I1 (k = 0) .. IRWrite[0] loads I4 (k = 3)
    assign i_d[k] = ctl.ir_write[3-k] ? x_q : i_last[k];
    elastic_buffer #(.WIDTH(8), .INIT(EB_HALF), .INIT_DATA(8'h00)) eb_i (
      .clk, .rst_n, .vl(i_vl[k]), .sl(i_sl[k]), .dl(i_d[k]),
      .vr(i_vr[k]), .sr(i_sr[k]), .dr(i_q[k]), .d_last(i_last[k])
    );
  end

  // ---------------------------------------------------------------------
  // RFWrite: JCI2I3LM (C2, I2, I3, L2, M) -> register file -> FCI2I3LM
  // ---------------------------------------------------------------------
  logic [4:0] jrf_sl;
  logic       rfw_v, rfw_s;
  logic [2:0] fl_vr, fl_sr;   // [0]=L1 [1]=L2 [2]=L3
  elastic_join #(.N(5), .KIND(JOIN)) j_ci2i3lm (
    .vl({m_vr, fl_vr[1], i_vr[2], i_vr[1], fc_vr[1]}), .sl(jrf_sl),
    .vr(rfw_v), .sr(rfw_s), .wait_any(j_wait[2])
  );
  assign fc_sr[1] = jrf_sl[0];
  assign i_sr[1]  = jrf_sl[1];
  assign i_sr[2]  = jrf_sl[2];
  assign fl_sr[1] = jrf_sl[3];
  assign m_sr     = jrf_sl[4];

  logic [7:0] rd1, rd2;
  regfile #(.WIDTH(8), .NREGS(8)) u_rf (
    .clk, .rst_n,
    .we(ctl.reg_write), .we_ok(rfw_v & ~rfw_s),
    .ra1(i_q[1][7:5]),                                   // instr 23:21
    .ra2(i_q[1][2:0]),                                   // instr 18:16
    .wa(ctl.reg_dst ? i_q[2][5:3] : i_q[1][2:0]),        // instr 13:11 / 18:16
    .wd(ctl.mem_to_reg ? m_q : l_q),
    .rd1, .rd2
  );
  assign ev_rf_write = rfw_v & ~rfw_s & ctl.reg_write;

  logic [1:0] frf_vr, frf_sr;  // [0]=CI2I3LM1 (A side) [1]=CI2I3LM2 (B side)
  elastic_fork #(.N(2), .KIND(FORK)) f_ci2i3lm (
    .clk, .rst_n, .vl(rfw_v), .sl(rfw_s), .vr(frf_vr), .sr(frf_sr), .early(f_early[3])
  );

  // ---------------------------------------------------------------------
  // Bubbles b1 / b2 and the A, B registers
  // ---------------------------------------------------------------------
  logic bub_full;
  if (NUM_BUBBLES == 0) begin : g_nobub
    assign a_vl      = frf_vr[0];
    assign frf_sr[0] = a_sl;
    assign a_d       = rd1;
    assign b_vl      = frf_vr[1];
    assign frf_sr[1] = b_sl;
    assign b_d       = rd2;
    assign bub_full  = 1'b0;
  end else begin : g_bub
    logic [NUM_BUBBLES:0] ba_v, ba_s, bb_v, bb_s;
    logic [7:0]           ba_d [NUM_BUBBLES+1];
    logic [7:0]           bb_d [NUM_BUBBLES+1];
    logic [7:0]           ba_last [NUM_BUBBLES];
    logic [7:0]           bb_last [NUM_BUBBLES];
    logic [NUM_BUBBLES-1:0] ba_full, bb_full;
    assign ba_v[0]   = frf_vr[0];
    assign frf_sr[0] = ba_s[0];
    assign ba_d[0]   = rd1;
    assign bb_v[0]   = frf_vr[1];
    assign frf_sr[1] = bb_s[0];
    assign bb_d[0]   = rd2;
    for (genvar n = 0; n < NUM_BUBBLES; n++) begin : g_stage
      elastic_buffer #(.WIDTH(8), .INIT(EB_EMPTY), .INIT_DATA(8'h00)) eb_b1 (
        .clk, .rst_n, .vl(ba_v[n]), .sl(ba_s[n]), .dl(ba_d[n]),
        .vr(ba_v[n+1]), .sr(ba_s[n+1]), .dr(ba_d[n+1]), .d_last(ba_last[n])
      );
      elastic_buffer #(.WIDTH(8), .INIT(EB_EMPTY), .INIT_DATA(8'h00)) eb_b2 (
        .clk, .rst_n, .vl(bb_v[n]), .sl(bb_s[n]), .dl(bb_d[n]),
        .vr(bb_v[n+1]), .sr(bb_s[n+1]), .dr(bb_d[n+1]), .d_last(bb_last[n])
      );
      assign ba_full[n] = ba_v[n+1] & ba_s[n];
      assign bb_full[n] = bb_v[n+1] & bb_s[n];
    end
    assign a_vl = ba_v[NUM_BUBBLES];
    assign ba_s[NUM_BUBBLES] = a_sl;
    assign a_d  = ba_d[NUM_BUBBLES];
    assign b_vl = bb_v[NUM_BUBBLES];
    assign bb_s[NUM_BUBBLES] = b_sl;
    assign b_d  = bb_d[NUM_BUBBLES];
    assign bub_full = |{ba_full, bb_full};
  end

  elastic_buffer #(.WIDTH(8), .INIT(EB_HALF), .INIT_DATA(8'h00)) eb_a (
    .clk, .rst_n, .vl(a_vl), .sl(a_sl), .dl(a_d),
    .vr(a_vr), .sr(a_sr), .dr(a_q), .d_last(a_last)
  );
  elastic_buffer #(.WIDTH(8), .INIT(EB_HALF), .INIT_DATA(8'h00)) eb_b (
    .clk, .rst_n, .vl(b_vl), .sl(b_sl), .dl(b_d),
    .vr(b_vr), .sr(b_sr), .dr(b_q), .d_last(b_last)
  );

  logic [1:0] fb_vr, fb_sr;   // [0]=B1 [1]=B2
  elastic_fork #(.N(2), .KIND(FORK)) f_b (
    .clk, .rst_n, .vl(b_vr), .sl(b_sr), .vr(fb_vr), .sr(fb_sr), .early(f_early[4])
  );

  logic [1:0] fp_vr, fp_sr;   // [0]=P1 [1]=P2
  elastic_fork #(.N(2), .KIND(FORK)) f_p (
    .clk, .rst_n, .vl(p_vr), .sl(p_sr), .vr(fp_vr), .sr(fp_sr), .early(f_early[5])
  );

  // ---------------------------------------------------------------------
  // ALU: JABCI4P (A, B1, C1, I4, P1) -> FABCI4P -> L and P
  // ---------------------------------------------------------------------
  logic [4:0] jalu_sl;
  logic       alu_v, alu_s;
  elastic_join #(.N(5), .KIND(JOIN)) j_abci4p (
    .vl({fp_vr[0], i_vr[3], fc_vr[0], fb_vr[0], a_vr}), .sl(jalu_sl),
    .vr(alu_v), .sr(alu_s), .wait_any(j_wait[3])
  );
  assign a_sr     = jalu_sl[0];
  assign fb_sr[0] = jalu_sl[1];
  assign fc_sr[0] = jalu_sl[2];
  assign i_sr[3]  = jalu_sl[3];
  assign fp_sr[0] = jalu_sl[4];

  logic [7:0] immx4, src_a, src_b, alu_y;
  logic       zero;
  alu_op_e    alucont;
  assign immx4 = {i_q[3][5:0], 2'b00};
  assign src_a = ctl.alu_src_a ? a_q : p_q;
  always_comb begin
    unique case (ctl.alu_src_b)
      2'd0:    src_b = b_q;
      2'd1:    src_b = 8'd1;
      2'd2:    src_b = i_q[3];
      default: src_b = immx4;
    endcase
  end
  alu_control u_aluctl (.aluop(ctl.alu_op), .funct(i_q[3][5:0]), .alucont);
  alu #(.WIDTH(8)) u_alu (.a(src_a), .b(src_b), .alucont, .y(alu_y), .zero);

  logic [1:0] falu_vr, falu_sr;   // [0]=ABCI4P1 (to P) [1]=ABCI4P2 (to L)
  elastic_fork #(.N(2), .KIND(FORK)) f_abci4p (
    .clk, .rst_n, .vl(alu_v), .sl(alu_s), .vr(falu_vr), .sr(falu_sr), .early(f_early[6])
  );
  assign l_vl       = falu_vr[1];
  assign falu_sr[1] = l_sl;
  assign l_d        = alu_y;

  elastic_buffer #(.WIDTH(8), .INIT(EB_HALF), .INIT_DATA(8'h00)) eb_l (
    .clk, .rst_n, .vl(l_vl), .sl(l_sl), .dl(l_d),
    .vr(l_vr), .sr(l_sr), .dr(l_q), .d_last(l_last)
  );
  elastic_fork #(.N(3), .KIND(FORK)) f_l (
    .clk, .rst_n, .vl(l_vr), .sl(l_sr), .vr(fl_vr), .sr(fl_sr), .early(f_early[7])
  );

  // JABCI4LP (ABCI4P1, L1) -> P
  logic [1:0] jp_sl;
  elastic_join #(.N(2), .KIND(JOIN)) j_abci4lp (
    .vl({fl_vr[0], falu_vr[0]}), .sl(jp_sl), .vr(p_vl), .sr(p_sl), .wait_any(j_wait[4])
  );
  assign falu_sr[0] = jp_sl[0];
  assign fl_sr[0]   = jp_sl[1];

  logic       pc_en;
  logic [7:0] pc_next;
  assign pc_en = ctl.pc_write | (ctl.pc_write_cond & zero);
  always_comb begin
    unique case (ctl.pc_source)
      2'd0:    pc_next = alu_y;
      2'd1:    pc_next = l_q;
      2'd2:    pc_next = immx4;
      default: pc_next = 8'h00;
    endcase
  end
  assign p_d = pc_en ? pc_next : p_last;

  elastic_buffer #(.WIDTH(8), .INIT(EB_HALF), .INIT_DATA(8'h00)) eb_p (
    .clk, .rst_n, .vl(p_vl), .sl(p_sl), .dl(p_d),
    .vr(p_vr), .sr(p_sr), .dr(p_q), .d_last(p_last)
  );

  // ---------------------------------------------------------------------
  // Memory: JBCLP (B2, C4, L3, P2) -> Y -> Mem -> FX -> X1, X2 -> M
  // ---------------------------------------------------------------------
  logic [3:0] jmem_sl;
  logic [7:0] adr;
  elastic_join #(.N(4), .KIND(JOIN)) j_bclp (
    .vl({fp_vr[1], fl_vr[2], fc_vr[3], fb_vr[1]}), .sl(jmem_sl),
    .vr(y_vl), .sr(y_sl), .wait_any(j_wait[5])
  );
  assign fb_sr[1] = jmem_sl[0];
  assign fc_sr[3] = jmem_sl[1];
  assign fl_sr[2] = jmem_sl[2];
  assign fp_sr[1] = jmem_sl[3];

  assign adr = ctl.iord ? l_q : p_q;
  memory #(.AW(8)) u_mem (
    .clk, .en(y_vl & ~y_sl), .we(ctl.mem_write), .adr, .wd(b_q), .rd(x_d),
    .ld_en, .ld_adr, .ld_data
  );

  elastic_buffer #(.WIDTH(8), .INIT(EB_HALF), .INIT_DATA(8'h00)) eb_mem (
    .clk, .rst_n, .vl(y_vl), .sl(y_sl), .dl(x_d),
    .vr(x_vr), .sr(x_sr), .dr(x_q), .d_last(x_last)
  );
  elastic_fork #(.N(2), .KIND(FORK)) f_x (
    .clk, .rst_n, .vl(x_vr), .sl(x_sr), .vr(fx_vr), .sr(fx_sr), .early(f_early[8])
  );
  assign m_vl     = fx_vr[1];
  assign fx_sr[1] = m_sl;

  elastic_buffer #(.WIDTH(8), .INIT(EB_HALF), .INIT_DATA(8'h00)) eb_m (
    .clk, .rst_n, .vl(m_vl), .sl(m_sl), .dl(x_q),
    .vr(m_vr), .sr(m_sr), .dr(m_q), .d_last(m_last)
  );

  // ---------------------------------------------------------------------
  // Outputs
  // ---------------------------------------------------------------------
  assign mem_access = y_vl & ~y_sl;
  assign mem_store  = y_vl & ~y_sl & ctl.mem_write;
  assign mem_adr   = adr;
  assign mem_wd    = b_q;
  assign pc        = p_q;
  assign state     = c_q;
  assign c_xfer    = c_vl & ~c_sl;

  assign ev_eb_full    = c_sl | (|i_sl) | a_sl | b_sl | l_sl | m_sl | p_sl | y_sl | bub_full;
  assign ev_fork_early = |f_early;
  assign ev_join_wait  = |j_wait;

endmodule
