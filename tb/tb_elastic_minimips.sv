// tb_elastic_minimips: end-to-end test of the elastic MiniMIPS.
//
// The test program of minimips_test_pkg is loaded into four machines with
// eager forks: three with lazy joins (LJoin) and 0, 1 and 3 bubbles in front of
// A and B, and a fourth with one bubble whose joins are LKJoins. The
// instruction-level model of the same package runs the program and gives the
// expected list of stores and, from the documented cycles per instruction
// (lb 10, sb 8, R-type/addi 8, beq/j 7), the clock cycle of the final store
// for the bubble-free machine.
//
// Checks: every machine performs exactly the model's stores, in order; every
// token that enters Mem (controller state, address, store data) in a machine
// with bubbles equals the same token of the bubble-free machine; the
// bubble-free machine takes exactly the model's cycle count and completes one
// controller token per clock; machines with bubbles take more cycles and, as
// elastic machines, show stalls: an EB holding two tokens, eager forks
// serving one branch early, joins waiting for a late token. Each mechanism is
// counted and must occur at least once.
module tb_elastic_minimips;
  import minimips_pkg::*;
  import minimips_test_pkg::*;

  // machines 0..2: eager forks, lazy joins (LJoin) with 0, 1, 3 bubbles;
  // machine 3: eager forks with LKJoin joins and 1 bubble
  localparam int NM = 4;
  localparam int BUB [NM] = '{0, 1, 3, 1};
  localparam elastic_pkg::join_kind_e JK [NM] = '{elastic_pkg::JOIN_L, elastic_pkg::JOIN_L,
                                                  elastic_pkg::JOIN_L, elastic_pkg::JOIN_LK};

  logic clk = 1'b0, rst_n = 1'b0;
  logic ld_en = 1'b0;
  logic [7:0] ld_adr = 8'h00, ld_data = 8'h00;
  int checks = 0, failures = 0;
  int cycle = 0;

  always #5 clk = ~clk;

  // ---------------------------------------------------------------------
  // Machines
  // ---------------------------------------------------------------------
  logic [NM-1:0] acc, store, cx, efull, fearly, jwait, rfw;
  logic [7:0]    sadr [NM];
  logic [7:0]    sdat [NM];
  state_e        st [NM];
  // memory access trace of the bubble-free machine: {state, address, write data}
  logic [20:0]   trace [$];
  int            nacc [NM];

  elastic_minimips #(.NUM_BUBBLES(BUB[0])) dut0 (
    .clk, .rst_n, .ld_en, .ld_adr, .ld_data,
    .mem_access(acc[0]), .mem_store(store[0]), .mem_adr(sadr[0]), .mem_wd(sdat[0]), .pc(), .state(st[0]), .c_xfer(cx[0]),
    .ev_eb_full(efull[0]), .ev_fork_early(fearly[0]), .ev_join_wait(jwait[0]), .ev_rf_write(rfw[0])
  );
  for (genvar g = 1; g < NM; g++) begin : g_bub
    elastic_minimips #(.NUM_BUBBLES(BUB[g]), .JOIN(JK[g])) dut (
      .clk, .rst_n, .ld_en, .ld_adr, .ld_data,
      .mem_access(acc[g]), .mem_store(store[g]), .mem_adr(sadr[g]), .mem_wd(sdat[g]), .pc(), .state(st[g]), .c_xfer(cx[g]),
      .ev_eb_full(efull[g]), .ev_fork_early(fearly[g]), .ev_join_wait(jwait[g]), .ev_rf_write(rfw[g])
    );
  end

  int  nstore [NM];
  int  ncx [NM];
  int  nfull [NM];
  int  nearly [NM];
  int  nwait [NM];
  int  nrfw [NM];
  int  done_cycle [NM];
  bit  done [NM];

  always @(posedge clk) if (rst_n) begin
    for (int g = 0; g < NM; g++) if (!done[g]) begin
      ncx[g]    += int'(cx[g]);
      nfull[g]  += int'(efull[g]);
      nearly[g] += int'(fearly[g]);
      nwait[g]  += int'(jwait[g]);
      nrfw[g]   += int'(rfw[g]);
      if (acc[g]) begin
        if (g == 0) trace.push_back({5'(st[0]), sadr[0], sdat[0]});
        else begin
          checks++;
          if (nacc[g] >= trace.size() || trace[nacc[g]] != {5'(st[g]), sadr[g], sdat[g]}) begin
            failures++;
            if (failures < 10)
              $display("machine %0d (bubbles %0d): memory token #%0d state=%0d adr=%h wd=%h differs from the bubble-free machine",
                       g, BUB[g], nacc[g], st[g], sadr[g], sdat[g]);
          end
        end
        nacc[g]++;
      end
      if (store[g]) begin
        checks++;
        if (nstore[g] >= exp_adr.size() || sadr[g] != exp_adr[nstore[g]] || sdat[g] != exp_dat[nstore[g]]) begin
          failures++;
          $display("machine %0d (bubbles %0d): store #%0d mem[%h]=%h unexpected", g, BUB[g], nstore[g], sadr[g], sdat[g]);
        end
        nstore[g]++;
        if (sadr[g] == 8'hFF) begin
          done[g] = 1;
          done_cycle[g] = cycle;
        end
      end
    end
    cycle++;
  end

  initial begin
    for (int g = 0; g < NM; g++) begin
      nstore[g] = 0; nacc[g] = 0; ncx[g] = 0; nfull[g] = 0; nearly[g] = 0; nwait[g] = 0; nrfw[g] = 0;
      done[g] = 0; done_cycle[g] = 0;
    end
    build_program();
    run_model();
    // program the memory while the machines are held in reset
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      ld_en = 1'b1; ld_adr = 8'(i); ld_data = image[i];
    end
    @(negedge clk);
    ld_en = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    wait (done[0] && done[1] && done[2] && done[3]);
    @(posedge clk);
    for (int g = 0; g < NM; g++) begin
      $display("%s bubbles=%0d: cycles to final store=%0d, controller tokens=%0d, stores=%0d, rf writes=%0d, eb_full=%0d, fork_early=%0d, join_wait=%0d",
               (JK[g] == elastic_pkg::JOIN_L) ? "LJoin " : "LKJoin", BUB[g], done_cycle[g], ncx[g], nstore[g], nrfw[g], nfull[g], nearly[g], nwait[g]);
      checks++;
      if (nstore[g] != exp_adr.size()) begin failures++; $display("machine %0d: %0d stores, expected %0d", g, nstore[g], exp_adr.size()); end
      checks++;
      if (nrfw[g] == 0) begin failures++; $display("machine %0d: no register write", g); end
    end
    // bubble-free machine: same cycle count as the clocked machine
    checks++;
    if (done_cycle[0] != exp_final_cycle) begin
      failures++;
      $display("no bubbles: final store at cycle %0d, expected %0d", done_cycle[0], exp_final_cycle);
    end
    checks++;
    if (ncx[0] != done_cycle[0] + 1) begin
      failures++;
      $display("no bubbles: %0d controller tokens in %0d cycles", ncx[0], done_cycle[0] + 1);
    end
    // bubbles cost cycles and make the elastic mechanisms happen
    for (int g = 1; g < NM; g++) begin
      checks++;
      if (done_cycle[g] <= done_cycle[0]) begin failures++; $display("machine %0d with bubbles not slower than without", g); end
      checks++;
      if (nfull[g] == 0) begin failures++; $display("bubbles %0d: no EB ever full", BUB[g]); end
      checks++;
      if (nearly[g] == 0) begin failures++; $display("bubbles %0d: no eager early start", BUB[g]); end
      checks++;
      if (nwait[g] == 0) begin failures++; $display("bubbles %0d: no join ever waited", BUB[g]); end
    end
    $display("expected final store cycle (clocked machine) = %0d", exp_final_cycle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog: done=%0d%0d%0d%0d", done[0], done[1], done[2], done[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
