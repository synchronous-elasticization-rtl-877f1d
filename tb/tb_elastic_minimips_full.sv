// tb_elastic_minimips_full: the elastic MiniMIPS at its default parameters
// (no bubbles, eager forks, lazy joins) runs the complete test program of
// minimips_test_pkg. Checks: the stores match the instruction-level model,
// the final store comes at exactly the cycle the clocked machine needs, the
// controller completes one token per clock (no stall anywhere), and no elastic
// buffer ever fills, as expected when no bubble is present.
module tb_elastic_minimips_full;
  import minimips_pkg::*;
  import minimips_test_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic ld_en = 1'b0;
  logic [7:0] ld_adr = 8'h00, ld_data = 8'h00;
  logic acc, store, cx, efull, fearly, jwait, rfw;
  logic [7:0] sadr, sdat, pc;
  state_e st;
  int checks = 0, failures = 0;
  int cycle = 0, nstore = 0, ncx = 0, nfull = 0, nrfw = 0, done_cycle = 0;
  bit done = 1'b0;

  always #5 clk = ~clk;

  elastic_minimips dut (
    .clk, .rst_n, .ld_en, .ld_adr, .ld_data,
    .mem_access(acc), .mem_store(store), .mem_adr(sadr), .mem_wd(sdat), .pc, .state(st), .c_xfer(cx),
    .ev_eb_full(efull), .ev_fork_early(fearly), .ev_join_wait(jwait), .ev_rf_write(rfw)
  );

  always @(posedge clk) if (rst_n && !done) begin
    ncx   += int'(cx);
    nfull += int'(efull);
    nrfw  += int'(rfw);
    if (store) begin
      checks++;
      if (nstore >= exp_adr.size() || sadr != exp_adr[nstore] || sdat != exp_dat[nstore]) begin
        failures++;
        $display("store #%0d mem[%h]=%h unexpected", nstore, sadr, sdat);
      end
      nstore++;
      if (sadr == 8'hFF) begin
        done = 1'b1;
        done_cycle = cycle;
      end
    end
    cycle++;
  end

  initial begin
    build_program();
    run_model();
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      ld_en = 1'b1; ld_adr = 8'(i); ld_data = image[i];
    end
    @(negedge clk);
    ld_en = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    wait (done);
    @(posedge clk);
    $display("cycles to final store=%0d (expected %0d), controller tokens=%0d, stores=%0d, rf writes=%0d",
             done_cycle, exp_final_cycle, ncx, nstore, nrfw);
    checks++;
    if (nstore != exp_adr.size()) begin failures++; $display("%0d stores, expected %0d", nstore, exp_adr.size()); end
    checks++;
    if (done_cycle != exp_final_cycle) begin failures++; $display("final store at cycle %0d, expected %0d", done_cycle, exp_final_cycle); end
    checks++;
    if (ncx != done_cycle + 1) begin failures++; $display("%0d controller tokens in %0d cycles", ncx, done_cycle + 1); end
    checks++;
    if (nfull != 0) begin failures++; $display("an elastic buffer filled up without bubbles"); end
    checks++;
    if (nrfw == 0) begin failures++; $display("no register write"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog: program did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
