// tb_controller: walks the controller's state sequence for every opcode from
// FETCH1 back to FETCH1 and checks the number of states (cycles per
// instruction), the IRWrite order (I1, I2, I3, I4), and that each instruction
// writes the register file, writes memory and changes the PC as it should.
module tb_controller;
  import minimips_pkg::*;
  state_e     state, next_state;
  logic [5:0] op;
  ctl_t       ctl;
  int checks = 0, failures = 0;

  controller dut (.state, .op, .next_state, .ctl);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL op=%b: %s", op, msg); end
  endtask

  task automatic walk(input logic [5:0] opc, input int cpi, input int regw, input int memw,
                      input int pcw_final, input int cond);
    int n, rw, mw, pw, pc_cond;
    logic [3:0] irw [$];
    op = opc; state = S_FETCH1; n = 0; rw = 0; mw = 0; pw = 0; pc_cond = 0; irw = {};
    do begin
      #1;
      if (ctl.ir_write != 0) irw.push_back(ctl.ir_write);
      rw += ctl.reg_write; mw += ctl.mem_write; pc_cond += ctl.pc_write_cond;
      if (ctl.pc_write && ctl.pc_source != 0) pw++;
      state = next_state;
      n++;
    end while (state != S_FETCH1 && n < 40);
    check(n == cpi, $sformatf("cycles %0d expected %0d", n, cpi));
    check(irw.size() == 4 && irw[0] == 4'b1000 && irw[1] == 4'b0100 &&
          irw[2] == 4'b0010 && irw[3] == 4'b0001, "IRWrite order");
    check(rw == regw, "register writes");
    check(mw == memw, "memory writes");
    check(pw == pcw_final, "jump PC writes");
    check(pc_cond == cond, "conditional PC writes");
  endtask

  initial begin
    walk(OP_LB,    10, 1, 0, 0, 0);
    walk(OP_SB,     8, 0, 1, 0, 0);
    walk(OP_RTYPE,  8, 1, 0, 0, 0);
    walk(OP_ADDI,   8, 1, 0, 0, 0);
    walk(OP_BEQ,    7, 0, 0, 0, 1);
    walk(OP_J,      7, 0, 0, 1, 0);
    walk(6'b111111, 6, 0, 0, 0, 0);
    // fetch: memory address from P, PC + 1 through the ALU
    state = S_FETCH1; #1;
    check(!ctl.iord && ctl.pc_write && ctl.alu_src_b == 2'd1 && !ctl.alu_src_a, "fetch controls");
    state = S_SBWR; #1;
    check(ctl.iord && ctl.mem_write, "store uses L as address");
    state = S_LBWR; #1;
    check(ctl.mem_to_reg && !ctl.reg_dst, "lb writes M to rt");
    state = S_RTYPWR; #1;
    check(!ctl.mem_to_reg && ctl.reg_dst, "R-type writes L to rd");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
