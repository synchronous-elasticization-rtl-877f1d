// minimips_test_pkg: test program and instruction-level reference model of
// the MiniMIPS, shared by the MiniMIPS testbenches.
//
// build_program() writes a 256-byte memory image: a loop using lb, add, sub,
// beq and j, then slt, and, or, two stores, a reload, a taken beq that skips a
// store, and a final store to address 0xFF that marks the end. Instructions are
// stored most significant byte first (the byte at PC goes to I1).
// run_model() executes the image one instruction at a time and records the
// expected stores and the clock cycle of the final store for a machine with
// the controller's cycles per instruction (lb 10, sb 8, R-type and addi 8,
// beq and j 7), the store being the last state of sb.
package minimips_test_pkg;
  import minimips_pkg::*;

  // ---------------------------------------------------------------------
  // Program
  // ---------------------------------------------------------------------
  logic [7:0] image [256];

  function automatic logic [31:0] itype(logic [5:0] op, int rs, int rt, logic [7:0] imm);
    return {op, 5'(rs), 5'(rt), 8'h00, imm};
  endfunction
  function automatic logic [31:0] rtype(int rs, int rt, int rd, logic [5:0] fn);
    return {OP_RTYPE, 5'(rs), 5'(rt), 5'(rd), 5'd0, fn};
  endfunction

  task automatic put(logic [7:0] adr, logic [31:0] w);
    image[adr]       = w[31:24];
    image[8'(adr+1)] = w[23:16];
    image[8'(adr+2)] = w[15:8];
    image[8'(adr+3)] = w[7:0];
  endtask

  task automatic build_program();
    for (int i = 0; i < 256; i++) image[i] = 8'h00;
    put(8'h00, itype(OP_ADDI, 0, 2, 5));          // r2 = 5 (loop count)
    put(8'h04, itype(OP_ADDI, 0, 3, 0));          // r3 = 0 (sum)
    put(8'h08, itype(OP_ADDI, 0, 4, 1));          // r4 = 1
    put(8'h0C, itype(OP_LB,   0, 5, 8'h60));      // r5 = mem[0x60]
    put(8'h10, rtype(3, 5, 3, FN_ADD));           // loop: r3 += r5
    put(8'h14, rtype(2, 4, 2, FN_SUB));           // r2 -= 1
    put(8'h18, itype(OP_BEQ,  2, 0, 1));          // if r2 == 0 goto 0x20
    put(8'h1C, {OP_J, 26'(8'h10 >> 2)});          // goto loop
    put(8'h20, rtype(4, 5, 6, FN_SLT));           // r6 = r4 < r5
    put(8'h24, rtype(3, 5, 7, FN_AND));           // r7 = r3 & r5
    put(8'h28, rtype(3, 6, 1, FN_OR));            // r1 = r3 | r6
    put(8'h2C, itype(OP_SB,   0, 3, 8'h61));      // mem[0x61] = r3
    put(8'h30, itype(OP_SB,   0, 7, 8'h62));      // mem[0x62] = r7
    put(8'h34, itype(OP_LB,   0, 6, 8'h61));      // r6 = mem[0x61]
    put(8'h38, rtype(6, 1, 6, FN_SUB));           // r6 = r6 - r1
    put(8'h3C, itype(OP_BEQ,  6, 0, 1));          // taken: skip next store
    put(8'h40, itype(OP_SB,   0, 4, 8'h63));      // skipped
    put(8'h44, itype(OP_SB,   0, 1, 8'hFF));      // end marker
    put(8'h48, {OP_J, 26'(8'h48 >> 2)});          // stay here
    image[8'h60] = 8'd7;
  endtask

  // ---------------------------------------------------------------------
  // Instruction-level model
  // ---------------------------------------------------------------------
  logic [7:0] exp_adr [$];
  logic [7:0] exp_dat [$];
  int         exp_final_cycle;

  task automatic run_model();
    logic [7:0] r [8];
    logic [7:0] m [256];
    logic [7:0] pc;
    int         cyc;
    bit         done;
    for (int i = 0; i < 8; i++) r[i] = 8'h00;
    for (int i = 0; i < 256; i++) m[i] = image[i];
    pc = 8'h00; cyc = 0; done = 0;
    for (int n = 0; n < 1000 && !done; n++) begin
      logic [31:0] w;
      logic [5:0]  op, fn;
      logic [2:0]  rs, rt, rd;
      logic [7:0]  imm, a, b, res, pc4;
      w   = {m[pc], m[8'(pc+1)], m[8'(pc+2)], m[8'(pc+3)]};
      op  = w[31:26]; rs = w[23:21]; rt = w[18:16]; rd = w[13:11];
      fn  = w[5:0];   imm = w[7:0];
      a   = (rs == 0) ? 8'h00 : r[rs];
      b   = (rt == 0) ? 8'h00 : r[rt];
      pc4 = pc + 8'd4;
      pc  = pc4;
      case (op)
        OP_ADDI: begin if (rt != 0) r[rt] = a + imm; cyc += 8; end
        OP_LB:   begin if (rt != 0) r[rt] = m[8'(a + imm)]; cyc += 10; end
        OP_SB:   begin
          exp_adr.push_back(8'(a + imm));
          exp_dat.push_back(b);
          m[8'(a + imm)] = b;
          if (8'(a + imm) == 8'hFF) begin
            exp_final_cycle = cyc + 7;   // store is the 8th state of sb
            done = 1;
          end
          cyc += 8;
        end
        OP_RTYPE: begin
          case (fn)
            FN_ADD: res = a + b;
            FN_SUB: res = a - b;
            FN_AND: res = a & b;
            FN_OR:  res = a | b;
            FN_SLT: res = ($signed(a) < $signed(b)) ? 8'd1 : 8'd0;
            default: res = a + b;
          endcase
          if (rd != 0) r[rd] = res;
          cyc += 8;
        end
        OP_BEQ: begin if (a == b) pc = pc4 + {w[5:0], 2'b00}; cyc += 7; end
        OP_J:   begin pc = {w[5:0], 2'b00}; cyc += 7; end
        default: cyc += 6;
      endcase
    end
  endtask

endpackage
