// controller: next-state and output logic of the MiniMIPS controller C.
// Combinational: the state register itself is C's elastic buffer in the
// machine, so this module maps (state, Op[5:0]) to the next state and decodes
// the current state into the control outputs (a Moore machine; only the next
// state depends on the opcode, and only in S_DECODE).
//
// Sequence (this design's own; the document names only the control signals):
//   FETCH1..FETCH5  fetch 4 bytes at PC, PC+1, .. into I1..I4 (IRWrite[3] first)
//                   while the ALU increments PC; the registered memory read
//                   makes the last byte arrive one state after the last read.
//   DECODE          A,B read from R; L <- PC + (instr[5:0] << 2) (branch target)
//   lb   : MEMADR, LBRD, LBWAIT, LBWR     sb   : MEMADR, SBWR
//   R    : RTYPEX, RTYPWR                 addi : ADDIEX, ADDIWR
//   beq  : BEQEX                          j    : JEX
// Unknown opcodes are treated as no-ops (back to FETCH1).
// Cycles per instruction: lb 10, sb 8, R-type 8, addi 8, beq 7, j 7.
module controller
  import minimips_pkg::*;
(
  input  state_e     state,
  input  logic [5:0] op,
  output state_e     next_state,
  output ctl_t       ctl
);
  always_comb begin
    unique case (state)
      S_FETCH1: next_state = S_FETCH2;
      S_FETCH2: next_state = S_FETCH3;
      S_FETCH3: next_state = S_FETCH4;
      S_FETCH4: next_state = S_FETCH5;
      S_FETCH5: next_state = S_DECODE;
      S_DECODE: begin
        unique case (op)
          OP_LB, OP_SB: next_state = S_MEMADR;
          OP_RTYPE:     next_state = S_RTYPEX;
          OP_BEQ:       next_state = S_BEQEX;
          OP_J:         next_state = S_JEX;
          OP_ADDI:      next_state = S_ADDIEX;
          default:      next_state = S_FETCH1;
        endcase
      end
      S_MEMADR: next_state = (op == OP_LB) ? S_LBRD : S_SBWR;
      S_LBRD:   next_state = S_LBWAIT;
      S_LBWAIT: next_state = S_LBWR;
      S_RTYPEX: next_state = S_RTYPWR;
      S_ADDIEX: next_state = S_ADDIWR;
      default:  next_state = S_FETCH1;
    endcase
  end

  always_comb begin
    ctl = '0;
    unique case (state)
      S_FETCH1, S_FETCH2, S_FETCH3, S_FETCH4: begin
        ctl.mem_read  = 1'b1;
        ctl.alu_src_b = 2'd1;          // PC + 1
        ctl.pc_write  = 1'b1;
        ctl.ir_write  = (state == S_FETCH2) ? 4'b1000 :
                        (state == S_FETCH3) ? 4'b0100 :
                        (state == S_FETCH4) ? 4'b0010 : 4'b0000;
      end
      S_FETCH5: ctl.ir_write = 4'b0001;
      S_DECODE: ctl.alu_src_b = 2'd3;  // PC + (imm[5:0] << 2)
      S_MEMADR, S_ADDIEX: begin
        ctl.alu_src_a = 1'b1;
        ctl.alu_src_b = 2'd2;          // A + imm
      end
      S_LBRD: begin
        ctl.iord     = 1'b1;
        ctl.mem_read = 1'b1;
      end
      S_LBWR: begin
        ctl.reg_write  = 1'b1;
        ctl.mem_to_reg = 1'b1;
      end
      S_SBWR: begin
        ctl.iord      = 1'b1;
        ctl.mem_write = 1'b1;
      end
      S_RTYPEX: begin
        ctl.alu_src_a = 1'b1;
        ctl.alu_op    = ALUOP_FUNCT;
      end
      S_RTYPWR: begin
        ctl.reg_dst   = 1'b1;
        ctl.reg_write = 1'b1;
      end
      S_BEQEX: begin
        ctl.alu_src_a     = 1'b1;
        ctl.alu_op        = ALUOP_SUB;
        ctl.pc_write_cond = 1'b1;
        ctl.pc_source     = 2'd1;
      end
      S_JEX: begin
        ctl.pc_write  = 1'b1;
        ctl.pc_source = 2'd2;
      end
      S_ADDIWR: ctl.reg_write = 1'b1;
      default: ;
    endcase
  end
endmodule
