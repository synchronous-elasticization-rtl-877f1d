// minimips_pkg: constants and types of the 8-bit MiniMIPS.
//
// The MiniMIPS is an 8-bit subset of MIPS: 8-bit datapath, 8-bit program
// counter, 8 registers, 32-bit instructions fetched one byte at a time into four
// instruction registers I1 (bits 31:24) .. I4 (bits 7:0). The instruction set
// (lb, sb, add, sub, and, or, slt, addi, beq, j with their MIPS encodings) and
// the multicycle state sequence are this design's own choice; the signal names
// of ctl_t are the controller outputs of the MiniMIPS block diagram.
package minimips_pkg;

  localparam int unsigned XLEN = 8;

  // Opcodes, instruction bits 31:26 (= I1[7:2])
  localparam logic [5:0] OP_RTYPE = 6'b000000;
  localparam logic [5:0] OP_J     = 6'b000010;
  localparam logic [5:0] OP_BEQ   = 6'b000100;
  localparam logic [5:0] OP_ADDI  = 6'b001000;
  localparam logic [5:0] OP_LB    = 6'b100000;
  localparam logic [5:0] OP_SB    = 6'b101000;

  // Function codes, instruction bits 5:0 (= I4[5:0])
  localparam logic [5:0] FN_ADD = 6'b100000;
  localparam logic [5:0] FN_SUB = 6'b100010;
  localparam logic [5:0] FN_AND = 6'b100100;
  localparam logic [5:0] FN_OR  = 6'b100101;
  localparam logic [5:0] FN_SLT = 6'b101010;

  // ALU operations
  typedef enum logic [2:0] {
    ALU_AND = 3'b000,
    ALU_OR  = 3'b001,
    ALU_ADD = 3'b010,
    ALU_SUB = 3'b110,
    ALU_SLT = 3'b111
  } alu_op_e;

  // ALUOp from the controller to ALU Control
  localparam logic [1:0] ALUOP_ADD   = 2'b00;
  localparam logic [1:0] ALUOP_SUB   = 2'b01;
  localparam logic [1:0] ALUOP_FUNCT = 2'b10;

  // Controller states. The memory read data is registered (Mem is one of the
  // machine's registers), so a fetched byte reaches its instruction register one
  // state after its address was issued: five fetch states for four bytes.
  typedef enum logic [4:0] {
    S_FETCH1 = 5'd0,   // read PC,           PC <- PC+1
    S_FETCH2 = 5'd1,   // read PC, I1 <- Mem, PC <- PC+1
    S_FETCH3 = 5'd2,   // read PC, I2 <- Mem, PC <- PC+1
    S_FETCH4 = 5'd3,   // read PC, I3 <- Mem, PC <- PC+1
    S_FETCH5 = 5'd4,   //          I4 <- Mem
    S_DECODE = 5'd5,   // A,B <- R[rs],R[rt]; L <- PC + (imm[5:0] << 2)
    S_MEMADR = 5'd6,   // L <- A + imm
    S_LBRD   = 5'd7,   // read Mem[L]
    S_LBWAIT = 5'd8,   // M <- Mem
    S_LBWR   = 5'd9,   // R[rt] <- M
    S_SBWR   = 5'd10,  // Mem[L] <- B
    S_RTYPEX = 5'd11,  // L <- A funct B
    S_RTYPWR = 5'd12,  // R[rd] <- L
    S_BEQEX  = 5'd13,  // if A == B: PC <- L
    S_JEX    = 5'd14,  // PC <- imm[5:0] << 2
    S_ADDIEX = 5'd15,  // L <- A + imm
    S_ADDIWR = 5'd16   // R[rt] <- L
  } state_e;

  // Controller outputs (names of the MiniMIPS block diagram)
  typedef struct packed {
    logic       pc_write_cond;  // PCWriteCond
    logic       pc_write;       // PCWrite
    logic       iord;           // IorD: 0 address = P, 1 address = L
    logic       mem_read;       // MemRead
    logic       mem_write;      // MemWrite
    logic       mem_to_reg;     // MemtoReg: 0 write data = L, 1 = M
    logic [3:0] ir_write;       // IRWrite[3:0]: [3] loads I1 .. [0] loads I4
    logic [1:0] pc_source;      // PCSource: 0 ALU, 1 L, 2 jump target, 3 zero
    logic [1:0] alu_op;         // ALUOp
    logic [1:0] alu_src_b;      // ALUSrcB: 0 B, 1 one, 2 imm, 3 imm[5:0]<<2
    logic       alu_src_a;      // ALUSrcA: 0 P, 1 A
    logic       reg_write;      // RegWrite
    logic       reg_dst;        // RegDst: 0 rt (instr 18:16), 1 rd (instr 13:11)
  } ctl_t;

endpackage
