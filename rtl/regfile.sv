// regfile: register file R of the MiniMIPS: NREGS registers of WIDTH bits, two
// combinational read ports and one write port. Register 0 always reads zero.
//
// In the elastic machine R has no elastic buffer of its own; it is treated as
// combinational logic on the channel that joins its writers (the RFWrite
// channel). A write happens at the clock edge when RegWrite is set and we_ok is
// high; the elastic top drives we_ok with the transfer of the RFWrite channel,
// so each token writes once and every reader of that token sees the old
// contents. Registers reset to zero.
module regfile #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned NREGS = 8,
  localparam int unsigned AW   = $clog2(NREGS)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             we,
  input  logic             we_ok,
  input  logic [AW-1:0]    ra1,
  input  logic [AW-1:0]    ra2,
  input  logic [AW-1:0]    wa,
  input  logic [WIDTH-1:0] wd,
  output logic [WIDTH-1:0] rd1,
  output logic [WIDTH-1:0] rd2
);
  logic [WIDTH-1:0] regs [NREGS];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (we && we_ok && wa != '0) begin
      regs[wa] <= wd;
    end
  end

  assign rd1 = (ra1 == '0) ? '0 : regs[ra1];
  assign rd2 = (ra2 == '0) ? '0 : regs[ra2];
endmodule
