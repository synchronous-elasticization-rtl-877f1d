// memory: the MiniMIPS memory Mem, 2**AW bytes. Combinational read of the byte
// at adr on rd, write of wd at adr on the clock edge when en & we. In the
// elastic machine the read byte is captured by Mem's elastic buffer on the same
// edge (en = transfer into that buffer), so Mem behaves as one register of the
// machine: its output token is the byte read at the address of its input
// token, and a store takes effect with that token. A separate load port
// (ld_en, ld_adr, ld_data) fills the memory with a program while the machine is
// held in reset; it has priority over a store. Contents are not reset.
module memory #(
  parameter int unsigned AW = 8
) (
  input  logic          clk,
  input  logic          en,
  input  logic          we,
  input  logic [AW-1:0] adr,
  input  logic [7:0]    wd,
  output logic [7:0]    rd,
  input  logic          ld_en,
  input  logic [AW-1:0] ld_adr,
  input  logic [7:0]    ld_data
);
  logic [7:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (ld_en)          mem[ld_adr] <= ld_data;
    else if (en && we)  mem[adr]    <= wd;
  end

  assign rd = mem[adr];
endmodule
