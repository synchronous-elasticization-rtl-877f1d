// tb_regfile: random writes and reads of the 8 x 8 register file against an
// array model. A write needs both RegWrite and the channel transfer (we_ok);
// register 0 reads zero; a read in the cycle of a write returns the old value.
module tb_regfile;
  logic       clk = 1'b0, rst_n = 1'b0;
  logic       we, we_ok;
  logic [2:0] ra1, ra2, wa;
  logic [7:0] wd, rd1, rd2;
  logic [7:0] model [8];
  int checks = 0, failures = 0;

  regfile #(.WIDTH(8), .NREGS(8)) dut (.clk, .rst_n, .we, .we_ok, .ra1, .ra2, .wa, .wd, .rd1, .rd2);

  always #5 clk = ~clk;

  initial begin
    for (int i = 0; i < 8; i++) model[i] = 8'h00;
    we = 0; we_ok = 0; ra1 = 0; ra2 = 0; wa = 0; wd = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    repeat (3000) begin
      @(negedge clk);
      we = 1'($urandom); we_ok = 1'($urandom);
      wa = 3'($urandom); wd = 8'($urandom);
      ra1 = 3'($urandom); ra2 = (($urandom % 4) == 0) ? wa : 3'($urandom);
      #1;
      checks += 2;
      if (rd1 != ((ra1 == 0) ? 8'h00 : model[ra1])) begin failures++; $display("rd1 r%0d=%h exp %h", ra1, rd1, model[ra1]); end
      if (rd2 != ((ra2 == 0) ? 8'h00 : model[ra2])) begin failures++; $display("rd2 r%0d=%h exp %h", ra2, rd2, model[ra2]); end
      @(posedge clk);
      if (we && we_ok && wa != 0) model[wa] = wd;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
