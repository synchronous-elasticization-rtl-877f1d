// tb_memory: fills the 256-byte memory through the load port with a pattern,
// then does random reads and strobed writes, checking every read against a
// byte-array model; a write without the access strobe must not change memory.
module tb_memory;
  logic       clk = 1'b0;
  logic       en, we, ld_en;
  logic [7:0] adr, wd, rd, ld_adr, ld_data;
  logic [7:0] model [256];
  int checks = 0, failures = 0;

  memory #(.AW(8)) dut (.clk, .en, .we, .adr, .wd, .rd, .ld_en, .ld_adr, .ld_data);

  always #5 clk = ~clk;

  initial begin
    en = 0; we = 0; adr = 0; wd = 0; ld_en = 0; ld_adr = 0; ld_data = 0;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      ld_en = 1'b1; ld_adr = 8'(i); ld_data = 8'((i * 37 + 11) % 256);
      model[i] = ld_data;
    end
    @(negedge clk);
    ld_en = 1'b0;
    repeat (3000) begin
      @(negedge clk);
      en = 1'($urandom); we = 1'($urandom);
      adr = 8'($urandom); wd = 8'($urandom);
      #1;
      checks++;
      if (rd != model[adr]) begin failures++; $display("rd[%h]=%h exp %h", adr, rd, model[adr]); end
      @(posedge clk);
      if (en && we) model[adr] = wd;
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
