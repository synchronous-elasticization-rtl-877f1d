// tb_alu: random test of the 8-bit ALU for every operation, with the expected
// result computed here from integer arithmetic, plus the zero flag.
module tb_alu;
  import minimips_pkg::*;
  logic [7:0] a, b, y;
  alu_op_e    op;
  logic       zero;
  int checks = 0, failures = 0;

  alu #(.WIDTH(8)) dut (.a, .b, .alucont(op), .y, .zero);

  function automatic logic [7:0] model(alu_op_e o, int unsigned x, int unsigned z);
    int sx, sz;
    sx = (x >= 128) ? int'(x) - 256 : int'(x);
    sz = (z >= 128) ? int'(z) - 256 : int'(z);
    case (o)
      ALU_AND: return 8'(x & z);
      ALU_OR:  return 8'(x | z);
      ALU_ADD: return 8'((x + z) % 256);
      ALU_SUB: return 8'((x + 256 - z) % 256);
      ALU_SLT: return (sx < sz) ? 8'd1 : 8'd0;
      default: return 8'd0;
    endcase
  endfunction

  localparam alu_op_e OPS [5] = '{ALU_AND, ALU_OR, ALU_ADD, ALU_SUB, ALU_SLT};

  initial begin
    for (int n = 0; n < 2000; n++) begin
      logic [7:0] e;
      a  = (n % 7 == 0) ? 8'h80 : 8'($urandom);
      b  = (n % 11 == 0) ? a : 8'($urandom);
      op = OPS[n % 5];
      #1;
      e = model(op, a, b);
      checks += 2;
      if (y != e) begin failures++; $display("op=%s a=%h b=%h y=%h exp=%h", op.name(), a, b, y, e); end
      if (zero != (e == 0)) begin failures++; $display("zero flag wrong"); end
    end
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
