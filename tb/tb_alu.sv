// tb_alu: every ALU operation on random and corner operands, compared with a
// reference computed on integers in the testbench; also the zero flag.
module tb_alu;
  import dlx_pkg::*;
  logic [31:0] a, b, y, exp;
  alu_op_e op;
  logic z;
  int checks = 0, failures = 0;

  alu dut (.a(a), .b(b), .alu_op(op), .y(y), .z(z));

  function automatic logic [31:0] model(alu_op_e o, logic [31:0] x, logic [31:0] w);
    longint sx = longint'(int'(x));
    longint sw = longint'(int'(w));
    int sh = int'(w & 32'h1f);
    case (o)
      ALU_ADD:   return 32'(longint'(x) + longint'(w));
      ALU_SUB:   return 32'(longint'(x) - longint'(w));
      ALU_AND:   return x & w;
      ALU_OR:    return x | w;
      ALU_XOR:   return x ^ w;
      ALU_SLL:   return 32'(longint'(x) * (longint'(1) << sh));
      ALU_SRL:   return 32'(longint'(x) / (longint'(1) << sh));
      ALU_SRA:   return 32'(sx >>> sh);
      ALU_SEQ:   return (x == w) ? 1 : 0;
      ALU_SNE:   return (x != w) ? 1 : 0;
      ALU_SLT:   return (sx <  sw) ? 1 : 0;
      ALU_SGT:   return (sx >  sw) ? 1 : 0;
      ALU_SLE:   return (sx <= sw) ? 1 : 0;
      ALU_SGE:   return (sx >= sw) ? 1 : 0;
      ALU_PASSB: return w;
      default:   return x;
    endcase
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] corner [6] = '{32'h0, 32'h1, 32'hFFFF_FFFF, 32'h8000_0000, 32'h7FFF_FFFF, 32'h1F};
    for (int i = 0; i < 16 * 600; i++) begin
      op = alu_op_e'(i % 16);
      a = (i % 5 == 0) ? corner[$urandom_range(5)] : $urandom;
      b = (i % 3 == 0) ? corner[$urandom_range(5)] : $urandom;
      if (i % 11 == 0) b = a;
      #1;
      exp = model(op, a, b);
      checks++;
      if (y !== exp || z !== (exp == 0)) begin
        failures++;
        $display("FAIL op=%s a=%h b=%h got %h/%b exp %h", op.name(), a, b, y, z, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
