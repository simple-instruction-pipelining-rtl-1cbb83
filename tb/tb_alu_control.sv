// tb_alu_control: for each OpSel choice, runs every func (Func) or opcode (Op)
// value through the ALU control and compares the operation with a table kept
// in the testbench; "+" and "0?" must give ADD and the zero test whatever the
// instruction fields hold.
module tb_alu_control;
  import dlx_pkg::*;
  opsel_e opsel;
  logic [5:0] opcode, func;
  alu_op_e alu_op, exp;
  int checks = 0, failures = 0;

  alu_control dut (.opsel(opsel), .opcode(opcode), .func(func), .alu_op(alu_op));

  function automatic alu_op_e func_tab(logic [5:0] f);
    case (f)
      6'h04: return ALU_SLL;  6'h06: return ALU_SRL;  6'h07: return ALU_SRA;
      6'h20: return ALU_ADD;  6'h21: return ALU_ADD;  6'h22: return ALU_SUB;
      6'h23: return ALU_SUB;  6'h24: return ALU_AND;  6'h25: return ALU_OR;
      6'h26: return ALU_XOR;  6'h28: return ALU_SEQ;  6'h29: return ALU_SNE;
      6'h2A: return ALU_SLT;  6'h2B: return ALU_SGT;  6'h2C: return ALU_SLE;
      6'h2D: return ALU_SGE;
      default: return ALU_ADD;
    endcase
  endfunction

  function automatic alu_op_e op_tab(logic [5:0] o);
    case (o)
      6'h08, 6'h09: return ALU_ADD;   6'h0A, 6'h0B: return ALU_SUB;
      6'h0C: return ALU_AND;  6'h0D: return ALU_OR;   6'h0E: return ALU_XOR;
      6'h0F: return ALU_PASSB;
      6'h14: return ALU_SLL;  6'h16: return ALU_SRL;  6'h17: return ALU_SRA;
      6'h18: return ALU_SEQ;  6'h19: return ALU_SNE;  6'h1A: return ALU_SLT;
      6'h1B: return ALU_SGT;  6'h1C: return ALU_SLE;  6'h1D: return ALU_SGE;
      default: return ALU_ADD;
    endcase
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 4; s++) begin
      for (int v = 0; v < 64; v++) begin
        opsel = opsel_e'(s);
        opcode = (s == 1) ? 6'(v) : 6'($urandom);
        func   = (s == 0) ? 6'(v) : 6'($urandom);
        #1;
        case (opsel)
          OPSEL_FUNC: exp = func_tab(func);
          OPSEL_OP:   exp = op_tab(opcode);
          OPSEL_ADD:  exp = ALU_ADD;
          default:    exp = ALU_ZERO;
        endcase
        checks++;
        if (alu_op !== exp) begin
          failures++;
          $display("FAIL opsel=%0d opcode=%h func=%h got %s exp %s",
                   s, opcode, func, alu_op.name(), exp.name());
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
