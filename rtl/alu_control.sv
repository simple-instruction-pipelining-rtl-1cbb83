// alu_control: the "ALU Control" box of the DLX datapath.
//
// A four-way choice, steered by OpSel, of where the ALU operation comes from:
//   Func - decoded from the func field inst[5:0] (R-type ALU instructions)
//   Op   - decoded from the opcode inst[31:26] (ALU-immediate instructions)
//   +    - a fixed add (load/store effective address)
//   0?   - the zero test used by BEQZ
// Purely combinational. The structure (two decoders feeding a mux) follows the
// lecture's drawing; the func/opcode values are the standard DLX ones. An
// unknown func or opcode selects ADD.
module alu_control
  import dlx_pkg::*;
(
  input  opsel_e     opsel,
  input  logic [5:0] opcode,
  input  logic [5:0] func,
  output alu_op_e    alu_op
);
  alu_op_e func_op, opc_op;

  always_comb begin
    unique case (func)
      FN_SLL:          func_op = ALU_SLL;
      FN_SRL:          func_op = ALU_SRL;
      FN_SRA:          func_op = ALU_SRA;
      FN_ADD, FN_ADDU: func_op = ALU_ADD;
      FN_SUB, FN_SUBU: func_op = ALU_SUB;
      FN_AND:          func_op = ALU_AND;
      FN_OR:           func_op = ALU_OR;
      FN_XOR:          func_op = ALU_XOR;
      FN_SEQ:          func_op = ALU_SEQ;
      FN_SNE:          func_op = ALU_SNE;
      FN_SLT:          func_op = ALU_SLT;
      FN_SGT:          func_op = ALU_SGT;
      FN_SLE:          func_op = ALU_SLE;
      FN_SGE:          func_op = ALU_SGE;
      default:         func_op = ALU_ADD;
    endcase
  end

  always_comb begin
    unique case (opcode)
      OP_ADDI, OP_ADDUI: opc_op = ALU_ADD;
      OP_SUBI, OP_SUBUI: opc_op = ALU_SUB;
      OP_ANDI:           opc_op = ALU_AND;
      OP_ORI:            opc_op = ALU_OR;
      OP_XORI:           opc_op = ALU_XOR;
      OP_LHI:            opc_op = ALU_PASSB;
      OP_SLLI:           opc_op = ALU_SLL;
      OP_SRLI:           opc_op = ALU_SRL;
      OP_SRAI:           opc_op = ALU_SRA;
      OP_SEQI:           opc_op = ALU_SEQ;
      OP_SNEI:           opc_op = ALU_SNE;
      OP_SLTI:           opc_op = ALU_SLT;
      OP_SGTI:           opc_op = ALU_SGT;
      OP_SLEI:           opc_op = ALU_SLE;
      OP_SGEI:           opc_op = ALU_SGE;
      default:           opc_op = ALU_ADD;
    endcase
  end

  always_comb begin
    unique case (opsel)
      OPSEL_FUNC: alu_op = func_op;
      OPSEL_OP:   alu_op = opc_op;
      OPSEL_ADD:  alu_op = ALU_ADD;
      OPSEL_ZERO: alu_op = ALU_ZERO;
      default:    alu_op = ALU_ADD;
    endcase
  end
endmodule
