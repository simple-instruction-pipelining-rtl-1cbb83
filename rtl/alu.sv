// alu: 32-bit integer ALU of the DLX datapath.
//
// Purely combinational. y = a <op> b for the operation chosen by alu_op;
// shifts use b[4:0] as the shift amount; the set operations (SEQ ... SGE)
// compare as signed numbers and give 1 or 0. ALU_ZERO is the "0?" operation used
// by BEQZ: it passes a through, and z = 1 when the result is zero. z is the
// zero flag of every operation, but the control only looks at it for "0?".
// Overflow is not detected (the lecture's machines take no exceptions).
module alu
  import dlx_pkg::*;
(
  input  logic [XLEN-1:0] a,
  input  logic [XLEN-1:0] b,
  input  alu_op_e         alu_op,
  output logic [XLEN-1:0] y,
  output logic            z
);
  logic signed [XLEN-1:0] sa, sb;
  assign sa = a;
  assign sb = b;

  always_comb begin
    unique case (alu_op)
      ALU_ADD:   y = a + b;
      ALU_SUB:   y = a - b;
      ALU_AND:   y = a & b;
      ALU_OR:    y = a | b;
      ALU_XOR:   y = a ^ b;
      ALU_SLL:   y = a << b[4:0];
      ALU_SRL:   y = a >> b[4:0];
      ALU_SRA:   y = XLEN'(sa >>> b[4:0]);
      ALU_SEQ:   y = XLEN'(a == b);
      ALU_SNE:   y = XLEN'(a != b);
      ALU_SLT:   y = XLEN'(sa < sb);
      ALU_SGT:   y = XLEN'(sa > sb);
      ALU_SLE:   y = XLEN'(sa <= sb);
      ALU_SGE:   y = XLEN'(sa >= sb);
      ALU_PASSB: y = b;
      ALU_ZERO:  y = a;
      default:   y = '0;
    endcase
  end

  assign z = (y == '0);
endmodule
