// hardwired_ctrl: the hardwired control of the DLX, pure combinational logic.
//
// Maps the opcode (and, for BEQZ, the ALU's zero? flag) to every control point
// of the datapath, row by row as in the hardwired control table:
//
//   class  ExtSel  BSrc OpSel MemWr RegWr WBSrc RegDst PCSrc
//   ALU    -       Reg  Func  no    yes   ALU   rf3    ~j
//   ALUi   sExt16  Imm  Op    no    yes   ALU   rf2    ~j
//   ALUiu  uExt16  Imm  Op    no    yes   ALU   rf2    ~j
//   LW     sExt16  Imm  +     no    yes   Mem   rf2    ~j
//   SW     sExt16  Imm  +     yes   no    -     -      ~j
//   BEQZ   sExt16  -    0?    no    no    -     -      PCR if zero, else ~j
//   J      sExt26  -    -     no    no    -     -      PCR
//   JAL    sExt26  -    -     no    yes   PC    R31    PCR
//   JR     -       -    -     no    no    -     -      RInd
//   JALR   -       -    -     no    yes   PC    R31    RInd
//
// ALUu (ADDU, SUBU) shares opcode 0 with ALU and has the same row. ALUi covers
// the sign-extended immediates (ADDI, SUBI, shifts, set-compares); ALUiu the
// zero-extended ones (ADDUI, SUBUI, ANDI, ORI, XORI). LHI is an ALU-immediate
// instruction using the High16 extension. Don't-care entries are driven with
// fixed values. Any other opcode does nothing: no register or memory write and
// PC+4 next. reads_rf1/reads_rf2 tell the pipeline interlock which registers
// the instruction reads; they are not part of the table.
module hardwired_ctrl
  import dlx_pkg::*;
(
  input  logic [5:0] opcode,
  input  logic       zero,
  output ctrl_t      ctrl
);
  always_comb begin
    ctrl = '{ext_sel: EXT_S16, bsrc: BSRC_REG, opsel: OPSEL_ADD, mem_write: 1'b0,
             reg_write: 1'b0, wbsrc: WB_ALU, regdst: DST_RF2, pcsrc: PC_NEXT,
             reads_rf1: 1'b0, reads_rf2: 1'b0};
    unique case (opcode)
      OP_SPECIAL: begin
        ctrl.opsel = OPSEL_FUNC;  ctrl.reg_write = 1'b1;  ctrl.regdst = DST_RF3;
        ctrl.reads_rf1 = 1'b1;    ctrl.reads_rf2 = 1'b1;
      end
      OP_ADDI, OP_SUBI, OP_SLLI, OP_SRLI, OP_SRAI,
      OP_SEQI, OP_SNEI, OP_SLTI, OP_SGTI, OP_SLEI, OP_SGEI: begin
        ctrl.ext_sel = EXT_S16;   ctrl.bsrc = BSRC_IMM;  ctrl.opsel = OPSEL_OP;
        ctrl.reg_write = 1'b1;    ctrl.reads_rf1 = 1'b1;
      end
      OP_ADDUI, OP_SUBUI, OP_ANDI, OP_ORI, OP_XORI: begin
        ctrl.ext_sel = EXT_U16;   ctrl.bsrc = BSRC_IMM;  ctrl.opsel = OPSEL_OP;
        ctrl.reg_write = 1'b1;    ctrl.reads_rf1 = 1'b1;
      end
      OP_LHI: begin
        ctrl.ext_sel = EXT_HIGH16; ctrl.bsrc = BSRC_IMM; ctrl.opsel = OPSEL_OP;
        ctrl.reg_write = 1'b1;
      end
      OP_LW: begin
        ctrl.bsrc = BSRC_IMM;     ctrl.reg_write = 1'b1;  ctrl.wbsrc = WB_MEM;
        ctrl.reads_rf1 = 1'b1;
      end
      OP_SW: begin
        ctrl.bsrc = BSRC_IMM;     ctrl.mem_write = 1'b1;
        ctrl.reads_rf1 = 1'b1;    ctrl.reads_rf2 = 1'b1;
      end
      OP_BEQZ: begin
        ctrl.opsel = OPSEL_ZERO;  ctrl.reads_rf1 = 1'b1;
        ctrl.pcsrc = zero ? PC_PCR : PC_NEXT;
      end
      OP_J: begin
        ctrl.ext_sel = EXT_S26;   ctrl.pcsrc = PC_PCR;
      end
      OP_JAL: begin
        ctrl.ext_sel = EXT_S26;   ctrl.pcsrc = PC_PCR;
        ctrl.reg_write = 1'b1;    ctrl.wbsrc = WB_PC;   ctrl.regdst = DST_R31;
      end
      OP_JR: begin
        ctrl.pcsrc = PC_RIND;     ctrl.reads_rf1 = 1'b1;
      end
      OP_JALR: begin
        ctrl.pcsrc = PC_RIND;     ctrl.reads_rf1 = 1'b1;
        ctrl.reg_write = 1'b1;    ctrl.wbsrc = WB_PC;   ctrl.regdst = DST_R31;
      end
      default: ;
    endcase
  end
endmodule
