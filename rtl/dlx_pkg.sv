// dlx_pkg: types and constants shared by the DLX machines.
//
// Instruction formats (32 bits):
//   R-type : opcode[31:26]=0 | rf1[25:21] | rf2[20:16] | rf3[15:11] | 0[10:6] | func[5:0]
//            rf3 <- (rf1) func (rf2)
//   I-type : opcode[31:26]   | rf1[25:21] | rf2[20:16] | immediate[15:0]
//            rf2 <- (rf1) op immediate; loads/stores address (rf1) + displacement
//   J-type : opcode[31:26]   | offset[25:0]
// The field layout is the one the lecture material draws. The numeric opcode and
// func values are not given there; the standard DLX encodings are used.
// The control-signal enums name exactly the choices the hardwired control table
// lists for each control point (ExtSel, BSrc, OpSel, WBSrc, RegDst, PCSrc).
package dlx_pkg;

  localparam int unsigned XLEN = 32;
  localparam int unsigned NREGS = 32;
  localparam logic [4:0] LINK_REG = 5'd31;   // R31, written by JAL and JALR

  // ---- opcodes (standard DLX numbering) ----
  localparam logic [5:0] OP_SPECIAL = 6'h00;  // R-type ALU, func field selects operation
  localparam logic [5:0] OP_J       = 6'h02;
  localparam logic [5:0] OP_JAL     = 6'h03;
  localparam logic [5:0] OP_BEQZ    = 6'h04;
  localparam logic [5:0] OP_ADDI    = 6'h08;
  localparam logic [5:0] OP_ADDUI   = 6'h09;
  localparam logic [5:0] OP_SUBI    = 6'h0A;
  localparam logic [5:0] OP_SUBUI   = 6'h0B;
  localparam logic [5:0] OP_ANDI    = 6'h0C;
  localparam logic [5:0] OP_ORI     = 6'h0D;
  localparam logic [5:0] OP_XORI    = 6'h0E;
  localparam logic [5:0] OP_LHI     = 6'h0F;
  localparam logic [5:0] OP_JR      = 6'h12;
  localparam logic [5:0] OP_JALR    = 6'h13;
  localparam logic [5:0] OP_SLLI    = 6'h14;
  localparam logic [5:0] OP_SRLI    = 6'h16;
  localparam logic [5:0] OP_SRAI    = 6'h17;
  localparam logic [5:0] OP_SEQI    = 6'h18;
  localparam logic [5:0] OP_SNEI    = 6'h19;
  localparam logic [5:0] OP_SLTI    = 6'h1A;
  localparam logic [5:0] OP_SGTI    = 6'h1B;
  localparam logic [5:0] OP_SLEI    = 6'h1C;
  localparam logic [5:0] OP_SGEI    = 6'h1D;
  localparam logic [5:0] OP_LW      = 6'h23;
  localparam logic [5:0] OP_SW      = 6'h2B;

  // ---- func field of R-type instructions ----
  localparam logic [5:0] FN_SLL  = 6'h04;
  localparam logic [5:0] FN_SRL  = 6'h06;
  localparam logic [5:0] FN_SRA  = 6'h07;
  localparam logic [5:0] FN_ADD  = 6'h20;
  localparam logic [5:0] FN_ADDU = 6'h21;
  localparam logic [5:0] FN_SUB  = 6'h22;
  localparam logic [5:0] FN_SUBU = 6'h23;
  localparam logic [5:0] FN_AND  = 6'h24;
  localparam logic [5:0] FN_OR   = 6'h25;
  localparam logic [5:0] FN_XOR  = 6'h26;
  localparam logic [5:0] FN_SEQ  = 6'h28;
  localparam logic [5:0] FN_SNE  = 6'h29;
  localparam logic [5:0] FN_SLT  = 6'h2A;
  localparam logic [5:0] FN_SGT  = 6'h2B;
  localparam logic [5:0] FN_SLE  = 6'h2C;
  localparam logic [5:0] FN_SGE  = 6'h2D;

  // All-zero word: SLL R0,R0,R0. Writes only R0, which stays zero, so it is
  // used as the pipeline bubble.
  localparam logic [31:0] NOP = 32'h0000_0000;

  // ---- ALU operations ----
  typedef enum logic [3:0] {
    ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_XOR,
    ALU_SLL, ALU_SRL, ALU_SRA,
    ALU_SEQ, ALU_SNE, ALU_SLT, ALU_SGT, ALU_SLE, ALU_SGE,
    ALU_PASSB,   // result = B (LHI: the extended immediate already sits in the high half)
    ALU_ZERO     // "0?": result = A, z tells whether A is zero
  } alu_op_e;

  // ---- control points ----
  typedef enum logic [1:0] {EXT_S16, EXT_U16, EXT_S26, EXT_HIGH16} ext_sel_e;
  typedef enum logic       {BSRC_REG, BSRC_IMM} bsrc_e;
  typedef enum logic [1:0] {OPSEL_FUNC, OPSEL_OP, OPSEL_ADD, OPSEL_ZERO} opsel_e;
  typedef enum logic [1:0] {WB_ALU, WB_MEM, WB_PC} wbsrc_e;
  typedef enum logic [1:0] {DST_RF2, DST_RF3, DST_R31} regdst_e;
  typedef enum logic [1:0] {PC_NEXT, PC_PCR, PC_RIND} pcsrc_e;   // ~j / PCR / RInd

  typedef struct packed {
    ext_sel_e ext_sel;
    bsrc_e    bsrc;
    opsel_e   opsel;
    logic     mem_write;
    logic     reg_write;
    wbsrc_e   wbsrc;
    regdst_e  regdst;
    pcsrc_e   pcsrc;
    logic     reads_rf1;   // instruction uses GPR[rf1] (for the pipeline interlock)
    logic     reads_rf2;   // instruction uses GPR[rf2] as a source
  } ctrl_t;

  // Destination register of an instruction, given its RegDst choice.
  function automatic logic [4:0] dest_reg(input logic [31:0] inst, input regdst_e rd);
    case (rd)
      DST_RF3: return inst[15:11];
      DST_R31: return LINK_REG;
      default: return inst[20:16];
    endcase
  endfunction

endpackage
