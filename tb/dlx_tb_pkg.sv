// dlx_tb_pkg: testbench support for the DLX machines.
//
// - Instruction encoders (R-, I- and J-type) so tests can write programs.
// - dlx_iss: an instruction-level reference model. It executes one instruction
//   at a time straight from the architectural definition (no notion of
//   control signals or pipeline stages) and reports the register and memory
//   write each instruction makes, which the testbenches compare with the RTL.
package dlx_tb_pkg;
  import dlx_pkg::*;

  function automatic logic [31:0] enc_r(logic [5:0] fn, logic [4:0] rd,
                                        logic [4:0] rs1, logic [4:0] rs2);
    return {OP_SPECIAL, rs1, rs2, rd, 5'd0, fn};
  endfunction

  function automatic logic [31:0] enc_i(logic [5:0] op, logic [4:0] rd,
                                        logic [4:0] rs1, logic [15:0] imm);
    return {op, rs1, rd, imm};
  endfunction

  function automatic logic [31:0] enc_j(logic [5:0] op, logic [25:0] off);
    return {op, off};
  endfunction

  typedef struct {
    bit          rf_we;
    logic [4:0]  rf_ws;
    logic [31:0] rf_wd;
    bit          dm_we;
    logic [31:0] dm_addr;
    logic [31:0] dm_wdata;
  } effect_t;

  // A random ALU, ALU-immediate or LHI instruction using registers 1..nregs.
  function automatic logic [31:0] rand_alu(int nregs);
    logic [5:0] fns [16] = '{FN_SLL, FN_SRL, FN_SRA, FN_ADD, FN_ADDU, FN_SUB, FN_SUBU, FN_AND,
                             FN_OR, FN_XOR, FN_SEQ, FN_SNE, FN_SLT, FN_SGT, FN_SLE, FN_SGE};
    logic [5:0] ops [16] = '{OP_ADDI, OP_ADDUI, OP_SUBI, OP_SUBUI, OP_ANDI, OP_ORI, OP_XORI, OP_LHI,
                             OP_SLLI, OP_SRLI, OP_SRAI, OP_SEQI, OP_SNEI, OP_SLTI, OP_SGTI, OP_SGEI};
    logic [4:0] d  = 5'($urandom_range(nregs, 1));
    logic [4:0] s1 = 5'($urandom_range(nregs, 0));
    logic [4:0] s2 = 5'($urandom_range(nregs, 0));
    if ($urandom_range(1)) return enc_r(fns[$urandom_range(15)], d, s1, s2);
    return enc_i(ops[$urandom_range(15)], d, s1, 16'($urandom));
  endfunction

  // A random LW or SW, base R0, word address below 4*words.
  function automatic logic [31:0] rand_mem(int nregs, int words);
    logic [4:0]  r    = 5'($urandom_range(nregs, 1));
    logic [15:0] disp = 16'($urandom_range(words - 1) * 4);
    return enc_i($urandom_range(1) ? OP_LW : OP_SW, r, 5'd0, disp);
  endfunction

  class dlx_iss;
    logic [31:0] regs [32];
    logic [31:0] dmem [];
    logic [31:0] pc;
    int unsigned dwords;

    function new(int unsigned dmem_words);
      dwords = dmem_words;
      dmem = new[dmem_words];
      foreach (regs[i]) regs[i] = '0;
      foreach (dmem[i]) dmem[i] = '0;
      pc = '0;
    endfunction

    function automatic int unsigned widx(logic [31:0] addr);
      return (addr >> 2) % dwords;
    endfunction

    // Executes inst at the current pc; with_jumps = 0 models the pipelined
    // machine, where control-transfer instructions do nothing.
    function automatic effect_t step(logic [31:0] inst, bit with_jumps);
      effect_t e;
      logic [5:0]  op;
      logic [4:0]  r1, r2, r3, dst;
      logic [31:0] a, b, si, ui, s26, npc, res;
      logic signed [31:0] sa, sb, ssi;
      bit wr;
      op  = inst[31:26];
      r1  = inst[25:21];
      r2  = inst[20:16];
      r3  = inst[15:11];
      a   = regs[r1];
      b   = regs[r2];
      sa  = a;
      sb  = b;
      si  = {{16{inst[15]}}, inst[15:0]};
      ui  = {16'd0, inst[15:0]};
      ssi = si;
      s26 = {{6{inst[25]}}, inst[25:0]};
      npc = pc + 4;
      res = '0;
      wr  = 0;
      dst = r2;
      e = '{default: '0};
      case (op)
        OP_SPECIAL: begin
          wr = 1; dst = r3;
          case (inst[5:0])
            FN_SLL: res = a << b[4:0];
            FN_SRL: res = a >> b[4:0];
            FN_SRA: res = sa >>> b[4:0];
            FN_ADD, FN_ADDU: res = a + b;
            FN_SUB, FN_SUBU: res = a - b;
            FN_AND: res = a & b;
            FN_OR:  res = a | b;
            FN_XOR: res = a ^ b;
            FN_SEQ: res = {31'd0, a == b};
            FN_SNE: res = {31'd0, a != b};
            FN_SLT: res = {31'd0, sa < sb};
            FN_SGT: res = {31'd0, sa > sb};
            FN_SLE: res = {31'd0, sa <= sb};
            FN_SGE: res = {31'd0, sa >= sb};
            default: res = a + b;
          endcase
        end
        OP_ADDI:  begin wr = 1; res = a + si; end
        OP_SUBI:  begin wr = 1; res = a - si; end
        OP_ADDUI: begin wr = 1; res = a + ui; end
        OP_SUBUI: begin wr = 1; res = a - ui; end
        OP_ANDI:  begin wr = 1; res = a & ui; end
        OP_ORI:   begin wr = 1; res = a | ui; end
        OP_XORI:  begin wr = 1; res = a ^ ui; end
        OP_LHI:   begin wr = 1; res = {inst[15:0], 16'd0}; end
        OP_SLLI:  begin wr = 1; res = a << si[4:0]; end
        OP_SRLI:  begin wr = 1; res = a >> si[4:0]; end
        OP_SRAI:  begin wr = 1; res = sa >>> si[4:0]; end
        OP_SEQI:  begin wr = 1; res = {31'd0, sa == ssi}; end
        OP_SNEI:  begin wr = 1; res = {31'd0, sa != ssi}; end
        OP_SLTI:  begin wr = 1; res = {31'd0, sa <  ssi}; end
        OP_SGTI:  begin wr = 1; res = {31'd0, sa >  ssi}; end
        OP_SLEI:  begin wr = 1; res = {31'd0, sa <= ssi}; end
        OP_SGEI:  begin wr = 1; res = {31'd0, sa >= ssi}; end
        OP_LW:    begin wr = 1; res = dmem[widx(a + si)]; end
        OP_SW: begin
          e.dm_we = 1; e.dm_addr = a + si; e.dm_wdata = b;
          dmem[widx(a + si)] = b;
        end
        OP_BEQZ: if (with_jumps && a == 0) npc = pc + 4 + si;
        OP_J:    if (with_jumps) npc = pc + 4 + s26;
        OP_JAL:  if (with_jumps) begin npc = pc + 4 + s26; wr = 1; dst = 5'd31; res = pc + 4; end
        OP_JR:   if (with_jumps) npc = a;
        OP_JALR: if (with_jumps) begin npc = a; wr = 1; dst = 5'd31; res = pc + 4; end
        default: ;
      endcase
      if (wr) begin
        e.rf_we = 1; e.rf_ws = dst; e.rf_wd = res;
        if (dst != 0) regs[dst] = res;
      end
      pc = npc;
      return e;
    endfunction
  endclass
endpackage
