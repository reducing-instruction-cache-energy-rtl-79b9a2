// gw_compressor: the compression block that sits between main memory and the
// instruction cache on the refill path.
//
// It looks at the opcode (and function field) of an incoming 32-bit MIPS-II
// instruction, decides whether it can be stored short (17 bits), medium
// (23 bits) or must stay long (34 bits), and produces the stored word with
// its S/M and M/L bits.  Purely combinational: the result is ready in the
// same cycle as the refill word, before the wordline is driven.
//
// Rules that follow the 3-size scheme:
//  * R-type ADD..SLTU, SLLV/SRLV/SRAV lose funct and sa (re-encoded opcode);
//    they are short when rd equals rs (for the commutative ADD, ADDU, AND,
//    OR, XOR, NOR also when rd equals rt), otherwise medium.
//  * SLL/SRL/SRA lose funct and rs; short when rt equals rd, else medium.
//  * JR and JALR are always short.
//  * ADDI..XORI: with rs = rt the re-encoded form keeps one register and is
//    short for a 5-bit immediate, medium for up to 10 bits; with rs != rt the
//    original opcode is medium for a 5-bit immediate.  BEQ/BNE/BEQL/BNEL do
//    the same with rt = 0 instead of rs = rt.
//  * Loads and stores are medium when the immediate fits 5 bits after
//    dropping the halfword or word alignment zeros.
//  * LUI, BLEZ, BGTZ, BLEZL, BGTZL and REGIMM branches are medium for a
//    5-bit immediate.
//  * Opcodes that are illegal in MIPS-II become BREAK, since their code
//    points are taken by the re-encoding.
// This design's own choices: where fields sit inside the segments (see
// gw_pkg), that J/JAL are medium when the target fits the 15 bits a medium
// word has room for, that commutative instructions with rd = rt are stored
// with rs and rt swapped, and that unused fields are dropped even when they
// are not zero.
module gw_compressor
  import gw_pkg::*;
(
  input  logic [31:0] instr,   // uncompressed instruction from memory
  output stored_t     st,      // stored form, segments and size bits
  output size_e       size     // size class (same information as sm/ml)
);

  logic [5:0]  op, fn;
  logic [4:0]  rs, rt, rd, sa;
  logic [15:0] imm;
  logic [25:0] tgt;

  assign op  = instr[31:26];
  assign rs  = instr[25:21];
  assign rt  = instr[20:16];
  assign rd  = instr[15:11];
  assign sa  = instr[10:6];
  assign fn  = instr[5:0];
  assign imm = instr[15:0];
  assign tgt = instr[25:0];

  function automatic stored_t mk_long(input logic [31:0] x);
    stored_t r;
    r.s  = x[31:16];
    r.sm = 1'b1;
    r.m  = x[15:11];
    r.ml = 1'b1;
    r.l  = x[10:0];
    return r;
  endfunction

  function automatic stored_t mk_short(input logic [5:0] o, input logic [4:0] a,
                                       input logic [4:0] b);
    stored_t r;
    r    = '0;
    r.s  = {o, a, b};
    return r;
  endfunction

  function automatic stored_t mk_med(input logic [5:0] o, input logic [4:0] a,
                                     input logic [4:0] b, input logic [4:0] c);
    stored_t r;
    r    = '0;
    r.s  = {o, a, b};
    r.sm = 1'b1;
    r.m  = c;
    return r;
  endfunction

  // Re-encoded opcode of a three-register or shift R-type function.
  function automatic logic [5:0] rop_of_fn(input logic [5:0] f);
    unique case (f)
      FN_SLL:  return ROP_SLL;   FN_SRL:  return ROP_SRL;
      FN_SRA:  return ROP_SRA;   FN_SLLV: return ROP_SLLV;
      FN_SRLV: return ROP_SRLV;  FN_SRAV: return ROP_SRAV;
      FN_ADD:  return ROP_ADD;   FN_ADDU: return ROP_ADDU;
      FN_SUB:  return ROP_SUB;   FN_SUBU: return ROP_SUBU;
      FN_AND:  return ROP_AND;   FN_OR:   return ROP_OR;
      FN_XOR:  return ROP_XOR;   FN_NOR:  return ROP_NOR;
      FN_SLT:  return ROP_SLT;   FN_SLTU: return ROP_SLTU;
      default: return 6'd63;
    endcase
  endfunction

  logic [5:0]  ls_op;      // relocated load/store opcode
  logic [1:0]  ls_shift;   // alignment zeros dropped from the offset
  logic [15:0] ls_imm;     // offset with alignment zeros dropped (arithmetic)

  always_comb begin
    unique case (op)
      OP_LB:   begin ls_op = SOP_LB;  ls_shift = 2'd0; end
      OP_LBU:  begin ls_op = SOP_LBU; ls_shift = 2'd0; end
      OP_SB:   begin ls_op = SOP_SB;  ls_shift = 2'd0; end
      OP_LH:   begin ls_op = SOP_LH;  ls_shift = 2'd1; end
      OP_LHU:  begin ls_op = SOP_LHU; ls_shift = 2'd1; end
      OP_SH:   begin ls_op = SOP_SH;  ls_shift = 2'd1; end
      OP_LW:   begin ls_op = SOP_LW;  ls_shift = 2'd2; end
      OP_SW:   begin ls_op = SOP_SW;  ls_shift = 2'd2; end
      default: begin ls_op = op;      ls_shift = 2'd0; end
    endcase
    ls_imm = 16'($signed(imm) >>> ls_shift);
  end

  logic       sgn;   // ADDI..SLTIU sign-extend, ANDI/ORI/XORI zero-extend
  logic [5:0] rop;   // re-encoded opcode of an ALU-immediate or branch

  always_comb begin
    sgn = (op <= OP_SLTIU);
    unique case (op)
      OP_BEQ:  rop = ROP_BEQ;
      OP_BNE:  rop = ROP_BNE;
      OP_BEQL: rop = ROP_BEQL;
      OP_BNEL: rop = ROP_BNEL;
      default: rop = ROP_ADDI + (op - OP_ADDI);
    endcase
  end

  always_comb begin
    st = mk_long(instr);
    unique case (op)
      OP_SPECIAL: begin
        unique case (fn)
          FN_ADD, FN_ADDU, FN_AND, FN_OR, FN_XOR, FN_NOR: begin
            if (rd == rs)      st = mk_short(rop_of_fn(fn), rs, rt);
            else if (rd == rt) st = mk_short(rop_of_fn(fn), rt, rs);
            else               st = mk_med(rop_of_fn(fn), rs, rt, rd);
          end
          FN_SUB, FN_SUBU, FN_SLT, FN_SLTU, FN_SLLV, FN_SRLV, FN_SRAV: begin
            if (rd == rs)      st = mk_short(rop_of_fn(fn), rs, rt);
            else               st = mk_med(rop_of_fn(fn), rs, rt, rd);
          end
          FN_SLL, FN_SRL, FN_SRA: begin
            if (rd == rt)      st = mk_short(rop_of_fn(fn), sa, rt);
            else               st = mk_med(rop_of_fn(fn), sa, rt, rd);
          end
          FN_JR:               st = mk_short(ROP_JR, rs, rt);
          FN_JALR:             st = mk_short(ROP_JALR, rs, rd);
          default:             st = mk_long(instr);
        endcase
      end
      OP_ADDI, OP_ADDIU, OP_SLTI, OP_SLTIU, OP_ANDI, OP_ORI, OP_XORI: begin
        if (rs == rt) begin
          if (imm_fits(imm, 5, sgn))       st = mk_short(rop, rs, imm[4:0]);
          else if (imm_fits(imm, 10, sgn)) st = mk_med(rop, rs, imm[9:5], imm[4:0]);
        end else if (imm_fits(imm, 5, sgn)) st = mk_med(op, rs, rt, imm[4:0]);
      end
      OP_BEQ, OP_BNE, OP_BEQL, OP_BNEL: begin
        if (rt == 5'd0) begin
          if (imm_fits(imm, 5, 1'b1))       st = mk_short(rop, rs, imm[4:0]);
          else if (imm_fits(imm, 10, 1'b1)) st = mk_med(rop, rs, imm[9:5], imm[4:0]);
        end else if (imm_fits(imm, 5, 1'b1)) st = mk_med(op, rs, rt, imm[4:0]);
      end
      OP_LUI: begin
        if (imm_fits(imm, 5, 1'b0)) st = mk_med(op, rs, rt, imm[4:0]);
      end
      OP_REGIMM, OP_BLEZ, OP_BGTZ, OP_BLEZL, OP_BGTZL: begin
        if (imm_fits(imm, 5, 1'b1)) st = mk_med(op, rs, rt, imm[4:0]);
      end
      OP_LB, OP_LBU, OP_SB, OP_LH, OP_LHU, OP_SH, OP_LW, OP_SW: begin
        if (((imm & ~(16'hFFFF << ls_shift)) == 16'd0) && imm_fits(ls_imm, 5, 1'b1))
          st = mk_med(ls_op, rs, rt, ls_imm[4:0]);
        else
          st = mk_long({ls_op, instr[25:0]});
      end
      OP_J, OP_JAL: begin
        if (tgt[25:15] == 11'd0) st = mk_med(op, tgt[14:10], tgt[9:5], tgt[4:0]);
      end
      OP_COP0: st = mk_long(instr);
      default: st = mk_long(break_instr());   // illegal opcode
    endcase
  end

  always_comb begin
    if (!st.sm)      size = SZ_SHORT;
    else if (!st.ml) size = SZ_MEDIUM;
    else             size = SZ_LONG;
  end

endmodule
