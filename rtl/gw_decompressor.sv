// gw_decompressor: the decompression block between the cache output latches
// and the instruction decoder.
//
// It rebuilds the original 32-bit MIPS-II instruction from a stored word
// read out of the cache.  Segments that were not read (their local wordline
// stayed off) are ignored, so their contents do not matter.  The size bits
// pick the format, and the stored opcode says which fields the short or
// medium word holds:
//   * opcode bit 5 set: one of the 29 re-encoded instructions; the function
//     field, unused fields and the merged register are put back;
//   * otherwise a medium word carries a truncated immediate (or jump target)
//     that is sign- or zero-extended as the original opcode requires;
//   * a long word is the whole instruction; only the relocated load and
//     store opcodes are mapped back.
// Combinational.  The opcode, rs and rt slots are also what the decoder may
// take straight from the latch; this block supplies the non-critical fields
// (rd, sa, funct, immediate, target) and, for convenience, the whole word.
// The field layout is the one defined in gw_pkg (this design's choice); the
// extension rules follow the MIPS-II ISA.
module gw_decompressor
  import gw_pkg::*;
(
  input  stored_t     st,      // stored word as read (unread segments: don't care)
  output logic [31:0] instr    // reconstructed MIPS-II instruction
);

  logic [5:0] op;
  logic [4:0] a, b;
  logic       is_short;

  assign op       = st.s[15:10];
  assign a        = st.s[9:5];
  assign b        = st.s[4:0];
  assign is_short = !st.sm;

  // Original opcode of a stored (non re-encoded) opcode.
  function automatic logic [5:0] orig_op(input logic [5:0] o);
    unique case (o)
      SOP_SB:  return OP_SB;   SOP_SH:  return OP_SH;   SOP_SW:  return OP_SW;
      SOP_LBU: return OP_LBU;  SOP_LB:  return OP_LB;   SOP_LH:  return OP_LH;
      SOP_LW:  return OP_LW;   SOP_LHU: return OP_LHU;
      default: return o;
    endcase
  endfunction

  function automatic logic [15:0] ext5(input logic [4:0] v, input logic sgn);
    return sgn ? {{11{v[4]}}, v} : {11'd0, v};
  endfunction

  function automatic logic [15:0] ext10(input logic [9:0] v, input logic sgn);
    return sgn ? {{6{v[9]}}, v} : {6'd0, v};
  endfunction

  logic [4:0] rd_r;    // destination of a re-encoded three-register op
  logic [5:0] oop;     // original opcode

  assign oop = orig_op(op);

  logic       sgn;     // re-encoded ALU immediate is sign-extended
  logic [5:0] bop;     // original opcode of a re-encoded branch

  always_comb begin
    sgn = (op <= ROP_SLTIU);
    unique case (op)
      ROP_BEQ:  bop = OP_BEQ;
      ROP_BNE:  bop = OP_BNE;
      ROP_BEQL: bop = OP_BEQL;
      default:  bop = OP_BNEL;
    endcase
  end

  always_comb begin
    rd_r  = is_short ? a : st.m;
    instr = break_instr();
    if (st.sm && st.ml) begin
      instr = {oop, st.s[9:0], st.m, st.l};
    end else if (op[5]) begin
      unique case (op)
        ROP_ADD:  instr = {OP_SPECIAL, a, b, rd_r, 5'd0, FN_ADD};
        ROP_ADDU: instr = {OP_SPECIAL, a, b, rd_r, 5'd0, FN_ADDU};
        ROP_SUB:  instr = {OP_SPECIAL, a, b, rd_r, 5'd0, FN_SUB};
        ROP_SUBU: instr = {OP_SPECIAL, a, b, rd_r, 5'd0, FN_SUBU};
        ROP_AND:  instr = {OP_SPECIAL, a, b, rd_r, 5'd0, FN_AND};
        ROP_OR:   instr = {OP_SPECIAL, a, b, rd_r, 5'd0, FN_OR};
        ROP_XOR:  instr = {OP_SPECIAL, a, b, rd_r, 5'd0, FN_XOR};
        ROP_NOR:  instr = {OP_SPECIAL, a, b, rd_r, 5'd0, FN_NOR};
        ROP_SLT:  instr = {OP_SPECIAL, a, b, rd_r, 5'd0, FN_SLT};
        ROP_SLTU: instr = {OP_SPECIAL, a, b, rd_r, 5'd0, FN_SLTU};
        ROP_SLLV: instr = {OP_SPECIAL, a, b, rd_r, 5'd0, FN_SLLV};
        ROP_SRLV: instr = {OP_SPECIAL, a, b, rd_r, 5'd0, FN_SRLV};
        ROP_SRAV: instr = {OP_SPECIAL, a, b, rd_r, 5'd0, FN_SRAV};
        // shifts: a = sa, b = rt, rd = rt when short
        ROP_SLL:  instr = {OP_SPECIAL, 5'd0, b, is_short ? b : st.m, a, FN_SLL};
        ROP_SRL:  instr = {OP_SPECIAL, 5'd0, b, is_short ? b : st.m, a, FN_SRL};
        ROP_SRA:  instr = {OP_SPECIAL, 5'd0, b, is_short ? b : st.m, a, FN_SRA};
        ROP_JR:   instr = {OP_SPECIAL, a, b, 5'd0, 5'd0, FN_JR};
        ROP_JALR: instr = {OP_SPECIAL, a, 5'd0, b, 5'd0, FN_JALR};
        ROP_ADDI, ROP_ADDIU, ROP_SLTI, ROP_SLTIU, ROP_ANDI, ROP_ORI, ROP_XORI: begin
          instr = {OP_ADDI + (op - ROP_ADDI), a, a,
                   is_short ? ext5(b, sgn) : ext10({b, st.m}, sgn)};
        end
        ROP_BEQ, ROP_BNE, ROP_BEQL, ROP_BNEL: begin
          instr = {bop, a, 5'd0, is_short ? ext5(b, 1'b1) : ext10({b, st.m}, 1'b1)};
        end
        default: instr = break_instr();
      endcase
    end else if (st.sm) begin
      // medium word with the original (or relocated) opcode
      unique case (op)
        OP_J, OP_JAL:
          instr = {op, 11'd0, a, b, st.m};
        OP_ANDI, OP_ORI, OP_XORI, OP_LUI:
          instr = {op, a, b, ext5(st.m, 1'b0)};
        SOP_LH, SOP_LHU, SOP_SH:
          instr = {oop, a, b, ext5(st.m, 1'b1) << 1};
        SOP_LW, SOP_SW:
          instr = {oop, a, b, ext5(st.m, 1'b1) << 2};
        default:
          instr = {oop, a, b, ext5(st.m, 1'b1)};
      endcase
    end
  end

endmodule
