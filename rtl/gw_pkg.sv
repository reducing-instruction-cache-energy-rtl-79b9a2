// gw_pkg: types and constants shared by the gated-wordline instruction cache.
//
// Each instruction is kept in the cache as a 34-bit stored word split into
// three segments, each on its own wordline:
//   short segment  s[15:0] + S/M bit          (main wordline)
//   medium segment m[4:0]  + M/L bit          (first local wordline)
//   long segment   l[10:0]                    (second local wordline)
// A short instruction occupies 17 bits, a medium one 23 and a long one 34.
// S/M=0 means short; S/M=1,M/L=0 medium; S/M=1,M/L=1 long.  These sizes and
// the 5-bit medium immediate are the ones the design is built around; the
// placement of fields inside the segments is this design's own choice:
//   short  s = {op, A, B}                  (op = s[15:10], A = s[9:5], B = s[4:0])
//   medium s = {op, A, B}, m = 5 more bits
//   long   s = instr[31:16], m = instr[15:11], l = instr[10:0]
// so opcode, rs slot and rt slot (the critical fields) always sit in the
// short segment at the same bit positions.
//
// The opcode map is the re-encoded map of the 3-size scheme: loads and
// stores move into opcode rows 2 and 3, and the 29 re-encoded instructions
// take opcodes 34..62 (bit 5 set).
package gw_pkg;

  localparam int unsigned SHORT_W = 16;  // short segment data bits
  localparam int unsigned MED_W   = 5;   // medium segment data bits (= medium immediate)
  localparam int unsigned LONG_W  = 11;  // long segment data bits

  typedef struct packed {
    logic [SHORT_W-1:0] s;
    logic               sm;
    logic [MED_W-1:0]   m;
    logic               ml;
    logic [LONG_W-1:0]  l;
  } stored_t;

  typedef enum logic [1:0] {
    SZ_SHORT  = 2'd0,
    SZ_MEDIUM = 2'd1,
    SZ_LONG   = 2'd2
  } size_e;

  // ---------------------------------------------------------------- MIPS-II
  typedef enum logic [5:0] {
    OP_SPECIAL = 6'd0,  OP_REGIMM = 6'd1,  OP_J      = 6'd2,  OP_JAL    = 6'd3,
    OP_BEQ     = 6'd4,  OP_BNE    = 6'd5,  OP_BLEZ   = 6'd6,  OP_BGTZ   = 6'd7,
    OP_ADDI    = 6'd8,  OP_ADDIU  = 6'd9,  OP_SLTI   = 6'd10, OP_SLTIU  = 6'd11,
    OP_ANDI    = 6'd12, OP_ORI    = 6'd13, OP_XORI   = 6'd14, OP_LUI    = 6'd15,
    OP_COP0    = 6'd16,
    OP_BEQL    = 6'd20, OP_BNEL   = 6'd21, OP_BLEZL  = 6'd22, OP_BGTZL  = 6'd23,
    OP_LB      = 6'd32, OP_LH     = 6'd33, OP_LW     = 6'd35, OP_LBU    = 6'd36,
    OP_LHU     = 6'd37, OP_SB     = 6'd40, OP_SH     = 6'd41, OP_SW     = 6'd43
  } opcode_e;

  typedef enum logic [5:0] {
    FN_SLL  = 6'd0,  FN_SRL  = 6'd2,  FN_SRA  = 6'd3,
    FN_SLLV = 6'd4,  FN_SRLV = 6'd6,  FN_SRAV = 6'd7,
    FN_JR   = 6'd8,  FN_JALR = 6'd9,  FN_SYSCALL = 6'd12, FN_BREAK = 6'd13,
    FN_RFE  = 6'd16,                   // COP0 function field of RFE
    FN_ADD  = 6'd32, FN_ADDU = 6'd33, FN_SUB  = 6'd34, FN_SUBU = 6'd35,
    FN_AND  = 6'd36, FN_OR   = 6'd37, FN_XOR  = 6'd38, FN_NOR  = 6'd39,
    FN_SLT  = 6'd42, FN_SLTU = 6'd43
  } funct_e;

  localparam logic [4:0] COP_CO   = 5'd16;  // rs field of COP0 "CO" operations

  // ------------------------------------------------- stored (re-encoded) map
  typedef enum logic [5:0] {
    // loads and stores relocated to rows 2 and 3
    SOP_SB   = 6'd17, SOP_SH   = 6'd18, SOP_SW    = 6'd19,
    SOP_LBU  = 6'd24, SOP_LB   = 6'd25, SOP_LH    = 6'd26,
    SOP_LW   = 6'd27, SOP_LHU  = 6'd28,
    // re-encoded instructions, rows 4..7
    ROP_BEQ  = 6'd34, ROP_BNE  = 6'd35, ROP_BEQL  = 6'd36, ROP_BNEL  = 6'd37,
    ROP_JR   = 6'd38, ROP_JALR = 6'd39,
    ROP_SLL  = 6'd40, ROP_SRL  = 6'd41, ROP_SLT   = 6'd42, ROP_SLTU  = 6'd43,
    ROP_SRA  = 6'd44, ROP_SLLV = 6'd45, ROP_SRLV  = 6'd46, ROP_SRAV  = 6'd47,
    ROP_ADD  = 6'd48, ROP_ADDU = 6'd49, ROP_SUB   = 6'd50, ROP_SUBU  = 6'd51,
    ROP_AND  = 6'd52, ROP_OR   = 6'd53, ROP_XOR   = 6'd54, ROP_NOR   = 6'd55,
    ROP_ADDI = 6'd56, ROP_ADDIU = 6'd57, ROP_SLTI = 6'd58, ROP_SLTIU = 6'd59,
    ROP_ANDI = 6'd60, ROP_ORI  = 6'd61, ROP_XORI  = 6'd62
  } stored_op_e;

  // BREAK with a zero code: what an illegal opcode is turned into.
  function automatic logic [31:0] break_instr();
    return {26'd0, FN_BREAK};
  endfunction

  // True when a 16-bit immediate survives truncation to n bits and
  // re-extension (signed or zero-extended).
  function automatic logic imm_fits(input logic [15:0] imm, input int unsigned n,
                                    input logic is_signed);
    logic [15:0] top;
    if (is_signed) begin
      // bits n-1 .. 15 must all be copies of the sign bit
      top = imm >> (n - 1);
      return top == 16'd0 || top == (16'hFFFF >> (n - 1));
    end
    return (imm >> n) == 16'd0;
  endfunction

  // Class of an uncompressed instruction for the tag-compare controller.
  typedef enum logic [1:0] {
    XF_NONE    = 2'd0,  // sequential
    XF_DELAYED = 2'd1,  // branch or jump with a delay slot
    XF_NOW     = 2'd2   // SYSCALL, BREAK, RFE: transfer without delay slot
  } xfer_e;

  function automatic xfer_e xfer_class(input logic [5:0] op, input logic [4:0] rs,
                                       input logic [5:0] fn);
    unique case (op)
      OP_SPECIAL: begin
        if (fn == FN_JR || fn == FN_JALR)           return XF_DELAYED;
        if (fn == FN_SYSCALL || fn == FN_BREAK)     return XF_NOW;
        return XF_NONE;
      end
      OP_REGIMM, OP_J, OP_JAL, OP_BEQ, OP_BNE, OP_BLEZ, OP_BGTZ,
      OP_BEQL, OP_BNEL, OP_BLEZL, OP_BGTZL:         return XF_DELAYED;
      OP_COP0:
        return (rs == COP_CO && fn == FN_RFE) ? XF_NOW : XF_NONE;
      default:                                      return XF_NONE;
    endcase
  endfunction

endpackage
