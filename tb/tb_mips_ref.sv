// tb_mips_ref: reference model and stimulus used by the testbenches.
//
// ref_size   : size class (0 short, 1 medium, 2 long) an instruction must get
// ref_canon  : the instruction the cache must hand back for it (the original,
//              with unused fields cleared, commutative operands swapped when
//              rd equals rt, illegal opcodes turned into BREAK)
// ref_sop    : the opcode the stored word must carry for a non re-encoded
//              instruction (loads and stores relocated)
// rand_instr : random MIPS-II words, biased towards the cases the
//              compression rules distinguish (equal registers, short
//              immediates, aligned offsets)
// Written from the compression rules with integer range checks, separately
// from the bit-slicing used in the RTL.
package tb_mips_ref;

  function automatic bit legal_op(input int op);
    return (op <= 16) || (op >= 20 && op <= 23) || op == 32 || op == 33 ||
           op == 35 || op == 36 || op == 37 || op == 40 || op == 41 || op == 43;
  endfunction

  function automatic bit in_s(input int v, input int bits);
    return v >= -(1 << (bits - 1)) && v < (1 << (bits - 1));
  endfunction

  function automatic bit in_u(input int v, input int bits);
    return v >= 0 && v < (1 << bits);
  endfunction

  function automatic int ref_size(input logic [31:0] i);
    int op, fn, rs, rt, rd, simm, uimm, k;
    op = int'(i[31:26]); fn = int'(i[5:0]); rs = int'(i[25:21]); rt = int'(i[20:16]); rd = int'(i[15:11]);
    simm = int'($signed(i[15:0])); uimm = int'(i[15:0]);
    if (!legal_op(op)) return 2;
    case (op)
      0: begin
        if (fn inside {32, 33, 36, 37, 38, 39}) return (rd == rs || rd == rt) ? 0 : 1;
        if (fn inside {34, 35, 42, 43, 4, 6, 7}) return (rd == rs) ? 0 : 1;
        if (fn inside {0, 2, 3})                 return (rd == rt) ? 0 : 1;
        if (fn inside {8, 9})                    return 0;
        return 2;
      end
      8, 9, 10, 11, 12, 13, 14: begin
        int v; bit s;
        s = (op <= 11);
        v = s ? simm : uimm;
        if (rs == rt) begin
          if (s ? in_s(v, 5) : in_u(v, 5))   return 0;
          if (s ? in_s(v, 10) : in_u(v, 10)) return 1;
          return 2;
        end
        return (s ? in_s(v, 5) : in_u(v, 5)) ? 1 : 2;
      end
      4, 5, 20, 21: begin
        if (rt == 0) return in_s(simm, 5) ? 0 : (in_s(simm, 10) ? 1 : 2);
        return in_s(simm, 5) ? 1 : 2;
      end
      15:                return in_u(uimm, 5) ? 1 : 2;
      1, 6, 7, 22, 23:   return in_s(simm, 5) ? 1 : 2;
      2, 3:              return (i[25:0] < 26'd32768) ? 1 : 2;
      32, 36, 40, 33, 37, 41, 35, 43: begin
        k = (op inside {32, 36, 40}) ? 1 : (op inside {33, 37, 41}) ? 2 : 4;
        return ((simm % k) == 0 && in_s(simm / k, 5)) ? 1 : 2;
      end
      default:           return 2;
    endcase
  endfunction

  function automatic logic [31:0] ref_canon(input logic [31:0] i);
    int op, fn;
    logic [4:0] rs, rt, rd, sa;
    op = int'(i[31:26]); fn = int'(i[5:0]);
    rs = i[25:21]; rt = i[20:16]; rd = i[15:11]; sa = i[10:6];
    if (!legal_op(op)) return 32'h0000_000d;
    if (op != 0) return i;
    if (fn inside {32, 33, 36, 37, 38, 39}) begin
      if (rd != rs && rd == rt) return {6'd0, rt, rs, rd, 5'd0, 6'(fn)};
      return {6'd0, rs, rt, rd, 5'd0, 6'(fn)};
    end
    if (fn inside {34, 35, 42, 43, 4, 6, 7}) return {6'd0, rs, rt, rd, 5'd0, 6'(fn)};
    if (fn inside {0, 2, 3})  return {6'd0, 5'd0, rt, rd, sa, 6'(fn)};
    if (fn == 8)              return {6'd0, rs, rt, 10'd0, 6'd8};
    if (fn == 9)              return {6'd0, rs, 5'd0, rd, 5'd0, 6'd9};
    return i;
  endfunction

  function automatic logic [5:0] ref_sop(input logic [5:0] op);
    case (op)
      6'd40: return 6'd17;  6'd41: return 6'd18;  6'd43: return 6'd19;
      6'd36: return 6'd24;  6'd32: return 6'd25;  6'd33: return 6'd26;
      6'd35: return 6'd27;  6'd37: return 6'd28;
      default: return op;
    endcase
  endfunction

  // Small signed value of a random width (1..16 bits).
  function automatic logic [15:0] rand_imm();
    int w;
    w = 1 + $urandom_range(15);
    return 16'($signed(17'($urandom) << (17 - w)) >>> (17 - w));
  endfunction

  function automatic logic [31:0] rand_instr();
    logic [5:0]  op, fn;
    logic [4:0]  rs, rt, rd, sa;
    logic [15:0] imm;
    int sel;
    static logic [5:0] ops[25] = '{0, 0, 0, 0, 0, 1, 2, 3, 4, 5, 6, 7, 8, 9, 10, 11,
                                   12, 13, 14, 15, 16, 20, 32, 35, 43};
    static logic [5:0] fns[26] = '{0, 2, 3, 4, 6, 7, 8, 9, 12, 13, 15, 16, 17, 18, 19,
                                   24, 25, 26, 27, 32, 33, 34, 35, 36, 42, 39};
    sel = $urandom_range(99);
    if (sel < 5) return $urandom;                 // anything, illegal included
    op  = ops[$urandom_range(24)];
    if (sel < 15) op = 6'($urandom_range(63));
    if (sel >= 15 && sel < 25) op = 6'(32 + $urandom_range(11));   // loads / stores
    fn  = fns[$urandom_range(25)];
    rs  = 5'($urandom);
    rt  = ($urandom_range(2) == 0) ? rs : (($urandom_range(2) == 0) ? 5'd0 : 5'($urandom));
    rd  = ($urandom_range(2) == 0) ? rs : (($urandom_range(1) == 0) ? rt : 5'($urandom));
    sa  = 5'($urandom);
    imm = rand_imm();
    if (op >= 32 && $urandom_range(1) == 0) imm = imm << $urandom_range(2);
    if (op == 0) return {op, rs, rt, rd, sa, fn};
    if (op == 2 || op == 3)
      return {op, ($urandom_range(1) == 0) ? 26'($urandom_range(32767)) : 26'($urandom)};
    return {op, rs, rt, imm};
  endfunction

endpackage
