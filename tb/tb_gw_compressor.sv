// tb_gw_compressor: checks the compression block on directed and random
// MIPS-II words.  For every word it checks the size class against the
// reference rules, that the S/M and M/L bits match it, that a long word
// holds the whole instruction (relocated opcode) and that the critical
// fields sit in the short segment: re-encoded opcodes have bit 5 set, other
// medium and long words carry {opcode, rs, rt} unchanged.  A round trip
// through gw_decompressor must give the reference instruction back.
// Expected sizes follow the 3-size compression rules; the stored layout
// checked is this design's own. Ends with a TB_RESULT line; a watchdog stops
// a hung run.
module tb_gw_compressor;
  import gw_pkg::*;
  import tb_mips_ref::*;

  logic [31:0] instr, back;
  stored_t     st;
  size_e       size;
  int checks = 0, failures = 0;
  int n_size[3] = '{0, 0, 0};

  gw_compressor dut (.instr(instr), .st(st), .size(size));
  gw_decompressor u_back (.st(st), .instr(back));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s: instr=%h st=%h size=%0d", what, instr, st, size);
    end
  endtask

  task automatic run(input logic [31:0] i);
    int exp;
    instr = i;
    #1;
    exp = ref_size(i);
    n_size[exp]++;
    check(int'(size) == exp, "size class");
    check(st.sm == (exp != 0) && st.ml == (exp == 2), "size bits");
    check(back == ref_canon(i), "round trip");
    if (exp == 2) begin
      logic [31:0] li;
      li = legal_op(int'(i[31:26])) ? {ref_sop(i[31:26]), i[25:0]} : 32'h0000_000d;
      check({st.s, st.m, st.l} == li, "long layout");
    end else if (exp == 1 && !st.s[15] && !(i[31:26] inside {6'd2, 6'd3})) begin
      check(st.s == {ref_sop(i[31:26]), i[25:16]}, "critical fields");
    end
  endtask

  initial begin
    // directed: NOP, ADD rd=rs, ADD rd=rt (swapped), SUB rd=rt (medium),
    // ADDIU rs=rt imm 12 / 300 / 2000, BEQ rt=0 off -16 / 511 / 600,
    // LW off 60 / 62, LH off 30, J 0x7fff / 0x8000, MULT, illegal op 0x3f
    run(32'h0000_0000);
    run({6'd0, 5'd3, 5'd4, 5'd3, 5'd0, 6'd32});
    run({6'd0, 5'd3, 5'd4, 5'd4, 5'd0, 6'd32});
    run({6'd0, 5'd3, 5'd4, 5'd4, 5'd0, 6'd34});
    run({6'd9, 5'd29, 5'd29, 16'd12});
    run({6'd9, 5'd29, 5'd29, 16'd300});
    run({6'd9, 5'd29, 5'd29, 16'd2000});
    run({6'd4, 5'd2, 5'd0, 16'hfff0});
    run({6'd4, 5'd2, 5'd0, 16'd511});
    run({6'd4, 5'd2, 5'd0, 16'd600});
    run({6'd35, 5'd29, 5'd8, 16'd60});
    run({6'd35, 5'd29, 5'd8, 16'd62});
    run({6'd33, 5'd29, 5'd8, 16'd30});
    run({6'd2, 26'h7fff});
    run({6'd2, 26'h8000});
    run({6'd0, 5'd4, 5'd5, 10'd0, 6'd24});
    run({6'h3f, 26'h123456});
    for (int k = 0; k < 30000; k++) run(rand_instr());
    check(n_size[0] > 100 && n_size[1] > 100 && n_size[2] > 100, "all sizes seen");
    $display("sizes seen: short=%0d medium=%0d long=%0d", n_size[0], n_size[1], n_size[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
