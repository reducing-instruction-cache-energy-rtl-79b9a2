// tb_gw_decompressor: checks the decompression block.
//  * Hand-built stored words (one per format) must decode to the expected
//    MIPS-II instruction.
//  * Random instructions are compressed, then the segments whose local
//    wordline stays off are filled with random garbage (they are never read),
//    and the decompressed result must equal the reference instruction.
// Expected words come from the reference model; the hand-built stored words
// use this design's field layout. Ends with a TB_RESULT line; a watchdog
// stops a hung run.
module tb_gw_decompressor;
  import gw_pkg::*;
  import tb_mips_ref::*;

  logic [31:0] instr, got;
  stored_t     st_c, st_d;
  size_e       size;
  int checks = 0, failures = 0;

  gw_compressor   u_comp (.instr(instr), .st(st_c), .size(size));
  gw_decompressor dut    (.st(st_d), .instr(got));

  task automatic check(input bit ok, input string what, input logic [31:0] exp);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s: st=%h got=%h exp=%h", what, st_d, got, exp);
    end
  endtask

  task automatic direct(input logic [15:0] s, input logic sm, input logic [4:0] m,
                        input logic ml, input logic [10:0] l, input logic [31:0] exp,
                        input string what);
    st_d = '{s: s, sm: sm, m: m, ml: ml, l: l};
    #1;
    check(got == exp, what, exp);
  endtask

  initial begin
    // short ADDU (op 49): rs=rd=5, rt=6  -> addu $5,$5,$6
    direct({6'd49, 5'd5, 5'd6}, 1'b0, 5'h1f, 1'b1, 11'h7ff,
           {6'd0, 5'd5, 5'd6, 5'd5, 5'd0, 6'd33}, "short addu");
    // medium SUB (op 50): rs=1 rt=2 rd=3
    direct({6'd50, 5'd1, 5'd2}, 1'b1, 5'd3, 1'b0, 11'h555,
           {6'd0, 5'd1, 5'd2, 5'd3, 5'd0, 6'd34}, "medium sub");
    // short SLL (op 40): sa=4, rt=rd=9
    direct({6'd40, 5'd4, 5'd9}, 1'b0, 5'd0, 1'b0, 11'd0,
           {6'd0, 5'd0, 5'd9, 5'd9, 5'd4, 6'd0}, "short sll");
    // short ADDIU (op 57): rs=rt=29, imm=-8
    direct({6'd57, 5'd29, 5'h18}, 1'b0, 5'd0, 1'b0, 11'd0,
           {6'd9, 5'd29, 5'd29, 16'hfff8}, "short addiu");
    // medium ORI re-encoded (op 61): rs=rt=4, imm = 10'h3ff (zero-extended)
    direct({6'd61, 5'd4, 5'h1f}, 1'b1, 5'h1f, 1'b0, 11'd0,
           {6'd13, 5'd4, 5'd4, 16'h03ff}, "medium ori");
    // medium BNE re-encoded (op 35): rs=7, rt=0, offset 10'h200 = -512
    direct({6'd35, 5'd7, 5'h10}, 1'b1, 5'd0, 1'b0, 11'd0,
           {6'd5, 5'd7, 5'd0, 16'hfe00}, "medium bne");
    // medium LW (stored op 27): rs=29 rt=8, offset 5'h1f -> -4
    direct({6'd27, 5'd29, 5'd8}, 1'b1, 5'h1f, 1'b0, 11'h3a,
           {6'd35, 5'd29, 5'd8, 16'hfffc}, "medium lw");
    // medium JAL: target 0x1234
    direct({6'd3, 5'h04, 5'h11}, 1'b1, 5'h14, 1'b0, 11'd0,
           {6'd3, 11'd0, 15'h1234}, "medium jal");
    // long SB (stored op 17)
    direct({6'd17, 5'd2, 5'd3}, 1'b1, 5'h15, 1'b1, 11'h2aa,
           {6'd40, 5'd2, 5'd3, 5'h15, 11'h2aa}, "long sb");
    // short JALR (op 39): rs=31... rd=2
    direct({6'd39, 5'd31, 5'd2}, 1'b0, 5'd7, 1'b1, 11'd5,
           {6'd0, 5'd31, 5'd0, 5'd2, 5'd0, 6'd9}, "short jalr");

    for (int k = 0; k < 30000; k++) begin
      instr = rand_instr();
      #1;
      st_d = st_c;
      if (!st_c.sm) begin
        st_d.m  = 5'($urandom);
        st_d.ml = 1'b0;          // the M/L cell of a short word is rewritten as 0
        st_d.l  = 11'($urandom);
      end else if (!st_c.ml) begin
        st_d.l  = 11'($urandom);
      end
      #1;
      check(got == ref_canon(instr), "round trip", ref_canon(instr));
    end
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
