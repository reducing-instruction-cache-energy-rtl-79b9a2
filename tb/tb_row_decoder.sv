// tb_row_decoder: every index of the default 6-bit decoder (and of a 5-bit
// one, which uses a 1-to-2 predecoder for its top bit) must raise exactly the
// wordline of that row, and no wordline may rise while the decoder is off.
// Purely combinational stimulus, one index per 1 ns step. Ends with a
// TB_RESULT line; a watchdog stops a hung run.
module tb_row_decoder;
  logic       en;
  logic [5:0] idx;
  logic [63:0] wl;
  logic [4:0] idx5;
  logic [31:0] wl5;
  int checks = 0, failures = 0;

  row_decoder dut (.en(en), .idx(idx), .wl(wl));
  row_decoder #(.IDX_W(5)) dut5 (.en(en), .idx(idx5), .wl(wl5));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s idx=%0d wl=%h", what, idx, wl); end
  endtask

  initial begin
    for (int e = 0; e < 2; e++)
      for (int i = 0; i < 64; i++) begin
        en = e[0]; idx = 6'(i); idx5 = 5'(i);
        #1;
        check(wl == (e != 0 ? (64'd1 << i) : 64'd0), "6-bit row");
        check(wl5 == (e != 0 ? (32'd1 << (i % 32)) : 32'd0), "5-bit row");
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
