// tb_gw_icache_sweep: runs the cache in the 1 KB shapes of the block-size
// study side by side - 4, 8, 16, 32 and 64-byte lines (256x1, 128x2, 64x4,
// 32x8 and 16x16 words) with tag-compare skipping, plus the default shape
// comparing on every fetch - each with its own random program, memory model
// and full checking (tb_icache_env).
//
// Besides the per-fetch checks of each environment it checks that:
//   * with one word per line every fetch compares (each fetch is a new line);
//   * without skipping every fetch compares;
//   * the share of fetches that compare falls as lines get longer, since
//     sequential flow crosses a line boundary less often.
// Prints the compare share for every shape.  10 ns clock; a watchdog ends
// a hung run.  The shapes follow the block sizes of the study; the
// program streams are synthetic, so the shares are not the published ones.
module tb_gw_icache_sweep;
  localparam int NCFG = 6;
  localparam int FETCHES = 8000;

  logic clk = 0;
  always #5 clk = ~clk;

  logic [NCFG-1:0] done;
  int chk[NCFG], fail[NCFG], nf[NCFG], nc[NCFG];

  tb_icache_env #(.LINES(256), .WORDS(1),  .TAG_SKIP(1'b1), .FETCHES(FETCHES)) e0 (
    .clk(clk), .done(done[0]), .checks_o(chk[0]), .failures_o(fail[0]), .fetches_o(nf[0]), .compares_o(nc[0]));
  tb_icache_env #(.LINES(128), .WORDS(2),  .TAG_SKIP(1'b1), .FETCHES(FETCHES)) e1 (
    .clk(clk), .done(done[1]), .checks_o(chk[1]), .failures_o(fail[1]), .fetches_o(nf[1]), .compares_o(nc[1]));
  tb_icache_env #(.LINES(64),  .WORDS(4),  .TAG_SKIP(1'b1), .FETCHES(FETCHES)) e2 (
    .clk(clk), .done(done[2]), .checks_o(chk[2]), .failures_o(fail[2]), .fetches_o(nf[2]), .compares_o(nc[2]));
  tb_icache_env #(.LINES(32),  .WORDS(8),  .TAG_SKIP(1'b1), .FETCHES(FETCHES)) e3 (
    .clk(clk), .done(done[3]), .checks_o(chk[3]), .failures_o(fail[3]), .fetches_o(nf[3]), .compares_o(nc[3]));
  tb_icache_env #(.LINES(16),  .WORDS(16), .TAG_SKIP(1'b1), .FETCHES(FETCHES)) e4 (
    .clk(clk), .done(done[4]), .checks_o(chk[4]), .failures_o(fail[4]), .fetches_o(nf[4]), .compares_o(nc[4]));
  tb_icache_env #(.LINES(64),  .WORDS(4),  .TAG_SKIP(1'b0), .FETCHES(FETCHES)) e5 (
    .clk(clk), .done(done[5]), .checks_o(chk[5]), .failures_o(fail[5]), .fetches_o(nf[5]), .compares_o(nc[5]));

  int checks = 0, failures = 0;
  int cycles = 0;
  always @(posedge clk) cycles++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    real share[NCFG];
    wait (done == '1);
    #1;
    for (int i = 0; i < NCFG; i++) begin
      checks   += chk[i];
      failures += fail[i];
      share[i] = 100.0 * real'(nc[i]) / real'(nf[i]);
      $display("shape %0d: %0d of %0d fetches compared the tag (%0.1f%%)", i, nc[i], nf[i], share[i]);
    end
    check(nc[0] == nf[0], "one word per line: every fetch compares");
    check(nc[5] == nf[5], "no skipping: every fetch compares");
    for (int i = 1; i < 5; i++)
      check(share[i] < share[i-1], $sformatf("compare share falls from shape %0d to %0d", i - 1, i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles == 1_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
