// tb_tag_array: random tag writes, compares and invalidates against a model.
// A compare hits only for a valid row whose tag matches; with rd low the
// array reports no hit; reset and invalidate clear every valid bit.
// One operation per clock; the flash invalidate checked is this design's
// choice. Ends with a TB_RESULT line; a watchdog stops a hung run.
module tb_tag_array;
  localparam int ROWS = 64, TAG_W = 22;

  logic             clk = 0, rst_n;
  logic [ROWS-1:0]  wl;
  logic             rd, wr, inval, hit;
  logic [TAG_W-1:0] cmp_tag, wtag;
  int checks = 0, failures = 0, cycles = 0, hits = 0;

  logic [TAG_W-1:0] m_tag [ROWS];
  bit               m_val [ROWS];

  tag_array dut (.*);      // default size (ROWS rows, TAG_W-bit tags)

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    rst_n = 0; rd = 0; wr = 0; inval = 0; wl = '0; cmp_tag = '0; wtag = '0;
    @(posedge clk); @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < ROWS; r++) m_val[r] = 0;
    for (int k = 0; k < 5000; k++) begin
      int r, a;
      r = $urandom_range(ROWS - 1);
      a = $urandom_range(99);
      wl = '0; wl[r] = 1'b1; rd = 0; wr = 0; inval = 0;
      if (a < 30) begin
        wr = 1; wtag = TAG_W'($urandom_range(3));
        @(posedge clk);
        m_tag[r] = wtag; m_val[r] = 1;
      end else if (a == 30) begin
        inval = 1;
        @(posedge clk);
        for (int q = 0; q < ROWS; q++) m_val[q] = 0;
      end else begin
        rd = (a < 95);
        cmp_tag = TAG_W'($urandom_range(3));
        #1;
        check(hit == (rd && m_val[r] && m_tag[r] == cmp_tag), "compare");
        if (hit) hits++;
        @(posedge clk);
      end
      @(negedge clk);
    end
    check(hits > 100, "hits seen");
    // reset clears all valid bits
    wr = 0; inval = 0;
    rst_n = 0; @(posedge clk); @(negedge clk); rst_n = 1;
    for (int r = 0; r < ROWS; r++) begin
      wl = '0; wl[r] = 1'b1; rd = 1; cmp_tag = m_tag[r];
      #1 check(!hit, "after reset");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles == 20000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
