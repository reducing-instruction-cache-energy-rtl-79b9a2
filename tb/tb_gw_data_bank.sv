// tb_gw_data_bank: random refills and reads of one 64-row sub-bank.
// A model keeps, per row, what each cell group should hold: the short
// segment and S/M on every write, the M/L cell on every write, the medium
// data only when the new word is not short, the long data only when it is
// long.  Each read must return the short segment, the medium segment only
// when the stored S/M bit is set and the long segment only when the stored
// M/L bit is set (zeros otherwise), and seg_rd/seg_wr must report exactly
// the segments whose wordlines were raised.
// The write rules checked are the described ones; the zero read-out of idle
// segments is this design's. Ends with a TB_RESULT line; a watchdog stops a
// hung run.
module tb_gw_data_bank;
  import gw_pkg::*;
  import tb_mips_ref::*;

  localparam int ROWS = 64;

  logic            clk = 0;
  logic [ROWS-1:0] wl;
  logic            rd, wr;
  stored_t         wdata, rdata;
  logic [2:0]      seg_rd, seg_wr;
  logic [31:0]     instr;
  stored_t         comp;
  size_e           csize;
  int checks = 0, failures = 0, cycles = 0;
  int n_rd[3] = '{0, 0, 0};

  logic [16:0] m_short [ROWS];
  logic        m_ml    [ROWS];
  logic [4:0]  m_med   [ROWS];
  logic [10:0] m_long  [ROWS];
  bit          written [ROWS];

  gw_data_bank dut (.*);   // default size (ROWS rows)
  gw_compressor u_comp (.instr(instr), .st(comp), .size(csize));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s: rdata=%h seg_rd=%b seg_wr=%b", what, rdata, seg_rd, seg_wr);
    end
  endtask

  initial begin
    rd = 0; wr = 0; wl = '0; wdata = '0;
    for (int r = 0; r < ROWS; r++) written[r] = 0;
    @(negedge clk);
    for (int k = 0; k < 4000; k++) begin
      int r;
      r = $urandom_range(ROWS - 1);
      if (!written[r] || $urandom_range(2) == 0) begin
        instr = rand_instr();
        #1;
        wdata = comp;
        wl = '0; wl[r] = 1'b1; wr = 1; rd = 0;
        #1;
        check(seg_wr == {comp.sm && comp.ml, 1'b1, 1'b1}, "seg_wr");
        check(seg_rd == 3'b000, "no read during write");
        @(posedge clk);
        m_short[r] = {comp.s, comp.sm};
        m_ml[r]    = comp.ml;
        if (comp.sm) m_med[r] = comp.m;
        if (comp.sm && comp.ml) m_long[r] = comp.l;
        written[r] = 1;
        @(negedge clk);
      end else begin
        stored_t e;
        wl = '0; wl[r] = 1'b1; wr = 0; rd = 1;
        #1;
        e = '0;
        {e.s, e.sm} = m_short[r];
        if (m_short[r][0]) begin e.m = m_med[r]; e.ml = m_ml[r]; end
        if (m_ml[r]) e.l = m_long[r];
        check(rdata == e, "read data");
        check(seg_rd == {m_ml[r], m_short[r][0], 1'b1}, "seg_rd");
        check(seg_wr == 3'b000, "no write during read");
        n_rd[m_ml[r] ? 2 : (m_short[r][0] ? 1 : 0)]++;
        @(negedge clk);
      end
    end
    // idle: nothing selected, nothing read
    wl = '0; rd = 1; wr = 0;
    #1;
    check(rdata == '0 && seg_rd == 3'b000, "idle");
    check(n_rd[0] > 50 && n_rd[1] > 50 && n_rd[2] > 50, "all sizes read");
    $display("reads: short=%0d medium=%0d long=%0d", n_rd[0], n_rd[1], n_rd[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles == 20000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
