// tb_tag_compare_ctrl: drives a random stream of fetches with random bubbles
// and stalls, the way the cache does: a fetch in lookup completes
// (lookup_adv) and its instruction appears in the output latches the next
// cycle (out_valid/out_class).  A model keeps the list of completed fetches
// and computes, for each lookup cycle, whether a compare is needed from the
// rules (first fetch, previous fetch last in its line, previous fetch
// SYSCALL/BREAK/RFE, fetch two back a branch or jump).  Each rule must fire.
// One cycle per step; the rules checked are the described ones, the latch-
// based history timing is this design's. Ends with a TB_RESULT line; a
// watchdog stops a hung run.
module tb_tag_compare_ctrl;
  import gw_pkg::*;

  logic  clk = 0, rst_n;
  logic  out_valid, lookup_adv, lookup_last, flush, need_cmp;
  xfer_e out_class;
  int checks = 0, failures = 0, cycles = 0;
  int fired[4] = '{0, 0, 0, 0};

  tag_compare_ctrl dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  // completed fetches, most recent first
  xfer_e hist_c[$];
  bit    hist_l[$];
  bit    first;
  bit    pend_valid;      // fetch completed last cycle -> in output now
  xfer_e pend_class;

  initial begin
    rst_n = 0; out_valid = 0; lookup_adv = 0; lookup_last = 0; flush = 0;
    out_class = XF_NONE;
    @(posedge clk); @(negedge clk);
    rst_n = 1;
    first = 1; pend_valid = 0;
    for (int k = 0; k < 20000; k++) begin
      bit in_lookup, e1, e2, e3, e4, exp;
      int c;
      xfer_e cls;
      // output latches show the fetch completed in the previous cycle
      out_valid = pend_valid;
      out_class = pend_class;
      in_lookup = ($urandom_range(9) != 0);
      flush     = ($urandom_range(199) == 0);
      c = $urandom_range(9);
      cls = (c < 2) ? XF_DELAYED : ((c < 3) ? XF_NOW : XF_NONE);
      lookup_last = ($urandom_range(3) == 0);
      lookup_adv  = in_lookup && ($urandom_range(4) != 0);
      #1;
      if (in_lookup) begin
        e1 = first;
        e2 = hist_l.size() > 0 && hist_l[0];
        e3 = hist_c.size() > 0 && hist_c[0] == XF_NOW;
        e4 = hist_c.size() > 1 && hist_c[1] == XF_DELAYED;
        exp = e1 || e2 || e3 || e4;
        checks++;
        if (need_cmp !== exp) begin
          failures++;
          if (failures < 20) $display("FAIL cycle %0d need=%b exp=%b", cycles, need_cmp, exp);
        end
        if (e1) fired[0]++;
        if (e2) fired[1]++;
        if (e3) fired[2]++;
        if (e4) fired[3]++;
      end
      @(posedge clk);
      pend_valid = lookup_adv;
      pend_class = cls;
      if (lookup_adv) begin
        hist_c.push_front(cls);
        hist_l.push_front(lookup_last);
        first = 0;
      end
      if (flush) first = 1;
      @(negedge clk);
    end
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (fired[i] == 0) begin failures++; $display("FAIL rule %0d never fired", i); end
    end
    $display("rules fired: first=%0d interblock=%0d syscall=%0d branch=%0d",
             fired[0], fired[1], fired[2], fired[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles == 50000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
