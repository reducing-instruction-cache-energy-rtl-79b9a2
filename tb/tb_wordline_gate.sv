// tb_wordline_gate: all 64 input combinations against the gating rules:
// the medium local wordline follows the main wordline on a refill
// (write_m) or on a read of a word whose S/M bit is set; the long local
// wordline on a long refill (write_l) or on a read whose M/L bit is set.
// Combinational, one combination per 1 ns step; the equations are the
// parallel-style gating. Ends with a TB_RESULT line; a watchdog stops a hung
// run.
module tb_wordline_gate;
  logic main_wl, rd, write_m, write_l, sm_q, ml_q, lwl_m, lwl_l;
  int checks = 0, failures = 0;

  wordline_gate dut (.*);

  initial begin
    for (int v = 0; v < 64; v++) begin
      bit em, el;
      {main_wl, rd, write_m, write_l, sm_q, ml_q} = 6'(v);
      #1;
      em = 0; el = 0;
      if (main_wl) begin
        if (write_m) em = 1;
        if (rd && sm_q) em = 1;
        if (write_l) el = 1;
        if (rd && ml_q) el = 1;
      end
      checks += 2;
      if (lwl_m !== em) begin failures++; $display("FAIL lwl_m v=%b", v[5:0]); end
      if (lwl_l !== el) begin failures++; $display("FAIL lwl_l v=%b", v[5:0]); end
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
