// tag_compare_ctrl: decides, fetch by fetch, whether the tag must be compared.
//
// Within a line, sequential fetches share the tag, so the tag array can stay
// in precharge.  A compare is requested only when the fetch may be in another
// line:
//   * interblock sequential flow: the previous fetch was the last word of its
//     line (its word-offset bits of the PC all ones);
//   * the fetch two before was a branch or jump (the target follows the
//     delay slot).  Taken or not is not known in time, so every branch and
//     jump counts;
//   * the previous fetch was SYSCALL, BREAK or RFE (no delay slot);
//   * the first fetch after reset or invalidate.
// The history is kept in fetch order: out_valid/out_class describe the
// instruction in the cache output latches this cycle, which is always the
// fetch just before the one in the lookup stage; older classes are shifted
// into h1/h2 as they leave the latches.  Fetches must come in program order
// (the cache's fetch_restart input covers exceptions).  need_cmp is
// combinational for the fetch in the lookup stage.
// The three compare rules follow the described reduced-tag-compare scheme;
// forcing a compare after reset and invalidate, and reading the class from
// the output latches, are this design's choices.
module tag_compare_ctrl
  import gw_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,         // synchronous, active low
  input  logic  out_valid,     // an instruction is in the output latches
  input  xfer_e out_class,     // its control-transfer class
  input  logic  lookup_adv,    // the looked-up fetch completes this cycle
  input  logic  lookup_last,   // ... and it is the last word of its line
  input  logic  flush,         // invalidate: next fetch must compare
  output logic  need_cmp       // compare needed for the fetch in lookup
);

  xfer_e h1, h2;               // classes of the last and second-last delivered
  logic  prev_last;            // previous fetch was the last word of its line
  logic  first;                // no fetch since reset / invalidate

  xfer_e n1, n2;               // classes of fetches n-1 and n-2

  assign n1 = out_valid ? out_class : h1;
  assign n2 = out_valid ? h1 : h2;

  assign need_cmp = first || prev_last || (n1 == XF_NOW) || (n2 == XF_DELAYED);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      h1        <= XF_NONE;
      h2        <= XF_NONE;
      prev_last <= 1'b0;
      first     <= 1'b1;
    end else begin
      if (out_valid) begin
        h1 <= out_class;
        h2 <= h1;
      end
      if (lookup_adv) begin
        prev_last <= lookup_last;
        first     <= 1'b0;
      end
      if (flush) first <= 1'b1;
    end
  end

endmodule
