// tag_array: address tags and valid bits of the direct-mapped cache.
//
// Shares the main wordlines of the data array (one row decoder serves both).
// When rd is high the selected row's tag and valid bit are read and
// compared with cmp_tag; hit is valid && equal.  When rd is low the array
// stays in precharge and hit is low.  A refill writes the row's tag and sets
// its valid bit on the rising edge.  Reset and invalidate clear every valid
// bit (invalidate wins over a write in the same cycle only for the other
// rows; the written row becomes valid).  Read and compare are combinational.
// Interface: one-hot wl from the shared row decoder, rd/cmp_tag for a
// compare, wr/wtag for a refill, inval, hit out.  The hit rule (match and
// valid) and the idle array when no compare is needed follow the described
// cache; the single-cycle flash invalidate and the synchronous reset are this
// design's choices.
module tag_array #(
  parameter int unsigned ROWS  = 64,
  parameter int unsigned TAG_W = 22
) (
  input  logic             clk,
  input  logic             rst_n,     // synchronous, active low
  input  logic [ROWS-1:0]  wl,        // one-hot main wordlines
  input  logic             rd,        // compare this cycle
  input  logic [TAG_W-1:0] cmp_tag,   // tag bits of the fetch address
  input  logic             wr,        // refill: write tag, set valid
  input  logic [TAG_W-1:0] wtag,
  input  logic             inval,     // clear all valid bits
  output logic             hit
);

  logic [TAG_W-1:0] tag_q [ROWS];
  logic [ROWS-1:0]  valid_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      valid_q <= '0;
    end else begin
      if (inval) valid_q <= '0;
      for (int r = 0; r < ROWS; r++)
        if (wr && wl[r]) valid_q[r] <= 1'b1;
    end
    for (int r = 0; r < ROWS; r++)
      if (wr && wl[r]) tag_q[r] <= wtag;
  end

  always_comb begin
    logic [TAG_W-1:0] t;
    logic             v;
    t = '0;
    v = 1'b0;
    for (int r = 0; r < ROWS; r++)
      if (wl[r]) begin
        t = t | tag_q[r];
        v = v | valid_q[r];
      end
    hit = rd && v && (t == cmp_tag);
  end

endmodule
