// gw_data_bank: one instruction-wide sub-bank of the gated-wordline data array.
//
// Each row stores one instruction in three segments (layout in gw_pkg):
// the short segment with the S/M cell on the main wordline, the medium
// segment with the M/L cell on the first local wordline, and the long
// segment on the second local wordline.  A wordline_gate per row turns the
// local wordlines on only when the stored size bits (read) or the refill's
// write_m/write_l signals (write) call for them, so a short instruction
// swings only the bitlines of its 17 cells.
// The cache splits its lines into one such bank per instruction word and
// enables only the bank holding the requested word (sub-banking).
//
// Read: combinational from the main wordlines; segments whose wordline stays
// off read as zero.  Write: on the rising clock edge.  On a refill the M/L
// cell is always written, the medium data cells only when the new S/M bit is
// set (otherwise their bitlines are held and the cells keep their state), the
// long cells only when the instruction is long.  seg_rd/seg_wr report which
// segments were accessed, for energy accounting.  The storage is an array of
// flip-flops standing in for SRAM cells; it has no reset.
// The three-segment row, the always-written M/L cell and the conditional
// medium/long writes follow the described 3-size array; the one-bank-per-word
// split, the zero read-out of idle segments and the activity outputs are this
// design's choices.
module gw_data_bank
  import gw_pkg::*;
#(
  parameter int unsigned ROWS = 64
) (
  input  logic            clk,
  input  logic [ROWS-1:0] wl,       // one-hot main wordlines (bank enable applied)
  input  logic            rd,       // read access
  input  logic            wr,       // refill write
  input  stored_t         wdata,    // compressed instruction to store
  output stored_t         rdata,    // segments read out (gated ones zero)
  output logic [2:0]      seg_rd,   // segments read: [0] short, [1] medium, [2] long
  output logic [2:0]      seg_wr    // segments written: same order ([1] = M/L cell)
);

  logic [SHORT_W:0]  short_q [ROWS];   // {s, sm}
  logic              ml_q    [ROWS];
  logic [MED_W-1:0]  med_q   [ROWS];
  logic [LONG_W-1:0] long_q  [ROWS];

  logic [ROWS-1:0] lwl_m, lwl_l;
  logic            write_m, write_l;

  assign write_m = wr;                         // M/L cell rewritten on every refill
  assign write_l = wr && wdata.sm && wdata.ml; // long segment only for long words

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    wordline_gate u_gate (
      .main_wl (wl[r]),
      .rd      (rd),
      .write_m (write_m),
      .write_l (write_l),
      .sm_q    (short_q[r][0]),
      .ml_q    (ml_q[r]),
      .lwl_m   (lwl_m[r]),
      .lwl_l   (lwl_l[r])
    );
  end

  always_ff @(posedge clk) begin
    for (int r = 0; r < ROWS; r++) begin
      if (wr && wl[r])    short_q[r] <= {wdata.s, wdata.sm};
      if (wr && lwl_m[r]) begin
        ml_q[r] <= wdata.ml;
        if (wdata.sm) med_q[r] <= wdata.m;
      end
      if (wr && lwl_l[r]) long_q[r] <= wdata.l;
    end
  end

  always_comb begin
    logic [SHORT_W:0] sh;
    rdata = '0;
    sh    = '0;
    for (int r = 0; r < ROWS; r++) begin
      if (rd && wl[r])    sh       = sh | short_q[r];
      if (rd && lwl_m[r]) begin
        rdata.ml = rdata.ml | ml_q[r];
        rdata.m  = rdata.m  | med_q[r];
      end
      if (rd && lwl_l[r]) rdata.l  = rdata.l  | long_q[r];
    end
    rdata.s  = sh[SHORT_W:1];
    rdata.sm = sh[0];
  end

  assign seg_rd = {rd && |lwl_l, rd && |lwl_m, rd && |wl};
  assign seg_wr = {wr && |lwl_l, wr && |lwl_m, wr && |wl};

endmodule
