// row_decoder: the cache row decoder that drives one main wordline per row.
//
// The index is split into bit pairs; each pair goes through a 2-to-4
// predecoder that produces a 1-of-4 code from the true and complement address
// bits.  Each row then combines one output of every predecoder, so exactly
// one wordline is high while the decoder is enabled (and none otherwise).
// This is the structure of the four-stage decoder of the reference cache
// (decoder drivers, 2-to-4 predecode, buffers, final per-row gate, wordline
// driver); buffering stages have no logic function and are not modelled.
// An odd index width gets a 1-to-2 predecoder for its top bit.
// Purely combinational.
// Interface: en and idx in, one-hot wl out, no clock.  The 2-to-4
// predecode grouping follows the described decoder; the enable input and the
// handling of odd widths are this design's choices.
module row_decoder #(
  parameter int unsigned IDX_W = 6            // index bits; 2**IDX_W rows
) (
  input  logic                  en,           // access this cycle
  input  logic [IDX_W-1:0]      idx,          // row index
  output logic [(1<<IDX_W)-1:0] wl            // one-hot main wordlines
);

  localparam int unsigned NG   = (IDX_W + 1) / 2;   // number of predecoders
  localparam int unsigned ROWS = 1 << IDX_W;

  logic [2*NG-1:0]  idx_p;                  // index padded to an even width
  logic [NG-1:0][3:0] pre;                  // 1-of-4 predecoder outputs

  assign idx_p = (2*NG)'(idx);

  always_comb begin
    for (int g = 0; g < NG; g++) begin
      pre[g][0] = !idx_p[2*g+1] && !idx_p[2*g];
      pre[g][1] = !idx_p[2*g+1] &&  idx_p[2*g];
      pre[g][2] =  idx_p[2*g+1] && !idx_p[2*g];
      pre[g][3] =  idx_p[2*g+1] &&  idx_p[2*g];
    end
  end

  always_comb begin
    for (int r = 0; r < ROWS; r++) begin
      logic sel;
      sel = en;
      for (int g = 0; g < NG; g++)
        sel = sel && pre[g][(r >> (2*g)) & 3];
      wl[r] = sel;
    end
  end

endmodule
