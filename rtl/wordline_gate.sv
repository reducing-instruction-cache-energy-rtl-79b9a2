// wordline_gate: local wordline control for one row of a 3-size data array.
//
// The main wordline reaches the short segment and the S/M cell directly.  Two
// local wordlines serve the medium segment (with the M/L cell) and the long
// segment.  This is the faster of the two described circuit styles, where
// both local wordlines work in parallel off the main wordline:
//   read : medium local wordline when the stored S/M bit is set,
//          long local wordline   when the stored M/L bit is set;
//   write: medium local wordline whenever write_m is on (every refill, so
//          the M/L cell is always rewritten), long local wordline when
//          write_l is on (long instructions only).
// Because the long wordline looks only at the M/L cell, the M/L cell must be
// rewritten on every refill; the caller keeps write_m on for that reason.
// Purely combinational; one instance per row.
// The gating equations follow the described parallel (two-metal) style; the
// signal names rd/write_m/write_l and the per-row module boundary are this
// design's choices.
module wordline_gate (
  input  logic main_wl,   // decoded main wordline of this row
  input  logic rd,        // read access
  input  logic write_m,   // refill: medium segment / M/L cell write enable
  input  logic write_l,   // refill: long segment write enable
  input  logic sm_q,      // stored S/M bit of this row
  input  logic ml_q,      // stored M/L bit of this row
  output logic lwl_m,     // local wordline, medium segment + M/L cell
  output logic lwl_l      // local wordline, long segment
);

  assign lwl_m = main_wl && (write_m || (rd && sm_q));
  assign lwl_l = main_wl && (write_l || (rd && ml_q));

endmodule
