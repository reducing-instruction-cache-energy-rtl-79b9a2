// gw_icache: direct-mapped instruction cache with an in-cache compressed
// instruction format read through gated wordlines.
//
// Most MIPS-II instructions do not need all 32 bits.  On a refill every word
// coming from memory passes through gw_compressor and is stored short
// (17 bits), medium (23 bits) or long (34 bits) with its S/M and M/L bits.
// Every word still owns 34 cells, but on a read the stored size bits switch
// on only the local wordlines of the segments in use, so fewer bitlines
// swing.  The output latches hold the stored word; the opcode, rs and rt
// slots (resp_crit) go straight to the decoder and gw_decompressor rebuilds
// the full instruction (resp_instr).
//
// Organisation (defaults): 64 lines x 4 words = 1 KB of instructions, 16-byte
// lines, 22-bit tags.  The data array is split into one bank per word; a
// fetch enables only the bank of its word.  One row_decoder drives the main
// wordlines of the tag array and all banks.  tag_compare_ctrl lets the tag
// array stay idle when the fetch is known to be in the same line as the one
// before (set TAG_SKIP to 0 to compare on every fetch).
//
// Timing.  A fetch is accepted on a clock edge when fetch_req && fetch_ready.
// In the next cycle (lookup) the tag and data arrays are read from the
// registered address; on a hit the word is captured into the output latches
// and appears on resp_* one cycle later, i.e. two edges after acceptance.
// Fetches pipeline at one per cycle.  On a miss fetch_ready drops, mem_req
// pulses one cycle with the line address, memory returns WORDS beats on
// mem_rvalid (word 0 first, any gaps), each is compressed and written as it
// arrives, the tag is written with the last beat, and the lookup is replayed
// with a forced tag compare.  invalidate clears every valid bit; it may come
// in any cycle (a refill under way still completes and validates its line).
//
// The split into banks, the memory handshake, the latency and the restart
// input are this design's choices; the 3-size format, the gating rules, the
// cache geometry and the tag-compare rules follow the reference design.
module gw_icache
  import gw_pkg::*;
#(
  parameter int unsigned LINES    = 64,   // rows of the arrays
  parameter int unsigned WORDS    = 4,    // instructions per line
  parameter bit          TAG_SKIP = 1'b1  // skip tag compares within a line
) (
  input  logic        clk,
  input  logic        rst_n,          // synchronous, active low
  // fetch side
  input  logic        fetch_req,
  input  logic [31:0] fetch_addr,     // byte address, word aligned
  input  logic        fetch_restart,  // not the program-order successor
  output logic        fetch_ready,
  input  logic        invalidate,
  output logic        resp_valid,
  output logic [31:0] resp_instr,     // decompressed instruction
  output logic [15:0] resp_crit,      // stored opcode / rs slot / rt slot
  output logic [1:0]  resp_size,      // 0 short, 1 medium, 2 long
  // refill side
  output logic        mem_req,
  output logic [31:0] mem_addr,       // byte address of the line (low bits 0)
  input  logic        mem_rvalid,
  input  logic [31:0] mem_rdata,
  // array activity, for energy accounting
  output logic        tag_rd,
  output logic [2:0]  seg_rd,
  output logic [2:0]  seg_wr
);

  localparam int unsigned IDX_W = $clog2(LINES);
  localparam int unsigned OFF_W = (WORDS > 1) ? $clog2(WORDS) : 1;
  localparam int unsigned TAG_W = 32 - IDX_W - $clog2(WORDS) - 2;

  typedef enum logic {ST_RUN, ST_REFILL} state_e;

  state_e      state;
  logic        s1_valid;              // lookup stage holds a fetch
  logic [31:0] s1_addr;
  logic        s1_force;              // restart or replay: compare the tag
  logic [OFF_W-1:0] beat;             // refill beat counter

  logic [IDX_W-1:0] idx;
  logic [OFF_W-1:0] word;
  logic [TAG_W-1:0] tag;

  assign idx  = s1_addr[2 + $clog2(WORDS) +: IDX_W];
  assign word = (WORDS > 1) ? OFF_W'(s1_addr[2 +: OFF_W]) : '0;
  assign tag  = s1_addr[31 -: TAG_W];

  // ------------------------------------------------------------ lookup
  logic       lookup;                 // arrays accessed for a fetch
  logic       need_cmp, ctrl_need;
  logic       tag_hit, hit, adv, miss;
  logic       refill_beat, refill_last;

  assign lookup      = (state == ST_RUN) && s1_valid;
  assign need_cmp    = !TAG_SKIP || ctrl_need || s1_force;
  assign tag_rd      = lookup && need_cmp;
  assign hit         = need_cmp ? tag_hit : 1'b1;
  assign adv         = lookup && hit;
  assign miss        = lookup && !hit;
  assign refill_beat = (state == ST_REFILL) && mem_rvalid;
  assign refill_last = refill_beat && (beat == OFF_W'(WORDS - 1));
  assign fetch_ready = (state == ST_RUN) && (!s1_valid || hit);

  // ------------------------------------------------------------ arrays
  logic [LINES-1:0] wl;

  row_decoder #(.IDX_W(IDX_W)) u_dec (
    .en  (lookup || refill_beat),
    .idx (idx),
    .wl  (wl)
  );

  tag_array #(.ROWS(LINES), .TAG_W(TAG_W)) u_tags (
    .clk     (clk),
    .rst_n   (rst_n),
    .wl      (wl),
    .rd      (tag_rd),
    .cmp_tag (tag),
    .wr      (refill_last),
    .wtag    (tag),
    .inval   (invalidate),
    .hit     (tag_hit)
  );

  stored_t wdata;
  size_e   wsize;

  gw_compressor u_comp (
    .instr (mem_rdata),
    .st    (wdata),
    .size  (wsize)
  );

  stored_t    bank_rdata [WORDS];
  logic [2:0] bank_seg_rd [WORDS];
  logic [2:0] bank_seg_wr [WORDS];

  for (genvar b = 0; b < WORDS; b++) begin : g_bank
    logic sel_rd, sel_wr;
    assign sel_rd = lookup && (word == OFF_W'(b));
    assign sel_wr = refill_beat && (beat == OFF_W'(b));
    gw_data_bank #(.ROWS(LINES)) u_bank (
      .clk    (clk),
      .wl     ((sel_rd || sel_wr) ? wl : '0),
      .rd     (sel_rd),
      .wr     (sel_wr),
      .wdata  (wdata),
      .rdata  (bank_rdata[b]),
      .seg_rd (bank_seg_rd[b]),
      .seg_wr (bank_seg_wr[b])
    );
  end

  stored_t rd_word;
  always_comb begin
    rd_word = '0;
    seg_rd  = '0;
    seg_wr  = '0;
    for (int b = 0; b < WORDS; b++) begin
      rd_word = rd_word | bank_rdata[b];
      seg_rd  = seg_rd  | bank_seg_rd[b];
      seg_wr  = seg_wr  | bank_seg_wr[b];
    end
  end

  // ------------------------------------------------------------ output latches
  logic    out_valid;
  stored_t out_st;

  always_ff @(posedge clk) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= adv;
    if (adv) out_st <= rd_word;
  end

  gw_decompressor u_decomp (
    .st    (out_st),
    .instr (resp_instr)
  );

  assign resp_valid = out_valid;
  assign resp_crit  = out_st.s;
  assign resp_size  = !out_st.sm ? SZ_SHORT : (!out_st.ml ? SZ_MEDIUM : SZ_LONG);

  // ------------------------------------------------------------ tag compare control
  tag_compare_ctrl u_tcc (
    .clk         (clk),
    .rst_n       (rst_n),
    .out_valid   (out_valid),
    .out_class   (xfer_class(resp_instr[31:26], resp_instr[25:21], resp_instr[5:0])),
    .lookup_adv  (adv),
    .lookup_last (word == OFF_W'(WORDS - 1)),
    .flush       (invalidate),
    .need_cmp    (ctrl_need)
  );

  // ------------------------------------------------------------ control
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= ST_RUN;
      s1_valid <= 1'b0;
      s1_force <= 1'b0;
      s1_addr  <= '0;
      beat     <= '0;
      mem_req  <= 1'b0;
      mem_addr <= '0;
    end else begin
      mem_req <= 1'b0;
      unique case (state)
        ST_RUN: begin
          if (fetch_req && fetch_ready) begin
            s1_valid <= 1'b1;
            s1_addr  <= fetch_addr;
            s1_force <= fetch_restart;
          end else if (adv) begin
            s1_valid <= 1'b0;
          end
          if (miss) begin
            state    <= ST_REFILL;
            beat     <= '0;
            mem_req  <= 1'b1;
            mem_addr <= {s1_addr[31:2 + $clog2(WORDS)], {($clog2(WORDS) + 2){1'b0}}};
          end
        end
        ST_REFILL: begin
          if (refill_beat) beat <= beat + 1'b1;
          if (refill_last) begin
            state    <= ST_RUN;
            s1_force <= 1'b1;     // replay the lookup, compare the new tag
          end
        end
        default: state <= ST_RUN;
      endcase
    end
  end

  // Memory answers only a refill that is under way; fetches are word
  // aligned; the size class from the compressor matches its size bits.
  always_ff @(posedge clk)
    if (rst_n) begin
      assert (!(mem_rvalid && state != ST_REFILL))
        else $error("mem_rvalid outside a refill");
      assert (!(lookup && s1_addr[1:0] != 2'b00))
        else $error("fetch address not word aligned");
      assert (!(refill_beat && wsize != (!wdata.sm ? SZ_SHORT : (!wdata.ml ? SZ_MEDIUM : SZ_LONG))))
        else $error("compressor size class disagrees with its size bits");
    end

endmodule
