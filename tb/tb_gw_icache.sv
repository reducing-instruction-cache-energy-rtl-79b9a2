// tb_gw_icache: end-to-end test of the gated-wordline instruction cache at
// its default size (64 lines x 4 words, tag-compare skipping on).
//
// A fetch model walks a random 4 KB program the way a MIPS-II pipeline
// would: sequentially, with every branch or jump redirecting the fetch that
// follows its delay slot (taken to a random target or not taken),
// SYSCALL/BREAK/RFE redirecting at once, occasional exceptions (fetch with
// fetch_restart), bubbles, and now and then a rewrite of part of the
// program followed by invalidate.  Checked for every fetch:
//   * the instruction, its size class and its critical fields against the
//     reference model;
//   * whether the tag array was read, against the tag-compare rules;
//   * hit or miss against a model of the cache contents, the refill
//     address, and the latency (one cycle after acceptance on a hit).
// Counts every mechanism (refill, skipped compare, each compare reason,
// invalidate, restart, each stored size) and fails if one never happened.
// Also reports bits read from the data array against 32 per lookup.
// Runs the cache at its default parameters, 10 ns clock, 30000 fetches; the
// memory model answers after 2..6 cycles with random gaps between beats.
module tb_gw_icache;
  import tb_mips_ref::*;

  localparam int LINES = 64, WORDS = 4, N = 1024;

  logic        clk = 0, rst_n;
  logic        fetch_req, fetch_restart, fetch_ready, invalidate;
  logic [31:0] fetch_addr;
  logic        resp_valid;
  logic [31:0] resp_instr;
  logic [15:0] resp_crit;
  logic [1:0]  resp_size;
  logic        mem_req, mem_rvalid;
  logic [31:0] mem_addr, mem_rdata;
  logic        tag_rd;
  logic [2:0]  seg_rd, seg_wr;

  gw_icache dut (.*);
  tb_main_memory #(.N(N), .BEATS(WORDS)) u_mem (
    .clk(clk), .rst_n(rst_n), .req(mem_req), .addr(mem_addr), .rvalid(mem_rvalid), .rdata(mem_rdata));

  always #5 clk = ~clk;

  int cycles = 0, checks = 0, failures = 0;
  always @(posedge clk) cycles++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 25) $display("FAIL @%0d %s", cycles, what);
    end
  endtask

  // ---------------------------------------------------------------- reference
  typedef enum {C_NONE, C_DELAYED, C_NOW} cls_e;

  function automatic cls_e cls_of(input logic [31:0] i);
    int op, fn;
    op = int'(i[31:26]); fn = int'(i[5:0]);
    if (op == 0 && (fn == 8 || fn == 9))            return C_DELAYED;
    if (op == 0 && (fn == 12 || fn == 13))          return C_NOW;
    if (op inside {1, 2, 3, 4, 5, 6, 7, 20, 21, 22, 23}) return C_DELAYED;
    if (op == 16 && i[25:21] == 16 && fn == 16)     return C_NOW;
    return C_NONE;
  endfunction

  function automatic logic [31:0] canon_at(input logic [31:0] a);
    return ref_canon(u_mem.word_at(a));
  endfunction

  // cache contents model
  bit          m_valid [LINES];
  logic [31:0] m_line  [LINES];   // line address held

  // fetch history (program order)
  cls_e  prev_c, prev2_c;
  bit    prev_last, first;

  typedef struct {
    logic [31:0] addr;
    int          t_acc;
    bit          miss;
  } fetch_t;
  fetch_t inflight[$];

  // counters of mechanisms
  int n_fetch = 0, n_miss = 0, n_skip = 0, n_cmp = 0, n_cmp_seq = 0, n_cmp_br = 0;
  int n_cmp_now = 0, n_inval = 0, n_restart = 0, n_taken = 0;
  int n_size[3] = '{0, 0, 0};
  longint bits_read = 0, bits_base = 0;

  // ---------------------------------------------------------------- response checker
  always @(negedge clk) if (rst_n && resp_valid) begin
    fetch_t f;
    logic [31:0] raw;
    int sz;
    if (inflight.size() == 0) check(0, "response without a fetch");
    else begin
      f = inflight.pop_front();
      raw = u_mem.word_at(f.addr);
      sz  = ref_size(raw);
      check(resp_instr == ref_canon(raw), $sformatf("instr at %h: got %h exp %h",
            f.addr, resp_instr, ref_canon(raw)));
      check(int'(resp_size) == sz, "size class");
      if (sz == 2 && legal_op(int'(raw[31:26])))
        check(resp_crit == {ref_sop(raw[31:26]), raw[25:16]}, "critical fields (long)");
      n_size[sz]++;
      if (!f.miss) check(cycles - f.t_acc == 1, $sformatf("hit latency %0d", cycles - f.t_acc));
      else         check(cycles - f.t_acc > 1 + WORDS, "miss latency");
    end
  end

  // data array activity: bits read
  always @(negedge clk) if (rst_n && seg_rd[0]) begin
    bits_read += 17 + (seg_rd[1] ? 6 : 0) + (seg_rd[2] ? 11 : 0);
    bits_base += 32;   // an uncompressed array reads 32 bits per lookup
  end

  // ---------------------------------------------------------------- fetch model
  logic [31:0] pc, redirect_to;
  bit          redirect_pending, redirect_next;

  task automatic issue_one(input logic [31:0] a, input bit restart);
    bit need, hit, miss;
    int idx;
    logic [31:0] line;
    cls_e c;
    fetch_req = 1; fetch_addr = a; fetch_restart = restart;
    // wait until accepted
    do @(posedge clk); while (!fetch_ready);
    // the edge that accepted it has just happened
    #1;
    fetch_req = 0; fetch_restart = 0;
    n_fetch++;
    need = first || prev_last || prev_c == C_NOW || prev2_c == C_DELAYED || restart;
    idx  = (a >> 4) % LINES;
    line = a & ~32'hF;
    hit  = m_valid[idx] && m_line[idx] == line;
    miss = need && !hit;
    check(tag_rd == need, $sformatf("tag_rd=%b expected %b at %h", tag_rd, need, a));
    if (!need) begin
      check(hit, "skipped compare on a line not present");
      n_skip++;
    end else begin
      n_cmp++;
      if (prev_last)             n_cmp_seq++;
      if (prev2_c == C_DELAYED)  n_cmp_br++;
      if (prev_c == C_NOW)       n_cmp_now++;
    end
    if (miss) begin
      n_miss++;
      m_valid[idx] = 1;
      m_line[idx]  = line;
    end
    inflight.push_back('{addr: a, t_acc: cycles, miss: miss});
    if (miss) begin
      @(posedge clk);
      #1;
      check(mem_req && mem_addr == line, "refill request");
    end
    c = cls_of(canon_at(a));
    prev2_c   = prev_c;
    prev_c    = c;
    prev_last = (a[3:2] == 2'b11);
    first     = 0;
  endtask

  task automatic drain();
    fetch_req = 0;
    while (inflight.size() != 0) @(negedge clk);
    repeat (2) @(negedge clk);
  endtask

  initial begin
    for (int i = 0; i < N; i++) u_mem.prog[i] = rand_instr();
    rst_n = 0; fetch_req = 0; fetch_restart = 0; fetch_addr = '0; invalidate = 0;
    for (int i = 0; i < LINES; i++) m_valid[i] = 0;
    prev_c = C_NONE; prev2_c = C_NONE; prev_last = 0; first = 1;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    pc = 32'h0; redirect_pending = 0; redirect_next = 0;
    for (int k = 0; k < 30000; k++) begin
      logic [31:0] a;
      bit restart;
      cls_e c;
      // occasionally rewrite part of the program and invalidate
      if ($urandom_range(2999) == 0 || k == 15000) begin
        drain();
        for (int j = 0; j < 64; j++) u_mem.prog[$urandom_range(N - 1)] = rand_instr();
        invalidate = 1;
        @(negedge clk);
        invalidate = 0;
        for (int i = 0; i < LINES; i++) m_valid[i] = 0;
        first = 1;
        n_inval++;
      end
      // occasional bubble
      if ($urandom_range(7) == 0) begin fetch_req = 0; @(negedge clk); end
      restart = ($urandom_range(299) == 0);
      if (restart) begin
        a = 32'($urandom_range(N - 1)) << 2;
        redirect_pending = 0; redirect_next = 0;
        n_restart++;
      end else if (redirect_next) begin
        a = redirect_to;
        redirect_next = 0;
      end else a = pc;
      c = cls_of(canon_at(a));
      issue_one(a, restart);
      // program-order successor
      if (redirect_pending) begin
        redirect_pending = 0;
        redirect_next    = 1;
      end
      pc = a + 4;
      if (c == C_DELAYED && !redirect_next) begin
        redirect_pending = 1;
        if ($urandom_range(1) == 0) begin
          redirect_to = 32'($urandom_range(N - 1)) << 2;
          n_taken++;
        end else redirect_to = a + 8;
      end else if (c == C_NOW) begin
        redirect_next = 1;
        redirect_to   = 32'($urandom_range(N - 1)) << 2;
      end
    end
    drain();
    check(n_miss > 0,    "refill happened");
    check(n_skip > 0,    "skipped tag compare happened");
    check(n_cmp_seq > 0, "interblock sequential compare happened");
    check(n_cmp_br > 0,  "branch/jump compare happened");
    check(n_cmp_now > 0, "SYSCALL/BREAK/RFE compare happened");
    check(n_inval > 0,   "invalidate happened");
    check(n_restart > 0, "restart happened");
    check(n_size[0] > 0 && n_size[1] > 0 && n_size[2] > 0, "all three sizes read");
    $display("fetches=%0d misses=%0d compares=%0d skipped=%0d (seq=%0d branch=%0d now=%0d)",
             n_fetch, n_miss, n_cmp, n_skip, n_cmp_seq, n_cmp_br, n_cmp_now);
    $display("invalidates=%0d restarts=%0d taken=%0d sizes short=%0d medium=%0d long=%0d",
             n_inval, n_restart, n_taken, n_size[0], n_size[1], n_size[2]);
    $display("bits read %0d of %0d (ratio %0.2f%%)", bits_read, bits_base,
             100.0 * real'(bits_read) / real'(bits_base));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles == 400000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
