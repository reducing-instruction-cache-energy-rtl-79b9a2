// tb_main_memory: behavioural main memory for the cache testbenches.
//
// Holds N uncompressed instructions; byte address A reads word
// (A/4) mod N.  On a one-cycle req it waits a random 2..6 cycles, then
// returns BEATS consecutive words starting at addr, one per mem_rvalid
// cycle with random one-cycle gaps.  One request at a time; requests are
// ignored while rst_n is low (the cache's request output is not yet reset).
module tb_main_memory #(
  parameter int N     = 1024,
  parameter int BEATS = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        req,
  input  logic [31:0] addr,
  output logic        rvalid,
  output logic [31:0] rdata
);
  logic [31:0] prog [N];

  function automatic logic [31:0] word_at(input logic [31:0] a);
    return prog[(a >> 2) % N];
  endfunction

  initial begin
    rvalid = 0;
    rdata  = '0;
    forever begin
      logic [31:0] base;
      @(posedge clk);
      if (rst_n && req) begin
        base = addr;
        repeat ($urandom_range(2, 6)) @(posedge clk);
        for (int b = 0; b < BEATS; b++) begin
          while ($urandom_range(3) == 0) begin
            rvalid <= 0;
            @(posedge clk);
          end
          rvalid <= 1;
          rdata  <= word_at(base + 32'(4 * b));
          @(posedge clk);
        end
        rvalid <= 0;
      end
    end
  end
endmodule
