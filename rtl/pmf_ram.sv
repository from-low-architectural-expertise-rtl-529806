// pmf_ram: a local message array partitioned cyclically into 2^m BRAM banks.
//
// The flat array holds DEPTH pmfs of 2^m Q8.7 words each, pmf r occupying flat indices
// r*2^m .. r*2^m + 2^m - 1. Cyclic partitioning by 2^m puts flat element i into bank
// (i mod 2^m) at address floor(i / 2^m), so element x of every pmf lives in bank x and one
// access at the same address in all banks moves a whole pmf. Each bank is dual-ported, so
// the array offers 2 x 2^m word ports, grouped here into two pmf-wide ports. Timing is that
// of bram_bank: one cycle read latency, read-first. The partitioning scheme and its
// factor follow the document; grouping the bank ports into whole-pmf ports is this design's
// way of using them.
module pmf_ram
  import nbldpc_pkg::*;
#(
  parameter int unsigned GF_M  = 2,
  parameter int unsigned DEPTH = 768,
  parameter int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned Q    = 1 << GF_M
) (
  input  logic                       clk,
  input  logic [1:0]                 en,
  input  logic [1:0]                 we,
  input  logic [1:0][AW-1:0]         addr,
  input  logic [1:0][Q-1:0][MSG_W-1:0] wdata,
  output logic [1:0][Q-1:0][MSG_W-1:0] rdata
);
  for (genvar x = 0; x < Q; x++) begin : g_bank
    logic [1:0][MSG_W-1:0] bank_wdata;
    logic [1:0][MSG_W-1:0] bank_rdata;
    assign bank_wdata[0] = wdata[0][x];
    assign bank_wdata[1] = wdata[1][x];
    bram_bank #(.DEPTH(DEPTH), .W(MSG_W), .AW(AW)) u_bank (
      .clk  (clk),
      .en   (en),
      .we   (we),
      .addr (addr),
      .wdata(bank_wdata),
      .rdata(bank_rdata)
    );
    assign rdata[0][x] = bank_rdata[0];
    assign rdata[1][x] = bank_rdata[1];
  end
endmodule
