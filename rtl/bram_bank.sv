// bram_bank: one true dual-port block RAM bank.
//
// Two independent ports, each able to read or write one word per clock. Reads are
// synchronous with one cycle of latency and return the old contents when the same port
// writes the same address (read-first). If both ports write one address in the same cycle,
// port 1 wins. The memory is not reset; the decoder always fills a bank before reading it.
// The document asks for dual-ported BRAM for every local array; the read-first behaviour and
// the write collision rule are this design's choices.
module bram_bank #(
  parameter int unsigned DEPTH = 768,
  parameter int unsigned W     = 8,
  parameter int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic                clk,
  input  logic [1:0]          en,
  input  logic [1:0]          we,
  input  logic [1:0][AW-1:0]  addr,
  input  logic [1:0][W-1:0]   wdata,
  output logic [1:0][W-1:0]   rdata
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    for (int p = 0; p < 2; p++) begin
      if (en[p]) begin
        rdata[p] <= mem[addr[p]];
        if (we[p]) mem[addr[p]] <= wdata[p];
      end
    end
  end
endmodule
