// dram_model: behavioural model of the two DRAM channels seen by the decoder system.
//
// Not synthesizable. The input memory answers a read request with LEN beats after a
// latency of a few cycles, with random idle cycles between beats. The output memory accepts
// a write request and then takes beats with a randomly toggling ready. Request-ready is
// also random; with SLOW_WR the write channel is much slower than the read channel. Counters report how often the channel stalled. Word addresses; memories of
// WORDS words each; testbenches fill in_mem and read out_mem hierarchically.
module dram_model #(
  parameter int unsigned PW      = 32,
  parameter int unsigned DRAM_AW = 32,
  parameter int unsigned LEN_W   = 16,
  parameter int unsigned WORDS   = 4096,
  parameter int unsigned LATENCY = 6,
  parameter bit          SLOW_WR = 1'b0   // write-ready high only one cycle in ten
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               rd_req_valid,
  output logic               rd_req_ready,
  input  logic [DRAM_AW-1:0] rd_req_addr,
  input  logic [LEN_W-1:0]   rd_req_len,
  output logic               rd_data_valid,
  output logic [PW-1:0]      rd_data,
  input  logic               wr_req_valid,
  output logic               wr_req_ready,
  input  logic [DRAM_AW-1:0] wr_req_addr,
  input  logic [LEN_W-1:0]   wr_req_len,
  input  logic               wr_data_valid,
  output logic               wr_data_ready,
  input  logic [PW-1:0]      wr_data
);
  logic [PW-1:0] in_mem  [WORDS];
  logic [PW-1:0] out_mem [WORDS];
  int rd_left, rd_addr, rd_wait, wr_left, wr_addr;
  int rd_gaps, wr_stalls, rd_bursts, wr_bursts;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_req_ready  <= 1'b0;
      wr_req_ready  <= 1'b0;
      rd_data_valid <= 1'b0;
      rd_data       <= '0;
      wr_data_ready <= 1'b0;
      rd_left <= 0; wr_left <= 0; rd_wait <= 0; rd_addr <= 0; wr_addr <= 0;
      rd_gaps <= 0; wr_stalls <= 0; rd_bursts <= 0; wr_bursts <= 0;
    end else begin
      // read channel
      rd_data_valid <= 1'b0;
      rd_req_ready  <= (rd_left == 0) && ($urandom_range(3) != 0);
      if (rd_req_valid && rd_req_ready) begin
        rd_left      <= int'(rd_req_len);
        rd_addr      <= int'(rd_req_addr);
        rd_wait      <= int'(LATENCY);
        rd_req_ready <= 1'b0;
        rd_bursts    <= rd_bursts + 1;
      end else if (rd_left > 0) begin
        rd_req_ready <= 1'b0;
        if (rd_wait > 0) rd_wait <= rd_wait - 1;
        else if ($urandom_range(7) == 0) rd_gaps <= rd_gaps + 1;
        else begin
          rd_data_valid <= 1'b1;
          rd_data       <= in_mem[rd_addr % int'(WORDS)];
          rd_addr       <= rd_addr + 1;
          rd_left       <= rd_left - 1;
        end
      end
      // write channel
      wr_req_ready <= (wr_left == 0) && ($urandom_range(3) != 0);
      if (wr_req_valid && wr_req_ready) begin
        wr_left      <= int'(wr_req_len);
        wr_addr      <= int'(wr_req_addr);
        wr_req_ready <= 1'b0;
        wr_bursts    <= wr_bursts + 1;
      end
      if (wr_data_valid && wr_data_ready) begin
        out_mem[wr_addr % int'(WORDS)] <= wr_data;
        wr_addr <= wr_addr + 1;
        wr_left <= wr_left - 1;
      end
      if (wr_data_valid && !wr_data_ready) wr_stalls <= wr_stalls + 1;
      wr_data_ready <= SLOW_WR ? ($urandom_range(9) == 0) : ($urandom_range(4) != 0);
    end
  end
endmodule
