// nbldpc_system: multi-decoder non-binary LDPC accelerator.
//
// K independent decoder cores each decode their own codeword from their own local arrays.
// All cores share two DRAM channels: the input channel, from whose memory each core
// burst-reads its frame of m_cv, m_vc and m_v (2E + N pmf words) at rd_base[i], and the
// output channel, to whose memory it burst-writes the N a-posteriori pmfs m_v* at
// wr_base[i]. A core needs a channel only during its prologue and epilogue, so one round-robin
// burst_arbiter per channel lets the cores use it one whole burst after another (staggered
// access) while the others compute. Keeping inputs and outputs on separate memories follows
// the document's system, as does the replication count (14 cores for GF(4)); the DRAM
// controllers themselves are outside this design and their channels are the ports below.
//
// Interface: per core, start[i] (pulse) begins a job with the frame addresses rd_base[i],
// wr_base[i]; done[i] pulses when its m_v* has been written; busy[i] is high in between.
// Read channel: request valid/ready with address and length in words, then length beats
// on rd_data with rd_data_valid (no back-pressure). Write channel: request valid/ready with
// address and length, then length beats with wr_data_valid/wr_data_ready. One word is one
// pmf of 2^m Q8.7 values, element x in bits [8x+7:8x].
module nbldpc_system
  import nbldpc_pkg::*;
#(
  parameter int unsigned GF_M    = 2,
  parameter int unsigned N       = 384,
  parameter int unsigned DV      = 2,
  parameter int unsigned DC      = 3,
  parameter int unsigned ITERS   = 10,
  parameter int unsigned K       = 14,
  parameter code_e       CODE    = CODE_GEN,
  parameter int unsigned DRAM_AW = 32,
  parameter int unsigned LEN_W   = 16,
  localparam int unsigned Q      = 1 << GF_M,
  localparam int unsigned PW     = Q * MSG_W,
  localparam int unsigned KW     = (K > 1) ? $clog2(K) : 1
) (
  input  logic                            clk,
  input  logic                            rst_n,
  // job control, one set per core
  input  logic [K-1:0]                    start,
  input  logic [K-1:0][DRAM_AW-1:0]       rd_base,
  input  logic [K-1:0][DRAM_AW-1:0]       wr_base,
  output logic [K-1:0]                    busy,
  output logic [K-1:0]                    done,
  // input DRAM read channel
  output logic                            rd_req_valid,
  input  logic                            rd_req_ready,
  output logic [DRAM_AW-1:0]              rd_req_addr,
  output logic [LEN_W-1:0]                rd_req_len,
  input  logic                            rd_data_valid,
  input  logic [PW-1:0]                   rd_data,
  // output DRAM write channel
  output logic                            wr_req_valid,
  input  logic                            wr_req_ready,
  output logic [DRAM_AW-1:0]              wr_req_addr,
  output logic [LEN_W-1:0]                wr_req_len,
  output logic                            wr_data_valid,
  input  logic                            wr_data_ready,
  output logic [PW-1:0]                   wr_data
);
  logic [K-1:0]               c_rd_req_valid, c_rd_req_ready, c_rd_data_valid;
  logic [K-1:0][DRAM_AW-1:0]  c_rd_req_addr, c_wr_req_addr;
  logic [K-1:0][LEN_W-1:0]    c_rd_req_len, c_wr_req_len;
  logic [K-1:0]               c_wr_req_valid, c_wr_req_ready, c_wr_data_valid, c_wr_data_ready;
  logic [K-1:0][PW-1:0]       c_wr_data;
  logic [KW-1:0]              rd_sel, wr_sel;
  logic                       rd_locked, wr_locked;

  for (genvar i = 0; i < K; i++) begin : g_core
    phase_e                     phase;
    logic [$clog2(ITERS+1)-1:0] iter;
    decoder_core #(
      .GF_M(GF_M), .N(N), .DV(DV), .DC(DC), .ITERS(ITERS), .CODE(CODE),
      .DRAM_AW(DRAM_AW), .LEN_W(LEN_W)
    ) u_core (
      .clk(clk), .rst_n(rst_n), .start(start[i]), .busy(busy[i]), .done(done[i]),
      .phase(phase), .iter(iter), .rd_base(rd_base[i]), .wr_base(wr_base[i]),
      .rd_req_valid(c_rd_req_valid[i]), .rd_req_ready(c_rd_req_ready[i]),
      .rd_req_addr(c_rd_req_addr[i]), .rd_req_len(c_rd_req_len[i]),
      .rd_data_valid(c_rd_data_valid[i]), .rd_data(rd_data),
      .wr_req_valid(c_wr_req_valid[i]), .wr_req_ready(c_wr_req_ready[i]),
      .wr_req_addr(c_wr_req_addr[i]), .wr_req_len(c_wr_req_len[i]),
      .wr_data_valid(c_wr_data_valid[i]), .wr_data_ready(c_wr_data_ready[i]),
      .wr_data(c_wr_data[i]));
    assign c_rd_data_valid[i] = rd_data_valid && rd_locked && (int'(rd_sel) == i);
    assign c_wr_data_ready[i] = wr_data_ready && wr_locked && (int'(wr_sel) == i);
  end

  burst_arbiter #(.K(K), .LEN_W(LEN_W)) u_rd_arb (
    .clk(clk), .rst_n(rst_n), .req_valid(c_rd_req_valid), .req_len(c_rd_req_len),
    .req_ready(c_rd_req_ready), .down_valid(rd_req_valid), .down_ready(rd_req_ready),
    .beat(rd_data_valid && rd_locked), .sel(rd_sel), .locked(rd_locked));

  burst_arbiter #(.K(K), .LEN_W(LEN_W)) u_wr_arb (
    .clk(clk), .rst_n(rst_n), .req_valid(c_wr_req_valid), .req_len(c_wr_req_len),
    .req_ready(c_wr_req_ready), .down_valid(wr_req_valid), .down_ready(wr_req_ready),
    .beat(wr_data_valid && wr_data_ready), .sel(wr_sel), .locked(wr_locked));

  assign rd_req_addr   = c_rd_req_addr[rd_sel];
  assign rd_req_len    = c_rd_req_len[rd_sel];
  assign wr_req_addr   = c_wr_req_addr[wr_sel];
  assign wr_req_len    = c_wr_req_len[wr_sel];
  assign wr_data_valid = wr_locked && c_wr_data_valid[wr_sel];
  assign wr_data       = c_wr_data[wr_sel];
endmodule
