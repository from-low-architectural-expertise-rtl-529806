// burst_dma: prologue and epilogue burst transfers between DRAM and one core's arrays.
//
// Prologue (start_in): one read burst of 2E + N pmf words from rd_base, laid out as
// m_cv (E words), m_vc (E words), m_v (N words), the order in which the input DRAM holds
// them. Each returning beat is written straight into row b of the matching local array
// through its port 0, so the core accepts one beat per clock and never back-pressures the
// read data. done_in pulses the cycle after the last beat is written.
//
// Epilogue (start_out): one write burst of N pmf words to wr_base, carrying the
// a-posteriori pmfs m_v* that the APP phase left in l_mv. Rows are read through port 0 of
// l_mv into a two-entry buffer that absorbs the one-cycle read latency, so the burst streams
// one beat per clock while wr_data_ready stays high. Data is offered only after the
// request has been accepted. done_out pulses the cycle after the last beat is accepted.
//
// Both DRAM channels use a valid/ready request (address, length in words) followed by the
// data beats; read data has a valid but no ready. One DRAM word holds one pmf (2^m Q8.7
// words). The document specifies burst copies in and out of local storage and which data
// each DRAM holds; the channel signalling, the word size and the layout are this design's.
module burst_dma
  import nbldpc_pkg::*;
#(
  parameter int unsigned GF_M    = 2,
  parameter int unsigned N       = 384,
  parameter int unsigned DV      = 2,
  parameter int unsigned DRAM_AW = 32,
  parameter int unsigned LEN_W   = 16,
  localparam int unsigned Q      = 1 << GF_M,
  localparam int unsigned E      = N * DV,
  localparam int unsigned AW     = (E > 1) ? $clog2(E) : 1,
  localparam int unsigned PW     = Q * MSG_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start_in,
  output logic                done_in,
  input  logic                start_out,
  output logic                done_out,
  output logic                busy,
  input  logic [DRAM_AW-1:0]  rd_base,
  input  logic [DRAM_AW-1:0]  wr_base,
  // input DRAM read channel
  output logic                rd_req_valid,
  input  logic                rd_req_ready,
  output logic [DRAM_AW-1:0]  rd_req_addr,
  output logic [LEN_W-1:0]    rd_req_len,
  input  logic                rd_data_valid,
  input  logic [PW-1:0]       rd_data,
  // output DRAM write channel
  output logic                wr_req_valid,
  input  logic                wr_req_ready,
  output logic [DRAM_AW-1:0]  wr_req_addr,
  output logic [LEN_W-1:0]    wr_req_len,
  output logic                wr_data_valid,
  input  logic                wr_data_ready,
  output logic [PW-1:0]       wr_data,
  // port 0 of the local arrays
  output logic                mcv_en,
  output logic [AW-1:0]       mcv_addr,
  output logic                mvc_en,
  output logic [AW-1:0]       mvc_addr,
  output logic                mv_en,
  output logic                mv_we,
  output logic [AW-1:0]       mv_addr,
  output logic [PW-1:0]       wdata,
  input  logic [PW-1:0]       mv_rdata
);
  // ---------------- prologue
  logic          in_act;
  logic [1:0]    in_seg;        // 0: m_cv, 1: m_vc, 2: m_v
  logic [AW-1:0] in_row;
  logic          in_last;

  assign rd_req_addr = rd_base;
  assign rd_req_len  = LEN_W'(2 * E + N);
  assign in_last     = (in_seg == 2'd2) && (int'(in_row) == int'(N) - 1);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_req_valid <= 1'b0;
      in_act       <= 1'b0;
      in_seg       <= '0;
      in_row       <= '0;
      done_in      <= 1'b0;
    end else begin
      done_in <= 1'b0;
      if (start_in && !in_act && !rd_req_valid) begin
        rd_req_valid <= 1'b1;
        in_act       <= 1'b1;
        in_seg       <= '0;
        in_row       <= '0;
      end
      if (rd_req_valid && rd_req_ready) rd_req_valid <= 1'b0;
      if (in_act && rd_data_valid) begin
        if (in_last) begin
          in_act  <= 1'b0;
          done_in <= 1'b1;
        end else if (in_seg != 2'd2 && int'(in_row) == int'(E) - 1) begin
          in_seg <= in_seg + 1'b1;
          in_row <= '0;
        end else begin
          in_row <= in_row + 1'b1;
        end
      end
    end
  end

  // ---------------- epilogue
  logic          out_act, out_req_done, inflight;
  logic [AW-1:0] rd_ptr, sent;
  logic [1:0]    fcount;
  logic          fwr, frd;
  logic [PW-1:0] fifo [2];
  logic          pop, issue;

  assign wr_req_addr   = wr_base;
  assign wr_req_len    = LEN_W'(N);
  assign wr_data_valid = out_act && out_req_done && (fcount != 0);
  assign wr_data       = fifo[frd];
  assign pop           = wr_data_valid && wr_data_ready;
  assign issue         = out_act && (int'(rd_ptr) < int'(N)) &&
                         (int'(fcount) + int'(inflight) - int'(pop) < 2);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_req_valid <= 1'b0;
      out_act      <= 1'b0;
      out_req_done <= 1'b0;
      inflight     <= 1'b0;
      rd_ptr       <= '0;
      sent         <= '0;
      fcount       <= '0;
      fwr          <= 1'b0;
      frd          <= 1'b0;
      fifo[0]      <= '0;
      fifo[1]      <= '0;
      done_out     <= 1'b0;
    end else begin
      done_out <= 1'b0;
      if (start_out && !out_act) begin
        wr_req_valid <= 1'b1;
        out_act      <= 1'b1;
        out_req_done <= 1'b0;
        rd_ptr       <= '0;
        sent         <= '0;
        fcount       <= '0;
        fwr          <= 1'b0;
        frd          <= 1'b0;
        inflight     <= 1'b0;
      end else begin
        if (wr_req_valid && wr_req_ready) begin
          wr_req_valid <= 1'b0;
          out_req_done <= 1'b1;
        end
        inflight <= issue;
        if (issue) rd_ptr <= rd_ptr + 1'b1;
        if (inflight) begin
          fifo[fwr] <= mv_rdata;
          fwr       <= ~fwr;
        end
        if (pop) begin
          frd  <= ~frd;
          sent <= sent + 1'b1;
          if (int'(sent) == int'(N) - 1) begin
            out_act  <= 1'b0;
            done_out <= 1'b1;
          end
        end
        fcount <= fcount + {1'b0, inflight} - {1'b0, pop};
      end
    end
  end

  // ---------------- array ports
  always_comb begin
    wdata    = rd_data;
    mcv_en   = in_act && rd_data_valid && (in_seg == 2'd0);
    mvc_en   = in_act && rd_data_valid && (in_seg == 2'd1);
    mv_we    = in_act && rd_data_valid && (in_seg == 2'd2);
    mv_en    = mv_we || issue;
    mcv_addr = in_row;
    mvc_addr = in_row;
    mv_addr  = mv_we ? in_row : rd_ptr;
  end

  assign busy = in_act | out_act;

  initial assert (2 * E + N < (1 << LEN_W)) else $error("burst_dma: LEN_W too small");
  assert property (@(posedge clk) disable iff (!rst_n) !(in_act && out_act))
    else $error("burst_dma: prologue and epilogue overlap");
  assert property (@(posedge clk) disable iff (!rst_n) fcount <= 2)
    else $error("burst_dma: buffer overflow");
endmodule
