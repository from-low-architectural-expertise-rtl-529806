// decoder_core: one non-binary LDPC decoder (FFT-SPA) with its local message arrays.
//
// The core decodes one codeword of N symbols over GF(2^m). Its three local arrays hold one
// pmf (2^m Q8.7 probabilities) per row: l_mv (N rows, channel pmfs, later the a-posteriori
// pmfs), l_mvc and l_mcv (E = N*DV rows, the messages on every edge, in variable-node edge
// order). Each array is partitioned into 2^m dual-port banks, so a kernel can read and write
// whole pmfs on two ports per array every clock.
//
// A job (start pulse, base addresses of the frame in the input and output DRAM) runs:
//   prologue  burst-read m_cv, m_vc, m_v from the input DRAM into the arrays
//   ITERS x   vn_proc -> permute -> fwht (forward, on l_mvc)
//             cn_proc -> fwht (inverse, on l_mcv) -> depermute
//   APP       vn_proc in a-posteriori mode, m_v* written over l_mv
//   epilogue  burst-write m_v* to the output DRAM, then done pulses
// decoder_ctrl sequences the phases; the port multiplexers below hand each array port to
// the kernel of the current phase. Every kernel streams one pmf per clock (cn_proc one check
// node per ceil(DC/2) clocks), so an iteration takes about 5E + (E/DC)*ceil(DC/2) clocks.
// The kernel set, their order and the array organisation follow the document; the port
// assignment, the APP phase and the DRAM channel signalling are this design's.
module decoder_core
  import nbldpc_pkg::*;
#(
  parameter int unsigned GF_M    = 2,
  parameter int unsigned N       = 384,
  parameter int unsigned DV      = 2,
  parameter int unsigned DC      = 3,
  parameter int unsigned ITERS   = 10,
  parameter code_e       CODE    = CODE_GEN,
  parameter int unsigned DRAM_AW = 32,
  parameter int unsigned LEN_W   = 16,
  localparam int unsigned Q      = 1 << GF_M,
  localparam int unsigned E      = N * DV,
  localparam int unsigned AW     = (E > 1) ? $clog2(E) : 1,
  localparam int unsigned PW     = Q * MSG_W,
  localparam int unsigned IW     = $clog2(ITERS + 1)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  output logic                busy,
  output logic                done,
  output phase_e              phase,
  output logic [IW-1:0]       iter,
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
  output logic [PW-1:0]       wr_data
);
  typedef logic [Q-1:0][MSG_W-1:0] pmf_t;

  // ---------------------------------------------------------------- arrays
  logic [1:0]          mv_en,  mv_we,  mvc_en, mvc_we, mcv_en, mcv_we;
  logic [1:0][AW-1:0]  mv_addr, mvc_addr, mcv_addr;
  pmf_t [1:0]          mv_wdata, mv_rdata, mvc_wdata, mvc_rdata, mcv_wdata, mcv_rdata;

  pmf_ram #(.GF_M(GF_M), .DEPTH(N), .AW(AW)) u_l_mv (
    .clk(clk), .en(mv_en), .we(mv_we), .addr(mv_addr), .wdata(mv_wdata), .rdata(mv_rdata));
  pmf_ram #(.GF_M(GF_M), .DEPTH(E), .AW(AW)) u_l_mvc (
    .clk(clk), .en(mvc_en), .we(mvc_we), .addr(mvc_addr), .wdata(mvc_wdata), .rdata(mvc_rdata));
  pmf_ram #(.GF_M(GF_M), .DEPTH(E), .AW(AW)) u_l_mcv (
    .clk(clk), .en(mcv_en), .we(mcv_we), .addr(mcv_addr), .wdata(mcv_wdata), .rdata(mcv_rdata));

  // ---------------------------------------------------------------- control
  logic kstart, kdone;

  decoder_ctrl #(.ITERS(ITERS)) u_ctrl (
    .clk(clk), .rst_n(rst_n), .start(start), .kdone(kdone), .phase(phase),
    .kstart(kstart), .busy(busy), .done(done), .iter(iter));

  // ---------------------------------------------------------------- code ROM
  logic [1:0][AW-1:0]   sock_idx, sock_edge, coef_edge;
  logic [1:0][GF_M-1:0] coef;

  code_rom #(.GF_M(GF_M), .N(N), .DV(DV), .DC(DC), .CODE(CODE)) u_rom (
    .sock_idx(sock_idx), .sock_edge(sock_edge), .coef_edge(coef_edge), .coef(coef));

  // ---------------------------------------------------------------- burst engine
  logic          dma_done_in, dma_done_out, dma_busy;
  logic          dma_mcv_en, dma_mvc_en, dma_mv_en, dma_mv_we;
  logic [AW-1:0] dma_mcv_addr, dma_mvc_addr, dma_mv_addr;
  logic [PW-1:0] dma_wdata;

  burst_dma #(.GF_M(GF_M), .N(N), .DV(DV), .DRAM_AW(DRAM_AW), .LEN_W(LEN_W)) u_dma (
    .clk(clk), .rst_n(rst_n),
    .start_in(kstart && phase == PH_PROLOGUE), .done_in(dma_done_in),
    .start_out(kstart && phase == PH_EPILOGUE), .done_out(dma_done_out), .busy(dma_busy),
    .rd_base(rd_base), .wr_base(wr_base),
    .rd_req_valid(rd_req_valid), .rd_req_ready(rd_req_ready), .rd_req_addr(rd_req_addr),
    .rd_req_len(rd_req_len), .rd_data_valid(rd_data_valid), .rd_data(rd_data),
    .wr_req_valid(wr_req_valid), .wr_req_ready(wr_req_ready), .wr_req_addr(wr_req_addr),
    .wr_req_len(wr_req_len), .wr_data_valid(wr_data_valid), .wr_data_ready(wr_data_ready),
    .wr_data(wr_data),
    .mcv_en(dma_mcv_en), .mcv_addr(dma_mcv_addr), .mvc_en(dma_mvc_en), .mvc_addr(dma_mvc_addr),
    .mv_en(dma_mv_en), .mv_we(dma_mv_we), .mv_addr(dma_mv_addr), .wdata(dma_wdata),
    .mv_rdata(mv_rdata[0]));

  // ---------------------------------------------------------------- vn_proc
  logic                vn_busy, vn_done;
  logic [1:0]          vn_mv_en, vn_mv_we, vn_mcv_en;
  logic [1:0][AW-1:0]  vn_mv_addr, vn_mcv_addr;
  pmf_t [1:0]          vn_mv_wdata;
  logic                vn_mvc_en;
  logic [AW-1:0]       vn_mvc_addr;
  pmf_t                vn_mvc_wdata;

  vn_proc #(.GF_M(GF_M), .N(N), .DV(DV)) u_vn (
    .clk(clk), .rst_n(rst_n), .start(kstart && (phase == PH_VN || phase == PH_APP)),
    .app_mode(phase == PH_APP), .busy(vn_busy), .done(vn_done),
    .mv_en(vn_mv_en), .mv_we(vn_mv_we), .mv_addr(vn_mv_addr), .mv_wdata(vn_mv_wdata),
    .mv_rdata(mv_rdata),
    .mcv_en(vn_mcv_en), .mcv_addr(vn_mcv_addr), .mcv_rdata(mcv_rdata),
    .mvc_en(vn_mvc_en), .mvc_addr(vn_mvc_addr), .mvc_wdata(vn_mvc_wdata));

  // ---------------------------------------------------------------- permute
  logic          pm_busy, pm_done, pm_rd_en, pm_wr_en;
  logic [AW-1:0] pm_rd_addr, pm_wr_addr;
  pmf_t          pm_wr_data;

  permute #(.GF_M(GF_M), .DEPTH(E)) u_permute (
    .clk(clk), .rst_n(rst_n), .start(kstart && phase == PH_PERM), .busy(pm_busy),
    .done(pm_done), .coef_edge(coef_edge[0]), .coef(coef[0]),
    .rd_en(pm_rd_en), .rd_addr(pm_rd_addr), .rd_data(mvc_rdata[0]),
    .wr_en(pm_wr_en), .wr_addr(pm_wr_addr), .wr_data(pm_wr_data));

  // ---------------------------------------------------------------- forward fwht on l_mvc
  logic          fv_busy, fv_done, fv_rd_en, fv_wr_en;
  logic [AW-1:0] fv_rd_addr, fv_wr_addr;
  pmf_t          fv_wr_data;

  fwht #(.GF_M(GF_M), .DEPTH(E), .INVERSE(1'b0)) u_fwht_vc (
    .clk(clk), .rst_n(rst_n), .start(kstart && phase == PH_FWHT_VC), .busy(fv_busy),
    .done(fv_done), .rd_en(fv_rd_en), .rd_addr(fv_rd_addr), .rd_data(mvc_rdata[0]),
    .wr_en(fv_wr_en), .wr_addr(fv_wr_addr), .wr_data(fv_wr_data));

  // ---------------------------------------------------------------- cn_proc
  logic               cn_busy, cn_done;
  logic [1:0]         cn_mvc_en, cn_mcv_en, cn_mcv_we;
  logic [1:0][AW-1:0] cn_mvc_addr, cn_mcv_addr;
  pmf_t [1:0]         cn_mcv_wdata;

  cn_proc #(.GF_M(GF_M), .N(N), .DV(DV), .DC(DC)) u_cn (
    .clk(clk), .rst_n(rst_n), .start(kstart && phase == PH_CN), .busy(cn_busy),
    .done(cn_done), .sock_idx(sock_idx), .sock_edge(sock_edge),
    .mvc_en(cn_mvc_en), .mvc_addr(cn_mvc_addr), .mvc_rdata(mvc_rdata),
    .mcv_en(cn_mcv_en), .mcv_we(cn_mcv_we), .mcv_addr(cn_mcv_addr), .mcv_wdata(cn_mcv_wdata));

  // ---------------------------------------------------------------- inverse fwht on l_mcv
  logic          fc_busy, fc_done, fc_rd_en, fc_wr_en;
  logic [AW-1:0] fc_rd_addr, fc_wr_addr;
  pmf_t          fc_wr_data;

  fwht #(.GF_M(GF_M), .DEPTH(E), .INVERSE(1'b1)) u_fwht_cv (
    .clk(clk), .rst_n(rst_n), .start(kstart && phase == PH_FWHT_CV), .busy(fc_busy),
    .done(fc_done), .rd_en(fc_rd_en), .rd_addr(fc_rd_addr), .rd_data(mcv_rdata[0]),
    .wr_en(fc_wr_en), .wr_addr(fc_wr_addr), .wr_data(fc_wr_data));

  // ---------------------------------------------------------------- depermute
  logic          dp_busy, dp_done, dp_rd_en, dp_wr_en;
  logic [AW-1:0] dp_rd_addr, dp_wr_addr;
  pmf_t          dp_wr_data;

  depermute #(.GF_M(GF_M), .DEPTH(E)) u_depermute (
    .clk(clk), .rst_n(rst_n), .start(kstart && phase == PH_DEPERM), .busy(dp_busy),
    .done(dp_done), .coef_edge(coef_edge[1]), .coef(coef[1]),
    .rd_en(dp_rd_en), .rd_addr(dp_rd_addr), .rd_data(mcv_rdata[0]),
    .wr_en(dp_wr_en), .wr_addr(dp_wr_addr), .wr_data(dp_wr_data));

  // ---------------------------------------------------------------- phase completion
  always_comb begin
    case (phase)
      PH_PROLOGUE:   kdone = dma_done_in;
      PH_VN, PH_APP: kdone = vn_done;
      PH_PERM:       kdone = pm_done;
      PH_FWHT_VC:    kdone = fv_done;
      PH_CN:         kdone = cn_done;
      PH_FWHT_CV:    kdone = fc_done;
      PH_DEPERM:     kdone = dp_done;
      PH_EPILOGUE:   kdone = dma_done_out;
      default:       kdone = 1'b0;
    endcase
  end

  // ---------------------------------------------------------------- array port multiplexers
  always_comb begin
    mv_en  = '0; mv_we  = '0; mv_addr  = '0; mv_wdata  = '0;
    mvc_en = '0; mvc_we = '0; mvc_addr = '0; mvc_wdata = '0;
    mcv_en = '0; mcv_we = '0; mcv_addr = '0; mcv_wdata = '0;
    case (phase)
      PH_PROLOGUE: begin
        mv_en[0]  = dma_mv_en;  mv_we[0]  = dma_mv_we;  mv_addr[0]  = dma_mv_addr;
        mv_wdata[0]  = dma_wdata;
        mvc_en[0] = dma_mvc_en; mvc_we[0] = dma_mvc_en; mvc_addr[0] = dma_mvc_addr;
        mvc_wdata[0] = dma_wdata;
        mcv_en[0] = dma_mcv_en; mcv_we[0] = dma_mcv_en; mcv_addr[0] = dma_mcv_addr;
        mcv_wdata[0] = dma_wdata;
      end
      PH_EPILOGUE: begin
        mv_en[0] = dma_mv_en; mv_addr[0] = dma_mv_addr;
      end
      PH_VN, PH_APP: begin
        mv_en = vn_mv_en; mv_we = vn_mv_we; mv_addr = vn_mv_addr; mv_wdata = vn_mv_wdata;
        mcv_en = vn_mcv_en; mcv_addr = vn_mcv_addr;
        mvc_en[0] = vn_mvc_en; mvc_we[0] = vn_mvc_en; mvc_addr[0] = vn_mvc_addr;
        mvc_wdata[0] = vn_mvc_wdata;
      end
      PH_PERM: begin
        mvc_en[0] = pm_rd_en; mvc_addr[0] = pm_rd_addr;
        mvc_en[1] = pm_wr_en; mvc_we[1] = pm_wr_en; mvc_addr[1] = pm_wr_addr;
        mvc_wdata[1] = pm_wr_data;
      end
      PH_FWHT_VC: begin
        mvc_en[0] = fv_rd_en; mvc_addr[0] = fv_rd_addr;
        mvc_en[1] = fv_wr_en; mvc_we[1] = fv_wr_en; mvc_addr[1] = fv_wr_addr;
        mvc_wdata[1] = fv_wr_data;
      end
      PH_CN: begin
        mvc_en = cn_mvc_en; mvc_addr = cn_mvc_addr;
        mcv_en = cn_mcv_en; mcv_we = cn_mcv_we; mcv_addr = cn_mcv_addr; mcv_wdata = cn_mcv_wdata;
      end
      PH_FWHT_CV: begin
        mcv_en[0] = fc_rd_en; mcv_addr[0] = fc_rd_addr;
        mcv_en[1] = fc_wr_en; mcv_we[1] = fc_wr_en; mcv_addr[1] = fc_wr_addr;
        mcv_wdata[1] = fc_wr_data;
      end
      PH_DEPERM: begin
        mcv_en[0] = dp_rd_en; mcv_addr[0] = dp_rd_addr;
        mcv_en[1] = dp_wr_en; mcv_we[1] = dp_wr_en; mcv_addr[1] = dp_wr_addr;
        mcv_wdata[1] = dp_wr_data;
      end
      default: ;
    endcase
  end

  // only the kernel of the current phase may be active
  assert property (@(posedge clk) disable iff (!rst_n)
      $onehot0({dma_busy, vn_busy, pm_busy, fv_busy, cn_busy, fc_busy, dp_busy}))
    else $error("decoder_core: two kernels active at once");
endmodule
