// cn_proc: check-node kernel of the FFT-SPA decoder, in the Walsh-Hadamard domain.
//
// The variable-to-check messages arrive already permuted and transformed, so the
// convolution a check node needs becomes an element-wise product. For each socket k of
// check node c the kernel writes
//     P_k(z)    = prod_{k' != k} F_{k'}(z)
//     m_cv_k(z) = P_k(z) / P_k(0)
// (division by the z = 0 term normalises the pmf the inverse transform will produce).
// Products are formed in Q16.13 and the ratio is rounded to Q8.7 and saturated; if P_k(0)
// is not positive the output is the transform of the uniform pmf (only z = 0 set).
//
// Schedule: the check nodes are processed in order. The DC messages of a node are
// gathered two per clock through both ports of l_mvc (R = ceil(DC/2) cycles), copied to an
// output buffer, and the DC results are written two per clock through both ports of l_mcv
// while the next node is gathered. The kernel therefore starts a new check node every R
// clocks (2 for d_c = 3). The socket-to-edge lookup goes to the code ROM combinationally,
// and the edge numbers travel with the data to address the write-back.
// Timing: start is a one-cycle pulse; done pulses with the last write,
// (N*DV/DC)*R + R + 2 cycles after start.
module cn_proc
  import nbldpc_pkg::*;
#(
  parameter int unsigned GF_M = 2,
  parameter int unsigned N    = 384,
  parameter int unsigned DV   = 2,
  parameter int unsigned DC   = 3,
  localparam int unsigned Q   = 1 << GF_M,
  localparam int unsigned E   = N * DV,
  localparam int unsigned MC  = E / DC,            // number of check nodes
  localparam int unsigned R   = (DC + 1) / 2,      // cycles per check node
  localparam int unsigned AW  = (E > 1) ? $clog2(E) : 1,
  localparam int unsigned JW  = (R > 1) ? $clog2(R) : 1
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          start,
  output logic                          busy,
  output logic                          done,
  // code ROM: socket -> edge
  output logic [1:0][AW-1:0]            sock_idx,
  input  logic [1:0][AW-1:0]            sock_edge,
  // l_mvc (read)
  output logic [1:0]                    mvc_en,
  output logic [1:0][AW-1:0]            mvc_addr,
  input  logic [1:0][Q-1:0][MSG_W-1:0]  mvc_rdata,
  // l_mcv (write)
  output logic [1:0]                    mcv_en,
  output logic [1:0]                    mcv_we,
  output logic [1:0][AW-1:0]            mcv_addr,
  output logic [1:0][Q-1:0][MSG_W-1:0]  mcv_wdata
);
  typedef logic [Q-1:0][MSG_W-1:0] pmf_t;

  // issue stage
  logic          run;
  logic [AW-1:0] c_cnt;
  logic [JW-1:0] j_cnt;
  logic          last_pair, last_cn;
  // stage 1: read data returning
  logic          s1_valid, s1_final;
  logic [JW-1:0] s1_j;
  logic [1:0]    s1_pv;
  logic [1:0][AW-1:0] s1_edge;
  // gather buffer and its next value
  pmf_t          g_pmf  [DC];
  logic [AW-1:0] g_edge [DC];
  pmf_t          gm_pmf [DC];
  logic [AW-1:0] gm_edge[DC];
  // output buffer
  logic          o_active, o_final;
  logic [JW-1:0] o_j;
  pmf_t          o_pmf  [DC];
  logic [AW-1:0] o_edge [DC];

  assign last_pair = (int'(j_cnt) == int'(R) - 1);
  assign last_cn   = (int'(c_cnt) == int'(MC) - 1);
  assign busy      = run | s1_valid | o_active;

  // socket lookup and read requests
  always_comb begin
    for (int p = 0; p < 2; p++) begin
      sock_idx[p] = AW'(int'(c_cnt) * int'(DC) + 2 * int'(j_cnt) + p);
      mvc_en[p]   = run && (2 * int'(j_cnt) + p < int'(DC));
      mvc_addr[p] = sock_edge[p];
    end
  end

  always_comb begin
    for (int k = 0; k < int'(DC); k++) begin
      gm_pmf[k]  = g_pmf[k];
      gm_edge[k] = g_edge[k];
    end
    if (s1_valid) begin
      for (int p = 0; p < 2; p++) begin
        for (int k = 0; k < int'(DC); k++) begin
          if (s1_pv[p] && k == 2 * int'(s1_j) + p) begin
            gm_pmf[k]  = mvc_rdata[p];
            gm_edge[k] = s1_edge[p];
          end
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      run <= 1'b0; c_cnt <= '0; j_cnt <= '0;
      s1_valid <= 1'b0; s1_final <= 1'b0; s1_j <= '0; s1_pv <= '0; s1_edge <= '0;
      o_active <= 1'b0; o_final <= 1'b0; o_j <= '0;
      for (int k = 0; k < int'(DC); k++) begin
        g_pmf[k] <= '0; g_edge[k] <= '0; o_pmf[k] <= '0; o_edge[k] <= '0;
      end
      done <= 1'b0;
    end else begin
      done <= o_active && o_final && (int'(o_j) == int'(R) - 1);
      // issue
      if (start && !busy) begin
        run <= 1'b1; c_cnt <= '0; j_cnt <= '0;
      end else if (run) begin
        if (last_pair) begin
          j_cnt <= '0;
          c_cnt <= c_cnt + 1'b1;
          if (last_cn) run <= 1'b0;
        end else begin
          j_cnt <= j_cnt + 1'b1;
        end
      end
      s1_valid <= run;
      s1_final <= run & last_pair & last_cn;
      s1_j     <= j_cnt;
      for (int p = 0; p < 2; p++) s1_pv[p] <= mvc_en[p];
      s1_edge  <= sock_edge;
      // gather
      if (s1_valid) begin
        for (int k = 0; k < int'(DC); k++) begin
          g_pmf[k]  <= gm_pmf[k];
          g_edge[k] <= gm_edge[k];
        end
      end
      // write-back
      if (o_active) begin
        o_j <= o_j + 1'b1;
        if (int'(o_j) == int'(R) - 1) o_active <= 1'b0;
      end
      if (s1_valid && int'(s1_j) == int'(R) - 1) begin
        for (int k = 0; k < int'(DC); k++) begin
          o_pmf[k]  <= gm_pmf[k];
          o_edge[k] <= gm_edge[k];
        end
        o_active <= 1'b1;
        o_j      <= '0;
        o_final  <= s1_final;
      end
    end
  end

  // products over the other sockets and normalisation by the z = 0 term
  always_comb begin
    acc_t prod [Q];
    int   k;
    for (int z = 0; z < int'(Q); z++) prod[z] = '0;
    k         = 0;
    mcv_en    = '0;
    mcv_we    = '0;
    mcv_addr  = '0;
    mcv_wdata = '0;
    for (int p = 0; p < 2; p++) begin
      k = 2 * int'(o_j) + p;
      if (o_active && k < int'(DC)) begin
        mcv_en[p]   = 1'b1;
        mcv_we[p]   = 1'b1;
        mcv_addr[p] = o_edge[k];
        for (int z = 0; z < int'(Q); z++) begin
          prod[z] = acc_t'(1 <<< ACC_FRAC);
          for (int kk = 0; kk < int'(DC); kk++)
            if (kk != k) prod[z] = acc_mul(prod[z], msg_to_acc(msg_t'(o_pmf[kk][z])));
        end
        for (int z = 0; z < int'(Q); z++) begin
          if (prod[0] > 0)  mcv_wdata[p][z] = fx_ratio(int'(prod[z]), int'(prod[0]));
          else if (z == 0)  mcv_wdata[p][z] = MSG_MAX;
          else              mcv_wdata[p][z] = '0;
        end
      end
    end
  end

  initial assert (DC >= 2 && (N * DV) % DC == 0) else $error("cn_proc: bad DC");
  assert property (@(posedge clk) disable iff (!rst_n) !(start && busy))
    else $error("cn_proc started while busy");
endmodule
