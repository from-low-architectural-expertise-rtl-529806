// vn_proc: variable-node kernel of the FFT-SPA decoder.
//
// Message mode (app_mode = 0) walks all E = N*DV edges in variable-node order, one edge per
// clock (initiation interval 1). For edge e = v*DV + t it reads the channel pmf m_v[v] and the
// DV check-to-variable pmfs of node v in the same cycle, and writes
//     m_vc[e](x) = m_v[v](x) * prod_{t' != t} m_cv[v*DV+t'](x)  / (sum over x of the same)
// which equals the a-posteriori product divided by m_cv[e] (the document's form) without a
// division by a message that may have been rounded to zero. A-posteriori mode
// (app_mode = 1) walks the N variable nodes and writes the full normalised product m_v*[v]
// back over m_v[v], from where the epilogue sends it to DRAM.
//
// Products are formed in Q16.13; negative inputs (rounding residue of the inverse
// transform) are taken as zero; each result pmf is normalised to sum 1 and rounded to Q8.7,
// and a pmf whose sum is zero becomes uniform. The per-pmf normalisation and the in-place
// storage of m_v* are this design's choices; the document's equations carry no
// normalisation on the variable-node side.
//
// Ports: mv_* is a two-port view of l_mv (port 0 read, port 1 write in a-posteriori mode),
// mcv_* reads l_mcv (port t reads the t-th message of the node, so DV <= 2), mvc_* writes
// l_mvc. Timing: start is a one-cycle pulse; reads are issued on the following E (or N)
// cycles, each result is written two cycles after its read, and done pulses with the last
// write, E + 3 (or N + 3) cycles after start.
module vn_proc
  import nbldpc_pkg::*;
#(
  parameter int unsigned GF_M = 2,
  parameter int unsigned N    = 384,
  parameter int unsigned DV   = 2,
  localparam int unsigned Q   = 1 << GF_M,
  localparam int unsigned E   = N * DV,
  localparam int unsigned AW  = (E > 1) ? $clog2(E) : 1
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          start,
  input  logic                          app_mode,
  output logic                          busy,
  output logic                          done,
  // l_mv
  output logic [1:0]                    mv_en,
  output logic [1:0]                    mv_we,
  output logic [1:0][AW-1:0]            mv_addr,
  output logic [1:0][Q-1:0][MSG_W-1:0]  mv_wdata,
  input  logic [1:0][Q-1:0][MSG_W-1:0]  mv_rdata,
  // l_mcv (read only)
  output logic [1:0]                    mcv_en,
  output logic [1:0][AW-1:0]            mcv_addr,
  input  logic [1:0][Q-1:0][MSG_W-1:0]  mcv_rdata,
  // l_mvc (write only)
  output logic                          mvc_en,
  output logic [AW-1:0]                 mvc_addr,
  output logic [Q-1:0][MSG_W-1:0]       mvc_wdata
);
  typedef logic [Q-1:0][MSG_W-1:0] pmf_t;

  // issue stage
  logic          run, mode;
  logic [AW-1:0] v_cnt;              // variable node
  logic [1:0]    t_cnt;              // edge of the node (message mode)
  logic [AW-1:0] e_cnt;              // item index: edge or node
  logic          last_item;
  // stage 1: read data valid
  logic          s1_valid, s1_last;
  logic [AW-1:0] s1_item;
  logic [1:0]    s1_t;
  // stage 2: result register
  logic          s2_valid, s2_last;
  logic [AW-1:0] s2_item;
  pmf_t          s2_pmf, s1_result;

  assign last_item = mode ? (int'(e_cnt) == int'(N) - 1) : (int'(e_cnt) == int'(E) - 1);
  assign busy      = run | s1_valid | s2_valid;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      run <= 1'b0; mode <= 1'b0;
      v_cnt <= '0; t_cnt <= '0; e_cnt <= '0;
      s1_valid <= 1'b0; s1_last <= 1'b0; s1_item <= '0; s1_t <= '0;
      s2_valid <= 1'b0; s2_last <= 1'b0; s2_item <= '0; s2_pmf <= '0;
      done <= 1'b0;
    end else begin
      done <= s2_valid & s2_last;
      if (start && !busy) begin
        run <= 1'b1; mode <= app_mode;
        v_cnt <= '0; t_cnt <= '0; e_cnt <= '0;
      end else if (run) begin
        e_cnt <= e_cnt + 1'b1;
        if (mode || int'(t_cnt) == int'(DV) - 1) begin
          t_cnt <= '0;
          v_cnt <= v_cnt + 1'b1;
        end else begin
          t_cnt <= t_cnt + 1'b1;
        end
        if (last_item) run <= 1'b0;
      end
      s1_valid <= run;
      s1_last  <= run & last_item;
      s1_item  <= e_cnt;
      s1_t     <= t_cnt;
      s2_valid <= s1_valid;
      s2_last  <= s1_last;
      s2_item  <= s1_item;
      s2_pmf   <= s1_result;
    end
  end

  // memory requests
  always_comb begin
    mv_en       = '0;
    mv_we       = '0;
    mv_addr     = '0;
    mv_wdata    = '0;
    mcv_en      = '0;
    mcv_addr    = '0;
    mv_en[0]    = run;
    mv_addr[0]  = v_cnt;
    for (int t = 0; t < 2; t++) begin
      if (t < int'(DV)) begin
        mcv_en[t]   = run;
        mcv_addr[t] = AW'(int'(v_cnt) * int'(DV) + t);
      end
    end
    // a-posteriori result goes back over m_v
    mv_en[1]    = s2_valid & mode;
    mv_we[1]    = s2_valid & mode;
    mv_addr[1]  = s2_item;
    mv_wdata[1] = s2_pmf;
    mvc_en      = s2_valid & ~mode;
    mvc_addr    = s2_item;
    mvc_wdata   = s2_pmf;
  end

  // datapath: product of the selected messages, then normalisation
  always_comb begin
    acc_t prod [Q];
    int   sum;
    acc_t f;
    sum = 0;
    for (int x = 0; x < int'(Q); x++) begin
      f = msg_to_acc(msg_t'(mv_rdata[0][x]));
      prod[x] = (f < 0) ? '0 : f;
      for (int t = 0; t < int'(DV) && t < 2; t++) begin
        if (mode || t != int'(s1_t)) begin
          f = msg_to_acc(msg_t'(mcv_rdata[t][x]));
          prod[x] = acc_mul(prod[x], (f < 0) ? '0 : f);
        end
      end
      sum += int'(prod[x]);
    end
    for (int x = 0; x < int'(Q); x++) begin
      if (sum > 0) s1_result[x] = fx_ratio(int'(prod[x]), sum);
      else         s1_result[x] = msg_t'(1 <<< (MSG_FRAC - GF_M));
    end
  end

  initial assert (DV >= 1 && DV <= 2) else $error("vn_proc reads at most two m_cv per cycle");
  assert property (@(posedge clk) disable iff (!rst_n) !(start && busy))
    else $error("vn_proc started while busy");
endmodule
