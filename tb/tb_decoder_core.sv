// tb_decoder_core: decodes codewords of the 3 x 6 example code over GF(4) (d_v = 2,
// d_c = 4) with one decoder core and the behavioural DRAM model, 10 iterations.
// A nonzero codeword is found by exhaustive search with a reference GF(4) multiply; the
// channel pmfs favour the right symbol except at one position, where a wrong symbol has the
// largest probability. The decoded symbols (largest entry of each m_v*) must equal the
// codeword, each m_v* and each final m_cv must sum to about 1, and every kernel phase must take the clock count
// its schedule implies (E + 3 for the streaming kernels, (E/DC)*2 + 4 for cn_proc,
// N + 3 for the a-posteriori pass).
module tb_decoder_core;
  import tb_ref_pkg::*;
  import nbldpc_pkg::*;
  localparam int GF_M = 2, Q = 4, N = 6, DV = 2, DC = 4, E = 12, PW = 32, ITERS = 10;
  localparam int H_EXP [3][6] = '{'{1, -1, 0, 1, -1, 0},
                                  '{2, 1, -1, 0, 0, -1},
                                  '{-1, 1, 2, -1, 2, 0}};
  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;

  logic start, busy, done;
  phase_e phase;
  logic [3:0] iter;
  logic [31:0] rd_base, wr_base;
  logic rd_req_valid, rd_req_ready, rd_data_valid;
  logic [31:0] rd_req_addr, wr_req_addr;
  logic [15:0] rd_req_len, wr_req_len;
  logic [PW-1:0] rd_data, wr_data;
  logic wr_req_valid, wr_req_ready, wr_data_valid, wr_data_ready;

  decoder_core #(.GF_M(GF_M), .N(N), .DV(DV), .DC(DC), .ITERS(ITERS), .CODE(CODE_EQ1)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .busy(busy), .done(done), .phase(phase),
    .iter(iter), .rd_base(rd_base), .wr_base(wr_base),
    .rd_req_valid(rd_req_valid), .rd_req_ready(rd_req_ready), .rd_req_addr(rd_req_addr),
    .rd_req_len(rd_req_len), .rd_data_valid(rd_data_valid), .rd_data(rd_data),
    .wr_req_valid(wr_req_valid), .wr_req_ready(wr_req_ready), .wr_req_addr(wr_req_addr),
    .wr_req_len(wr_req_len), .wr_data_valid(wr_data_valid), .wr_data_ready(wr_data_ready),
    .wr_data(wr_data));

  dram_model #(.PW(PW), .WORDS(256)) u_dram (
    .clk(clk), .rst_n(rst_n), .rd_req_valid(rd_req_valid), .rd_req_ready(rd_req_ready),
    .rd_req_addr(rd_req_addr), .rd_req_len(rd_req_len), .rd_data_valid(rd_data_valid),
    .rd_data(rd_data), .wr_req_valid(wr_req_valid), .wr_req_ready(wr_req_ready),
    .wr_req_addr(wr_req_addr), .wr_req_len(wr_req_len), .wr_data_valid(wr_data_valid),
    .wr_data_ready(wr_data_ready), .wr_data(wr_data));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // phase latency monitor: cycles from a kernel start to the phase change
  int ph_start, cyc;
  int ph_count [16];
  always @(posedge clk) begin
    cyc++;
    if (rst_n && dut.kstart) ph_start = cyc;
    if (rst_n && dut.kdone) begin
      int len, exp_len;
      len = cyc - ph_start;
      case (phase)
        PH_VN, PH_PERM, PH_FWHT_VC, PH_FWHT_CV, PH_DEPERM: exp_len = E + 3;
        PH_CN:  exp_len = (E / DC) * ((DC + 1) / 2) + (DC + 1) / 2 + 2;
        PH_APP: exp_len = N + 3;
        default: exp_len = -1;
      endcase
      if (exp_len >= 0) check(len == exp_len, $sformatf("%s took %0d cycles", phase.name(), len));
      ph_count[phase]++;
    end
  end

  function automatic bit is_codeword(int c [N]);
    for (int r = 0; r < 3; r++) begin
      int s;
      s = 0;
      for (int v = 0; v < N; v++) if (H_EXP[r][v] >= 0) s ^= ref_mul(ref_exp(H_EXP[r][v], GF_M), c[v], GF_M);
      if (s != 0) return 1'b0;
    end
    return 1'b1;
  endfunction

  task automatic decode_frame(int f, int cw [N], int err_pos);
    logic [PW-1:0] w;
    int base, guard, hard_errors;
    base = f * 64;
    hard_errors = 0;
    for (int e = 0; e < 2 * E; e++) u_dram.in_mem[base + e] = {4{8'd32}};   // uniform m_cv, m_vc
    for (int v = 0; v < N; v++) begin
      for (int x = 0; x < Q; x++) w[8 * x +: 8] = 8'd10;
      if (v == err_pos) begin
        w[8 * cw[v] +: 8] = 8'd45;
        w[8 * ((cw[v] + 1) % Q) +: 8] = 8'd63;
        hard_errors++;
      end else begin
        w[8 * cw[v] +: 8] = 8'($urandom_range(90, 60));
      end
      u_dram.in_mem[base + 2 * E + v] = w;
    end
    rd_base = 32'(base);
    wr_base = 32'(base + 40);
    @(negedge clk); start = 1'b1;
    @(negedge clk); start = 1'b0;
    guard = 0;
    while (!done && guard < 20000) begin
      @(negedge clk);
      guard++;
    end
    check(done, "decoding finished");
    repeat (2) @(negedge clk);
    for (int v = 0; v < N; v++) begin
      int best, sum;
      w = u_dram.out_mem[base + 40 + v];
      best = 0; sum = 0;
      for (int x = 0; x < Q; x++) begin
        sum += sext8(w[8 * x +: 8]);
        if (sext8(w[8 * x +: 8]) > sext8(w[8 * best +: 8])) best = x;
      end
      check(best == cw[v], $sformatf("frame %0d symbol %0d decoded %0d expected %0d", f, v, best, cw[v]));
      check(sum >= 124 && sum <= 132, $sformatf("frame %0d m_v* %0d sums to %0d", f, v, sum));
    end
    check(hard_errors > 0 || err_pos < 0, "channel error present");
    // the last check-to-variable messages left in l_mcv must be pmfs (sum about 1)
    for (int e = 0; e < E; e++) begin
      int sum;
      sum = sext8(dut.u_l_mcv.g_bank[0].u_bank.mem[e]) + sext8(dut.u_l_mcv.g_bank[1].u_bank.mem[e])
          + sext8(dut.u_l_mcv.g_bank[2].u_bank.mem[e]) + sext8(dut.u_l_mcv.g_bank[3].u_bank.mem[e]);
      check(sum >= 118 && sum <= 134, $sformatf("frame %0d m_cv %0d sums to %0d", f, e, sum));
    end
  endtask

  initial begin
    int cw [N];
    int found [$];
    start = 1'b0; cyc = 0;
    foreach (ph_count[i]) ph_count[i] = 0;
    for (int i = 0; i < 256; i++) begin
      u_dram.in_mem[i] = '0; u_dram.out_mem[i] = '0;
    end
    // exhaustive search for codewords with all symbols nonzero
    for (int n = 0; n < (1 << (2 * N)); n++) begin
      bit allnz;
      allnz = 1'b1;
      for (int v = 0; v < N; v++) begin
        cw[v] = (n >> (2 * v)) & 3;
        if (cw[v] == 0) allnz = 1'b0;
      end
      if (allnz && is_codeword(cw)) found.push_back(n);
    end
    check(found.size() > 0, "a codeword with nonzero symbols exists");
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < 3; f++) begin
      int n;
      n = (found.size() > 0) ? found[f % found.size()] : 0;
      for (int v = 0; v < N; v++) cw[v] = (n >> (2 * v)) & 3;
      decode_frame(f, cw, (f == 0) ? -1 : f + 1);
    end
    check(ph_count[PH_VN] == 3 * ITERS, "VN phases");
    check(ph_count[PH_APP] == 3, "APP phases");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
