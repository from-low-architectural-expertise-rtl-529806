// tb_nbldpc_field_run: one end-to-end run of the multi-decoder system on the N = 384,
// d_v = 2, d_c = 3 generated code over GF(2^GF_M) with K cores, for tb_nbldpc_fields.
// The parity-check matrix is rebuilt from its definition (socket (5e mod 768) holds edge e,
// coefficient alpha^(e mod (2^GF_M - 1))); a random codeword per core is found by Gaussian
// elimination over the field and checked against H. Channel pmfs favour the codeword
// symbol except for about 4% of symbols, where a wrong symbol is the most likely. After
// the run every decoded symbol (largest entry of m_v*) is compared with the codeword and
// the decoding time of core 0 with the kernel schedule. The counts are handed to the
// parent through the ports; finished rises when the run is over.
module tb_nbldpc_field_run #(
  parameter int GF_M = 3,
  parameter int K    = 2
) (
  output logic finished,
  output int   checks,
  output int   failures
);
  import tb_ref_pkg::*;
  import nbldpc_pkg::*;
  localparam int Q = 1 << GF_M, N = 384, DV = 2, DC = 3, E = 768, M = 256, ITERS = 10;
  localparam int PW = 8 * Q, FRAME = 2 * E + N;
  logic clk = 1'b0, rst_n = 1'b0;

  logic [K-1:0] start, busy, done;
  logic [K-1:0][31:0] rd_base, wr_base;
  logic rd_req_valid, rd_req_ready, rd_data_valid;
  logic [31:0] rd_req_addr, wr_req_addr;
  logic [15:0] rd_req_len, wr_req_len;
  logic [PW-1:0] rd_data, wr_data;
  logic wr_req_valid, wr_req_ready, wr_data_valid, wr_data_ready;

  nbldpc_system #(.GF_M(GF_M), .K(K)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .rd_base(rd_base), .wr_base(wr_base),
    .busy(busy), .done(done),
    .rd_req_valid(rd_req_valid), .rd_req_ready(rd_req_ready), .rd_req_addr(rd_req_addr),
    .rd_req_len(rd_req_len), .rd_data_valid(rd_data_valid), .rd_data(rd_data),
    .wr_req_valid(wr_req_valid), .wr_req_ready(wr_req_ready), .wr_req_addr(wr_req_addr),
    .wr_req_len(wr_req_len), .wr_data_valid(wr_data_valid), .wr_data_ready(wr_data_ready),
    .wr_data(wr_data));

  dram_model #(.PW(PW), .WORDS(K * 2048)) u_dram (
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

  int h [M][N];
  int mt [Q][Q];
  int inv [Q];
  int cw [K][N];

  task automatic build_h();
    for (int r = 0; r < M; r++) for (int v = 0; v < N; v++) h[r][v] = 0;
    for (int e = 0; e < E; e++) h[((5 * e) % E) / DC][e / DV] = ref_exp(e % (Q - 1), GF_M);
    for (int a = 0; a < Q; a++) begin
      for (int b = 0; b < Q; b++) mt[a][b] = ref_mul(a, b, GF_M);
      inv[a] = 0;
      for (int b = 1; b < Q; b++) if (ref_mul(a, b, GF_M) == 1) inv[a] = b;
    end
  endtask

  // random codeword: reduce a copy of H to row echelon form, draw the free symbols,
  // solve for the pivot symbols
  task automatic make_codeword(int k);
    int a [M][N];
    int piv [M];
    int rank, s;
    bit is_piv [N];
    a = h;
    rank = 0;
    foreach (is_piv[v]) is_piv[v] = 1'b0;
    for (int col = 0; col < N && rank < M; col++) begin
      int p;
      p = -1;
      for (int r = rank; r < M; r++) if (p < 0 && a[r][col] != 0) p = r;
      if (p >= 0) begin
        int t, sc;
        for (int v = 0; v < N; v++) begin
          t = a[p][v]; a[p][v] = a[rank][v]; a[rank][v] = t;
        end
        sc = inv[a[rank][col]];
        for (int v = col; v < N; v++) a[rank][v] = mt[sc][a[rank][v]];
        for (int r = 0; r < M; r++)
          if (r != rank && a[r][col] != 0) begin
            int f;
            f = a[r][col];
            for (int v = col; v < N; v++) a[r][v] ^= mt[f][a[rank][v]];
          end
        piv[rank] = col;
        is_piv[col] = 1'b1;
        rank++;
      end
    end
    for (int v = 0; v < N; v++) cw[k][v] = is_piv[v] ? 0 : $urandom_range(Q - 1);
    for (int r = 0; r < rank; r++) begin
      s = 0;
      for (int v = 0; v < N; v++) if (!is_piv[v]) s ^= mt[a[r][v]][cw[k][v]];
      cw[k][piv[r]] = s;
    end
    for (int r = 0; r < M; r++) begin
      s = 0;
      for (int v = 0; v < N; v++) s ^= mt[h[r][v]][cw[k][v]];
      check(s == 0, $sformatf("codeword %0d satisfies check %0d", k, r));
    end
  endtask

  int cyc, t_vn0, t_epi0, channel_errors;
  always @(posedge clk) begin
    cyc++;
    if (rst_n && dut.g_core[0].u_core.kstart) begin
      if (dut.g_core[0].phase == PH_VN && t_vn0 < 0) t_vn0 = cyc;
      if (dut.g_core[0].phase == PH_EPILOGUE) t_epi0 = cyc;
    end
  end

  initial begin
    logic [K-1:0] pending;
    int guard, wrong, nonzero;
    finished = 1'b0; checks = 0; failures = 0; start = '0; cyc = 0; t_vn0 = -1; t_epi0 = -1; channel_errors = 0;
    build_h();
    for (int k = 0; k < K; k++) begin
      make_codeword(k);
      for (int e = 0; e < 2 * E; e++) u_dram.in_mem[k * 2048 + e] = {Q{8'(128 / Q)}};
      for (int v = 0; v < N; v++) begin
        logic [PW-1:0] w;
        int s;
        s = cw[k][v];
        for (int x = 0; x < Q; x++) w[8 * x +: 8] = 8'($urandom_range(14, 4));
        if ($urandom_range(24) == 0) begin
          w[8 * s +: 8] = 8'($urandom_range(48, 38));
          w[8 * ((s + 1 + $urandom_range(Q - 2)) % Q) +: 8] = 8'd58;
          channel_errors++;
        end else begin
          w[8 * s +: 8] = 8'($urandom_range(90, 50));
        end
        u_dram.in_mem[k * 2048 + 2 * E + v] = w;
      end
      rd_base[k] = 32'(k * 2048);
      wr_base[k] = 32'(k * 512);
    end
    for (int i = 0; i < K * 512; i++) u_dram.out_mem[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk); start = '1;
    @(negedge clk); start = '0;
    pending = '1;
    guard = 0;
    while (pending != 0 && guard < 400000) begin
      @(negedge clk);
      pending &= ~done;
      guard++;
    end
    check(pending == 0, "all cores finished");
    repeat (2) @(negedge clk);
    wrong = 0; nonzero = 0;
    for (int k = 0; k < K; k++)
      for (int v = 0; v < N; v++) begin
        logic [PW-1:0] w;
        int best;
        w = u_dram.out_mem[k * 512 + v];
        best = 0;
        for (int x = 0; x < Q; x++) if (sext8(w[8 * x +: 8]) > sext8(w[8 * best +: 8])) best = x;
        if (cw[k][v] != 0) nonzero++;
        checks++;
        if (best != cw[k][v]) begin
          wrong++;
          failures++;
        end
      end
    check(channel_errors > 0, "channel errors present");
    check(nonzero > K * N / 2, "codewords mostly nonzero");
    check(t_epi0 - t_vn0 == ITERS * (5 * (E + 4) + (E / DC) * 2 + 5) + N + 4,
          $sformatf("core 0 decoding took %0d cycles", t_epi0 - t_vn0));
    $display("GF(%0d): channel symbol errors=%0d, wrong decoded symbols=%0d, total cycles=%0d, core 0 decode cycles=%0d",
             Q, channel_errors, wrong, cyc, t_epi0 - t_vn0);
    finished = 1'b1;
  end

endmodule
