// tb_nbldpc_system: end-to-end test of the multi-decoder system with K = 3 cores on the
// 3 x 6 example code over GF(4), 10 iterations, against the behavioural DRAM model.
// All cores are started together, so their prologue bursts contend for the input channel
// and must be served one after another; the write channel is slow, so epilogue bursts also contend. Each core decodes two
// frames (a different codeword and channel error per frame); every decoded symbol must
// equal the codeword. Counted and required at least once: a core waiting for the read
// channel, a core waiting for the write channel, a read-data gap, a write stall, every
// decoder phase, a channel error corrected, and each core finishing its iterations.
module tb_nbldpc_system;
  import tb_ref_pkg::*;
  import nbldpc_pkg::*;
  localparam int GF_M = 2, Q = 4, N = 6, DV = 2, DC = 4, E = 12, PW = 32, K = 3, ITERS = 10;
  localparam int H_EXP [3][6] = '{'{1, -1, 0, 1, -1, 0},
                                  '{2, 1, -1, 0, 0, -1},
                                  '{-1, 1, 2, -1, 2, 0}};
  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;

  logic [K-1:0] start, busy, done;
  logic [K-1:0][31:0] rd_base, wr_base;
  logic rd_req_valid, rd_req_ready, rd_data_valid;
  logic [31:0] rd_req_addr, wr_req_addr;
  logic [15:0] rd_req_len, wr_req_len;
  logic [PW-1:0] rd_data, wr_data;
  logic wr_req_valid, wr_req_ready, wr_data_valid, wr_data_ready;

  nbldpc_system #(.GF_M(GF_M), .N(N), .DV(DV), .DC(DC), .ITERS(ITERS), .K(K),
                  .CODE(CODE_EQ1)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .rd_base(rd_base), .wr_base(wr_base),
    .busy(busy), .done(done),
    .rd_req_valid(rd_req_valid), .rd_req_ready(rd_req_ready), .rd_req_addr(rd_req_addr),
    .rd_req_len(rd_req_len), .rd_data_valid(rd_data_valid), .rd_data(rd_data),
    .wr_req_valid(wr_req_valid), .wr_req_ready(wr_req_ready), .wr_req_addr(wr_req_addr),
    .wr_req_len(wr_req_len), .wr_data_valid(wr_data_valid), .wr_data_ready(wr_data_ready),
    .wr_data(wr_data));

  dram_model #(.PW(PW), .WORDS(1024), .SLOW_WR(1'b1)) u_dram (
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

  // mechanism counters
  int rd_waits, wr_waits, corrected, finished;
  int phase_seen [16];
  always @(posedge clk) if (rst_n) begin
    if ((|dut.c_rd_req_valid) && dut.rd_locked) rd_waits++;
    if ((|dut.c_wr_req_valid) && dut.wr_locked) wr_waits++;
    phase_seen[dut.g_core[0].phase]++;
    phase_seen[dut.g_core[K-1].phase]++;
    for (int i = 0; i < K; i++) if (done[i]) finished++;
  end

  function automatic bit is_codeword(int c [N]);
    for (int r = 0; r < 3; r++) begin
      int s;
      s = 0;
      for (int v = 0; v < N; v++)
        if (H_EXP[r][v] >= 0) s ^= ref_mul(ref_exp(H_EXP[r][v], GF_M), c[v], GF_M);
      if (s != 0) return 1'b0;
    end
    return 1'b1;
  endfunction

  int codewords [$];
  int cw_of [K];
  int err_of [K];

  task automatic load_frame(int core, int frame);
    logic [PW-1:0] w;
    int base, n;
    base = core * 128;
    n = codewords[(core * 2 + frame) % codewords.size()];
    cw_of[core] = n;
    err_of[core] = (core + frame) % N;
    for (int e = 0; e < 2 * E; e++) u_dram.in_mem[base + e] = {4{8'd32}};
    for (int v = 0; v < N; v++) begin
      int s;
      s = (n >> (2 * v)) & 3;
      for (int x = 0; x < Q; x++) w[8 * x +: 8] = 8'd8;
      if (v == err_of[core]) begin
        w[8 * s +: 8] = 8'd48;
        w[8 * ((s + 2) % Q) +: 8] = 8'd60;
      end else begin
        w[8 * s +: 8] = 8'($urandom_range(95, 65));
      end
      u_dram.in_mem[base + 2 * E + v] = w;
    end
    rd_base[core] = 32'(base);
    wr_base[core] = 32'(base + 64);
  endtask

  task automatic check_frame(int core);
    logic [PW-1:0] w;
    for (int v = 0; v < N; v++) begin
      int best, s;
      s = (cw_of[core] >> (2 * v)) & 3;
      w = u_dram.out_mem[core * 128 + 64 + v];
      best = 0;
      for (int x = 0; x < Q; x++) if (sext8(w[8 * x +: 8]) > sext8(w[8 * best +: 8])) best = x;
      check(best == s, $sformatf("core %0d symbol %0d decoded %0d expected %0d", core, v, best, s));
      if (v == err_of[core] && best == s) corrected++;
    end
  endtask

  initial begin
    int cw [N];
    start = '0; rd_base = '0; wr_base = '0;
    rd_waits = 0; wr_waits = 0; corrected = 0; finished = 0;
    foreach (phase_seen[i]) phase_seen[i] = 0;
    for (int i = 0; i < 1024; i++) begin
      u_dram.in_mem[i] = '0; u_dram.out_mem[i] = '0;
    end
    for (int n = 1; n < (1 << (2 * N)); n++) begin
      for (int v = 0; v < N; v++) cw[v] = (n >> (2 * v)) & 3;
      if (is_codeword(cw)) codewords.push_back(n);
    end
    check(codewords.size() > 0, "codewords exist");
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int frame = 0; frame < 2; frame++) begin
      logic [K-1:0] pending;
      int guard;
      for (int c = 0; c < K; c++) load_frame(c, frame);
      @(negedge clk); start = '1;
      @(negedge clk); start = '0;
      pending = '1;
      guard = 0;
      while (pending != 0 && guard < 50000) begin
        @(negedge clk);
        pending &= ~done;
        guard++;
      end
      check(pending == 0, "all cores finished");
      repeat (2) @(negedge clk);
      for (int c = 0; c < K; c++) check_frame(c);
    end
    check(rd_waits > 0, "read channel contention (staggered prologue)");
    check(wr_waits > 0, "write channel contention (staggered epilogue)");
    check(u_dram.rd_gaps > 0, "read data gaps");
    check(u_dram.wr_stalls > 0, "write back-pressure");
    check(corrected > 0, "channel errors corrected");
    check(finished == 2 * K, "jobs completed");
    for (int p = int'(PH_PROLOGUE); p <= int'(PH_EPILOGUE); p++)
      check(phase_seen[p] > 0, $sformatf("phase %0d visited", p));
    $display("rd_waits=%0d wr_waits=%0d rd_gaps=%0d wr_stalls=%0d corrected=%0d jobs=%0d",
             rd_waits, wr_waits, u_dram.rd_gaps, u_dram.wr_stalls, corrected, finished);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
