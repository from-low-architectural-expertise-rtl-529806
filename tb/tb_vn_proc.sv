// tb_vn_proc: runs the variable-node kernel on GF(4), N = 8, d_v = 2 over arrays held in
// the testbench. Message mode: each m_vc[v*2+t] must equal m_v[v] times the other m_cv of
// node v, formed in Q16.13 and normalised to sum 1 in Q8.7 (real-valued ratio as reference).
// A-posteriori mode: m_v[v] is overwritten with the normalised product of m_v and both
// m_cv. Inputs include negative rounding residue and an all-zero product (uniform output).
// Each pass must take E + 3 or N + 3 clocks.
module tb_vn_proc;
  import tb_ref_pkg::*;
  localparam int GF_M = 2, Q = 4, N = 8, DV = 2, E = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;

  logic [Q-1:0][7:0] mv [N];
  logic [Q-1:0][7:0] mcv [E];
  logic [Q-1:0][7:0] mvc [E];
  logic [Q-1:0][7:0] mv0 [N];

  logic start, app_mode, busy, done;
  logic [1:0] mv_en, mv_we, mcv_en;
  logic [1:0][3:0] mv_addr, mcv_addr;
  logic [1:0][Q-1:0][7:0] mv_wdata, mv_rdata, mcv_rdata;
  logic mvc_en;
  logic [3:0] mvc_addr;
  logic [Q-1:0][7:0] mvc_wdata;

  vn_proc #(.GF_M(GF_M), .N(N), .DV(DV)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .app_mode(app_mode), .busy(busy), .done(done),
    .mv_en(mv_en), .mv_we(mv_we), .mv_addr(mv_addr), .mv_wdata(mv_wdata), .mv_rdata(mv_rdata),
    .mcv_en(mcv_en), .mcv_addr(mcv_addr), .mcv_rdata(mcv_rdata),
    .mvc_en(mvc_en), .mvc_addr(mvc_addr), .mvc_wdata(mvc_wdata));

  always #5 clk = ~clk;
  always_ff @(posedge clk) begin
    for (int p = 0; p < 2; p++) begin
      if (mv_en[p]) mv_rdata[p] <= mv[mv_addr[p][2:0]];
      if (mv_en[p] && mv_we[p] && rst_n) mv[mv_addr[p][2:0]] <= mv_wdata[p];
      if (mcv_en[p]) mcv_rdata[p] <= mcv[mcv_addr[p]];
    end
    if (mvc_en && rst_n) mvc[mvc_addr] <= mvc_wdata;
  end

  task automatic check(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic run(bit app, int exp_cycles);
    int cyc;
    @(negedge clk);
    start = 1'b1; app_mode = app;
    @(negedge clk);
    start = 1'b0; app_mode = 1'b0;
    cyc = 1;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
    check(cyc, exp_cycles, "cycles per pass");
  endtask

  function automatic int pos(logic [7:0] v);
    int s;
    s = sext8(v);
    return (s < 0) ? 0 : s * 64;
  endfunction

  // reference normalised product; skip < 0 means "use every m_cv"
  function automatic logic [Q-1:0][7:0] ref_vn(int v, int skip);
    int prod [Q];
    int sum;
    logic [Q-1:0][7:0] r;
    sum = 0;
    for (int x = 0; x < Q; x++) begin
      prod[x] = pos(mv0[v][x]);
      for (int t = 0; t < DV; t++)
        if (t != skip) prod[x] = ref_mul_q13(prod[x], pos(mcv[v * DV + t][x]));
      sum += prod[x];
    end
    for (int x = 0; x < Q; x++) r[x] = 8'((sum > 0) ? ref_ratio(prod[x], sum) : 32);
    return r;
  endfunction

  initial begin
    start = 1'b0; app_mode = 1'b0;
    for (int v = 0; v < N; v++)
      for (int x = 0; x < Q; x++) mv[v][x] = 8'($urandom_range(100));
    for (int e = 0; e < E; e++)
      for (int x = 0; x < Q; x++) mcv[e][x] = 8'($urandom_range(127));
    mcv[5][2] = 8'hff;                       // -1 LSB of rounding residue
    mv[3] = '0;                              // zero product: uniform result
    for (int v = 0; v < N; v++) mv0[v] = mv[v];
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run(1'b0, E + 3);
    for (int e = 0; e < E; e++) begin
      logic [Q-1:0][7:0] r;
      r = ref_vn(e / DV, e % DV);
      for (int x = 0; x < Q; x++)
        check(sext8(mvc[e][x]), sext8(r[x]), $sformatf("m_vc edge %0d x %0d", e, x));
    end
    run(1'b1, N + 3);
    for (int v = 0; v < N; v++) begin
      logic [Q-1:0][7:0] r;
      r = ref_vn(v, -1);
      for (int x = 0; x < Q; x++)
        check(sext8(mv[v][x]), sext8(r[x]), $sformatf("m_v* node %0d x %0d", v, x));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
