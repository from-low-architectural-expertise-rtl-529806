// tb_cn_proc: runs the check-node kernel on GF(4), N = 6, d_v = 2, d_c = 3 (4 check nodes,
// 12 edges) with a random socket-to-edge map held in the testbench. Every edge of l_mcv
// must receive the product of the other two transformed messages of its check node, formed
// in Q16.13 and divided by its z = 0 term (real-valued ratio as reference), or the
// transform of the uniform pmf when that term is not positive. Also checks the
// schedule: one check node every ceil(d_c/2) = 2 clocks, MC*2 + 4 clocks in all.
module tb_cn_proc;
  import tb_ref_pkg::*;
  localparam int GF_M = 2, Q = 4, N = 6, DV = 2, DC = 3, E = 12, MC = 4, R = 2;
  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;

  logic [Q-1:0][7:0] mvc [E];
  logic [Q-1:0][7:0] mcv [E];
  int sock2edge [E];

  logic start, busy, done;
  logic [1:0][3:0] sock_idx, sock_edge;
  logic [1:0] mvc_en, mcv_en, mcv_we;
  logic [1:0][3:0] mvc_addr, mcv_addr;
  logic [1:0][Q-1:0][7:0] mvc_rdata, mcv_wdata;

  cn_proc #(.GF_M(GF_M), .N(N), .DV(DV), .DC(DC)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .busy(busy), .done(done),
    .sock_idx(sock_idx), .sock_edge(sock_edge),
    .mvc_en(mvc_en), .mvc_addr(mvc_addr), .mvc_rdata(mvc_rdata),
    .mcv_en(mcv_en), .mcv_we(mcv_we), .mcv_addr(mcv_addr), .mcv_wdata(mcv_wdata));

  always_comb
    for (int p = 0; p < 2; p++)
      sock_edge[p] = (sock_idx[p] < E) ? 4'(sock2edge[sock_idx[p]]) : 4'd0;

  always #5 clk = ~clk;
  always_ff @(posedge clk)
    for (int p = 0; p < 2; p++) begin
      if (mvc_en[p]) mvc_rdata[p] <= mvc[mvc_addr[p]];
      if (mcv_en[p] && mcv_we[p] && rst_n) mcv[mcv_addr[p]] <= mcv_wdata[p];
    end

  task automatic check(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    int cyc;
    start = 1'b0;
    for (int s = 0; s < E; s++) sock2edge[s] = s;
    for (int s = E - 1; s > 0; s--) begin
      int j, t;
      j = $urandom_range(s);
      t = sock2edge[s]; sock2edge[s] = sock2edge[j]; sock2edge[j] = t;
    end
    for (int e = 0; e < E; e++) begin
      mvc[e][0] = 8'($urandom_range(127, 90));
      for (int z = 1; z < Q; z++) mvc[e][z] = 8'($urandom_range(200) - 100);
      mcv[e] = '0;
    end
    // check node 2: one message with a negative z = 0 term
    mvc[sock2edge[2 * DC]][0] = 8'(-50);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 1;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
    check(cyc, MC * R + R + 2, "cycles");
    for (int c = 0; c < MC; c++)
      for (int k = 0; k < DC; k++) begin
        int prod [Q];
        int e;
        e = sock2edge[c * DC + k];
        for (int z = 0; z < Q; z++) begin
          prod[z] = 8192;
          for (int kk = 0; kk < DC; kk++)
            if (kk != k) prod[z] = ref_mul_q13(prod[z], sext8(mvc[sock2edge[c * DC + kk]][z]) * 64);
        end
        for (int z = 0; z < Q; z++) begin
          int exp_v;
          if (prod[0] > 0) exp_v = ref_ratio(prod[z], prod[0]);
          else             exp_v = (z == 0) ? 127 : 0;
          check(sext8(mcv[e][z]), exp_v, $sformatf("CN %0d socket %0d z %0d", c, k, z));
        end
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
