// tb_code_rom: checks both parity-check descriptions.
// The 3 x 6 example matrix over GF(4) is written out here as exponents of alpha (-1 for a
// zero entry); every check-node socket must name an edge of a column with a nonzero entry in
// that row, carrying that entry. The generated N = 384 code must map sockets to edges
// one-to-one, never join two edges of one variable node to one check node, and carry
// nonzero coefficients.
module tb_code_rom;
  import tb_ref_pkg::*;
  localparam int H_EXP [3][6] = '{'{1, -1, 0, 1, -1, 0},
                                  '{2, 1, -1, 0, 0, -1},
                                  '{-1, 1, 2, -1, 2, 0}};
  int checks = 0, failures = 0;

  logic [1:0][3:0]  a_sock, a_edge, a_cedge;
  logic [1:0][1:0]  a_coef;
  logic [1:0][9:0]  b_sock, b_edge, b_cedge;
  logic [1:0][1:0]  b_coef;

  code_rom #(.GF_M(2), .N(6), .DV(2), .DC(4), .CODE(nbldpc_pkg::CODE_EQ1)) u_eq1 (
    .sock_idx(a_sock), .sock_edge(a_edge), .coef_edge(a_cedge), .coef(a_coef));
  code_rom #(.GF_M(2), .N(384), .DV(2), .DC(3), .CODE(nbldpc_pkg::CODE_GEN)) u_gen (
    .sock_idx(b_sock), .sock_edge(b_edge), .coef_edge(b_cedge), .coef(b_coef));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    int seen [768];
    int cn_of_edge [768];
    int used [12];
    a_sock = '0; a_cedge = '0; b_sock = '0; b_cedge = '0;
    foreach (used[i]) used[i] = 0;
    // example matrix
    for (int c = 0; c < 3; c++) begin
      for (int k = 0; k < 4; k++) begin
        int e, v, cnt;
        a_sock[k % 2] = 4'(c * 4 + k);
        #1;
        e = int'(a_edge[k % 2]);
        v = e / 2;
        check(H_EXP[c][v] >= 0, $sformatf("socket %0d of CN %0d on a zero entry", k, c));
        // the edge is the t-th nonzero of column v, t counting rows from the top
        cnt = 0;
        for (int r = 0; r < c; r++) if (H_EXP[r][v] >= 0) cnt++;
        check(e % 2 == cnt, $sformatf("edge order in column %0d", v));
        used[e]++;
        a_cedge[0] = 4'(e);
        #1;
        if (H_EXP[c][v] >= 0)
          check(int'(a_coef[0]) == ref_exp(H_EXP[c][v], 2),
                $sformatf("coefficient of H[%0d][%0d]", c, v));
      end
    end
    foreach (used[i]) check(used[i] == 1, "example edge used once");
    // generated code
    foreach (seen[i]) seen[i] = 0;
    for (int s = 0; s < 768; s++) begin
      b_sock[0] = 10'(s);
      b_sock[1] = 10'(767 - s);
      #1;
      seen[b_edge[0]]++;
      cn_of_edge[b_edge[0]] = s / 3;
      check(b_edge[1] < 768, "port 1 in range");
    end
    foreach (seen[i]) check(seen[i] == 1, "generated: each edge in one socket");
    for (int v = 0; v < 384; v++)
      check(cn_of_edge[2 * v] != cn_of_edge[2 * v + 1], "generated: no double connection");
    for (int e = 0; e < 768; e++) begin
      b_cedge[1] = 10'(e);
      #1;
      check(b_coef[1] != 0, "generated: nonzero coefficient");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
