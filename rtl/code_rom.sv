// code_rom: description of the parity-check matrix H used by one decoder core.
//
// Edges are numbered in variable-node order: edge e = v*DV + t is the t-th nonzero of
// column v. Check node c owns the sockets c*DC .. c*DC + DC - 1. The ROM answers two
// questions, each on two independent combinational ports:
//   sock_idx -> sock_edge : which edge sits in a given check-node socket (cn_proc)
//   coef_edge -> coef     : the nonzero GF(2^m) entry h_cv of an edge (permute, depermute)
// Both tables are built at elaboration by constant functions.
//
// CODE_EQ1 is the 3 x 6 example matrix over GF(4) (rows = check nodes, columns = variable
// nodes, d_v = 2, d_c = 4). CODE_GEN is a regular code of any size: socket (A*e) mod E holds
// edge e, with A the smallest integer >= DC+2 that is coprime to E, and edge e carries
// alpha^(e mod (2^m - 1)). The document names its evaluation code only by its sizes; this
// generated structure is this design's stand-in for it.
module code_rom
  import nbldpc_pkg::*;
#(
  parameter int unsigned GF_M = 2,
  parameter int unsigned N    = 384,
  parameter int unsigned DV   = 2,
  parameter int unsigned DC   = 3,
  parameter code_e       CODE = CODE_GEN,
  localparam int unsigned E   = N * DV,
  localparam int unsigned AW  = (E > 1) ? $clog2(E) : 1
) (
  input  logic [1:0][AW-1:0]   sock_idx,
  output logic [1:0][AW-1:0]   sock_edge,
  input  logic [1:0][AW-1:0]   coef_edge,
  output logic [1:0][GF_M-1:0] coef
);
  typedef logic [AW-1:0]   etab_t [E];
  typedef logic [GF_M-1:0] ctab_t [E];

  // Eq. (1): sockets of CN0, CN1, CN2 (in column order) and the alpha exponents per edge.
  localparam int EQ1_SOCK [12] = '{0, 4, 6, 10, 1, 2, 7, 8, 3, 5, 9, 11};
  localparam int EQ1_EXP  [12] = '{1, 2, 1, 1, 0, 2, 1, 0, 0, 2, 0, 0};

  function automatic int gcd(int a, int b);
    int t;
    while (b != 0) begin
      t = a % b;
      a = b;
      b = t;
    end
    return a;
  endfunction

  function automatic etab_t make_sock2edge();
    etab_t tab;
    int    a;
    for (int s = 0; s < int'(E); s++) tab[s] = '0;
    if (CODE == CODE_EQ1) begin
      for (int s = 0; s < 12 && s < int'(E); s++) tab[s] = AW'(EQ1_SOCK[s]);
    end else begin
      a = int'(DC) + 2;
      while (gcd(a, int'(E)) != 1) a++;
      for (int e = 0; e < int'(E); e++) tab[(a * e) % int'(E)] = AW'(e);
    end
    return tab;
  endfunction

  function automatic ctab_t make_coef();
    ctab_t tab;
    int    qm1;
    qm1 = (1 << GF_M) - 1;
    for (int e = 0; e < int'(E); e++) begin
      if (CODE == CODE_EQ1 && e < 12) tab[e] = GF_M'(gf_alpha_pow(EQ1_EXP[e], GF_M));
      else                            tab[e] = GF_M'(gf_alpha_pow(e % qm1, GF_M));
    end
    return tab;
  endfunction

  localparam etab_t SOCK2EDGE = make_sock2edge();
  localparam ctab_t COEF      = make_coef();

  always_comb begin
    for (int p = 0; p < 2; p++) begin
      sock_edge[p] = (int'(sock_idx[p]) < int'(E))  ? SOCK2EDGE[sock_idx[p]]  : '0;
      coef[p]      = (int'(coef_edge[p]) < int'(E)) ? COEF[coef_edge[p]]      : GF_M'(1);
    end
  end

  initial begin
    assert (CODE != CODE_EQ1 || (N == 6 && DV == 2 && DC == 4 && GF_M >= 2))
      else $error("CODE_EQ1 needs N=6, DV=2, DC=4 and m >= 2");
    assert ((N * DV) % DC == 0) else $error("N*DV must be a multiple of DC");
  end
endmodule
