// permute: in-place GF(2^m) permutation of the variable-to-check messages.
//
// For every edge e of the code (E = N*DV pmfs of l_mvc, one per clock) the pmf is moved to
// the check node's view of the symbol, z = h_e * x:
//     out(h_e * x) = in(x)
// where h_e is the edge's nonzero entry of H and the product is taken in GF(2^m)
// (polynomial basis, so the zero element stays in place). The whole pmf is read through
// port 0 of the array, shuffled by a combinational crossbar, and written back to the same
// row through port 1 two cycles later, so the kernel runs at one pmf per clock. The document
// describes the kernel as a load-then-store loop pair over a local copy, whose initiation
// interval grows with m; the crossbar that removes that dependency is this design's own.
//
// Timing: start is a one-cycle pulse; reads are issued on the next E cycles and done pulses
// E + 3 cycles after start. coef_edge/coef form a combinational lookup into the code ROM.
module permute
  import nbldpc_pkg::*;
#(
  parameter int unsigned GF_M  = 2,
  parameter int unsigned DEPTH = 768,
  localparam int unsigned Q    = 1 << GF_M,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  output logic                    busy,
  output logic                    done,
  // code ROM lookup
  output logic [AW-1:0]           coef_edge,
  input  logic [GF_M-1:0]         coef,
  // array port 0: read
  output logic                    rd_en,
  output logic [AW-1:0]           rd_addr,
  input  logic [Q-1:0][MSG_W-1:0] rd_data,
  // array port 1: write
  output logic                    wr_en,
  output logic [AW-1:0]           wr_addr,
  output logic [Q-1:0][MSG_W-1:0] wr_data
);
  typedef logic [Q-1:0][MSG_W-1:0] pmf_t;

  logic            run;
  logic [AW-1:0]   cnt;
  logic            s1_valid, s1_last, s2_valid, s2_last;
  logic [AW-1:0]   s1_addr, s2_addr;
  logic [GF_M-1:0] s1_coef;
  pmf_t            s1_result, s2_pmf;
  logic            last_item;

  assign last_item = (int'(cnt) == int'(DEPTH) - 1);
  assign busy      = run | s1_valid | s2_valid;
  assign coef_edge = cnt;
  assign rd_en     = run;
  assign rd_addr   = cnt;
  assign wr_en     = s2_valid;
  assign wr_addr   = s2_addr;
  assign wr_data   = s2_pmf;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      run <= 1'b0; cnt <= '0;
      s1_valid <= 1'b0; s1_last <= 1'b0; s1_addr <= '0; s1_coef <= '0;
      s2_valid <= 1'b0; s2_last <= 1'b0; s2_addr <= '0; s2_pmf <= '0;
      done <= 1'b0;
    end else begin
      done <= s2_valid & s2_last;
      if (start && !busy) begin
        run <= 1'b1;
        cnt <= '0;
      end else if (run) begin
        cnt <= cnt + 1'b1;
        if (last_item) run <= 1'b0;
      end
      s1_valid <= run;
      s1_last  <= run & last_item;
      s1_addr  <= cnt;
      s1_coef  <= coef;
      s2_valid <= s1_valid;
      s2_last  <= s1_last;
      s2_addr  <= s1_addr;
      s2_pmf   <= s1_result;
    end
  end

  always_comb begin
    pmf_t        in_pmf, out;
    int unsigned h;
    in_pmf = rd_data;
    h      = int'(s1_coef);
    out    = '0;
    for (int unsigned x = 0; x < Q; x++) out[gf_mul(x, h, GF_M)] = in_pmf[x];
    s1_result = out;
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(start && busy))
    else $error("permute started while busy");
  assert property (@(posedge clk) disable iff (!rst_n) s1_valid |-> s1_coef != '0)
    else $error("permute: zero coefficient");
endmodule
