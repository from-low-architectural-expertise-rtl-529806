// fwht: in-place fast Walsh-Hadamard transform of pmfs, one pmf per clock.
//
// The transform over GF(2^m) is F(z) = sum_x p(x) * (-1)^popcount(x & z). It is computed by
// m radix-2 butterfly stages, all unrolled: stage s pairs entries x and x + 2^s (bit s of x
// clear) into (a + b, a - b). The input Q8.7 words are widened to Q16.13. The forward
// instance (INVERSE = 0) saturates each stage to Q16.13; the inverse instance (INVERSE = 1)
// halves each stage's results (arithmetic shift, rounding toward minus infinity) so that
// the m stages together divide by 2^m and the result is again a pmf. The output is rounded
// half away from zero and saturated to Q8.7.
//
// The decoder holds two instances, one transforming m_vc after permutation and one
// transforming m_cv back after the check-node product, as in the document's kernel
// schedule. The 1/2^m scaling of the second transform is this design's reading of how the
// transform pair must be normalised.
//
// Ports and timing: the kernel walks DEPTH rows, reading row i through port 0 of the array
// and writing the transformed row i back through port 1 two cycles later (initiation
// interval 1). start is a one-cycle pulse; done pulses DEPTH + 3 cycles after start.
module fwht
  import nbldpc_pkg::*;
#(
  parameter int unsigned GF_M    = 2,
  parameter int unsigned DEPTH   = 768,
  parameter bit          INVERSE = 1'b0,
  localparam int unsigned Q      = 1 << GF_M,
  localparam int unsigned AW     = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  output logic                    busy,
  output logic                    done,
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

  logic          run;
  logic [AW-1:0] cnt;
  logic          s1_valid, s1_last, s2_valid, s2_last;
  logic [AW-1:0] s1_addr, s2_addr;
  pmf_t          s1_result, s2_pmf;
  logic          last_item;

  assign last_item = (int'(cnt) == int'(DEPTH) - 1);
  assign busy      = run | s1_valid | s2_valid;
  assign rd_en     = run;
  assign rd_addr   = cnt;
  assign wr_en     = s2_valid;
  assign wr_addr   = s2_addr;
  assign wr_data   = s2_pmf;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      run <= 1'b0; cnt <= '0;
      s1_valid <= 1'b0; s1_last <= 1'b0; s1_addr <= '0;
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
      s2_valid <= s1_valid;
      s2_last  <= s1_last;
      s2_addr  <= s1_addr;
      s2_pmf   <= s1_result;
    end
  end

  // LogGF loop: m butterfly stages; GF loop: all entries of a stage in parallel
  always_comb begin
    acc_t v [Q];
    int   a, b;
    for (int x = 0; x < int'(Q); x++) v[x] = msg_to_acc(msg_t'(rd_data[x]));
    for (int s = 0; s < int'(GF_M); s++) begin
      for (int x = 0; x < int'(Q); x++) begin
        if (((x >> s) & 1) == 0) begin
          a = int'(v[x]);
          b = int'(v[x + (1 << s)]);
          if (INVERSE) begin
            v[x]              = acc_t'((a + b) >>> 1);
            v[x + (1 << s)]   = acc_t'((a - b) >>> 1);
          end else begin
            v[x]              = sat_acc(a + b);
            v[x + (1 << s)]   = sat_acc(a - b);
          end
        end
      end
    end
    for (int x = 0; x < int'(Q); x++) s1_result[x] = acc_to_msg(v[x]);
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(start && busy))
    else $error("fwht started while busy");
endmodule
