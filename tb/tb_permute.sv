// tb_permute: runs the permute kernel over 16 GF(8) pmfs held in a testbench array, with the
// coefficient of row e set to alpha^(e mod 7) (row 3 uses alpha^0 = 1, an identity). Each
// row must satisfy out(h*x) = in(x), with the field product taken from log/antilog tables;
// the pass must take DEPTH + 3 clocks. A second pass with the same coefficients checks
// that repeated application composes as the field product says.
module tb_permute;
  import tb_ref_pkg::*;
  localparam int GF_M = 3, Q = 8, DEPTH = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;

  logic [Q-1:0][7:0] mem [DEPTH];
  logic [Q-1:0][7:0] init [DEPTH];
  logic start, busy, done, rd_en, wr_en;
  logic [3:0] rd_addr, wr_addr, coef_edge;
  logic [GF_M-1:0] coef;
  logic [Q-1:0][7:0] rd_data, wr_data;

  permute #(.GF_M(GF_M), .DEPTH(DEPTH)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .busy(busy), .done(done),
    .coef_edge(coef_edge), .coef(coef),
    .rd_en(rd_en), .rd_addr(rd_addr), .rd_data(rd_data),
    .wr_en(wr_en), .wr_addr(wr_addr), .wr_data(wr_data));

  assign coef = GF_M'(ref_exp(int'(coef_edge) % 7, GF_M));

  always #5 clk = ~clk;
  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= mem[rd_addr];
    if (wr_en && rst_n) mem[wr_addr] <= wr_data;
  end

  task automatic check(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic run();
    int cyc;
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 1;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
    check(cyc, DEPTH + 3, "cycles per pass");
  endtask

  task automatic compare(int pass);
    for (int r = 0; r < DEPTH; r++) begin
      int h;
      logic [Q-1:0][7:0] exp_pmf;
      h = ref_exp(r % 7, GF_M);
      for (int x = 0; x < Q; x++) exp_pmf[ref_mul(x, h, GF_M)] = init[r][x];
      for (int x = 0; x < Q; x++)
        check(int'(mem[r][x]), int'(exp_pmf[x]), $sformatf("pass %0d row %0d x %0d", pass, r, x));
      init[r] = mem[r];
    end
  endtask

  initial begin
    start = 1'b0;
    for (int r = 0; r < DEPTH; r++) begin
      for (int x = 0; x < Q; x++) mem[r][x] = 8'(r * 16 + x);
      init[r] = mem[r];
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run();
    compare(1);
    run();
    compare(2);
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
