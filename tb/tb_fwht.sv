// tb_fwht: runs a forward and an inverse transform instance (GF(8), 16 rows each) over
// arrays modelled in the testbench, and compares every row with the direct Hadamard sum
// sum_x p(x) (-1)^popcount(x & z) (divided by 8 for the inverse), rounded to Q8.7.
// Also checks that each pass takes DEPTH + 3 clocks (one pmf per clock) and that the
// forward-then-inverse pair returns a pmf.
module tb_fwht;
  import tb_ref_pkg::*;
  localparam int GF_M = 3, Q = 8, DEPTH = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;

  logic [Q-1:0][7:0] mem [2][DEPTH];
  logic [Q-1:0][7:0] init [2][DEPTH];
  logic start [2], busy [2], done [2], rd_en [2], wr_en [2];
  logic [3:0] rd_addr [2], wr_addr [2];
  logic [Q-1:0][7:0] rd_data [2], wr_data [2];

  fwht #(.GF_M(GF_M), .DEPTH(DEPTH), .INVERSE(1'b0)) u_fwd (
    .clk(clk), .rst_n(rst_n), .start(start[0]), .busy(busy[0]), .done(done[0]),
    .rd_en(rd_en[0]), .rd_addr(rd_addr[0]), .rd_data(rd_data[0]),
    .wr_en(wr_en[0]), .wr_addr(wr_addr[0]), .wr_data(wr_data[0]));
  fwht #(.GF_M(GF_M), .DEPTH(DEPTH), .INVERSE(1'b1)) u_inv (
    .clk(clk), .rst_n(rst_n), .start(start[1]), .busy(busy[1]), .done(done[1]),
    .rd_en(rd_en[1]), .rd_addr(rd_addr[1]), .rd_data(rd_data[1]),
    .wr_en(wr_en[1]), .wr_addr(wr_addr[1]), .wr_data(wr_data[1]));

  always #5 clk = ~clk;
  always_ff @(posedge clk) begin
    for (int i = 0; i < 2; i++) begin
      if (rd_en[i]) rd_data[i] <= mem[i][rd_addr[i]];
      if (wr_en[i] && rst_n) mem[i][wr_addr[i]] <= wr_data[i];
    end
  end

  task automatic check(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic run(int i);
    int cyc;
    @(negedge clk);
    start[i] = 1'b1;
    @(negedge clk);
    start[i] = 1'b0;
    cyc = 1;
    while (!done[i]) begin
      @(negedge clk);
      cyc++;
    end
    check(cyc, DEPTH + 3, "cycles per pass");
  endtask

  initial begin
    start[0] = 0; start[1] = 0;
    // forward input: random pmfs (entries sum to at most 1.0)
    for (int r = 0; r < DEPTH; r++) begin
      int left;
      left = 128;
      for (int x = 0; x < Q; x++) begin
        int v;
        v = (x == Q - 1) ? left : $urandom_range(left);
        if (r == 0) v = (x == 3) ? 128 : 0;   // a point mass
        if (v > 127) v = 127;
        left -= v;
        mem[0][r][x] = 8'(v);
      end
      // inverse input: any Q8.7 values
      for (int x = 0; x < Q; x++) mem[1][r][x] = 8'($urandom);
      init[0][r] = mem[0][r];
      init[1][r] = mem[1][r];
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run(0);
    run(1);
    for (int i = 0; i < 2; i++)
      for (int r = 0; r < DEPTH; r++)
        for (int z = 0; z < Q; z++) begin
          real s;
          s = 0.0;
          for (int x = 0; x < Q; x++)
            s += ((popcount(x & z) % 2) ? -1.0 : 1.0) * real'(sext8(init[i][r][x])) / 128.0;
          if (i == 1) s = s / real'(Q);
          check(sext8(mem[i][r][z]), ref_q87(s), $sformatf("%s row %0d z %0d",
                i ? "inverse" : "forward", r, z));
        end
    // round trip of the point mass: inverse(forward(delta_3)) = delta_3 (up to saturation)
    mem[1][0] = mem[0][0];
    run(1);
    for (int x = 0; x < Q; x++)
      check(sext8(mem[1][0][x]), (x == 3) ? 127 : 0, "round trip");
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
