// tb_burst_dma: prologue and epilogue bursts of one core (GF(4), N = 8, d_v = 2) against the
// behavioural DRAM model, which inserts gaps in read data and drops write-ready at random.
// After the prologue the three arrays must hold the frame words in the order m_cv, m_vc,
// m_v; after the epilogue the output memory must hold l_mv row by row at wr_base. Runs two
// frames at different addresses and checks the burst lengths requested.
module tb_burst_dma;
  localparam int GF_M = 2, Q = 4, N = 8, DV = 2, E = 16, PW = 32;
  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;

  logic start_in, done_in, start_out, done_out, busy;
  logic [31:0] rd_base, wr_base;
  logic rd_req_valid, rd_req_ready, rd_data_valid;
  logic [31:0] rd_req_addr, wr_req_addr;
  logic [15:0] rd_req_len, wr_req_len;
  logic [PW-1:0] rd_data, wr_data;
  logic wr_req_valid, wr_req_ready, wr_data_valid, wr_data_ready;
  logic mcv_en, mvc_en, mv_en, mv_we;
  logic [3:0] mcv_addr, mvc_addr, mv_addr;
  logic [PW-1:0] wdata, mv_rdata;
  logic [PW-1:0] mcv [E], mvc [E], mv [N];

  burst_dma #(.GF_M(GF_M), .N(N), .DV(DV)) dut (
    .clk(clk), .rst_n(rst_n), .start_in(start_in), .done_in(done_in), .start_out(start_out),
    .done_out(done_out), .busy(busy), .rd_base(rd_base), .wr_base(wr_base),
    .rd_req_valid(rd_req_valid), .rd_req_ready(rd_req_ready), .rd_req_addr(rd_req_addr),
    .rd_req_len(rd_req_len), .rd_data_valid(rd_data_valid), .rd_data(rd_data),
    .wr_req_valid(wr_req_valid), .wr_req_ready(wr_req_ready), .wr_req_addr(wr_req_addr),
    .wr_req_len(wr_req_len), .wr_data_valid(wr_data_valid), .wr_data_ready(wr_data_ready),
    .wr_data(wr_data), .mcv_en(mcv_en), .mcv_addr(mcv_addr), .mvc_en(mvc_en),
    .mvc_addr(mvc_addr), .mv_en(mv_en), .mv_we(mv_we), .mv_addr(mv_addr), .wdata(wdata),
    .mv_rdata(mv_rdata));

  dram_model #(.PW(PW), .WORDS(256)) u_dram (
    .clk(clk), .rst_n(rst_n), .rd_req_valid(rd_req_valid), .rd_req_ready(rd_req_ready),
    .rd_req_addr(rd_req_addr), .rd_req_len(rd_req_len), .rd_data_valid(rd_data_valid),
    .rd_data(rd_data), .wr_req_valid(wr_req_valid), .wr_req_ready(wr_req_ready),
    .wr_req_addr(wr_req_addr), .wr_req_len(wr_req_len), .wr_data_valid(wr_data_valid),
    .wr_data_ready(wr_data_ready), .wr_data(wr_data));

  always #5 clk = ~clk;
  always_ff @(posedge clk) begin
    if (mcv_en && rst_n) mcv[mcv_addr] <= wdata;
    if (mvc_en && rst_n) mvc[mvc_addr] <= wdata;
    if (mv_en) begin
      mv_rdata <= mv[mv_addr[2:0]];
      if (mv_we && rst_n) mv[mv_addr[2:0]] <= wdata;
    end
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic pulse_wait(bit out);
    int guard;
    @(negedge clk);
    if (out) start_out = 1'b1; else start_in = 1'b1;
    @(negedge clk);
    start_out = 1'b0; start_in = 1'b0;
    guard = 0;
    while (!(out ? done_out : done_in) && guard < 1000) begin
      @(negedge clk);
      guard++;
    end
    check(guard < 1000, "burst finished");
  endtask

  always @(posedge clk) begin
    if (rd_req_valid && rd_req_ready) begin
      checks++;
      if (rd_req_len != 16'(2 * E + N) || rd_req_addr != rd_base) failures++;
    end
    if (wr_req_valid && wr_req_ready) begin
      checks++;
      if (wr_req_len != 16'(N) || wr_req_addr != wr_base) failures++;
    end
  end

  initial begin
    start_in = 0; start_out = 0;
    for (int i = 0; i < 256; i++) begin
      u_dram.in_mem[i]  = $urandom;
      u_dram.out_mem[i] = '0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < 2; f++) begin
      rd_base = 32'(10 + f * 100);
      wr_base = 32'(40 + f * 100);
      pulse_wait(1'b0);
      for (int r = 0; r < E; r++) begin
        check(mcv[r] == u_dram.in_mem[rd_base + r], $sformatf("m_cv row %0d", r));
        check(mvc[r] == u_dram.in_mem[rd_base + E + r], $sformatf("m_vc row %0d", r));
      end
      for (int r = 0; r < N; r++)
        check(mv[r] == u_dram.in_mem[rd_base + 2 * E + r], $sformatf("m_v row %0d", r));
      for (int r = 0; r < N; r++) mv[r] = $urandom;
      pulse_wait(1'b1);
      repeat (2) @(negedge clk);
      for (int r = 0; r < N; r++)
        check(u_dram.out_mem[wr_base + r] == mv[r], $sformatf("m_v* row %0d", r));
    end
    check(u_dram.rd_gaps > 0, "read gaps exercised");
    check(u_dram.wr_stalls > 0, "write stalls exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
