// tb_burst_arbiter: three requesters issue bursts of random length to one channel whose
// request-ready and data beats come at random. Checks that each accepted request goes to
// the requester a round-robin reference picks, that exactly one requester sees ready,
// that the channel stays with the owner for exactly its burst length in beats, and that no
// request is forwarded during a burst. Counts requests that had to wait for another burst.
module tb_burst_arbiter;
  localparam int K = 3, LW = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;
  logic [K-1:0] req_valid, req_ready;
  logic [K-1:0][LW-1:0] req_len;
  logic down_valid, down_ready, beat, locked;
  logic [1:0] sel;
  int ref_last, ref_owner, ref_left, grants, waited;
  int grants_per [K];

  burst_arbiter #(.K(K), .LEN_W(LW)) dut (.clk(clk), .rst_n(rst_n), .req_valid(req_valid),
    .req_len(req_len), .req_ready(req_ready), .down_valid(down_valid), .down_ready(down_ready),
    .beat(beat), .sel(sel), .locked(locked));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // requesters hold a request until it is accepted
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      req_valid <= '0;
      for (int i = 0; i < K; i++) req_len[i] <= '0;
    end else begin
      for (int i = 0; i < K; i++) begin
        if (req_valid[i] && req_ready[i]) req_valid[i] <= 1'b0;
        else if (!req_valid[i] && $urandom_range(3) == 0) begin
          req_valid[i] <= 1'b1;
          req_len[i]   <= LW'($urandom_range(6, 1));
        end
      end
    end
  end

  always_ff @(negedge clk) begin
    down_ready <= ($urandom_range(2) != 0);
    beat       <= locked && ($urandom_range(1) == 0);
  end

  // reference model, evaluated at each rising edge
  always @(posedge clk) begin
    if (!rst_n) begin
      ref_last = K - 1; ref_left = 0; ref_owner = 0;
    end else begin
      check($countones(req_ready) <= 1, "one ready at most");
      if (ref_left > 0) begin
        check(locked && int'(sel) == ref_owner, "owner holds the channel");
        check(!down_valid, "no request during a burst");
        if (|req_valid) waited++;
        if (beat) ref_left--;
      end else begin
        int pick;
        pick = -1;
        for (int i = 1; i <= K; i++)
          if (pick < 0 && req_valid[(ref_last + i) % K]) pick = (ref_last + i) % K;
        check(!locked, "free when no burst is left");
        check(down_valid == (pick >= 0), "request forwarded when one is pending");
        if (pick >= 0) begin
          check(int'(sel) == pick, $sformatf("round robin picks %0d", pick));
          if (down_ready) begin
            check(req_ready[pick], "ready goes to the picked requester");
            ref_owner = pick; ref_last = pick; ref_left = int'(req_len[pick]);
            grants++; grants_per[pick]++;
          end
        end
      end
    end
  end

  initial begin
    grants = 0; waited = 0;
    foreach (grants_per[i]) grants_per[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (3000) @(negedge clk);
    check(grants > 100, "bursts granted");
    check(waited > 0, "requests waited for a burst to end");
    foreach (grants_per[i]) check(grants_per[i] > grants / (2 * K), "fair share");
    $display("grants=%0d waits=%0d", grants, waited);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
