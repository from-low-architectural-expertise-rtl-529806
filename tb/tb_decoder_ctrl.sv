// tb_decoder_ctrl: drives the phase sequencer with kernels modelled as random delays
// (ITERS = 3). Checks the exact phase sequence PROLOGUE, 3 x (VN PERM FWHT_VC CN FWHT_CV
// DEPERM), APP, EPILOGUE, one kernel start per phase, the iteration counter, the done pulse,
// and that a start while busy is ignored. Two jobs are run back to back.
module tb_decoder_ctrl;
  import nbldpc_pkg::*;
  localparam int ITERS = 3;
  logic clk = 1'b0, rst_n = 1'b0;
  logic start, kdone, kstart, busy, done;
  phase_e phase;
  logic [1:0] iter;
  int checks = 0, failures = 0;
  phase_e seen [$];
  int delay;

  decoder_ctrl #(.ITERS(ITERS)) dut (.clk(clk), .rst_n(rst_n), .start(start), .kdone(kdone),
    .phase(phase), .kstart(kstart), .busy(busy), .done(done), .iter(iter));

  always #5 clk = ~clk;

  // kernel model: done a random number of cycles after its start
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      kdone <= 1'b0; delay <= -1;
    end else begin
      kdone <= 1'b0;
      if (kstart) begin
        seen.push_back(phase);
        delay <= $urandom_range(6);
      end else if (delay == 0) begin
        kdone <= 1'b1; delay <= -1;
      end else if (delay > 0) delay <= delay - 1;
    end
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    phase_e exp_seq [$];
    start = 1'b0;
    exp_seq.push_back(PH_PROLOGUE);
    for (int i = 0; i < ITERS; i++) begin
      exp_seq.push_back(PH_VN); exp_seq.push_back(PH_PERM); exp_seq.push_back(PH_FWHT_VC);
      exp_seq.push_back(PH_CN); exp_seq.push_back(PH_FWHT_CV); exp_seq.push_back(PH_DEPERM);
    end
    exp_seq.push_back(PH_APP); exp_seq.push_back(PH_EPILOGUE);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int job = 0; job < 2; job++) begin
      int guard;
      seen.delete();
      @(negedge clk); start = 1'b1;
      @(negedge clk); start = 1'b0;
      check(busy, "busy after start");
      repeat (2) @(negedge clk);
      start = 1'b1;                       // ignored while busy
      @(negedge clk); start = 1'b0;
      guard = 0;
      while (!done && guard < 2000) begin
        @(negedge clk);
        guard++;
      end
      check(done, "done pulse");
      check(int'(iter) == ITERS, $sformatf("iterations %0d", iter));
      @(negedge clk);
      check(!done && !busy, "idle after done");
      check(seen.size() == exp_seq.size(), $sformatf("%0d kernel starts", seen.size()));
      for (int i = 0; i < exp_seq.size() && i < seen.size(); i++)
        check(seen[i] == exp_seq[i], $sformatf("phase %0d is %s", i, seen[i].name()));
    end
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
