// decoder_ctrl: phase sequencer of one decoder core.
//
// A decoding job runs the phases
//     PROLOGUE, ITERS x (VN, PERM, FWHT_VC, CN, FWHT_CV, DEPERM), APP, EPILOGUE
// one after another: each kernel owns the local arrays while its phase is active, so only
// one kernel runs at a time. On entering a phase the controller raises kstart for one clock;
// the core forwards it to the kernel of that phase and returns that kernel's done pulse on
// kdone, which moves the controller to the next phase. The decoding order follows the
// document's kernel schedule and its fixed iteration count (no early stop on a satisfied
// syndrome). The APP phase, which forms the a-posteriori pmfs once after the last
// iteration, is this design's addition.
//
// Interface: start (pulse, ignored while busy) begins a job; done pulses for one clock when
// the epilogue has finished; iter counts completed iterations of the current job.
module decoder_ctrl
  import nbldpc_pkg::*;
#(
  parameter int unsigned ITERS = 10,
  localparam int unsigned IW   = $clog2(ITERS + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          kdone,
  output phase_e        phase,
  output logic          kstart,
  output logic          busy,
  output logic          done,
  output logic [IW-1:0] iter
);
  phase_e next_phase;

  assign busy = (phase != PH_IDLE);

  always_comb begin
    case (phase)
      PH_PROLOGUE: next_phase = PH_VN;
      PH_VN:       next_phase = PH_PERM;
      PH_PERM:     next_phase = PH_FWHT_VC;
      PH_FWHT_VC:  next_phase = PH_CN;
      PH_CN:       next_phase = PH_FWHT_CV;
      PH_FWHT_CV:  next_phase = PH_DEPERM;
      PH_DEPERM:   next_phase = (int'(iter) + 1 < int'(ITERS)) ? PH_VN : PH_APP;
      PH_APP:      next_phase = PH_EPILOGUE;
      default:     next_phase = PH_IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase  <= PH_IDLE;
      kstart <= 1'b0;
      done   <= 1'b0;
      iter   <= '0;
    end else begin
      kstart <= 1'b0;
      done   <= 1'b0;
      if (phase == PH_IDLE) begin
        if (start) begin
          phase  <= PH_PROLOGUE;
          kstart <= 1'b1;
          iter   <= '0;
        end
      end else if (kdone) begin
        phase <= next_phase;
        if (phase == PH_DEPERM) iter <= iter + 1'b1;
        if (next_phase == PH_IDLE) done <= 1'b1;
        else                       kstart <= 1'b1;
      end
    end
  end

  initial assert (ITERS >= 1) else $error("decoder_ctrl: ITERS must be at least 1");
  assert property (@(posedge clk) disable iff (!rst_n) kstart |-> phase != PH_IDLE)
    else $error("decoder_ctrl: kernel start while idle");
endmodule
