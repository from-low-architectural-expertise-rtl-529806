// burst_arbiter: round-robin owner of one DRAM channel, held for a whole burst.
//
// Several decoder cores share one DRAM channel. While the channel is free the arbiter offers
// it to the first requesting core after the previous owner (round-robin); the DRAM's
// request-ready is passed to that core only. When the request handshake completes, the core
// owns the channel until `beat` has pulsed req_len times, and no further request is
// forwarded meanwhile. Bursts of different cores therefore follow one another, which is
// the staggered use of DRAM the multi-core system relies on: a core computes from its own
// local arrays and needs the channel only for its prologue and epilogue. The round-robin
// policy and the whole-burst lock are this design's choices.
//
// sel is the core whose request (while free) or data (while locked) the channel carries.
module burst_arbiter #(
  parameter int unsigned K     = 14,
  parameter int unsigned LEN_W = 16,
  localparam int unsigned KW   = (K > 1) ? $clog2(K) : 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [K-1:0]             req_valid,
  input  logic [K-1:0][LEN_W-1:0]  req_len,
  output logic [K-1:0]             req_ready,
  output logic                     down_valid,
  input  logic                     down_ready,
  input  logic                     beat,
  output logic [KW-1:0]            sel,
  output logic                     locked
);
  logic [KW-1:0]    owner, last, cand;
  logic             cand_valid;
  logic [LEN_W-1:0] remaining;

  always_comb begin
    int idx;
    cand       = last;
    cand_valid = 1'b0;
    for (int i = int'(K); i >= 1; i--) begin
      idx = (int'(last) + i) % int'(K);
      if (req_valid[idx]) begin
        cand       = KW'(idx);
        cand_valid = 1'b1;
      end
    end
  end

  assign sel        = locked ? owner : cand;
  assign down_valid = !locked && cand_valid;

  always_comb begin
    req_ready = '0;
    if (!locked && cand_valid) req_ready[cand] = down_ready;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      locked    <= 1'b0;
      owner     <= '0;
      last      <= KW'(K - 1);
      remaining <= '0;
    end else if (!locked) begin
      if (cand_valid && down_ready) begin
        locked    <= (req_len[cand] != 0);
        owner     <= cand;
        last      <= cand;
        remaining <= req_len[cand];
      end
    end else if (beat) begin
      remaining <= remaining - 1'b1;
      if (remaining == LEN_W'(1)) locked <= 1'b0;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(req_ready))
    else $error("burst_arbiter: more than one request granted");
  assert property (@(posedge clk) disable iff (!rst_n) locked |-> !down_valid)
    else $error("burst_arbiter: request forwarded during a burst");
endmodule
