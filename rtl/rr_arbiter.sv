// rr_arbiter: round-robin arbiter for the many-to-one stream channel.
//
// The grant goes to the first requester found when scanning upward from a
// rotating priority pointer (wrapping around). The grant is combinational on
// req. When 'advance' is high (the granted burst ends) the pointer moves to
// the position just after the current winner, so that requester gets lowest
// priority next. The document names a round-robin arbiter with the priority
// function of a cited reference; the rotating-pointer scan used here is this
// design's own choice. Synchronous, active-low reset puts the pointer at 0.
module rr_arbiter #(
  parameter int unsigned N = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic         advance,
  output logic [N-1:0] grant,
  output logic [((N > 1) ? $clog2(N) : 1)-1:0] grant_idx,
  output logic         any_grant
);
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;
  logic [IW-1:0] ptr;

  // requests at or above the pointer win over those below it
  logic [N-1:0] hi_req;
  logic         hi_any;

  always_comb begin
    for (int unsigned i = 0; i < N; i++) hi_req[i] = req[i] && (i >= 32'(ptr));
    hi_any    = |hi_req;
    grant     = '0;
    grant_idx = '0;
    any_grant = |req;
    for (int i = N - 1; i >= 0; i--)
      if (hi_any ? hi_req[i] : req[i]) grant_idx = IW'(i);
    if (any_grant) grant[grant_idx] = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) ptr <= '0;
    else if (advance && any_grant)
      ptr <= (grant_idx == IW'(N-1)) ? '0 : grant_idx + 1'b1;
  end

  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(grant));
endmodule
