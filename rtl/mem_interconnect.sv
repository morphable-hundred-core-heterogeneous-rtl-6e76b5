// mem_interconnect: second-layer, arbitrated shared-bus interconnect (TADDR bus).
//
// N_M masters share one bus to two targets. Each master raises req with we,
// addr (TADDR) and wdata and holds them until it sees gnt. A round-robin
// arbiter picks one requester; address bit SEL_BIT picks the target (0: the
// local memory, 1: the second target). The request is passed to that target
// in the same cycle and gnt is returned when the target accepts it. One access
// is outstanding at a time: the response (rvalid, rdata) of the target is
// routed back to the owner of the access, and a new access can be granted in
// the cycle the previous response arrives, so a target answering after one
// cycle sustains one access per cycle. rdata is broadcast; only the owner sees
// rvalid. Targets must answer at least one cycle after accepting.
// The document derives this bus from the stream interconnect by replacing
// TDEST with an address and merging the two channels; the req/gnt/rvalid
// protocol and the one-outstanding rule are this design's.
module mem_interconnect
  import morph_pkg::*;
#(
  parameter int unsigned N_M     = 15,
  parameter int unsigned SEL_BIT = 31
) (
  input  logic                clk,
  input  logic                rst_n,
  input  mem_req_t [N_M-1:0]  m_req,
  output logic     [N_M-1:0]  m_gnt,
  output mem_rsp_t [N_M-1:0]  m_rsp,
  output mem_req_t [1:0]      t_req,
  input  logic     [1:0]      t_gnt,
  input  mem_rsp_t [1:0]      t_rsp
);
  localparam int unsigned IW = (N_M > 1) ? $clog2(N_M) : 1;

  logic           busy, tgt;
  logic [IW-1:0]  owner;
  logic [N_M-1:0] req_v, grant;
  logic [IW-1:0]  sel;
  logic           any, rsp_now, can_issue, tsel, issued;

  always_comb
    for (int unsigned i = 0; i < N_M; i++) req_v[i] = m_req[i].req;

  assign rsp_now   = busy && t_rsp[tgt].rvalid;
  assign can_issue = !busy || rsp_now;

  rr_arbiter #(.N(N_M)) u_arb (
    .clk, .rst_n, .req(can_issue ? req_v : '0), .advance(issued),
    .grant, .grant_idx(sel), .any_grant(any)
  );

  assign tsel   = m_req[sel].addr[SEL_BIT];
  assign issued = any && t_gnt[tsel];

  always_comb begin
    t_req = '0;
    if (any) begin
      t_req[tsel] = m_req[sel];
      t_req[tsel].req = 1'b1;
    end
    for (int unsigned i = 0; i < N_M; i++) begin
      m_gnt[i]        = issued && (sel == IW'(i));
      m_rsp[i].rvalid = rsp_now && (owner == IW'(i));
      m_rsp[i].rdata  = t_rsp[tgt].rdata;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      tgt   <= 1'b0;
      owner <= '0;
    end else if (issued) begin
      busy  <= 1'b1;
      tgt   <= tsel;
      owner <= sel;
    end else if (rsp_now) begin
      busy  <= 1'b0;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(grant));
endmodule
