// axis_interconnect: light 16-port AXI-Stream interconnect (core and cluster
// interconnection networks).
//
// Every port has an AXI-Stream slave (s_*) and master (m_*) side. Port UP_PORT
// is reserved for the link to the next level up; the other ports attach cores
// (or clusters). Two independent channels:
//  * one-to-many: the stream entering s_*[UP_PORT] is routed, by decoding its
//    4-bit TDEST, to m_*[TDEST]. A word addressed to UP_PORT itself is dropped.
//  * many-to-one: the TVALIDs of the other ports are requests to a round-robin
//    arbiter; the winner's stream goes out on m_*[UP_PORT]. The grant is held
//    from the first beat until the beat carrying TLAST has been accepted, and
//    also while an offered beat waits for TREADY, so bursts are never mixed
//    and TVALID/TDATA stay stable.
// Both channels are combinational (single-cycle); the only state is the
// burst lock and the arbiter pointer. Port count, TDEST width, TVALID as
// request and TLAST as end of burst follow the document; the choice of port 15
// as the upstream port and dropping of self-addressed words are this design's.
module axis_interconnect
  import morph_pkg::*;
#(
  parameter int unsigned N_PORTS = 16,
  parameter int unsigned UP_PORT = 15
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic [N_PORTS-1:0][DATA_W-1:0]   s_tdata,
  input  logic [N_PORTS-1:0][TDEST_W-1:0]  s_tdest,
  input  logic [N_PORTS-1:0]               s_tlast,
  input  logic [N_PORTS-1:0]               s_tvalid,
  output logic [N_PORTS-1:0]               s_tready,
  output logic [N_PORTS-1:0][DATA_W-1:0]   m_tdata,
  output logic [N_PORTS-1:0]               m_tlast,
  output logic [N_PORTS-1:0]               m_tvalid,
  input  logic [N_PORTS-1:0]               m_tready
);
  localparam int unsigned IW = $clog2(N_PORTS);

  // ---------------- many-to-one channel ----------------
  logic              locked;
  logic [IW-1:0]     lock_idx;
  logic [N_PORTS-1:0] req, arb_req, grant;
  logic [IW-1:0]     sel;
  logic              any;
  logic              up_hs;

  always_comb begin
    req = s_tvalid;
    req[UP_PORT] = 1'b0;
    arb_req = locked ? (req & (N_PORTS'(1) << lock_idx)) : req;
  end

  rr_arbiter #(.N(N_PORTS)) u_arb (
    .clk, .rst_n, .req(arb_req), .advance(up_hs && s_tlast[sel]),
    .grant, .grant_idx(sel), .any_grant(any)
  );

  assign up_hs = any && m_tready[UP_PORT];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      locked   <= 1'b0;
      lock_idx <= '0;
    end else if (any) begin
      lock_idx <= sel;
      if (up_hs) locked <= !s_tlast[sel];
      else       locked <= 1'b1;
    end
  end

  // ---------------- one-to-many channel ----------------
  logic [TDEST_W-1:0] dn_dest;
  assign dn_dest = s_tdest[UP_PORT];

  always_comb begin
    for (int unsigned p = 0; p < N_PORTS; p++) begin
      if (p == UP_PORT) begin
        m_tdata[p]  = s_tdata[sel];
        m_tlast[p]  = s_tlast[sel];
        m_tvalid[p] = any;
        s_tready[p] = (int'(dn_dest) == UP_PORT || int'(dn_dest) >= N_PORTS) ? 1'b1
                      : m_tready[dn_dest];
      end else begin
        m_tdata[p]  = s_tdata[UP_PORT];
        m_tlast[p]  = s_tlast[UP_PORT];
        m_tvalid[p] = s_tvalid[UP_PORT] && (int'(dn_dest) == p);
        s_tready[p] = grant[p] && m_tready[UP_PORT];
      end
    end
  end

  // a burst in progress keeps its source
  assert property (@(posedge clk) disable iff (!rst_n)
                   locked |-> (!any || sel == lock_idx));
endmodule
