// shared_memory_controller: shared memory for all clusters, in the static region.
//
// The clusters' outgoing memory accesses (word addresses with bit 31 set) meet
// on a mem_interconnect with one master per cluster, arbitrated round robin.
// Address bit 30 selects the target: 0 the on-chip shared memory of
// SHARED_DEPTH words, 1 the atomically accessed synchronisation words. Both
// answer one cycle after accepting, so the controller serves one access per
// cycle. The document lets the shared memory be on-chip or external DDR3; the
// on-chip choice, its size and the address map are this design's.
module shared_memory_controller
  import morph_pkg::*;
#(
  parameter int unsigned N_CLUSTERS   = 7,
  parameter int unsigned SHARED_DEPTH = 16384,
  parameter int unsigned SYNC_WORDS   = 16
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  mem_req_t [N_CLUSTERS-1:0] cl_req,
  output logic     [N_CLUSTERS-1:0] cl_gnt,
  output mem_rsp_t [N_CLUSTERS-1:0] cl_rsp
);
  mem_req_t [1:0] t_req;
  mem_rsp_t [1:0] t_rsp;
  logic     [1:0] t_gnt;

  mem_interconnect #(.N_M(N_CLUSTERS), .SEL_BIT(30)) u_bus (
    .clk, .rst_n, .m_req(cl_req), .m_gnt(cl_gnt), .m_rsp(cl_rsp), .t_req, .t_gnt, .t_rsp
  );

  sp_ram #(.DEPTH(SHARED_DEPTH)) u_shared (
    .clk, .rst_n, .req(t_req[0]), .gnt(t_gnt[0]), .rsp(t_rsp[0])
  );

  sync_registers #(.N_WORDS(SYNC_WORDS)) u_sync (
    .clk, .rst_n, .req(t_req[1]), .gnt(t_gnt[1]), .rsp(t_rsp[1])
  );
endmodule
