// processing_core: one core slot of a cluster (core controller + local memory).
//
// Bundles the core controller, which speaks AXI-Stream to the host side and
// drives the PE interface, with the core's scratch-pad memory (LMEM_DEPTH
// words, one-cycle sp_ram port). The processing element itself (an MB-LITE
// soft core of Type A, B or C in the evaluated system) is outside this RTL and
// connects through to_pe/from_pe and the pe_lmem_* scratch-pad port. Timing is
// that of the two parts: see core_controller and sp_ram. The 16 kB scratch-pad
// size is read from the four 36 kb block RAMs per core of the resource table.
module processing_core
  import morph_pkg::*;
#(
  parameter int unsigned NUM_COUNTERS = 5,
  parameter int unsigned LMEM_DEPTH   = 4096
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              slot_en,
  input  cluster_cfg_e      pe_type,
  input  logic [ID_W-1:0]   cluster_id,
  input  logic [ID_W-1:0]   core_id,
  input  logic [DATA_W-1:0] s_tdata,
  input  logic              s_tlast,
  input  logic              s_tvalid,
  output logic              s_tready,
  output logic [DATA_W-1:0] m_tdata,
  output logic              m_tlast,
  output logic              m_tvalid,
  input  logic              m_tready,
  output core_to_pe_t       to_pe,
  input  pe_to_core_t       from_pe,
  input  mem_req_t          pe_lmem_req,
  output logic              pe_lmem_gnt,
  output mem_rsp_t          pe_lmem_rsp
);
  core_controller #(.NUM_COUNTERS(NUM_COUNTERS)) u_ctrl (
    .clk, .rst_n, .slot_en, .pe_type, .cluster_id, .core_id,
    .s_tdata, .s_tlast, .s_tvalid, .s_tready,
    .m_tdata, .m_tlast, .m_tvalid, .m_tready,
    .to_pe, .from_pe
  );

  sp_ram #(.DEPTH(LMEM_DEPTH)) u_lmem (
    .clk, .rst_n, .req(pe_lmem_req), .gnt(pe_lmem_gnt), .rsp(pe_lmem_rsp)
  );
endmodule
