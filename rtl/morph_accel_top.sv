// morph_accel_top: the morphable many-core accelerator.
//
// Seven (N_CLUSTERS) reconfigurable processing clusters share a 16-port
// cluster interconnection network. Port 15 of that network faces the host:
// the host's stream (from its DMA engine) enters through a bridge that sets
// TDEST from the cluster_id field (word bits 31:28), and inside each cluster a
// second bridge routes on core_id (bits 27:24), so one 32-bit word from the
// host reaches one core controller. Result packets travel back through the
// two round-robin levels to m_host_*. Cluster i sits on network port i and
// has cluster_id i.
// The reconfiguration engine, reached by the host through the ctl_* register
// port, streams partial bitstreams from the flash to the ICAP and then sets
// the cluster's configuration (blank, Type A/B/C: 0/15/12/8 live cores);
// while it rewrites a cluster, that cluster is isolated and the others keep
// running. PEs reach the cluster memory and, with word address bit 31 set,
// the shared memory controller (bit 30 selects the atomic sync words).
// The processing elements, the host's DMA/PCIe side, the flash and the ICAP
// are outside this RTL: their signals are ports. The PE arrays are indexed
// [cluster][core]. All logic runs on one clock with a synchronous active-low
// reset. Cluster count, cores per cluster and the partitioning into static
// and reconfigurable parts follow the document; port placement and the
// address map are this design's.
module morph_accel_top
  import morph_pkg::*;
#(
  parameter int unsigned N_CLUSTERS   = 7,
  parameter int unsigned MAX_CORES    = 15,
  parameter int unsigned NUM_COUNTERS = 5,
  parameter int unsigned LMEM_DEPTH   = 4096,
  parameter int unsigned CMEM_DEPTH   = 1024,
  parameter int unsigned SHARED_DEPTH = 16384,
  parameter int unsigned FLASH_AW     = 26,
  parameter int unsigned SLOT_SHIFT   = 21
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // host stream in (host -> cores)
  input  logic [DATA_W-1:0]    s_host_tdata,
  input  logic                 s_host_tlast,
  input  logic                 s_host_tvalid,
  output logic                 s_host_tready,
  // host stream out (cores -> host)
  output logic [DATA_W-1:0]    m_host_tdata,
  output logic                 m_host_tlast,
  output logic                 m_host_tvalid,
  input  logic                 m_host_tready,
  // reconfiguration control memory
  input  logic [1:0]           ctl_addr,
  input  logic                 ctl_we,
  input  logic [31:0]          ctl_wdata,
  output logic [31:0]          ctl_rdata,
  // bitstream flash
  output logic                 flash_req,
  output logic [FLASH_AW-1:0]  flash_addr,
  input  logic                 flash_gnt,
  input  logic                 flash_rvalid,
  input  logic [15:0]          flash_rdata,
  // configuration port
  output logic                 icap_csib,
  output logic                 icap_rdwrb,
  output logic [31:0]          icap_i,
  // processing elements
  output core_to_pe_t [N_CLUSTERS-1:0][MAX_CORES-1:0] to_pe,
  input  pe_to_core_t [N_CLUSTERS-1:0][MAX_CORES-1:0] from_pe,
  input  mem_req_t    [N_CLUSTERS-1:0][MAX_CORES-1:0] pe_lmem_req,
  output logic        [N_CLUSTERS-1:0][MAX_CORES-1:0] pe_lmem_gnt,
  output mem_rsp_t    [N_CLUSTERS-1:0][MAX_CORES-1:0] pe_lmem_rsp,
  input  mem_req_t    [N_CLUSTERS-1:0][MAX_CORES-1:0] pe_bus_req,
  output logic        [N_CLUSTERS-1:0][MAX_CORES-1:0] pe_bus_gnt,
  output mem_rsp_t    [N_CLUSTERS-1:0][MAX_CORES-1:0] pe_bus_rsp,
  output logic         [N_CLUSTERS-1:0]               cluster_active
);
  localparam int unsigned NP = 16;
  localparam int unsigned UP = 15;

  logic [NP-1:0][DATA_W-1:0]  cn_s_tdata, cn_m_tdata;
  logic [NP-1:0][TDEST_W-1:0] cn_s_tdest;
  logic [NP-1:0]              cn_s_tlast, cn_s_tvalid, cn_s_tready;
  logic [NP-1:0]              cn_m_tlast, cn_m_tvalid, cn_m_tready;

  // host-side bridge: TDEST from cluster_id
  axis_bridge #(.DEST_LSB(CLUSTER_LSB)) u_host_bridge (
    .clk, .rst_n,
    .s_dn_tdata(s_host_tdata), .s_dn_tlast(s_host_tlast), .s_dn_tvalid(s_host_tvalid),
    .s_dn_tready(s_host_tready),
    .m_dn_tdata(cn_s_tdata[UP]), .m_dn_tdest(cn_s_tdest[UP]), .m_dn_tlast(cn_s_tlast[UP]),
    .m_dn_tvalid(cn_s_tvalid[UP]), .m_dn_tready(cn_s_tready[UP]),
    .s_up_tdata(cn_m_tdata[UP]), .s_up_tlast(cn_m_tlast[UP]), .s_up_tvalid(cn_m_tvalid[UP]),
    .s_up_tready(cn_m_tready[UP]),
    .m_up_tdata(m_host_tdata), .m_up_tlast(m_host_tlast), .m_up_tvalid(m_host_tvalid),
    .m_up_tready(m_host_tready)
  );

  axis_interconnect #(.N_PORTS(NP), .UP_PORT(UP)) u_cluster_net (
    .clk, .rst_n,
    .s_tdata(cn_s_tdata), .s_tdest(cn_s_tdest), .s_tlast(cn_s_tlast),
    .s_tvalid(cn_s_tvalid), .s_tready(cn_s_tready),
    .m_tdata(cn_m_tdata), .m_tlast(cn_m_tlast), .m_tvalid(cn_m_tvalid),
    .m_tready(cn_m_tready)
  );

  cluster_cfg_e [N_CLUSTERS-1:0] cluster_cfg;
  logic         [N_CLUSTERS-1:0] cluster_busy;
  mem_req_t     [N_CLUSTERS-1:0] ext_req;
  mem_rsp_t     [N_CLUSTERS-1:0] ext_rsp;
  logic         [N_CLUSTERS-1:0] ext_gnt;

  for (genvar k = 0; k < UP; k++) begin : g_port
    if (k < N_CLUSTERS) begin : g_cluster
      assign cn_s_tdest[k] = '0;
      processing_cluster #(
        .MAX_CORES(MAX_CORES), .NUM_COUNTERS(NUM_COUNTERS),
        .LMEM_DEPTH(LMEM_DEPTH), .CMEM_DEPTH(CMEM_DEPTH)
      ) u_cluster (
        .clk, .rst_n, .cluster_id(ID_W'(k)),
        .cfg(cluster_cfg[k]), .reconfiguring(cluster_busy[k]),
        .s_tdata(cn_m_tdata[k]), .s_tlast(cn_m_tlast[k]), .s_tvalid(cn_m_tvalid[k]),
        .s_tready(cn_m_tready[k]),
        .m_tdata(cn_s_tdata[k]), .m_tlast(cn_s_tlast[k]), .m_tvalid(cn_s_tvalid[k]),
        .m_tready(cn_s_tready[k]),
        .to_pe(to_pe[k]), .from_pe(from_pe[k]),
        .pe_lmem_req(pe_lmem_req[k]), .pe_lmem_gnt(pe_lmem_gnt[k]), .pe_lmem_rsp(pe_lmem_rsp[k]),
        .pe_bus_req(pe_bus_req[k]), .pe_bus_gnt(pe_bus_gnt[k]), .pe_bus_rsp(pe_bus_rsp[k]),
        .ext_req(ext_req[k]), .ext_gnt(ext_gnt[k]), .ext_rsp(ext_rsp[k]),
        .active(cluster_active[k])
      );
    end else begin : g_unused
      assign cn_s_tdata[k]  = '0;
      assign cn_s_tdest[k]  = '0;
      assign cn_s_tlast[k]  = 1'b0;
      assign cn_s_tvalid[k] = 1'b0;
      assign cn_m_tready[k] = 1'b1;
    end
  end

  shared_memory_controller #(.N_CLUSTERS(N_CLUSTERS), .SHARED_DEPTH(SHARED_DEPTH)) u_shmem (
    .clk, .rst_n, .cl_req(ext_req), .cl_gnt(ext_gnt), .cl_rsp(ext_rsp)
  );

  reconf_engine #(
    .N_CLUSTERS(N_CLUSTERS), .FLASH_AW(FLASH_AW), .SLOT_SHIFT(SLOT_SHIFT)
  ) u_reconf (
    .clk, .rst_n,
    .ctl_addr, .ctl_we, .ctl_wdata, .ctl_rdata,
    .flash_req, .flash_addr, .flash_gnt, .flash_rvalid, .flash_rdata,
    .icap_csib, .icap_rdwrb, .icap_i,
    .cluster_cfg, .cluster_busy
  );
endmodule
