// processing_cluster: one reconfigurable processing cluster region.
//
// Inside: a bridge to the cluster interconnection network (TDEST from the
// core_id field), a 16-port core interconnection network whose port 15 is the
// upstream link, MAX_CORES core slots on ports 0..MAX_CORES-1, and a shared
// bus (mem_interconnect) that lets every PE reach the cluster memory (word
// address bit 31 = 0) or, through ext_req/ext_rsp, the shared memory outside
// the cluster (bit 31 = 1).
// The region is homogeneous and its configuration 'cfg' decides how many slots
// are live: 15 for Type A, 12 for Type B, 8 for Type C, none for a blank box.
// Real hardware swaps the region's logic by partial reconfiguration; here the
// slots beyond the count stay in reset and the PE type is passed to the PEs.
// While the region is blank or being reconfigured ('reconfiguring') the whole
// cluster is held in reset and isolated: words sent to it are accepted and
// dropped (so the shared network never stalls on it) and it sends nothing.
// Slot counts follow the document's cluster table; the isolation behaviour
// and the address split are this design's choices.
module processing_cluster
  import morph_pkg::*;
#(
  parameter int unsigned MAX_CORES    = 15,
  parameter int unsigned NUM_COUNTERS = 5,
  parameter int unsigned LMEM_DEPTH   = 4096,
  parameter int unsigned CMEM_DEPTH   = 1024
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [ID_W-1:0]          cluster_id,
  input  cluster_cfg_e             cfg,
  input  logic                     reconfiguring,
  // link to the cluster interconnection network
  input  logic [DATA_W-1:0]        s_tdata,
  input  logic                     s_tlast,
  input  logic                     s_tvalid,
  output logic                     s_tready,
  output logic [DATA_W-1:0]        m_tdata,
  output logic                     m_tlast,
  output logic                     m_tvalid,
  input  logic                     m_tready,
  // processing elements
  output core_to_pe_t [MAX_CORES-1:0] to_pe,
  input  pe_to_core_t [MAX_CORES-1:0] from_pe,
  input  mem_req_t    [MAX_CORES-1:0] pe_lmem_req,
  output logic        [MAX_CORES-1:0] pe_lmem_gnt,
  output mem_rsp_t    [MAX_CORES-1:0] pe_lmem_rsp,
  input  mem_req_t    [MAX_CORES-1:0] pe_bus_req,
  output logic        [MAX_CORES-1:0] pe_bus_gnt,
  output mem_rsp_t    [MAX_CORES-1:0] pe_bus_rsp,
  // to the shared memory controller
  output mem_req_t                 ext_req,
  input  logic                     ext_gnt,
  input  mem_rsp_t                 ext_rsp,
  output logic                     active
);
  localparam int unsigned NP = 16;
  localparam int unsigned UP = 15;

  logic crst_n;
  assign active = (cfg != CFG_BLANK) && !reconfiguring;
  assign crst_n = rst_n && active;

  // ---------------- bridge ----------------
  logic               br_s_tready, br_m_tvalid;
  logic [DATA_W-1:0]  br_m_tdata;
  logic               br_m_tlast;

  logic [NP-1:0][DATA_W-1:0]  ic_s_tdata, ic_m_tdata;
  logic [NP-1:0][TDEST_W-1:0] ic_s_tdest;
  logic [NP-1:0]              ic_s_tlast, ic_s_tvalid, ic_s_tready;
  logic [NP-1:0]              ic_m_tlast, ic_m_tvalid, ic_m_tready;

  axis_bridge #(.DEST_LSB(CORE_LSB)) u_bridge (
    .clk, .rst_n(crst_n),
    .s_dn_tdata(s_tdata), .s_dn_tlast(s_tlast), .s_dn_tvalid(s_tvalid && active),
    .s_dn_tready(br_s_tready),
    .m_dn_tdata(ic_s_tdata[UP]), .m_dn_tdest(ic_s_tdest[UP]), .m_dn_tlast(ic_s_tlast[UP]),
    .m_dn_tvalid(ic_s_tvalid[UP]), .m_dn_tready(ic_s_tready[UP]),
    .s_up_tdata(ic_m_tdata[UP]), .s_up_tlast(ic_m_tlast[UP]), .s_up_tvalid(ic_m_tvalid[UP]),
    .s_up_tready(ic_m_tready[UP]),
    .m_up_tdata(br_m_tdata), .m_up_tlast(br_m_tlast), .m_up_tvalid(br_m_tvalid),
    .m_up_tready(m_tready)
  );

  assign s_tready = active ? br_s_tready : 1'b1;
  assign m_tvalid = active && br_m_tvalid;
  assign m_tdata  = br_m_tdata;
  assign m_tlast  = br_m_tlast;

  // ---------------- core interconnection network ----------------
  axis_interconnect #(.N_PORTS(NP), .UP_PORT(UP)) u_core_net (
    .clk, .rst_n(crst_n),
    .s_tdata(ic_s_tdata), .s_tdest(ic_s_tdest), .s_tlast(ic_s_tlast),
    .s_tvalid(ic_s_tvalid), .s_tready(ic_s_tready),
    .m_tdata(ic_m_tdata), .m_tlast(ic_m_tlast), .m_tvalid(ic_m_tvalid),
    .m_tready(ic_m_tready)
  );

  // ---------------- core slots ----------------
  int unsigned n_live;
  assign n_live = cores_for_cfg(cfg);

  for (genvar c = 0; c < UP; c++) begin : g_slot
    if (c < MAX_CORES) begin : g_core
      logic slot_en;
      assign slot_en = active && (c < n_live);
      assign ic_s_tdest[c] = '0;
      processing_core #(.NUM_COUNTERS(NUM_COUNTERS), .LMEM_DEPTH(LMEM_DEPTH)) u_core (
        .clk, .rst_n(crst_n), .slot_en, .pe_type(cfg), .cluster_id,
        .core_id(ID_W'(c)),
        .s_tdata(ic_m_tdata[c]), .s_tlast(ic_m_tlast[c]), .s_tvalid(ic_m_tvalid[c]),
        .s_tready(ic_m_tready[c]),
        .m_tdata(ic_s_tdata[c]), .m_tlast(ic_s_tlast[c]), .m_tvalid(ic_s_tvalid[c]),
        .m_tready(ic_s_tready[c]),
        .to_pe(to_pe[c]), .from_pe(from_pe[c]),
        .pe_lmem_req(pe_lmem_req[c]), .pe_lmem_gnt(pe_lmem_gnt[c]), .pe_lmem_rsp(pe_lmem_rsp[c])
      );
    end else begin : g_empty
      assign ic_s_tdata[c]  = '0;
      assign ic_s_tdest[c]  = '0;
      assign ic_s_tlast[c]  = 1'b0;
      assign ic_s_tvalid[c] = 1'b0;
      assign ic_m_tready[c] = 1'b1;
    end
  end

  // ---------------- cluster shared bus and memory ----------------
  mem_req_t [MAX_CORES-1:0] bus_req;
  mem_req_t [1:0]           t_req;
  mem_rsp_t [1:0]           t_rsp;
  logic     [1:0]           t_gnt;

  always_comb
    for (int unsigned c = 0; c < MAX_CORES; c++) begin
      bus_req[c] = pe_bus_req[c];
      bus_req[c].req = pe_bus_req[c].req && active && (c < n_live);
    end

  mem_interconnect #(.N_M(MAX_CORES), .SEL_BIT(31)) u_bus (
    .clk, .rst_n(crst_n), .m_req(bus_req), .m_gnt(pe_bus_gnt), .m_rsp(pe_bus_rsp), .t_req, .t_gnt, .t_rsp
  );

  sp_ram #(.DEPTH(CMEM_DEPTH)) u_cmem (
    .clk, .rst_n(crst_n), .req(t_req[0]), .gnt(t_gnt[0]), .rsp(t_rsp[0])
  );

  assign ext_req  = t_req[1];
  assign t_rsp[1] = ext_rsp;
  assign t_gnt[1] = ext_gnt;
endmodule
