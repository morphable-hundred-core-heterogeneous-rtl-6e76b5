// axis_bridge: network interface joining two levels of stream interconnect.
//
// Downward (towards the cores) each word is registered and given a new TDEST
// taken from the 4-bit field word[DEST_LSB+3:DEST_LSB] of its identification
// tuple: DEST_LSB = 28 selects the cluster from cluster_id, DEST_LSB = 24 the
// core from core_id. Upward (towards the host) each word is registered as it
// is. Each direction is one register stage with a full-throughput ready path
// (s_tready = empty or m_tready), so a word appears on m_* one cycle after it
// is accepted and a new word can be accepted every cycle. The document only
// says the levels are daisy-chained through a purpose-built bridge; the
// register stage and the TDEST rule are this design's.
module axis_bridge
  import morph_pkg::*;
#(
  parameter int unsigned DEST_LSB = 24
) (
  input  logic               clk,
  input  logic               rst_n,
  // downward
  input  logic [DATA_W-1:0]  s_dn_tdata,
  input  logic               s_dn_tlast,
  input  logic               s_dn_tvalid,
  output logic               s_dn_tready,
  output logic [DATA_W-1:0]  m_dn_tdata,
  output logic [TDEST_W-1:0] m_dn_tdest,
  output logic               m_dn_tlast,
  output logic               m_dn_tvalid,
  input  logic               m_dn_tready,
  // upward
  input  logic [DATA_W-1:0]  s_up_tdata,
  input  logic               s_up_tlast,
  input  logic               s_up_tvalid,
  output logic               s_up_tready,
  output logic [DATA_W-1:0]  m_up_tdata,
  output logic               m_up_tlast,
  output logic               m_up_tvalid,
  input  logic               m_up_tready
);
  assign s_dn_tready = !m_dn_tvalid || m_dn_tready;
  assign s_up_tready = !m_up_tvalid || m_up_tready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      m_dn_tvalid <= 1'b0;
      m_up_tvalid <= 1'b0;
      m_dn_tdata  <= '0;
      m_dn_tdest  <= '0;
      m_dn_tlast  <= 1'b0;
      m_up_tdata  <= '0;
      m_up_tlast  <= 1'b0;
    end else begin
      if (s_dn_tready) begin
        m_dn_tvalid <= s_dn_tvalid;
        if (s_dn_tvalid) begin
          m_dn_tdata <= s_dn_tdata;
          m_dn_tdest <= s_dn_tdata[DEST_LSB +: TDEST_W];
          m_dn_tlast <= s_dn_tlast;
        end
      end
      if (s_up_tready) begin
        m_up_tvalid <= s_up_tvalid;
        if (s_up_tvalid) begin
          m_up_tdata <= s_up_tdata;
          m_up_tlast <= s_up_tlast;
        end
      end
    end
  end
endmodule
