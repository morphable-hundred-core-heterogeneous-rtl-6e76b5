// core_controller: per-core controller between the host stream and one PE.
//
// A four-state FSM, as the document describes:
//   WAIT    - PE held in reset; accept one 32-bit configuration word from the
//             host stream (s_*), keep its 24-bit payload for the PE.
//   RELEASE - PE out of reset; wait until the PE pulses cfg_read.
//   RUN     - PE executes; performance counters run.
//   SEND    - PE back in reset; send a packet to the host: a return word, then
//             NUM_COUNTERS counter words (CLK, MUL, FP, SW_MUL, SW_FP order),
//             TLAST on the last one. Then back to WAIT.
// Every outgoing word carries {cluster_id, core_id} in bits 31:24 and a 24-bit
// value below. CLK counts every cycle the PE is out of reset (RELEASE and RUN,
// including the cycle in which done is seen); the event counters count the
// PE's one-cycle pulses over the same window. A PE that reports done while
// still in RELEASE goes straight to SEND. Counters saturate at 2^24-1.
// With slot_en low (the region does not hold this core) the controller stays
// in WAIT, keeps the PE in reset and drops incoming words.
// The states, the packet layout and the five counters follow the document; the
// PE-side handshake signals, the counter width and saturation, and the
// discarding of words for a disabled slot are this design's choices.
// Synchronous active-low reset.
module core_controller
  import morph_pkg::*;
#(
  parameter int unsigned NUM_COUNTERS = 5
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               slot_en,
  input  cluster_cfg_e       pe_type,
  input  logic [ID_W-1:0]    cluster_id,
  input  logic [ID_W-1:0]    core_id,
  // host interface, from the host
  input  logic [DATA_W-1:0]  s_tdata,
  input  logic               s_tlast,
  input  logic               s_tvalid,
  output logic               s_tready,
  // host interface, to the host
  output logic [DATA_W-1:0]  m_tdata,
  output logic               m_tlast,
  output logic               m_tvalid,
  input  logic               m_tready,
  // PE interface
  output core_to_pe_t        to_pe,
  input  pe_to_core_t        from_pe
);
  typedef enum logic [1:0] {S_WAIT, S_RELEASE, S_RUN, S_SEND} state_e;
  localparam int unsigned CW = $clog2(NUM_COUNTERS + 1);

  state_e                   state;
  logic [PAYLOAD_W-1:0]     cfg_q, ret_q;
  logic [PAYLOAD_W-1:0]     cnt [NUM_COUNTERS];
  logic [CW-1:0]            widx;
  logic                     counting;
  logic [NUM_COUNTERS-1:0]  inc;

  // which counters increment this cycle: CLK always, the rest on PE events
  always_comb begin
    inc = '0;
    for (int unsigned c = 0; c < NUM_COUNTERS; c++)
      inc[c] = (c == 0) ? 1'b1 : ((c - 1 < N_EVENTS) ? from_pe.ev[c-1] : 1'b0);
  end

  assign counting = (state == S_RELEASE) || (state == S_RUN);

  always_ff @(posedge clk) begin
    if (!rst_n || !slot_en) begin
      state <= S_WAIT;
      cfg_q <= '0;
      ret_q <= '0;
      widx  <= '0;
      for (int unsigned c = 0; c < NUM_COUNTERS; c++) cnt[c] <= '0;
    end else begin
      if (counting)
        for (int unsigned c = 0; c < NUM_COUNTERS; c++)
          if (inc[c] && cnt[c] != '1) cnt[c] <= cnt[c] + 1'b1;
      unique case (state)
        S_WAIT: if (s_tvalid) begin
          cfg_q <= s_tdata[PAYLOAD_W-1:0];
          for (int unsigned c = 0; c < NUM_COUNTERS; c++) cnt[c] <= '0;
          state <= S_RELEASE;
        end
        S_RELEASE: begin
          if (from_pe.done) begin
            ret_q <= from_pe.ret_msg;
            widx  <= '0;
            state <= S_SEND;
          end else if (from_pe.cfg_read) state <= S_RUN;
        end
        S_RUN: if (from_pe.done) begin
          ret_q <= from_pe.ret_msg;
          widx  <= '0;
          state <= S_SEND;
        end
        S_SEND: if (m_tready) begin
          if (widx == CW'(NUM_COUNTERS)) state <= S_WAIT;
          widx <= widx + 1'b1;
        end
      endcase
    end
  end

  always_comb begin
    s_tready       = (state == S_WAIT);
    m_tvalid       = (state == S_SEND) && slot_en;
    m_tlast        = (widx == CW'(NUM_COUNTERS));
    m_tdata        = {cluster_id, core_id, (widx == '0) ? ret_q : cnt[widx - 1'b1]};
    to_pe.pe_rst   = !(state == S_RELEASE || state == S_RUN);
    to_pe.cfg_word = cfg_q;
    to_pe.pe_type  = pe_type;
  end

  // a packet word, once offered, is held until accepted
  assert property (@(posedge clk) disable iff (!rst_n || !slot_en)
                   (m_tvalid && !m_tready) |=> (m_tvalid && $stable(m_tdata)));
endmodule
