// tb_axis_bridge: random valid/ready on both directions of the bridge.
// Checks order and contents of every word, that the downward TDEST equals the
// 4-bit field at DEST_LSB of the word, TLAST pass-through, one cycle of
// latency with an always-ready sink, and full throughput (one word per cycle).
module tb_axis_bridge;
  import morph_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n;
  logic [31:0] s_dn_tdata, m_dn_tdata, s_up_tdata, m_up_tdata;
  logic [3:0]  m_dn_tdest;
  logic s_dn_tlast, s_dn_tvalid, s_dn_tready, m_dn_tlast, m_dn_tvalid, m_dn_tready;
  logic s_up_tlast, s_up_tvalid, s_up_tready, m_up_tlast, m_up_tvalid, m_up_tready;
  int checks = 0, failures = 0;
  logic [32:0] qdn[$], qup[$];
  int n_dn = 0, n_up = 0;

  axis_bridge #(.DEST_LSB(24)) dut (.*);

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic rnd_src, rnd_snk;
  // sources and sinks change at the falling edge; transfers are seen at the rising edge
  always @(negedge clk) if (rst_n) begin
    if (!s_dn_tvalid || s_dn_tready_q) begin
      s_dn_tvalid = rnd_src ? ($urandom % 3 != 0) : 1'b1;
      s_dn_tdata  = $urandom; s_dn_tlast = $urandom % 2;
    end
    if (!s_up_tvalid || s_up_tready_q) begin
      s_up_tvalid = rnd_src ? ($urandom % 3 != 0) : 1'b1;
      s_up_tdata  = $urandom; s_up_tlast = $urandom % 2;
    end
    m_dn_tready = rnd_snk ? ($urandom % 3 != 0) : 1'b1;
    m_up_tready = rnd_snk ? ($urandom % 3 != 0) : 1'b1;
  end

  logic s_dn_tready_q, s_up_tready_q;
  always @(posedge clk) begin
    s_dn_tready_q <= s_dn_tvalid && s_dn_tready;
    s_up_tready_q <= s_up_tvalid && s_up_tready;
    if (rst_n) begin
      if (s_dn_tvalid && s_dn_tready) qdn.push_back({s_dn_tlast, s_dn_tdata});
      if (s_up_tvalid && s_up_tready) qup.push_back({s_up_tlast, s_up_tdata});
      if (m_dn_tvalid && m_dn_tready) begin
        logic [32:0] e;
        e = qdn.pop_front();
        checks++; n_dn++;
        if ({m_dn_tlast, m_dn_tdata} != e || m_dn_tdest != e[27:24]) begin
          failures++; $display("dn got %h/%h exp %h", m_dn_tdata, m_dn_tdest, e);
        end
      end
      if (m_up_tvalid && m_up_tready) begin
        logic [32:0] e;
        e = qup.pop_front();
        checks++; n_up++;
        if ({m_up_tlast, m_up_tdata} != e) begin failures++; $display("up got %h exp %h", m_up_tdata, e); end
      end
    end
  end

  initial begin
    int t0;
    rst_n = 0; rnd_src = 1; rnd_snk = 1;
    s_dn_tvalid = 0; s_up_tvalid = 0; m_dn_tready = 0; m_up_tready = 0;
    s_dn_tdata = 0; s_up_tdata = 0; s_dn_tlast = 0; s_up_tlast = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (4000) @(posedge clk);
    // throughput: always valid, always ready -> one word per cycle after the first
    rnd_src = 0; rnd_snk = 0;
    repeat (20) @(posedge clk);
    t0 = n_dn;
    repeat (100) @(posedge clk);
    checks++;
    if (n_dn - t0 != 100) begin failures++; $display("throughput %0d/100", n_dn - t0); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
