// tb_axis_interconnect: both channels of the 16-port stream interconnect.
// One-to-many: random words with random TDEST enter port 15 and must come out,
// in order, on the port named by TDEST (words for port 15 are dropped).
// Many-to-one: ports 0..14 send bursts of 1..4 words (TLAST on the last) with
// random gaps while the upstream sink applies random back-pressure; every word
// must reach port 15 in per-source order and bursts must never interleave.
// Then all 15 ports request continuously and the order of burst sources must
// rotate round robin (0,1,...,14,0,...). Words are single-cycle: with a ready
// sink a word offered in a cycle is taken in that cycle.
module tb_axis_interconnect;
  import morph_pkg::*;
  localparam int NP = 16, UP = 15;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n;
  logic [NP-1:0][31:0] s_tdata, m_tdata;
  logic [NP-1:0][3:0]  s_tdest;
  logic [NP-1:0] s_tlast, s_tvalid, s_tready, m_tlast, m_tvalid, m_tready;
  int checks = 0, failures = 0;

  axis_interconnect #(.N_PORTS(NP), .UP_PORT(UP)) dut (.*);

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] dnq [NP][$];
  int unsigned seq [NP];
  int unsigned blen [NP];        // words left in current burst
  int unsigned exp_seq [NP];
  int last_src = -1;             // source of an open burst, -1 none
  int prev_burst_src = -1;
  logic saturate = 0, random_mode = 1, check_rr = 0;
  int rr_checked = 0;
  int unsigned dn_sent = 0, dn_recv = 0;

  // monitor at rising edge
  always @(posedge clk) if (rst_n) begin
    // downward
    if (s_tvalid[UP] && s_tready[UP] && s_tdest[UP] != UP) dnq[s_tdest[UP]].push_back(s_tdata[UP]);
    for (int p = 0; p < UP; p++)
      if (m_tvalid[p] && m_tready[p]) begin
        logic [31:0] e;
        checks++; dn_recv++;
        if (dnq[p].size() == 0) begin failures++; $display("unexpected word on %0d", p); end
        else begin
          e = dnq[p].pop_front();
          if (m_tdata[p] != e) begin failures++; $display("port %0d got %h exp %h", p, m_tdata[p], e); end
        end
      end
    // upward
    if (m_tvalid[UP] && m_tready[UP]) begin
      int src;
      src = int'(m_tdata[UP][31:24]);
      checks++;
      if (last_src >= 0 && src != last_src) begin failures++; $display("burst interleaved %0d/%0d", last_src, src); end
      if (m_tdata[UP][23:0] != 24'(exp_seq[src])) begin
        failures++; $display("src %0d seq %0d exp %0d", src, m_tdata[UP][23:0], exp_seq[src]);
      end
      exp_seq[src]++;
      if (last_src < 0) begin
        if (check_rr && prev_burst_src >= 0) begin
          checks++; rr_checked++;
          if (src != (prev_burst_src + 1) % UP) begin failures++; $display("rr order %0d after %0d", src, prev_burst_src); end
        end
        prev_burst_src = src;
      end
      last_src = m_tlast[UP] ? -1 : src;
    end
  end

  // stimulus at falling edge
  logic [NP-1:0] hs;
  always @(posedge clk) hs <= s_tvalid & s_tready;

  always @(negedge clk) if (rst_n) begin
    // downward source on port 15
    if (!s_tvalid[UP] || hs[UP]) begin
      s_tvalid[UP] = random_mode && ($urandom % 2);
      s_tdest[UP]  = 4'($urandom);
      s_tdata[UP]  = $urandom;
      s_tlast[UP]  = 1'b1;
    end
    for (int p = 0; p < UP; p++) begin
      m_tready[p] = ($urandom % 4) != 0;
      if (!s_tvalid[p] || hs[p]) begin
        if (s_tvalid[p] && hs[p]) seq[p]++;
        if (hs[p] && s_tlast[p]) blen[p] = 0;
        else if (hs[p]) blen[p]--;
        if (blen[p] == 0) begin
          s_tvalid[p] = saturate || (random_mode && ($urandom % 3 == 0));
          if (s_tvalid[p]) blen[p] = saturate ? 1 + (p % 3) : 1 + ($urandom % 4);
        end else s_tvalid[p] = 1'b1;
        s_tdata[p] = {8'(p), 24'(seq[p])};
        s_tlast[p] = (blen[p] == 1);
        s_tdest[p] = '0;
      end
    end
    m_tready[UP] = saturate ? 1'b1 : (($urandom % 3) != 0);
  end

  initial begin
    rst_n = 0;
    s_tvalid = '0; s_tdata = '0; s_tdest = '0; s_tlast = '0; m_tready = '0;
    for (int p = 0; p < NP; p++) begin seq[p] = 0; blen[p] = 0; exp_seq[p] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (8000) @(posedge clk);
    // let the random phase finish its bursts, then saturate
    random_mode = 0;
    repeat (200) @(posedge clk);
    saturate = 1;
    repeat (20) @(posedge clk);
    check_rr = 1;
    repeat (600) @(posedge clk);
    checks++;
    if (rr_checked < 100) begin failures++; $display("too few rr checks %0d", rr_checked); end
    checks++;
    if (dn_recv < 1000) begin failures++; $display("too few downward words %0d", dn_recv); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
