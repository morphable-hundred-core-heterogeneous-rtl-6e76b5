// tb_core_controller: runs many kernels through one core controller with a
// scripted PE. For each run it sends a configuration word, checks that the PE
// leaves reset only then and sees the 24-bit payload, lets the PE read it,
// produce random event pulses for a random time and finish with a return
// message; then checks the packet: 1 + NUM_COUNTERS words, tuple in bits
// 31:24, return message, CLK = cycles the PE was out of reset (counted here
// independently), each event count, TLAST only on the last word, PE back in
// reset, and the first packet word offered the cycle after done. Random
// back-pressure on the packet. Finally a word sent to a disabled slot must be
// dropped without releasing the PE or producing a packet.
// A second controller built with one counter (CLK only) sees the same words
// and PE signals and must send two-word packets: return message, CLK.
module tb_core_controller;
  import morph_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, slot_en;
  cluster_cfg_e pe_type;
  logic [3:0] cluster_id, core_id;
  logic [31:0] s_tdata, m_tdata;
  logic s_tlast, s_tvalid, s_tready, m_tlast, m_tvalid, m_tready;
  core_to_pe_t to_pe;
  pe_to_core_t from_pe;
  int checks = 0, failures = 0;

  core_controller #(.NUM_COUNTERS(5)) dut (.*);

  // one-counter variant, never back-pressured
  logic [31:0] m1_tdata;
  logic m1_tlast, m1_tvalid, s1_tready;
  core_to_pe_t to_pe1;
  logic [32:0] pkt1[$];
  core_controller #(.NUM_COUNTERS(1)) dut1 (
    .clk, .rst_n, .slot_en, .pe_type, .cluster_id, .core_id,
    .s_tdata, .s_tlast, .s_tvalid, .s_tready(s1_tready),
    .m_tdata(m1_tdata), .m_tlast(m1_tlast), .m_tvalid(m1_tvalid), .m_tready(1'b1),
    .to_pe(to_pe1), .from_pe
  );
  always @(posedge clk) if (rst_n && m1_tvalid) pkt1.push_back({m1_tlast, m1_tdata});

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // independent counts: cycles out of reset and event pulses seen while out of reset
  int unsigned clk_n, ev_n [4];
  always @(posedge clk) if (!to_pe.pe_rst) begin
    clk_n++;
    for (int e = 0; e < 4; e++) if (from_pe.ev[e]) ev_n[e]++;
  end

  task automatic chk(input logic c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  task automatic run(input int idx);
    logic [23:0] payload, ret;
    int wait_rd, len, w;
    payload = 24'($urandom); ret = 24'($urandom);
    wait_rd = $urandom % 4; len = $urandom % 40;
    clk_n = 0; for (int e = 0; e < 4; e++) ev_n[e] = 0;
    @(negedge clk);
    chk(to_pe.pe_rst && s_tready, "idle: PE in reset, ready for a word");
    s_tdata = {8'hAB, payload}; s_tvalid = 1; s_tlast = 1;
    @(negedge clk);
    s_tvalid = 0;
    chk(!to_pe.pe_rst && to_pe.cfg_word == payload && to_pe.pe_type == pe_type, "released with payload");
    chk(!s_tready, "no second word while running");
    repeat (wait_rd) @(negedge clk);
    from_pe.cfg_read = 1;
    @(negedge clk);
    from_pe.cfg_read = 0;
    for (int i = 0; i < len; i++) begin
      from_pe.ev = 4'($urandom);
      @(negedge clk);
    end
    from_pe.ev = '0;
    from_pe.done = 1; from_pe.ret_msg = ret;
    @(negedge clk);
    from_pe.done = 0;
    chk(m_tvalid && to_pe.pe_rst, "packet offered the cycle after done, PE in reset");
    w = 0;
    while (w < 6) begin
      logic [23:0] exp;
      m_tready = ($urandom % 3) != 0;
      #1;
      if (m_tvalid && m_tready) begin
        exp = (w == 0) ? ret : (w == 1) ? 24'(clk_n) : 24'(ev_n[w-2]);
        chk(m_tdata == {cluster_id, core_id, exp}, $sformatf("run %0d word %0d got %h exp %h", idx, w, m_tdata, exp));
        chk(m_tlast == (w == 5), "tlast position");
        w++;
      end
      @(negedge clk);
    end
    m_tready = 0;
    chk(!m_tvalid && s_tready, "back to waiting");
    chk(pkt1.size() == 2, "one-counter packet has two words");
    if (pkt1.size() == 2) begin
      chk(pkt1[0] == {1'b0, cluster_id, core_id, ret}, "one-counter packet: return word");
      chk(pkt1[1] == {1'b1, cluster_id, core_id, 24'(clk_n)}, "one-counter packet: CLK word with TLAST");
    end
    pkt1.delete();
  endtask

  initial begin
    rst_n = 0; slot_en = 1; pe_type = CFG_TYPE_B; cluster_id = 4'd5; core_id = 4'd11;
    s_tdata = 0; s_tlast = 0; s_tvalid = 0; m_tready = 0; from_pe = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 300; i++) run(i);
    // PE reporting done before cfg_read
    @(negedge clk);
    s_tdata = 32'h00_123456; s_tvalid = 1;
    @(negedge clk);
    s_tvalid = 0; from_pe.done = 1; from_pe.ret_msg = 24'h777;
    @(negedge clk);
    from_pe.done = 0; m_tready = 1;
    #1 chk(m_tvalid && m_tdata[23:0] == 24'h777, "early done");
    repeat (8) @(negedge clk);
    m_tready = 0;
    // disabled slot drops words
    slot_en = 0;
    @(negedge clk);
    s_tdata = 32'h00_000001; s_tvalid = 1;
    #1 chk(s_tready, "disabled slot accepts and drops");
    @(negedge clk);
    s_tvalid = 0;
    repeat (5) begin
      @(negedge clk);
      chk(to_pe.pe_rst && !m_tvalid, "disabled slot keeps PE in reset");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
