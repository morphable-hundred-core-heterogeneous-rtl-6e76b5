// tb_processing_cluster: one cluster with 15 behavioural PEs, its external
// port on a one-cluster shared memory controller. For each configuration
// (Type B, Type C, Type A) it sends a configuration word to every live core
// at once, collects the result packets under random back-pressure and checks
// them: one packet per live core, six words, TLAST on the sixth, packets not
// interleaved, core_id and cluster_id fields, no memory error flagged by the
// PE, the event count of the kernel for that PE type, and an unbroken chain
// of atomic swap values over all cores. Words sent to slots the configuration
// does not hold, to a blank cluster and to a cluster under reconfiguration
// must be dropped: no PE leaves reset and no packet comes back.
module tb_processing_cluster;
  import morph_pkg::*;
  localparam int MC = 15, CL = 4;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, reconfiguring, active;
  cluster_cfg_e cfg;
  logic [3:0] cluster_id;
  logic [31:0] s_tdata, m_tdata;
  logic s_tlast, s_tvalid, s_tready, m_tlast, m_tvalid, m_tready;
  core_to_pe_t [MC-1:0] to_pe;
  pe_to_core_t [MC-1:0] from_pe;
  mem_req_t [MC-1:0] pe_lmem_req, pe_bus_req;
  logic     [MC-1:0] pe_lmem_gnt, pe_bus_gnt;
  mem_rsp_t [MC-1:0] pe_lmem_rsp, pe_bus_rsp;
  mem_req_t ext_req;
  logic     ext_gnt;
  mem_rsp_t ext_rsp;
  int checks = 0, failures = 0;

  processing_cluster #(.MAX_CORES(MC)) dut (.*);
  shared_memory_controller #(.N_CLUSTERS(1), .SHARED_DEPTH(256)) u_sh (
    .clk, .rst_n, .cl_req(ext_req), .cl_gnt(ext_gnt), .cl_rsp(ext_rsp)
  );
  for (genvar c = 0; c < MC; c++) begin : g_pe
    pe_model #(.CLUSTER(CL), .CORE(c)) u_pe (
      .clk, .to_pe(to_pe[c]), .from_pe(from_pe[c]),
      .lmem_req(pe_lmem_req[c]), .lmem_gnt(pe_lmem_gnt[c]), .lmem_rsp(pe_lmem_rsp[c]),
      .bus_req(pe_bus_req[c]), .bus_gnt(pe_bus_gnt[c]), .bus_rsp(pe_bus_rsp[c])
    );
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  logic [32:0] outq[$];
  always @(posedge clk) if (rst_n && m_tvalid && m_tready) outq.push_back({m_tlast, m_tdata});
  always @(negedge clk) m_tready = ($urandom % 4) != 0;

  int rel_seen;   // cycles in which some PE was out of reset
  always @(posedge clk) if (to_pe[0].pe_rst == 1'b0 || |(~{to_pe[14].pe_rst, to_pe[13].pe_rst, to_pe[12].pe_rst, to_pe[9].pe_rst})) rel_seen++;

  task automatic send(input int core, input int k, input int r, input int n);
    @(negedge clk);
    s_tdata = {4'(CL), 4'(core), 4'(k), 8'(r), 12'(n)}; s_tvalid = 1; s_tlast = 1;
    forever begin
      #1;
      if (s_tready) break;
      @(negedge clk);
    end
    @(negedge clk);
    s_tvalid = 0;
  endtask

  int seen [int];
  int n_swaps = 0;

  task automatic phase(input cluster_cfg_e t, input int k, input int r, input int live);
    int got [MC];
    cfg = t;
    repeat (3) @(negedge clk);
    for (int c = 0; c < live; c++) send(c, k, r, 3 + c);
    for (int c = 0; c < MC; c++) got[c] = 0;
    for (int p = 0; p < live; p++) begin
      logic [32:0] w [6];
      int core; int unsigned exp;
      for (int i = 0; i < 6; i++) begin
        while (outq.size() == 0) @(negedge clk);
        w[i] = outq.pop_front();
      end
      core = int'(w[0][27:24]);
      for (int i = 0; i < 6; i++) begin
        chk(w[i][32] == (i == 5), "tlast on sixth word only");
        chk(w[i][31:24] == {4'(CL), 4'(core)}, "packet not interleaved, ids right");
      end
      chk(core < live, "reply from a live core");
      got[core]++;
      chk(w[0][23] == 1'b0, "PE memory checks");
      if (seen.exists(int'(w[0][22:0]))) begin failures++; $display("swap value twice"); end
      seen[int'(w[0][22:0])] = 1;
      n_swaps++;
      exp = 3 + core;
      if (k == 2) chk(w[(t == CFG_TYPE_A) ? 4 : 2][23:0] == 24'(exp), "kernel 2 event count");
      if (k >= 3) chk(w[(t == CFG_TYPE_C) ? 3 : 5][23:0] == 24'(exp), "FP event count");
    end
    for (int c = 0; c < live; c++) chk(got[c] == 1, $sformatf("core %0d replied %0d times", c, got[c]));
  endtask

  task automatic expect_drop(input int core, input string why);
    int rel_before;
    rel_before = rel_seen;
    send(core, 1, 0, 2);
    repeat (200) @(negedge clk);
    chk(outq.size() == 0 && rel_seen == rel_before, why);
  endtask

  initial begin
    rst_n = 0; cfg = CFG_TYPE_B; reconfiguring = 0; cluster_id = 4'(CL);
    s_tdata = 0; s_tlast = 0; s_tvalid = 0; rel_seen = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    phase(CFG_TYPE_B, 2, 1, 12);
    expect_drop(13, "Type B has no core 13");
    phase(CFG_TYPE_C, 3, 2, 8);
    expect_drop(9, "Type C has no core 9");
    phase(CFG_TYPE_A, 1, 3, 15);
    phase(CFG_TYPE_A, 2, 4, 15);
    cfg = CFG_BLANK;
    #1 chk(!active, "blank cluster inactive");
    expect_drop(0, "blank cluster drops words");
    cfg = CFG_TYPE_C; reconfiguring = 1;
    expect_drop(0, "cluster under reconfiguration drops words");
    reconfiguring = 0;
    phase(CFG_TYPE_C, 4, 5, 8);
    chk(seen.exists(0) && seen.num() == n_swaps, "atomic swap chain");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
