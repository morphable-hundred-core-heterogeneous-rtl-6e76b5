// tb_morph_accel_top: end-to-end run of the whole accelerator at its default
// size (7 clusters x 15 core slots), with a behavioural PE in every slot, a
// flash model holding four partial bitstreams and a host model that plays the
// hypervisor's part: for each of the four kernels (integer add, integer inner
// product, FP add, FP inner product) it keeps running chunks on clusters that
// already hold the best PE type for the kernel (A, B, C, C) while it
// reconfigures the others one at a time through the control memory, and
// dispatches work to each as soon as its reconfiguration is done. Afterwards
// two clusters are switched off to blank boxes (as a power ceiling would) and
// one is brought back.
// Every result packet is checked (six words, TLAST, ids, PE memory checks,
// event counts of the kernel on that PE type, atomic swap chain over all
// cores), and so is every bitstream word reaching the ICAP. Mechanisms that
// must each happen at least once: reconfiguration to each of the four
// configurations, refusal of a command while busy, words dropped by a blank
// cluster and by a slot the configuration does not hold, execution on other
// clusters during a reconfiguration, contention on the cluster network, on a
// core network, on a cluster's memory bus and on the shared memory, and host
// back-pressure on the result stream.
module tb_morph_accel_top;
  import morph_pkg::*;
  localparam int NC = 7, MC = 15, SS = 21;
  localparam int SZ [4] = '{460, 2000, 2000, 2000};
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n;
  logic [31:0] s_host_tdata, m_host_tdata;
  logic s_host_tlast, s_host_tvalid, s_host_tready, m_host_tlast, m_host_tvalid, m_host_tready;
  logic [1:0]  ctl_addr;
  logic        ctl_we;
  logic [31:0] ctl_wdata, ctl_rdata;
  logic        flash_req, flash_gnt, flash_rvalid;
  logic [25:0] flash_addr;
  logic [15:0] flash_rdata;
  logic        icap_csib, icap_rdwrb;
  logic [31:0] icap_i;
  core_to_pe_t [NC-1:0][MC-1:0] to_pe;
  pe_to_core_t [NC-1:0][MC-1:0] from_pe;
  mem_req_t    [NC-1:0][MC-1:0] pe_lmem_req, pe_bus_req;
  logic        [NC-1:0][MC-1:0] pe_lmem_gnt, pe_bus_gnt;
  mem_rsp_t    [NC-1:0][MC-1:0] pe_lmem_rsp, pe_bus_rsp;
  logic        [NC-1:0]         cluster_active;
  int checks = 0, failures = 0;

  morph_accel_top dut (.*);

  flash_model #(.AW(26), .SLOT_SHIFT(SS), .LAT(3), .STALL_EVERY(7),
                .SIZE0(SZ[0]), .SIZE1(SZ[1]), .SIZE2(SZ[2]), .SIZE3(SZ[3])) u_flash (
    .clk, .req(flash_req), .addr(flash_addr), .gnt(flash_gnt), .rvalid(flash_rvalid), .rdata(flash_rdata)
  );

  for (genvar k = 0; k < NC; k++) begin : g_cl
    for (genvar c = 0; c < MC; c++) begin : g_pe
      pe_model #(.CLUSTER(k), .CORE(c)) u_pe (
        .clk, .to_pe(to_pe[k][c]), .from_pe(from_pe[k][c]),
        .lmem_req(pe_lmem_req[k][c]), .lmem_gnt(pe_lmem_gnt[k][c]), .lmem_rsp(pe_lmem_rsp[k][c]),
        .bus_req(pe_bus_req[k][c]), .bus_gnt(pe_bus_gnt[k][c]), .bus_rsp(pe_bus_rsp[k][c])
      );
    end
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired pending=%0d packets=%0d sendq=%0d outq=%0d icap=%0d", pending, packets, sendq.size(), outq.size(), icap_n);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  // ---------------- mechanism counters ----------------
  int n_reconf [4], n_rejected, n_blank_drop, n_slot_drop, n_overlap;
  int n_cnet_cont, n_corenet_cont, n_bus_cont, n_shmem_cont, n_backpressure;

  always @(posedge clk) if (rst_n) begin
    int r;
    r = 0;
    for (int k = 0; k < NC; k++) r += int'(dut.cn_s_tvalid[k]);
    if (r > 1) n_cnet_cont++;
    r = 0;
    for (int k = 0; k < NC; k++) r += int'(pe_bus_req[0][k].req);
    if (r > 1) n_bus_cont++;
    r = 0;
    for (int k = 0; k < NC; k++) r += int'(dut.ext_req[k].req);
    if (r > 1) n_shmem_cont++;
    if (m_host_tvalid && !m_host_tready) n_backpressure++;
    if (dut.cluster_busy != '0) begin
      r = 0;
      for (int k = 0; k < NC; k++) for (int c = 0; c < MC; c++) r += int'(!to_pe[k][c].pe_rst);
      if (r > 0) n_overlap++;
    end
  end
  for (genvar k = 0; k < NC; k++) begin : g_mon
    always @(posedge clk) if (rst_n && $countones(dut.g_port[k].g_cluster.u_cluster.ic_s_tvalid[MC-1:0]) > 1)
      n_corenet_cont++;
  end

  // ---------------- ICAP monitor ----------------
  function automatic logic [15:0] fw(logic [25:0] a);
    return a[15:0] ^ 16'h5A3C ^ {a[7:0], a[15:8]};
  endfunction
  int icap_n = 0, icap_cfg = 0;
  always @(posedge clk) if (rst_n && !icap_csib) begin
    logic [25:0] a;
    a = (26'(icap_cfg) << SS) + 26'(2 + 2*icap_n);
    checks++;
    if (icap_i != {fw(a), fw(a + 1)}) begin failures++; $display("ICAP word %0d of cfg %0d", icap_n, icap_cfg); end
    icap_n++;
  end

  // ---------------- host stream out ----------------
  logic [32:0] outq[$];
  logic bp_on = 1;
  always @(posedge clk) if (rst_n && m_host_tvalid && m_host_tready) outq.push_back({m_host_tlast, m_host_tdata});
  always @(negedge clk) m_host_tready = bp_on ? (($urandom % 4) != 0) : 1'b1;

  // ---------------- host stream in ----------------
  logic [31:0] sendq[$];
  always @(negedge clk) if (rst_n) begin
    if (s_host_tvalid && s_host_tready_q) s_host_tvalid = 0;
    if (!s_host_tvalid && sendq.size() > 0) begin
      s_host_tdata = sendq.pop_front(); s_host_tvalid = 1; s_host_tlast = 1;
    end
  end
  logic s_host_tready_q;
  always @(posedge clk) s_host_tready_q <= s_host_tready && s_host_tvalid;

  // ---------------- dispatch and checking ----------------
  cluster_cfg_e type_of [NC];
  int kern_of [NC][MC], n_of [NC][MC];
  int pending = 0, run_id = 1;
  int seen [int];
  int n_swaps = 0, packets = 0;

  function automatic int live(cluster_cfg_e t);
    return (t == CFG_TYPE_A) ? 15 : (t == CFG_TYPE_B) ? 12 : (t == CFG_TYPE_C) ? 8 : 0;
  endfunction

  task automatic dispatch(input int cl, input int k);
    for (int c = 0; c < live(type_of[cl]); c++) begin
      kern_of[cl][c] = k;
      n_of[cl][c] = 2 + (c + cl) % 5;
      sendq.push_back({4'(cl), 4'(c), 4'(k), 8'(run_id), 12'(n_of[cl][c])});
      pending++;
    end
    run_id++;
  endtask

  // packet checker
  initial forever begin
    logic [32:0] w [6];
    int cl, c, k, n; cluster_cfg_e t;
    for (int i = 0; i < 6; i++) begin
      while (outq.size() == 0) @(negedge clk);
      w[i] = outq.pop_front();
    end
    cl = int'(w[0][31:28]); c = int'(w[0][27:24]);
    for (int i = 0; i < 6; i++) begin
      chk(w[i][32] == (i == 5), "tlast on sixth word");
      chk(w[i][31:24] == w[0][31:24], "packet not interleaved");
    end
    k = kern_of[cl][c]; n = n_of[cl][c]; t = type_of[cl];
    chk(w[0][23] == 1'b0, $sformatf("PE memory checks cluster %0d core %0d", cl, c));
    if (seen.exists(int'(w[0][22:0]))) begin failures++; $display("swap value %h twice", w[0][22:0]); end
    seen[int'(w[0][22:0])] = 1;
    n_swaps++;
    chk(w[2][23:0] == ((k == 2 && t != CFG_TYPE_A) ? 24'(n) : 0), "MUL count");
    chk(w[3][23:0] == ((k >= 3 && t == CFG_TYPE_C) ? 24'(n) : 0), "FP count");
    chk(w[4][23:0] == ((k == 2 && t == CFG_TYPE_A) ? 24'(n) : 0), "SW_MUL count");
    chk(w[5][23:0] == ((k >= 3 && t != CFG_TYPE_C) ? 24'(n) : 0), "SW_FP count");
    chk(w[1][23:0] >= 24'(n), "CLK count");
    packets++;
    pending--;
  end

  // ---------------- control memory ----------------
  task automatic wr(input logic [1:0] a, input logic [31:0] d);
    @(negedge clk);
    ctl_addr = a; ctl_we = 1; ctl_wdata = d;
    @(negedge clk);
    ctl_we = 0;
  endtask
  task automatic rd(input logic [1:0] a, output logic [31:0] d);
    @(negedge clk);
    ctl_addr = a;
    #1 d = ctl_rdata;
  endtask

  task automatic reconf(input int cl, input cluster_cfg_e t);
    logic [31:0] st;
    icap_n = 0; icap_cfg = int'(t);
    wr(2'd0, 32'h8000_0000 | 32'(cl << 4) | 32'(t));
    if (n_rejected == 0) begin
      wr(2'd0, 32'h8000_0001);
      rd(2'd1, st);
      chk(st[2], "second command refused");
      if (st[2]) n_rejected++;
    end
    do rd(2'd1, st); while (st[0]);
    chk(st[1], "done flag");
    chk(icap_n == SZ[t] / 4, $sformatf("ICAP words %0d", icap_n));
    chk(dut.cluster_cfg[cl] == t, "configuration applied");
    wr(2'd1, 32'h6);
    type_of[cl] = t;
    n_reconf[t]++;
  endtask

  // every phase must drain within a bound, or the run ends as failed
  task automatic wait_idle();
    int t;
    t = 0;
    while (pending > 0 || sendq.size() > 0) begin
      @(negedge clk);
      t++;
      if (t > 60000) begin
        failures++;
        $display("phase did not complete: %0d packets missing", pending);
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  endtask

  task automatic kernel_phase(input int k, input cluster_cfg_e best);
    fork
      begin
        for (int cl = 0; cl < NC; cl++) if (type_of[cl] != best) begin
          reconf(cl, best);
          dispatch(cl, k);
        end
      end
      begin
        for (int cl = 0; cl < NC; cl++) if (type_of[cl] == best) dispatch(cl, k);
      end
    join
    wait_idle();
    // second chunk on the whole, now homogeneous, array
    for (int cl = 0; cl < NC; cl++) dispatch(cl, k);
    wait_idle();
  endtask

  task automatic expect_drop(input int cl, input int core, input string why, inout int cnt);
    int p0;
    p0 = packets;
    sendq.push_back({4'(cl), 4'(core), 4'd1, 8'd0, 12'd2});
    repeat (300) @(negedge clk);
    chk(packets == p0 && outq.size() == 0 && sendq.size() == 0, why);
    cnt++;
  endtask

  initial begin
    rst_n = 0;
    s_host_tdata = 0; s_host_tlast = 0; s_host_tvalid = 0;
    ctl_addr = 0; ctl_we = 0; ctl_wdata = 0;
    for (int i = 0; i < 4; i++) n_reconf[i] = 0;
    {n_rejected, n_blank_drop, n_slot_drop, n_overlap} = '0;
    {n_cnet_cont, n_corenet_cont, n_bus_cont, n_shmem_cont, n_backpressure} = '0;
    type_of = '{CFG_TYPE_A, CFG_TYPE_A, CFG_TYPE_A, CFG_TYPE_B, CFG_TYPE_B, CFG_TYPE_C, CFG_TYPE_C};
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(cluster_active == '1, "all clusters active after reset");
    kernel_phase(1, CFG_TYPE_A);
    kernel_phase(2, CFG_TYPE_B);
    kernel_phase(3, CFG_TYPE_C);
    kernel_phase(4, CFG_TYPE_C);
    // slot 12 of a Type C cluster does not exist
    expect_drop(0, 12, "Type C cluster drops words for core 12", n_slot_drop);
    // power ceiling: switch two idle clusters off, then bring one back
    reconf(5, CFG_BLANK);
    reconf(6, CFG_BLANK);
    @(negedge clk);
    chk(cluster_active == 7'b0011111, "blank clusters inactive");
    expect_drop(6, 0, "blank cluster drops words", n_blank_drop);
    bp_on = 0;
    reconf(6, CFG_TYPE_C);
    dispatch(6, 4);
    for (int cl = 0; cl < 5; cl++) dispatch(cl, 3);
    wait_idle();
    chk(seen.exists(0) && seen.num() == n_swaps, "atomic swap chain over all cores");
    $display("packets %0d, reconfigurations A/B/C/blank %0d/%0d/%0d/%0d", packets,
             n_reconf[1], n_reconf[2], n_reconf[3], n_reconf[0]);
    $display("rejected %0d, blank drops %0d, slot drops %0d, run during reconfiguration %0d cycles",
             n_rejected, n_blank_drop, n_slot_drop, n_overlap);
    $display("contention: cluster net %0d, core net %0d, cluster bus %0d, shared memory %0d; host back-pressure %0d",
             n_cnet_cont, n_corenet_cont, n_bus_cont, n_shmem_cont, n_backpressure);
    chk(n_reconf[0] > 0 && n_reconf[1] > 0 && n_reconf[2] > 0 && n_reconf[3] > 0, "every configuration loaded");
    chk(n_rejected > 0, "command refusal happened");
    chk(n_blank_drop > 0 && n_slot_drop > 0, "drops happened");
    chk(n_overlap > 0, "execution during reconfiguration happened");
    chk(n_cnet_cont > 0, "cluster network contention happened");
    chk(n_corenet_cont > 0, "core network contention happened");
    chk(n_bus_cont > 0, "cluster bus contention happened");
    chk(n_shmem_cont > 0, "shared memory contention happened");
    chk(n_backpressure > 0, "host back-pressure happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
