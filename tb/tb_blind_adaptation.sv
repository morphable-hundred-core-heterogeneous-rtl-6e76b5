// tb_blind_adaptation: counter-driven adaptation with no prior knowledge of
// the kernels, at the accelerator's default size.
//
// A host model stands in for the scheduling software. It runs the
// four-kernel benchmark in two kernel orders, 1-2-3-4 and then 1-3-2-4:
//   1 integer vector sum, 2 integer inner product,
//   3 FP vector sum,      4 FP inner product.
// Each cluster gets CHUNKS chunks of every kernel, one configuration word
// per live core.
// The host does not know what a kernel needs. A cluster runs its first chunk
// of a kernel with whatever configuration it holds. From the result packets
// the host reads the performance counters:
//   FP or software-FP operations      -> the kernel wants Type C (FPU);
//   hardware or software multiplies   -> Type B (multiplier, 12 cores);
//   neither                           -> Type A (15 cores).
// A cluster that has finished a chunk and holds another type is put on a
// reconfiguration wait list. The list is served one command at a time
// through the control registers while the other clusters keep working.
// A reconfigured cluster takes its next chunk at once.
// This classification rule stands in for the software's cost model and is
// this bench's own.
// The bench checks every packet (ids, TLAST, PE memory checks, counter values
// for the kernel and PE type). It also checks:
//   * at the end of each kernel, every cluster holds the type the counters
//     called for;
//   * the number of reconfigurations in each order;
//   * order 1-3-2-4 takes longer, because more clusters must be rewritten.
//     Its FP kernel first meets integer-only clusters, and the multiply
//     kernel that follows undoes the change.
// The bitstreams are shortened (a few hundred bytes) to keep the run short.
module tb_blind_adaptation;
  import morph_pkg::*;
  localparam int NC = 7, MC = 15, SS = 21;
  localparam int CHUNKS = 3, N_ELEM = 120;
  localparam int SZ [4] = '{128, 512, 512, 512};
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

  flash_model #(.AW(26), .SLOT_SHIFT(SS), .LAT(2), .STALL_EVERY(0),
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
    repeat (600000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // ---------------- host streams ----------------
  logic [32:0] outq[$];
  assign m_host_tready = 1'b1;
  always @(posedge clk) if (rst_n && m_host_tvalid && m_host_tready) outq.push_back({m_host_tlast, m_host_tdata});

  logic [31:0] sendq[$];
  logic s_host_tready_q;
  always @(posedge clk) s_host_tready_q <= s_host_tready && s_host_tvalid;
  always @(negedge clk) if (rst_n) begin
    if (s_host_tvalid && s_host_tready_q) s_host_tvalid = 0;
    if (!s_host_tvalid && sendq.size() > 0) begin
      s_host_tdata = sendq.pop_front(); s_host_tvalid = 1; s_host_tlast = 1;
    end
  end

  // ---------------- host state ----------------
  typedef enum int {IDLE, RUNNING, WAITING, RECONF} cl_state_e;
  cluster_cfg_e type_of [NC];
  cl_state_e    st_of [NC];
  int           left_of [NC], replies_of [NC];
  int           kern = 0, run_id = 1;
  cluster_cfg_e want;          // learned from the counters of the current kernel
  bit           known;
  int           waitlist[$];
  int           n_reconf = 0, n_learn_fp = 0, n_learn_mul = 0;

  function automatic int live(cluster_cfg_e t);
    return (t == CFG_TYPE_A) ? 15 : (t == CFG_TYPE_B) ? 12 : (t == CFG_TYPE_C) ? 8 : 0;
  endfunction

  task automatic dispatch(input int cl);
    for (int c = 0; c < live(type_of[cl]); c++)
      sendq.push_back({4'(cl), 4'(c), 4'(kern), 8'(run_id), 12'(N_ELEM)});
    run_id++;
    replies_of[cl] = 0;
    left_of[cl]--;
    st_of[cl] = RUNNING;
  endtask

  // packet checker and counter-based classification
  initial forever begin
    logic [32:0] w [6];
    int cl, c; cluster_cfg_e t, cls;
    for (int i = 0; i < 6; i++) begin
      while (outq.size() == 0) @(negedge clk);
      w[i] = outq.pop_front();
    end
    cl = int'(w[0][31:28]); c = int'(w[0][27:24]);
    t = type_of[cl];
    for (int i = 0; i < 6; i++) begin
      chk(w[i][32] == (i == 5), "tlast on sixth word");
      chk(w[i][31:24] == w[0][31:24], "packet not interleaved");
    end
    chk(st_of[cl] == RUNNING && c < live(t), "reply from a running cluster");
    chk(w[0][23] == 1'b0, $sformatf("PE memory checks cluster %0d core %0d", cl, c));
    chk(w[2][23:0] == ((kern == 2 && t != CFG_TYPE_A) ? 24'(N_ELEM) : 0), "MUL count");
    chk(w[3][23:0] == ((kern >= 3 && t == CFG_TYPE_C) ? 24'(N_ELEM) : 0), "FP count");
    chk(w[4][23:0] == ((kern == 2 && t == CFG_TYPE_A) ? 24'(N_ELEM) : 0), "SW_MUL count");
    chk(w[5][23:0] == ((kern >= 3 && t != CFG_TYPE_C) ? 24'(N_ELEM) : 0), "SW_FP count");
    // what the counters say the kernel needs
    if (w[3][23:0] != 0 || w[5][23:0] != 0) cls = CFG_TYPE_C;
    else if (w[2][23:0] != 0 || w[4][23:0] != 0) cls = CFG_TYPE_B;
    else cls = CFG_TYPE_A;
    if (!known) begin
      known = 1; want = cls;
      if (cls == CFG_TYPE_C) n_learn_fp++;
      if (cls == CFG_TYPE_B) n_learn_mul++;
    end else chk(cls == want, "all packets of a kernel classify alike");
    replies_of[cl]++;
    if (replies_of[cl] == live(t)) st_of[cl] = IDLE;
  end

  // reconfiguration server: one command at a time from the wait list
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
  initial forever begin
    int cl;
    cluster_cfg_e t;
    logic [31:0] s;
    while (waitlist.size() == 0) @(negedge clk);
    cl = waitlist.pop_front();
    t = want;
    st_of[cl] = RECONF;
    wr(2'd0, 32'h8000_0000 | 32'(cl << 4) | 32'(t));
    do rd(2'd1, s); while (s[0]);
    chk(s[1] && !s[2] && dut.cluster_cfg[cl] == t, "reconfiguration done");
    wr(2'd1, 32'h6);
    type_of[cl] = t;
    n_reconf++;
    st_of[cl] = IDLE;
  end

  // scheduler: one kernel, blind
  task automatic run_kernel(input int k);
    int t0;
    bit busy;
    kern = k; known = 0;
    for (int cl = 0; cl < NC; cl++) begin left_of[cl] = CHUNKS; st_of[cl] = IDLE; end
    t0 = cyc;
    forever begin
      @(negedge clk);
      busy = 0;
      for (int cl = 0; cl < NC; cl++) begin
        if (st_of[cl] == IDLE && left_of[cl] > 0) begin
          if (known && type_of[cl] != want && left_of[cl] < CHUNKS) begin
            st_of[cl] = WAITING;
            waitlist.push_back(cl);
          end else dispatch(cl);
        end
        if (st_of[cl] != IDLE || left_of[cl] > 0) busy = 1;
      end
      if (!busy) break;
      if (cyc - t0 > 200000) begin
        failures++;
        $display("kernel %0d did not complete", k);
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
    for (int cl = 0; cl < NC; cl++)
      chk(type_of[cl] == want, $sformatf("kernel %0d: cluster %0d adapted", k, cl));
  endtask

  task automatic run_order(input int o [4], output int cycles, output int reconfs);
    int t0, r0;
    t0 = cyc; r0 = n_reconf;
    for (int i = 0; i < 4; i++) run_kernel(o[i]);
    cycles = cyc - t0;
    reconfs = n_reconf - r0;
    $display("kernel order %0d-%0d-%0d-%0d: %0d cycles, %0d reconfigurations",
             o[0], o[1], o[2], o[3], cycles, reconfs);
  endtask

  initial begin
    int cyc1, cyc2, rc1, rc2;
    rst_n = 0;
    s_host_tdata = 0; s_host_tlast = 0; s_host_tvalid = 0;
    ctl_addr = 0; ctl_we = 0; ctl_wdata = 0;
    type_of = '{CFG_TYPE_A, CFG_TYPE_A, CFG_TYPE_A, CFG_TYPE_B, CFG_TYPE_B, CFG_TYPE_C, CFG_TYPE_C};
    repeat (3) @(posedge clk);
    rst_n = 1;
    // start from the reset configuration
    run_order('{1, 2, 3, 4}, cyc1, rc1);
    // from all Type C (left by kernel 4), back to the reset mix for a fair start
    begin
      cluster_cfg_e init [NC];
      init = '{CFG_TYPE_A, CFG_TYPE_A, CFG_TYPE_A, CFG_TYPE_B, CFG_TYPE_B, CFG_TYPE_C, CFG_TYPE_C};
      for (int cl = 0; cl < NC; cl++) if (type_of[cl] != init[cl]) begin
        want = init[cl];
        waitlist.push_back(cl);
        while (waitlist.size() != 0 || st_of[cl] == RECONF) @(negedge clk);
        @(negedge clk);
      end
    end
    run_order('{1, 3, 2, 4}, cyc2, rc2);
    // reset mix: kernel 1 rewrites 4 clusters to A; 1-2-3-4 then needs 7 + 7,
    // 1-3-2-4 needs 7 + 7 + 7
    chk(rc1 == 4 + 7 + 7, "reconfigurations in order 1-2-3-4");
    chk(rc2 == 4 + 7 + 7 + 7, "reconfigurations in order 1-3-2-4");
    chk(cyc2 > cyc1, "order 1-3-2-4 takes longer");
    chk(n_learn_fp == 4 && n_learn_mul == 2, "FP and multiply needs recognised from the counters");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
