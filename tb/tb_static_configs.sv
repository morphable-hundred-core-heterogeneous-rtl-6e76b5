// tb_static_configs: the four-kernel benchmark on fixed (non-adaptive)
// cluster configurations, at the accelerator's default size.
//
// The accelerator is evaluated against four static systems of seven clusters:
// all Type A (105 cores), all Type B (84), all Type C (56), and a mix of two
// Type A, two Type B and three Type C clusters (78). This bench first loads
// each system through the reconfiguration engine, using short stand-in
// bitstreams. It then runs the four kernels one after another:
//   1 integer vector sum, 2 integer inner product,
//   3 FP vector sum,      4 FP inner product.
// Each kernel has TOTAL elements, split evenly over all live cores, one chunk
// per core. The behavioural PE spends a fixed number of cycles per element,
// depending on the kernel and its own type. Software multiply and FP
// emulation are slow, so:
//   cycles per element: kernel 1: 1 on every type;
//                       kernel 2: 6 on A, 2 on B and C;
//                       kernels 3, 4: 12 on A and B, 3 on C.
// Those per-element costs are this bench's, not measured ones. TOTAL is
// large enough that compute, not the single host port (one word in, six
// words out per core), decides the kernel time.
// For every packet the bench checks the ids, TLAST, the PE's memory
// self-checks and each counter value. It counts one packet per live core and
// no more.
// It measures the cycles from the first dispatched word to the last result
// of each kernel, prints a table and checks the ranking the evaluation relies
// on:
//   kernel 1 is fastest on all-A (most cores);
//   kernel 2 is fastest on all-B (hardware multiply on 84 cores);
//   kernels 3 and 4 are fastest on all-C (the FPU);
//   so picking the best configuration for each kernel beats every static
//   system, if the reconfiguration time is left out.
module tb_static_configs;
  import morph_pkg::*;
  localparam int NC = 7, MC = 15, SS = 21;
  localparam int TOTAL = 200000;
  localparam int SZ [4] = '{64, 128, 128, 128};
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
    repeat (1_000_000) @(posedge clk);
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

  // ---------------- dispatch and checking ----------------
  cluster_cfg_e type_of [NC];
  int kern_of [NC][MC], n_of [NC][MC];
  int pending = 0, run_id = 1, packets = 0;

  function automatic int live(cluster_cfg_e t);
    return (t == CFG_TYPE_A) ? 15 : (t == CFG_TYPE_B) ? 12 : (t == CFG_TYPE_C) ? 8 : 0;
  endfunction

  // split TOTAL elements of kernel k evenly over every live core
  task automatic dispatch_all(input int k);
    int cores, idx;
    cores = 0;
    for (int cl = 0; cl < NC; cl++) cores += live(type_of[cl]);
    idx = 0;
    for (int cl = 0; cl < NC; cl++) begin
      for (int c = 0; c < live(type_of[cl]); c++) begin
        kern_of[cl][c] = k;
        n_of[cl][c] = TOTAL / cores + ((idx < TOTAL % cores) ? 1 : 0);
        sendq.push_back({4'(cl), 4'(c), 4'(k), 8'(run_id), 12'(n_of[cl][c])});
        pending++;
        idx++;
      end
      run_id++;
    end
  endtask

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
    t = type_of[cl];
    chk(c < live(t) && pending > 0, "reply from a live core that had work");
    k = kern_of[cl][c]; n = n_of[cl][c];
    chk(w[0][23] == 1'b0, $sformatf("PE memory checks cluster %0d core %0d", cl, c));
    chk(w[2][23:0] == ((k == 2 && t != CFG_TYPE_A) ? 24'(n) : 0), "MUL count");
    chk(w[3][23:0] == ((k >= 3 && t == CFG_TYPE_C) ? 24'(n) : 0), "FP count");
    chk(w[4][23:0] == ((k == 2 && t == CFG_TYPE_A) ? 24'(n) : 0), "SW_MUL count");
    chk(w[5][23:0] == ((k >= 3 && t != CFG_TYPE_C) ? 24'(n) : 0), "SW_FP count");
    chk(w[1][23:0] >= 24'(n), "CLK count");
    packets++;
    pending--;
  end

  // ---------------- reconfiguration through the control memory ----------------
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
    wr(2'd0, 32'h8000_0000 | 32'(cl << 4) | 32'(t));
    do rd(2'd1, st); while (st[0]);
    chk(st[1] && !st[2] && dut.cluster_cfg[cl] == t, "configuration loaded");
    wr(2'd1, 32'h6);
    type_of[cl] = t;
  endtask

  task automatic run_kernel(input int k, output int cycles);
    int t0, p0, cores;
    t0 = cyc; p0 = packets;
    cores = 0;
    for (int cl = 0; cl < NC; cl++) cores += live(type_of[cl]);
    dispatch_all(k);
    while (pending > 0) begin
      @(negedge clk);
      if (cyc - t0 > 100000) begin
        failures++;
        $display("kernel %0d did not complete: %0d packets missing", k, pending);
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
    cycles = cyc - t0;
    repeat (50) @(negedge clk);
    chk(packets - p0 == cores && outq.size() == 0, "one packet per live core");
  endtask

  localparam cluster_cfg_e SYS [4][NC] = '{
    '{CFG_TYPE_A, CFG_TYPE_A, CFG_TYPE_A, CFG_TYPE_A, CFG_TYPE_A, CFG_TYPE_A, CFG_TYPE_A},
    '{CFG_TYPE_B, CFG_TYPE_B, CFG_TYPE_B, CFG_TYPE_B, CFG_TYPE_B, CFG_TYPE_B, CFG_TYPE_B},
    '{CFG_TYPE_C, CFG_TYPE_C, CFG_TYPE_C, CFG_TYPE_C, CFG_TYPE_C, CFG_TYPE_C, CFG_TYPE_C},
    '{CFG_TYPE_A, CFG_TYPE_A, CFG_TYPE_B, CFG_TYPE_B, CFG_TYPE_C, CFG_TYPE_C, CFG_TYPE_C}};
  localparam string SYS_NAME [4] = '{"7 x A", "7 x B", "7 x C", "2A+2B+3C"};

  int cyc_of [4][5];

  initial begin
    int best, total [4];
    rst_n = 0;
    s_host_tdata = 0; s_host_tlast = 0; s_host_tvalid = 0;
    ctl_addr = 0; ctl_we = 0; ctl_wdata = 0;
    type_of = '{CFG_TYPE_A, CFG_TYPE_A, CFG_TYPE_A, CFG_TYPE_B, CFG_TYPE_B, CFG_TYPE_C, CFG_TYPE_C};
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < 4; s++) begin
      int cores;
      for (int cl = 0; cl < NC; cl++) if (type_of[cl] != SYS[s][cl]) reconf(cl, SYS[s][cl]);
      cores = 0;
      for (int cl = 0; cl < NC; cl++) cores += live(type_of[cl]);
      chk(cores == ((s == 0) ? 105 : (s == 1) ? 84 : (s == 2) ? 56 : 78), "core count of the system");
      total[s] = 0;
      for (int k = 1; k <= 4; k++) begin
        run_kernel(k, cyc_of[s][k]);
        total[s] += cyc_of[s][k];
      end
      $display("%-9s %3d cores: kernel cycles %6d %6d %6d %6d  total %7d", SYS_NAME[s], cores,
               cyc_of[s][1], cyc_of[s][2], cyc_of[s][3], cyc_of[s][4], total[s]);
    end
    for (int k = 1; k <= 4; k++) begin
      best = 0;
      for (int s = 1; s < 4; s++) if (cyc_of[s][k] < cyc_of[best][k]) best = s;
      chk(best == ((k == 1) ? 0 : (k == 2) ? 1 : 2), $sformatf("kernel %0d fastest on %s", k, SYS_NAME[best]));
    end
    begin
      int adaptive;
      adaptive = cyc_of[0][1] + cyc_of[1][2] + cyc_of[2][3] + cyc_of[2][4];
      $display("best configuration per kernel: %0d cycles", adaptive);
      for (int s = 0; s < 4; s++)
        chk(adaptive < total[s], $sformatf("per-kernel choice beats static %s", SYS_NAME[s]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
