// tb_reconf_timing: reconfiguration time with bitstreams of realistic size.
//
// The reconfiguration engine at its default parameters (7 clusters, 4 kB
// FIFO, 4 MB flash slots) loads a 2 MB cluster bitstream (Type A, B and C
// bitstreams are all about this size) and a 460 kB blank-box bitstream from a
// flash that answers every 16-bit read one cycle later and never refuses one.
// Each ICAP word is checked against the flash contents, and so is the count.
// The time from the command to the done flag is measured at a 100 MHz clock
// (10 ns period). It must lie within 2 % of the flash-bound figure
// (size / 2 reads at one per cycle: 10.49 ms and 2.36 ms). That agrees with
// the roughly 10 ms and 2 ms the original FPGA system needed for the same
// file sizes.
// A reconfiguration is also started for a cluster while another one is
// loading: it must be refused and must not disturb the transfer.
module tb_reconf_timing;
  import morph_pkg::*;
  localparam int NC = 7, SS = 21;
  localparam int SZ [4] = '{460 * 1024, 2 * 1024 * 1024, 2 * 1024 * 1024, 2 * 1024 * 1024};
  logic clk = 0;
  always #5 clk = ~clk;      // 100 MHz
  logic rst_n;
  logic [1:0]  ctl_addr;
  logic        ctl_we;
  logic [31:0] ctl_wdata, ctl_rdata;
  logic        flash_req, flash_gnt, flash_rvalid;
  logic [25:0] flash_addr;
  logic [15:0] flash_rdata;
  logic        icap_csib, icap_rdwrb;
  logic [31:0] icap_i;
  cluster_cfg_e [NC-1:0] cluster_cfg;
  logic [NC-1:0] cluster_busy;
  int checks = 0, failures = 0;

  reconf_engine dut (.*);
  flash_model #(.AW(26), .SLOT_SHIFT(SS), .LAT(1), .STALL_EVERY(0),
                .SIZE0(SZ[0]), .SIZE1(SZ[1]), .SIZE2(SZ[2]), .SIZE3(SZ[3])) u_flash (
    .clk, .req(flash_req), .addr(flash_addr), .gnt(flash_gnt), .rvalid(flash_rvalid), .rdata(flash_rdata)
  );

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  function automatic logic [15:0] fw(logic [25:0] a);
    return a[15:0] ^ 16'h5A3C ^ {a[7:0], a[15:8]};
  endfunction

  // ICAP monitor: word n of configuration cfg packs flash words 2+2n, 3+2n
  int icap_n = 0, icap_cfg = 0, icap_bad = 0;
  always @(posedge clk) if (rst_n && !icap_csib) begin
    logic [25:0] a;
    a = (26'(icap_cfg) << SS) + 26'(2 + 2*icap_n);
    if (icap_i != {fw(a), fw(a + 1)} || icap_rdwrb) icap_bad++;
    icap_n++;
  end

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

  task automatic load(input int cl, input cluster_cfg_e t, input bit try_second);
    logic [31:0] st;
    realtime t0, ms, ideal;
    icap_n = 0; icap_bad = 0; icap_cfg = int'(t);
    wr(2'd0, 32'h8000_0000 | 32'(cl << 4) | 32'(t));
    t0 = $realtime;
    if (try_second) begin
      repeat (1000) @(negedge clk);
      wr(2'd0, 32'h8000_0000 | 32'((cl + 1) << 4) | 32'(CFG_TYPE_C));
      rd(2'd1, st);
      chk(st[2] && st[0], "command during a transfer refused, transfer goes on");
      chk(cluster_busy == NC'(1 << cl), "only the first cluster isolated");
      wr(2'd1, 32'h4);
    end
    do rd(2'd1, st); while (st[0]);
    ms = ($realtime - t0) / 1.0e6;              // time unit is 1 ns
    ideal = real'(SZ[t]) / 2.0 * 10.0 / 1.0e6;  // one 16-bit read per 10 ns
    $display("cluster %0d configuration %0d: %0d bytes loaded in %0.3f ms (flash bound %0.3f ms)",
             cl, int'(t), SZ[t], ms, ideal);
    chk(st[1] && !st[2], "done, not rejected");
    chk(icap_n == SZ[t] / 4, $sformatf("ICAP word count %0d", icap_n));
    chk(icap_bad == 0, $sformatf("%0d wrong ICAP words", icap_bad));
    chk(ms >= ideal && ms <= ideal * 1.02, "reconfiguration time within 2 % of the flash rate");
    chk(cluster_cfg[cl] == t && cluster_busy == '0, "configuration applied, isolation released");
    rd(2'd3, st);
    chk(st == 32'(SZ[t]), "size register");
    wr(2'd1, 32'h6);
  endtask

  initial begin
    rst_n = 0;
    ctl_addr = 0; ctl_we = 0; ctl_wdata = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    load(2, CFG_TYPE_C, 1'b1);
    load(4, CFG_BLANK, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
