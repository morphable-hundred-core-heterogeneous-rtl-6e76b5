// tb_reconf_engine: the reconfiguration engine against a flash model (three
// cycles of read latency, a refused request every fifth cycle) and an ICAP
// monitor. Checks the configuration after reset; for commands to several
// clusters and configurations: busy and the region's isolation flag while
// loading, every ICAP word (two flash words packed, first in the high half)
// in order and their number (size / 4), the recorded size, the new
// configuration and the done flag; refusal of a command while busy and of a
// cluster number out of range (rejected flag, nothing loaded); clearing of
// the flags; and a transfer time close to the flash rate (2 cycles per 32-bit
// word plus refused cycles and latency).
module tb_reconf_engine;
  import morph_pkg::*;
  localparam int NC = 7, SS = 21;
  localparam int SZ [4] = '{460, 2048, 4096, 8192};
  logic clk = 0;
  always #5 clk = ~clk;
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

  reconf_engine #(.N_CLUSTERS(NC)) dut (.*);
  flash_model #(.AW(26), .SLOT_SHIFT(SS), .LAT(3), .STALL_EVERY(5),
                .SIZE0(SZ[0]), .SIZE1(SZ[1]), .SIZE2(SZ[2]), .SIZE3(SZ[3])) u_flash (
    .clk, .req(flash_req), .addr(flash_addr), .gnt(flash_gnt), .rvalid(flash_rvalid), .rdata(flash_rdata)
  );

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] fw(logic [25:0] a);
    return a[15:0] ^ 16'h5A3C ^ {a[7:0], a[15:8]};
  endfunction

  logic [31:0] icap_q[$];
  always @(posedge clk) if (rst_n && !icap_csib) begin
    icap_q.push_back(icap_i);
    if (icap_rdwrb) begin failures++; $display("ICAP read strobe"); end
  end

  task automatic chk(input logic c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

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

  logic [13:0] cfg_model;

  task automatic reconf(input int cl, input int c);
    logic [31:0] st, v;
    int t0, words, exp_max;
    icap_q.delete();
    wr(2'd0, 32'h8000_0000 | 32'(cl << 4) | 32'(c));
    t0 = cyc;
    rd(2'd1, st);
    chk(st[0] == 1'b1, "busy after command");
    chk(cluster_busy == (NC'(1) << cl), "only the target region isolated");
    // a second command while busy is refused
    wr(2'd0, 32'h8000_0000 | 32'(((cl + 1) % NC) << 4) | 32'd1);
    rd(2'd1, st);
    chk(st[2] == 1'b1, "command while busy rejected");
    do rd(2'd1, st); while (st[0]);
    chk(st[1] == 1'b1, "done flag");
    words = SZ[c] / 4;
    exp_max = words * 2 * 5 / 4 + 40;
    chk(cyc - t0 <= exp_max, $sformatf("transfer took %0d cycles, limit %0d", cyc - t0, exp_max));
    chk(icap_q.size() == words, $sformatf("ICAP words %0d exp %0d", icap_q.size(), words));
    for (int i = 0; i < icap_q.size() && i < words; i++) begin
      logic [25:0] a;
      a = (26'(c) << SS) + 26'(2 + 2*i);
      chk(icap_q[i] == {fw(a), fw(a + 1)}, $sformatf("ICAP word %0d", i));
    end
    cfg_model[2*cl +: 2] = 2'(c);
    rd(2'd2, v);
    chk(v[13:0] == cfg_model, "configuration register");
    chk(cluster_cfg[cl] == cluster_cfg_e'(c), "configuration output");
    rd(2'd3, v);
    chk(v == 32'(SZ[c]), "recorded size");
    wr(2'd1, 32'h6);
    rd(2'd1, st);
    chk(st[2:0] == 3'b000, "flags cleared");
  endtask

  int cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    logic [31:0] v;
    rst_n = 0; ctl_addr = 0; ctl_we = 0; ctl_wdata = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    cfg_model = {2'd3, 2'd3, 2'd2, 2'd2, 2'd1, 2'd1, 2'd1};
    rd(2'd2, v);
    chk(v[13:0] == cfg_model, "initial configuration");
    rd(2'd1, v);
    chk(v[2:0] == 3'b000, "idle after reset");
    reconf(0, 3);
    reconf(3, 0);
    reconf(6, 2);
    reconf(2, 1);
    reconf(3, 3);
    // out-of-range cluster
    icap_q.delete();
    wr(2'd0, 32'h8000_0000 | (32'd9 << 4) | 32'd1);
    repeat (20) @(negedge clk);
    rd(2'd1, v);
    chk(v[2:0] == 3'b100, "cluster 9 rejected, nothing started");
    chk(icap_q.size() == 0, "nothing sent to ICAP");
    // command word without go bit does nothing
    wr(2'd1, 32'h6);
    wr(2'd0, 32'h0000_0021);
    repeat (10) @(negedge clk);
    rd(2'd1, v);
    chk(v[2:0] == 3'b000, "no go bit, no action");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
