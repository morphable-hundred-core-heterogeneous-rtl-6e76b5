// tb_mem_interconnect: four masters share the bus to two one-cycle RAM
// targets (address bit 31 selects the target). Each master does random reads
// and writes to its own addresses in both targets and checks read data
// against its own model; rvalid must reach only the owner of the access.
// A final phase with every master requesting back to back checks that the
// bus issues an access on at least 90 % of cycles (one access per cycle).
module tb_mem_interconnect;
  import morph_pkg::*;
  localparam int NM = 4;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n;
  mem_req_t [NM-1:0] m_req;
  logic     [NM-1:0] m_gnt;
  mem_rsp_t [NM-1:0] m_rsp;
  mem_req_t [1:0]    t_req;
  logic     [1:0]    t_gnt;
  mem_rsp_t [1:0]    t_rsp;
  int checks = 0, failures = 0;

  mem_interconnect #(.N_M(NM), .SEL_BIT(31)) dut (.*);
  sp_ram #(.DEPTH(256)) u_t0 (.clk, .rst_n, .req(t_req[0]), .gnt(t_gnt[0]), .rsp(t_rsp[0]));
  sp_ram #(.DEPTH(256)) u_t1 (.clk, .rst_n, .req(t_req[1]), .gnt(t_gnt[1]), .rsp(t_rsp[1]));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // with one-cycle targets, rvalid[m] must follow gnt[m] by exactly one cycle
  logic [NM-1:0] outstanding, gnt_q, rv;
  int unsigned issued_n = 0;
  always @(posedge clk) if (rst_n) begin
    for (int m = 0; m < NM; m++) rv[m] = m_rsp[m].rvalid;
    checks++;
    if (rv != gnt_q) begin failures++; $display("rvalid %b after gnt %b", rv, gnt_q); end
    gnt_q <= m_gnt;
    issued_n += $countones(m_gnt);
  end

  task automatic access(input int m, input logic we, input logic [31:0] a,
                        input logic [31:0] d, output logic [31:0] q);
    logic g;
    m_req[m] = '{req: 1'b1, we: we, addr: a, wdata: d};
    forever begin
      #1 g = m_gnt[m];
      @(negedge clk);
      if (g) break;
    end
    m_req[m] = '0;
    outstanding[m] = 1'b1;
    forever begin
      #1;
      if (m_rsp[m].rvalid) break;
      @(negedge clk);
    end
    q = m_rsp[m].rdata;
    outstanding[m] = 1'b0;
  endtask

  logic random_gaps = 1;
  task automatic master(input int m, input int n);
    logic [31:0] model [2][64];
    logic [31:0] q, a, d;
    int t, i;
    for (t = 0; t < 2; t++) for (i = 0; i < 64; i++) model[t][i] = 'x;
    // initialise own words
    for (t = 0; t < 2; t++) for (i = 0; i < 64; i++) begin
      a = {1'(t), 23'd0, 2'(m), 6'(i)};
      d = $urandom;
      access(m, 1'b1, a, d, q);
      model[t][i] = d;
    end
    repeat (n) begin
      logic w;
      t = $urandom % 2; i = $urandom % 64; w = $urandom % 2; d = $urandom;
      a = {1'(t), 23'd0, 2'(m), 6'(i)};
      access(m, w, a, d, q);
      checks++;
      if (q != model[t][i]) begin failures++; $display("m%0d t%0d i%0d got %h exp %h", m, t, i, q, model[t][i]); end
      if (w) model[t][i] = d;
      if (random_gaps) repeat ($urandom % 3) @(negedge clk);
    end
  endtask

  initial begin
    int unsigned c0, t0;
    rst_n = 0; m_req = '0; outstanding = '0; gnt_q = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    fork
      master(0, 1500); master(1, 1500); master(2, 1500); master(3, 1500);
    join
    random_gaps = 0;
    c0 = issued_n;
    t0 = cyc;
    fork
      master(0, 300); master(1, 300); master(2, 300); master(3, 300);
    join
    checks++;
    if ((issued_n - c0) * 10 < (cyc - t0) * 9) begin
      failures++; $display("throughput %0d accesses in %0d cycles", issued_n - c0, cyc - t0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int unsigned cyc = 0;
  always @(posedge clk) cyc++;
endmodule
