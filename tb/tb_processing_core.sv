// tb_processing_core: one core slot with the behavioural PE attached. For
// each PE type and kernel it sends a configuration word, lets the PE run
// (writing its results to the scratch-pad and reading one back, using a RAM
// as the shared bus), and checks the returned packet: tuple, no error flag
// from the PE's memory checks, the swap chain value, CLK at least the
// kernel's minimum time, and the exact count of each event for that type and
// kernel (e.g. software multiplications only on Type A for kernel 2).
module tb_processing_core;
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
  mem_req_t pe_lmem_req, bus_req;
  logic     pe_lmem_gnt, bus_gnt;
  mem_rsp_t pe_lmem_rsp, bus_rsp;
  int checks = 0, failures = 0;

  processing_core #(.NUM_COUNTERS(5), .LMEM_DEPTH(4096)) dut (.*);
  pe_model #(.CLUSTER(2), .CORE(3)) u_pe (
    .clk, .to_pe, .from_pe, .lmem_req(pe_lmem_req), .lmem_gnt(pe_lmem_gnt), .lmem_rsp(pe_lmem_rsp),
    .bus_req, .bus_gnt, .bus_rsp
  );
  sp_ram #(.DEPTH(64)) u_bus_ram (.clk, .rst_n, .req(bus_req), .gnt(bus_gnt), .rsp(bus_rsp));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  int unsigned last_tok = 0;

  task automatic run(input cluster_cfg_e t, input int k, input int n, input int r);
    logic [31:0] w [6];
    int unsigned exp_ev [4], cpe, tok;
    pe_type = t;
    @(negedge clk);
    s_tdata = {8'h23, 4'(k), 8'(r), 12'(n)}; s_tvalid = 1; s_tlast = 1;
    @(negedge clk);
    s_tvalid = 0;
    for (int i = 0; i < 6; i++) begin
      while (!m_tvalid) @(negedge clk);
      w[i] = m_tdata;
      chk(m_tlast == (i == 5), "tlast");
      @(negedge clk);
    end
    for (int e = 0; e < 4; e++) exp_ev[e] = 0;
    cpe = (k == 1) ? 1 : (k == 2) ? ((t == CFG_TYPE_A) ? 6 : 2) : ((t == CFG_TYPE_C) ? 3 : 12);
    if (k == 2) exp_ev[(t == CFG_TYPE_A) ? EV_SW_MUL : EV_MUL] = n;
    if (k >= 3) exp_ev[(t == CFG_TYPE_C) ? EV_FP : EV_SW_FP] = n;
    tok = 1 + 16*2 + 3 + 256*r;
    for (int i = 0; i < 6; i++) chk(w[i][31:24] == 8'h23, "tuple");
    chk(w[0][23] == 1'b0, "PE memory checks");
    if (r > 0) chk(w[0][22:0] == 23'(last_tok), $sformatf("swap returned %h exp %h", w[0][22:0], last_tok));
    chk(w[1][23:0] >= 24'(n * cpe + 2), $sformatf("CLK %0d too small", w[1][23:0]));
    for (int e = 0; e < 4; e++) chk(w[2+e][23:0] == 24'(exp_ev[e]), $sformatf("type %0d kernel %0d event %0d = %0d exp %0d", t, k, e, w[2+e][23:0], exp_ev[e]));
    last_tok = tok;
  endtask

  initial begin
    rst_n = 0; slot_en = 1; pe_type = CFG_TYPE_A; cluster_id = 4'd2; core_id = 4'd3;
    s_tdata = 0; s_tlast = 0; s_tvalid = 0; m_tready = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < 24; r++)
      run(cluster_cfg_e'(1 + r % 3), 1 + (r / 3) % 4, 1 + $urandom % 50, r);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
