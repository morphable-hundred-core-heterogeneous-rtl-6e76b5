// tb_shared_memory_controller: seven cluster ports access the shared memory
// (address bit 30 = 0) and the synchronisation words (bit 30 = 1) at once.
// Each port writes and reads back its own shared-memory words against a
// model. Every port then swaps tokens into sync word 0 many times: because
// each swap is atomic, the old values returned, together with the value left
// at the end, must be exactly the starting zero plus every token, each once.
module tb_shared_memory_controller;
  import morph_pkg::*;
  localparam int NC = 7;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n;
  mem_req_t [NC-1:0] cl_req;
  logic     [NC-1:0] cl_gnt;
  mem_rsp_t [NC-1:0] cl_rsp;
  int checks = 0, failures = 0;

  shared_memory_controller #(.N_CLUSTERS(NC), .SHARED_DEPTH(1024)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic access(input int m, input logic we, input logic [31:0] a,
                        input logic [31:0] d, output logic [31:0] q);
    logic g;
    cl_req[m] = '{req: 1'b1, we: we, addr: a, wdata: d};
    forever begin
      #1 g = cl_gnt[m];
      @(negedge clk);
      if (g) break;
    end
    cl_req[m] = '0;
    forever begin
      #1;
      if (cl_rsp[m].rvalid) break;
      @(negedge clk);
    end
    q = cl_rsp[m].rdata;
  endtask

  int seen [int];
  localparam int SWAPS = 50;

  task automatic port(input int m);
    logic [31:0] model [32];
    logic [31:0] q, d;
    for (int i = 0; i < 32; i++) begin
      d = $urandom;
      access(m, 1'b1, 32'h8000_0000 | 32'(m * 32 + i), d, q);
      model[i] = d;
    end
    for (int k = 0; k < 200; k++) begin
      int i; logic w;
      i = $urandom % 32; w = $urandom % 2; d = $urandom;
      access(m, w, 32'h8000_0000 | 32'(m * 32 + i), d, q);
      checks++;
      if (q != model[i]) begin failures++; $display("port %0d word %0d got %h exp %h", m, i, q, model[i]); end
      if (w) model[i] = d;
    end
    for (int k = 0; k < SWAPS; k++) begin
      access(m, 1'b1, 32'hC000_0000, 32'(1 + m * 1000 + k), q);
      if (seen.exists(int'(q))) begin failures++; $display("value %0d returned twice", q); end
      seen[int'(q)] = 1;
      repeat ($urandom % 2) @(negedge clk);
    end
  endtask

  initial begin
    logic [31:0] q;
    rst_n = 0; cl_req = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    fork
      port(0); port(1); port(2); port(3); port(4); port(5); port(6);
    join
    access(0, 1'b0, 32'hC000_0000, 0, q);
    seen[int'(q)] = 1;
    checks++;
    if (seen.num() != NC * SWAPS + 1 || !seen.exists(0)) begin
      failures++; $display("swap chain broken: %0d distinct values", seen.num());
    end
    for (int m = 0; m < NC; m++)
      for (int k = 0; k < SWAPS; k++) begin
        checks++;
        if (!seen.exists(1 + m * 1000 + k)) begin failures++; $display("token %0d lost", 1 + m * 1000 + k); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
