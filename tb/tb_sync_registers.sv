// tb_sync_registers: checks reset to zero, reads, and that a write is an
// atomic swap returning the previous value (lock acquire/release sequence).
module tb_sync_registers;
  import morph_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, gnt;
  mem_req_t req;
  mem_rsp_t rsp;
  int checks = 0, failures = 0;
  logic [31:0] model [16];

  sync_registers #(.N_WORDS(16)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic access(input logic we, input int a, input logic [31:0] d, input logic [31:0] exp);
    @(negedge clk);
    req = '{req: 1'b1, we: we, addr: 32'(a), wdata: d};
    @(negedge clk);
    req = '0;
    checks++;
    if (!rsp.rvalid || rsp.rdata != exp) begin
      failures++; $display("word %0d we=%0d got %h exp %h", a, we, rsp.rdata, exp);
    end
  endtask

  initial begin
    rst_n = 0; req = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int a = 0; a < 16; a++) begin access(1'b0, a, 0, 32'd0); model[a] = 0; end
    // lock: first swap of 1 gets 0 (acquired), second gets 1 (busy)
    access(1'b1, 3, 32'd1, 32'd0);
    access(1'b1, 3, 32'd1, 32'd1);
    access(1'b1, 3, 32'd0, 32'd1);   // release
    access(1'b0, 3, 0, 32'd0);
    model[3] = 0;
    for (int i = 0; i < 500; i++) begin
      int a; logic [31:0] d; logic w;
      a = $urandom % 16; d = $urandom; w = $urandom % 2;
      access(w, a, d, model[a]);
      if (w) model[a] = d;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
