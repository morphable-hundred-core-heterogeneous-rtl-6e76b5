// tb_sp_ram: random reads and writes against an associative-array model.
// Checks that every request is granted, that rvalid follows one cycle later,
// and that the returned word is the value before the access.
module tb_sp_ram;
  import morph_pkg::*;
  localparam int unsigned DEPTH = 256;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, gnt;
  mem_req_t req;
  mem_rsp_t rsp;
  int checks = 0, failures = 0;
  logic [31:0] model [DEPTH];

  sp_ram #(.DEPTH(DEPTH)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] exp;
    logic        was_req;
    rst_n = 0; req = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      req = '{req: 1'b1, we: 1'b1, addr: 32'(a), wdata: 32'(a * 7 + 3)};
      model[a] = 32'(a * 7 + 3);
    end
    @(negedge clk);
    req = '0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      req.req   = ($urandom % 4) != 0;
      req.we    = $urandom % 2;
      req.addr  = 32'($urandom % DEPTH) | (32'($urandom % 4) << 12);
      req.wdata = $urandom;
      was_req = req.req;
      exp = model[req.addr % DEPTH];
      #1 checks++;
      if (gnt != 1'b1) begin failures++; $display("not granted"); end
      if (req.req && req.we) model[req.addr % DEPTH] = req.wdata;
      @(negedge clk);
      checks++;
      if (rsp.rvalid != was_req) begin failures++; $display("rvalid wrong"); end
      if (was_req) begin
        checks++;
        if (rsp.rdata != exp) begin failures++; $display("rdata %h exp %h", rsp.rdata, exp); end
      end
      req = '0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
