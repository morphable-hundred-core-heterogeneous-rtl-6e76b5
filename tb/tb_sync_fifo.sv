// tb_sync_fifo: random pushes and pops against a queue model on a 1024-deep
// FIFO, including filling it completely (full, ignored push) and draining it
// (empty, ignored pop). Checks data order, count, full and empty each cycle.
module tb_sync_fifo;
  localparam int unsigned DEPTH = 1024;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, wr_en, rd_en, full, empty;
  logic [31:0] wr_data, rd_data;
  logic [10:0] count;
  int checks = 0, failures = 0;
  logic [31:0] q[$];

  sync_fifo #(.DEPTH(DEPTH), .W(32)) dut (.*);

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic w, input logic r);
    int sz;
    @(negedge clk);
    wr_en = w; rd_en = r; wr_data = $urandom;
    #1;
    checks++;
    if (count != 11'(q.size()) || full != (q.size() == DEPTH) || empty != (q.size() == 0)) begin
      failures++; $display("count %0d model %0d", count, q.size());
    end
    if (q.size() > 0) begin
      checks++;
      if (rd_data != q[0]) begin failures++; $display("data %h exp %h", rd_data, q[0]); end
    end
    sz = q.size();
    @(posedge clk);
    if (r && sz > 0) void'(q.pop_front());
    if (w && sz < DEPTH) q.push_back(wr_data);
  endtask

  initial begin
    rst_n = 0; wr_en = 0; rd_en = 0; wr_data = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) step(($urandom % 4) != 0, ($urandom % 4) == 0);
    for (int i = 0; i < 1100; i++) step(1'b1, 1'b0);   // fill past full
    for (int i = 0; i < 200; i++)  step(($urandom % 2) != 0, ($urandom % 2) != 0);
    for (int i = 0; i < 1200; i++) step(1'b0, 1'b1);   // drain past empty
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
