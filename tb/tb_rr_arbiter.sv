// tb_rr_arbiter: random requests against a reference round-robin model.
// Every cycle the expected winner (first requester at or after the model's
// pointer, wrapping) is compared with grant and grant_idx; the model pointer
// moves past the winner when advance is high. Also checks fairness: with all
// 16 requesting and advancing every cycle, grants visit 0..15 in order.
module tb_rr_arbiter;
  localparam int unsigned N = 16;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n;
  logic [N-1:0] req, grant;
  logic advance, any_grant;
  logic [3:0] grant_idx;
  int checks = 0, failures = 0;
  int unsigned ptr_m = 0;

  rr_arbiter #(.N(N)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic [N-1:0] r, input logic adv);
    int exp_idx;
    @(negedge clk);
    req = r; advance = adv;
    #1;
    exp_idx = -1;
    for (int k = 0; k < N; k++) begin
      int idx;
      idx = (int'(ptr_m) + k) % N;
      if (exp_idx < 0 && r[idx]) exp_idx = idx;
    end
    checks++;
    if (exp_idx < 0) begin
      if (any_grant || grant != '0) begin failures++; $display("grant without request"); end
    end else if (!any_grant || int'(grant_idx) != exp_idx || grant != (N'(1) << exp_idx)) begin
      failures++;
      $display("req=%h ptr=%0d exp=%0d got=%0d grant=%h", r, ptr_m, exp_idx, grant_idx, grant);
    end
    @(posedge clk);
    if (adv && exp_idx >= 0) ptr_m = (exp_idx + 1) % N;
  endtask

  initial begin
    rst_n = 0; req = '0; advance = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++)
      step(N'($urandom) & N'($urandom), ($urandom % 3) != 0);
    // fairness sweep
    for (int i = 0; i < 2*N; i++) begin
      int unsigned ptr_before;
      ptr_before = ptr_m;
      step('1, 1'b1);
      checks++;
      if (ptr_m != (ptr_before + 1) % N) begin failures++; $display("not fair"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
