// pe_model: behavioural processing element for testbenches.
//
// Stands in for the MB-LITE soft core of Type A, B or C. When released from
// reset it pulses cfg_read, then runs the kernel named by cfg_word[23:20]
// (1 integer add, 2 integer inner product, 3 FP add, 4 FP inner product) over
// cfg_word[11:0] elements. Per element it spends a fixed number of cycles that
// depends on its type (software emulation is slow), pulses the matching event
// (MUL or SW_MUL for kernel 2 on Type B/C or A; FP or SW_FP for kernels 3/4
// on Type C or A/B) and stores the element result in its scratch-pad. It then
// reads back the last stored word, writes and reads back a token in the
// cluster memory, and swaps its token into synchronisation word 0 of the
// shared memory. ret_msg = {error flag, old value of the sync word [22:0]}.
// Its token is 1 + 16*cluster + core + 256*cfg_word[19:12].
module pe_model
  import morph_pkg::*;
#(
  parameter int unsigned CLUSTER = 0,
  parameter int unsigned CORE    = 0
) (
  input  logic        clk,
  input  core_to_pe_t to_pe,
  output pe_to_core_t from_pe,
  output mem_req_t    lmem_req,
  input  logic        lmem_gnt,
  input  mem_rsp_t    lmem_rsp,
  output mem_req_t    bus_req,
  input  logic        bus_gnt,
  input  mem_rsp_t    bus_rsp
);
  // cycles per element for a kernel on a PE type
  function automatic int unsigned cpe(cluster_cfg_e t, int unsigned k);
    case (k)
      1: return 1;
      2: return (t == CFG_TYPE_A) ? 6 : 2;
      default: return (t == CFG_TYPE_C) ? 3 : 12;
    endcase
  endfunction
  // event index pulsed per element (-1 none)
  function automatic int ev_of(cluster_cfg_e t, int unsigned k);
    case (k)
      1: return -1;
      2: return (t == CFG_TYPE_A) ? EV_SW_MUL : EV_MUL;
      default: return (t == CFG_TYPE_C) ? EV_FP : EV_SW_FP;
    endcase
  endfunction

  // All driving happens at the falling edge (or 1 time unit after it) and
  // sampling 2 time units after it, away from the rising edge the design uses.
  task automatic bus_access(input logic we, input logic [31:0] a,
                            input logic [31:0] d, output logic [31:0] q);
    logic g;
    bus_req = '{req: 1'b1, we: we, addr: a, wdata: d};
    forever begin
      #2 g = bus_gnt;
      @(negedge clk);
      if (g) break;
    end
    bus_req = '0;
    forever begin
      #2;
      if (bus_rsp.rvalid) break;
      @(negedge clk);
    end
    q = bus_rsp.rdata;
    @(negedge clk);
  endtask

  initial begin
    from_pe  = '0;
    lmem_req = '0;
    bus_req  = '0;
    forever begin
      int unsigned k, n, c, tok;
      logic err;
      logic [31:0] old, q;
      @(negedge clk);
      if (to_pe.pe_rst) continue;
      k   = 32'(to_pe.cfg_word[23:20]);
      n   = 32'(to_pe.cfg_word[11:0]);
      tok = 1 + 16*CLUSTER + CORE + 256*32'(to_pe.cfg_word[19:12]);
      err = 1'b0;
      from_pe.cfg_read = 1'b1;
      @(negedge clk);
      from_pe.cfg_read = 1'b0;
      for (int unsigned e = 0; e < n; e++) begin
        c = cpe(to_pe.pe_type, k);
        if (ev_of(to_pe.pe_type, k) >= 0) from_pe.ev[ev_of(to_pe.pe_type, k)] = 1'b1;
        lmem_req = '{req: 1'b1, we: 1'b1, addr: 32'(e), wdata: tok + e};
        @(negedge clk);
        from_pe.ev = '0;
        lmem_req   = '0;
        repeat (c - 1) @(negedge clk);
      end
      if (n > 0) begin
        lmem_req = '{req: 1'b1, we: 1'b0, addr: 32'(n-1), wdata: 0};
        @(negedge clk);
        lmem_req = '0;
        #1 if (lmem_rsp.rdata != 32'(tok + n - 1)) err = 1'b1;
      end
      bus_access(1'b1, 32'(CORE), 32'(tok), q);
      bus_access(1'b0, 32'(CORE), 32'd0, q);
      if (q != 32'(tok)) err = 1'b1;
      bus_access(1'b1, 32'hC000_0000, 32'(tok), old);
      @(negedge clk);
      from_pe.done    = 1'b1;
      from_pe.ret_msg = {err, old[22:0]};
      @(negedge clk);
      from_pe.done = 1'b0;
      while (!to_pe.pe_rst) @(negedge clk);
    end
  end
endmodule
