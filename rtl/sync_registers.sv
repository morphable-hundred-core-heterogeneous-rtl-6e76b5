// sync_registers: the small set of atomically accessed synchronisation words.
//
// N_WORDS 32-bit registers, reset to zero, behind the same request/response
// port as sp_ram (accepted at once, answered one cycle later). A read returns
// the word. A write is an atomic swap: the word takes wdata and the response
// returns the value it held before, so a core can build a lock (swap in 1,
// owner if 0 came back) or pass tokens without a second access. Because the
// swap happens in one cycle at the end of an arbitrated bus, no other access
// can fall between its read and its write. The document only says these
// positions are managed by an atomic access scheme; the swap operation and
// the count of 16 words are this design's.
module sync_registers
  import morph_pkg::*;
#(
  parameter int unsigned N_WORDS = 16
) (
  input  logic     clk,
  input  logic     rst_n,
  input  mem_req_t req,
  output logic     gnt,
  output mem_rsp_t rsp
);
  localparam int unsigned AW = $clog2(N_WORDS);
  logic [DATA_W-1:0] words [N_WORDS];
  logic [DATA_W-1:0] rdata_q;
  logic              rvalid_q;
  logic [AW-1:0]     a;

  assign a = req.addr[AW-1:0];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int unsigned i = 0; i < N_WORDS; i++) words[i] <= '0;
      rdata_q  <= '0;
      rvalid_q <= 1'b0;
    end else begin
      rvalid_q <= req.req;
      if (req.req) begin
        rdata_q <= words[a];
        if (req.we) words[a] <= req.wdata;
      end
    end
  end

  assign gnt        = 1'b1;
  assign rsp.rvalid = rvalid_q;
  assign rsp.rdata  = rdata_q;
endmodule
