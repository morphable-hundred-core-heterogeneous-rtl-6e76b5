// sp_ram: single-port synchronous RAM with a request/response port.
//
// Used for the per-core scratch-pad ("core local memory"), the cluster memory
// and the on-chip shared memory. A request is accepted in the cycle it is
// raised (gnt is always high); one cycle later rsp.rvalid is high and
// rsp.rdata holds the word read (read-before-write for a write, which is the
// write acknowledge). The word address is taken modulo DEPTH (DEPTH a power of
// two). The memory is a plain array so synthesis maps it to block RAM. The
// port protocol and sizes are this design's; the document only names the
// memories.
module sp_ram
  import morph_pkg::*;
#(
  parameter int unsigned DEPTH = 4096
) (
  input  logic     clk,
  input  logic     rst_n,
  input  mem_req_t req,
  output logic     gnt,
  output mem_rsp_t rsp
);
  localparam int unsigned AW = $clog2(DEPTH);
  logic [DATA_W-1:0] mem [DEPTH];
  logic [DATA_W-1:0] rdata_q;
  logic              rvalid_q;
  logic [AW-1:0]     a;

  assign a = req.addr[AW-1:0];

  always_ff @(posedge clk) begin
    if (req.req) begin
      rdata_q <= mem[a];
      if (req.we) mem[a] <= req.wdata;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) rvalid_q <= 1'b0;
    else        rvalid_q <= req.req;
  end

  assign gnt        = 1'b1;
  assign rsp.rvalid = rvalid_q;
  assign rsp.rdata  = rdata_q;
endmodule
