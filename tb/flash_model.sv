// flash_model: behavioural model of the linear flash that stores the partial
// bitstreams (testbench only, not synthesizable intent).
//
// Word-addressed, 16-bit. A read request (req, addr) is accepted when gnt is
// high (gnt is high except when STALL_EVERY > 0 and the cycle count hits a
// multiple of it) and its data comes back LAT cycles later with rvalid, in
// order. Contents: configuration slot c starts at word c << SLOT_SHIFT; its
// first two words hold the slot's bitstream size in bytes (SIZE_BYTES[c],
// high half first); every other word is data_word(addr).
module flash_model #(
  parameter int unsigned AW          = 26,
  parameter int unsigned SLOT_SHIFT  = 21,
  parameter int unsigned LAT         = 3,
  parameter int unsigned STALL_EVERY = 0,
  parameter int unsigned SIZE0 = 16,
  parameter int unsigned SIZE1 = 64,
  parameter int unsigned SIZE2 = 64,
  parameter int unsigned SIZE3 = 64
) (
  input  logic          clk,
  input  logic          req,
  input  logic [AW-1:0] addr,
  output logic          gnt,
  output logic          rvalid,
  output logic [15:0]   rdata
);
  function automatic logic [15:0] data_word(logic [AW-1:0] a);
    return a[15:0] ^ 16'h5A3C ^ {a[7:0], a[15:8]};
  endfunction

  function automatic logic [15:0] contents(logic [AW-1:0] a);
    int unsigned slot, sz;
    logic [AW-1:0] off;
    slot = 32'(a >> SLOT_SHIFT);
    off  = a & ((AW'(1) << SLOT_SHIFT) - 1'b1);
    case (slot)
      0: sz = SIZE0;
      1: sz = SIZE1;
      2: sz = SIZE2;
      default: sz = SIZE3;
    endcase
    if (off == 0) return sz[31:16];
    if (off == 1) return sz[15:0];
    return data_word(a);
  endfunction

  logic [LAT-1:0]       vpipe = '0;
  logic [15:0]          dpipe [LAT];
  int unsigned          cyc = 0;

  assign gnt    = (STALL_EVERY == 0) || (cyc % STALL_EVERY != 0);
  assign rvalid = vpipe[LAT-1];
  assign rdata  = dpipe[LAT-1];

  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    vpipe[0] <= req && gnt;
    dpipe[0] <= contents(addr);
    for (int i = 1; i < LAT; i++) begin
      vpipe[i] <= vpipe[i-1];
      dpipe[i] <= dpipe[i-1];
    end
  end
endmodule
