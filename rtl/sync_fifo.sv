// sync_fifo: single-clock first-word-fall-through FIFO.
//
// Holds up to DEPTH words of W bits (default 1024 x 32 bit = 4 kB, the size of
// the FIFO in the reconfiguration engine). rd_data shows the oldest word while
// empty is low; rd_en pops it. wr_en pushes wr_data when not full (a push when
// full is ignored, as is a pop when empty). Push and pop may happen in the
// same cycle. The organisation (depth x width, fall-through read) is this
// design's; the document gives only the 4 kB size.
module sync_fifo #(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned W     = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         wr_en,
  input  logic [W-1:0] wr_data,
  output logic         full,
  input  logic         rd_en,
  output logic [W-1:0] rd_data,
  output logic         empty,
  output logic [$clog2(DEPTH):0] count
);
  localparam int unsigned AW = $clog2(DEPTH);
  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wptr, rptr;
  logic          do_wr, do_rd;

  assign full  = (count == (AW+1)'(DEPTH));
  assign empty = (count == '0);
  assign do_wr = wr_en && !full;
  assign do_rd = rd_en && !empty;
  assign rd_data = mem[rptr];

  always_ff @(posedge clk)
    if (do_wr) mem[wptr] <= wr_data;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (do_wr) wptr <= wptr + 1'b1;
      if (do_rd) rptr <= rptr + 1'b1;
      count <= count + (AW+1)'(do_wr) - (AW+1)'(do_rd);
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) count <= (AW+1)'(DEPTH));
endmodule
