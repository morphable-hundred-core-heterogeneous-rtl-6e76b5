// reconf_engine: reconfiguration engine of the static region.
//
// The host (the hypervisor, over PCIe) writes a command into a small control
// memory; the engine then loads the partial bitstream of the requested
// configuration from the linear flash into the configuration port (ICAP) and
// reports completion through the same memory, so the host never has to wait.
//
// Control memory (ctl_addr selects a 32-bit word; reads are combinational):
//   0  COMMAND  write: bit 31 go, bits 7:4 cluster, bits 1:0 configuration
//               (0 blank, 1 Type A, 2 Type B, 3 Type C); read: last command
//   1  STATUS   bit 0 busy, bit 1 done, bit 2 rejected; write 1 to bits 1/2
//               to clear them
//   2  CONFIG   configuration of cluster i in bits 2i+1:2i
//   3  SIZE     byte size of the last bitstream loaded
// A command arriving while busy, or naming a cluster >= N_CLUSTERS, is refused
// (rejected set): one reconfiguration at a time, no command queue.
//
// Transfer (the "DMA" way of the document, done here by a hardware FSM in
// place of the microcontroller):
//   HDR   read two 16-bit words at flash word address cfg << SLOT_SHIFT: the
//         bitstream size in bytes, high half first;
//   XFER  read size/2 further 16-bit words as a pipelined burst (one request
//         per cycle while the flash grants and the 4 kB FIFO has room); pairs
//         are packed, first word in bits 31:16, and pushed into the FIFO;
//   DRAIN wait until the FIFO is empty; the FIFO feeds the ICAP one 32-bit
//         word per cycle (icap_csib low, icap_rdwrb low = write);
//   DONE  record the cluster's new configuration, set done, clear busy.
// While busy, cluster_busy marks the region being rewritten so it is isolated.
// Flash protocol: flash_req/flash_addr held until flash_gnt; data returns in
// request order, any number of cycles later, with flash_rvalid.
// The command/done flags in a shared memory, header-then-data flash layout,
// 16-to-32-bit packing, the FIFO and the single outstanding command follow the
// document; the register map, the header format, the flash slot addresses,
// the configuration codes and the replacement of the microcontroller by an
// FSM are this design's. Initial configuration after reset: INIT_CFG.
module reconf_engine
  import morph_pkg::*;
#(
  parameter int unsigned N_CLUSTERS = 7,
  parameter int unsigned FLASH_AW   = 26,
  parameter int unsigned SLOT_SHIFT = 21,
  parameter int unsigned FIFO_DEPTH = 1024,
  parameter logic [2*N_CLUSTERS-1:0] INIT_CFG = {2'd3, 2'd3, 2'd2, 2'd2, 2'd1, 2'd1, 2'd1}
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // control memory, host side
  input  logic [1:0]                  ctl_addr,
  input  logic                        ctl_we,
  input  logic [31:0]                 ctl_wdata,
  output logic [31:0]                 ctl_rdata,
  // linear flash read port
  output logic                        flash_req,
  output logic [FLASH_AW-1:0]         flash_addr,
  input  logic                        flash_gnt,
  input  logic                        flash_rvalid,
  input  logic [15:0]                 flash_rdata,
  // configuration port
  output logic                        icap_csib,
  output logic                        icap_rdwrb,
  output logic [31:0]                 icap_i,
  // region state
  output cluster_cfg_e [N_CLUSTERS-1:0] cluster_cfg,
  output logic [N_CLUSTERS-1:0]       cluster_busy
);
  typedef enum logic [2:0] {S_IDLE, S_HDR, S_XFER, S_DRAIN, S_DONE} state_e;
  localparam int unsigned FCW = $clog2(FIFO_DEPTH) + 1;

  state_e              state;
  logic [31:0]         cmd_q, size_q;
  logic [ID_W-1:0]     cl_q;
  cluster_cfg_e        cfg_q;
  logic                done_q, rej_q;
  logic [FLASH_AW-1:0] addr_q;
  logic [31:0]         req_left, rcv_left;   // 16-bit words still to request / receive
  logic [FCW-1:0]      in_flight;            // requested, not yet received
  logic [15:0]         hi_q;
  logic                half_q;

  // FIFO
  logic           f_wr, f_full, f_empty, f_rd;
  logic [31:0]    f_wdata, f_rdata;
  logic [FCW-1:0] f_count;

  sync_fifo #(.DEPTH(FIFO_DEPTH), .W(32)) u_fifo (
    .clk, .rst_n, .wr_en(f_wr), .wr_data(f_wdata), .full(f_full),
    .rd_en(f_rd), .rd_data(f_rdata), .empty(f_empty), .count(f_count)
  );

  // command decode
  logic go, go_ok, cmd_write, stat_write;
  logic [ID_W-1:0] go_cl;
  assign cmd_write  = ctl_we && ctl_addr == 2'd0;
  assign stat_write = ctl_we && ctl_addr == 2'd1;
  assign go    = cmd_write && ctl_wdata[31];
  assign go_cl = ctl_wdata[7:4];
  assign go_ok = go && state == S_IDLE && int'(go_cl) < N_CLUSTERS;

  // room check: every outstanding 16-bit word may become half of a FIFO entry
  logic room;
  assign room = (32'(f_count) + 32'(in_flight) / 2 + 2) < FIFO_DEPTH;

  always_comb begin
    flash_req  = 1'b0;
    flash_addr = addr_q;
    if (state == S_HDR  && req_left != 0) flash_req = 1'b1;
    if (state == S_XFER && req_left != 0 && room) flash_req = 1'b1;
  end

  logic issued;
  assign issued = flash_req && flash_gnt;

  assign f_wr    = state == S_XFER && flash_rvalid && half_q;
  assign f_wdata = {hi_q, flash_rdata};
  assign f_rd    = !f_empty;
  assign icap_csib  = f_empty;
  assign icap_rdwrb = 1'b0;
  assign icap_i     = f_rdata;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      cmd_q     <= '0;
      size_q    <= '0;
      cl_q      <= '0;
      cfg_q     <= CFG_BLANK;
      done_q    <= 1'b0;
      rej_q     <= 1'b0;
      addr_q    <= '0;
      req_left  <= '0;
      rcv_left  <= '0;
      in_flight <= '0;
      hi_q      <= '0;
      half_q    <= 1'b0;
      for (int unsigned i = 0; i < N_CLUSTERS; i++)
        cluster_cfg[i] <= cluster_cfg_e'(INIT_CFG[2*i +: 2]);
    end else begin
      if (stat_write) begin
        if (ctl_wdata[1]) done_q <= 1'b0;
        if (ctl_wdata[2]) rej_q  <= 1'b0;
      end
      if (go && !go_ok) rej_q <= 1'b1;
      if (cmd_write) cmd_q <= ctl_wdata;

      in_flight <= in_flight + FCW'(issued) - FCW'(flash_rvalid);
      if (issued) begin
        addr_q   <= addr_q + 1'b1;
        req_left <= req_left - 1'b1;
      end

      unique case (state)
        S_IDLE: if (go_ok) begin
          cl_q     <= go_cl;
          cfg_q    <= cluster_cfg_e'(ctl_wdata[1:0]);
          addr_q   <= FLASH_AW'(ctl_wdata[1:0]) << SLOT_SHIFT;
          req_left <= 32'd2;
          rcv_left <= 32'd2;
          half_q   <= 1'b0;
          state    <= S_HDR;
        end
        S_HDR: if (flash_rvalid) begin
          if (rcv_left == 32'd2) begin
            size_q[31:16] <= flash_rdata;
            rcv_left      <= 32'd1;
          end else begin
            size_q[15:0]  <= flash_rdata;
            // whole 32-bit words only
            rcv_left      <= {1'b0, size_q[31:16], flash_rdata[15:2], 1'b0};
            req_left      <= {1'b0, size_q[31:16], flash_rdata[15:2], 1'b0};
            state         <= ({size_q[31:16], flash_rdata[15:2]} == '0) ? S_DONE : S_XFER;
          end
        end
        S_XFER: begin
          if (flash_rvalid) begin
            half_q   <= !half_q;
            if (!half_q) hi_q <= flash_rdata;
            rcv_left <= rcv_left - 1'b1;
            if (rcv_left == 32'd1) state <= S_DRAIN;
          end
        end
        S_DRAIN: if (f_empty) state <= S_DONE;
        S_DONE: begin
          cluster_cfg[cl_q] <= cfg_q;
          done_q <= 1'b1;
          state  <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  logic busy;
  assign busy = state != S_IDLE;

  always_comb
    for (int unsigned i = 0; i < N_CLUSTERS; i++)
      cluster_busy[i] = busy && (cl_q == ID_W'(i));

  always_comb begin
    ctl_rdata = '0;
    unique case (ctl_addr)
      2'd0: ctl_rdata = cmd_q;
      2'd1: ctl_rdata = {29'd0, rej_q, done_q, busy};
      2'd2: for (int unsigned i = 0; i < N_CLUSTERS; i++) ctl_rdata[2*i +: 2] = cluster_cfg[i];
      default: ctl_rdata = size_q;
    endcase
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(f_wr && f_full));
endmodule
