// channel_arbiter: shares one AXDIMM DRAM channel between the host and the
// Adam kernel with two exclusive modes instead of first-come-first-served
// arbitration.
//
//   NORMAL       the host owns the channel. Each host line access (64 bytes,
//                one 512-bit beat) becomes a single-beat AXI4 read or write
//                towards DRAM. The kernel's AXI port gets no handshakes, so any
//                kernel request simply waits (is blocked).
//   ACCELERATION the kernel owns the channel: its AXI port is connected straight
//                to DRAM, and every host access is turned into an access to
//                the kernel's registers (register index = host address bits
//                [11:6], value in the low 64 bits of the line).
// Host accesses to the last 4 KB of the channel (all address bits above bit 11
// set) always reach the arbiter's own registers, in either mode:
//   MODE   (index 0) write bit 0 = requested mode; read {pending, current mode}
//   STATUS (index 1) read {request-queue overflows[63:32], late reads[31:0]}
// A mode change waits until the side that owns the channel has drained:
// leaving NORMAL waits for every queued or outstanding host transaction;
// leaving ACCELERATION waits until the kernel has no transaction outstanding
// and offers no request (so DRAM never sees a request withdrawn). A kernel
// request blocked in NORMAL mode simply reaches DRAM once the switch is made.
// Reading MODE shows when the change has taken effect.
//
// The host cannot be stalled and expects read data a fixed time after its
// request, so every host read returns exactly RD_LAT cycles after it was
// presented, whatever it targeted. Register reads are captured at once and
// carried down a RD_LAT-stage delay line; DRAM reads travel through a request
// queue and an AXI read, and their data waits in a return queue until its slot
// comes up. DRAM data that has not arrived by then is a late read: the host
// gets zeros, the STATUS counter records it, and the data is discarded when it
// finally arrives so that later reads stay aligned. A host access that finds the
// request queue full is dropped and counted.
//
// Given by the description: the two modes, blocking of the other party, the
// always-reachable register window, conversion of host accesses to AXI4 with a
// fixed read latency, one arbiter per channel. This design's own choices: the
// window location and register map, the drain-before-switch rule, RD_LAT,
// the queue depths and the late-read and overflow accounting.
module channel_arbiter
  import axdimm_pkg::*;
#(
  parameter int unsigned RD_LAT    = 32,   // host read latency, fabric cycles
  parameter int unsigned REQ_DEPTH = 16,
  parameter int unsigned RDQ_DEPTH = 32
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // host side (after the DDR4 PHY), one line per request, never stalled
  input  logic                 host_valid,
  input  logic                 host_we,
  input  addr_t                host_addr,
  input  data_t                host_wdata,
  output logic                 host_rvalid,
  output data_t                host_rdata,
  // kernel register port
  output logic                 k_csr_valid,
  output logic                 k_csr_we,
  output logic [REG_IDX_W-1:0] k_csr_idx,
  output csr_t                 k_csr_wdata,
  input  csr_t                 k_csr_rdata,
  // kernel AXI4 manager, seen from here
  input  axi_req_t             k_req,
  output axi_rsp_t             k_rsp,
  // DRAM (memory controller) AXI4 subordinate
  output axi_req_t             m_req,
  input  axi_rsp_t             m_rsp,
  output arb_mode_e            mode
);

  localparam int unsigned QW = 1 + ADDR_W + DATA_W;

  // ------------------------------------------------------------ host decode
  logic                 in_win, to_kernel, to_dram;
  logic [REG_IDX_W-1:0] idx;
  arb_mode_e            mode_req;
  logic [31:0]          late_cnt, ovf_cnt;
  csr_t                 arb_rdata;

  assign in_win    = &host_addr[ADDR_W-1:ARB_WIN_LSB];
  assign idx       = host_addr[REG_IDX_LSB +: REG_IDX_W];
  assign to_kernel = host_valid && !in_win && (mode == MODE_ACCEL);
  assign to_dram   = host_valid && !in_win && (mode == MODE_NORMAL);

  assign k_csr_valid = to_kernel;
  assign k_csr_we    = host_we;
  assign k_csr_idx   = idx;
  assign k_csr_wdata = host_wdata[CSR_W-1:0];

  always_comb begin
    unique case (idx)
      ARB_MODE:   arb_rdata = {62'd0, mode_req != mode, mode == MODE_ACCEL};
      ARB_STATUS: arb_rdata = {ovf_cnt, late_cnt};
      default:    arb_rdata = '0;
    endcase
  end

  // ------------------------------------------------- fixed-latency read pipe
  logic       rp_vld [RD_LAT];
  logic       rp_imm [RD_LAT];
  csr_t       rp_dat [RD_LAT];
  logic       rdq_pop, rdq_empty, rdq_full;
  data_t      rdq_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(RD_LAT); i++) rp_vld[i] <= 1'b0;
    end else begin
      rp_vld[0] <= host_valid && !host_we;
      for (int i = 1; i < int'(RD_LAT); i++) rp_vld[i] <= rp_vld[i-1];
    end
  end

  always_ff @(posedge clk) begin
    rp_imm[0] <= !to_dram;
    rp_dat[0] <= in_win ? arb_rdata : k_csr_rdata;
    for (int i = 1; i < int'(RD_LAT); i++) begin
      rp_imm[i] <= rp_imm[i-1];
      rp_dat[i] <= rp_dat[i-1];
    end
  end

  wire rp_out_vld = rp_vld[RD_LAT-1];
  wire rp_out_imm = rp_imm[RD_LAT-1];
  wire late       = rp_out_vld && !rp_out_imm && rdq_empty;

  assign rdq_pop     = rp_out_vld && !rp_out_imm && !rdq_empty;
  assign host_rvalid = rp_out_vld;
  assign host_rdata  = !rp_out_vld ? '0 :
                       rp_out_imm  ? DATA_W'(rp_dat[RD_LAT-1]) :
                       late        ? '0 : rdq_data;

  // ------------------------------------------- host requests towards DRAM
  logic          rq_push, rq_pop, rq_empty, rq_full;
  logic [QW-1:0] rq_head;
  logic          h_we;
  addr_t         h_addr;
  data_t         h_wdata;
  logic          aw_done, w_done;
  axi_req_t      h_req;
  axi_rsp_t      h_rsp;
  logic [7:0]    h_rd_out, h_wr_out;

  assign rq_push = to_dram && !rq_full;
  assign {h_we, h_addr, h_wdata} = rq_head;

  sync_fifo #(.WIDTH(QW), .DEPTH(REQ_DEPTH)) u_req_q (
    .clk, .rst_n,
    .push(rq_push), .wr_data({host_we, host_addr, host_wdata}),
    .pop(rq_pop), .rd_data(rq_head),
    .empty(rq_empty), .full(rq_full), .count()
  );

  // Data of a read that was already answered late is dropped on arrival.
  logic [7:0] skip_cnt;
  wire        r_drop = h_rsp.r_valid && h_req.r_ready && (skip_cnt != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) skip_cnt <= '0;
    else        skip_cnt <= skip_cnt + 8'(late) - 8'(r_drop);
  end

  sync_fifo #(.WIDTH(DATA_W), .DEPTH(RDQ_DEPTH)) u_rd_q (
    .clk, .rst_n,
    .push(h_rsp.r_valid && h_req.r_ready && !r_drop), .wr_data(h_rsp.r.data),
    .pop(rdq_pop), .rd_data(rdq_data),
    .empty(rdq_empty), .full(rdq_full), .count()
  );

  always_comb begin
    h_req          = '0;
    h_req.ar_valid = !rq_empty && !h_we;
    h_req.ar.addr  = h_addr;
    h_req.ar.size  = AXI_SIZE_64B;
    h_req.ar.burst = AXI_BURST_INCR;
    h_req.aw_valid = !rq_empty && h_we && !aw_done;
    h_req.aw.addr  = h_addr;
    h_req.aw.size  = AXI_SIZE_64B;
    h_req.aw.burst = AXI_BURST_INCR;
    h_req.w_valid  = !rq_empty && h_we && !w_done;
    h_req.w.data   = h_wdata;
    h_req.w.strb   = '1;
    h_req.w.last   = 1'b1;
    h_req.b_ready  = 1'b1;
    h_req.r_ready  = !rdq_full;
  end

  wire h_ar_fire = h_req.ar_valid && h_rsp.ar_ready;
  wire h_aw_fire = h_req.aw_valid && h_rsp.aw_ready;
  wire h_w_fire  = h_req.w_valid && h_rsp.w_ready;
  wire h_r_fire  = h_rsp.r_valid && h_req.r_ready;
  wire h_b_fire  = h_rsp.b_valid && h_req.b_ready;

  assign rq_pop = h_ar_fire ||
                  (h_we && !rq_empty && (aw_done || h_aw_fire) && (w_done || h_w_fire));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      aw_done  <= 1'b0;
      w_done   <= 1'b0;
      h_rd_out <= '0;
      h_wr_out <= '0;
    end else begin
      if (rq_pop) begin
        aw_done <= 1'b0;
        w_done  <= 1'b0;
      end else begin
        if (h_aw_fire) aw_done <= 1'b1;
        if (h_w_fire)  w_done  <= 1'b1;
      end
      h_rd_out <= h_rd_out + 8'(h_ar_fire) - 8'(h_r_fire);
      h_wr_out <= h_wr_out + 8'(h_aw_fire) - 8'(h_b_fire);
    end
  end

  // ------------------------------------------------------------- channel mux
  logic [15:0] k_rd_out, k_wr_out;

  always_comb begin
    if (mode == MODE_ACCEL) begin
      m_req = k_req;
      k_rsp = m_rsp;
      h_rsp = '0;
    end else begin
      m_req = h_req;
      k_rsp = '0;          // kernel requests are blocked
      h_rsp = m_rsp;
    end
  end

  wire k_ar_fire = k_req.ar_valid && k_rsp.ar_ready;
  wire k_r_last  = k_rsp.r_valid && k_req.r_ready && k_rsp.r.last;
  wire k_aw_fire = k_req.aw_valid && k_rsp.aw_ready;
  wire k_b_fire  = k_rsp.b_valid && k_req.b_ready;

  wire host_idle   = rq_empty && (h_rd_out == '0) && (h_wr_out == '0) && !to_dram;
  wire kernel_idle = (k_rd_out == '0) && (k_wr_out == '0) &&
                     !k_req.ar_valid && !k_req.aw_valid && !k_req.w_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode     <= MODE_NORMAL;
      mode_req <= MODE_NORMAL;
      k_rd_out <= '0;
      k_wr_out <= '0;
      late_cnt <= '0;
      ovf_cnt  <= '0;
    end else begin
      if (host_valid && host_we && in_win && idx == ARB_MODE)
        mode_req <= arb_mode_e'(host_wdata[0]);
      if (mode != mode_req && ((mode == MODE_NORMAL) ? host_idle : kernel_idle))
        mode <= mode_req;
      k_rd_out <= k_rd_out + 16'(k_ar_fire) - 16'(k_r_last);
      k_wr_out <= k_wr_out + 16'(k_aw_fire) - 16'(k_b_fire);
      if (late) late_cnt <= late_cnt + 1'b1;
      if (to_dram && rq_full) ovf_cnt <= ovf_cnt + 1'b1;
    end
  end

  initial assert (RD_LAT >= 2) else $fatal(1, "channel_arbiter: RD_LAT too small");

  // Host-side AXI rule: an offered address stays put until accepted.
  a_h_ar_stable: assert property (@(posedge clk) disable iff (!rst_n)
    (mode == MODE_NORMAL) && h_req.ar_valid && !h_rsp.ar_ready |=>
      (mode != MODE_NORMAL) || (h_req.ar_valid && $stable(h_req.ar)));

endmodule
