// axdimm_fpga_top: the FPGA fabric design of an AXDIMM used as a near-memory
// Adam optimizer.
//
// The module holds N_CH (2) independent DRAM channels. Each channel has its
// own channel_arbiter and its own adam_kernel; they are controlled separately,
// so the host can keep using one channel in normal mode while the kernel of
// the other channel runs. Each arbiter's DRAM-side AXI4 port is brought out to
// the memory controller of that channel (the memory controller IP and the
// DRAM devices are outside this design).
//
// Host side: the DDR4 PHY (also outside) deserialises the 400 MHz host
// interface into one 512-bit request per 200 MHz cycle. The PHY maps the
// ranks the host sees onto the channels; here host_rank selects the channel
// directly (rank r -> channel r). Reads return exactly RD_LAT cycles after the
// request; since every channel uses the same latency and there is at most one
// request per cycle, the channels' read returns never collide and are merged
// with an OR.
//
// Everything runs on one 200 MHz clock with an active-low asynchronous reset.
module axdimm_fpga_top
  import axdimm_pkg::*;
#(
  parameter int unsigned N_CH        = 2,
  parameter int unsigned RD_LAT      = 32,
  parameter int unsigned FU_LATENCY  = 128,
  parameter int unsigned BLOCK_BEATS = 256,
  localparam int unsigned RANK_W     = (N_CH > 1) ? $clog2(N_CH) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // host requests, after the PHY
  input  logic              host_valid,
  input  logic              host_we,
  input  logic [RANK_W-1:0] host_rank,
  input  addr_t             host_addr,
  input  data_t             host_wdata,
  output logic              host_rvalid,
  output data_t             host_rdata,
  // one AXI4 port per channel towards its memory controller
  output axi_req_t          dram_req [N_CH],
  input  axi_rsp_t          dram_rsp [N_CH],
  // per-channel status
  output arb_mode_e         ch_mode  [N_CH],
  output logic              k_busy   [N_CH],
  output logic              k_done   [N_CH]
);

  logic  ch_rvalid [N_CH];
  data_t ch_rdata  [N_CH];
  int unsigned n_returns;

  for (genvar c = 0; c < N_CH; c++) begin : g_ch
    logic                 csr_valid, csr_we;
    logic [REG_IDX_W-1:0] csr_idx;
    csr_t                 csr_wdata, csr_rdata;
    axi_req_t             k_req;
    axi_rsp_t             k_rsp;

    channel_arbiter #(.RD_LAT(RD_LAT)) u_arb (
      .clk, .rst_n,
      .host_valid (host_valid && (host_rank == RANK_W'(c))),
      .host_we, .host_addr, .host_wdata,
      .host_rvalid(ch_rvalid[c]), .host_rdata(ch_rdata[c]),
      .k_csr_valid(csr_valid), .k_csr_we(csr_we), .k_csr_idx(csr_idx),
      .k_csr_wdata(csr_wdata), .k_csr_rdata(csr_rdata),
      .k_req, .k_rsp,
      .m_req(dram_req[c]), .m_rsp(dram_rsp[c]),
      .mode(ch_mode[c])
    );

    adam_kernel #(.FU_LATENCY(FU_LATENCY), .BLOCK_BEATS(BLOCK_BEATS)) u_kernel (
      .clk, .rst_n,
      .csr_valid, .csr_we, .csr_idx, .csr_wdata, .csr_rdata,
      .m_req(k_req), .m_rsp(k_rsp),
      .busy(k_busy[c]), .done(k_done[c])
    );
  end

  always_comb begin
    host_rvalid = 1'b0;
    host_rdata  = '0;
    n_returns   = 0;
    for (int c = 0; c < int'(N_CH); c++) begin
      n_returns   = n_returns + 32'(ch_rvalid[c]);
      host_rvalid = host_rvalid | ch_rvalid[c];
      host_rdata  = host_rdata | ch_rdata[c];
    end
  end

  a_one_return: assert property (@(posedge clk) disable iff (!rst_n) n_returns <= 1);

endmodule
