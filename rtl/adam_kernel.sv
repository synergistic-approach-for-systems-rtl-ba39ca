// adam_kernel: the Adam optimizer engine of one AXDIMM DRAM channel.
//
// The host programs the kernel registers (tensor addresses, element count,
// the Adam hyper-parameters and the step t), then writes CTRL.start and polls
// STATUS until done. A run works through the tensors in blocks of
// BLOCK_BEATS 64-byte beats (16 KB by default):
//   * Bias correction: on start a small sequencer computes 1-beta1, 1-beta2
//     and, by square-and-multiply over the bits of t, 1-beta1^t and 1-beta2^t.
//     These constants are held for the whole run.
//   * Loader: requests the blocks of theta, grad, m and v from DRAM in
//     round-robin order (theta, grad, m, v of block 0, then of block 1, ...),
//     each into its own input FIFO. A block is requested only once its FIFO
//     has room reserved for the whole block. Each FIFO holds two blocks, so the
//     next block is fetched while the current one is computed (double
//     buffering). Bursts are split so that none crosses a 4 KB boundary
//     (at most 64 beats), as AXI4 requires.
//   * Compute: whenever all four input FIFOs hold a beat and all three output
//     FIFOs have a free slot not yet claimed by data in flight, one beat of
//     each input is popped and fed to LANES (16) Adam functional units, one
//     per 32-bit lane. Results leave the units FU_LATENCY cycles later and are
//     pushed into the theta, m and v output FIFOs.
//   * Writer: once an output FIFO holds a whole block, the block is written
//     back (theta, m, v of block 0, then block 1, ...). The byte strobes of the
//     final beat cover only the lanes that hold real elements.
//   * The run ends when every write has been acknowledged.
// Beat addresses must be 64-byte aligned.
//
// Interface: a register port (valid/we/index/data, read data combinational
// from the index) reached through the channel arbiter, and an AXI4 manager
// port (512-bit data) towards DRAM. Read IDs carry the tensor number so read
// data is steered by RID. busy and done mirror the STATUS register.
//
// From the description: 16 FP32 units of 128-cycle latency, four input and
// three output queues in on-chip memory, round-robin block loading, 16 KB
// blocks and double buffering, registers for addresses, constants and count.
// This design's own choices: the register map, computing the bias corrections
// from t inside the kernel, two-block queue depth, burst splitting and the
// write-back order.
module adam_kernel
  import axdimm_pkg::*;
  import fp32_pkg::*;
#(
  parameter int unsigned FU_LATENCY  = 128,
  parameter int unsigned BLOCK_BEATS = 256,               // 16 KB blocks
  parameter int unsigned FIFO_DEPTH  = 2 * BLOCK_BEATS,   // double buffering
  parameter int unsigned MAX_BURST   = 64                 // 4 KB / 64 B
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // register port
  input  logic                 csr_valid,
  input  logic                 csr_we,
  input  logic [REG_IDX_W-1:0] csr_idx,
  input  csr_t                 csr_wdata,
  output csr_t                 csr_rdata,
  // DRAM side
  output axi_req_t             m_req,
  input  axi_rsp_t             m_rsp,
  // status
  output logic                 busy,
  output logic                 done
);

  localparam int unsigned CW = $clog2(FIFO_DEPTH) + 1;   // FIFO count width
  localparam int unsigned BLK_SH = $clog2(BLOCK_BEATS);

  initial assert (FIFO_DEPTH >= BLOCK_BEATS && MAX_BURST <= 256 && MAX_BURST <= 64)
    else $fatal(1, "adam_kernel: bad sizes");

  // ---------------------------------------------------------------- registers
  addr_t       base_in  [4];   // theta, grad, m, v
  addr_t       base_out [3];   // theta, m, v
  logic [31:0] nparams, step_t, cycles;
  logic [31:0] r_lr, r_beta1, r_beta2, r_lambda, r_eps;
  logic        start;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 4; i++) base_in[i] <= '0;
      for (int i = 0; i < 3; i++) base_out[i] <= '0;
      nparams  <= '0;
      step_t   <= 32'd1;
      r_lr     <= '0;
      r_beta1  <= '0;
      r_beta2  <= '0;
      r_lambda <= '0;
      r_eps    <= '0;
    end else if (csr_valid && csr_we && !busy) begin
      unique case (csr_idx)
        K_THETA_IN:  base_in[0]  <= csr_wdata[ADDR_W-1:0];
        K_GRAD_IN:   base_in[1]  <= csr_wdata[ADDR_W-1:0];
        K_M_IN:      base_in[2]  <= csr_wdata[ADDR_W-1:0];
        K_V_IN:      base_in[3]  <= csr_wdata[ADDR_W-1:0];
        K_THETA_OUT: base_out[0] <= csr_wdata[ADDR_W-1:0];
        K_M_OUT:     base_out[1] <= csr_wdata[ADDR_W-1:0];
        K_V_OUT:     base_out[2] <= csr_wdata[ADDR_W-1:0];
        K_NPARAMS:   nparams     <= csr_wdata[31:0];
        K_LR:        r_lr        <= csr_wdata[31:0];
        K_BETA1:     r_beta1     <= csr_wdata[31:0];
        K_BETA2:     r_beta2     <= csr_wdata[31:0];
        K_LAMBDA:    r_lambda    <= csr_wdata[31:0];
        K_EPS:       r_eps       <= csr_wdata[31:0];
        K_STEP:      step_t      <= csr_wdata[31:0];
        default: ;
      endcase
    end
  end

  assign start = csr_valid && csr_we && (csr_idx == K_CTRL) && csr_wdata[0] && !busy;

  always_comb begin
    csr_rdata = '0;
    unique case (csr_idx)
      K_STATUS:    csr_rdata = {62'd0, done, busy};
      K_THETA_IN:  csr_rdata = CSR_W'(base_in[0]);
      K_GRAD_IN:   csr_rdata = CSR_W'(base_in[1]);
      K_M_IN:      csr_rdata = CSR_W'(base_in[2]);
      K_V_IN:      csr_rdata = CSR_W'(base_in[3]);
      K_THETA_OUT: csr_rdata = CSR_W'(base_out[0]);
      K_M_OUT:     csr_rdata = CSR_W'(base_out[1]);
      K_V_OUT:     csr_rdata = CSR_W'(base_out[2]);
      K_NPARAMS:   csr_rdata = CSR_W'(nparams);
      K_LR:        csr_rdata = CSR_W'(r_lr);
      K_BETA1:     csr_rdata = CSR_W'(r_beta1);
      K_BETA2:     csr_rdata = CSR_W'(r_beta2);
      K_LAMBDA:    csr_rdata = CSR_W'(r_lambda);
      K_EPS:       csr_rdata = CSR_W'(r_eps);
      K_STEP:      csr_rdata = CSR_W'(step_t);
      K_CYCLES:    csr_rdata = CSR_W'(cycles);
      default:     csr_rdata = '0;
    endcase
  end

  // ---------------------------------------------------------- run sequencing
  typedef enum logic [1:0] {S_IDLE, S_PREP, S_PREP2, S_RUN} state_e;
  state_e      state;
  adam_const_t cst;
  logic [31:0] exp_rem, pw1, pw2, base1, base2;
  logic [31:0] nbeats, nblocks;
  logic        finished;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      busy    <= 1'b0;
      done    <= 1'b0;
      cycles  <= '0;
      cst     <= '0;
      exp_rem <= '0;
      pw1     <= '0;
      pw2     <= '0;
      base1   <= '0;
      base2   <= '0;
      nbeats  <= '0;
      nblocks <= '0;
    end else begin
      if (busy) cycles <= cycles + 1'b1;
      unique case (state)
        S_IDLE: if (start) begin
          busy        <= 1'b1;
          done        <= 1'b0;
          cycles      <= '0;
          cst.lr      <= r_lr;
          cst.beta1   <= r_beta1;
          cst.beta2   <= r_beta2;
          cst.lambda  <= r_lambda;
          cst.eps     <= r_eps;
          cst.omb1    <= fp_sub(FP_ONE, r_beta1);
          cst.omb2    <= fp_sub(FP_ONE, r_beta2);
          exp_rem     <= step_t;
          base1       <= r_beta1;
          base2       <= r_beta2;
          pw1         <= FP_ONE;
          pw2         <= FP_ONE;
          nbeats      <= (nparams + 32'(LANES - 1)) / 32'(LANES);
          nblocks     <= ((nparams + 32'(LANES - 1)) / 32'(LANES) + 32'(BLOCK_BEATS - 1)) >> BLK_SH;
          state       <= S_PREP;
        end
        // beta^t by square-and-multiply, one exponent bit per cycle
        S_PREP: begin
          if (exp_rem == '0) begin
            state <= S_PREP2;
          end else begin
            if (exp_rem[0]) begin
              pw1 <= fp_mul(pw1, base1);
              pw2 <= fp_mul(pw2, base2);
            end
            base1   <= fp_mul(base1, base1);
            base2   <= fp_mul(base2, base2);
            exp_rem <= exp_rem >> 1;
          end
        end
        S_PREP2: begin
          cst.bc1 <= fp_sub(FP_ONE, pw1);
          cst.bc2 <= fp_sub(FP_ONE, pw2);
          state   <= S_RUN;
        end
        S_RUN: if (finished) begin
          busy  <= 1'b0;
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  wire run = (state == S_RUN);

  // ------------------------------------------------------------------ queues
  logic        in_push [4], in_pop, in_empty [4];
  data_t       in_data [4];
  logic [CW-1:0] in_cnt [4];
  logic        out_push, out_pop [3], out_empty [3];
  data_t       out_wdata [3], out_data [3];
  logic [CW-1:0] out_cnt [3];

  for (genvar i = 0; i < 4; i++) begin : g_in_fifo
    sync_fifo #(.WIDTH(DATA_W), .DEPTH(FIFO_DEPTH)) u_fifo (
      .clk, .rst_n,
      .push(in_push[i]), .wr_data(m_rsp.r.data),
      .pop(in_pop), .rd_data(in_data[i]),
      .empty(in_empty[i]), .full(), .count(in_cnt[i])
    );
  end

  for (genvar j = 0; j < 3; j++) begin : g_out_fifo
    sync_fifo #(.WIDTH(DATA_W), .DEPTH(FIFO_DEPTH)) u_fifo (
      .clk, .rst_n,
      .push(out_push), .wr_data(out_wdata[j]),
      .pop(out_pop[j]), .rd_data(out_data[j]),
      .empty(out_empty[j]), .full(), .count(out_cnt[j])
    );
  end

  // ------------------------------------------------------------------ loader
  logic [1:0]  rd_t;
  logic [31:0] rd_blk, rd_left;
  addr_t       rd_addr;
  logic        rd_active, rd_done;
  logic [CW-1:0] in_res [4];      // occupancy plus beats requested
  logic [31:0] rd_blk_len, rd_burst;
  logic        rd_reserve, ar_fire;

  always_comb begin
    rd_blk_len = nbeats - (rd_blk << BLK_SH);
    if (rd_blk_len > 32'(BLOCK_BEATS)) rd_blk_len = 32'(BLOCK_BEATS);
    rd_burst = 32'(MAX_BURST) - 32'(rd_addr[11:6] & 6'(MAX_BURST - 1));
    if (rd_burst > rd_left) rd_burst = rd_left;
  end

  assign rd_reserve = run && !rd_active && !rd_done &&
                      (32'(FIFO_DEPTH) - 32'(in_res[rd_t]) >= rd_blk_len);
  assign ar_fire    = m_req.ar_valid && m_rsp.ar_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_t      <= '0;
      rd_blk    <= '0;
      rd_left   <= '0;
      rd_addr   <= '0;
      rd_active <= 1'b0;
      rd_done   <= 1'b0;
    end else if (state == S_IDLE) begin
      rd_t      <= '0;
      rd_blk    <= '0;
      rd_active <= 1'b0;
      rd_done   <= (nparams == '0);
    end else if (rd_reserve) begin
      rd_active <= 1'b1;
      rd_left   <= rd_blk_len;
      rd_addr   <= base_in[rd_t] + (ADDR_W'(rd_blk) << (BLK_SH + 6));
    end else if (ar_fire) begin
      rd_addr <= rd_addr + (ADDR_W'(rd_burst) << 6);
      rd_left <= rd_left - rd_burst;
      if (rd_left == rd_burst) begin
        rd_active <= 1'b0;
        rd_t      <= rd_t + 1'b1;
        if (rd_t == 2'd3) begin
          rd_blk <= rd_blk + 1'b1;
          if (rd_blk == nblocks - 1) rd_done <= 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 4; i++) in_res[i] <= '0;
    end else begin
      for (int i = 0; i < 4; i++)
        in_res[i] <= in_res[i] + ((rd_reserve && rd_t == 2'(i)) ? CW'(rd_blk_len) : '0)
                               - CW'(in_pop);
    end
  end

  always_comb begin
    m_req.ar_valid = rd_active;
    m_req.ar.id    = ID_W'(rd_t);
    m_req.ar.addr  = rd_addr;
    m_req.ar.len   = 8'(rd_burst - 1);
    m_req.ar.size  = AXI_SIZE_64B;
    m_req.ar.burst = AXI_BURST_INCR;
    m_req.r_ready  = 1'b1;          // room was reserved before the request
    for (int i = 0; i < 4; i++)
      in_push[i] = m_rsp.r_valid && (m_rsp.r.id[1:0] == 2'(i));
  end

  // ----------------------------------------------------------------- compute
  logic [CW-1:0] out_res [3];     // occupancy plus beats in flight
  logic          issue;
  logic [LANES-1:0] fu_vld;
  adam_in_t      fu_in  [LANES];
  adam_out_t     fu_out [LANES];

  always_comb begin
    issue = run;
    for (int i = 0; i < 4; i++) if (in_empty[i]) issue = 1'b0;
    for (int j = 0; j < 3; j++) if (out_res[j] >= CW'(FIFO_DEPTH)) issue = 1'b0;
  end
  assign in_pop = issue;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < 3; j++) out_res[j] <= '0;
    end else begin
      for (int j = 0; j < 3; j++) out_res[j] <= out_res[j] + CW'(issue) - CW'(out_pop[j]);
    end
  end

  for (genvar l = 0; l < LANES; l++) begin : g_fu
    assign fu_in[l].theta = in_data[0][32*l +: 32];
    assign fu_in[l].grad  = in_data[1][32*l +: 32];
    assign fu_in[l].m     = in_data[2][32*l +: 32];
    assign fu_in[l].v     = in_data[3][32*l +: 32];
    adam_fu #(.LATENCY(FU_LATENCY)) u_fu (
      .clk, .rst_n, .cst,
      .in_valid(issue), .in(fu_in[l]),
      .out_valid(fu_vld[l]), .out(fu_out[l])
    );
    assign out_wdata[0][32*l +: 32] = fu_out[l].theta;
    assign out_wdata[1][32*l +: 32] = fu_out[l].m;
    assign out_wdata[2][32*l +: 32] = fu_out[l].v;
  end
  assign out_push = fu_vld[0];

  // ------------------------------------------------------------------ writer
  logic [1:0]  wr_t;
  logic [31:0] wr_blk, wr_left, w_left, wr_beat, out_b;
  addr_t       wr_addr;
  logic        wr_active, wr_done, aw_pend;
  addr_t       aw_addr;
  logic [7:0]  aw_len;
  logic [31:0] wr_blk_len, wr_burst;
  logic        wr_open, burst_start, aw_fire, w_fire, b_fire;
  logic [3:0]  tail_lanes;

  always_comb begin
    wr_blk_len = nbeats - (wr_blk << BLK_SH);
    if (wr_blk_len > 32'(BLOCK_BEATS)) wr_blk_len = 32'(BLOCK_BEATS);
    wr_burst = 32'(MAX_BURST) - 32'(wr_addr[11:6] & 6'(MAX_BURST - 1));
    if (wr_burst > wr_left) wr_burst = wr_left;
  end

  assign wr_open     = run && !wr_active && !wr_done &&
                       (32'(out_cnt[wr_t]) >= wr_blk_len);
  assign burst_start = wr_active && !aw_pend && (w_left == '0) && (wr_left != '0);
  assign aw_fire     = m_req.aw_valid && m_rsp.aw_ready;
  assign w_fire      = m_req.w_valid && m_rsp.w_ready;
  assign b_fire      = m_rsp.b_valid && m_req.b_ready;
  assign tail_lanes  = nparams[3:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_t      <= '0;
      wr_blk    <= '0;
      wr_left   <= '0;
      w_left    <= '0;
      wr_beat   <= '0;
      wr_addr   <= '0;
      wr_active <= 1'b0;
      wr_done   <= 1'b0;
      aw_pend   <= 1'b0;
      aw_addr   <= '0;
      aw_len    <= '0;
      out_b     <= '0;
    end else if (state == S_IDLE) begin
      wr_t      <= '0;
      wr_blk    <= '0;
      wr_active <= 1'b0;
      wr_done   <= (nparams == '0);
      w_left    <= '0;
      aw_pend   <= 1'b0;
      out_b     <= '0;
    end else begin
      out_b <= out_b + 32'(aw_fire) - 32'(b_fire);
      if (wr_open) begin
        wr_active <= 1'b1;
        wr_left   <= wr_blk_len;
        wr_addr   <= base_out[wr_t] + (ADDR_W'(wr_blk) << (BLK_SH + 6));
        wr_beat   <= wr_blk << BLK_SH;
      end else if (burst_start) begin
        aw_pend <= 1'b1;
        aw_addr <= wr_addr;
        aw_len  <= 8'(wr_burst - 1);
        w_left  <= wr_burst;
        wr_left <= wr_left - wr_burst;
        wr_addr <= wr_addr + (ADDR_W'(wr_burst) << 6);
      end else if (wr_active && !aw_pend && w_left == '0 && wr_left == '0) begin
        wr_active <= 1'b0;
        wr_t      <= (wr_t == 2'd2) ? 2'd0 : wr_t + 1'b1;
        if (wr_t == 2'd2) begin
          wr_blk <= wr_blk + 1'b1;
          if (wr_blk == nblocks - 1) wr_done <= 1'b1;
        end
      end
      if (aw_fire) aw_pend <= 1'b0;
      if (w_fire) begin
        w_left  <= w_left - 1'b1;
        wr_beat <= wr_beat + 1'b1;
      end
    end
  end

  always_comb begin
    m_req.aw_valid = aw_pend;
    m_req.aw.id    = '0;
    m_req.aw.addr  = aw_addr;
    m_req.aw.len   = aw_len;
    m_req.aw.size  = AXI_SIZE_64B;
    m_req.aw.burst = AXI_BURST_INCR;
    m_req.w_valid  = (w_left != '0) && !out_empty[wr_t];
    m_req.w.data   = out_data[wr_t];
    m_req.w.last   = (w_left == 32'd1);
    m_req.w.strb   = '1;
    if (wr_beat == nbeats - 1 && tail_lanes != '0)
      for (int l = 0; l < LANES; l++)
        if (4'(l) >= tail_lanes) m_req.w.strb[4*l +: 4] = 4'b0000;
    m_req.b_ready  = 1'b1;
    for (int j = 0; j < 3; j++) out_pop[j] = w_fire && (wr_t == 2'(j));
  end

  assign finished = rd_done && wr_done && (out_b == '0) && !aw_pend;

  // ------------------------------------------------------------- assertions
  a_ar_stable: assert property (@(posedge clk) disable iff (!rst_n)
    m_req.ar_valid && !m_rsp.ar_ready |=> m_req.ar_valid && $stable(m_req.ar));
  a_aw_stable: assert property (@(posedge clk) disable iff (!rst_n)
    m_req.aw_valid && !m_rsp.aw_ready |=> m_req.aw_valid && $stable(m_req.aw));
  a_w_stable: assert property (@(posedge clk) disable iff (!rst_n)
    m_req.w_valid && !m_rsp.w_ready |=> m_req.w_valid && $stable(m_req.w));

endmodule
