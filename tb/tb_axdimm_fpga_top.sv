// tb_axdimm_fpga_top: end-to-end test of the AXDIMM FPGA design with every
// parameter at its default (two channels, 16 FUs of 128-cycle latency per
// kernel, 16 KB blocks, 32-cycle host read latency). A DRAM model (one beat per
// cycle) stands behind each channel; the testbench plays the host's runtime,
// issuing line requests through the rank-to-channel routing at most once every
// two cycles (the rate of a DDR4-800 host link):
//   1. NORMAL mode: write theta, grad, m and v for 20008 elements into channel 0
//      and 2000 elements into channel 1 with host line writes; read some back.
//   2. Switch channel 0 to ACCELERATION, program its kernel (addresses, count,
//      hyper-parameters, step) and start it.
//   3. While it runs, keep using channel 1 in NORMAL mode (reads checked).
//   4. Switch channel 1 to ACCELERATION, program and start its kernel, then at
//      once request NORMAL mode again: the kernel's requests are blocked while
//      the host owns the channel; switching back lets it finish.
//   5. Poll both kernels' STATUS until done, return both channels to NORMAL
//      and read every result back through the host port; compare bit for bit
//      with the reference Adam model.
// Every host read is checked to return exactly RD_LAT cycles after it was
// issued. Channel 0's CYCLES register gives its throughput, printed in million
// parameters per second for both channels and checked against the memory
// bound of 7 beats per 16 parameters (at most 1/7 slower, plus fill and drain). Each mechanism is counted and must have happened at least once: mode
// switches both ways, blocked kernel requests, host use of one channel while the
// other kernel runs, loads overlapping computation (double buffering), more
// than one block per tensor, a partly filled last beat, register-window and
// kernel-register accesses.
module tb_axdimm_fpga_top;
  import axdimm_pkg::*;
  import adam_ref_pkg::*;

  localparam int unsigned RD_LAT = 32;   // the top's default
  localparam int unsigned NCH = 2;
  localparam addr_t WIN = {{(ADDR_W - ARB_WIN_LSB){1'b1}}, {ARB_WIN_LSB{1'b0}}};

  logic      clk = 1'b0, rst_n = 1'b0;
  logic      host_valid, host_we, host_rvalid;
  logic      host_rank;
  addr_t     host_addr;
  data_t     host_wdata, host_rdata;
  axi_req_t  dram_req [NCH];
  axi_rsp_t  dram_rsp [NCH];
  arb_mode_e ch_mode [NCH];
  logic      k_busy [NCH], k_done [NCH];

  axdimm_fpga_top dut (.*);
  axi_mem_model #(.LAT(20)) mem0 (.clk, .rst_n, .req(dram_req[0]), .rsp(dram_rsp[0]));
  axi_mem_model #(.LAT(20)) mem1 (.clk, .rst_n, .req(dram_req[1]), .rsp(dram_rsp[1]));

  always #5 clk = ~clk;

  int unsigned checks = 0, failures = 0;
  longint unsigned cyc = 0;
  data_t last_rdata;

  // mechanism counters
  int unsigned n_to_accel = 0, n_to_normal = 0, n_blocked = 0, n_parallel = 0;
  int unsigned n_overlap = 0, n_win = 0, n_kreg = 0;
  arb_mode_e prev_mode [NCH];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  typedef struct { longint unsigned due; data_t data; bit any; } exp_t;
  exp_t exp_q [$];

  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      for (int c = 0; c < NCH; c++) begin
        if (prev_mode[c] == MODE_NORMAL && ch_mode[c] == MODE_ACCEL) n_to_accel++;
        if (prev_mode[c] == MODE_ACCEL && ch_mode[c] == MODE_NORMAL) n_to_normal++;
        prev_mode[c] = ch_mode[c];
      end
      if (ch_mode[1] == MODE_NORMAL &&
          (dut.g_ch[1].k_req.ar_valid || dut.g_ch[1].k_req.aw_valid)) n_blocked++;
      if (host_valid && host_rank == 1'b1 && ch_mode[1] == MODE_NORMAL && k_busy[0]) n_parallel++;
      if (dut.g_ch[0].k_req.ar_valid && dut.g_ch[0].k_rsp.ar_ready &&
          dut.g_ch[0].u_kernel.out_res[0] != dut.g_ch[0].u_kernel.out_cnt[0]) n_overlap++;
      if (host_valid && (&host_addr[ADDR_W-1:ARB_WIN_LSB])) n_win++;
      if (dut.g_ch[0].csr_valid || dut.g_ch[1].csr_valid) n_kreg++;
      if (host_rvalid) begin
        exp_t e;
        last_rdata = host_rdata;
        if (exp_q.size() == 0) check(1'b0, "unexpected read return");
        else begin
          e = exp_q.pop_front();
          check(e.due == cyc, $sformatf("read due at %0d came at %0d", e.due, cyc));
          if (!e.any) check(host_rdata == e.data, $sformatf("read %h expected %h",
                                                             host_rdata[63:0], e.data[63:0]));
        end
      end
    end
  end

  task automatic host(input bit we, input bit rank, input addr_t a, input data_t d,
                      input data_t expect_rd = '0, input bit any = 1'b0);
    exp_t e;
    @(negedge clk);
    host_valid = 1'b1; host_we = we; host_rank = rank; host_addr = a; host_wdata = d;
    if (!we) begin
      e.due = cyc + 1 + RD_LAT; e.data = expect_rd; e.any = any;
      exp_q.push_back(e);
    end
    // a DDR4-800 host link carries one 64-byte line per two fabric cycles
    @(negedge clk);
    host_valid = 1'b0;
  endtask

  task automatic host_gap(input int unsigned n = 1);
    @(negedge clk);
    host_valid = 1'b0;
    repeat (n) @(negedge clk);
  endtask

  // read a register and wait for the value
  task automatic host_read_wait(input bit rank, input addr_t a, output data_t v);
    host(1'b0, rank, a, '0, '0, 1'b1);
    host_gap(RD_LAT + 1);
    v = last_rdata;
  endtask

  task automatic set_mode(input bit rank, input arb_mode_e m);
    data_t v;
    host(1'b1, rank, WIN | (addr_t'(ARB_MODE) << REG_IDX_LSB), DATA_W'(m));
    do host_read_wait(rank, WIN | (addr_t'(ARB_MODE) << REG_IDX_LSB), v);
    while (v[1:0] != {1'b0, m});
  endtask

  task automatic kreg(input bit rank, input k_reg_e r, input csr_t v);
    host(1'b1, rank, addr_t'(r) << REG_IDX_LSB, DATA_W'(v));
  endtask

  // per-channel problem
  int unsigned     n [NCH];
  int unsigned     tstep [NCH];
  longint unsigned a_in [NCH][4], a_out [NCH][3];
  adam_const_t     cst [NCH];
  logic [31:0]     lr [NCH], lam [NCH];
  adam_in_t        x0 [], x1 [];

  function automatic adam_in_t elem(input int c, input int unsigned k);
    return (c == 0) ? x0[k] : x1[k];
  endfunction

  function automatic data_t in_line(input int c, input int tsr, input int unsigned b);
    data_t d;
    adam_in_t e;
    d = '0;
    for (int l = 0; l < 16; l++)
      if (b * 16 + l < n[c]) begin
        e = elem(c, b * 16 + l);
        d[32*l +: 32] = (tsr == 0) ? e.theta : (tsr == 1) ? e.grad : (tsr == 2) ? e.m : e.v;
      end
    return d;
  endfunction

  function automatic data_t out_line(input int c, input int tsr, input int unsigned b);
    data_t d;
    adam_out_t o;
    d = '0;
    for (int l = 0; l < 16; l++)
      if (b * 16 + l < n[c]) begin
        o = adam_step(cst[c], elem(c, b * 16 + l));
        d[32*l +: 32] = (tsr == 0) ? o.theta : (tsr == 1) ? o.m : o.v;
      end
    return d;
  endfunction

  task automatic program_and_start(input int c);
    for (int i = 0; i < 4; i++)
      kreg(c[0], k_reg_e'(int'(K_THETA_IN) + i), CSR_W'(a_in[c][i]));
    for (int j = 0; j < 3; j++)
      kreg(c[0], k_reg_e'(int'(K_THETA_OUT) + j), CSR_W'(a_out[c][j]));
    kreg(c[0], K_NPARAMS, CSR_W'(n[c]));
    kreg(c[0], K_LR, CSR_W'(lr[c]));
    kreg(c[0], K_BETA1, CSR_W'(32'h3F66_6666));
    kreg(c[0], K_BETA2, CSR_W'(32'h3F7F_BE77));
    kreg(c[0], K_LAMBDA, CSR_W'(lam[c]));
    kreg(c[0], K_EPS, CSR_W'(32'h322B_CC77));
    kreg(c[0], K_STEP, CSR_W'(tstep[c]));
    kreg(c[0], K_CTRL, 64'd1);
  endtask

  task automatic wait_done(input int c);
    data_t v;
    do host_read_wait(c[0], addr_t'(K_STATUS) << REG_IDX_LSB, v);
    while (v[1:0] != 2'b10);
  endtask

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    host_valid = 1'b0; host_we = 1'b0; host_rank = 1'b0; host_addr = '0; host_wdata = '0;
    for (int c = 0; c < NCH; c++) prev_mode[c] = MODE_NORMAL;
    n[0] = 20008; n[1] = 2000;
    tstep[0] = 10; tstep[1] = 1000;
    x0 = new[n[0]];
    x1 = new[n[1]];
    foreach (x0[k]) x0[k] = rand_in();
    foreach (x1[k]) x1[k] = rand_in();
    for (int c = 0; c < NCH; c++) begin
      automatic int unsigned nb = (n[c] + 15) / 16;
      for (int i = 0; i < 4; i++) a_in[c][i] = 64'h10_0000 + i * 64 * (nb + 100);
      for (int j = 0; j < 3; j++) a_out[c][j] = 64'h80_0000 + j * 64 * (nb + 100);
      lr[c]  = rand_f(-12, -8, 0);
      lam[c] = rand_f(-8, -5, 0);
      cst[c] = make_const(lr[c], 32'h3F66_6666, 32'h3F7F_BE77, lam[c], 32'h322B_CC77, tstep[c]);
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // 1. load both channels through the host port, spot-check by reading back
    for (int c = 0; c < NCH; c++)
      for (int t = 0; t < 4; t++)
        for (int unsigned b = 0; b < (n[c] + 15) / 16; b++)
          host(1'b1, c[0], addr_t'(a_in[c][t] + 64 * b), in_line(c, t, b));
    host_gap(4);
    for (int c = 0; c < NCH; c++)
      for (int t = 0; t < 4; t++)
        host(1'b0, c[0], addr_t'(a_in[c][t] + 64 * 7), '0, in_line(c, t, 7));
    host_gap(RD_LAT + 2);

    // 2. channel 0 to ACCELERATION, start its kernel
    set_mode(1'b0, MODE_ACCEL);
    program_and_start(0);
    host_gap(2);
    check(k_busy[0], "channel 0 kernel running");

    // 3. meanwhile use channel 1 in NORMAL mode
    for (int unsigned b = 0; b < 100; b++)
      host(1'b0, 1'b1, addr_t'(a_in[1][b % 4] + 64 * b), '0, in_line(1, b % 4, b));
    host_gap(RD_LAT + 2);

    // 4. channel 1: start, take the channel back at once, then release it
    set_mode(1'b1, MODE_ACCEL);
    program_and_start(1);
    set_mode(1'b1, MODE_NORMAL);
    host_gap(200);
    check(k_busy[1], "channel 1 kernel held while blocked");
    set_mode(1'b1, MODE_ACCEL);

    // 5. wait, return to NORMAL, read everything back
    wait_done(0);
    begin
      // throughput of channel 0 (Table 5 style): each beat of 16 parameters
      // needs 7 beats of DRAM traffic, one beat per 200 MHz cycle
      data_t       v;
      int unsigned nb, bound;
      real         mps;
      host_read_wait(1'b0, addr_t'(K_CYCLES) << REG_IDX_LSB, v);
      nb    = (n[0] + 15) / 16;
      bound = 7 * nb;
      mps   = 2.0 * 200.0 * real'(n[0]) / real'(v[31:0]);
      $display("channel 0: %0d parameters in %0d cycles (bound %0d): %.1f MP/s for two channels, %.1f%% of 914.29",
               n[0], v[31:0], bound, mps, 100.0 * mps / 914.2857);
      check(v[31:0] >= bound && v[31:0] <= bound + bound / 7 + 400,
            "kernel throughput within 87% of the memory bound");
    end
    wait_done(1);
    set_mode(1'b0, MODE_NORMAL);
    set_mode(1'b1, MODE_NORMAL);
    for (int c = 0; c < NCH; c++)
      for (int t = 0; t < 3; t++)
        for (int unsigned b = 0; b < (n[c] + 15) / 16; b++)
          host(1'b0, c[0], addr_t'(a_out[c][t] + 64 * b), '0, out_line(c, t, b));
    host_gap(RD_LAT + 4);
    check(exp_q.size() == 0, "every host read returned");

    $display("mode switches to ACCEL %0d, to NORMAL %0d; blocked kernel cycles %0d;",
             n_to_accel, n_to_normal, n_blocked);
    $display("host accesses to ch1 while ch0 kernel ran %0d; overlapped loads %0d;",
             n_parallel, n_overlap);
    $display("register-window accesses %0d, kernel-register accesses %0d; ch0 blocks per tensor %0d",
             n_win, n_kreg, ((n[0] + 15) / 16 + 255) / 256);
    check(n_to_accel >= 3 && n_to_normal >= 3, "mode switches both ways");
    check(n_blocked > 0, "kernel requests blocked in NORMAL mode");
    check(n_parallel > 0, "host used one channel while the other kernel ran");
    check(n_overlap > 0, "loads overlapped computation");
    check(((n[0] + 15) / 16 + 255) / 256 > 1, "several blocks per tensor");
    check(n[0] % 16 != 0, "partly filled last beat");
    check(n_win > 0 && n_kreg > 0, "register window and kernel registers used");
    check(dut.g_ch[0].u_arb.late_cnt == 0 && dut.g_ch[1].u_arb.late_cnt == 0, "no late reads");
    check(dut.g_ch[0].u_arb.ovf_cnt == 0 && dut.g_ch[1].u_arb.ovf_cnt == 0, "no dropped requests");
    check(mem0.errors == 0 && mem1.errors == 0, "AXI rules kept");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
