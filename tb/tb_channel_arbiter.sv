// tb_channel_arbiter: self-checking test of the two-mode channel arbiter.
//
// A DRAM model sits on the arbiter's memory side; the testbench itself plays
// the host and the kernel. Checked:
//  * NORMAL mode: host line writes reach DRAM; host reads, single and
//    back-to-back, return the right data exactly RD_LAT cycles after the
//    request; the MODE register reads back through the register window;
//  * a kernel read offered in NORMAL mode is blocked (never accepted);
//  * the switch to ACCELERATION (written and polled through MODE) lets the
//    blocked kernel read through, with the right data; host accesses now land
//    on the kernel register port (index, write data, read data at RD_LAT);
//    host accesses no longer reach DRAM;
//  * the switch back to NORMAL restores host access to DRAM;
//  * with a DRAM slower than RD_LAT (second instance) reads come back late
//    as zeros and are counted, and a burst of requests overflows the request
//    queue and is counted, both in STATUS.
module tb_channel_arbiter;
  import axdimm_pkg::*;

  localparam int unsigned RD_LAT = 32;
  localparam addr_t WIN = {{(ADDR_W - ARB_WIN_LSB){1'b1}}, {ARB_WIN_LSB{1'b0}}};

  logic                 clk = 1'b0, rst_n = 1'b0;
  logic                 host_valid, host_we, host_rvalid;
  addr_t                host_addr;
  data_t                host_wdata, host_rdata;
  logic                 k_csr_valid, k_csr_we;
  logic [REG_IDX_W-1:0] k_csr_idx;
  csr_t                 k_csr_wdata, k_csr_rdata;
  axi_req_t             k_req, m_req;
  axi_rsp_t             k_rsp, m_rsp;
  arb_mode_e            mode;

  int unsigned     checks = 0, failures = 0, kcsr_writes = 0, dram_ar = 0;
  longint unsigned cyc = 0;
  logic [REG_IDX_W-1:0] last_k_idx;
  csr_t            last_k_wdata;

  channel_arbiter #(.RD_LAT(RD_LAT)) dut (.*);
  axi_mem_model #(.LAT(10)) mem (.clk, .rst_n, .req(m_req), .rsp(m_rsp));

  // second instance: DRAM slower than the host's read latency
  logic      h2_valid = 1'b0, h2_we = 1'b0, h2_rvalid;
  addr_t     h2_addr = '0;
  data_t     h2_rdata;
  axi_req_t  m2_req, k2_req;
  axi_rsp_t  m2_rsp, k2_rsp;
  arb_mode_e mode2;
  logic      k2_v, k2_w;
  logic [REG_IDX_W-1:0] k2_i;
  csr_t      k2_d;
  channel_arbiter #(.RD_LAT(8)) dut_slow (
    .clk, .rst_n, .host_valid(h2_valid), .host_we(h2_we), .host_addr(h2_addr),
    .host_wdata('0), .host_rvalid(h2_rvalid), .host_rdata(h2_rdata),
    .k_csr_valid(k2_v), .k_csr_we(k2_w), .k_csr_idx(k2_i), .k_csr_wdata(k2_d),
    .k_csr_rdata('0), .k_req(k2_req), .k_rsp(k2_rsp), .m_req(m2_req), .m_rsp(m2_rsp),
    .mode(mode2));
  axi_mem_model #(.LAT(20)) mem_slow (.clk, .rst_n, .req(m2_req), .rsp(m2_rsp));
  assign k2_req = '0;

  always #5 clk = ~clk;

  // kernel register file seen by the arbiter: value depends on the index
  assign k_csr_rdata = {32'hC5A0_0000, 26'd0, k_csr_idx};

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
    if (k_csr_valid && k_csr_we) begin
      kcsr_writes++;
      last_k_idx   = k_csr_idx;
      last_k_wdata = k_csr_wdata;
    end
    if (m_req.ar_valid && m_rsp.ar_ready) dram_ar++;
    if (rst_n && host_rvalid) begin
      exp_t e;
      if (exp_q.size() == 0) check(1'b0, "unexpected read return");
      else begin
        e = exp_q.pop_front();
        check(e.due == cyc, $sformatf("read due at %0d came at %0d", e.due, cyc));
        if (!e.any) check(host_rdata == e.data, $sformatf("read data %h expected %h", host_rdata[63:0], e.data[63:0]));
      end
    end
  end

  task automatic host(input bit we, input addr_t a, input data_t d, input data_t expect_rd,
                      input bit hold = 1'b0, input bit any = 1'b0);
    exp_t e;
    @(negedge clk);
    host_valid = 1'b1; host_we = we; host_addr = a; host_wdata = d;
    if (!we) begin
      e.due  = cyc + 1 + 64'(RD_LAT);
      e.data = expect_rd;
      e.any  = any;
      exp_q.push_back(e);
    end
    if (!hold) begin
      @(negedge clk);
      host_valid = 1'b0;
    end
  endtask

  task automatic host_idle_wait();
    @(negedge clk);
    host_valid = 1'b0;
    repeat (RD_LAT + 4) @(negedge clk);
  endtask

  // poll MODE until the current-mode bit equals m
  task automatic wait_mode(input arb_mode_e m);
    int n = 0;
    while (dut.mode != m && n < 200) begin
      host(1'b0, WIN | (addr_t'(ARB_MODE) << REG_IDX_LSB), '0, '0, 1'b0, 1'b1);
      n++;
    end
    host_idle_wait();
    check(dut.mode == m, "mode switch took effect");
    host(1'b0, WIN | (addr_t'(ARB_MODE) << REG_IDX_LSB), '0, DATA_W'(m == MODE_ACCEL));
    host_idle_wait();
  endtask

  data_t lines [16];
  addr_t addrs [16];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned blocked, ar0;
    blocked = 0;
    host_valid = 1'b0; host_we = 1'b0; host_addr = '0; host_wdata = '0;
    k_req = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // NORMAL: writes then reads, single and back-to-back
    for (int i = 0; i < 16; i++) begin
      lines[i] = {16{$urandom}};
      addrs[i] = addr_t'($urandom_range(1 << 20, 0)) << 6;
      host(1'b1, addrs[i], lines[i], '0);
    end
    host_idle_wait();
    for (int i = 0; i < 4; i++) host(1'b0, addrs[i], '0, lines[i]);
    for (int i = 4; i < 16; i++) host(1'b0, addrs[i], '0, lines[i], 1'b1);
    host_idle_wait();
    check(mem.peek(64'(addrs[3])) == lines[3], "host write landed in DRAM");
    host(1'b0, WIN | (addr_t'(ARB_MODE) << REG_IDX_LSB), '0, '0);
    host_idle_wait();

    // kernel read offered in NORMAL mode is blocked
    @(negedge clk);
    k_req.ar_valid = 1'b1;
    k_req.ar.id = 4'd2; k_req.ar.addr = addrs[5]; k_req.ar.len = 8'd0;
    k_req.ar.size = AXI_SIZE_64B; k_req.ar.burst = AXI_BURST_INCR;
    k_req.r_ready = 1'b1; k_req.b_ready = 1'b1;
    repeat (50) begin
      @(posedge clk);
      if (k_rsp.ar_ready) blocked = 1000;
      else blocked++;
    end
    check(blocked == 50, "kernel blocked in NORMAL mode");

    // switch to ACCELERATION; the blocked read goes through
    host(1'b1, WIN | (addr_t'(ARB_MODE) << REG_IDX_LSB), DATA_W'(1), '0);
    fork
      wait_mode(MODE_ACCEL);
      begin
        while (!(k_rsp.ar_ready)) @(posedge clk);
        @(negedge clk);
        k_req.ar_valid = 1'b0;
        while (!k_rsp.r_valid) @(negedge clk);
        check(k_rsp.r.data == lines[5] && k_rsp.r.id == 4'd2 && k_rsp.r.last,
              "kernel read data in ACCELERATION mode");
      end
    join

    // host accesses now go to the kernel registers
    ar0 = dram_ar;
    host(1'b1, addr_t'(K_NPARAMS) << REG_IDX_LSB, DATA_W'(64'h1234_5678_9ABC), '0);
    @(negedge clk);
    check(kcsr_writes == 1 && last_k_idx == K_NPARAMS && last_k_wdata == 64'h1234_5678_9ABC,
          "host write reaches kernel register");
    host(1'b0, (addrs[7] & ~addr_t'(12'hFC0)) | (addr_t'(K_STATUS) << REG_IDX_LSB), '0,
         DATA_W'({32'hC5A0_0000, 26'd0, 6'(K_STATUS)}));
    host(1'b0, WIN | (addr_t'(ARB_MODE) << REG_IDX_LSB), '0, DATA_W'(1));
    host_idle_wait();
    check(dram_ar == ar0, "host accesses kept off DRAM in ACCELERATION mode");

    // back to NORMAL
    host(1'b1, WIN | (addr_t'(ARB_MODE) << REG_IDX_LSB), DATA_W'(0), '0);
    wait_mode(MODE_NORMAL);
    host(1'b0, addrs[9], '0, lines[9]);
    host_idle_wait();

    // slow DRAM: late reads and queue overflow are counted. Reads and writes
    // alternate every cycle; the memory moves one beat per cycle for both, so
    // the request queue fills.
    for (int i = 0; i < 60; i++) begin
      @(negedge clk);
      h2_valid = 1'b1; h2_we = i[0]; h2_addr = addr_t'(i) << 6;
    end
    @(negedge clk);
    h2_valid = 1'b0;
    repeat (100) @(negedge clk);
    check(dut_slow.late_cnt > 0, "late reads counted");
    check(dut_slow.ovf_cnt > 0, "request-queue overflow counted");
    $display("slow instance: %0d late, %0d dropped", dut_slow.late_cnt, dut_slow.ovf_cnt);

    check(exp_q.size() == 0, "all reads returned");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
