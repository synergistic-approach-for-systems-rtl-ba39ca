// tb_adam_kernel: end-to-end test of one Adam kernel against a DRAM model.
//
// Three runs are programmed through the register port exactly as the host
// would: (1) 20000 elements, t = 10, tensors at 64-byte-aligned but not
// 4 KB-aligned addresses, separate output tensors; (2) 1000 elements updated in
// place at step t = 1 from zero moments; (3) an empty run (0 elements). Each
// run checks every output element bit for bit against the reference model,
// that the byte strobes left the memory just past the last element untouched,
// the busy/done status, the CYCLES register, that no burst crosses 4 KB, and
// the rate: the DRAM model moves one beat per cycle, and each beat of 16
// elements needs 7 beats of traffic (4 loads, 3 stores), so a run must take at
// least 7 cycles per beat and, with double buffering, not much more. It also
// counts how often a load was in progress while results were still in the
// functional units (double buffering) and requires that it happened.
module tb_adam_kernel;
  import axdimm_pkg::*;
  import adam_ref_pkg::*;

  logic                 clk = 1'b0, rst_n = 1'b0;
  logic                 csr_valid, csr_we;
  logic [REG_IDX_W-1:0] csr_idx;
  csr_t                 csr_wdata, csr_rdata;
  axi_req_t             m_req;
  axi_rsp_t             m_rsp;
  logic                 busy, done;

  int unsigned checks = 0, failures = 0, overlap = 0;

  adam_kernel dut (.clk, .rst_n, .csr_valid, .csr_we, .csr_idx, .csr_wdata, .csr_rdata,
                   .m_req, .m_rsp, .busy, .done);
  axi_mem_model #(.LAT(20)) mem (.clk, .rst_n, .req(m_req), .rsp(m_rsp));

  always #5 clk = ~clk;

  // double buffering: a read burst accepted while results are in the FUs
  always @(posedge clk)
    if (m_req.ar_valid && m_rsp.ar_ready && (dut.out_res[0] != dut.out_cnt[0])) overlap++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic csr_write(input k_reg_e idx, input csr_t val);
    @(negedge clk);
    csr_valid = 1'b1; csr_we = 1'b1; csr_idx = idx; csr_wdata = val;
    @(negedge clk);
    csr_valid = 1'b0; csr_we = 1'b0;
  endtask

  function automatic logic [31:0] get_f(input longint unsigned base, input int unsigned k);
    data_t d;
    d = mem.peek(base + 64 * (k / 16));
    return d[32 * (k % 16) +: 32];
  endfunction

  function automatic void put_f(input longint unsigned base, input int unsigned k,
                                input logic [31:0] v);
    data_t d;
    d = mem.peek(base + 64 * (k / 16));
    d[32 * (k % 16) +: 32] = v;
    mem.poke(base + 64 * (k / 16), d);
  endfunction

  localparam logic [31:0] SENTINEL = 32'hDEAD_BEEF;

  task automatic run(input int unsigned n, input int unsigned t, input bit in_place,
                     input bit zero_moments, input longint unsigned base);
    longint unsigned a_in [4], a_out [3];
    adam_in_t    x [];
    adam_out_t   e;
    adam_const_t c;
    int unsigned nb, cyc, tail;
    logic [31:0] lr, lam;
    lr  = rand_f(-12, -8, 0);
    lam = rand_f(-8, -5, 0);
    c   = make_const(lr, 32'h3F66_6666, 32'h3F7F_BE77, lam, 32'h322B_CC77, t);
    nb  = (n + 15) / 16;
    for (int i = 0; i < 4; i++) a_in[i] = base + i * (64 * nb + 64 * 37);
    for (int j = 0; j < 3; j++)
      a_out[j] = in_place ? a_in[j == 0 ? 0 : j + 1] : base + (4 + j) * (64 * nb + 64 * 37);
    x = new[n];
    for (int k = 0; k < n; k++) begin
      x[k] = rand_in();
      if (zero_moments) begin x[k].m = '0; x[k].v = '0; end
      put_f(a_in[0], k, x[k].theta);
      put_f(a_in[1], k, x[k].grad);
      put_f(a_in[2], k, x[k].m);
      put_f(a_in[3], k, x[k].v);
    end
    tail = nb * 16;
    for (int k = n; k < tail; k++)
      for (int j = 0; j < 3; j++) put_f(a_out[j], k, SENTINEL);

    csr_write(K_THETA_IN, CSR_W'(a_in[0]));
    csr_write(K_GRAD_IN, CSR_W'(a_in[1]));
    csr_write(K_M_IN, CSR_W'(a_in[2]));
    csr_write(K_V_IN, CSR_W'(a_in[3]));
    csr_write(K_THETA_OUT, CSR_W'(a_out[0]));
    csr_write(K_M_OUT, CSR_W'(a_out[1]));
    csr_write(K_V_OUT, CSR_W'(a_out[2]));
    csr_write(K_NPARAMS, CSR_W'(n));
    csr_write(K_LR, CSR_W'(lr));
    csr_write(K_BETA1, CSR_W'(32'h3F66_6666));
    csr_write(K_BETA2, CSR_W'(32'h3F7F_BE77));
    csr_write(K_LAMBDA, CSR_W'(lam));
    csr_write(K_EPS, CSR_W'(32'h322B_CC77));
    csr_write(K_STEP, CSR_W'(t));
    csr_write(K_CTRL, 64'd1);
    check(busy && !done, "busy after start");
    cyc = 1;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
    check(!busy, "not busy when done");
    csr_idx = K_STATUS;
    #1 check(csr_rdata[1:0] == 2'b10, "STATUS reads done");
    csr_idx = K_CYCLES;
    #1 check(csr_rdata == CSR_W'(cyc - 1), $sformatf("CYCLES %0d, measured %0d", csr_rdata, cyc - 1));
    if (n > 0) begin
      check(cyc >= 7 * nb, $sformatf("%0d cycles for %0d beats is faster than the channel", cyc, nb));
      check(cyc <= (7 * nb * 23) / 20 + 400,
            $sformatf("%0d cycles for %0d beats is too slow", cyc, nb));
    end
    $display("run n=%0d t=%0d: %0d cycles, %0d beats, bound %0d", n, t, cyc, nb, 7 * nb);
    for (int k = 0; k < n; k++) begin
      e = adam_step(c, x[k]);
      check(get_f(a_out[0], k) == e.theta && get_f(a_out[1], k) == e.m &&
            get_f(a_out[2], k) == e.v,
            $sformatf("element %0d: got %h %h %h exp %h %h %h", k, get_f(a_out[0], k),
                      get_f(a_out[1], k), get_f(a_out[2], k), e.theta, e.m, e.v));
    end
    if (!in_place)
      for (int k = n; k < tail; k++)
        for (int j = 0; j < 3; j++)
          check(get_f(a_out[j], k) == SENTINEL, $sformatf("lane %0d past the end written", k));
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    csr_valid = 1'b0; csr_we = 1'b0; csr_idx = '0; csr_wdata = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run(20000, 10, 1'b0, 1'b0, 64'h0001_2340);
    run(1000, 1, 1'b1, 1'b1, 64'h0100_0000);
    run(0, 3, 1'b0, 1'b0, 64'h0200_0000);
    check(mem.errors == 0, "AXI rules kept (4 KB, WLAST)");
    check(overlap > 0, "loads overlapped computation");
    $display("double-buffered loads: %0d", overlap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
