// tb_adam_fu: self-checking test of one Adam functional unit.
//
// Feeds 400 random operand sets (with random idle cycles in between) under
// random hyper-parameters and step counts, and checks that each result
// appears exactly LATENCY (128) cycles after its operands and equals the
// reference model bit for bit. A further 20 sets with t = 1 and zero
// moments check the first-step case, and out_valid must never appear spuriously.
module tb_adam_fu;
  import axdimm_pkg::*;
  import adam_ref_pkg::*;

  localparam int unsigned LAT = 128;
  localparam int unsigned N   = 400;

  logic        clk = 1'b0, rst_n = 1'b0;
  adam_const_t cst;
  logic        in_valid;
  adam_in_t    in;
  logic        out_valid;
  adam_out_t   out;

  int unsigned checks = 0, failures = 0;
  longint unsigned cyc = 0;

  adam_fu #(.LATENCY(LAT)) dut (.clk, .rst_n, .cst, .in_valid, .in, .out_valid, .out);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  typedef struct { adam_out_t exp; longint unsigned due; } pend_t;
  pend_t pend [$];

  // output checker
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      checks++;
      if (pend.size() == 0) begin
        failures++;
        $display("FAIL: unexpected output at cycle %0d", cyc);
      end else begin
        pend_t p;
        p = pend.pop_front();
        if (p.due != cyc) begin
          failures++;
          $display("FAIL: latency: result due at %0d, seen at %0d", p.due, cyc);
        end
        checks++;
        if (out != p.exp) begin
          failures++;
          $display("FAIL: got th=%h m=%h v=%h exp th=%h m=%h v=%h",
                   out.theta, out.m, out.v, p.exp.theta, p.exp.m, p.exp.v);
        end
      end
    end
  end

  task automatic run_batch(input adam_const_t c, input int unsigned n, input bit first_step);
    cst = c;
    for (int unsigned k = 0; k < n; k++) begin
      adam_in_t x;
      pend_t    p;
      x = rand_in();
      if (first_step) begin x.m = '0; x.v = '0; end
      @(negedge clk);
      in_valid = 1'b1;
      in       = x;
      p.exp    = adam_step(c, x);
      p.due    = cyc + LAT;   // sampled at the next edge (cyc), out LAT edges later
      pend.push_back(p);
      @(negedge clk);
      in_valid = 1'b0;
      if ($urandom_range(3, 0) == 0) repeat ($urandom_range(3, 1)) @(negedge clk);
    end
    // let the pipeline drain before the constants change
    repeat (LAT + 4) @(negedge clk);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    adam_const_t c;
    in_valid = 1'b0;
    in       = '0;
    cst      = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // typical hyper-parameters: lr 1e-3, beta 0.9 / 0.999, lambda 0.01, eps 1e-8
    c = make_const(32'h3A83_126F, 32'h3F66_6666, 32'h3F7F_BE77, 32'h3C23_D70A, 32'h322B_CC77, 1);
    run_batch(c, 20, 1'b1);
    for (int b = 0; b < 4; b++) begin
      c = make_const(rand_f(-12, -6, 0), 32'h3F66_6666, 32'h3F7F_BE77,
                     rand_f(-8, -4, 0), 32'h322B_CC77, $urandom_range(5000, 1));
      run_batch(c, N / 4, 1'b0);
    end
    checks++;
    if (pend.size() != 0) begin
      failures++;
      $display("FAIL: %0d results never appeared", pend.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
