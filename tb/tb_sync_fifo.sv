// tb_sync_fifo: self-checking test of the kernel's FIFO queue.
//
// Random pushes and pops (including simultaneous ones, and none that would
// overflow or underflow) against a queue model; checks the head data, the
// count and the empty/full flags every cycle, and fills the queue completely
// and drains it again.
module tb_sync_fifo;
  localparam int unsigned W = 32, D = 16;

  logic          clk = 1'b0, rst_n = 1'b0;
  logic          push, pop, empty, full;
  logic [W-1:0]  wr_data, rd_data;
  logic [$clog2(D):0] count;
  logic [W-1:0]  model [$];
  int unsigned   checks = 0, failures = 0;

  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  task automatic check_state();
    checks++;
    if (count != model.size() || empty != (model.size() == 0) || full != (model.size() == D)) begin
      failures++;
      $display("FAIL: count=%0d empty=%0b full=%0b, model holds %0d", count, empty, full, model.size());
    end
    if (model.size() > 0) begin
      checks++;
      if (rd_data != model[0]) begin
        failures++;
        $display("FAIL: head %h, expected %h", rd_data, model[0]);
      end
    end
  endtask

  task automatic step(input bit want_push, input bit want_pop);
    @(negedge clk);
    check_state();
    pop     = want_pop && model.size() > 0;
    push    = want_push && (model.size() < D || pop);
    wr_data = $urandom;
    @(posedge clk);
    if (pop)  void'(model.pop_front());
    if (push) model.push_back(wr_data);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    push = 0; pop = 0; wr_data = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) step($urandom_range(1, 0) == 1, $urandom_range(2, 0) == 0);
    for (int i = 0; i < 2 * D; i++) step(1'b1, 1'b0);      // fill up
    for (int i = 0; i < 4 * D; i++) step(1'b1, 1'b1);      // push and pop while full
    for (int i = 0; i < 2 * D; i++) step(1'b0, 1'b1);      // drain
    for (int i = 0; i < 2000; i++) step($urandom_range(2, 0) != 0, $urandom_range(1, 0) == 1);
    @(negedge clk);
    check_state();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
