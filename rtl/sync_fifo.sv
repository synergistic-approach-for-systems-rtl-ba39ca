// sync_fifo: single-clock first-in first-out queue, one per input tensor and
// one per output tensor of the Adam kernel.
//
// The storage is a plain array that an FPGA tool maps to block RAM. The head
// entry is always visible on rd_data (first-word fall-through), so a consumer
// tests !empty and pulses pop in the same cycle it uses the data. push and pop
// may happen together. count reports the occupancy, which the kernel uses to
// reserve room for whole blocks before it requests them. Pushing when full or
// popping when empty is a protocol error and is caught by assertions.
//
// That the kernel's queues live in on-chip memory is given; fall-through
// reads and the count output are this design's own choices.
module sync_fifo #(
  parameter int unsigned WIDTH = 512,
  parameter int unsigned DEPTH = 512,   // must be a power of two
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             push,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             pop,
  output logic [WIDTH-1:0] rd_data,
  output logic             empty,
  output logic             full,
  output logic [AW:0]      count
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wptr, rptr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (push) wptr <= wptr + 1'b1;
      if (pop)  rptr <= rptr + 1'b1;
      count <= count + (AW+1)'(push) - (AW+1)'(pop);
    end
  end

  always_ff @(posedge clk) begin
    if (push) mem[wptr] <= wr_data;
  end

  assign rd_data = mem[rptr];
  assign empty   = (count == '0);
  assign full    = (count == (AW+1)'(DEPTH));

  initial assert (DEPTH == (1 << AW)) else $fatal(1, "sync_fifo: DEPTH must be a power of two");

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) push |-> (!full || pop));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) pop |-> !empty);

endmodule
