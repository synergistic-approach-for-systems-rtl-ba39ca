// axi_mem_model: behavioural model of one DRAM channel behind its memory
// controller, seen as an AXI4 subordinate with 512-bit data. Not synthesizable.
//
// Read data starts LAT cycles after a read address is accepted. The channel
// moves at most one 64-byte beat per cycle, shared between reads and writes
// (alternating when both are waiting), which is the bandwidth of one DDR4
// channel at the 200 MHz fabric clock. Up to 32 read and 32 write bursts may be
// outstanding. Nothing is accepted while rst_n is low. Storage is sparse; unwritten lines read as zero. Writes honour
// the byte strobes. The model counts bursts that cross a 4 KB boundary and W
// beats whose last flag is wrong, and exposes poke/peek for testbenches.
module axi_mem_model
  import axdimm_pkg::*;
#(
  parameter int unsigned LAT = 20
) (
  input  logic     clk,
  input  logic     rst_n,
  input  axi_req_t req,
  output axi_rsp_t rsp
);

  typedef struct {
    longint unsigned addr;
    int unsigned     len;
    id_t             id;
    longint unsigned ready_at;
  } burst_t;

  data_t           mem [longint unsigned];
  burst_t          ar_q [$];
  burst_t          aw_q [$];
  id_t             b_q  [$];
  int unsigned     r_beat = 0, w_beat = 0;
  longint unsigned cycle = 0;  // clock edges seen
  bit              prio_r = 1'b0, r_hold = 1'b0;
  int unsigned     errors = 0, r_beats = 0, w_beats = 0;

  function automatic data_t peek(input longint unsigned a);
    longint unsigned l;
    l = a >> 6;
    return mem.exists(l) ? mem[l] : '0;
  endfunction

  function automatic void poke(input longint unsigned a, input data_t d);
    mem[a >> 6] = d;
  endfunction

  function automatic void check_4k(input longint unsigned a, input int unsigned len);
    if ((a % 4096) + 64'(len + 1) * 64 > 4096) begin
      errors++;
      $display("axi_mem_model: burst at %h, %0d beats crosses 4 KB", a, len + 1);
    end
  endfunction

  // Registered copies of the queue heads; the handshake logic reads only these.
  logic            ar_any = 1'b0, aw_any = 1'b0, b_any = 1'b0, r_due = 1'b0;
  burst_t          ar_h, aw_h;
  id_t             b_h = '0;
  int unsigned     r_beat_q = 0;
  logic            want_r, want_w, grant_r, grant_w;
  logic            ar_room = 1'b1, aw_room = 1'b1;

  always_comb begin
    want_r  = ar_any && r_due;
    want_w  = req.w_valid && aw_any;
    grant_r = want_r && (r_hold || !want_w || prio_r);
    grant_w = want_w && !grant_r;
    rsp          = '0;
    rsp.ar_ready = ar_room;
    rsp.aw_ready = aw_room;
    rsp.w_ready  = grant_w;
    rsp.r_valid  = grant_r;
    if (grant_r) begin
      rsp.r.id   = ar_h.id;
      rsp.r.data = peek(ar_h.addr + 64 * r_beat_q);
      rsp.r.last = (r_beat_q == ar_h.len);
    end
    rsp.b_valid = b_any;
    rsp.b.id    = b_h;
  end

  always @(posedge clk) begin
    burst_t nb;
    data_t  old;
    cycle = cycle + 1;
    if (rst_n) begin
    r_hold <= rsp.r_valid && !req.r_ready;
    if (rsp.r_valid && req.r_ready) begin
      r_beats++;
      prio_r <= 1'b0;
      if (r_beat == ar_q[0].len) begin
        void'(ar_q.pop_front());
        r_beat = 0;
      end else r_beat++;
    end
    if (rsp.w_ready && req.w_valid) begin
      w_beats++;
      prio_r <= 1'b1;
      old = peek(aw_q[0].addr + 64 * w_beat);
      for (int i = 0; i < STRB_W; i++)
        if (req.w.strb[i]) old[8*i +: 8] = req.w.data[8*i +: 8];
      poke(aw_q[0].addr + 64 * w_beat, old);
      if (req.w.last != (w_beat == aw_q[0].len)) begin
        errors++;
        $display("axi_mem_model: WLAST wrong at beat %0d", w_beat);
      end
      if (w_beat == aw_q[0].len) begin
        b_q.push_back(aw_q[0].id);
        void'(aw_q.pop_front());
        w_beat = 0;
      end else w_beat++;
    end
    if (rsp.b_valid && req.b_ready) void'(b_q.pop_front());
    if (req.ar_valid && rsp.ar_ready) begin
      nb.addr = 64'(req.ar.addr); nb.len = 32'(req.ar.len); nb.id = req.ar.id;
      nb.ready_at = cycle + 64'(LAT);
      check_4k(nb.addr, nb.len);
      ar_q.push_back(nb);
    end
    if (req.aw_valid && rsp.aw_ready) begin
      nb.addr = 64'(req.aw.addr); nb.len = 32'(req.aw.len); nb.id = req.aw.id;
      nb.ready_at = cycle;
      check_4k(nb.addr, nb.len);
      aw_q.push_back(nb);
    end
    end
    ar_any   <= ar_q.size() > 0;
    aw_any   <= aw_q.size() > 0;
    b_any    <= b_q.size() > 0;
    ar_room  <= ar_q.size() < 32;
    aw_room  <= aw_q.size() < 32;
    r_due    <= (ar_q.size() > 0) && (ar_q[0].ready_at <= cycle + 1);
    if (ar_q.size() > 0) ar_h <= ar_q[0];
    if (aw_q.size() > 0) aw_h <= aw_q[0];
    if (b_q.size() > 0)  b_h  <= b_q[0];
    r_beat_q <= r_beat;
  end

endmodule
