// adam_fu: one FP32 Adam functional unit. Sixteen of these sit side by side in
// the Adam kernel, one per 32-bit lane of the 512-bit memory word.
//
// Per parameter it evaluates one Adam step, weight decay folded into the gradient (L2 form):
//   g     = grad + lambda*theta
//   m'    = beta1*m + (1-beta1)*g
//   v'    = beta2*v + (1-beta2)*g*g
//   mhat  = m' / (1 - beta1^t)
//   vhat  = v' / (1 - beta2^t)
//   theta'= theta - lr * mhat / (sqrt(vhat) + eps)
// The unit is fully pipelined: it accepts one operand set every cycle and
// returns the result exactly LATENCY cycles later (128 by default, the latency
// of the described unit). The arithmetic occupies the first ARITH_STAGES
// stages, one floating-point operation (or a group of independent ones) per
// stage; a delay line pads the rest. The constants are read at every stage and
// must stay unchanged while operands are in flight (the kernel holds them for
// a whole run). The per-parameter bias corrections 1-beta^t are supplied
// precomputed by the kernel. How the 128 cycles are split among the
// operations is not specified and is this design's own choice; one combinational
// divider or square root per stage is not timing-closed for 200 MHz and would be
// subdivided for a real FPGA build, without changing the interface or latency.
//
// Interface: in_valid/in (theta, grad, m, v) -> out_valid/out (theta, m, v).
module adam_fu
  import axdimm_pkg::*;
  import fp32_pkg::*;
#(
  parameter int unsigned LATENCY = 128
) (
  input  logic        clk,
  input  logic        rst_n,
  input  adam_const_t cst,
  input  logic        in_valid,
  input  adam_in_t    in,
  output logic        out_valid,
  output adam_out_t   out
);

  localparam int unsigned ARITH_STAGES = 11;
  localparam int unsigned PAD = LATENCY - ARITH_STAGES;

  initial assert (LATENCY > ARITH_STAGES) else $fatal(1, "adam_fu: LATENCY too small");

  // Stage registers: valid bits and the values each stage produces.
  logic [ARITH_STAGES:1] vld;
  logic [31:0] s1_wd, s1_th, s1_gr, s1_m, s1_v;
  logic [31:0] s2_g, s2_th, s2_m, s2_v;
  logic [31:0] s3_a1, s3_b1, s3_gg, s3_a2, s3_th;
  logic [31:0] s4_mt, s4_b2, s4_a2, s4_th;
  logic [31:0] s5_mt, s5_vt, s5_mh, s5_th;
  logic [31:0] s6_mt, s6_vt, s6_mh, s6_vh, s6_th;
  logic [31:0] s7_mt, s7_vt, s7_mh, s7_sq, s7_th;
  logic [31:0] s8_mt, s8_vt, s8_mh, s8_dn, s8_th;
  logic [31:0] s9_mt, s9_vt, s9_q, s9_th;
  logic [31:0] s10_mt, s10_vt, s10_st, s10_th;
  adam_out_t   s11;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld <= '0;
    else        vld <= {vld[ARITH_STAGES-1:1], in_valid};
  end

  always_ff @(posedge clk) begin
    // 1: weight-decay term
    s1_wd <= fp_mul(cst.lambda, in.theta);
    s1_th <= in.theta; s1_gr <= in.grad; s1_m <= in.m; s1_v <= in.v;
    // 2: effective gradient
    s2_g  <= fp_add(s1_gr, s1_wd);
    s2_th <= s1_th; s2_m <= s1_m; s2_v <= s1_v;
    // 3: products for both moments
    s3_a1 <= fp_mul(cst.beta1, s2_m);
    s3_b1 <= fp_mul(cst.omb1, s2_g);
    s3_gg <= fp_mul(s2_g, s2_g);
    s3_a2 <= fp_mul(cst.beta2, s2_v);
    s3_th <= s2_th;
    // 4: first moment, scaled squared gradient
    s4_mt <= fp_add(s3_a1, s3_b1);
    s4_b2 <= fp_mul(cst.omb2, s3_gg);
    s4_a2 <= s3_a2; s4_th <= s3_th;
    // 5: second moment, bias-corrected first moment
    s5_vt <= fp_add(s4_a2, s4_b2);
    s5_mh <= fp_div(s4_mt, cst.bc1);
    s5_mt <= s4_mt; s5_th <= s4_th;
    // 6: bias-corrected second moment
    s6_vh <= fp_div(s5_vt, cst.bc2);
    s6_mt <= s5_mt; s6_vt <= s5_vt; s6_mh <= s5_mh; s6_th <= s5_th;
    // 7: square root
    s7_sq <= fp_sqrt(s6_vh);
    s7_mt <= s6_mt; s7_vt <= s6_vt; s7_mh <= s6_mh; s7_th <= s6_th;
    // 8: denominator
    s8_dn <= fp_add(s7_sq, cst.eps);
    s8_mt <= s7_mt; s8_vt <= s7_vt; s8_mh <= s7_mh; s8_th <= s7_th;
    // 9: quotient
    s9_q  <= fp_div(s8_mh, s8_dn);
    s9_mt <= s8_mt; s9_vt <= s8_vt; s9_th <= s8_th;
    // 10: step
    s10_st <= fp_mul(cst.lr, s9_q);
    s10_mt <= s9_mt; s10_vt <= s9_vt; s10_th <= s9_th;
    // 11: new parameter
    s11.theta <= fp_sub(s10_th, s10_st);
    s11.m     <= s10_mt;
    s11.v     <= s10_vt;
  end

  // Delay line that pads the pipeline to LATENCY cycles.
  logic      pad_vld [PAD];
  adam_out_t pad_dat [PAD];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(PAD); i++) pad_vld[i] <= 1'b0;
    end else begin
      pad_vld[0] <= vld[ARITH_STAGES];
      for (int i = 1; i < int'(PAD); i++) pad_vld[i] <= pad_vld[i-1];
    end
  end

  always_ff @(posedge clk) begin
    pad_dat[0] <= s11;
    for (int i = 1; i < int'(PAD); i++) pad_dat[i] <= pad_dat[i-1];
  end

  assign out_valid = pad_vld[PAD-1];
  assign out       = pad_dat[PAD-1];

endmodule
