// axdimm_pkg: widths, bus types and register maps shared by the AXDIMM FPGA
// design (channel arbiter, Adam kernel and top level).
//
// The fabric runs at 200 MHz with a 512-bit data path, the width the host-side
// PHY delivers after deserialising the 400 MHz DDR4 interface. Each of the two
// DRAM channels holds 16 GB, so a channel byte address is 34 bits wide. The
// arbiter and the kernel talk AXI4; the AXI4 channels are carried here as
// request/response structs (one struct per direction) so that a port list
// stays short. ID width, the register maps and the address of the arbiter's
// register window are this design's own choices.
package axdimm_pkg;

  localparam int DATA_W   = 512;           // fabric data width (bits)
  localparam int STRB_W   = DATA_W / 8;    // byte strobes per beat
  localparam int LANES    = DATA_W / 32;   // FP32 values per beat (16)
  localparam int ADDR_W   = 34;            // 16 GB per channel
  localparam int ID_W     = 4;
  localparam int BEAT_B   = DATA_W / 8;    // bytes per beat (64)
  localparam int CSR_W    = 64;            // register width

  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [DATA_W-1:0] data_t;
  typedef logic [STRB_W-1:0] strb_t;
  typedef logic [ID_W-1:0]   id_t;
  typedef logic [CSR_W-1:0]  csr_t;

  // AXI4 address channel (AW and AR share the layout)
  typedef struct packed {
    id_t        id;
    addr_t      addr;
    logic [7:0] len;
    logic [2:0] size;
    logic [1:0] burst;
  } axi_ax_t;

  typedef struct packed {
    data_t data;
    strb_t strb;
    logic  last;
  } axi_w_t;

  typedef struct packed {
    id_t        id;
    logic [1:0] resp;
  } axi_b_t;

  typedef struct packed {
    id_t        id;
    data_t      data;
    logic [1:0] resp;
    logic       last;
  } axi_r_t;

  // manager -> subordinate
  typedef struct packed {
    logic    aw_valid;
    axi_ax_t aw;
    logic    w_valid;
    axi_w_t  w;
    logic    b_ready;
    logic    ar_valid;
    axi_ax_t ar;
    logic    r_ready;
  } axi_req_t;

  // subordinate -> manager
  typedef struct packed {
    logic   aw_ready;
    logic   w_ready;
    logic   b_valid;
    axi_b_t b;
    logic   ar_ready;
    logic   r_valid;
    axi_r_t r;
  } axi_rsp_t;

  localparam logic [2:0] AXI_SIZE_64B = 3'd6;
  localparam logic [1:0] AXI_BURST_INCR = 2'b01;

  // Arbiter modes
  typedef enum logic {MODE_NORMAL = 1'b0, MODE_ACCEL = 1'b1} arb_mode_e;

  // Host requests reach the arbiter's own registers when every address bit
  // above bit 11 is one: the last 4 KB of each channel. One register per
  // 64-byte line; the value sits in the low 64 bits of the line.
  localparam int ARB_WIN_LSB = 12;
  localparam int REG_IDX_LSB = 6;
  localparam int REG_IDX_W   = 6;

  typedef enum logic [REG_IDX_W-1:0] {
    ARB_MODE   = 6'd0,   // W: requested mode (bit 0); R: {pending, current mode}
    ARB_STATUS = 6'd1    // R: {late-read count[31:0]}, {overflow count} in [63:32]
  } arb_reg_e;

  // Adam kernel registers (reached in acceleration mode)
  typedef enum logic [REG_IDX_W-1:0] {
    K_CTRL      = 6'd0,   // W: bit 0 = start
    K_STATUS    = 6'd1,   // R: bit 0 busy, bit 1 done
    K_THETA_IN  = 6'd2,
    K_GRAD_IN   = 6'd3,
    K_M_IN      = 6'd4,
    K_V_IN      = 6'd5,
    K_THETA_OUT = 6'd6,
    K_M_OUT     = 6'd7,
    K_V_OUT     = 6'd8,
    K_NPARAMS   = 6'd9,
    K_LR        = 6'd10,  // gamma, FP32
    K_BETA1     = 6'd11,
    K_BETA2     = 6'd12,
    K_LAMBDA    = 6'd13,  // weight decay, FP32
    K_EPS       = 6'd14,
    K_STEP      = 6'd15,  // t, unsigned integer
    K_CYCLES    = 6'd16   // R: cycles taken by the last run
  } k_reg_e;

  // Constants broadcast to every Adam functional unit during a run
  typedef struct packed {
    logic [31:0] lr;          // gamma
    logic [31:0] beta1;
    logic [31:0] beta2;
    logic [31:0] omb1;        // 1 - beta1
    logic [31:0] omb2;        // 1 - beta2
    logic [31:0] lambda;
    logic [31:0] eps;
    logic [31:0] bc1;         // 1 - beta1^t
    logic [31:0] bc2;         // 1 - beta2^t
  } adam_const_t;

  // One lane's operands and results
  typedef struct packed {
    logic [31:0] theta;
    logic [31:0] grad;
    logic [31:0] m;
    logic [31:0] v;
  } adam_in_t;

  typedef struct packed {
    logic [31:0] theta;
    logic [31:0] m;
    logic [31:0] v;
  } adam_out_t;

endpackage
