// rcfg_pkg: types and constants shared by the reconfigurable frame-grabber (RCFG).
//
// The frame-grabber turns a camera pixel stream into per-sub-window histograms of
// pixel features. This package holds what several of its modules agree on:
//   * the pre-processing operations of the feature channels (identity, sum,
//     difference, absolute difference, concatenation of two grey levels and a
//     generic KxK convolution), after the operations the design is specified with;
//   * the per-channel configuration word (operation, neighbour, right shift);
//   * the request a module drives onto one external asynchronous SRAM bank;
//   * the host register map of rcfg_ctrl.
// Bank geometry follows the prototype board: 2 Mbyte banks of 32-bit words, so a
// word address of 19 bits. The encodings and the register map are this design's own.
package rcfg_pkg;

  localparam int PIX_W   = 8;    // grey-level pixels, 256 levels
  localparam int DATA_W  = 32;   // SRAM word and histogram bin width
  localparam int BANK_AW = 19;   // 2 Mbyte bank = 512K 32-bit words
  localparam int COEF_W  = 8;    // signed convolution coefficient

  // Pre-processing operation of one feature channel. c = centre pixel of the
  // window, n = the neighbour selected by feat_cfg_t.nbr.
  typedef enum logic [2:0] {
    OP_IDENT   = 3'd0,  // c                       (grey-level histogram)
    OP_ADD     = 3'd1,  // c + n                   (sum histogram)
    OP_SUB     = 3'd2,  // c - n + 255             (difference histogram, offset binary)
    OP_ABSDIFF = 3'd3,  // |c - n|                 (DIFFX / DIFFY style histograms)
    OP_CONCAT  = 3'd4,  // {c >> shift, n >> shift} (cooccurrence histogram)
    OP_CONV    = 3'd5   // |sum(coef_i * a_i)|     (edginess histogram)
  } op_e;

  // Per-channel configuration. nbr indexes the window (0 = a1 top-left, row-major),
  // shift is a right shift applied to the result (to each grey level for CONCAT).
  typedef struct packed {
    logic [3:0] shift;
    logic [3:0] nbr;
    op_e        op;
  } feat_cfg_t;

  // One cycle's request to an asynchronous SRAM bank. be selects byte lanes of a
  // write (8-bit accesses use one lane); oe requests a read whose data returns in
  // the same cycle.
  typedef struct packed {
    logic [BANK_AW-1:0] addr;
    logic [DATA_W-1:0]  wdata;
    logic [3:0]         be;
    logic               we;
    logic               oe;
  } mem_req_t;

  localparam mem_req_t MEM_IDLE = '{addr: '0, wdata: '0, be: '0, we: 1'b0, oe: 1'b0};

  // Host register map (word registers, 8-bit register address).
  localparam logic [7:0] REG_CTRL      = 8'h00;  // [0] enable, [6:4] log2 of window size S
  localparam logic [7:0] REG_STATUS    = 8'h01;  // [0] stage, [1] overrun, [2] camera overflow,
                                                 // [3] address error, [4] host conflict,
                                                 // [31:16] frame count; write 1 to clear [4:1]
  localparam logic [7:0] REG_HOST_DONE = 8'h02;  // write: host has finished with its banks
  localparam logic [7:0] REG_FCFG_BASE = 8'h10;  // + channel: op [2:0], nbr [7:4], shift [11:8]
  localparam logic [7:0] REG_KERN_BASE = 8'h40;  // + channel*K*K + i: coefficient in [7:0]

endpackage
