// feature_unit: one pre-processing channel, a pixel feature computed from a KxK window.
//
// With c the window's centre pixel and n the neighbour cfg.nbr (0 = a1, the
// top-left pixel, counting row by row), the operations are:
//   OP_IDENT    c >> shift                        grey-level histogram
//   OP_ADD      (c + n) >> shift                  sum histogram, 0..510 before shift
//   OP_SUB      (c - n + 255) >> shift            difference histogram, offset binary
//   OP_ABSDIFF  |c - n| >> shift                  absolute difference (DIFFX, DIFFY, ...)
//   OP_CONCAT   {c >> shift, n >> shift}          cooccurrence pair (G = 256 >> shift levels)
//   OP_CONV     |sum_i kernel[i] * a_i| >> shift  generic KxK convolution, e.g. a gradient
// The result saturates at the largest OUT_W-bit value. For K = 3 the neighbours at
// distance 1 are a6 (0 degrees), a3 (45), a2 (90) and a1 (135).
//
// The operation set follows the design's table of measures (identity, addition,
// subtraction, absolute value, concatenation, convolution); the encodings, the
// offset of SUB, the shift and the saturation are this design's own.
// Purely combinational.
module feature_unit
  import rcfg_pkg::*;
#(
  parameter int K     = 3,
  parameter int OUT_W = 8
) (
  input  logic [K*K-1:0][PIX_W-1:0]         win,
  input  feat_cfg_t                         cfg,
  input  logic [K*K-1:0][COEF_W-1:0]        kernel,   // two's complement coefficients
  output logic [OUT_W-1:0]                  feat
);

  localparam int CENTRE = (K * K - 1) / 2;
  localparam int RAW_W  = 24;

  logic [PIX_W-1:0]        c, n;
  logic [RAW_W-1:0]        raw;
  logic signed [RAW_W-1:0] acc;
  logic [PIX_W-1:0]        cs, ns;
  logic signed [RAW_W-1:0] k_i, p_i;

  always_comb begin
    c   = win[CENTRE];
    n   = (int'(cfg.nbr) < K * K) ? win[cfg.nbr] : win[CENTRE];
    cs  = c >> cfg.shift;
    ns  = n >> cfg.shift;
    acc = '0;
    for (int i = 0; i < K * K; i++) begin
      k_i = RAW_W'($signed(kernel[i]));
      p_i = RAW_W'(win[i]);
      acc = acc + k_i * p_i;
    end
    unique case (cfg.op)
      OP_IDENT:   raw = RAW_W'(c) >> cfg.shift;
      OP_ADD:     raw = (RAW_W'(c) + RAW_W'(n)) >> cfg.shift;
      OP_SUB:     raw = (RAW_W'(c) + RAW_W'(255) - RAW_W'(n)) >> cfg.shift;
      OP_ABSDIFF: raw = ((c >= n) ? RAW_W'(c - n) : RAW_W'(n - c)) >> cfg.shift;
      OP_CONCAT:  raw = (RAW_W'(cs) << (PIX_W - int'(cfg.shift))) | RAW_W'(ns);
      OP_CONV:    raw = ((acc < 0) ? RAW_W'(-acc) : RAW_W'(acc)) >> cfg.shift;
      default:    raw = '0;
    endcase
    feat = (raw > RAW_W'({OUT_W{1'b1}})) ? {OUT_W{1'b1}} : raw[OUT_W-1:0];
  end

endmodule
