// address_gen: address generator of one histogram buffer.
//
// Every frame of R x C pixels is divided into sub-windows of S x S pixels, S = 2^log2s,
// and each sub-window has its own histogram of 2^BIN_W bins in the buffer. For a
// pixel at (row, col) with feature value bin, the address of the bin to increment is
//   win  = (row >> log2s) * ceil(C / S) + (col >> log2s)
//   addr = win * 2^BIN_W + bin
// so histograms lie one after another in sub-window raster order, one 32-bit word
// per bin. addr_err flags an address beyond the 2^BANK_AW words of a bank (for
// instance 16 x 16 sub-windows of a 1024 x 1024 frame with 256 bins need 1M words);
// the caller then drops the increment.
//
// Taking the pixel's sub-window into account so that all sub-windows' histograms
// build up in one pass follows the design; the memory layout is this design's own.
// Purely combinational.
module address_gen
  import rcfg_pkg::*;
#(
  parameter int C     = 1024,
  parameter int R     = 1024,
  parameter int BIN_W = 8,
  localparam int CW = $clog2(C),
  localparam int RW = $clog2(R)
) (
  input  logic [RW-1:0]      row,
  input  logic [CW-1:0]      col,
  input  logic [2:0]         log2s,
  input  logic [BIN_W-1:0]   bin,
  output logic [BANK_AW-1:0] addr,
  output logic               addr_err
);

  localparam int FW = RW + CW + BIN_W + 2;

  logic [FW-1:0] wins_per_row, win, full;

  always_comb begin
    wins_per_row = (FW'(C) + (FW'(1) << log2s) - FW'(1)) >> log2s;
    win          = (FW'(row) >> log2s) * wins_per_row + (FW'(col) >> log2s);
    full         = (win << BIN_W) | FW'(bin);
    addr         = full[BANK_AW-1:0];
    addr_err     = (full >> BANK_AW) != '0;
  end

endmodule
