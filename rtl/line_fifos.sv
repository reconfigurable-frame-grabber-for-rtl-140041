// line_fifos: the FIFOs module. Builds a KxK pixel window from a raster pixel stream.
//
// K-1 line buffers of C pixels hold the K-1 lines above the incoming one. When a
// pixel at column x is accepted, the buffers are read at x, giving the column of K
// pixels from line y-K+1 down to line y; that column shifts into a KxK register
// window from the right, and each buffer takes at x the pixel of the line below
// it (buffer 0 takes the new pixel), so the buffers form a chain of line FIFOs.
// Processing therefore starts once K-1 lines have been read and then keeps pace
// with the camera, one window per accepted pixel.
//
// A window is output only when it lies entirely inside the frame: for input pixel
// (y, x) with y >= K-1 and x >= K-1, centred on pixel (y-(K-1)/2, x-(K-1)/2). The
// outermost (K-1)/2 rows and columns of the frame produce no window. out_last marks
// the window made by the frame's last pixel (R-1, C-1). Pixels of a line must come
// in column order; in_col addresses the buffers.
//
// Window layout: out_win[r*K+k] is row r (0 = oldest line) and column k (0 = oldest
// column), i.e. a1..a9 read row by row for K = 3.
//
// Timing: one pixel per cycle at most; the window is registered, so it appears the
// cycle after its last pixel is accepted. in_ready = !out_valid || out_ready.
//
// The chain of K-1 line FIFOs and the start after K-1 lines follow the design; the
// border rule and the handshake are this design's own. Each line buffer is a RAM
// of C positions of 8 bits (1024 x 8 at the default size). The prototype used six
// such RAMs alternating between odd and even lines; this plain chain needs K-1.
module line_fifos
  import rcfg_pkg::*;
#(
  parameter int C = 1024,
  parameter int R = 1024,
  parameter int K = 3,
  localparam int CW = $clog2(C),
  localparam int RW = $clog2(R)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       in_valid,
  output logic                       in_ready,
  input  logic [PIX_W-1:0]           in_pix,
  input  logic [RW-1:0]              in_row,
  input  logic [CW-1:0]              in_col,
  output logic                       out_valid,
  input  logic                       out_ready,
  output logic [K*K-1:0][PIX_W-1:0]  out_win,
  output logic [RW-1:0]              out_row,
  output logic [CW-1:0]              out_col,
  output logic                       out_last
);

  localparam int HALF = (K - 1) / 2;

  logic [PIX_W-1:0] lbuf [K-1][C];     // lbuf[0] = line y-1, lbuf[K-2] = line y-K+1
  logic [K-1:0][PIX_W-1:0] column;      // column[r], r = 0 oldest line

  wire accept = in_valid && in_ready;
  assign in_ready = !out_valid || out_ready;

  always_comb begin
    for (int r = 0; r < K - 1; r++) column[r] = lbuf[K-2-r][in_col];
    column[K-1] = in_pix;
  end

  always_ff @(posedge clk) begin
    if (accept) begin
      lbuf[0][in_col] <= in_pix;
      for (int j = 1; j < K - 1; j++) lbuf[j][in_col] <= lbuf[j-1][in_col];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_win   <= '0;
      out_row   <= '0;
      out_col   <= '0;
      out_last  <= 1'b0;
    end else begin
      if (accept) begin
        for (int r = 0; r < K; r++) begin
          for (int k = 0; k < K - 1; k++) out_win[r*K+k] <= out_win[r*K+k+1];
          out_win[r*K+K-1] <= column[r];
        end
        out_valid <= (in_row >= RW'(K - 1)) && (in_col >= CW'(K - 1));
        out_row   <= in_row - RW'(K - 1 - HALF);
        out_col   <= in_col - CW'(K - 1 - HALF);
        out_last  <= (in_row == RW'(R - 1)) && (in_col == CW'(C - 1));
      end else if (out_ready) begin
        out_valid <= 1'b0;
      end
    end
  end

  // a stalled window stays valid and unchanged until it is taken
  assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out_win) && $stable(out_row) && $stable(out_col));

endmodule
