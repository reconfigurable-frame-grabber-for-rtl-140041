// camera_data_if: camera data interface of the frame-grabber.
//
// Receives the line-scan camera's 8-bit pixels (cam_dval marks a pixel, cam_lval
// is high for the length of a line) and numbers each pixel by its column within
// the line and its line within the frame; a frame is R consecutive lines. A line
// is captured only if enable was high when it started, so that capture never
// starts in the middle of a line; dropping enable also restarts the frame at line
// 0. Pixels past column C-1 are ignored. Captured pixels enter a DEPTH-entry FIFO
// read with a valid/ready handshake, which absorbs the difference between the
// camera's pixel rate and the 2 cycles per pixel of the histogram stage over a
// line; a pixel that finds the FIFO full is dropped and pulses overflow.
//
// The camera is assumed to be sampled in the system clock domain (one pixel per
// cycle at most). Line and frame numbering, the FIFO and its overflow flag are
// this design's own choices; the pixel format and frame size follow the design's
// prototype (8-bit pixels, 1024 x 1024 frames).
module camera_data_if
  import rcfg_pkg::*;
#(
  parameter int C     = 1024,
  parameter int R     = 1024,
  parameter int DEPTH = 16,
  localparam int CW = $clog2(C),
  localparam int RW = $clog2(R)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             enable,
  input  logic [PIX_W-1:0] cam_pix,
  input  logic             cam_dval,
  input  logic             cam_lval,
  output logic             out_valid,
  input  logic             out_ready,
  output logic [PIX_W-1:0] out_pix,
  output logic [RW-1:0]    out_row,
  output logic [CW-1:0]    out_col,
  output logic             overflow
);

  typedef struct packed {
    logic [PIX_W-1:0] pix;
    logic [RW-1:0]    row;
    logic [CW-1:0]    col;
  } entry_t;

  localparam int PW = $clog2(DEPTH);

  logic          lval_q;
  logic          capture;      // current line is being captured
  logic          line_seen;    // current line delivered at least one pixel
  logic [CW:0]   col_cnt;
  logic [RW-1:0] row_cnt;

  entry_t        fifo [DEPTH];
  logic [PW-1:0] wr_ptr, rd_ptr;
  logic [PW:0]   count;

  logic push, pop, full;

  // Line start is seen in the cycle lval rises; that cycle may already carry column 0.
  wire          line_start = cam_lval && !lval_q;
  wire          cap_now    = line_start ? enable : capture;
  wire [CW:0]   col_now    = line_start ? '0 : col_cnt;
  wire          take       = cap_now && cam_lval && cam_dval && (col_now < (CW+1)'(C));

  assign full = (count == (PW+1)'(DEPTH));
  assign pop  = out_valid && out_ready;
  assign push = take && (!full || pop);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lval_q    <= 1'b0;
      capture   <= 1'b0;
      line_seen <= 1'b0;
      col_cnt   <= '0;
      row_cnt   <= '0;
      overflow  <= 1'b0;
    end else begin
      lval_q   <= cam_lval;
      overflow <= take && !push;
      capture  <= cap_now;
      if (line_start) line_seen <= 1'b0;
      col_cnt  <= take ? col_now + 1'b1 : col_now;
      if (take) line_seen <= 1'b1;
      if (!cam_lval && lval_q && capture && line_seen) begin
        // end of a captured line: advance the line number, wrap at R
        row_cnt <= (row_cnt == RW'(R - 1)) ? '0 : row_cnt + 1'b1;
      end
      if (!enable) row_cnt <= '0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (push) begin
        fifo[wr_ptr] <= '{pix: cam_pix, row: row_cnt, col: col_now[CW-1:0]};
        wr_ptr <= (wr_ptr == PW'(DEPTH - 1)) ? '0 : wr_ptr + 1'b1;
      end
      if (pop) rd_ptr <= (rd_ptr == PW'(DEPTH - 1)) ? '0 : rd_ptr + 1'b1;
      count <= count + (PW+1)'(push) - (PW+1)'(pop);
    end
  end

  assign out_valid = (count != '0);
  assign out_pix   = fifo[rd_ptr].pix;
  assign out_row   = fifo[rd_ptr].row;
  assign out_col   = fifo[rd_ptr].col;

  // a pixel offered to the pipeline stays offered, unchanged, until it is taken
  assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out_pix) && $stable(out_row) && $stable(out_col));

endmodule
