// image_writer: stores the processed image in its SRAM bank.
//
// Each processed pixel (row, col, 8-bit value) is written to byte address
// row * C + col of the image bank with an 8-bit access: word address = byte
// address / 4, and the byte enable selects lane (byte address mod 4) of the
// 32-bit word (the value is replicated on all four lanes). A 1024 x 1024 frame
// fills 1 Mbyte of the 2 Mbyte bank.
//
// Timing: the pixel is registered when in_valid is high and written in the next
// cycle, one write per cycle at most, never stalling.
//
// Storing the processed frame, one byte per pixel in 8-bit access mode, in its own
// bank follows the design; the raster byte layout is this design's own.
module image_writer
  import rcfg_pkg::*;
#(
  parameter int C = 1024,
  parameter int R = 1024,
  localparam int CW = $clog2(C),
  localparam int RW = $clog2(R)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [RW-1:0]    in_row,
  input  logic [CW-1:0]    in_col,
  input  logic [PIX_W-1:0] in_pix,
  output mem_req_t         mem
);

  localparam int BW = BANK_AW + 2;

  logic [BW-1:0]    byte_addr;
  logic [PIX_W-1:0] pix_q;
  logic             wr_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_q      <= 1'b0;
      byte_addr <= '0;
      pix_q     <= '0;
    end else begin
      wr_q <= in_valid;
      if (in_valid) begin
        byte_addr <= BW'(in_row) * BW'(C) + BW'(in_col);
        pix_q     <= in_pix;
      end
    end
  end

  always_comb begin
    mem       = MEM_IDLE;
    mem.addr  = byte_addr[BW-1:2];
    mem.wdata = {4{pix_q}};
    mem.we    = wr_q;
    mem.be    = wr_q ? (4'b0001 << byte_addr[1:0]) : 4'b0000;
  end

endmodule
