// tb_image_writer: writes every pixel of a random 16 x 16 image, in random order
// and with gaps, into a behavioural SRAM and checks each byte at row*C+col.
module tb_image_writer;
  import rcfg_pkg::*;
  localparam int C = 16, R = 16;
  logic clk = 0, rst_n = 1;
  logic in_valid;
  logic [3:0] in_row, in_col;
  logic [7:0] in_pix;
  mem_req_t mem;
  logic [31:0] rdata;
  int checks = 0, failures = 0;
  int img [256], order [256];

  image_writer #(.C(C), .R(R)) dut (.*);
  sram_model u_mem (.clk, .req(mem), .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; in_row = 0; in_col = 0; in_pix = 0;
    for (int i = 0; i < 256; i++) begin img[i] = $urandom_range(0, 255); order[i] = i; end
    order.shuffle();
    #2 rst_n = 0;
    #30 rst_n = 1;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      in_valid = 1; in_row = 4'(order[i] / 16); in_col = 4'(order[i] % 16); in_pix = 8'(img[order[i]]);
      if ($urandom_range(0, 2) == 0) begin @(negedge clk); in_valid = 0; end
    end
    @(negedge clk); in_valid = 0;
    repeat (3) @(negedge clk);
    for (int i = 0; i < 256; i++) begin
      checks++;
      if (int'(u_mem.mem[i / 4][8 * (i % 4) +: 8]) != img[i]) failures++;
    end
    checks++; if (u_mem.mem[64] != 0) failures++;   // nothing written past the image
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
