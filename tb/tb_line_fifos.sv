// tb_line_fifos: streams two 8 x 10 frames with random input gaps and random
// output stalls through a 3x3 window builder; checks every window against the
// frame, the window count per frame, the centre coordinates and the last flag.
module tb_line_fifos;
  import rcfg_pkg::*;
  localparam int C = 10, R = 8, K = 3;

  logic clk = 0, rst_n = 1;
  logic in_valid, in_ready, out_valid, out_ready, out_last;
  logic [7:0] in_pix;
  logic [2:0] in_row, out_row;
  logic [3:0] in_col, out_col;
  logic [K*K-1:0][7:0] out_win;
  int checks = 0, failures = 0;
  int img [2][R][C];
  int nwin, frame_out, exp_r, exp_c;

  line_fifos #(.C(C), .R(R), .K(K)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // source
  initial begin
    in_valid = 0; in_pix = 0; in_row = 0; in_col = 0;
    for (int f = 0; f < 2; f++)
      for (int r = 0; r < R; r++)
        for (int c = 0; c < C; c++) img[f][r][c] = $urandom_range(0, 255);
    #2 rst_n = 0;
    #30 rst_n = 1;
    for (int f = 0; f < 2; f++)
      for (int r = 0; r < R; r++)
        for (int c = 0; c < C; c++) begin
          @(negedge clk);
          while ($urandom_range(0, 3) == 0) @(negedge clk);
          in_valid = 1; in_pix = 8'(img[f][r][c]); in_row = 3'(r); in_col = 4'(c);
          #1;
          while (!in_ready) begin @(negedge clk); #1; end
          @(posedge clk); #1;
          in_valid = 0;
        end
  end

  // sink
  initial begin
    out_ready = 0; nwin = 0; frame_out = 0; exp_r = 1; exp_c = 1;
    forever begin
      @(negedge clk);
      out_ready = ($urandom_range(0, 2) != 0);
      #1;
      if (out_valid && out_ready) begin
        checks++;
        if (int'(out_row) != exp_r || int'(out_col) != exp_c) begin
          failures++;
          $display("coord got %0d,%0d want %0d,%0d", out_row, out_col, exp_r, exp_c);
        end
        for (int i = 0; i < 9; i++) begin
          checks++;
          if (int'(out_win[i]) != img[frame_out][exp_r - 1 + i / 3][exp_c - 1 + i % 3]) failures++;
        end
        checks++;
        if (out_last != (exp_r == R - 2 && exp_c == C - 2)) failures++;
        nwin++;
        exp_c++;
        if (exp_c == C - 1) begin exp_c = 1; exp_r++; end
        if (exp_r == R - 1) begin
          checks++;
          if (nwin != (R - 2) * (C - 2)) failures++;
          nwin = 0; exp_r = 1; frame_out++;
          if (frame_out == 2) begin
            $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
            $finish;
          end
        end
      end
    end
  end
endmodule
