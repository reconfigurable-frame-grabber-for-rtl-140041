// tb_camera_data_if: drives camera lines (line valid, data valid with gaps) into
// an 8-pixel, 4-line interface and checks the pixels and their line/column
// numbers through two frames, the wrap of the line number at R, that a line
// begun while disabled is not captured, and overflow when the reader stalls.
module tb_camera_data_if;
  import rcfg_pkg::*;
  localparam int C = 8, R = 4, D = 4;

  logic clk = 0, rst_n = 1;
  logic enable, cam_dval, cam_lval, out_valid, out_ready, overflow;
  logic [7:0] cam_pix, out_pix;
  logic [1:0] out_row;
  logic [2:0] out_col;
  int checks = 0, failures = 0, n_ovf = 0;
  int exp_pix [$], exp_rc [$];
  bit sink_on;

  camera_data_if #(.C(C), .R(R), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (overflow) n_ovf++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one camera line of C pixels, optionally with data-valid gaps
  task automatic line(input int row, input bit expect_it, input bit gaps);
    @(negedge clk); cam_lval = 1; cam_dval = 0;
    for (int c = 0; c < C; c++) begin
      @(negedge clk);
      while (gaps && $urandom_range(0, 1) == 0) begin cam_dval = 0; @(negedge clk); end
      cam_dval = 1; cam_pix = 8'($urandom_range(0, 255));
      if (expect_it) begin exp_pix.push_back(cam_pix); exp_rc.push_back(row * 8 + c); end
    end
    @(negedge clk); cam_dval = 0; cam_lval = 0;
    repeat (3) @(negedge clk);
  endtask

  initial begin
    enable = 0; cam_dval = 0; cam_lval = 0; cam_pix = 0; sink_on = 1;
    #2 rst_n = 0;
    #30 rst_n = 1;
    line(0, 0, 0);                       // disabled: ignored
    @(negedge clk); enable = 1;
    for (int f = 0; f < 2; f++)
      for (int r = 0; r < R; r++) line(r, 1, 1);
    repeat (10) @(negedge clk);
    checks++; if (exp_pix.size() != 0) failures++;
    checks++; if (n_ovf != 0) failures++;
    // stalled reader: a full line into a 4-entry FIFO overflows
    sink_on = 0;
    line(0, 0, 0);
    checks++; if (n_ovf != C - D) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    out_ready = 0;
    forever begin
      @(negedge clk);
      out_ready = sink_on && ($urandom_range(0, 3) != 0);
      #1;
      if (out_valid && out_ready) begin
        int p, rc;
        p = exp_pix.pop_front(); rc = exp_rc.pop_front();
        checks++;
        if (int'(out_pix) != p || int'(out_row) != rc / 8 || int'(out_col) != rc % 8) begin
          failures++;
          $display("got %0d at %0d,%0d want %0d at %0d,%0d", out_pix, out_row, out_col, p, rc / 8, rc % 8);
        end
      end
    end
  end
endmodule
