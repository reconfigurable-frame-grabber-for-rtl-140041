// tb_preproc: two feature channels and the image channel on random windows with
// random output stalls; checks each registered result against the reference
// model and that coordinates and last flag travel with it, in order.
module tb_preproc;
  import rcfg_pkg::*;
  import rcfg_ref_pkg::*;
  localparam int C = 16, R = 16, K = 3, N = 2;

  logic clk = 0, rst_n = 1;
  feat_cfg_t cfg [N+1];
  logic [8:0][7:0] kernel [N+1];
  logic in_valid, in_ready, in_last, out_valid, out_ready, out_last;
  logic [8:0][7:0] in_win;
  logic [3:0] in_row, in_col, out_row, out_col;
  logic [N-1:0][7:0] out_feat;
  logic [7:0] out_img;
  int checks = 0, failures = 0;
  int wins [500][9];
  int kk [N+1][9];
  int opv [N+1], nbv [N+1], shv [N+1];

  preproc #(.C(C), .R(R), .K(K), .N_HIST(N), .BIN_W(8)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    opv = '{4, 3, 5}; nbv = '{5, 1, 0}; shv = '{4, 0, 1};
    for (int ch = 0; ch <= N; ch++) begin
      cfg[ch] = '{shift: 4'(shv[ch]), nbr: 4'(nbv[ch]), op: op_e'(opv[ch])};
      for (int i = 0; i < 9; i++) begin
        kk[ch][i] = (i % 3 == 0) ? -1 : (i % 3 == 2) ? 1 : 0;
        if (i / 3 == 1) kk[ch][i] = kk[ch][i] * 2;
        kernel[ch][i] = 8'(kk[ch][i]);
      end
    end
    in_valid = 0; in_last = 0; in_win = '0; in_row = 0; in_col = 0;
    #2 rst_n = 0;
    #30 rst_n = 1;
    for (int t = 0; t < 500; t++) begin
      int w[9];
      for (int i = 0; i < 9; i++) w[i] = $urandom_range(0, 255);
      @(negedge clk);
      for (int i = 0; i < 9; i++) in_win[i] = 8'(w[i]);
      in_valid = 1; in_row = 4'(t / 16); in_col = 4'(t % 16); in_last = (t == 499);
      wins[t] = w;
      #1;
      while (!in_ready) begin @(negedge clk); #1; end
      @(posedge clk); #1;
      in_valid = 0;
      if ($urandom_range(0, 1) == 0) @(posedge clk);
    end
  end

  initial begin
    int n_out = 0;
    out_ready = 0;
    forever begin
      @(negedge clk);
      out_ready = ($urandom_range(0, 2) != 0);
      #1;
      if (out_valid && out_ready) begin
        int w[9], t;
        t = n_out; w = wins[t];
        for (int ch = 0; ch < N; ch++) begin
          checks++;
          if (int'(out_feat[ch]) != ref_feat(w, opv[ch], nbv[ch], shv[ch], kk[ch], 8)) begin
            failures++;
            if (failures < 5) $display("ch%0d got %0d want %0d", ch, out_feat[ch], ref_feat(w, opv[ch], nbv[ch], shv[ch], kk[ch], 8));
          end
        end
        checks++;
        if (int'(out_img) != ref_feat(w, opv[N], nbv[N], shv[N], kk[N], 8)) failures++;
        checks++;
        if (int'(out_row) != (t / 16) % 16 || int'(out_col) != t % 16 || out_last != (t == 499)) failures++;
        n_out++;
        if (n_out == 500) begin
          $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
          $finish;
        end
      end
    end
  end
endmodule
