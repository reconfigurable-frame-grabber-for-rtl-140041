// tb_feature_unit: random windows and configurations for every pre-processing
// operation, compared with the integer reference model; includes saturation.
module tb_feature_unit;
  import rcfg_pkg::*;
  import rcfg_ref_pkg::*;

  logic [8:0][7:0] win;
  feat_cfg_t       cfg;
  logic [8:0][7:0] kernel;
  logic [7:0]      feat8;
  logic [9:0]      feat10;
  int checks = 0, failures = 0;
  int w[9], k[9];
  int ops[6] = '{0, 1, 2, 3, 4, 5};

  feature_unit #(.K(3), .OUT_W(8))  dut8  (.win, .cfg, .kernel, .feat(feat8));
  feature_unit #(.K(3), .OUT_W(10)) dut10 (.win, .cfg, .kernel, .feat(feat10));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 3000; t++) begin
      int op, nbr, sh, e8, e10;
      op  = ops[t % 6];
      nbr = $urandom_range(0, 8);
      sh  = (op == 4) ? $urandom_range(3, 4) : $urandom_range(0, 2);
      for (int i = 0; i < 9; i++) begin
        w[i] = (t % 7 == 0) ? 255 : $urandom_range(0, 255);
        k[i] = $signed(8'($urandom_range(0, 255)));
        if (t % 3 == 0) k[i] = k[i] % 3;
        win[i]    = 8'(w[i]);
        kernel[i] = 8'(k[i]);
      end
      cfg.op = op_e'(op); cfg.nbr = 4'(nbr); cfg.shift = 4'(sh);
      #1;
      e8  = ref_feat(w, op, nbr, sh, k, 8);
      e10 = ref_feat(w, op, nbr, sh, k, 10);
      checks += 2;
      if (int'(feat8) != e8 || int'(feat10) != e10) begin
        failures++;
        if (failures < 10) $display("mismatch op=%0d nbr=%0d sh=%0d: got %0d/%0d want %0d/%0d",
                                    op, nbr, sh, feat8, feat10, e8, e10);
      end
    end
    // a few fixed cases: a vertical edge through a horizontal-gradient kernel
    for (int i = 0; i < 9; i++) begin
      win[i] = (i % 3 == 2) ? 8'd200 : 8'd10;
      kernel[i] = (i % 3 == 0) ? 8'hFF : (i % 3 == 2) ? 8'd1 : 8'd0;
    end
    cfg = '{shift: 4'd0, nbr: 4'd0, op: OP_CONV};
    #1; checks++; if (feat10 != 10'd570 || feat8 != 8'd255) failures++;
    cfg = '{shift: 4'd2, nbr: 4'd0, op: OP_CONV};
    #1; checks++; if (feat8 != 8'd142) failures++;
    cfg = '{shift: 4'd0, nbr: 4'd5, op: OP_SUB};
    #1; checks++; if (feat10 != 10'd65) failures++;   // 10 - 200 + 255
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
