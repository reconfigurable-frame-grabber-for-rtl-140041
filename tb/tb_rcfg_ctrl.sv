// tb_rcfg_ctrl: writes and reads back every configuration register, then checks
// the stage flip, frame count and interrupt at each frame end, the overrun flag
// when the host has not released its banks, and the sticky status flags.
module tb_rcfg_ctrl;
  import rcfg_pkg::*;
  localparam int K = 3, N = 2;
  logic clk = 0, rst_n = 1;
  logic [7:0] reg_addr;
  logic [31:0] reg_wdata, reg_rdata;
  logic reg_we, frame_done, cam_overflow, addr_err, host_conflict, enable, stage, irq_frame;
  logic [2:0] log2s;
  feat_cfg_t cfg [N+1];
  logic [8:0][7:0] kernel [N+1];
  int checks = 0, failures = 0, n_irq = 0;

  rcfg_ctrl #(.K(K), .N_HIST(N)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (irq_frame) n_irq++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input int a, input int d);
    @(negedge clk); reg_addr = 8'(a); reg_wdata = 32'(d); reg_we = 1;
    @(negedge clk); reg_we = 0;
  endtask
  task automatic rd_check(input int a, input int d);
    @(negedge clk); reg_addr = 8'(a); #1;
    checks++;
    if (reg_rdata != 32'(d)) begin
      failures++;
      $display("reg %h = %h, want %h", a, reg_rdata, d);
    end
  endtask
  task automatic pulse(ref logic s);
    @(negedge clk); s = 1; @(negedge clk); s = 0;
  endtask

  initial begin
    reg_addr = 0; reg_wdata = 0; reg_we = 0;
    frame_done = 0; cam_overflow = 0; addr_err = 0; host_conflict = 0;
    #2 rst_n = 0;
    #30 rst_n = 1;
    rd_check(REG_CTRL, 32'h60);                       // reset: disabled, S = 64
    rd_check(REG_FCFG_BASE + 1, 0);
    wr(REG_CTRL, 32'h51);
    rd_check(REG_CTRL, 32'h51);
    checks++; if (!enable || log2s != 3'd5) failures++;
    for (int c = 0; c <= N; c++) begin
      wr(REG_FCFG_BASE + c, 32'h100 * c + 32'h50 + c);
      for (int i = 0; i < 9; i++) wr(REG_KERN_BASE + c * 9 + i, (c * 9 + i) * 7 - 40);
    end
    for (int c = 0; c <= N; c++) begin
      rd_check(REG_FCFG_BASE + c, 32'h100 * c + 32'h50 + c);
      checks++; if (cfg[c].op != op_e'(c) || cfg[c].nbr != 4'd5 || cfg[c].shift != 4'(c)) failures++;
      for (int i = 0; i < 9; i++) begin
        rd_check(REG_KERN_BASE + c * 9 + i, int'($signed(8'((c * 9 + i) * 7 - 40))));
        checks++; if ($signed(kernel[c][i]) != 8'((c * 9 + i) * 7 - 40)) failures++;
      end
    end
    // frame 1 ends: host had released (reset state) -> no overrun
    pulse(frame_done);
    rd_check(REG_STATUS, 32'h0001_0001);
    // frame 2 ends before the host writes HOST_DONE -> overrun
    pulse(frame_done);
    rd_check(REG_STATUS, 32'h0002_0002);
    wr(REG_HOST_DONE, 1);
    pulse(frame_done);
    rd_check(REG_STATUS, 32'h0003_0003);
    wr(REG_STATUS, 32'h2);                            // clear overrun
    rd_check(REG_STATUS, 32'h0003_0001);
    pulse(cam_overflow); pulse(addr_err); pulse(host_conflict);
    rd_check(REG_STATUS, 32'h0003_001D);
    wr(REG_STATUS, 32'h1C);
    rd_check(REG_STATUS, 32'h0003_0001);
    checks++; if (n_irq != 3) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
