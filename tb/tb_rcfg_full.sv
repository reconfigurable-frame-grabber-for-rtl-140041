// tb_rcfg_full: the frame-grabber at its default size, 1024 x 1024 frames, one
// 256-bin histogram per sub-window, four 2 Mbyte SRAM banks.
//
// The camera model sends three frames at one pixel every 2 cycles with a 2-cycle
// gap between lines, the rate the histogram stage sustains. Frame 0 is the
// prototype's measure: grey-level histograms of 64 x 64 sub-windows (256 windows,
// 256 KB of bins) with a Sobel-filtered image. Frame 1 takes cooccurrence
// histograms (16 grey levels, 0 degrees) of 32 x 32 sub-windows. Frame 2 asks for
// 16 x 16 sub-windows, whose 4096 histograms do not fit a bank: the address-error
// flag must rise. The host model checks every bin through the host port and
// clears it; the image is checked in the bank. No camera pixel may be lost, and
// a frame must finish within 2 cycles per pixel plus the line gaps.
module tb_rcfg_full;
  import rcfg_pkg::*;
  import rcfg_ref_pkg::*;
  localparam int C = 1024, R = 1024, NB = 4, NFR = 3, GAP = 2;

  logic clk = 0, rst_n = 1;
  logic [7:0] cam_pix;
  logic cam_dval, cam_lval;
  logic [7:0] reg_addr;
  logic [31:0] reg_wdata, reg_rdata;
  logic reg_we, irq_frame;
  logic [1:0] host_bank;
  mem_req_t host_req;
  logic [31:0] host_rdata;
  logic host_grant;
  mem_req_t bank_req [NB];
  logic [31:0] bank_rdata [NB];

  rcfg_top dut (.*);

  sram_model u_b0 (.clk, .req(bank_req[0]), .rdata(bank_rdata[0]));
  sram_model u_b1 (.clk, .req(bank_req[1]), .rdata(bank_rdata[1]));
  sram_model u_b2 (.clk, .req(bank_req[2]), .rdata(bank_rdata[2]));
  sram_model u_b3 (.clk, .req(bank_req[3]), .rdata(bank_rdata[3]));

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_irq = 0, n_overflow = 0;
  int f_op [NFR][2], f_nbr [NFR][2], f_sh [NFR][2], f_l2s [NFR];
  int kern [9] = '{-1, 0, 1, -2, 0, 2, -1, 0, 1};
  longint cyc = 0, t_start [NFR], t_done [NFR];

  function automatic int pix(input int f, input int r, input int c);
    int unsigned x;
    x = f * 1000003 + r * 1031 + c * 7;
    x = x * 1103515245 + 12345;
    x = x ^ (x >> 13);
    x = x * 1103515245 + 12345;
    return int'((x >> 16) & 255);
  endfunction

  function automatic int feat_at(input int f, input int ch, input int r, input int c);
    int w[9];
    for (int i = 0; i < 9; i++) w[i] = pix(f, r - 1 + i / 3, c - 1 + i % 3);
    return ref_feat(w, f_op[f][ch], f_nbr[f][ch], f_sh[f][ch], kern, 8);
  endfunction

  initial begin
    repeat (8000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cyc++;
    if (irq_frame) begin t_done[n_irq] = cyc; n_irq++; end
    if (dut.u_cam.overflow) n_overflow++;
  end

  // camera
  initial begin
    cam_pix = 0; cam_dval = 0; cam_lval = 0;
    @(posedge rst_n);
    wait (dut.enable);
    repeat (20) @(negedge clk);
    for (int f = 0; f < NFR; f++) begin
      t_start[f] = cyc;
      for (int r = 0; r < R; r++) begin
        @(negedge clk); cam_lval = 1;
        for (int c = 0; c < C; c++) begin
          cam_dval = 1; cam_pix = 8'(pix(f, r, c));
          @(negedge clk); cam_dval = 0;
          if (c != C - 1) @(negedge clk);
        end
        cam_lval = 0;
        repeat (GAP - 1) @(negedge clk);
      end
    end
  end

  task automatic reg_wr(input logic [7:0] a, input int d);
    @(negedge clk); reg_addr = a; reg_wdata = 32'(d); reg_we = 1;
    @(negedge clk); reg_we = 0;
  endtask
  task automatic reg_rd(input logic [7:0] a, output int d);
    @(negedge clk); reg_addr = a; #1; d = int'(reg_rdata);
  endtask
  task automatic configure(input int f);
    for (int ch = 0; ch < 2; ch++)
      reg_wr(REG_FCFG_BASE + 8'(ch), (f_sh[f][ch] << 8) | (f_nbr[f][ch] << 4) | f_op[f][ch]);
    reg_wr(REG_CTRL, (f_l2s[f] << 4) | 1);
  endtask

  function automatic logic [7:0] img_byte(input int bank, input int ba);
    logic [31:0] w;
    case (bank)
      0: w = u_b0.mem[ba / 4];
      default: w = u_b2.mem[ba / 4];
    endcase
    return w[8 * (ba % 4) +: 8];
  endfunction

  initial begin
    int st, base, prev;
    int hist [];
    f_op[0] = '{0, 5}; f_nbr[0] = '{0, 0}; f_sh[0] = '{0, 2}; f_l2s[0] = 6;
    f_op[1] = '{4, 0}; f_nbr[1] = '{5, 0}; f_sh[1] = '{4, 0}; f_l2s[1] = 5;
    f_op[2] = '{0, 0}; f_nbr[2] = '{0, 0}; f_sh[2] = '{0, 0}; f_l2s[2] = 4;
    reg_addr = 0; reg_wdata = 0; reg_we = 0; host_bank = 0; host_req = MEM_IDLE;
    #2 rst_n = 0;
    #30 rst_n = 1;
    for (int i = 0; i < 9; i++) reg_wr(REG_KERN_BASE + 8'(9 + i), kern[i]);   // image channel
    configure(0);
    for (int f = 0; f < NFR; f++) begin
      int s, wpr, nw, bad;
      reg_rd(REG_STATUS, st);
      prev = st & 1;
      wait (n_irq > f);
      if (f + 1 < NFR) configure(f + 1);
      reg_rd(REG_STATUS, st);
      checks++; if ((st & 1) == prev) failures++;
      checks++; if ((st & 2) != 0) failures++;                    // host was in time
      checks++;
      if (f < 2 && (st & 8) != 0) failures++;                     // no address error ...
      if (f == 2 && (st & 8) == 0) failures++;                    // ... until 16 x 16 windows
      base = (st & 1) ? 0 : 2;
      // rate: 2 cycles per pixel, GAP cycles per line
      checks++;
      if (t_done[f] - t_start[f] > longint'(R) * (2 * C - 1 + GAP) + 200) begin
        failures++;
        $display("frame %0d took %0d cycles", f, t_done[f] - t_start[f]);
      end
      if (f < 2) begin
        s = 1 << f_l2s[f];
        wpr = C / s;
        nw = wpr * (R / s);
        hist = new[nw * 256];
        foreach (hist[i]) hist[i] = 0;
        bad = 0;
        for (int r = 1; r < R - 1; r++)
          for (int c = 1; c < C - 1; c++) begin
            hist[((r / s) * wpr + c / s) * 256 + feat_at(f, 0, r, c)]++;
            if (int'(img_byte(base, r * C + c)) != feat_at(f, 1, r, c)) bad++;
          end
        checks++; if (bad != 0) begin failures++; $display("frame %0d: %0d image bytes wrong", f, bad); end
        bad = 0;
        for (int a = 0; a < nw * 256; a++) begin
          @(negedge clk);
          host_bank = 2'(base + 1); host_req = MEM_IDLE; host_req.addr = BANK_AW'(a); host_req.oe = 1;
          #1;
          if (int'(host_rdata) != hist[a]) bad++;
          @(negedge clk);
          host_req.oe = 0; host_req.we = 1; host_req.be = 4'hF; host_req.wdata = '0;
        end
        @(negedge clk); host_req = MEM_IDLE;
        checks++; if (bad != 0) begin failures++; $display("frame %0d: %0d bins wrong", f, bad); end
      end
      reg_wr(REG_HOST_DONE, 1);
    end
    checks++; if (n_overflow != 0) failures++;
    $display("frame cycles: %0d %0d %0d", t_done[0] - t_start[0], t_done[1] - t_start[1], t_done[2] - t_start[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
