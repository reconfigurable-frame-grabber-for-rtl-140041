// tb_rcfg_top: end-to-end test of the frame-grabber on 32 x 32 frames, two
// histograms per sub-window plus the processed image, six SRAM banks.
//
// A camera model sends line after line (one pixel every 2 cycles, line blanking
// between lines); a host model, woken by the frame interrupt, reconfigures the
// channels for the next frame, reads the finished image and histogram banks
// through the host port, compares every bin and every interior image byte with
// values worked out here from the frame, writes the histograms back to zero and
// releases the banks. Four frames cover all six pre-processing operations and
// window sizes 8 and 16. Frame 2 is deliberately not released in time (overrun),
// frame 3 has a full-rate line (camera FIFO overflow) and the host tries
// to touch a bank in use during it (conflict). Each mechanism is counted and a
// failure recorded if one never happened; the histogram stage's 2-cycle spacing
// and the number of windows per frame are checked too.
module tb_rcfg_top;
  import rcfg_pkg::*;
  import rcfg_ref_pkg::*;
  localparam int C = 32, R = 32, K = 3, N = 2, NP = N + 1, NB = 2 * NP;
  localparam int NFR = 4, BLANK = 1000;

  logic clk = 0, rst_n = 1;
  logic [7:0] cam_pix;
  logic cam_dval, cam_lval;
  logic [7:0] reg_addr;
  logic [31:0] reg_wdata, reg_rdata;
  logic reg_we, irq_frame;
  logic [2:0] host_bank;
  mem_req_t host_req;
  logic [31:0] host_rdata;
  logic host_grant;
  mem_req_t bank_req [NB];
  logic [31:0] bank_rdata [NB];

  rcfg_top #(.C(C), .R(R), .K(K), .N_HIST(N), .BIN_W(8), .CAM_FIFO_DEPTH(8)) dut (.*);

  for (genvar b = 0; b < NB; b++) begin : g_bank
    sram_model u_bank (.clk, .req(bank_req[b]), .rdata(bank_rdata[b]));
  end

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int img [NFR][R][C];
  // per-frame configuration: op, nbr, shift for channels 0..N (N = image channel)
  int f_op [NFR][NP], f_nbr [NFR][NP], f_sh [NFR][NP], f_l2s [NFR];
  int kern [9] = '{-1, 0, 1, -2, 0, 2, -1, 0, 1};
  int n_irq = 0, n_overrun = 0, n_overflow = 0, n_conflict = 0, n_stall = 0, n_swap = 0;
  int op_used [6], s_used [8];
  longint cyc = 0, last_fire = -100;
  int min_gap = 1000, fires_in_frame = 0, n_frames_ok = 0;
  bit cam_burst = 0;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- monitors ----------------
  always @(posedge clk) begin
    cyc++;
    if (irq_frame) n_irq++;
    if (dut.u_cam.overflow) n_overflow++;
    if (dut.host_conflict) n_conflict++;
    if (dut.pp_valid && !dut.pp_ready) n_stall++;
    if (dut.fire) begin
      if (cyc - last_fire < min_gap) min_gap = int'(cyc - last_fire);
      last_fire = cyc;
      fires_in_frame++;
    end
    if (dut.frame_done) begin
      // frame 3 drops the pixels that overflowed the camera FIFO
      checks++;
      if (n_irq != 3 && fires_in_frame != (R - 2) * (C - 2)) begin
        failures++;
        $display("frame had %0d windows", fires_in_frame);
      end
      fires_in_frame = 0;
    end
  end

  // ---------------- camera ----------------
  initial begin
    cam_pix = 0; cam_dval = 0; cam_lval = 0;
    for (int f = 0; f < NFR; f++)
      for (int r = 0; r < R; r++)
        for (int c = 0; c < C; c++) img[f][r][c] = $urandom_range(0, 255);
    @(posedge rst_n);
    wait (dut.enable);
    repeat (20) @(negedge clk);
    for (int f = 0; f < NFR; f++)
      for (int r = 0; r < R; r++) begin
        bit burst;
        burst = (f == 3 && r == 5);
        @(negedge clk); cam_lval = 1;
        for (int c = 0; c < C; c++) begin
          @(negedge clk); cam_dval = 1; cam_pix = 8'(img[f][r][c]);
          if (!burst) begin @(negedge clk); cam_dval = 0; end
        end
        @(negedge clk); cam_dval = 0; cam_lval = 0;
        repeat (BLANK) @(negedge clk);
      end
  end

  // ---------------- host ----------------
  task automatic reg_wr(input logic [7:0] a, input int d);
    @(negedge clk); reg_addr = a; reg_wdata = 32'(d); reg_we = 1;
    @(negedge clk); reg_we = 0;
  endtask
  task automatic reg_rd(input logic [7:0] a, output int d);
    @(negedge clk); reg_addr = a; #1; d = int'(reg_rdata);
  endtask
  task automatic mem_rd(input int b, input int a, output logic [31:0] d);
    @(negedge clk);
    host_bank = 3'(b); host_req = MEM_IDLE; host_req.addr = BANK_AW'(a); host_req.oe = 1;
    #1; d = host_rdata;
  endtask
  task automatic mem_wr0(input int b, input int a);
    @(negedge clk);
    host_bank = 3'(b); host_req = MEM_IDLE; host_req.addr = BANK_AW'(a);
    host_req.we = 1; host_req.be = 4'hF; host_req.wdata = '0;
  endtask
  task automatic configure(input int f);
    for (int ch = 0; ch < NP; ch++) begin
      reg_wr(REG_FCFG_BASE + 8'(ch), (f_sh[f][ch] << 8) | (f_nbr[f][ch] << 4) | f_op[f][ch]);
      op_used[f_op[f][ch]]++;
    end
    reg_wr(REG_CTRL, (f_l2s[f] << 4) | 1);
    s_used[f_l2s[f]]++;
  endtask

  function automatic int feat_at(input int f, input int ch, input int r, input int c);
    int w[9];
    for (int i = 0; i < 9; i++) w[i] = img[f][r - 1 + i / 3][c - 1 + i % 3];
    return ref_feat(w, f_op[f][ch], f_nbr[f][ch], f_sh[f][ch], kern, (ch == N) ? 8 : 8);
  endfunction

  task automatic check_frame(input int f, input int base, input bit verify);
    int s, wpr, nwin, st;
    logic [31:0] d;
    int hist [N][];
    s = 1 << f_l2s[f];
    wpr = (C + s - 1) / s;
    nwin = wpr * ((R + s - 1) / s);
    for (int ch = 0; ch < N; ch++) begin
      hist[ch] = new[nwin * 256];
      foreach (hist[ch][i]) hist[ch][i] = 0;
    end
    for (int r = 1; r < R - 1; r++)
      for (int c = 1; c < C - 1; c++)
        for (int ch = 0; ch < N; ch++)
          hist[ch][((r / s) * wpr + c / s) * 256 + feat_at(f, ch, r, c)]++;
    // processed image, interior bytes
    if (verify)
      for (int r = 1; r < R - 1; r++)
        for (int c = 1; c < C - 1; c++) begin
          int ba;
          ba = r * C + c;
          if (c == 1 || ba % 4 == 0) mem_rd(base, ba / 4, d);
          checks++;
          if (int'(d[8 * (ba % 4) +: 8]) != feat_at(f, N, r, c)) begin
            failures++;
            if (failures < 10) $display("frame %0d image (%0d,%0d) = %0d want %0d", f, r, c,
                                        d[8 * (ba % 4) +: 8], feat_at(f, N, r, c));
          end
        end
    // histograms: check, then clear
    for (int ch = 0; ch < N; ch++)
      for (int a = 0; a < nwin * 256; a++) begin
        if (verify) begin
          mem_rd(base + 1 + ch, a, d);
          checks++;
          if (int'(d) != hist[ch][a]) begin
            failures++;
            if (failures < 10) $display("frame %0d hist %0d bin %0d = %0d want %0d", f, ch, a, d, hist[ch][a]);
          end
        end
        mem_wr0(base + 1 + ch, a);
      end
    if (verify) n_frames_ok++;
  endtask

  initial begin
    int st, handled;
    logic [31:0] d;
    // frame 0: cooccurrence (0 deg, 16 levels), vertical |difference|, Sobel image
    f_op[0] = '{4, 3, 5}; f_nbr[0] = '{5, 1, 0}; f_sh[0] = '{4, 0, 2}; f_l2s[0] = 3;
    // frame 1: grey-level histogram, sum/2, identity image, 16 x 16 windows
    f_op[1] = '{0, 1, 0}; f_nbr[1] = '{0, 5, 0}; f_sh[1] = '{0, 1, 0}; f_l2s[1] = 4;
    // frame 2: difference/2 at 90 deg, cooccurrence at 135 deg, |difference| image
    f_op[2] = '{2, 4, 3}; f_nbr[2] = '{1, 0, 3}; f_sh[2] = '{1, 4, 0}; f_l2s[2] = 3;
    // frame 3: as frame 0
    f_op[3] = f_op[0]; f_nbr[3] = f_nbr[0]; f_sh[3] = f_sh[0]; f_l2s[3] = 3;
    reg_addr = 0; reg_wdata = 0; reg_we = 0; host_bank = 0; host_req = MEM_IDLE;
    #2 rst_n = 0;
    #30 rst_n = 1;
    for (int ch = 0; ch < NP; ch++)
      for (int i = 0; i < 9; i++) reg_wr(REG_KERN_BASE + 8'(ch * 9 + i), kern[i]);
    configure(0);
    handled = 0;
    for (int f = 0; f < NFR; f++) begin
      int base, prev_stage;
      reg_rd(REG_STATUS, st);
      prev_stage = st & 1;
      if (f == 3) begin
        // host touches a bank the frame-grabber is filling
        mem_rd(prev_stage ? NP : 0, 0, d);
        checks++; if (host_grant) failures++;
        @(negedge clk); host_req = MEM_IDLE;
      end
      wait (n_irq > handled);
      handled++;
      if (f + 1 < NFR) configure(f + 1);
      reg_rd(REG_STATUS, st);
      checks++;
      if ((st & 1) == prev_stage) failures++; else n_swap++;
      if (f == 3) begin
        checks++;
        if ((st & 2) == 0) failures++; else n_overrun++;
      end else begin
        checks++;
        if ((st & 2) != 0) failures++;
      end
      base = (st & 1) ? 0 : NP;                // the set the frame-grabber just left
      check_frame(f, base, f != 3);
      @(negedge clk); host_req = MEM_IDLE;
      if (f != 2) reg_wr(REG_HOST_DONE, 1);   // frame 2 is released too late
      if (f == 3) reg_wr(REG_STATUS, 32'h1E);
    end
    // mechanisms
    checks++; if (n_swap != NFR) failures++;
    checks++; if (n_overrun == 0) failures++;
    checks++; if (n_overflow == 0) failures++;
    checks++; if (n_conflict == 0) failures++;
    checks++; if (n_stall == 0) failures++;
    for (int o = 0; o < 6; o++) begin checks++; if (op_used[o] == 0) failures++; end
    checks++; if (s_used[3] == 0 || s_used[4] == 0) failures++;
    checks++; if (min_gap != 2) failures++;
    checks++; if (n_frames_ok != 3) failures++;
    $display("frames=%0d swaps=%0d overruns=%0d overflows=%0d conflicts=%0d stall_cycles=%0d min_gap=%0d",
             n_irq, n_swap, n_overrun, n_overflow, n_conflict, n_stall, min_gap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
