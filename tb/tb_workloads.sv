// tb_workloads: the measures of the frame-grabber's settings table, one per frame,
// with four histograms per sub-window (ten SRAM banks) on 256 x 256 frames.
//   frame 0  GLCH, rotation invariant: CONCAT, 16 levels, d = 1 at 0/45/90/135 deg, S = 32
//   frame 1  DIFF: |difference| at 0/45/90/135 deg, S = 16
//   frame 2  GLSDH: sum and difference (halved) horizontally and vertically, S = 64
//   frame 3  EH: Sobel x and y magnitudes, grey level, |horizontal difference|, S = 32
// The camera sends one pixel every 2 cycles. At each frame interrupt the host
// model reconfigures for the next frame, then checks every bin of the four
// histogram banks and every interior image byte directly in the SRAM models,
// clears the bins and releases the banks. The frame time is checked against
// 2 cycles per pixel.
module tb_workloads;
  import rcfg_pkg::*;
  import rcfg_ref_pkg::*;
  localparam int C = 256, R = 256, N = 4, NP = N + 1, NB = 2 * NP, NFR = 4, GAP = 40;

  logic clk = 0, rst_n = 1;
  logic [7:0] cam_pix;
  logic cam_dval, cam_lval;
  logic [7:0] reg_addr;
  logic [31:0] reg_wdata, reg_rdata;
  logic reg_we, irq_frame;
  logic [3:0] host_bank;
  mem_req_t host_req;
  logic [31:0] host_rdata;
  logic host_grant;
  mem_req_t bank_req [NB];
  logic [31:0] bank_rdata [NB];

  rcfg_top #(.C(C), .R(R), .N_HIST(N)) dut (.*);

  for (genvar b = 0; b < NB; b++) begin : g_bank
    sram_model #(.AW(17)) u_bank (.clk, .req(bank_req[b]), .rdata(bank_rdata[b]));
  end

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_irq = 0, n_overflow = 0;
  int f_op [NFR][NP], f_nbr [NFR][NP], f_sh [NFR][NP], f_l2s [NFR];
  int kern [NP][9];
  int sobx [9] = '{-1, 0, 1, -2, 0, 2, -1, 0, 1};
  int soby [9] = '{-1, -2, -1, 0, 0, 0, 1, 2, 1};
  int zero9 [9] = '{0, 0, 0, 0, 0, 0, 0, 0, 0};
  longint cyc = 0, t_start [NFR], t_done [NFR];
  logic [31:0] bank_word;

  function automatic int pix(input int f, input int r, input int c);
    int unsigned x;
    x = f * 7919 + r * 263 + c * 3;
    x = x * 1664525 + 1013904223;
    x = x ^ (x >> 11);
    x = x * 1664525 + 1013904223;
    return int'((x >> 20) & 255);
  endfunction

  function automatic int feat_at(input int f, input int ch, input int r, input int c);
    int w[9];
    for (int i = 0; i < 9; i++) w[i] = pix(f, r - 1 + i / 3, c - 1 + i % 3);
    return ref_feat(w, f_op[f][ch], f_nbr[f][ch], f_sh[f][ch], kern[ch], 8);
  endfunction

  // backdoor access to the bank models
  task automatic bank_rw(input int b, input int a, input bit clr, output logic [31:0] d);
    case (b)
      0: begin d = g_bank[0].u_bank.mem[a]; if (clr) g_bank[0].u_bank.mem[a] = '0; end
      1: begin d = g_bank[1].u_bank.mem[a]; if (clr) g_bank[1].u_bank.mem[a] = '0; end
      2: begin d = g_bank[2].u_bank.mem[a]; if (clr) g_bank[2].u_bank.mem[a] = '0; end
      3: begin d = g_bank[3].u_bank.mem[a]; if (clr) g_bank[3].u_bank.mem[a] = '0; end
      4: begin d = g_bank[4].u_bank.mem[a]; if (clr) g_bank[4].u_bank.mem[a] = '0; end
      5: begin d = g_bank[5].u_bank.mem[a]; if (clr) g_bank[5].u_bank.mem[a] = '0; end
      6: begin d = g_bank[6].u_bank.mem[a]; if (clr) g_bank[6].u_bank.mem[a] = '0; end
      7: begin d = g_bank[7].u_bank.mem[a]; if (clr) g_bank[7].u_bank.mem[a] = '0; end
      8: begin d = g_bank[8].u_bank.mem[a]; if (clr) g_bank[8].u_bank.mem[a] = '0; end
      default: begin d = g_bank[9].u_bank.mem[a]; if (clr) g_bank[9].u_bank.mem[a] = '0; end
    endcase
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
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
    for (int ch = 0; ch < NP; ch++)
      reg_wr(REG_FCFG_BASE + 8'(ch), (f_sh[f][ch] << 8) | (f_nbr[f][ch] << 4) | f_op[f][ch]);
    reg_wr(REG_CTRL, (f_l2s[f] << 4) | 1);
  endtask

  initial begin
    int st, prev, base;
    int hist [];
    // kernels: Sobel x on channel 0 and the image channel, Sobel y on channel 1
    for (int ch = 0; ch < NP; ch++) kern[ch] = zero9;
    kern[0] = sobx; kern[1] = soby; kern[N] = sobx;
    f_op[0] = '{4, 4, 4, 4, 0}; f_nbr[0] = '{5, 2, 1, 0, 0}; f_sh[0] = '{4, 4, 4, 4, 0}; f_l2s[0] = 5;
    f_op[1] = '{3, 3, 3, 3, 3}; f_nbr[1] = '{5, 2, 1, 0, 5}; f_sh[1] = '{0, 0, 0, 0, 0}; f_l2s[1] = 4;
    f_op[2] = '{1, 2, 1, 2, 2}; f_nbr[2] = '{5, 5, 1, 1, 5}; f_sh[2] = '{1, 1, 1, 1, 1}; f_l2s[2] = 6;
    f_op[3] = '{5, 5, 0, 3, 5}; f_nbr[3] = '{0, 0, 0, 3, 0}; f_sh[3] = '{2, 2, 0, 0, 2}; f_l2s[3] = 5;
    reg_addr = 0; reg_wdata = 0; reg_we = 0; host_bank = 0; host_req = MEM_IDLE;
    #2 rst_n = 0;
    #30 rst_n = 1;
    for (int ch = 0; ch < NP; ch++)
      for (int i = 0; i < 9; i++) reg_wr(REG_KERN_BASE + 8'(ch * 9 + i), kern[ch][i]);
    configure(0);
    for (int f = 0; f < NFR; f++) begin
      int s, wpr, nw, bad_h, bad_i;
      logic [31:0] d;
      reg_rd(REG_STATUS, st);
      prev = st & 1;
      wait (n_irq > f);
      if (f + 1 < NFR) configure(f + 1);
      reg_rd(REG_STATUS, st);
      checks++; if ((st & 1) == prev || (st & 'hE) != 0) failures++;
      base = (st & 1) ? 0 : NP;
      checks++;
      if (t_done[f] - t_start[f] > longint'(R) * (2 * C - 1 + GAP) + 200) failures++;
      s = 1 << f_l2s[f];
      wpr = C / s;
      nw = wpr * (R / s);
      bad_h = 0; bad_i = 0;
      for (int ch = 0; ch < N; ch++) begin
        hist = new[nw * 256];
        foreach (hist[i]) hist[i] = 0;
        for (int r = 1; r < R - 1; r++)
          for (int c = 1; c < C - 1; c++)
            hist[((r / s) * wpr + c / s) * 256 + feat_at(f, ch, r, c)]++;
        for (int a = 0; a < nw * 256; a++) begin
          bank_rw(base + 1 + ch, a, 1, d);
          if (int'(d) != hist[a]) bad_h++;
        end
      end
      for (int r = 1; r < R - 1; r++)
        for (int c = 1; c < C - 1; c++) begin
          bank_rw(base, (r * C + c) / 4, 0, d);
          if (int'(d[8 * ((r * C + c) % 4) +: 8]) != feat_at(f, N, r, c)) bad_i++;
        end
      checks += 2;
      if (bad_h != 0) begin failures++; $display("frame %0d: %0d bins wrong", f, bad_h); end
      if (bad_i != 0) begin failures++; $display("frame %0d: %0d image bytes wrong", f, bad_i); end
      reg_wr(REG_HOST_DONE, 1);
    end
    checks++; if (n_overflow != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
