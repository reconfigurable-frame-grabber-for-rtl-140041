// tb_bank_arbiter: with one histogram per frame (four banks), checks in both stages
// that the frame-grabber's image and histogram ports reach the right banks, that
// the host reaches only the other two, and that a host access to a bank in use is
// blocked and flagged; repeats with two histograms (six banks).
module tb_bank_arbiter;
  import rcfg_pkg::*;
  int checks = 0, failures = 0;

  logic stage;
  mem_req_t f1 [2], b1 [4], h1, f2 [3], b2 [6], h2;
  logic [31:0] fr1 [2], br1 [4], hr1, fr2 [3], br2 [6], hr2;
  logic [1:0] hb1;
  logic [2:0] hb2;
  logic g1, c1, g2, c2;

  bank_arbiter #(.N_HIST(1)) dut1 (.stage, .fpga_req(f1), .fpga_rdata(fr1), .host_bank(hb1),
    .host_req(h1), .host_rdata(hr1), .host_grant(g1), .host_conflict(c1), .bank_req(b1), .bank_rdata(br1));
  bank_arbiter #(.N_HIST(2)) dut2 (.stage, .fpga_req(f2), .fpga_rdata(fr2), .host_bank(hb2),
    .host_req(h2), .host_rdata(hr2), .host_grant(g2), .host_conflict(c2), .bank_req(b2), .bank_rdata(br2));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic mem_req_t mk(input int a, input bit we);
    mem_req_t r = MEM_IDLE;
    r.addr = BANK_AW'(a); r.we = we; r.oe = !we; r.be = we ? 4'hF : 4'h0; r.wdata = 32'(a * 3);
    return r;
  endfunction

  initial begin
    for (int b = 0; b < 4; b++) br1[b] = 32'(1000 + b);
    for (int b = 0; b < 6; b++) br2[b] = 32'(2000 + b);
    for (int s = 0; s < 2; s++) begin
      stage = s[0];
      // four banks
      f1[0] = mk(10, 1); f1[1] = mk(11, 0);
      for (int hb = 0; hb < 4; hb++) begin
        bit own;
        own = (s == 0) ? (hb >= 2) : (hb < 2);
        hb1 = 2'(hb); h1 = mk(20 + hb, 0);
        #1;
        checks += 6;
        if (b1[s * 2 + 0] != f1[0]) failures++;
        if (b1[s * 2 + 1] != f1[1]) failures++;
        if (fr1[1] != 32'(1000 + s * 2 + 1)) failures++;
        if (g1 != own || c1 != !own) failures++;
        if (own && (b1[hb] != h1 || hr1 != 32'(1000 + hb))) failures++;
        if (!own && (b1[(1 - s) * 2] != MEM_IDLE || b1[(1 - s) * 2 + 1] != MEM_IDLE)) failures++;
      end
      h1 = MEM_IDLE; hb1 = 2'(s * 2); #1;
      checks++; if (c1) failures++;            // no access, no conflict
      // six banks
      f2[0] = mk(30, 1); f2[1] = mk(31, 0); f2[2] = mk(32, 0);
      for (int hb = 0; hb < 8; hb++) begin
        bit own;
        own = (hb < 6) && ((s == 0) ? (hb >= 3) : (hb < 3));
        hb2 = 3'(hb); h2 = mk(40 + hb, 1);
        #1;
        checks += 4;
        for (int p = 0; p < 3; p++) if (b2[s * 3 + p] != f2[p]) failures++;
        if (g2 != own) failures++;
        if (fr2[2] != 32'(2000 + s * 3 + 2)) failures++;
        if (own && b2[hb] != h2) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
