// tb_address_gen: random pixel coordinates, window sizes 16..64 and bins on a
// 1024 x 1024 frame; checks the bin address against the sub-window formula and
// the out-of-bank flag (16 x 16 windows overflow a 512K-word bank).
module tb_address_gen;
  import rcfg_pkg::*;
  logic [9:0] row, col;
  logic [2:0] log2s;
  logic [7:0] bin;
  logic [BANK_AW-1:0] addr;
  logic addr_err;
  int checks = 0, failures = 0, n_err = 0;

  address_gen #(.C(1024), .R(1024), .BIN_W(8)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 5000; t++) begin
      int r, c, l, b, s, win, full;
      r = $urandom_range(0, 1023); c = $urandom_range(0, 1023);
      l = $urandom_range(4, 6); b = $urandom_range(0, 255);
      row = 10'(r); col = 10'(c); log2s = 3'(l); bin = 8'(b);
      #1;
      s = 1 << l;
      win = (r / s) * (1024 / s) + c / s;
      full = win * 256 + b;
      checks += 2;
      if (addr_err != (full >= 524288)) failures++;
      if (full < 524288 && int'(addr) != full) failures++;
      if (addr_err) n_err++;
    end
    // corners of the prototype layout: 64 x 64 windows, 256 windows of 256 bins
    row = 10'd1023; col = 10'd1023; log2s = 3'd6; bin = 8'd255; #1;
    checks++; if (addr != 19'd65535 || addr_err) failures++;
    row = 10'd64; col = 10'd0; bin = 8'd0; #1;
    checks++; if (addr != 19'd4096) failures++;
    checks++; if (n_err == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
