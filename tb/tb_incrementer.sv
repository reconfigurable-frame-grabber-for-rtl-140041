// tb_incrementer: back-to-back and gapped increments on a small set of bins of a
// behavioural SRAM; checks final bin counts, the 2-cycle-per-increment rate,
// saturation, disabled requests and the done_last pulse.
module tb_incrementer;
  import rcfg_pkg::*;
  logic clk = 0, rst_n = 1;
  logic in_valid, in_ready, in_en, in_last, done_last;
  logic [BANK_AW-1:0] in_addr;
  mem_req_t mem;
  logic [31:0] mem_rdata;
  int checks = 0, failures = 0;
  int cnt [16];
  int n_done = 0;
  longint cyc = 0, first_acc = -1, last_acc = 0;
  int n_acc = 0;

  incrementer dut (.*);
  sram_model #(.AW(BANK_AW)) u_mem (.clk, .req(mem), .rdata(mem_rdata));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc++;
    if (done_last) n_done++;
    if (in_valid && in_ready) begin
      if (first_acc < 0) first_acc = cyc;
      last_acc = cyc;
      n_acc++;
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic req(input int a, input bit en, input bit last);
    @(negedge clk);
    in_valid = 1; in_addr = BANK_AW'(a); in_en = en; in_last = last;
    #1;
    while (!in_ready) begin @(negedge clk); #1; end
    @(posedge clk); #1;
    in_valid = 0; in_last = 0;
  endtask

  initial begin
    in_valid = 0; in_addr = 0; in_en = 0; in_last = 0;
    foreach (cnt[i]) cnt[i] = 0;
    u_mem.mem[100] = 32'hFFFF_FFFE;
    #2 rst_n = 0;
    #30 rst_n = 1;
    @(posedge clk);
    // 1000 back-to-back increments
    for (int i = 0; i < 1000; i++) begin
      int a;
      a = $urandom_range(0, 15);
      cnt[a]++;
      req(a, 1, 0);
    end
    checks++;
    if (last_acc - first_acc != 2 * (1000 - 1) || n_acc != 1000) begin
      failures++;
      $display("1000 increments accepted over %0d cycles", last_acc - first_acc);
    end
    // gapped, some disabled
    for (int i = 0; i < 200; i++) begin
      int a;
      bit en;
      a = $urandom_range(0, 15);
      en = ($urandom_range(0, 3) != 0);
      if (en) cnt[a]++;
      req(a, en, 0);
      repeat ($urandom_range(0, 3)) @(posedge clk);
    end
    // saturation: 0xFFFFFFFE + 3 stays at 0xFFFFFFFF
    req(100, 1, 0); req(100, 1, 0); req(100, 1, 1);
    repeat (4) @(posedge clk);
    for (int i = 0; i < 16; i++) begin
      checks++;
      if (u_mem.mem[i] != 32'(cnt[i])) begin
        failures++;
        $display("bin %0d = %0d, want %0d", i, u_mem.mem[i], cnt[i]);
      end
    end
    checks++; if (u_mem.mem[100] != 32'hFFFF_FFFF) begin failures++; $display("sat %h", u_mem.mem[100]); end
    checks++; if (n_done != 1) begin failures++; $display("done %0d", n_done); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
