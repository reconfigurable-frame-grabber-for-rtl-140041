// sram_model: behavioural model of one external asynchronous SRAM bank (testbench only).
//
// 2^AW words of 32 bits. A read (req.oe) returns the addressed word in the same
// cycle, as an asynchronous SRAM does within one clock period; a write (req.we)
// stores the byte lanes selected by req.be at the clock edge that ends the cycle.
// The array starts at zero. Not synthesizable intent: a stand-in for the board's
// 2 Mbyte SRAM chips.
module sram_model
  import rcfg_pkg::*;
#(
  parameter int AW = BANK_AW
) (
  input  logic              clk,
  input  mem_req_t          req,
  output logic [DATA_W-1:0] rdata
);

  logic [DATA_W-1:0] mem [2**AW];

  initial for (int i = 0; i < 2**AW; i++) mem[i] = '0;

  assign rdata = req.oe ? mem[req.addr[AW-1:0]] : '0;

  always @(posedge clk) begin
    if (req.we)
      for (int b = 0; b < 4; b++)
        if (req.be[b]) mem[req.addr[AW-1:0]][8*b +: 8] <= req.wdata[8*b +: 8];
  end

endmodule
