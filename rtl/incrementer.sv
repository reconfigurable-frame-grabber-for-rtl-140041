// incrementer: read-modify-write of one histogram bin in an asynchronous SRAM bank.
//
// A request carries the word address of a bin. The cycle after it is accepted the
// incrementer drives the address with output enable and takes the bin from the
// data bus (an asynchronous SRAM returns it within the cycle); the next cycle it
// writes the bin back plus one. A new request is accepted during that write
// cycle, so the buffer sustains one increment every 2 cycles, which is the
// 2 cycles per pixel of the design. A bin at its largest value stays there. A
// request with in_en low goes through the same two cycles without writing, which
// keeps all histogram channels in step when one of them has to drop an increment.
// done_last pulses the cycle after the write of a request marked in_last.
//
// Reading a bin, adding one and writing it back over the data bus, at 2 cycles per
// pixel, follows the design; the saturation, in_en and the handshake are this
// design's own.
module incrementer
  import rcfg_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  output logic               in_ready,
  input  logic [BANK_AW-1:0] in_addr,
  input  logic               in_en,
  input  logic               in_last,
  output mem_req_t           mem,
  input  logic [DATA_W-1:0]  mem_rdata,
  output logic               done_last
);

  typedef enum logic [1:0] {S_IDLE, S_READ, S_WRITE} state_e;

  state_e             state;
  logic [BANK_AW-1:0] addr_q;
  logic               en_q, last_q;
  logic [DATA_W-1:0]  data_q;

  assign in_ready = (state == S_IDLE) || (state == S_WRITE);
  wire accept = in_valid && in_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      addr_q    <= '0;
      en_q      <= 1'b0;
      last_q    <= 1'b0;
      data_q    <= '0;
      done_last <= 1'b0;
    end else begin
      done_last <= (state == S_WRITE) && last_q;
      if (state == S_READ) begin
        data_q <= (mem_rdata == '1) ? mem_rdata : mem_rdata + 1'b1;
        state  <= S_WRITE;
      end else if (state == S_WRITE && !accept) begin
        state <= S_IDLE;
      end
      if (accept) begin
        addr_q <= in_addr;
        en_q   <= in_en;
        last_q <= in_last;
        state  <= S_READ;
      end
    end
  end

  always_comb begin
    mem = MEM_IDLE;
    mem.addr = addr_q;
    unique case (state)
      S_READ:  mem.oe = 1'b1;
      S_WRITE: begin
        mem.we    = en_q;
        mem.be    = en_q ? 4'hF : 4'h0;
        mem.wdata = data_q;
      end
      default: ;
    endcase
  end

  // a request is only ever accepted while idle or writing
  assert property (@(posedge clk) disable iff (!rst_n) accept |-> state != S_READ);
  // every read is followed by its write
  assert property (@(posedge clk) disable iff (!rst_n) state == S_READ |=> state == S_WRITE);

endmodule
