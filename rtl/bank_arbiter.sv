// bank_arbiter: assigns the external SRAM banks to the frame-grabber or the host.
//
// The banks form two sets of NP = 1 + N_HIST banks: one bank for the processed
// image and one histogram buffer per feature. In stage A (stage = 0) the
// frame-grabber's port p drives bank p and the host owns banks NP .. 2NP-1; in
// stage B (stage = 1) the frame-grabber uses banks NP + p and the host banks
// 0 .. NP-1. For the prototype's single histogram this is: stage A, image to bank 0
// and histograms to bank 1 while the host reads banks 2 and 3; stage B the reverse.
// A bank is driven by one side only. The host addresses a physical bank; an access
// to a bank the frame-grabber owns is not performed, host_grant is low and
// host_conflict pulses. Read data returns combinationally, as from the SRAM.
//
// The two bank sets swapped every frame and the exclusive access follow the
// design; extending the sets to N_HIST histogram buffers is this design's own.
// Purely combinational.
module bank_arbiter
  import rcfg_pkg::*;
#(
  parameter int N_HIST = 1,
  localparam int NP = 1 + N_HIST,
  localparam int NB = 2 * NP,
  localparam int BKW = $clog2(NB)
) (
  input  logic              stage,
  input  mem_req_t          fpga_req   [NP],
  output logic [DATA_W-1:0] fpga_rdata [NP],
  input  logic [BKW-1:0]    host_bank,
  input  mem_req_t          host_req,
  output logic [DATA_W-1:0] host_rdata,
  output logic              host_grant,
  output logic              host_conflict,
  output mem_req_t          bank_req   [NB],
  input  logic [DATA_W-1:0] bank_rdata [NB]
);

  logic host_in_set1;

  always_comb begin
    host_in_set1  = int'(host_bank) >= NP;
    host_grant    = (int'(host_bank) < NB) && (host_in_set1 != stage);
    host_conflict = !host_grant && (host_req.we || host_req.oe);
    for (int b = 0; b < NB; b++) bank_req[b] = MEM_IDLE;
    for (int p = 0; p < NP; p++) begin
      bank_req[stage ? NP + p : p] = fpga_req[p];
      fpga_rdata[p] = bank_rdata[stage ? NP + p : p];
    end
    host_rdata = '0;
    if (host_grant) begin
      bank_req[host_bank] = host_req;
      host_rdata          = bank_rdata[host_bank];
    end
  end

endmodule
