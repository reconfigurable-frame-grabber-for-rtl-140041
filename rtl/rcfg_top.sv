// rcfg_top: reconfigurable frame-grabber (RCFG) for real-time texture inspection.
//
// The frame-grabber computes, while the frame is still coming from the camera,
// first- and second-order histograms of pixel features for every S x S sub-window
// of the frame, so the host receives histograms instead of raw pixels and only has
// to compute statistics and classify. The pipeline is
//   camera_data_if  pixels numbered by line and column, small input FIFO
//   line_fifos      K-1 line FIFOs and a KxK window (processing starts after K-1 lines)
//   preproc         N_HIST features (bin indices) and one processed pixel per window
//   address_gen     per feature: address of the bin of the pixel's sub-window
//   incrementer     per feature: read, +1, write back of that bin in its SRAM bank
//   image_writer    processed pixel into the image bank, one byte per pixel
//   bank_arbiter    two bank sets; the frame-grabber fills one while the host reads the other
//   rcfg_ctrl       host registers, stage bit flipped at the end of each frame
// The histogram stage takes 2 cycles per pixel (read then write of each bin); all
// feature channels run in step, so the whole design processes one pixel every
// 2 cycles once the first K-1 lines are in. The camera must deliver no more than
// one pixel per 2 cycles on average; the input FIFO evens out bursts within a
// line and reports overflow.
//
// External interfaces: the camera's pixel, data-valid and line-valid signals; a
// host register port and a host memory port (the host reaches the banks it owns
// through the arbiter); 2*(1+N_HIST) asynchronous SRAM bank ports (request out,
// read data in the same cycle); irq_frame, pulsed when a frame's histograms are
// complete and the banks change hands. The host is expected to read a finished
// histogram bank, write it back to zero, then write HOST_DONE.
//
// Defaults are the design's prototype: 1024 x 1024 frames of 256 grey levels, 3x3
// window, one 256-bin histogram of 32-bit bins per 64 x 64 sub-window (256 KB per
// frame) and four 2 MB banks. Clearing of histogram banks by the host, the register
// map and the handshakes are this design's own choices.
module rcfg_top
  import rcfg_pkg::*;
#(
  parameter int C              = 1024,
  parameter int R              = 1024,
  parameter int K              = 3,
  parameter int N_HIST         = 1,
  parameter int BIN_W          = 8,
  parameter int CAM_FIFO_DEPTH = 16,
  localparam int NP  = 1 + N_HIST,
  localparam int NB  = 2 * NP,
  localparam int BKW = $clog2(NB)
) (
  input  logic              clk,
  input  logic              rst_n,
  // camera
  input  logic [PIX_W-1:0]  cam_pix,
  input  logic              cam_dval,
  input  logic              cam_lval,
  // host registers
  input  logic [7:0]        reg_addr,
  input  logic [31:0]       reg_wdata,
  input  logic              reg_we,
  output logic [31:0]       reg_rdata,
  output logic              irq_frame,
  // host memory access
  input  logic [BKW-1:0]    host_bank,
  input  mem_req_t          host_req,
  output logic [DATA_W-1:0] host_rdata,
  output logic              host_grant,
  // external SRAM banks
  output mem_req_t          bank_req   [NB],
  input  logic [DATA_W-1:0] bank_rdata [NB]
);

  localparam int CW = $clog2(C);
  localparam int RW = $clog2(R);

  // ---- control ----
  logic                       enable, stage, frame_done, cam_overflow, addr_err_ev, host_conflict;
  logic [2:0]                 log2s;
  feat_cfg_t                  cfg    [NP];
  logic [K*K-1:0][COEF_W-1:0] kernel [NP];

  rcfg_ctrl #(.K(K), .N_HIST(N_HIST)) u_ctrl (
    .clk, .rst_n, .reg_addr, .reg_wdata, .reg_we, .reg_rdata,
    .frame_done, .cam_overflow, .addr_err(addr_err_ev), .host_conflict,
    .enable, .log2s, .cfg, .kernel, .stage, .irq_frame
  );

  // ---- camera -> line FIFOs -> pre-processing ----
  logic             cam_valid, cam_ready;
  logic [PIX_W-1:0] cam_opix;
  logic [RW-1:0]    cam_row;
  logic [CW-1:0]    cam_col;

  camera_data_if #(.C(C), .R(R), .DEPTH(CAM_FIFO_DEPTH)) u_cam (
    .clk, .rst_n, .enable, .cam_pix, .cam_dval, .cam_lval,
    .out_valid(cam_valid), .out_ready(cam_ready),
    .out_pix(cam_opix), .out_row(cam_row), .out_col(cam_col), .overflow(cam_overflow)
  );

  logic                      win_valid, win_ready, win_last;
  logic [K*K-1:0][PIX_W-1:0] win;
  logic [RW-1:0]             win_row;
  logic [CW-1:0]             win_col;

  line_fifos #(.C(C), .R(R), .K(K)) u_fifos (
    .clk, .rst_n,
    .in_valid(cam_valid), .in_ready(cam_ready), .in_pix(cam_opix), .in_row(cam_row), .in_col(cam_col),
    .out_valid(win_valid), .out_ready(win_ready), .out_win(win),
    .out_row(win_row), .out_col(win_col), .out_last(win_last)
  );

  logic                         pp_valid, pp_ready, pp_last;
  logic [N_HIST-1:0][BIN_W-1:0] pp_feat;
  logic [PIX_W-1:0]             pp_img;
  logic [RW-1:0]                pp_row;
  logic [CW-1:0]                pp_col;

  preproc #(.C(C), .R(R), .K(K), .N_HIST(N_HIST), .BIN_W(BIN_W)) u_pre (
    .clk, .rst_n, .cfg, .kernel,
    .in_valid(win_valid), .in_ready(win_ready), .in_win(win),
    .in_row(win_row), .in_col(win_col), .in_last(win_last),
    .out_valid(pp_valid), .out_ready(pp_ready), .out_feat(pp_feat), .out_img(pp_img),
    .out_row(pp_row), .out_col(pp_col), .out_last(pp_last)
  );

  // ---- histogram stage: all channels in step ----
  logic [N_HIST-1:0]  inc_ready, inc_done, agen_err;
  logic [BANK_AW-1:0] agen_addr [N_HIST];
  mem_req_t           fpga_req   [NP];
  logic [DATA_W-1:0]  fpga_rdata [NP];

  wire all_ready = &inc_ready;
  wire fire      = pp_valid && all_ready;
  assign pp_ready = all_ready;

  for (genvar i = 0; i < N_HIST; i++) begin : g_hist
    address_gen #(.C(C), .R(R), .BIN_W(BIN_W)) u_agen (
      .row(pp_row), .col(pp_col), .log2s, .bin(pp_feat[i]),
      .addr(agen_addr[i]), .addr_err(agen_err[i])
    );
    incrementer u_inc (
      .clk, .rst_n,
      .in_valid(fire), .in_ready(inc_ready[i]), .in_addr(agen_addr[i]),
      .in_en(!agen_err[i]), .in_last(pp_last),
      .mem(fpga_req[1+i]), .mem_rdata(fpga_rdata[1+i]), .done_last(inc_done[i])
    );
  end

  assign frame_done  = inc_done[0];
  assign addr_err_ev = fire && (|agen_err);

  image_writer #(.C(C), .R(R)) u_img (
    .clk, .rst_n, .in_valid(fire), .in_row(pp_row), .in_col(pp_col), .in_pix(pp_img),
    .mem(fpga_req[0])
  );

  // ---- banks ----
  bank_arbiter #(.N_HIST(N_HIST)) u_arb (
    .stage, .fpga_req, .fpga_rdata,
    .host_bank, .host_req, .host_rdata, .host_grant, .host_conflict,
    .bank_req, .bank_rdata
  );

endmodule
