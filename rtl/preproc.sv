// preproc: the pre-processing module, several pixel features from one KxK window.
//
// N_HIST feature channels (feature_unit) each compute the bin index, BIN_W bits,
// for one histogram; one more channel, configured like the others, computes the
// 8-bit processed pixel that is stored as the processed image. All channels read
// the same window, so every histogram of a sub-window is fed in the same cycle.
// Channel i is configured by cfg[i] and kernel[i]; index N_HIST is the image channel.
//
// Timing: one register stage with a valid/ready handshake; the window's centre
// coordinates and last flag travel with the features.
//
// Several features per pixel from one window, computed in a pipelined fixed-point
// datapath, follow the design; the separate image channel is this design's reading
// of "the processed image" stored alongside the histograms.
module preproc
  import rcfg_pkg::*;
#(
  parameter int C      = 1024,
  parameter int R      = 1024,
  parameter int K      = 3,
  parameter int N_HIST = 1,
  parameter int BIN_W  = 8,
  localparam int CW = $clog2(C),
  localparam int RW = $clog2(R)
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  feat_cfg_t                        cfg    [N_HIST+1],
  input  logic [K*K-1:0][COEF_W-1:0]       kernel [N_HIST+1],
  input  logic                             in_valid,
  output logic                             in_ready,
  input  logic [K*K-1:0][PIX_W-1:0]        in_win,
  input  logic [RW-1:0]                    in_row,
  input  logic [CW-1:0]                    in_col,
  input  logic                             in_last,
  output logic                             out_valid,
  input  logic                             out_ready,
  output logic [N_HIST-1:0][BIN_W-1:0]     out_feat,
  output logic [PIX_W-1:0]                 out_img,
  output logic [RW-1:0]                    out_row,
  output logic [CW-1:0]                    out_col,
  output logic                             out_last
);

  logic [N_HIST-1:0][BIN_W-1:0] feat;
  logic [PIX_W-1:0]             img;

  for (genvar i = 0; i < N_HIST; i++) begin : g_feat
    feature_unit #(.K(K), .OUT_W(BIN_W)) u_feat (
      .win(in_win), .cfg(cfg[i]), .kernel(kernel[i]), .feat(feat[i])
    );
  end

  feature_unit #(.K(K), .OUT_W(PIX_W)) u_img (
    .win(in_win), .cfg(cfg[N_HIST]), .kernel(kernel[N_HIST]), .feat(img)
  );

  wire accept = in_valid && in_ready;
  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_feat  <= '0;
      out_img   <= '0;
      out_row   <= '0;
      out_col   <= '0;
      out_last  <= 1'b0;
    end else if (accept) begin
      out_valid <= 1'b1;
      out_feat  <= feat;
      out_img   <= img;
      out_row   <= in_row;
      out_col   <= in_col;
      out_last  <= in_last;
    end else if (out_ready) begin
      out_valid <= 1'b0;
    end
  end

  // stalled results stay valid and unchanged until they are taken
  assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out_feat) && $stable(out_img) && $stable(out_row));

endmodule
