// rcfg_ctrl: configuration registers and frame/stage control of the frame-grabber.
//
// The host sets up the frame-grabber for a measure through word registers (map in
// rcfg_pkg): capture enable and the sub-window size S = 2^log2s (CTRL), one
// feat_cfg_t per pre-processing channel (FCFG), K*K convolution coefficients per
// channel (KERN). Reset gives capture off, S = 64, every channel OP_IDENT and zero
// kernels.
//
// When the last bin of a frame has been written (frame_done), the stage bit flips,
// so the two bank sets change hands, the frame counter advances and irq_frame
// pulses. The host writes HOST_DONE once it has finished reading (and clearing)
// the banks it owns; a swap that comes before that sets the sticky overrun flag.
// The camera overflow, address error and host conflict inputs set sticky flags as
// well; writing 1 to a STATUS bit clears it.
//
// Timing: registers are written on reg_we; reads are combinational.
//
// Per-measure parameters set by the host, and the stage A / stage B alternation at
// every frame, follow the design; the register map, the HOST_DONE handshake and
// the flags are this design's own.
module rcfg_ctrl
  import rcfg_pkg::*;
#(
  parameter int K      = 3,
  parameter int N_HIST = 1,
  localparam int NCH = N_HIST + 1
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic [7:0]                  reg_addr,
  input  logic [31:0]                 reg_wdata,
  input  logic                        reg_we,
  output logic [31:0]                 reg_rdata,
  input  logic                        frame_done,
  input  logic                        cam_overflow,
  input  logic                        addr_err,
  input  logic                        host_conflict,
  output logic                        enable,
  output logic [2:0]                  log2s,
  output feat_cfg_t                   cfg    [NCH],
  output logic [K*K-1:0][COEF_W-1:0]  kernel [NCH],
  output logic                        stage,
  output logic                        irq_frame
);

  localparam int KK = K * K;

  logic        host_released;
  logic        overrun_f, camovf_f, addrerr_f, conflict_f;
  logic [15:0] frame_cnt;

  wire status_w = reg_we && (reg_addr == REG_STATUS);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      enable        <= 1'b0;
      log2s         <= 3'd6;
      stage         <= 1'b0;
      irq_frame     <= 1'b0;
      host_released <= 1'b1;
      overrun_f     <= 1'b0;
      camovf_f      <= 1'b0;
      addrerr_f     <= 1'b0;
      conflict_f    <= 1'b0;
      frame_cnt     <= '0;
      for (int c = 0; c < NCH; c++) begin
        cfg[c]    <= '{shift: 4'd0, nbr: 4'd0, op: OP_IDENT};
        kernel[c] <= '0;
      end
    end else begin
      irq_frame <= 1'b0;
      if (reg_we) begin
        if (reg_addr == REG_CTRL) begin
          enable <= reg_wdata[0];
          log2s  <= reg_wdata[6:4];
        end
        if (reg_addr == REG_HOST_DONE) host_released <= 1'b1;
        for (int c = 0; c < NCH; c++) begin
          if (reg_addr == REG_FCFG_BASE + 8'(c)) cfg[c] <= '{shift: reg_wdata[11:8], nbr: reg_wdata[7:4], op: op_e'(reg_wdata[2:0])};
          for (int i = 0; i < KK; i++)
            if (reg_addr == REG_KERN_BASE + 8'(c * KK + i)) kernel[c][i] <= reg_wdata[COEF_W-1:0];
        end
      end
      // sticky flags: set by events, cleared by writing 1
      overrun_f  <= (overrun_f  && !(status_w && reg_wdata[1])) || (frame_done && !host_released);
      camovf_f   <= (camovf_f   && !(status_w && reg_wdata[2])) || cam_overflow;
      addrerr_f  <= (addrerr_f  && !(status_w && reg_wdata[3])) || addr_err;
      conflict_f <= (conflict_f && !(status_w && reg_wdata[4])) || host_conflict;
      if (frame_done) begin
        stage         <= !stage;
        frame_cnt     <= frame_cnt + 1'b1;
        irq_frame     <= 1'b1;
        host_released <= 1'b0;
      end
    end
  end

  always_comb begin
    reg_rdata = '0;
    if (reg_addr == REG_CTRL)   reg_rdata = {25'd0, log2s, 3'd0, enable};
    if (reg_addr == REG_STATUS) reg_rdata = {frame_cnt, 11'd0, conflict_f, addrerr_f, camovf_f, overrun_f, stage};
    for (int c = 0; c < NCH; c++) begin
      if (reg_addr == REG_FCFG_BASE + 8'(c)) reg_rdata = {20'd0, cfg[c].shift, cfg[c].nbr, 1'b0, cfg[c].op};
      for (int i = 0; i < KK; i++)
        if (reg_addr == REG_KERN_BASE + 8'(c * KK + i)) reg_rdata = {{(32-COEF_W){kernel[c][i][COEF_W-1]}}, kernel[c][i]};
    end
  end

endmodule
