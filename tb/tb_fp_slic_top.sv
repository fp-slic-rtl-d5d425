// tb_fp_slic_top -- end-to-end test of the FP-SLIC pipeline at a reduced
// image size (50 x 37 pixels, S = 8, two iterations), with random idle
// input cycles and a sink that is not ready in 30 % of the cycles, so the
// output FIFO fills and the input is held back.  Three frames are streamed; the first two are checked pixel
// by pixel against the reference model, the third pushes them out.  The
// image width is not a multiple of S and neither is the height, so the
// cut-short last square column and row are exercised.  See
// slic_tb_body.svh for what is checked.
module tb_fp_slic_top;

  localparam int W = 50, H = 37, S = 8, M = 80, F = 4, ITER = 2;
  localparam int D0 = W * S + (W / 2) * S;
  localparam int DM = 3 * W * S;
  localparam int NFRAMES = 3, NCHECK = 2, BUBBLE_PCT = 10, STALL_PCT = 30;
  localparam bit STANDALONE = 1'b1;
  localparam int WATCHDOG = 20000;

  `include "slic_tb_body.svh"

  fp_slic_top #(.W(W), .H(H), .S(S), .M(M), .F(F), .ITER(ITER)) dut (
    .clk, .rst_n,
    .s_axis_tvalid(s_tvalid), .s_axis_tdata(s_tdata), .s_axis_tuser(s_tuser),
    .s_axis_tlast(s_tlast), .s_axis_tready(s_tready),
    .m_axis_tvalid(m_tvalid), .m_axis_tdata(m_tdata), .m_axis_tuser(m_tuser),
    .m_axis_tlast(m_tlast), .m_axis_tready(m_tready)
  );

endmodule
