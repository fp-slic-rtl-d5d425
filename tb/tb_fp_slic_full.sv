// tb_fp_slic_full -- end-to-end test of the FP-SLIC pipeline at its default
// parameters: 481 x 321 pixel frames, S = 9 (54 x 36 superpixel grid),
// m = 80, two iterations, delays of Eq. 10 and Eq. 11.  Two frames are
// streamed with a few idle input cycles and a sink that sometimes stalls;
// the first is checked pixel by pixel against the reference model and the
// second pushes it out of the delay lines.  See slic_tb_body.svh for what is checked.
module tb_fp_slic_full;

  localparam int W = 481, H = 321, S = 9, M = 80, F = 4, ITER = 2;
  localparam int D0 = W * S + (W / 2) * S;
  localparam int DM = 3 * W * S;
  localparam int NFRAMES = 2, NCHECK = 1, BUBBLE_PCT = 2, STALL_PCT = 5;
  localparam bit STANDALONE = 1'b1;
  localparam int WATCHDOG = 500000;

  `include "slic_tb_body.svh"

  fp_slic_top dut (
    .clk, .rst_n,
    .s_axis_tvalid(s_tvalid), .s_axis_tdata(s_tdata), .s_axis_tuser(s_tuser),
    .s_axis_tlast(s_tlast), .s_axis_tready(s_tready),
    .m_axis_tvalid(m_tvalid), .m_axis_tdata(m_tdata), .m_axis_tuser(m_tuser),
    .m_axis_tlast(m_tlast), .m_axis_tready(m_tready)
  );

endmodule
