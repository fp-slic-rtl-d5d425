// slic_e2e -- one end-to-end run of fp_slic_top at a given configuration,
// for a harness that runs several configurations side by side.  Streams
// NFRAMES frames, checks the first NCHECK against the reference model (see
// slic_tb_body.svh) and raises done_o with its check and failure counts.
module slic_e2e #(
  parameter int W = 481,
  parameter int H = 321,
  parameter int S = 9,
  parameter int ITER = 2,
  parameter int NFRAMES = 2,
  parameter int NCHECK = 1,
  parameter int BUBBLE_PCT = 1,
  parameter int STALL_PCT = 2,
  parameter int WATCHDOG = 1000000
) (
  output bit done_o,
  output int checks_o,
  output int failures_o
);
  localparam int M = 80, F = 4;
  localparam int D0 = W * S + (W / 2) * S;
  localparam int DM = 3 * W * S;
  localparam bit STANDALONE = 1'b0;

  `include "slic_tb_body.svh"

  assign done_o = done;
  assign checks_o = checks;
  assign failures_o = failures;

  fp_slic_top #(.W(W), .H(H), .S(S), .M(M), .F(F), .ITER(ITER)) dut (
    .clk, .rst_n,
    .s_axis_tvalid(s_tvalid), .s_axis_tdata(s_tdata), .s_axis_tuser(s_tuser),
    .s_axis_tlast(s_tlast), .s_axis_tready(s_tready),
    .m_axis_tvalid(m_tvalid), .m_axis_tdata(m_tdata), .m_axis_tuser(m_tuser),
    .m_axis_tlast(m_tlast), .m_axis_tready(m_tready)
  );
endmodule
