// tb_fp_slic_workloads -- runs the image sizes, superpixel counts and
// iteration counts of the evaluated configurations end to end, each as a
// full frame checked pixel by pixel against the reference model:
//   321 x 481 portrait, S = 9 (about 2000 superpixels), 1, 2 and 3 iterations
//   481 x 321 landscape, S = 32, 12 and 10 (about 150, 1000 and 1600
//             superpixels), 2 iterations
//   640 x 480, S = 12 (about 2000 superpixels), 2 iterations
//   320 x 240, S = 9 (a 36 x 27 grid), 2 iterations
// The superpixel counts of the 640 x 480 and 320 x 240 runs are not given
// with those sizes; S there is this testbench's own choice.
// All runs share one simulation; the result line sums their counts.
module tb_fp_slic_workloads;
  localparam int N = 8;
  bit done [N];
  int chk [N], fl [N];

  slic_e2e #(.W(321), .H(481), .S(9),  .ITER(1)) u_v_it1 (.done_o(done[0]), .checks_o(chk[0]), .failures_o(fl[0]));
  slic_e2e #(.W(321), .H(481), .S(9),  .ITER(2)) u_v_it2 (.done_o(done[1]), .checks_o(chk[1]), .failures_o(fl[1]));
  slic_e2e #(.W(321), .H(481), .S(9),  .ITER(3)) u_v_it3 (.done_o(done[2]), .checks_o(chk[2]), .failures_o(fl[2]));
  slic_e2e #(.W(481), .H(321), .S(32), .ITER(2)) u_h_150 (.done_o(done[3]), .checks_o(chk[3]), .failures_o(fl[3]));
  slic_e2e #(.W(640), .H(480), .S(12), .ITER(2)) u_vga   (.done_o(done[4]), .checks_o(chk[4]), .failures_o(fl[4]));
  slic_e2e #(.W(481), .H(321), .S(12), .ITER(2)) u_h_1k  (.done_o(done[5]), .checks_o(chk[5]), .failures_o(fl[5]));
  slic_e2e #(.W(481), .H(321), .S(10), .ITER(2)) u_h_1k6 (.done_o(done[6]), .checks_o(chk[6]), .failures_o(fl[6]));
  slic_e2e #(.W(320), .H(240), .S(9),  .ITER(2)) u_qvga  (.done_o(done[7]), .checks_o(chk[7]), .failures_o(fl[7]));

  initial begin
    int c, f;
    wait (done.and());
    c = 0; f = 0;
    for (int i = 0; i < N; i++) begin
      c += chk[i];
      f += fl[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", c, f);
    $finish;
  end
endmodule
