// tb_sp_init_store -- checks that the initialisation store keeps the middle
// pixel of every square.  A 22 x 13 frame with S = 4 is streamed (cut-short
// last column and row of squares), then every centre is read back through
// all three read rows and compared with the pixel the model picks: offset
// (S-1)/2 in a full square, the middle of the part inside the image in a
// cut-short one.  A second frame with other pixels must replace the centres.
module tb_sp_init_store;
  import fp_slic_pkg::*;

  localparam int W = 22, H = 13, S = 4;
  localparam int NC = (W + S - 1) / S, NR = (H + S - 1) / S;
  localparam int NB = (H % S == 0) ? 6 : 7;

  logic clk = 1'b0, rst_n = 1'b0;
  pix_t in;
  grid_t rd_col;
  bank_t rd_bank;
  center_t rd_center [3];
  int checks = 0, failures = 0;
  int img [W * H];

  always #5 clk = ~clk;

  sp_init_store #(.W(W), .H(H), .S(S)) dut (.*);

  function automatic int mo(int len, int idx);
    int last_len = len - (NC > 0 ? ((len + S - 1) / S - 1) * S : 0);
    return (idx == (len + S - 1) / S - 1) ? (last_len - 1) / 2 : (S - 1) / 2;
  endfunction

  task automatic send_frame(int seed);
    for (int p = 0; p < W * H; p++) begin
      img[p] = int'($urandom(seed + p) & 24'hffffff);
      @(negedge clk);
      in.valid = 1'b1; in.sof = (p == 0); in.eol = (p % W == W - 1);
      {in.r, in.g, in.b} = 24'(img[p]);
      if ($urandom % 5 == 0) begin
        @(negedge clk);
        in = '0;
      end
    end
    @(negedge clk) in = '0;
  endtask

  task automatic check_all(int frame);
    for (int r = 0; r < NR; r++)
      for (int c = 0; c < NC; c++) begin
        rd_col = grid_t'(c);
        rd_bank = bank_t'((frame * NR + r) % NB);
        #1;
        for (int k = 0; k < 3; k++) begin
          int rr = r + k - 1;
          if (rr >= 0 && rr < NR) begin
            int x = c * S + mo(W, c);
            int y = rr * S + mo(H, rr);
            checks++;
            if ({rd_center[k].r, rd_center[k].g, rd_center[k].b} != 24'(img[y * W + x]) ||
                int'(rd_center[k].x) != x || int'(rd_center[k].y) != y || !rd_center[k].valid) begin
              failures++;
              if (failures < 10)
                $display("frame %0d centre (%0d,%0d) wrong: got x=%0d y=%0d", frame, rr, c,
                         rd_center[k].x, rd_center[k].y);
            end
          end
        end
      end
  endtask

  initial begin
    in = '0; rd_col = '0; rd_bank = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    send_frame(100);
    check_all(0);
    send_frame(9000);
    check_all(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("WATCHDOG expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
