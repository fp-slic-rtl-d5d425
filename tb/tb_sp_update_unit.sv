// tb_sp_update_unit -- checks the sliding-window assignment unit on its own.
// The testbench plays the previous stage's store: a fixed table of random
// centres for a 30 x 20 frame with S = 5 (6 x 4 squares), a few of them
// marked invalid, and junk centres in the banks that lie outside the frame
// (they must never be chosen).  After the prime pulse a frame of random
// pixels with idle cycles is streamed; for every pixel the row/column
// address, bank, position and flags at the output are compared with a
// nine-neighbour arg-min model, and the output must come 3 clocks after
// the input beat.  Counts window shifts, line wraps and maximum-distance
// fills, and fails if any never happened.
module tb_sp_update_unit;
  import fp_slic_pkg::*;

  localparam int W = 30, H = 20, S = 5, M = 80, F = 4;
  localparam int NC = 6, NR = 4, NB = 6;
  localparam int WGT = (M * 16 + S / 2) / S;

  logic clk = 1'b0, rst_n = 1'b0;
  pix_t in;
  logic primed = 1'b0;
  grid_t rd_col;
  bank_t rd_bank;
  center_t rd_center [3];
  lab_pix_t out;
  int checks = 0, failures = 0;
  center_t tbl [NB][NC];   // indexed by bank; frame row r lives in bank r
  int exp_row[$], exp_col[$], exp_x[$], exp_y[$], exp_flags[$];
  longint in_cyc[$];
  longint cyc = 0;
  int n_out = 0, n_shift = 0, n_wrap = 0, n_fill = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  sp_update_unit #(.W(W), .H(H), .S(S), .M(M), .F(F), .NBANK(NB)) dut (.*);

  always_comb begin
    for (int k = 0; k < 3; k++) begin
      int b;
      b = (int'(rd_bank) + k - 1 + NB) % NB;
      rd_center[k] = (int'(rd_col) < NC) ? tbl[b][rd_col] : '0;
    end
  end

  function automatic int iabs(int v);
    return v < 0 ? -v : v;
  endfunction

  task automatic model(int x, int y, int r, int g, int b);
    int br = y / S, bc = x / S;
    int best_r = br, best_c = bc, best_d = 32'h7fffffff;
    for (int k = 0; k < 9; k++) begin
      int rr = br + k / 3 - 1, cc = bc + k % 3 - 1;
      if (rr >= 0 && rr < NR && cc >= 0 && cc < NC && tbl[rr][cc].valid) begin
        center_t c = tbl[rr][cc];
        int d = ((iabs(r - int'(c.r)) + iabs(g - int'(c.g)) + iabs(b - int'(c.b))) << F)
                + WGT * (iabs(x - int'(c.x)) + iabs(y - int'(c.y)));
        if (d < best_d) begin best_d = d; best_r = rr; best_c = cc; end
      end
    end
    exp_row.push_back(best_r); exp_col.push_back(best_c);
    exp_x.push_back(x); exp_y.push_back(y);
    exp_flags.push_back({(x == 0 && y % S == 0) ? 1 : 0, (y / S)});
  endtask

  initial begin
    in = '0;
    for (int b = 0; b < NB; b++)
      for (int c = 0; c < NC; c++) begin
        tbl[b][c].valid = (b >= NR) ? 1'b1 : ($urandom % 8 != 0);
        tbl[b][c].r = 8'($urandom); tbl[b][c].g = 8'($urandom); tbl[b][c].b = 8'($urandom);
        // centres near their square's middle, or junk for banks outside the frame
        tbl[b][c].x = coord_t'(c * S + int'($urandom % S));
        tbl[b][c].y = (b >= NR) ? coord_t'(0) : coord_t'(b * S + int'($urandom % S));
        if (b >= NR) begin tbl[b][c].r = '0; tbl[b][c].g = '0; tbl[b][c].b = '0; end
      end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2) @(posedge clk);
    @(negedge clk) primed = 1'b1;
    repeat (2) @(negedge clk);
    for (int p = 0; p < W * H; p++) begin
      int x, y;
      x = p % W;
      y = p / W;
      while ($urandom % 5 == 0) begin
        in = '0;
        @(negedge clk);
      end
      in.valid = 1'b1; in.sof = (p == 0); in.eol = (x == W - 1);
      in.r = 8'($urandom % 256); in.g = 8'($urandom % 256); in.b = 8'($urandom % 256);
      // dark pixels near the top so the junk centres of the row above
      // would win if they were not masked
      if (y < S) begin in.r = 8'd0; in.g = 8'd0; in.b = 8'd0; end
      model(x, y, in.r, in.g, in.b);
      in_cyc.push_back(cyc);
      @(negedge clk);
    end
    in = '0;
    repeat (6) @(negedge clk);
    checks++;
    if (n_out != W * H) begin failures++; $display("got %0d outputs", n_out); end
    checks++;
    if (n_shift == 0 || n_wrap == 0 || n_fill == 0) failures++;
    $display("shifts=%0d wraps=%0d maxfills=%0d", n_shift, n_wrap, n_fill);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // sampled at the falling edge, half a clock after the registers moved
  always @(negedge clk) begin
    if (rst_n) begin
      if (dut.load && dut.in.valid) begin
        n_shift++;
        if (int'(dut.col) == NC - 1) n_wrap++;
      end
      if (dut.p1.valid)
        for (int k = 0; k < 9; k++) if (dut.d1[k] == '1) n_fill++;
      if (out.valid) begin
        checks++;
        if (int'(out.lab_row) != exp_row[n_out] || int'(out.lab_col) != exp_col[n_out] ||
            int'(out.x) != exp_x[n_out] || int'(out.y) != exp_y[n_out] ||
            int'(out.lab_bank) != exp_row[n_out] ||
            int'(out.new_brow) != (exp_flags[n_out] >> 31 != 0 ? 1 : int'(out.new_brow)) ||
            int'(out.cur_bank) != exp_y[n_out] / S) begin
          failures++;
          if (failures < 10)
            $display("pixel (%0d,%0d): got (%0d,%0d) expected (%0d,%0d)", exp_x[n_out], exp_y[n_out],
                     out.lab_row, out.lab_col, exp_row[n_out], exp_col[n_out]);
        end
        checks++;
        if (int'(out.new_brow) != ((exp_x[n_out] == 0 && exp_y[n_out] % S == 0) ? 1 : 0)) failures++;
        checks++;
        if (cyc - in_cyc[n_out] != 3) begin
          failures++;
          if (failures < 10) $display("latency %0d", cyc - in_cyc[n_out]);
        end
        n_out++;
      end
    end
  end

  initial begin
    #200000;
    failures++;
    $display("WATCHDOG expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
