// tb_sp_store -- checks the accumulating superpixel store.
// Labelled pixels are written as an update unit would send them: rows of
// squares one after another, the first pixel of each row flagged (which
// resets the bank two rows on), each pixel assigned to the row above, its
// own row or the row below, and to a random column.  A model keeps the sums
// per (bank, column); after every row all centres are read back and the
// averages (truncating division), the valid flags and the read rows
// (banks rd_bank-1, rd_bank, rd_bank+1) are compared.
module tb_sp_store;
  import fp_slic_pkg::*;

  localparam int W = 40, S = 4, NB = 6;
  localparam int NC = (W + S - 1) / S;

  logic clk = 1'b0, rst_n = 1'b0;
  lab_pix_t wr;
  grid_t rd_col;
  bank_t rd_bank;
  center_t rd_center [3];
  int checks = 0, failures = 0;
  int n_reset = 0, n_empty = 0;

  longint sr[NB][NC], sg[NB][NC], sb[NB][NC], sx[NB][NC], sy[NB][NC], sn[NB][NC];

  always #5 clk = ~clk;

  sp_store #(.W(W), .S(S), .NBANK(NB)) dut (.*);

  task automatic check_all();
    for (int b = 0; b < NB; b++)
      for (int c = 0; c < NC; c++) begin
        rd_col = grid_t'(c);
        rd_bank = bank_t'((b + 1) % NB);
        #1;
        checks++;
        // rd_center[0] is the row above rd_bank, i.e. bank b
        if (sn[b][c] == 0) begin
          n_empty++;
          if (rd_center[0].valid) begin
            failures++;
            $display("bank %0d col %0d should be empty", b, c);
          end
        end else if (!rd_center[0].valid ||
                     longint'(rd_center[0].r) != sr[b][c] / sn[b][c] ||
                     longint'(rd_center[0].g) != sg[b][c] / sn[b][c] ||
                     longint'(rd_center[0].b) != sb[b][c] / sn[b][c] ||
                     longint'(rd_center[0].x) != sx[b][c] / sn[b][c] ||
                     longint'(rd_center[0].y) != sy[b][c] / sn[b][c]) begin
          failures++;
          if (failures < 10) $display("bank %0d col %0d average wrong (n=%0d)", b, c, sn[b][c]);
        end
        // the other two read rows must show banks b+1 and b+2
        checks++;
        if (rd_center[1].valid != (sn[(b + 1) % NB][c] != 0) ||
            rd_center[2].valid != (sn[(b + 2) % NB][c] != 0)) begin
          failures++;
          if (failures < 10) $display("row select wrong at bank %0d col %0d", b, c);
        end
      end
  endtask

  initial begin
    wr = '0; rd_col = '0; rd_bank = '0;
    for (int b = 0; b < NB; b++)
      for (int c = 0; c < NC; c++) sn[b][c] = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int a = 0; a < 20; a++) begin
      int cur, npix;
      cur = a % NB;
      npix = 30 + int'($urandom % 60);
      for (int i = 0; i < npix; i++) begin
        int lb, lc;
        @(negedge clk);
        lb = (cur + int'($urandom % 3) - 1 + NB) % NB;
        lc = int'($urandom % NC);
        wr = '0;
        wr.valid = ($urandom % 6 != 0);
        wr.r = 8'($urandom); wr.g = 8'($urandom); wr.b = 8'($urandom);
        wr.x = coord_t'($urandom % W); wr.y = coord_t'($urandom % 200);
        wr.lab_bank = bank_t'(lb); wr.lab_col = grid_t'(lc);
        wr.cur_bank = bank_t'(cur);
        wr.new_brow = (i == 0);
        if (i == 0) wr.valid = 1'b1;
        if (wr.valid) begin
          if (wr.new_brow) begin
            n_reset++;
            for (int c = 0; c < NC; c++) begin
              int cb;
              cb = (cur + 1) % NB;
              sr[cb][c] = 0; sg[cb][c] = 0; sb[cb][c] = 0;
              sx[cb][c] = 0; sy[cb][c] = 0; sn[cb][c] = 0;
            end
          end
          sr[lb][lc] += wr.r; sg[lb][lc] += wr.g; sb[lb][lc] += wr.b;
          sx[lb][lc] += wr.x; sy[lb][lc] += wr.y; sn[lb][lc] += 1;
        end
      end
      @(negedge clk) wr = '0;
      check_all();
    end
    checks++;
    if (n_reset == 0 || n_empty == 0) failures++;
    $display("bank resets %0d, empty centres seen %0d", n_reset, n_empty);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #500000;
    failures++;
    $display("WATCHDOG expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
