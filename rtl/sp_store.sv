// sp_store -- superpixel store of a middle stage (one k-means update).
//
// After update unit k has assigned a pixel to one of the nine superpixels
// around it, this store adds the pixel's red, green, blue, column and row
// to that superpixel's running sums and counts it.  The centre handed to
// the next update unit is the average: each sum divided by the count.
// That is the "update" half of a SLIC iteration, done on the fly.
//
// Organisation, following the document: six banks (center_bank), each
// holding the records of one superpixel row (ceil(W/S) entries).  A pixel
// of superpixel row R can be assigned to rows R-1, R or R+1, and the next
// stage, which runs 3*W*S pixels behind, reads rows R-4..R-2 at the same
// time, so six rows are in use at once.  When H is not a multiple of S the
// short last row of a frame lets the writer get one row further ahead
// across the frame boundary; the top then sets NBANK to seven.  The
// document resets the values of a bank as new superpixels arrive.  Here
// each bank has a row of "in use" flags in flip-flops, cleared in one
// cycle when the writing stage enters superpixel row R (the bank of row
// R+1 is cleared), and a write to an entry whose flag is clear starts a
// fresh sum instead of adding.  The reset mechanism (flags instead of
// clearing the RAM) is this design's choice.
//
// Write side: one lab_pix_t per cycle from update unit k, accumulated by
// a one-cycle read-modify-write through bank read port A.
// Read side (to update unit k+1): the three centres of column rd_col in
// the rows of banks rd_bank-1, rd_bank, rd_bank+1, averaged by division
// and returned asynchronously.  A centre with no pixels is returned with
// valid = 0 so the update unit gives it the maximum distance.
// The divisions are combinational; the document does not say where the
// averaging divider sits.
module sp_store
  import fp_slic_pkg::*;
#(
  parameter int W = 481,
  parameter int S = 9,
  parameter int NBANK = 6
) (
  input  logic     clk,
  input  logic     rst_n,
  input  lab_pix_t wr,
  input  grid_t    rd_col,
  input  bank_t    rd_bank,
  output center_t  rd_center [3]
);

  localparam int NC   = grid_n(W, S);
  localparam int AW   = $clog2(NC + 1);
  localparam int CIW  = (NC > 1) ? $clog2(NC) : 1;   // in-use flag index
  // A superpixel can collect pixels from its own square and the eight
  // around it: at most 9*S*S pixels.
  localparam int CNTW = $clog2(9 * S * S + 1);
  localparam int SCW  = CW + CNTW;   // colour sum width
  localparam int SPW  = PW + CNTW;   // coordinate sum width
  localparam int DW   = CNTW + 3 * SCW + 2 * SPW;

  typedef struct packed {
    logic [CNTW-1:0] cnt;
    logic [SCW-1:0]  sr;
    logic [SCW-1:0]  sg;
    logic [SCW-1:0]  sb;
    logic [SPW-1:0]  sx;
    logic [SPW-1:0]  sy;
  } acc_t;

  // ---------------------------------------------------------------- write
  logic [NC-1:0] inuse [NBANK];
  logic [NC-1:0] inuse_nxt [NBANK];
  logic [DW-1:0] rdata_a [NBANK];
  logic [DW-1:0] rdata_b [NBANK];
  acc_t          old_acc, new_acc;
  logic          entry_live;
  bank_t         clr_bank;

  assign clr_bank = bank_add(wr.cur_bank, 1, NBANK);

  always_comb begin
    for (int b = 0; b < NBANK; b++) inuse_nxt[b] = inuse[b];
    if (wr.valid && wr.new_brow) inuse_nxt[clr_bank] = '0;
    entry_live = inuse_nxt[wr.lab_bank][CIW'(wr.lab_col)];
    old_acc    = acc_t'(rdata_a[wr.lab_bank]);
    if (entry_live) begin
      new_acc.cnt = old_acc.cnt + 1'b1;
      new_acc.sr  = old_acc.sr + SCW'(wr.r);
      new_acc.sg  = old_acc.sg + SCW'(wr.g);
      new_acc.sb  = old_acc.sb + SCW'(wr.b);
      new_acc.sx  = old_acc.sx + SPW'(wr.x);
      new_acc.sy  = old_acc.sy + SPW'(wr.y);
    end else begin
      new_acc.cnt = CNTW'(1);
      new_acc.sr  = SCW'(wr.r);
      new_acc.sg  = SCW'(wr.g);
      new_acc.sb  = SCW'(wr.b);
      new_acc.sx  = SPW'(wr.x);
      new_acc.sy  = SPW'(wr.y);
    end
    if (wr.valid) inuse_nxt[wr.lab_bank][CIW'(wr.lab_col)] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int b = 0; b < NBANK; b++) inuse[b] <= '0;
    end else begin
      for (int b = 0; b < NBANK; b++) inuse[b] <= inuse_nxt[b];
    end
  end

  bank_t sel [3];
  always_comb begin
    for (int k = 0; k < 3; k++) sel[k] = bank_add(rd_bank, k - 1, NBANK);
  end

  for (genvar b = 0; b < NBANK; b++) begin : g_bank
    center_bank #(.N(NC), .DW(DW)) u_bank (
      .clk,
      .we      (wr.valid && (wr.lab_bank == bank_t'(b))),
      .waddr   (AW'(wr.lab_col)),
      .wdata   (DW'(new_acc)),
      .raddr_a (AW'(wr.lab_col)),
      .rdata_a (rdata_a[b]),
      .raddr_b (AW'(rd_col)),
      .rdata_b (rdata_b[b])
    );
  end

  // ----------------------------------------------------------------- read
  always_comb begin
    for (int k = 0; k < 3; k++) begin
      acc_t a;
      logic live;
      a    = acc_t'(rdata_b[sel[k]]);
      live = (int'(rd_col) < NC) && inuse[sel[k]][CIW'(rd_col)] && (a.cnt != '0);
      rd_center[k].valid = live;
      if (live) begin
        rd_center[k].r = chan_t'(a.sr / SCW'(a.cnt));
        rd_center[k].g = chan_t'(a.sg / SCW'(a.cnt));
        rd_center[k].b = chan_t'(a.sb / SCW'(a.cnt));
        rd_center[k].x = coord_t'(a.sx / SPW'(a.cnt));
        rd_center[k].y = coord_t'(a.sy / SPW'(a.cnt));
      end else begin
        rd_center[k].r = '0;
        rd_center[k].g = '0;
        rd_center[k].b = '0;
        rd_center[k].x = '0;
        rd_center[k].y = '0;
      end
    end
  end

endmodule
