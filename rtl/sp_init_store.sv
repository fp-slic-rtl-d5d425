// sp_init_store -- superpixel initialisation store of stage 0.
//
// SLIC starts from centres on a regular grid.  FP-SLIC does not move them
// to the lowest-gradient position, so the initial centre of each S x S
// square is simply the pixel in the middle of the square: its colour and
// its position.  This store watches the raw input stream and, when the
// middle pixel of a square passes, writes it into the bank of that square's
// superpixel row.  It is the "simple form of a superpixel store" of the
// document: no summation and no division.
//
// Organisation: NBANK banks (center_bank; six as in the document, seven
// when H is not a multiple of S, see fp_slic_pkg::nbank_for), one per
// superpixel row in flight, selected by the row's bank index, which counts
// rows modulo NBANK across frames.  The middle pixel is at offset (S-1)/2
// inside a square; for the cut-short last column or row of squares it is
// the middle of the part that lies inside the image.  The exact choice of the middle pixel is this
// design's; the document only says "a pixel in the center of the square".
//
// Read side (to update unit 1): given a superpixel column and the bank of a
// superpixel row, returns the centres of that column in the rows above,
// at and below (banks rd_bank-1, rd_bank, rd_bank+1), asynchronously.
// Every returned centre is marked valid; the update unit decides from the
// grid position whether a window cell lies inside the image.
module sp_init_store
  import fp_slic_pkg::*;
#(
  parameter int W = 481,
  parameter int H = 321,
  parameter int S = 9,
  parameter int NBANK = nbank_for(H, S)
) (
  input  logic    clk,
  input  logic    rst_n,
  input  pix_t    in,
  input  grid_t   rd_col,
  input  bank_t   rd_bank,
  output center_t rd_center [3]
);

  localparam int NC = grid_n(W, S);
  localparam int DW = 3 * CW + 2 * PW;
  localparam int AW = $clog2(NC + 1);

  coord_t x, y, bx, by;
  grid_t  col, row;
  bank_t  bank;
  logic   new_brow, last_line;

  pixel_position #(.H(H), .S(S), .NBANK(NBANK)) u_pos (
    .clk, .rst_n, .valid(in.valid), .sof(in.sof), .eol(in.eol),
    .x, .y, .bx, .by, .col, .row, .bank, .new_brow, .last_line
  );

  logic is_mid;
  always_comb begin
    is_mid = in.valid
          && (int'(bx) == mid_off(W, S, int'(col)))
          && (int'(by) == mid_off(H, S, int'(row)));
  end

  logic [DW-1:0] wdata;
  assign wdata = {in.r, in.g, in.b, x, y};

  logic [DW-1:0] rdata [NBANK];
  bank_t         sel [3];

  always_comb begin
    for (int k = 0; k < 3; k++) sel[k] = bank_add(rd_bank, k - 1, NBANK);
  end

  for (genvar b = 0; b < NBANK; b++) begin : g_bank
    logic [DW-1:0] unused_a;
    center_bank #(.N(NC), .DW(DW)) u_bank (
      .clk,
      .we      (is_mid && (bank == bank_t'(b))),
      .waddr   (AW'(col)),
      .wdata   (wdata),
      .raddr_a ('0),
      .rdata_a (unused_a),
      .raddr_b (AW'(rd_col)),
      .rdata_b (rdata[b])
    );
  end

  always_comb begin
    for (int k = 0; k < 3; k++) begin
      rd_center[k].valid = 1'b1;
      {rd_center[k].r, rd_center[k].g, rd_center[k].b,
       rd_center[k].x, rd_center[k].y} = rdata[sel[k]];
    end
  end

endmodule
