// sp_update_unit -- assigns each pixel to the nearest of nine superpixel
// centres (the "assignment" half of one SLIC iteration).
//
// A pixel lying in square (R, C) of the S x S grid can only belong to the
// superpixels of that square and its eight neighbours.  The unit keeps
// those nine centres in a 3 x 3 sliding window of registers, computes the
// nine distances in parallel (sp_distance), and outputs the row and column
// address of the closest centre together with the pixel.
//
// Sliding window (document Fig. 4 and Fig. 5): the three columns of the
// window shift left by one whenever a pixel starts a new square (every S
// pixels along a line), and the freed right column is loaded from the
// previous stage's store with the centres of the next square column, for
// the rows above, at and below the pixel's square.  At the last square of
// a line the "next" column is column 0 of the square row of the following
// line, so the window wraps to the next line (or next frame) exactly as
// Fig. 5 shows; the cells that then hold centres of the far end of the
// previous line, and cells outside the image, get the maximum distance so
// they are never chosen.  Before the first pixel ever arrives the right
// column is loaded with column 0 of the first square rows (Fig. 4, left):
// this happens once after reset, when the delay unit in front reports it
// is full (primed).
//
// Pipeline, one pixel per clock:
//   cycle 0  pixel at the input; window shift/load decided; read of the
//            store is asynchronous and the window is written at the edge
//   cycle 1  nine distances from the window, registered
//   cycle 2  arg-min of the nine, registered -> out (3 cycles latency)
// Ties go to the first candidate in raster order of the window (top-left
// first); the document does not say how ties are broken.
//
// Interface: in (pix_t), primed (from the delay unit feeding in), the
// store read port rd_col/rd_bank -> rd_center[0..2] (rows above, at,
// below), and out (lab_pix_t) which goes to the next store, the next
// delay unit and, in the last stage, the label unit.
module sp_update_unit
  import fp_slic_pkg::*;
#(
  parameter int W = 481,
  parameter int H = 321,
  parameter int S = 9,
  parameter int M = 80,
  parameter int F = 4,
  parameter int NBANK = nbank_for(H, S)
) (
  input  logic     clk,
  input  logic     rst_n,
  input  pix_t     in,
  input  logic     primed,
  output grid_t    rd_col,
  output bank_t    rd_bank,
  input  center_t  rd_center [3],
  output lab_pix_t out
);

  localparam int NC    = grid_n(W, S);
  localparam int NR    = grid_n(H, S);
  localparam int DISTW = 24;
  localparam logic [DISTW-1:0] DMAX = '1;

  // ------------------------------------------------------------ stage 0
  coord_t x, y, bx, by;
  grid_t  col, row;
  bank_t  bank;
  logic   new_brow, last_line;

  pixel_position #(.H(H), .S(S), .NBANK(NBANK)) u_pos (
    .clk, .rst_n, .valid(in.valid), .sof(in.sof), .eol(in.eol),
    .x, .y, .bx, .by, .col, .row, .bank, .new_brow, .last_line
  );

  logic primed_q;     // first column already loaded
  logic load;

  always_comb begin
    load    = 1'b0;
    rd_col  = '0;
    rd_bank = '0;
    if (in.valid) begin
      if (bx == '0) begin
        load = 1'b1;
        if (int'(col) == NC - 1) begin
          // wrap: column 0 of the square row of the next line
          rd_col = '0;
          if (last_line || by == coord_t'(S - 1)) rd_bank = bank_add(bank, 1, NBANK);
          else                                    rd_bank = bank;
        end else begin
          rd_col  = col + 1'b1;
          rd_bank = bank;
        end
      end
    end else if (primed && !primed_q) begin
      // before the first pixel: column 0 of square rows -1, 0, 1 of the
      // first frame, whose row 0 uses bank 0
      load    = 1'b1;
      rd_col  = '0;
      rd_bank = '0;
    end
  end

  center_t win [3][3];  // [row: above, at, below][col: left, centre, right]

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      primed_q <= 1'b0;
      for (int r = 0; r < 3; r++)
        for (int c = 0; c < 3; c++) win[r][c] <= '0;
    end else begin
      if (primed) primed_q <= 1'b1;
      if (load) begin
        for (int r = 0; r < 3; r++) begin
          win[r][0] <= win[r][1];
          win[r][1] <= win[r][2];
          win[r][2] <= rd_center[r];
        end
      end
    end
  end

  // pixel record carried through the pipeline
  typedef struct packed {
    logic   valid;
    logic   sof;
    logic   eol;
    chan_t  r, g, b;
    coord_t x, y;
    grid_t  row, col;
    bank_t  bank;
    logic   new_brow;
  } stage_t;

  stage_t p1, p2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) p1 <= '0;
    else begin
      p1.valid    <= in.valid;
      p1.sof      <= in.sof;
      p1.eol      <= in.eol;
      p1.r        <= in.r;
      p1.g        <= in.g;
      p1.b        <= in.b;
      p1.x        <= x;
      p1.y        <= y;
      p1.row      <= row;
      p1.col      <= col;
      p1.bank     <= bank;
      p1.new_brow <= new_brow;
    end
  end

  // ------------------------------------------------------------ stage 1
  logic [DISTW-1:0] d_raw [9];
  logic [DISTW-1:0] d1    [9];
  logic [DISTW-1:0] d2    [9];

  for (genvar k = 0; k < 9; k++) begin : g_dist
    sp_distance #(.M(M), .S(S), .F(F), .DISTW(DISTW)) u_dist (
      .pr(p1.r), .pg(p1.g), .pb(p1.b), .px(p1.x), .py(p1.y),
      .cr(win[k / 3][k % 3].r), .cg(win[k / 3][k % 3].g), .cb(win[k / 3][k % 3].b),
      .cx(win[k / 3][k % 3].x), .cy(win[k / 3][k % 3].y),
      .distance(d_raw[k])
    );
  end

  always_comb begin
    for (int k = 0; k < 9; k++) begin
      int rr, cc;
      rr = int'(p1.row) + k / 3 - 1;
      cc = int'(p1.col) + k % 3 - 1;
      if (win[k / 3][k % 3].valid && rr >= 0 && rr < NR && cc >= 0 && cc < NC)
        d1[k] = d_raw[k];
      else
        d1[k] = DMAX;   // wrong or missing centre: never chosen
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p2 <= '0;
      for (int k = 0; k < 9; k++) d2[k] <= DMAX;
    end else begin
      p2 <= p1;
      for (int k = 0; k < 9; k++) d2[k] <= d1[k];
    end
  end

  // ------------------------------------------------------------ stage 2
  logic [3:0]       best;
  logic [DISTW-1:0] best_d;

  always_comb begin
    best   = 4'd4;      // own square if no candidate is valid
    best_d = DMAX;
    for (int k = 0; k < 9; k++) begin
      if (d2[k] < best_d) begin
        best   = 4'(k);
        best_d = d2[k];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out <= '0;
    else begin
      out.valid    <= p2.valid;
      out.sof      <= p2.sof;
      out.eol      <= p2.eol;
      out.r        <= p2.r;
      out.g        <= p2.g;
      out.b        <= p2.b;
      out.x        <= p2.x;
      out.y        <= p2.y;
      out.lab_row  <= grid_t'(int'(p2.row) + int'(best) / 3 - 1);
      out.lab_col  <= grid_t'(int'(p2.col) + int'(best) % 3 - 1);
      out.lab_bank <= bank_add(p2.bank, int'(best) / 3 - 1, NBANK);
      out.new_brow <= p2.new_brow;
      out.cur_bank <= p2.bank;
    end
  end

endmodule
