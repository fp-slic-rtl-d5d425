// pixel_position -- raster position tracker for one pixel stream.
//
// Every unit of the pipeline needs to know where the pixel it is handling
// lies: its x/y coordinate, the superpixel square (grid column C and row R)
// it falls in, and its offset inside that square.  The stream carries only
// SOF (start of frame) and EOL (end of line) flags, so this tracker keeps
// counters that SOF and EOL resynchronise, as the document describes for
// the update unit ("SOF and EOL serve to synchronize a counter").
//
// Interface: the current beat (valid/sof/eol) goes in; its position comes
// out combinationally in the same cycle.  The counters advance at the clock
// edge when valid is high.  It also counts superpixel rows modulo NBANK
// (bank): the bank index of a row keeps counting across frames, so that
// consecutive frames behave like one tall image for the banked stores.
// The bank count starts at NBANK-1 after reset so the first row uses bank 0.
//
// A frame is assumed to be exactly W x H pixels; SOF restarts the counters,
// EOL ends a line.  The square size S and the frame size are parameters.
module pixel_position
  import fp_slic_pkg::*;
#(
  parameter int H = 321,
  parameter int S = 9,
  parameter int NBANK = nbank_for(H, S)
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   valid,
  input  logic   sof,
  input  logic   eol,
  output coord_t x,
  output coord_t y,
  output coord_t bx,         // x offset inside the square, 0..S-1
  output coord_t by,         // y offset inside the square, 0..S-1
  output grid_t  col,        // C
  output grid_t  row,        // R
  output bank_t  bank,       // bank of superpixel row R
  output logic   new_brow,   // first pixel of a superpixel row
  output logic   last_line   // y == H-1
);

  coord_t x_q, y_q, bx_q, by_q;
  grid_t  col_q, row_q;
  bank_t  bank_q;
  logic   eol_q;

  always_comb begin
    if (sof) begin
      x = '0; y = '0; bx = '0; by = '0; col = '0; row = '0;
    end else if (eol_q) begin
      x  = '0;
      bx = '0;
      col = '0;
      y  = y_q + 1'b1;
      if (by_q == coord_t'(S - 1)) begin
        by  = '0;
        row = row_q + 1'b1;
      end else begin
        by  = by_q + 1'b1;
        row = row_q;
      end
    end else begin
      x = x_q + 1'b1;
      y = y_q;
      by = by_q;
      row = row_q;
      if (bx_q == coord_t'(S - 1)) begin
        bx  = '0;
        col = col_q + 1'b1;
      end else begin
        bx  = bx_q + 1'b1;
        col = col_q;
      end
    end
    new_brow  = (x == '0) && (by == '0);
    bank      = new_brow ? bank_add(bank_q, 1, NBANK) : bank_q;
    last_line = (y == coord_t'(H - 1));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_q <= '0; y_q <= '0; bx_q <= '0; by_q <= '0;
      col_q <= '0; row_q <= '0;
      bank_q <= bank_t'(NBANK - 1);
      eol_q <= 1'b0;
    end else if (valid) begin
      x_q <= x; y_q <= y; bx_q <= bx; by_q <= by;
      col_q <= col; row_q <= row;
      bank_q <= bank;
      eol_q <= eol;
    end
  end

endmodule
