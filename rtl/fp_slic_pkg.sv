// fp_slic_pkg -- types and helper functions shared by the FP-SLIC pipeline.
//
// FP-SLIC segments an RGB video stream into superpixels with a fixed number
// of SLIC k-means iterations, one hardware stage per iteration, processing
// one pixel per clock.  This package holds the pixel stream record that
// travels between stages, the labelled-pixel record an update unit hands to
// the next superpixel store, the centre record a store hands to an update
// unit, and a few constant functions used to size the pipeline.
//
// Widths: colour channels are 8 bit (24-bit RGB pixels, as the document
// uses RGB instead of CIELAB).  Coordinates use 12 bits, enough for images
// up to 4095 pixels on a side; the document gives no width, so this is a
// choice of this design.
package fp_slic_pkg;

  localparam int CW = 8;    // colour channel width
  localparam int PW = 12;   // pixel coordinate width (x and y)
  localparam int GW = 8;    // superpixel grid coordinate width (row and column)
  localparam int BW = 3;    // bank index width (up to eight banks)

  typedef logic [CW-1:0] chan_t;
  typedef logic [PW-1:0] coord_t;
  typedef logic [GW-1:0] grid_t;
  typedef logic [BW-1:0] bank_t;

  // One beat of the pixel stream (AXI-stream video style: SOF in tuser,
  // EOL in tlast).
  typedef struct packed {
    logic  valid;
    logic  sof;
    logic  eol;
    chan_t r;
    chan_t g;
    chan_t b;
  } pix_t;

  // Width of the part of pix_t that is stored in a delay line.
  localparam int PIX_DW = 2 + 3 * CW;

  // A superpixel centre as seen by an update unit.
  typedef struct packed {
    logic   valid;  // centre exists (an accumulating store had pixels for it)
    chan_t  r;
    chan_t  g;
    chan_t  b;
    coord_t x;
    coord_t y;
  } center_t;

  // A pixel leaving an update unit, with the grid address of the superpixel
  // it was assigned to.  This is what the next store accumulates and what
  // the label stage turns into a superpixel ID.
  typedef struct packed {
    logic   valid;
    logic   sof;
    logic   eol;
    chan_t  r;
    chan_t  g;
    chan_t  b;
    coord_t x;
    coord_t y;
    grid_t  lab_row;   // A_row: superpixel row address
    grid_t  lab_col;   // A_col: superpixel column address
    bank_t  lab_bank;  // bank holding superpixel row lab_row
    logic   new_brow;  // first pixel of a superpixel row (row of SxS squares)
    bank_t  cur_bank;  // bank of the superpixel row this pixel lies in
  } lab_pix_t;

  // Number of superpixel columns / rows of an image (ceil(W/S), ceil(H/S)).
  function automatic int grid_n(input int len, input int s);
    return (len + s - 1) / s;
  endfunction

  // Offset of the middle pixel inside square number idx of a row of
  // squares that is len pixels long (the last square may be cut short).
  function automatic int mid_off(input int len, input int s, input int idx);
    int last_len;
    last_len = len - (grid_n(len, s) - 1) * s;
    return (idx == grid_n(len, s) - 1) ? (last_len - 1) / 2 : (s - 1) / 2;
  endfunction

  // Banks per superpixel store.  The document uses six.  Six suffice while
  // every superpixel row is S pixel rows high; when H is not a multiple of
  // S the short last row of a frame lets the writing stage run one more
  // superpixel row ahead of the reading stage across the frame boundary,
  // and a seventh bank is needed.
  function automatic int nbank_for(input int h, input int s);
    return (h % s == 0) ? 6 : 7;
  endfunction

  // Bank arithmetic modulo nb.
  function automatic bank_t bank_add(input bank_t b, input int d, input int nb);
    int unsigned t;
    t = unsigned'((int'(b) + d + nb) % nb);
    return t[BW-1:0];
  endfunction

endpackage
