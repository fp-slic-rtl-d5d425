// delay_unit -- pixel-stream delay line built as a ring buffer in block RAM.
//
// Between two stages of FP-SLIC the pixel stream must be held back until
// the superpixel centres it will be compared with are ready.  The document
// builds these delays as FIFO ring buffers in block RAM with an AXI-stream
// slave input and master output; Eq. 10 gives the length of the first one
// (W*S + (W/2)*S) and Eq. 11 that of the later ones (3*W*S).
//
// How it works: a RAM of DEPTH words and one pointer.  Each accepted input
// beat reads the word at the pointer (the beat that entered DEPTH beats
// earlier) and overwrites it with the new beat, then the pointer advances
// and wraps.  The delay is therefore counted in pixels, not cycles: a beat
// leaves when the DEPTH-th later beat enters.  This keeps the spatial
// distance between the two stages fixed even when the input has idle
// cycles; the price is that the last DEPTH pixels of a stream leave only
// when the next frame pushes them out, as in a continuous video stream.
// The RAM is read-first and the output is registered, which maps onto
// a single block RAM port.
//
// Interface: in/out are pix_t beats (valid, SOF, EOL, RGB).  The slave
// side is always ready (in_ready = 1): the pipeline never stalls, as the
// document's design takes one pixel per cycle (a slow sink is handled by
// the output FIFO of the top, which holds the input back).  out.valid is
// high one cycle after an input beat once DEPTH beats have been stored.
// primed goes high once the buffer is full, i.e. before the first beat
// leaves; the update unit downstream uses it to load its first window
// column.
module delay_unit
  import fp_slic_pkg::*;
#(
  parameter int DEPTH = 6489  // Eq. 10 for W=481, S=9
) (
  input  logic clk,
  input  logic rst_n,
  input  pix_t in,
  output logic in_ready,
  output pix_t out,
  output logic primed
);

  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  typedef logic [PIX_DW-1:0] word_t;

  word_t          mem [DEPTH];
  logic [AW-1:0]  ptr;
  logic           full;
  word_t          rd_q;
  logic           vld_q;

  assign in_ready = 1'b1;

  // Ring buffer: read-first RAM port.
  always_ff @(posedge clk) begin
    if (in.valid) begin
      rd_q      <= mem[ptr];
      mem[ptr]  <= {in.sof, in.eol, in.r, in.g, in.b};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr   <= '0;
      full  <= 1'b0;
      vld_q <= 1'b0;
    end else begin
      vld_q <= in.valid && full;
      if (in.valid) begin
        if (ptr == AW'(DEPTH - 1)) begin
          ptr  <= '0;
          full <= 1'b1;
        end else begin
          ptr <= ptr + 1'b1;
        end
      end
    end
  end

  assign primed = full;
  assign out.valid = vld_q;
  assign {out.sof, out.eol, out.r, out.g, out.b} = rd_q;

endmodule
