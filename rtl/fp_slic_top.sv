// fp_slic_top -- FP-SLIC: fully pipelined superpixel segmentation of an RGB
// pixel stream, one pixel per clock, with no external frame memory.
//
// SLIC iterates k-means over the whole image; FP-SLIC instead unrolls a
// fixed, small number of iterations (ITER) into a chain of hardware stages
// that all work at once on different lines of the image (document Fig. 3):
//
//   stage 0      initial delay (Eq. 10: W*S + (W/2)*S pixels) and the
//                initialisation store, which keeps the middle pixel of every
//                S x S square as the first centres
//   stage k      update unit k assigns each pixel to the nearest of the nine
//   (1..ITER-1)  centres around it; the superpixel store of stage k sums the
//                assigned pixels per superpixel and gives the averages to
//                update unit k+1; a delay of 3*W*S pixels (Eq. 11) keeps the
//                pixel stream behind until those averages are final
//   stage ITER   the last update unit's addresses go to the label unit,
//                which outputs ID = ceil(W/S) * A_row + A_col (Eq. 12)
//
// The main configuration is the document's: two iterations (stage 0, one
// middle stage and the label stage), compactness m = 80, 481 x 321 pixel
// images.  S = 9 is the integer nearest to sqrt(481*321/2000) for the
// 2000 superpixels of the document's resource table; it gives a 54 x 36
// grid (1944 superpixels).
//
// Interface: AXI-stream video in (tdata = {R,G,B}, tuser = SOF,
// tlast = EOL); AXI-stream out with the 16-bit superpixel ID of every pixel
// in the same order, tuser/tlast copied.  The ID of a pixel reaches the
// output FIFO 4*ITER+1 clocks after the pixel D0 + (ITER-1)*DM positions
// later has been taken in: the delays count pixels, so the last lines of a
// frame are pushed out by the following frame, as in a continuous video
// stream.  The pipeline itself never stalls.  Back-pressure from the sink
// is absorbed by a small output FIFO (axis_out_fifo); s_axis_tready drops
// while that FIFO has no room left for the IDs still in flight, so a slow
// sink slows the input instead.  The FIFO and this credit rule are this
// design's choice; the document gives the ports AXI-stream interfaces
// without saying how a sink that is not ready is handled.
module fp_slic_top
  import fp_slic_pkg::*;
#(
  parameter int W    = 481,
  parameter int H    = 321,
  parameter int S    = 9,
  parameter int M    = 80,
  parameter int F    = 4,
  parameter int ITER = 2,
  parameter int IDW  = 16,
  parameter int D0   = W * S + (W / 2) * S,  // Eq. 10
  parameter int DM   = 3 * W * S,            // Eq. 11
  parameter int NBANK = nbank_for(H, S)      // banks per store
) (
  input  logic           clk,
  input  logic           rst_n,
  // pixel stream in
  input  logic           s_axis_tvalid,
  input  logic [23:0]    s_axis_tdata,
  input  logic           s_axis_tuser,
  input  logic           s_axis_tlast,
  output logic           s_axis_tready,
  // superpixel ID stream out
  output logic           m_axis_tvalid,
  output logic [IDW-1:0] m_axis_tdata,
  output logic           m_axis_tuser,
  output logic           m_axis_tlast,
  input  logic           m_axis_tready
);

  pix_t     px_in;
  pix_t     st_in  [1:ITER];     // pixel stream entering update unit k
  logic     primed [1:ITER];
  lab_pix_t lab    [1:ITER];     // output of update unit k
  logic     take;                // input pixel accepted
  grid_t    rd_col [1:ITER];
  bank_t    rd_bank[1:ITER];
  center_t  rd_ctr [1:ITER][3];  // centres read by update unit k

  // Room in the output FIFO for every ID still in flight (LAT clocks,
  // one more for margin).
  localparam int LAT  = 4 * ITER + 1;
  localparam int OFD  = 2 ** $clog2(2 * (LAT + 1) + 2);
  logic credit, lab_tvalid, lab_tuser, lab_tlast, fifo_ready, unused_ready0;
  logic [IDW-1:0] lab_tdata;

  assign s_axis_tready = credit;
  assign take          = s_axis_tvalid && credit;
  assign px_in.valid = take;
  assign px_in.sof   = s_axis_tuser;
  assign px_in.eol   = s_axis_tlast;
  assign {px_in.r, px_in.g, px_in.b} = s_axis_tdata;

  // ------------------------------------------------------------ stage 0
  delay_unit #(.DEPTH(D0)) u_delay0 (
    .clk, .rst_n, .in(px_in), .in_ready(unused_ready0),
    .out(st_in[1]), .primed(primed[1])
  );

  sp_init_store #(.W(W), .H(H), .S(S), .NBANK(NBANK)) u_init (
    .clk, .rst_n, .in(px_in),
    .rd_col(rd_col[1]), .rd_bank(rd_bank[1]), .rd_center(rd_ctr[1])
  );

  // ------------------------------------------------------ stages 1..ITER
  for (genvar k = 1; k <= ITER; k++) begin : g_stage
    sp_update_unit #(.W(W), .H(H), .S(S), .M(M), .F(F), .NBANK(NBANK)) u_update (
      .clk, .rst_n, .in(st_in[k]), .primed(primed[k]),
      .rd_col(rd_col[k]), .rd_bank(rd_bank[k]), .rd_center(rd_ctr[k]),
      .out(lab[k])
    );

    if (k < ITER) begin : g_mid
      pix_t px_fwd;
      logic unused_ready;
      assign px_fwd.valid = lab[k].valid;
      assign px_fwd.sof   = lab[k].sof;
      assign px_fwd.eol   = lab[k].eol;
      assign px_fwd.r     = lab[k].r;
      assign px_fwd.g     = lab[k].g;
      assign px_fwd.b     = lab[k].b;

      sp_store #(.W(W), .S(S), .NBANK(NBANK)) u_store (
        .clk, .rst_n, .wr(lab[k]),
        .rd_col(rd_col[k+1]), .rd_bank(rd_bank[k+1]), .rd_center(rd_ctr[k+1])
      );

      delay_unit #(.DEPTH(DM)) u_delay (
        .clk, .rst_n, .in(px_fwd), .in_ready(unused_ready),
        .out(st_in[k+1]), .primed(primed[k+1])
      );
    end
  end

  // ------------------------------------------------------- label stage
  sp_label #(.W(W), .S(S), .IDW(IDW)) u_label (
    .clk, .rst_n, .in(lab[ITER]),
    .m_tvalid(lab_tvalid), .m_tdata(lab_tdata),
    .m_tuser(lab_tuser), .m_tlast(lab_tlast), .m_tready(fifo_ready)
  );

  // ------------------------------------------------------- output FIFO
  axis_out_fifo #(.DEPTH(OFD), .DW(IDW + 2), .RESERVE(LAT + 1)) u_ofifo (
    .clk, .rst_n,
    .s_valid(lab_tvalid), .s_data({lab_tuser, lab_tlast, lab_tdata}),
    .s_ready(fifo_ready), .s_credit(credit),
    .m_valid(m_axis_tvalid), .m_data({m_axis_tuser, m_axis_tlast, m_axis_tdata}),
    .m_ready(m_axis_tready)
  );

endmodule
