// sp_label -- label stage: turns the superpixel address of each pixel into
// a superpixel ID and sends it out as an AXI stream.
//
// The last update unit delivers, for every pixel, the row address A_row and
// column address A_col of the superpixel it belongs to.  Following the
// document (Eq. 12) the ID is
//   ID = SPs_per_row * A_row + A_col,   SPs_per_row = ceil(W/S)
// so IDs run in raster order over the superpixel grid.  SOF travels in
// tuser and EOL in tlast, beside the ID in tdata, one registered stage
// after the input.
//
// The label stage has no back-pressure: the pipeline moves one pixel per
// clock and cannot stall, so whatever takes the IDs must always be ready.
// In the top that is an output FIFO whose credit rule guarantees room;
// m_tready is an input only so that this rule can be checked by an
// assertion.
module sp_label
  import fp_slic_pkg::*;
#(
  parameter int W   = 481,
  parameter int S   = 9,
  parameter int IDW = 16
) (
  input  logic           clk,
  input  logic           rst_n,
  input  lab_pix_t       in,
  output logic           m_tvalid,
  output logic [IDW-1:0] m_tdata,
  output logic           m_tuser,
  output logic           m_tlast,
  input  logic           m_tready
);

  localparam int NC = grid_n(W, S);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m_tvalid <= 1'b0;
      m_tdata  <= '0;
      m_tuser  <= 1'b0;
      m_tlast  <= 1'b0;
    end else begin
      m_tvalid <= in.valid;
      m_tdata  <= IDW'(in.lab_row) * IDW'(NC) + IDW'(in.lab_col);
      m_tuser  <= in.sof;
      m_tlast  <= in.eol;
    end
  end

  // The sink must take every beat.
  a_sink_ready: assert property (@(posedge clk) disable iff (!rst_n)
                                 m_tvalid |-> m_tready)
    else $error("sp_label: sink not ready for a superpixel ID beat");

endmodule
