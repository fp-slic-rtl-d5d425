// axis_out_fifo -- small output FIFO that gives the superpixel ID stream a
// real AXI-stream handshake, and the credit rule that makes the pipeline
// able to wait for a slow sink without stalling it.
//
// The pipeline cannot stop: once a pixel has entered the first delay line,
// the ID of some earlier pixel leaves the label stage a fixed number of
// clocks (RESERVE at most) later, whatever the sink does.  So input
// pixels are only taken while this FIFO has room for every ID that can
// still arrive: s_credit = (count + RESERVE + 1 <= DEPTH).  The top drives
// s_axis_tready from s_credit.  Then the FIFO can never overflow, and the
// pipeline only sees fewer input pixels, which it already handles.
//
// Interface: push side s_valid/s_data/s_ready (s_ready = not full, for the
// label stage's assertion), pop side m_valid/m_data/m_ready (first word
// fall-through: m_data is the oldest entry whenever m_valid is high).
// Push and pop may happen in the same clock.  count and s_credit come
// from registers only, so s_axis_tready has no combinational path from
// any input.
//
// The document gives its stream ports AXI-stream interfaces but does not
// say how the pipeline copes with a sink that is not ready; this FIFO and
// the credit rule are this design's choice.
module axis_out_fifo #(
  parameter int DEPTH   = 32,   // entries, a power of two
  parameter int DW      = 18,   // {tuser, tlast, tdata}
  parameter int RESERVE = 9     // most beats that can arrive after a push
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          s_valid,
  input  logic [DW-1:0] s_data,
  output logic          s_ready,
  output logic          s_credit,
  output logic          m_valid,
  output logic [DW-1:0] m_data,
  input  logic          m_ready
);

  localparam int AW = $clog2(DEPTH);

  logic [DW-1:0] mem [DEPTH];
  logic [AW-1:0] wptr, rptr;
  logic [AW:0]   count;
  logic          push, pop;

  assign s_ready  = (int'(count) < DEPTH);
  assign s_credit = (int'(count) + RESERVE + 1 <= DEPTH);
  assign m_valid  = (count != '0);
  assign m_data   = mem[rptr];
  assign push     = s_valid && s_ready;
  assign pop      = m_valid && m_ready;

  always_ff @(posedge clk) begin
    if (push) mem[wptr] <= s_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (push) wptr <= wptr + 1'b1;
      if (pop)  rptr <= rptr + 1'b1;
      count <= count + (AW+1)'(push) - (AW+1)'(pop);
    end
  end

endmodule
