// center_bank -- one bank of a superpixel store: the centre records of one
// row of superpixels (ceil(W/S) entries).
//
// The document composes every superpixel store of six such banks, each
// holding the centres of a single superpixel row.  A bank is a small
// distributed (LUT) RAM: one synchronous write port and two asynchronous
// read ports.  Read port A serves the owning stage's read-modify-write
// (accumulate a pixel into its superpixel in one cycle); read port B serves
// the next stage's update unit, which loads window columns from it.  The
// record format is left to the store that uses the bank (DW bits).
module center_bank #(
  parameter int N  = 54,   // entries: superpixels per row, ceil(481/9)
  parameter int DW = 64
) (
  input  logic                         clk,
  input  logic                         we,
  input  logic [$clog2(N+1)-1:0]       waddr,
  input  logic [DW-1:0]                wdata,
  input  logic [$clog2(N+1)-1:0]       raddr_a,
  output logic [DW-1:0]                rdata_a,
  input  logic [$clog2(N+1)-1:0]       raddr_b,
  output logic [DW-1:0]                rdata_b
);

  logic [DW-1:0] mem [N];

  always_ff @(posedge clk) begin
    if (we && (int'(waddr) < N)) mem[waddr] <= wdata;
  end

  assign rdata_a = (int'(raddr_a) < N) ? mem[raddr_a] : '0;
  assign rdata_b = (int'(raddr_b) < N) ? mem[raddr_b] : '0;

endmodule
