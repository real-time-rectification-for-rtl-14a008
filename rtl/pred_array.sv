// pred_array: predecessor array of the SDPS correspondence module.
//
// Stores, for every Cyclopean column pair k (x = 2k and 2k+1) of a scan line,
// the predecessor records of all disparity cells: NC cells of 4 bits each
// (1 bit for MR, 2 for B, 1 for ML), cell d at bits [4d +: 4]. Two banks are
// kept: while the disparity calculators fill one bank with the current line,
// the back-track module reads the previous line from the other. Keeping only
// the 2-bit visibility code per state, not full indices, follows the
// document; the two-bank organisation is this design's choice.
//
// Timing: write in cycle t (we, wbank, waddr, wdata). Synchronous read:
// rbank/raddr in cycle t gives rdata in cycle t+1.
module pred_array #(
  parameter int W  = 1024,
  parameter int NC = 42,
  localparam int DW = 4 * NC,
  localparam int AW = $clog2(W)
) (
  input  logic          clk,
  input  logic          we,
  input  logic          wbank,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata,
  input  logic          rbank,
  input  logic [AW-1:0] raddr,
  output logic [DW-1:0] rdata
);

  logic [DW-1:0] mem [2 * W];

  always_ff @(posedge clk) begin
    if (we) mem[{wbank, waddr}] <= wdata;
    rdata <= mem[{rbank, raddr}];
  end

endmodule
