// pix_shift_reg: the pixel shift register (scan line buffer) of the
// rectification module.
//
// Holds the last SL scan lines of raw camera pixels, SL * W entries of PW
// bits. As in the document it is a three-port memory with one write port and
// two read ports, so the four neighbours of a rectified pixel are fetched in
// two cycles, two at a time. It behaves as a shift register of scan lines:
// the writer places row y at buffer row y mod SL, overwriting the oldest line.
//
// Timing: a write in cycle t is visible to reads issued from cycle t+1. Reads
// are synchronous: address in cycle t, data in cycle t+1. Reading an address
// written in the same cycle returns the old contents.
module pix_shift_reg #(
  parameter int W  = 1024,
  parameter int SL = 64,
  parameter int PW = 8,
  localparam int N  = W * SL,
  localparam int BW = $clog2(N)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [BW-1:0] waddr,
  input  logic [PW-1:0] wdata,
  input  logic          re,
  input  logic [BW-1:0] raddr0,
  input  logic [BW-1:0] raddr1,
  output logic [PW-1:0] rdata0,
  output logic [PW-1:0] rdata1
);

  logic [PW-1:0] mem [N];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) begin
      rdata0 <= mem[raddr0];
      rdata1 <= mem[raddr1];
    end
  end

endmodule
