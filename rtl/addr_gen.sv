// addr_gen: Address Generator of the rectification module.
//
// Adds the interpolated displacement (dx, dy) to the ideal pixel position
// (xi, yi) to get the position in the distorted camera image, splits it into
// an integral part and a fractional part of DF bits, and converts the integral
// part into the addresses of the four neighbouring pixels in the pixel shift
// register: A = (x, y), B = (x+1, y), C = (x, y+1), D = (x+1, y+1). The
// fractional part goes on to the intensity calculator. This split follows the
// document.
//
// This design's choices: neighbour coordinates are clamped to the image in x
// and to the rows [y_lo, y_hi] that the buffer holds in y. Clamping repeats
// the nearest valid pixel, which extends valid intensities into the empty
// borders that misalignment leaves in the rectified image. The buffer stores
// row y at buffer row y mod SL (SL a power of two), so an address is
// (y mod SL) * W + x.
//
// Timing: registered outputs, one cycle after in_valid; one pixel per cycle.
//
// Lint reports the upper bits of the address function's arguments as unused:
// the coordinates are clamped into the image first, so only the column bits
// and the row modulo SL take part in the address.
module addr_gen #(
  parameter int W  = 1024,
  parameter int H  = 768,
  parameter int SL = 64,
  parameter int LW = 16,
  parameter int DF = 4,
  localparam int XW = $clog2(W),
  localparam int YW = $clog2(H),
  localparam int BW = $clog2(SL * W)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic [XW-1:0]        xi,
  input  logic [YW-1:0]        yi,
  input  logic signed [LW-1:0] dx,
  input  logic signed [LW-1:0] dy,
  input  logic [YW-1:0]        y_lo,
  input  logic [YW-1:0]        y_hi,
  output logic                 out_valid,
  output logic [BW-1:0]        addr_a,
  output logic [BW-1:0]        addr_b,
  output logic [BW-1:0]        addr_c,
  output logic [BW-1:0]        addr_d,
  output logic [DF-1:0]        xf,
  output logic [DF-1:0]        yf
);

  localparam int PW  = LW + 16;       // position width (signed, DF frac bits)
  localparam int SLW = $clog2(SL);

  logic signed [PW-1:0] px, py, xint, yint;
  logic signed [PW-1:0] x0, x1, y0, y1;

  function automatic logic signed [PW-1:0] clamp(
      input logic signed [PW-1:0] v,
      input logic signed [PW-1:0] lo,
      input logic signed [PW-1:0] hi);
    if (v < lo)      return lo;
    else if (v > hi) return hi;
    else             return v;
  endfunction

  // x and y are already clamped into the image, so only their low bits
  // (column, row modulo SL) form the address; the upper bits are unused
  function automatic logic [BW-1:0] buf_addr(input logic signed [PW-1:0] x,
                                             input logic signed [PW-1:0] y);
    logic [SLW-1:0] row;
    row = y[SLW-1:0];
    return BW'(row) * BW'(W) + BW'(x[XW-1:0]);
  endfunction

  always_comb begin
    px   = (PW'(signed'({1'b0, xi})) <<< DF) + PW'(dx);
    py   = (PW'(signed'({1'b0, yi})) <<< DF) + PW'(dy);
    xint = px >>> DF;
    yint = py >>> DF;
    x0 = clamp(xint,          PW'(0),                   PW'(W - 1));
    x1 = clamp(xint + PW'(1), PW'(0),                   PW'(W - 1));
    y0 = clamp(yint,          PW'(signed'({1'b0, y_lo})), PW'(signed'({1'b0, y_hi})));
    y1 = clamp(yint + PW'(1), PW'(signed'({1'b0, y_lo})), PW'(signed'({1'b0, y_hi})));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
    if (in_valid) begin
      addr_a <= buf_addr(x0, y0);
      addr_b <= buf_addr(x1, y0);
      addr_c <= buf_addr(x0, y1);
      addr_d <= buf_addr(x1, y1);
      xf     <= px[DF-1:0];
      yf     <= py[DF-1:0];
    end
  end

endmodule
