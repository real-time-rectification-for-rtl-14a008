// bilerp: two-stage pipelined bilinear interpolator.
//
// Computes  out = A + (B-A)*xf + (C-A)*yf + (D+A-B-C)*xf*yf  where A, B, C, D
// are the values at the four corners of a cell (A top-left, B top-right,
// C bottom-left, D bottom-right) and xf, yf are the position inside the cell
// as unsigned fractions of FW bits (value / 2**FW). The same circuit serves
// the pixel address generators (A..D are grid displacements) and the
// intensity calculator (A..D are neighbour pixel intensities).
//
// Structure: stage 1 forms the differences B-A, C-A, D+A-B-C and the products
// (B-A)*xf, (C-A)*yf and xf*yf; stage 2 multiplies D+A-B-C by xf*yf, adds the
// terms to A and rounds to the nearest integer (halves round up). The corner
// value A is added back in, so the output is the interpolated value itself
// rather than its offset from A. Because the weights are convex the result
// always lies between the smallest and largest corner, so it fits DW bits.
//
// Interface: values are signed DW bits; in_valid marks a sample. out/out_valid
// follow two clock cycles later. Fully pipelined: one sample per cycle.
// Reset (rst_n low, synchronous) clears only the valid pipeline.
module bilerp #(
  parameter int DW = 16,
  parameter int FW = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [DW-1:0] a,
  input  logic signed [DW-1:0] b,
  input  logic signed [DW-1:0] c,
  input  logic signed [DW-1:0] d,
  input  logic        [FW-1:0] xf,
  input  logic        [FW-1:0] yf,
  output logic                 out_valid,
  output logic signed [DW-1:0] out
);

  localparam int EW = DW + 2;            // width of D+A-B-C
  localparam int PW = DW + 1 + FW + 1;   // width of (B-A)*xf incl. sign
  localparam int AW = DW + 2 * FW + 4;   // accumulator width

  // stage 1
  logic                    v1;
  logic signed [DW-1:0]    a1;
  logic signed [EW-1:0]    e1;
  logic signed [PW-1:0]    pb1, pc1;
  logic        [2*FW-1:0]  xy1;

  logic signed [DW:0]      ba, ca;
  logic signed [EW-1:0]    e;

  always_comb begin
    ba = (DW+1)'(b) - (DW+1)'(a);
    ca = (DW+1)'(c) - (DW+1)'(a);
    e  = EW'(d) + EW'(a) - EW'(b) - EW'(c);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) v1 <= 1'b0;
    else        v1 <= in_valid;
    if (in_valid) begin
      a1  <= a;
      e1  <= e;
      pb1 <= PW'(ba) * PW'(signed'({1'b0, xf}));
      pc1 <= PW'(ca) * PW'(signed'({1'b0, yf}));
      xy1 <= xf * yf;
    end
  end

  // stage 2
  logic signed [AW-1:0] acc;
  always_comb begin
    acc = (AW'(a1) <<< (2 * FW))
        + ((AW'(pb1) + AW'(pc1)) <<< FW)
        + AW'(e1) * AW'(signed'({1'b0, xy1}))
        + (AW'(1) <<< (2 * FW - 1));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= v1;
    if (v1) out <= DW'(acc >>> (2 * FW));
  end

endmodule
