// pag: Pixel Address Generator for one axis (the "BiPAG X" or "BiPAG Y").
//
// For the ideal pixel being produced, the raster scanner supplies the grid
// cell (cx, cy) containing it and its offset inside the cell (xm, ym) in whole
// pixels. The PAG turns the offset into fractions xf = xm/CELL_W and
// yf = ym/CELL_H with FW fractional bits (rounded to nearest), reads the four
// grid displacements A, B, C, D around the cell from its lookup table in one
// cycle and interpolates the displacement of the current pixel bilinearly.
// Structure (LUT pair + bilinear interpolator) follows the document; the
// fraction format is this design's choice. Cells need not be square: a
// 1024 x 768 image over a 65 x 65 grid has 16 x 12 pixel cells.
//
// Interface: in_valid with cx, cy, xm, ym in cycle t gives out_valid with
// disp (signed LW bits, same fixed-point format as the table) in cycle t+3
// (1 cycle table read, 2 cycles interpolation). One pixel per cycle.
module pag #(
  parameter int NX     = 65,
  parameter int NY     = 65,
  parameter int CELL_W = 16,
  parameter int CELL_H = 12,
  parameter int LW     = 16,
  parameter int FW     = 8,
  localparam int AW  = $clog2(NX * NY),
  localparam int XW  = $clog2(NX),
  localparam int YW  = $clog2(NY),
  localparam int MXW = $clog2(CELL_W),
  localparam int MYW = $clog2(CELL_H)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // table load
  input  logic                 lut_we,
  input  logic [AW-1:0]        lut_waddr,
  input  logic signed [LW-1:0] lut_wdata,
  // current ideal pixel
  input  logic                 in_valid,
  input  logic [XW-1:0]        cx,
  input  logic [YW-1:0]        cy,
  input  logic [MXW-1:0]       xm,
  input  logic [MYW-1:0]       ym,
  // interpolated displacement
  output logic                 out_valid,
  output logic signed [LW-1:0] disp
);

  logic signed [LW-1:0] a, b, c, d;
  logic [FW-1:0] xf_c, yf_c, xf_q, yf_q;
  logic          v_q;

  // in-cell fractions, rounded to nearest
  always_comb begin
    xf_c = FW'((32'(xm) * (32'(1) << FW) + 32'(CELL_W / 2)) / 32'(CELL_W));
    yf_c = FW'((32'(ym) * (32'(1) << FW) + 32'(CELL_H / 2)) / 32'(CELL_H));
  end

  disp_lut #(.NX(NX), .NY(NY), .LW(LW)) u_lut (
    .clk   (clk),
    .we    (lut_we),
    .waddr (lut_waddr),
    .wdata (lut_wdata),
    .rd_en (in_valid),
    .cx    (cx),
    .cy    (cy),
    .a     (a),
    .b     (b),
    .c     (c),
    .d     (d)
  );

  // fractions travel alongside the table read
  always_ff @(posedge clk) begin
    if (!rst_n) v_q <= 1'b0;
    else        v_q <= in_valid;
    if (in_valid) begin
      xf_q <= xf_c;
      yf_q <= yf_c;
    end
  end

  bilerp #(.DW(LW), .FW(FW)) u_interp (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (v_q),
    .a         (a),
    .b         (b),
    .c         (c),
    .d         (d),
    .xf        (xf_q),
    .yf        (yf_q),
    .out_valid (out_valid),
    .out       (disp)
  );

endmodule
