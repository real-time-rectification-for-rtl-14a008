// disp_lut: reduced displacement lookup table for one axis (X or Y) of one
// camera.
//
// The table holds the displacement from the ideal (rectified) position to the
// position in the distorted camera image at every grid point of an NX x NY
// grid laid over the image (65 x 65 for a 1024 x 768 image). Equation-style
// bilinear interpolation needs the four grid points around the current cell
// in the same cycle; since FPGA block RAM offers only two ports, the table is
// kept in two identical dual-port copies: copy 0 supplies the upper corners
// A (cx,cy) and B (cx+1,cy), copy 1 the lower corners C (cx,cy+1) and
// D (cx+1,cy+1). This replication follows the document.
//
// The tables come from an off-line calibration. Here they are loaded through a
// write port (we/waddr/wdata, row-major address y*NX+x) that writes both
// copies at once; this loading path is this design's choice, so that one
// bitstream can serve different cameras.
//
// Timing: rd_en with cell (cx, cy) in cycle t gives a, b, c, d in cycle t+1.
// Entries are signed LW-bit fixed-point displacements in pixels.
module disp_lut #(
  parameter int NX = 65,
  parameter int NY = 65,
  parameter int LW = 16,
  localparam int N  = NX * NY,
  localparam int AW = $clog2(N),
  localparam int XW = $clog2(NX),
  localparam int YW = $clog2(NY)
) (
  input  logic                 clk,
  // load port
  input  logic                 we,
  input  logic [AW-1:0]        waddr,
  input  logic signed [LW-1:0] wdata,
  // read port: cell whose top-left grid point is (cx, cy)
  input  logic                 rd_en,
  input  logic [XW-1:0]        cx,
  input  logic [YW-1:0]        cy,
  output logic signed [LW-1:0] a,
  output logic signed [LW-1:0] b,
  output logic signed [LW-1:0] c,
  output logic signed [LW-1:0] d
);

  logic signed [LW-1:0] mem0 [N];
  logic signed [LW-1:0] mem1 [N];

  logic [AW-1:0] addr_a, addr_b, addr_c, addr_d;
  always_comb begin
    addr_a = AW'(cy) * AW'(NX) + AW'(cx);
    addr_b = addr_a + AW'(1);
    addr_c = addr_a + AW'(NX);
    addr_d = addr_c + AW'(1);
  end

  // copy 0: one write port shared with read port A, second read port B
  always_ff @(posedge clk) begin
    if (we) mem0[waddr] <= wdata;
    if (rd_en) begin
      a <= mem0[addr_a];
      b <= mem0[addr_b];
    end
  end

  // copy 1
  always_ff @(posedge clk) begin
    if (we) mem1[waddr] <= wdata;
    if (rd_en) begin
      c <= mem1[addr_c];
      d <= mem1[addr_d];
    end
  end

endmodule
