// intensity_calc: Intensity Calculator of the rectification module.
//
// The pixel shift register delivers the four neighbours of a rectified pixel
// over two cycles, two per cycle: A (x,y) and B (x+1,y) first, then C (x,y+1)
// and D (x+1,y+1). This block keeps A and B, and when C and D arrive it
// interpolates the intensity bilinearly with the fractional part (xf, yf) of
// the distorted position, using the same interpolation circuit as the pixel
// address generators (as the document describes). The pixels are widened by
// one bit so the shared signed interpolator can be reused unchanged.
//
// Interface: ab_valid marks the cycle with A on pix0 and B on pix1; cd_valid
// (the next cycle) marks C on pix0 and D on pix1, with xf, yf (DF-bit
// fractions) valid in that cycle. out_valid/pixel follow two cycles after
// cd_valid. Output is rounded to nearest, unsigned PW bits.
module intensity_calc #(
  parameter int PW = 8,
  parameter int DF = 4
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          ab_valid,
  input  logic          cd_valid,
  input  logic [PW-1:0] pix0,
  input  logic [PW-1:0] pix1,
  input  logic [DF-1:0] xf,
  input  logic [DF-1:0] yf,
  output logic          out_valid,
  output logic [PW-1:0] pixel
);

  logic [PW-1:0] pa, pb;
  logic signed [PW:0] res;

  always_ff @(posedge clk) begin
    if (ab_valid) begin
      pa <= pix0;
      pb <= pix1;
    end
  end

  bilerp #(.DW(PW + 1), .FW(DF)) u_interp (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (cd_valid),
    .a         (signed'({1'b0, pa})),
    .b         (signed'({1'b0, pb})),
    .c         (signed'({1'b0, pix0})),
    .d         (signed'({1'b0, pix1})),
    .xf        (xf),
    .yf        (yf),
    .out_valid (out_valid),
    .out       (res)
  );

  // the interpolated value lies between the corner values, so it is never
  // negative and its top bit is always zero
  assign pixel = res[PW-1:0];

  assert property (@(posedge clk) disable iff (!rst_n) out_valid |-> !res[PW]);

endmodule
