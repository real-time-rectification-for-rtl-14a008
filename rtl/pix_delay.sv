// pix_delay: the right pixel shift register of the correspondence module.
//
// An N-stage shift register that delays right-image pixels by N pixel slots
// before they enter the top disparity calculator, so that left and right
// pixels meet in the right calculator while they stream through the array
// in opposite directions. The document gives it about Delta/2 entries; the
// matcher uses one stage per disparity-calculator block.
//
// Interface: en shifts din in and the oldest entry out on dout (dout is the
// value that entered N shifts earlier). clr (synchronous) empties it to zeros,
// which is the value pixels outside the image take.
module pix_delay #(
  parameter int N  = 21,
  parameter int PW = 8
) (
  input  logic          clk,
  input  logic          clr,
  input  logic          en,
  input  logic [PW-1:0] din,
  output logic [PW-1:0] dout
);

  logic [PW-1:0] sr [N];

  always_ff @(posedge clk) begin
    if (clr) begin
      for (int i = 0; i < N; i++) sr[i] <= '0;
    end else if (en) begin
      sr[0] <= din;
      for (int i = 1; i < N; i++) sr[i] <= sr[i-1];
    end
  end

  assign dout = sr[N-1];

endmodule
