// tb_addr_gen: drives random ideal positions and displacements (some pointing
// outside the image or the buffered row window) into the address generator
// and checks the four neighbour addresses, with clamping to the image in x
// and to [y_lo, y_hi] in y, and the fractional parts, one cycle later.
module tb_addr_gen;
  import rect_ref_pkg::*;
  localparam int W = 64, H = 48, SL = 16, LW = 16, DF = 4;
  localparam int XW = $clog2(W), YW = $clog2(H), BW = $clog2(SL * W);
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic [XW-1:0] xi;
  logic [YW-1:0] yi, y_lo, y_hi;
  logic signed [LW-1:0] dx, dy;
  logic [BW-1:0] addr_a, addr_b, addr_c, addr_d;
  logic [DF-1:0] xf, yf;
  int checks = 0, failures = 0, clamped = 0;

  addr_gen #(.W(W), .H(H), .SL(SL), .LW(LW), .DF(DF)) dut (.*);
  always #5 clk = !clk;

  initial begin
    #1000000;
    $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input longint got, input longint exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("%s got %0d exp %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < 2000; i++) begin
      longint x, y, ddx, ddy, lo, hi, px, py, xint, yint, x0, x1, y0, y1;
      x = $urandom % W; y = $urandom % H;
      ddx = longint'($urandom % 321) - 160;    // +-10 px
      ddy = longint'($urandom % 321) - 160;
      lo = (y > 5) ? y - 5 : 0;
      hi = (y + 8 < H - 1) ? y + 8 : H - 1;
      in_valid <= 1; xi <= XW'(x); yi <= YW'(y); dx <= LW'(ddx); dy <= LW'(ddy);
      y_lo <= YW'(lo); y_hi <= YW'(hi);
      @(posedge clk);
      in_valid <= 0;
      #1;
      px = x * 16 + ddx; py = y * 16 + ddy;
      xint = floor_shift(px, DF); yint = floor_shift(py, DF);
      x0 = clampl(xint, 0, W - 1); x1 = clampl(xint + 1, 0, W - 1);
      y0 = clampl(yint, lo, hi);   y1 = clampl(yint + 1, lo, hi);
      if (x0 != xint || y0 != yint || x1 != xint + 1 || y1 != yint + 1) clamped++;
      chk(out_valid, 1, "valid");
      chk(addr_a, (y0 % SL) * W + x0, "A");
      chk(addr_b, (y0 % SL) * W + x1, "B");
      chk(addr_c, (y1 % SL) * W + x0, "C");
      chk(addr_d, (y1 % SL) * W + x1, "D");
      chk(xf, px & 15, "xf");
      chk(yf, py & 15, "yf");
    end
    checks++;
    if (clamped == 0) begin failures++; $display("clamping never exercised"); end
    $display("clamped=%0d", clamped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
