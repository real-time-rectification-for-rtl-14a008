// tb_rectifier: loads X and Y displacement tables for a 64 x 48 image
// (5 x 5 grid of 16 x 12 pixel cells) and streams two frames of a synthetic
// texture through the rectifier, one raw pixel every second cycle with line
// and frame blanking. Every rectified pixel is compared, in raster order,
// with a reference computed here: interpolated displacement, neighbour
// clamping to the image and to the buffered rows, bilinear intensity. Also
// checks the frame/line markers, that the first rectified pixel follows the
// raw row it waits for within 10 pixel clocks, and that clamping in x and y
// and the end-of-frame drain all happen.
module tb_rectifier;
  import rect_ref_pkg::*;
  localparam int W = 64, H = 48, SL = 16, LAG = 8, BACK = SL - LAG - 3;
  localparam int PW = 8, CWD = 16, CHT = 12, LW = 16, DF = 4, FW = 8;
  localparam int NX = W / CWD + 1, NY = H / CHT + 1, LAW = $clog2(NX * NY);
  localparam int FRAMES = 2;

  logic clk = 0, rst_n = 0, in_valid = 0, in_sof = 0;
  logic [PW-1:0] in_pix, out_pix;
  logic lut_we = 0, lut_axis = 0;
  logic [LAW-1:0] lut_waddr;
  logic signed [LW-1:0] lut_wdata;
  logic out_valid, out_sof, out_eol, busy, overrun;

  rectifier #(.W(W), .H(H), .SL(SL), .PW(PW), .CELL_W(CWD), .CELL_H(CHT),
              .LW(LW), .DF(DF), .FW(FW)) dut (.*);

  always #5 clk = !clk;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int checks = 0, failures = 0;
  longint lx [NY][NX], ly [NY][NX];
  int img [FRAMES][H][W];
  int n_clamp_x = 0, n_clamp_y = 0, n_drain = 0;
  int out_frame = 0, ox = 0, oy = 0;
  int trigger_cyc = -1, first_out_cyc = -1;
  bit frame_in_done = 0;

  initial begin
    #50000000;
    $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input longint got, input longint exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("%s got %0d exp %0d (frame %0d x %0d y %0d)", what, got, exp, out_frame, ox, oy);
    end
  endtask

  function automatic int ref_pix(input int f, input int xi, input int yi);
    longint xf, yf, dxv, dyv, px, py, xint, yint, x0, x1, y0, y1, lo, hi;
    int cx, cy;
    cx = xi / CWD; cy = yi / CHT;
    xf = frac_ref(xi % CWD, CWD, FW); yf = frac_ref(yi % CHT, CHT, FW);
    dxv = bilerp_ref(lx[cy][cx], lx[cy][cx+1], lx[cy+1][cx], lx[cy+1][cx+1], xf, yf, FW);
    dyv = bilerp_ref(ly[cy][cx], ly[cy][cx+1], ly[cy+1][cx], ly[cy+1][cx+1], xf, yf, FW);
    px = xi * 16 + dxv; py = yi * 16 + dyv;
    xint = floor_shift(px, DF); yint = floor_shift(py, DF);
    lo = (yi > BACK) ? yi - BACK : 0;
    hi = (yi + LAG < H - 1) ? yi + LAG : H - 1;
    x0 = clampl(xint, 0, W - 1); x1 = clampl(xint + 1, 0, W - 1);
    y0 = clampl(yint, lo, hi);   y1 = clampl(yint + 1, lo, hi);
    if (x0 != xint || x1 != xint + 1) n_clamp_x++;
    if (y0 != yint || y1 != yint + 1) n_clamp_y++;
    return int'(bilerp_ref(img[f][y0][x0], img[f][y0][x1], img[f][y1][x0], img[f][y1][x1],
                           px & 15, py & 15, DF));
  endfunction

  always @(posedge clk) if (rst_n && out_valid) begin
    if (first_out_cyc < 0) first_out_cyc = cyc;
    if (frame_in_done) n_drain++;
    chk(out_pix, ref_pix(out_frame, ox, oy), "pixel");
    chk(out_sof, ox == 0 && oy == 0, "sof");
    chk(out_eol, ox == W - 1, "eol");
    if (ox == W - 1) begin
      ox = 0;
      if (oy == H - 1) begin oy = 0; out_frame++; end
      else oy++;
    end else ox++;
  end

  initial begin
    // smooth tables: a barrel-like term plus a small rotation/shift, in 1/16
    // pixel; the outer grid points push positions past the image edges
    for (int gy = 0; gy < NY; gy++)
      for (int gx = 0; gx < NX; gx++) begin
        longint ux, uy;
        ux = gx * CWD - W / 2; uy = gy * CHT - H / 2;
        lx[gy][gx] = (ux * (ux * ux + uy * uy)) / 256 + uy / 2 + 5;
        ly[gy][gx] = (uy * (ux * ux + uy * uy)) / 256 - ux / 3 - 7;
      end
    for (int f = 0; f < FRAMES; f++)
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++)
          img[f][y][x] = (x * 7 + y * 13 + f * 50 + ((x * y) % 17) * 5) % 256;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int axis = 0; axis < 2; axis++)
      for (int i = 0; i < NX * NY; i++) begin
        lut_we <= 1; lut_axis <= axis[0]; lut_waddr <= LAW'(i);
        lut_wdata <= LW'(axis == 0 ? lx[i / NX][i % NX] : ly[i / NX][i % NX]);
        @(posedge clk);
      end
    lut_we <= 0;
    for (int f = 0; f < FRAMES; f++) begin
      frame_in_done = 0;
      for (int y = 0; y < H; y++) begin
        for (int x = 0; x < W; x++) begin
          in_valid <= 1; in_sof <= (x == 0 && y == 0); in_pix <= PW'(img[f][y][x]);
          @(posedge clk);
          if (f == 0 && y == LAG && x == W - 1) trigger_cyc = cyc;
          in_valid <= 0; in_sof <= 0;
          @(posedge clk);
        end
        repeat (20) @(posedge clk);      // line blanking
      end
      frame_in_done = 1;
      repeat ((LAG + 2) * (2 * W + 20)) @(posedge clk);   // frame blanking
    end
    repeat (50) @(posedge clk);
    chk(out_frame, FRAMES, "frames out");
    chk(overrun, 0, "overrun");
    checks++;
    if (first_out_cyc - trigger_cyc > 20 || first_out_cyc < trigger_cyc) begin
      failures++; $display("first pixel latency %0d cycles", first_out_cyc - trigger_cyc);
    end
    checks++;
    if (n_clamp_x == 0 || n_clamp_y == 0 || n_drain == 0) begin
      failures++; $display("a mechanism never occurred");
    end
    $display("clamp_x=%0d clamp_y=%0d drained=%0d latency=%0d cycles", n_clamp_x, n_clamp_y, n_drain,
             first_out_cyc - trigger_cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
