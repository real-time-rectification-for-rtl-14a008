// tb_stereo_top: end-to-end test of the stereo pipeline at reduced size
// (64 x 48 images, 16-line buffers, disparities 0..8). A textured scene is
// imaged by a left and a right camera, each with its own distortion tables;
// two frames are streamed in with line and frame blanking. The rectified
// pixel pairs are compared with a reference rectification of each camera, and
// the disparity/occlusion stream with the reference SDPS matching of those
// reference rectified lines. Counts the mechanisms the design relies on:
// neighbour clamping, end-of-frame drain, line flush, bank swap, B/MR/ML
// points, two frames; and checks that no error flag is raised.
module tb_stereo_top;
  import stereo_pkg::*;
  import rect_ref_pkg::*;
  import sdps_ref_pkg::*;
  localparam int W = 64, H = 48, SL = 16, LAG = SL / 2, BACK = SL - LAG - 3;
  localparam int PW = 8, CWD = 16, CHT = 12, LW = 16, DF = 4, FW = 8;
  localparam int DMAX = 8, CW = 20, OW = 8, GAP = DMAX / 2 + 2;
  localparam int NX = W / CWD + 1, NY = H / CHT + 1, LAW = $clog2(NX * NY);
  localparam int NC = 2 * (DMAX / 2 + 1), DW = $clog2(NC), XW = $clog2(2 * W);
  localparam int FRAMES = 2, OCC = 15;

  logic clk = 0, rst_n = 0, cam_valid = 0, cam_sof = 0;
  logic [PW-1:0] cam_l, cam_r, rect_l, rect_r;
  logic lut_we = 0, lut_cam = 0, lut_axis = 0;
  logic [LAW-1:0] lut_waddr;
  logic signed [LW-1:0] lut_wdata;
  logic [OW-1:0] occ = OW'(OCC);
  logic rect_valid, rect_sof, rect_eol, disp_valid, disp_last;
  logic [XW-1:0] disp_x;
  logic [DW-1:0] disp_d;
  vis_t disp_state;
  logic [4:0] status;

  stereo_top #(.W(W), .H(H), .SL(SL), .PW(PW), .CELL_W(CWD), .CELL_H(CHT), .LW(LW),
               .DF(DF), .DMAX(DMAX), .CW(CW), .OW(OW)) dut (.*);

  always #5 clk = !clk;

  int checks = 0, failures = 0;
  longint lut [2][2][NY][NX];         // [cam][axis]
  int img [2][FRAMES][H][W];          // [cam]
  int rect [2][FRAMES][H][W];         // reference rectified
  int n_clamp = 0, n_drain = 0, n_b = 0, n_mr = 0, n_ml = 0, n_lines = 0;
  int rf = 0, rx = 0, ry = 0;
  int dexp [$];
  bit frame_in_done = 0;

  initial begin
    #200000000;
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

  function automatic int ref_pix(input int c, input int f, input int xi, input int yi);
    longint xf, yf, dxv, dyv, px, py, xint, yint, x0, x1, y0, y1, lo, hi;
    int cx, cy;
    cx = xi / CWD; cy = yi / CHT;
    xf = frac_ref(xi % CWD, CWD, FW); yf = frac_ref(yi % CHT, CHT, FW);
    dxv = bilerp_ref(lut[c][0][cy][cx], lut[c][0][cy][cx+1], lut[c][0][cy+1][cx],
                     lut[c][0][cy+1][cx+1], xf, yf, FW);
    dyv = bilerp_ref(lut[c][1][cy][cx], lut[c][1][cy][cx+1], lut[c][1][cy+1][cx],
                     lut[c][1][cy+1][cx+1], xf, yf, FW);
    px = xi * 16 + dxv; py = yi * 16 + dyv;
    xint = floor_shift(px, DF); yint = floor_shift(py, DF);
    lo = (yi > BACK) ? yi - BACK : 0;
    hi = (yi + LAG < H - 1) ? yi + LAG : H - 1;
    x0 = clampl(xint, 0, W - 1); x1 = clampl(xint + 1, 0, W - 1);
    y0 = clampl(yint, lo, hi);   y1 = clampl(yint + 1, lo, hi);
    if (x0 != xint || x1 != xint + 1 || y0 != yint || y1 != yint + 1) n_clamp++;
    return int'(bilerp_ref(img[c][f][y0][x0], img[c][f][y0][x1], img[c][f][y1][x0],
                           img[c][f][y1][x1], px & 15, py & 15, DF));
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (rect_valid) begin
      if (frame_in_done) n_drain++;
      chk(rect_l, rect[0][rf][ry][rx], "rect_l");
      chk(rect_r, rect[1][rf][ry][rx], "rect_r");
      chk(rect_sof, rx == 0 && ry == 0, "rect_sof");
      chk(rect_eol, rx == W - 1, "rect_eol");
      if (rx == W - 1) begin
        rx = 0;
        if (ry == H - 1) begin ry = 0; rf++; end else ry++;
      end else rx++;
    end
    if (disp_valid) begin
      int e;
      e = dexp.pop_front();
      chk({disp_x, disp_d, 2'(disp_state)}, e, "disparity point");
      if (disp_state == VIS_B) n_b++; else if (disp_state == VIS_MR) n_mr++; else n_ml++;
      if (disp_last) n_lines++;
    end
  end

  initial begin
    line_t gl, gr;
    // scene: texture at a disparity that varies by region
    for (int f = 0; f < FRAMES; f++)
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          int dsc, xs;
          dsc = (x > 20 && x < 44 && y > 10 && y < 38) ? 6 : 2;
          if (f == 1 && x > 30) dsc = 4;
          xs = x + dsc;
          img[0][f][y][x] = ((x * 37) ^ (y * 11) ^ ((x * y) >> 2)) % 256;
          img[1][f][y][x] = ((xs * 37) ^ (y * 11) ^ ((xs * y) >> 2)) % 256;
        end
    // distortion tables (1/16 pixel), different for the two cameras
    for (int c = 0; c < 2; c++)
      for (int gy = 0; gy < NY; gy++)
        for (int gx = 0; gx < NX; gx++) begin
          longint ux, uy;
          ux = gx * CWD - W / 2; uy = gy * CHT - H / 2;
          lut[c][0][gy][gx] = (ux * (ux * ux + uy * uy)) / (300 + 100 * c) + (c ? 3 : -4);
          lut[c][1][gy][gx] = (uy * (ux * ux + uy * uy)) / (300 + 100 * c) + (c ? ux / 4 : -ux / 5);
        end
    for (int c = 0; c < 2; c++)
      for (int f = 0; f < FRAMES; f++)
        for (int y = 0; y < H; y++)
          for (int x = 0; x < W; x++) rect[c][f][y][x] = ref_pix(c, f, x, y);
    for (int f = 0; f < FRAMES; f++)
      for (int y = 0; y < H; y++) begin
        for (int x = 0; x < W; x++) begin gl[x] = rect[0][f][y][x]; gr[x] = rect[1][f][y][x]; end
        run_line(gl, gr, W, DMAX, OCC, CW);
        for (int x = 2 * W - 1; x >= 0; x--) dexp.push_back({x[XW-1:0], DW'(ref_d[x]), 2'(ref_s[x])});
      end

    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int c = 0; c < 2; c++)
      for (int a = 0; a < 2; a++)
        for (int i = 0; i < NX * NY; i++) begin
          lut_we <= 1; lut_cam <= c[0]; lut_axis <= a[0]; lut_waddr <= LAW'(i);
          lut_wdata <= LW'(lut[c][a][i / NX][i % NX]);
          @(posedge clk);
        end
    lut_we <= 0;
    for (int f = 0; f < FRAMES; f++) begin
      frame_in_done = 0;
      for (int y = 0; y < H; y++) begin
        for (int x = 0; x < W; x++) begin
          cam_valid <= 1; cam_sof <= (x == 0 && y == 0);
          cam_l <= PW'(img[0][f][y][x]); cam_r <= PW'(img[1][f][y][x]);
          @(posedge clk);
          cam_valid <= 0; cam_sof <= 0;
          @(posedge clk);
        end
        repeat (2 * (GAP + 2)) @(posedge clk);     // line blanking
      end
      frame_in_done = 1;
      repeat ((LAG + 2) * (2 * (W + GAP + 2))) @(posedge clk);   // frame blanking
    end
    repeat (6 * W) @(posedge clk);
    chk(rf, FRAMES, "rectified frames");
    chk(n_lines, FRAMES * H, "matched lines");
    chk(dexp.size(), 0, "missing disparity points");
    chk(status, 0, "status flags");
    checks++;
    if (n_clamp == 0 || n_drain == 0 || n_b == 0 || n_mr == 0 || n_ml == 0) begin
      failures++; $display("a mechanism never occurred");
    end
    $display("clamped=%0d drained=%0d lines(flush+bank swap)=%0d B=%0d MR=%0d ML=%0d",
             n_clamp, n_drain, n_lines, n_b, n_mr, n_ml);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
