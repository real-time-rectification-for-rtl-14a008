// rectifier: rectification module for one camera.
//
// Removes lens distortion and camera misalignment in a single step. Raw
// pixels are written into a buffer of the last SL scan lines (pix_shift_reg).
// Once enough lines are buffered to cover the largest displacement, a raster
// scanner walks the ideal (rectified) image. For each ideal pixel two pixel
// address generators (pag, X and Y) interpolate the displacement to the
// distorted image from reduced lookup tables, the address generator
// (addr_gen) turns the integral position into four neighbour addresses, the
// buffer returns the neighbours two per cycle, and the intensity calculator
// (intensity_calc) interpolates the rectified intensity. The block structure
// follows the document; the scheduling below is this design's choice.
//
// Scheduling: one rectified pixel is started every second clock cycle,
// because the two buffer read ports need two cycles for four neighbours; raw
// pixels must therefore arrive at most every second cycle (the master clock
// runs at twice the pixel rate). Ideal row yi is started once raw rows up to
// yi + LAG are complete (or the whole frame has arrived), so displacements of
// up to LAG rows downwards and SL - LAG - 3 rows upwards are served; a
// position outside that window or outside the image is clamped to its edge,
// which repeats the nearest valid pixel into the empty borders. After the last
// raw row the module still needs about LAG + 1 rows of time (vertical
// blanking) to finish the frame; a new frame starting earlier raises overrun
// and restarts the scanner.
//
// LINE_GAP inserts at least that many idle pixel slots between rectified
// rows, even when rows are already buffered (at the end of a frame); the
// correspondence module needs such a gap to drain each line.
//
// Interface: in_valid/in_sof/in_pix is the raw raster stream (in_sof on the
// first pixel of a frame). lut_we/lut_axis/lut_waddr/lut_wdata load the X
// (lut_axis 0) or Y (lut_axis 1) displacement table; entries are signed
// pixel displacements with DF fractional bits. out_valid/out_sof/out_eol/
// out_pix is the rectified raster stream, in order, one pixel per valid.
// Latency from the start of an ideal pixel to its output is 8 cycles.
module rectifier #(
  parameter int W      = 1024,
  parameter int H      = 768,
  parameter int SL     = 64,
  parameter int LAG    = SL / 2,
  parameter int PW     = 8,
  parameter int CELL_W = 16,
  parameter int CELL_H = 12,
  parameter int LW     = 16,
  parameter int DF     = 4,
  parameter int FW     = 8,
  parameter int LINE_GAP = 0,
  localparam int NX  = W / CELL_W + 1,
  localparam int NY  = H / CELL_H + 1,
  localparam int LAW = $clog2(NX * NY),
  localparam int XW  = $clog2(W),
  localparam int YW  = $clog2(H + 1),
  localparam int BW  = $clog2(SL * W)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // raw pixel stream
  input  logic                  in_valid,
  input  logic                  in_sof,
  input  logic [PW-1:0]         in_pix,
  // lookup table load
  input  logic                  lut_we,
  input  logic                  lut_axis,
  input  logic [LAW-1:0]        lut_waddr,
  input  logic signed [LW-1:0]  lut_wdata,
  // rectified pixel stream
  output logic                  out_valid,
  output logic                  out_sof,
  output logic                  out_eol,
  output logic [PW-1:0]         out_pix,
  // status
  output logic                  busy,
  output logic                  overrun
);

  localparam int BACK = SL - LAG - 3;
  localparam int CXW  = $clog2(NX);
  localparam int CYW  = $clog2(NY);
  localparam int MXW  = $clog2(CELL_W);
  localparam int MYW  = $clog2(CELL_H);
  localparam int SLW  = $clog2(SL);

  // ------------------------------------------------------------------
  // writer: raw raster into the line buffer
  // ------------------------------------------------------------------
  logic [XW-1:0] wx;
  logic [YW-1:0] wy;          // current raw row
  logic [YW-1:0] rows_done;   // complete raw rows of this frame
  logic [XW-1:0] wx_eff;
  logic [YW-1:0] wy_eff;
  logic [BW-1:0] waddr;

  always_comb begin
    wx_eff = in_sof ? '0 : wx;
    wy_eff = in_sof ? '0 : wy;
    waddr  = BW'(wy_eff[SLW-1:0]) * BW'(W) + BW'(wx_eff);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wx        <= '0;
      wy        <= '0;
      rows_done <= YW'(H);      // no frame pending until the first in_sof
    end else if (in_valid) begin
      if (wx_eff == XW'(W - 1)) begin
        wx        <= '0;
        wy        <= wy_eff + 1'b1;
        rows_done <= wy_eff + 1'b1;
      end else begin
        wx        <= wx_eff + 1'b1;
        wy        <= wy_eff;
        if (in_sof) rows_done <= '0;
      end
    end
  end

  // ------------------------------------------------------------------
  // raster scanner over the ideal image
  // ------------------------------------------------------------------
  logic           gen_active, gen_phase, issue;
  logic [XW-1:0]  xi;
  logic [YW-1:0]  yi;
  logic [CXW-1:0] cx;
  logic [CYW-1:0] cy;
  logic [MXW-1:0] xm;
  logic [MYW-1:0] ym;
  logic           row_ready;
  logic [YW-1:0]  y_lo, y_hi;
  logic [15:0]    gap_cnt;

  always_comb begin
    row_ready = (32'(rows_done) >= 32'(yi) + 32'(LAG) + 1) || (rows_done == YW'(H));
    issue     = gen_active && !gen_phase && row_ready && (gap_cnt == '0) &&
                !(in_valid && in_sof);
    y_lo      = (32'(yi) > 32'(BACK)) ? YW'(32'(yi) - 32'(BACK)) : '0;
    y_hi      = (32'(yi) + 32'(LAG) < 32'(H - 1)) ? YW'(32'(yi) + 32'(LAG)) : YW'(H - 1);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      gen_active <= 1'b0;
      gen_phase  <= 1'b0;
      overrun    <= 1'b0;
      {xi, yi, cx, cy, xm, ym} <= '0;
      gap_cnt    <= '0;
    end else if (in_valid && in_sof) begin
      if (gen_active) overrun <= 1'b1;
      gen_active <= 1'b1;
      gen_phase  <= 1'b0;
      {xi, yi, cx, cy, xm, ym} <= '0;
    end else begin
      if (gen_phase)  gen_phase <= 1'b0;
      else if (issue) gen_phase <= 1'b1;
      if (gap_cnt != '0) gap_cnt <= gap_cnt - 1'b1;
      if (issue) begin
        if (xi == XW'(W - 1)) begin
          gap_cnt <= 16'(2 * LINE_GAP);
          xi <= '0;
          cx <= '0;
          xm <= '0;
          if (yi == YW'(H - 1)) gen_active <= 1'b0;
          yi <= yi + 1'b1;
          if (ym == MYW'(CELL_H - 1)) begin
            ym <= '0;
            cy <= cy + 1'b1;
          end else begin
            ym <= ym + 1'b1;
          end
        end else begin
          xi <= xi + 1'b1;
          if (xm == MXW'(CELL_W - 1)) begin
            xm <= '0;
            cx <= cx + 1'b1;
          end else begin
            xm <= xm + 1'b1;
          end
        end
      end
    end
  end

  assign busy = gen_active;

  // ------------------------------------------------------------------
  // pixel address generators (X and Y)
  // ------------------------------------------------------------------
  logic                 pag_vx, pag_vy;
  logic signed [LW-1:0] dx, dy;

  pag #(.NX(NX), .NY(NY), .CELL_W(CELL_W), .CELL_H(CELL_H), .LW(LW), .FW(FW)) u_pag_x (
    .clk(clk), .rst_n(rst_n),
    .lut_we(lut_we && !lut_axis), .lut_waddr(lut_waddr), .lut_wdata(lut_wdata),
    .in_valid(issue), .cx(cx), .cy(cy), .xm(xm), .ym(ym),
    .out_valid(pag_vx), .disp(dx)
  );

  pag #(.NX(NX), .NY(NY), .CELL_W(CELL_W), .CELL_H(CELL_H), .LW(LW), .FW(FW)) u_pag_y (
    .clk(clk), .rst_n(rst_n),
    .lut_we(lut_we && lut_axis), .lut_waddr(lut_waddr), .lut_wdata(lut_wdata),
    .in_valid(issue), .cx(cx), .cy(cy), .xm(xm), .ym(ym),
    .out_valid(pag_vy), .disp(dy)
  );

  // ideal position, window and framing travel with the token
  typedef struct packed {
    logic [XW-1:0] xi;
    logic [YW-1:0] yi;
    logic [YW-1:0] y_lo;
    logic [YW-1:0] y_hi;
    logic          sof;
    logic          eol;
  } tok_t;

  localparam int TOK_DLY = 8;   // issue to rectified pixel
  tok_t tok_pipe [TOK_DLY];
  tok_t tok_in;

  always_comb begin
    tok_in.xi   = xi;
    tok_in.yi   = yi;
    tok_in.y_lo = y_lo;
    tok_in.y_hi = y_hi;
    tok_in.sof  = (xi == '0) && (yi == '0);
    tok_in.eol  = (xi == XW'(W - 1));
  end

  always_ff @(posedge clk) begin
    tok_pipe[0] <= tok_in;
    for (int i = 1; i < TOK_DLY; i++) tok_pipe[i] <= tok_pipe[i-1];
  end

  // ------------------------------------------------------------------
  // address generator
  // ------------------------------------------------------------------
  logic          ag_valid;
  logic [BW-1:0] addr_a, addr_b, addr_c, addr_d;
  logic [DF-1:0] ag_xf, ag_yf, xf_q, yf_q;

  addr_gen #(.W(W), .H(H), .SL(SL), .LW(LW), .DF(DF)) u_addr_gen (
    .clk(clk), .rst_n(rst_n),
    .in_valid(pag_vx),
    .xi(tok_pipe[2].xi), .yi(tok_pipe[2].yi),
    .dx(dx), .dy(dy),
    .y_lo(tok_pipe[2].y_lo), .y_hi(tok_pipe[2].y_hi),
    .out_valid(ag_valid),
    .addr_a(addr_a), .addr_b(addr_b), .addr_c(addr_c), .addr_d(addr_d),
    .xf(ag_xf), .yf(ag_yf)
  );

  // ------------------------------------------------------------------
  // line buffer: A,B read in the first cycle, C,D in the second
  // ------------------------------------------------------------------
  logic          rd_second, ab_valid, cd_valid;
  logic [PW-1:0] rdata0, rdata1;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_second <= 1'b0;
      ab_valid  <= 1'b0;
      cd_valid  <= 1'b0;
    end else begin
      rd_second <= ag_valid;
      ab_valid  <= ag_valid;
      cd_valid  <= rd_second;
    end
    if (rd_second) begin
      xf_q <= ag_xf;
      yf_q <= ag_yf;
    end
  end

  pix_shift_reg #(.W(W), .SL(SL), .PW(PW)) u_buf (
    .clk(clk),
    .we(in_valid), .waddr(waddr), .wdata(in_pix),
    .re(ag_valid || rd_second),
    .raddr0(rd_second ? addr_c : addr_a),
    .raddr1(rd_second ? addr_d : addr_b),
    .rdata0(rdata0), .rdata1(rdata1)
  );

  // ------------------------------------------------------------------
  // intensity calculator
  // ------------------------------------------------------------------
  intensity_calc #(.PW(PW), .DF(DF)) u_icalc (
    .clk(clk), .rst_n(rst_n),
    .ab_valid(ab_valid), .cd_valid(cd_valid),
    .pix0(rdata0), .pix1(rdata1),
    .xf(xf_q), .yf(yf_q),
    .out_valid(out_valid), .pixel(out_pix)
  );

  assign out_sof = tok_pipe[TOK_DLY-1].sof;
  assign out_eol = tok_pipe[TOK_DLY-1].eol;

  // the tables of both axes are interpolated in lock step
  assert property (@(posedge clk) disable iff (!rst_n) pag_vx == pag_vy);
  // raw pixels arrive at most every second cycle
  assert property (@(posedge clk) disable iff (!rst_n) in_valid |=> !in_valid);

endmodule
