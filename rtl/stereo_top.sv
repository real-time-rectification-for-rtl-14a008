// stereo_top: real-time stereo vision pipeline: rectification of both camera
// images followed by Symmetric Dynamic Programming Stereo matching.
//
// Each camera's raw pixel stream passes through its own rectifier, which
// removes lens distortion and camera misalignment with interpolated lookup
// tables so that corresponding points lie on the same scan line. The two
// rectified streams, which leave the rectifiers in lock step, feed the SDPS
// matcher, which produces for every scan line a Cyclopean disparity map and
// occlusion (visibility) map of twice the line width, right to left. The
// corrected left/right pixels are also brought out, since the host receives
// them together with the maps. The dataflow (two rectifiers, one matcher)
// follows the document; the camera receivers, the host interface and the
// host itself are outside this module.
//
// Clocking: one clock at twice the pixel rate; raw pixels arrive at most
// every second cycle on both cameras in the same cycle (synchronised
// cameras). Between rectified lines the rectifiers leave DMAX/2 + 2 idle pixel
// slots for the matcher to drain each line; raw frames need a vertical
// blanking of about SL/2 + 1 lines.
//
// Interface:
//   cam_valid/cam_sof/cam_l/cam_r   raw pixel pairs, cam_sof on the first pixel
//   lut_we/lut_cam/lut_axis/lut_waddr/lut_wdata   load a displacement table
//                                   (lut_cam 0 left, 1 right; lut_axis 0 X, 1 Y)
//   occ                             occlusion cost of a monocular point
//   rect_valid/rect_sof/rect_eol/rect_l/rect_r   corrected pixel pairs
//   disp_valid/disp_x/disp_d/disp_state/disp_last   disparity and occlusion
//                                   stream (state B 00, MR 01, ML 11)
//   status                          sticky error flags {sync, matcher
//                                   back-track overrun, matcher input overrun,
//                                   right rectifier overrun, left overrun}
module stereo_top
  import stereo_pkg::*;
#(
  parameter int W      = 1024,
  parameter int H      = 768,
  parameter int SL     = 64,
  parameter int PW     = 8,
  parameter int CELL_W = 16,
  parameter int CELL_H = 12,
  parameter int LW     = 16,
  parameter int DF     = 4,
  parameter int DMAX   = 40,
  parameter int CW     = 20,
  parameter int OW     = 8,
  localparam int NX  = W / CELL_W + 1,
  localparam int NY  = H / CELL_H + 1,
  localparam int LAW = $clog2(NX * NY),
  localparam int NC  = 2 * (DMAX / 2 + 1),
  localparam int DW  = $clog2(NC),
  localparam int XW  = $clog2(2 * W)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // cameras
  input  logic                 cam_valid,
  input  logic                 cam_sof,
  input  logic [PW-1:0]        cam_l,
  input  logic [PW-1:0]        cam_r,
  // lookup table load
  input  logic                 lut_we,
  input  logic                 lut_cam,
  input  logic                 lut_axis,
  input  logic [LAW-1:0]       lut_waddr,
  input  logic signed [LW-1:0] lut_wdata,
  // matching control
  input  logic [OW-1:0]        occ,
  // corrected pixel stream
  output logic                 rect_valid,
  output logic                 rect_sof,
  output logic                 rect_eol,
  output logic [PW-1:0]        rect_l,
  output logic [PW-1:0]        rect_r,
  // disparity / occlusion stream
  output logic                 disp_valid,
  output logic [XW-1:0]        disp_x,
  output logic [DW-1:0]        disp_d,
  output vis_t                 disp_state,
  output logic                 disp_last,
  // status
  output logic [4:0]           status
);

  localparam int GAP = DMAX / 2 + 2;

  logic v_l, v_r, sof_l, sof_r, eol_l, eol_r;
  logic busy_l, busy_r, ovr_l, ovr_r, ovr_m, ovr_bt;
  logic sync_err;

  rectifier #(.W(W), .H(H), .SL(SL), .PW(PW), .CELL_W(CELL_W), .CELL_H(CELL_H),
              .LW(LW), .DF(DF), .LINE_GAP(GAP)) u_rect_l (
    .clk(clk), .rst_n(rst_n),
    .in_valid(cam_valid), .in_sof(cam_sof), .in_pix(cam_l),
    .lut_we(lut_we && !lut_cam), .lut_axis(lut_axis),
    .lut_waddr(lut_waddr), .lut_wdata(lut_wdata),
    .out_valid(v_l), .out_sof(sof_l), .out_eol(eol_l), .out_pix(rect_l),
    .busy(busy_l), .overrun(ovr_l)
  );

  rectifier #(.W(W), .H(H), .SL(SL), .PW(PW), .CELL_W(CELL_W), .CELL_H(CELL_H),
              .LW(LW), .DF(DF), .LINE_GAP(GAP)) u_rect_r (
    .clk(clk), .rst_n(rst_n),
    .in_valid(cam_valid), .in_sof(cam_sof), .in_pix(cam_r),
    .lut_we(lut_we && lut_cam), .lut_axis(lut_axis),
    .lut_waddr(lut_waddr), .lut_wdata(lut_wdata),
    .out_valid(v_r), .out_sof(sof_r), .out_eol(eol_r), .out_pix(rect_r),
    .busy(busy_r), .overrun(ovr_r)
  );

  assign rect_valid = v_l && v_r;
  assign rect_sof   = sof_l;
  assign rect_eol   = eol_l;

  sdps_matcher #(.W(W), .DMAX(DMAX), .PW(PW), .CW(CW), .OW(OW)) u_match (
    .clk(clk), .rst_n(rst_n), .occ(occ),
    .in_valid(rect_valid), .in_l(rect_l), .in_r(rect_r),
    .out_valid(disp_valid), .out_x(disp_x), .out_d(disp_d),
    .out_state(disp_state), .out_last(disp_last),
    .overrun(ovr_m), .bt_overrun(ovr_bt)
  );

  // the two rectifiers share all timing, so their streams must coincide
  always_ff @(posedge clk) begin
    if (!rst_n) sync_err <= 1'b0;
    else if (v_l != v_r || (v_l && (sof_l != sof_r || eol_l != eol_r)) ||
             busy_l != busy_r)
      sync_err <= 1'b1;
  end

  assign status = {sync_err, ovr_bt, ovr_m, ovr_r, ovr_l};

endmodule
