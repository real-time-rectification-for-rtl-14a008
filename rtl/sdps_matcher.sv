// sdps_matcher: stereo correspondence module (Symmetric Dynamic Programming
// Stereo).
//
// Matches one rectified left/right scan line pair at a time and produces the
// Cyclopean disparity and occlusion (visibility) map of the line. Disparities
// 0..DMAX are handled by NB = DMAX/2 + 1 disparity calculator blocks
// (disp_calc), each computing the even disparity 2j in the even phase and the
// odd disparity 2j+1 in the odd phase. Every incoming pixel pair therefore
// takes two clock cycles: the master clock runs at twice the pixel rate, as
// in the document. Left pixels stream through the blocks from the bottom
// (highest disparity) up, right pixels from the top (disparity 0) down, after
// a delay of NB pixel slots in the right pixel shift register (pix_delay), so
// that in column k block j sees gL(k+j), gL(k+j+1) and gR(k-j): exactly the
// pixels of Cyclopean points x = 2k (d = 2j) and x = 2k+1 (d = 2j+1).
//
// After each column pair the predecessor codes of all cells are written to
// the predecessor array (pred_array). After the last column the arg-min of
// the costs at x = 2W-1 is taken, the cost registers are cleared for the next
// line and the back-track module (backtrack) walks the stored line from right
// to left while the next line is matched into the other bank.
//
// This design's choices: pixels outside the image count as intensity 0;
// costs start at 0 for every disparity and state at the start of a line;
// ties in the final arg-min go to the lowest disparity, then B, MR, ML; occ
// (the occlusion term, not given a value in the document) is an input. Each
// line is followed by NB internal flush slots (one every second cycle) that
// push the last pixels through the array; the input must stay idle for them
// (horizontal blanking of at least NB pixel slots), otherwise the pixel is
// dropped and overrun is set.
//
// The even cells' ML costs are used only inside their own block (by the odd
// cell), so e_ml is collected here but not read.
//
// Interface: in_valid with in_l/in_r, at most every second cycle; lines of W
// pixels follow each other (pixel counting, no framing signals needed).
// out_* is the back-tracked stream: 2W points per line from x = 2W-1 down to
// 0, state coded B = 00, MR = 01, ML = 11; out_last marks x = 0.
module sdps_matcher
  import stereo_pkg::*;
#(
  parameter int W    = 1024,
  parameter int DMAX = 40,
  parameter int PW   = 8,
  parameter int CW   = 20,
  parameter int OW   = 8,
  localparam int NB  = DMAX / 2 + 1,
  localparam int NC  = 2 * NB,
  localparam int DW  = $clog2(NC),
  localparam int XW  = $clog2(2 * W),
  localparam int AW  = $clog2(W)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [OW-1:0] occ,
  input  logic          in_valid,
  input  logic [PW-1:0] in_l,
  input  logic [PW-1:0] in_r,
  output logic          out_valid,
  output logic [XW-1:0] out_x,
  output logic [DW-1:0] out_d,
  output vis_t          out_state,
  output logic          out_last,
  output logic          overrun,
  output logic          bt_overrun
);

  localparam logic [CW-1:0] INF = '1;
  localparam int PCW = $clog2(W + NB + 1);

  // ------------------------------------------------------------------
  // pixel slots: W input pixels, then NB flush slots
  // ------------------------------------------------------------------
  logic [PCW-1:0] p;          // slot index within the line
  logic           flushing, fl_phase, slot, line_last;
  logic [PW-1:0]  sl_l, sl_r;

  always_comb begin
    slot = flushing ? fl_phase : in_valid;
    sl_l = flushing ? '0 : in_l;
    sl_r = flushing ? '0 : in_r;
    line_last = (p == PCW'(W + NB - 1));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      p        <= '0;
      flushing <= 1'b0;
      fl_phase <= 1'b0;
      overrun  <= 1'b0;
    end else begin
      if (flushing && in_valid) overrun <= 1'b1;
      if (flushing) fl_phase <= !fl_phase;
      // one idle cycle after the last flush slot, then accept the next line
      if (flushing && !fl_phase && p == '0) flushing <= 1'b0;
      if (slot) begin
        if (line_last) begin
          p <= '0;
        end else begin
          p <= p + 1'b1;
          if (p == PCW'(W - 1)) begin
            flushing <= 1'b1;
            fl_phase <= 1'b0;
          end
        end
      end
    end
  end

  // ------------------------------------------------------------------
  // contra-rotating pixel chains. They need no clearing between lines: the
  // left chain is refilled before the first column is computed, and the
  // right chain receives the zeros of the previous line's flush slots.
  // ------------------------------------------------------------------
  logic [PW-1:0] lch [NB + 1];   // lch[i] = gL(k+i)
  logic [PW-1:0] rch [NB];       // rch[j] = gR(k-j)
  logic [PW-1:0] r_dly;
  logic          clr;            // end of line: clear the costs

  pix_delay #(.N(NB), .PW(PW)) u_rdelay (
    .clk(clk), .clr(!rst_n), .en(slot), .din(sl_r), .dout(r_dly)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i <= NB; i++) lch[i] <= '0;
      for (int j = 0; j < NB; j++)  rch[j] <= '0;
    end else if (slot) begin
      for (int i = 0; i < NB; i++) lch[i] <= lch[i+1];
      lch[NB] <= sl_l;
      rch[0]  <= r_dly;
      for (int j = 1; j < NB; j++) rch[j] <= rch[j-1];
    end
  end

  // ------------------------------------------------------------------
  // phase control: slot -> even phase -> odd phase -> write/line end
  // ------------------------------------------------------------------
  logic           ev_en, od_en, wr_en, wr_last;
  logic [AW-1:0]  k_ev, k_od, k_wr;
  logic           last_ev, last_od;
  logic           wbank;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ev_en   <= 1'b0;
      od_en   <= 1'b0;
      wr_en   <= 1'b0;
      last_ev <= 1'b0;
      last_od <= 1'b0;
      wr_last <= 1'b0;
    end else begin
      ev_en   <= slot && (p >= PCW'(NB));
      od_en   <= ev_en;
      wr_en   <= od_en;
      last_ev <= slot && line_last;
      last_od <= last_ev;
      wr_last <= last_od;
    end
    k_ev <= AW'(p - PCW'(NB));
    k_od <= k_ev;
    k_wr <= k_od;
  end

  assign clr = wr_last;

  // ------------------------------------------------------------------
  // disparity calculator array
  // ------------------------------------------------------------------
  logic [CW-1:0] e_b [NB], e_mr [NB], e_ml [NB];
  logic [CW-1:0] o_b [NB], o_mr [NB], o_ml [NB];
  pred_t         pr_e [NB], pr_o [NB];
  logic [PRED_W*NC-1:0] pword;

  for (genvar j = 0; j < NB; j++) begin : g_blk
    logic [CW-1:0] dn_ml, up_mr, up_b;
    if (j == 0) begin : g_lo
      assign dn_ml = INF;
    end else begin : g_lo
      assign dn_ml = o_ml[j-1];
    end
    if (j == NB - 1) begin : g_hi
      assign up_mr = INF;
      assign up_b  = INF;
    end else begin : g_hi
      assign up_mr = e_mr[j+1];
      assign up_b  = e_b[j+1];
    end

    disp_calc #(.PW(PW), .CW(CW), .OW(OW), .HAS_ODD(2 * j + 1 <= DMAX)) u_dc (
      .clk(clk), .rst_n(rst_n), .clr(clr),
      .ev_en(ev_en), .od_en(od_en), .occ(occ),
      .gl_e(lch[j]), .gl_o(lch[j+1]), .gr(rch[j]),
      .dn_ml(dn_ml), .up_mr(up_mr), .up_b(up_b),
      .e_b(e_b[j]), .e_mr(e_mr[j]), .e_ml(e_ml[j]),
      .o_b(o_b[j]), .o_mr(o_mr[j]), .o_ml(o_ml[j]),
      .pred_e(pr_e[j]), .pred_o(pr_o[j])
    );

    assign pword[PRED_W * (2 * j)     +: PRED_W] = pr_e[j];
    assign pword[PRED_W * (2 * j + 1) +: PRED_W] = pr_o[j];
  end

  // ------------------------------------------------------------------
  // final arg-min over x = 2W-1 (odd disparities)
  // ------------------------------------------------------------------
  logic [CW-1:0] best_c;
  logic [DW-1:0] best_d;
  vis_t          best_s;

  always_comb begin
    best_c = INF;
    best_d = DW'(1);
    best_s = VIS_B;
    for (int j = 0; j < NB; j++) begin
      if (o_b[j] < best_c)  begin best_c = o_b[j];  best_d = DW'(2 * j + 1); best_s = VIS_B;  end
      if (o_mr[j] < best_c) begin best_c = o_mr[j]; best_d = DW'(2 * j + 1); best_s = VIS_MR; end
      if (o_ml[j] < best_c) begin best_c = o_ml[j]; best_d = DW'(2 * j + 1); best_s = VIS_ML; end
    end
  end

  // ------------------------------------------------------------------
  // predecessor array and back-track
  // ------------------------------------------------------------------
  logic            rbank;
  logic [AW-1:0]   raddr;
  logic [PRED_W*NC-1:0] rdata;
  logic            bt_busy;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wbank      <= 1'b0;
      bt_overrun <= 1'b0;
    end else if (wr_last) begin
      wbank <= !wbank;
      if (bt_busy) bt_overrun <= 1'b1;
    end
  end

  pred_array #(.W(W), .NC(NC)) u_pred (
    .clk(clk),
    .we(wr_en), .wbank(wbank), .waddr(k_wr), .wdata(pword),
    .rbank(rbank), .raddr(raddr), .rdata(rdata)
  );

  backtrack #(.W(W), .NC(NC)) u_bt (
    .clk(clk), .rst_n(rst_n),
    .start(wr_last), .bank(wbank), .d0(best_d), .s0(best_s),
    .rd_bank(rbank), .rd_addr(raddr), .rd_data(rdata),
    .out_valid(out_valid), .out_x(out_x), .out_d(out_d),
    .out_state(out_state), .out_last(out_last), .busy(bt_busy)
  );

  // pixel pairs arrive at most every second cycle
  assert property (@(posedge clk) disable iff (!rst_n) in_valid |=> !in_valid);

endmodule
