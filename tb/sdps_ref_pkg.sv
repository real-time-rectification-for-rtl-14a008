// sdps_ref_pkg: reference model of Symmetric Dynamic Programming Stereo
// matching of one scan line, for the testbenches.
//
// Fills full cost and predecessor arrays over the Cyclopean line
// (x = 0..2W-1, d = 0..DMAX, three visibility states) straight from the
// recurrences
//   C(x,d,B)  = |gL((x+d)/2) - gR((x-d)/2)| + min(C(x-2,d,B), C(x-2,d,MR), C(x-1,d-1,ML))
//   C(x,d,ML) = min(C(x-1,d-1,ML), C(x-2,d,B)) + occ
//   C(x,d,MR) = min(C(x-1,d+1,MR), C(x-1,d+1,B)) + occ
// with pixels outside the line taken as 0, costs before the line taken as 0,
// disparities outside 0..DMAX impossible, ties to B, then MR, then ML, and
// saturation at 2**CW - 1. It then picks the best final state at x = 2W-1
// (lowest d, then B, MR, ML) and walks the predecessors back, giving one
// (d, state) per x; an index skipped by a two-column step takes the values of
// the point it was reached from. States use the codes B 0, MR 1, ML 3.
package sdps_ref_pkg;

  localparam int MAXW = 1024;
  localparam int MAXD = 128;

  typedef int unsigned line_t [MAXW];

  // predecessor codes per (x, d): [3] ML bit, [2:1] B code, [0] MR bit
  int unsigned ref_pred [2 * MAXW][MAXD + 1];
  int unsigned ref_d    [2 * MAXW];
  int unsigned ref_s    [2 * MAXW];
  int unsigned ref_best_d;
  int unsigned ref_best_s;
  // cost[x+2][d+1][s], s: 0 B, 1 MR, 2 ML
  longint unsigned cost [2 * MAXW + 2][MAXD + 3][3];

  function automatic longint unsigned sat(input longint unsigned v, input int cw);
    longint unsigned inf = (64'd1 << cw) - 1;
    return (v > inf) ? inf : v;
  endfunction

  function automatic int unsigned pix(input line_t g, input int i, input int w);
    if (i < 0 || i >= w) return 0;
    return g[i];
  endfunction

  function automatic void run_line(input line_t gl, input line_t gr, input int w,
                                   input int dmax, input int occ, input int cw);
    longint unsigned inf = (64'd1 << cw) - 1;
    longint unsigned m, cb, cmr, cml, best;
    int unsigned code_b, code_ml, code_mr, di;
    int x, d, s, nx;
    for (x = 0; x < 2 * w + 2; x++)
      for (d = 0; d < dmax + 3; d++)
        for (s = 0; s < 3; s++)
          cost[x][d][s] = (x < 2 && d >= 1 && d <= dmax + 1) ? 0 : inf;
    for (x = 0; x < 2 * w; x++) begin
      for (d = 0; d <= dmax; d++) begin
        if (((x + d) % 2) != 0) continue;
        // B
        cb = cost[x][d+1][0]; cmr = cost[x][d+1][1]; cml = cost[x+1][d][2];
        if (cb <= cmr && cb <= cml) begin m = cb;  code_b = 0; end
        else if (cmr <= cml)        begin m = cmr; code_b = 1; end
        else                        begin m = cml; code_b = 3; end
        di = (pix(gl, (x + d) / 2, w) > pix(gr, (x - d) / 2, w)) ?
             pix(gl, (x + d) / 2, w) - pix(gr, (x - d) / 2, w) :
             pix(gr, (x - d) / 2, w) - pix(gl, (x + d) / 2, w);
        cost[x+2][d+1][0] = sat(m + di, cw);
        // ML
        if (cb <= cml) begin m = cb;  code_ml = 0; end
        else           begin m = cml; code_ml = 1; end
        cost[x+2][d+1][2] = sat(m + occ, cw);
        // MR
        if (cost[x+1][d+2][0] <= cost[x+1][d+2][1]) begin m = cost[x+1][d+2][0]; code_mr = 0; end
        else begin m = cost[x+1][d+2][1]; code_mr = 1; end
        cost[x+2][d+1][1] = sat(m + occ, cw);
        ref_pred[x][d] = (code_ml << 3) | (code_b << 1) | code_mr;
      end
      // cells whose parity does not match keep their older value
      for (d = 0; d <= dmax; d++)
        if (((x + d) % 2) != 0)
          for (s = 0; s < 3; s++) cost[x+2][d+1][s] = cost[x+1][d+1][s];
    end
    // best final state at x = 2w-1
    best = inf; ref_best_d = 1; ref_best_s = 0;
    for (d = 1; d <= dmax; d += 2) begin
      if (cost[2*w+1][d+1][0] < best) begin best = cost[2*w+1][d+1][0]; ref_best_d = d; ref_best_s = 0; end
      if (cost[2*w+1][d+1][1] < best) begin best = cost[2*w+1][d+1][1]; ref_best_d = d; ref_best_s = 1; end
      if (cost[2*w+1][d+1][2] < best) begin best = cost[2*w+1][d+1][2]; ref_best_d = d; ref_best_s = 3; end
    end
    // walk back
    x = 2 * w - 1; d = ref_best_d; s = ref_best_s;
    while (x >= 0) begin
      int unsigned pc;
      int nd, ns;
      ref_d[x] = d; ref_s[x] = s;
      if (x == 0) break;
      pc = ref_pred[x][d];
      if (s == 0) begin
        case ((pc >> 1) & 3)
          3:       begin nx = x - 1; nd = d - 1; ns = 3; end
          1:       begin nx = x - 2; nd = d;     ns = 1; end
          default: begin nx = x - 2; nd = d;     ns = 0; end
        endcase
      end else if (s == 3) begin
        if ((pc >> 3) & 1) begin nx = x - 1; nd = d - 1; ns = 3; end
        else               begin nx = x - 2; nd = d;     ns = 0; end
      end else begin
        nx = x - 1; nd = d + 1; ns = (pc & 1) ? 1 : 0;
      end
      if (nx == x - 2) begin
        ref_d[x-1] = d; ref_s[x-1] = s;
        if (x - 1 == 0) break;
      end
      x = nx; d = nd; s = ns;
    end
  endfunction

endpackage
