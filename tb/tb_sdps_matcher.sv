// tb_sdps_matcher: streams stereo scan lines (random texture seen at
// piecewise-constant disparities, plus unmatched lines) through two SDPS
// matchers, one with an even and one with an odd disparity range, and
// compares every back-tracked point (x, d, state) with the reference model.
// Lines follow each other with the minimum gap the matcher needs to drain a
// line. Checks that no overrun occurs, that each line's result is complete
// within two line periods of its last pixel, and counts the mechanisms:
// flushed lines, bank swaps, B/MR/ML points.
module tb_sdps_matcher;
  import stereo_pkg::*;
  import sdps_ref_pkg::*;
  localparam int W = 32, PW = 8, CW = 20, OW = 8, LINES = 10;
  localparam int DMAX0 = 8, DMAX1 = 7;
  localparam int NB0 = DMAX0 / 2 + 1;
  localparam int XW = $clog2(2 * W);
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [OW-1:0] occ = 8'd12;
  logic [PW-1:0] in_l, in_r;
  logic v0, v1, last0, last1, ovr0, ovr1, bto0, bto1;
  logic [XW-1:0] x0, x1;
  logic [$clog2(2 * NB0)-1:0] d0;
  logic [$clog2(2 * (DMAX1 / 2 + 1))-1:0] d1;
  vis_t s0, s1;
  int checks = 0, failures = 0;
  int exp0 [$], exp1 [$];      // packed {x, d, s}
  int cyc = 0, line_end_cyc [$], lines_done0 = 0, lines_done1 = 0;
  int n_b = 0, n_mr = 0, n_ml = 0, max_lat = 0;

  sdps_matcher #(.W(W), .DMAX(DMAX0), .PW(PW), .CW(CW), .OW(OW)) dut0 (
    .clk, .rst_n, .occ, .in_valid, .in_l, .in_r,
    .out_valid(v0), .out_x(x0), .out_d(d0), .out_state(s0), .out_last(last0),
    .overrun(ovr0), .bt_overrun(bto0));
  sdps_matcher #(.W(W), .DMAX(DMAX1), .PW(PW), .CW(CW), .OW(OW)) dut1 (
    .clk, .rst_n, .occ, .in_valid, .in_l, .in_r,
    .out_valid(v1), .out_x(x1), .out_d(d1), .out_state(s1), .out_last(last1),
    .overrun(ovr1), .bt_overrun(bto1));

  always #5 clk = !clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #10000000;
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

  always @(posedge clk) if (rst_n) begin
    if (v0) begin
      int e;
      e = exp0.pop_front();
      chk({x0, d0, 2'(s0)}, e, "matcher0 point");
      if (s0 == VIS_B) n_b++; else if (s0 == VIS_MR) n_mr++; else n_ml++;
      if (last0) begin
        int lat;
        lat = cyc - line_end_cyc[lines_done0];
        if (lat > max_lat) max_lat = lat;
        checks++;
        if (lat > 2 * 2 * (W + NB0 + 1)) begin failures++; $display("latency %0d", lat); end
        lines_done0++;
      end
    end
    if (v1) begin
      int e;
      e = exp1.pop_front();
      chk({x1, d1, 2'(s1)}, e, "matcher1 point");
      if (last1) lines_done1++;
    end
  end

  initial begin
    line_t gl, gr;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int line = 0; line < LINES; line++) begin
      int dd;
      dd = $urandom % (DMAX1 + 1);
      for (int i = 0; i < W; i++) gl[i] = $urandom % 256;
      for (int i = 0; i < W; i++) begin
        if ($urandom % 8 == 0) dd = $urandom % (DMAX1 + 1);
        gr[i] = (i + dd < W) ? gl[i + dd] : $urandom % 256;
        if (line == 4) gr[i] = $urandom % 256;
      end
      run_line(gl, gr, W, DMAX0, occ, CW);
      for (int x = 2 * W - 1; x >= 0; x--) exp0.push_back({x[XW-1:0], 4'(ref_d[x]), 2'(ref_s[x])});
      run_line(gl, gr, W, DMAX1, occ, CW);
      for (int x = 2 * W - 1; x >= 0; x--) exp1.push_back({x[XW-1:0], 3'(ref_d[x]), 2'(ref_s[x])});
      for (int i = 0; i < W; i++) begin
        in_valid <= 1; in_l <= PW'(gl[i]); in_r <= PW'(gr[i]);
        @(posedge clk);
        in_valid <= 0;
        @(posedge clk);
        if (i % 11 == 5) @(posedge clk);   // irregular pixel timing
      end
      line_end_cyc.push_back(cyc);
      repeat (2 * (NB0 + 1)) @(posedge clk);
    end
    repeat (4 * W + 40) @(posedge clk);
    chk(lines_done0, LINES, "lines matched (even range)");
    chk(lines_done1, LINES, "lines matched (odd range)");
    chk(exp0.size(), 0, "leftover 0");
    chk(exp1.size(), 0, "leftover 1");
    chk({ovr0, bto0, ovr1, bto1}, 0, "overrun flags");
    checks++;
    if (n_b == 0 || n_mr == 0 || n_ml == 0) begin failures++; $display("state never seen"); end
    $display("B=%0d MR=%0d ML=%0d lines=%0d bank swaps=%0d max latency=%0d cycles",
             n_b, n_mr, n_ml, lines_done0, lines_done0, max_lat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
