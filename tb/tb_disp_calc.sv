// tb_disp_calc: drives one disparity calculator block through alternating
// even and odd phases with random pixels and random neighbour costs
// (including "impossible" all-ones values) and checks all six cost registers
// and both predecessor records after every phase against the SDPS
// recurrences evaluated here. A second instance with the odd cell disabled
// must keep the odd costs impossible.
module tb_disp_calc;
  import stereo_pkg::*;
  localparam int PW = 8, CW = 10, OW = 8;
  localparam longint INF = (1 << CW) - 1;
  logic clk = 0, rst_n = 0, clr = 0, ev_en = 0, od_en = 0;
  logic [OW-1:0] occ;
  logic [PW-1:0] gl_e, gl_o, gr;
  logic [CW-1:0] dn_ml, up_mr, up_b;
  logic [CW-1:0] e_b, e_mr, e_ml, o_b, o_mr, o_ml;
  pred_t pred_e, pred_o;
  logic [CW-1:0] x_e_b, x_e_mr, x_e_ml, x_o_b, x_o_mr, x_o_ml;
  pred_t x_pred_e, x_pred_o;
  int checks = 0, failures = 0;
  int seen_b = 0, seen_mr = 0, seen_ml = 0, seen_sat = 0;

  disp_calc #(.PW(PW), .CW(CW), .OW(OW), .HAS_ODD(1'b1)) dut (.*);
  disp_calc #(.PW(PW), .CW(CW), .OW(OW), .HAS_ODD(1'b0)) dut_even_only (
    .clk, .rst_n, .clr, .ev_en, .od_en, .occ, .gl_e, .gl_o, .gr, .dn_ml, .up_mr, .up_b,
    .e_b(x_e_b), .e_mr(x_e_mr), .e_ml(x_e_ml), .o_b(x_o_b), .o_mr(x_o_mr), .o_ml(x_o_ml),
    .pred_e(x_pred_e), .pred_o(x_pred_o));

  always #5 clk = !clk;

  initial begin
    #1000000;
    $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model state: [0] even cell, [1] odd cell; s: 0 B, 1 MR, 2 ML
  longint m [2][3];
  int     mp [2][3];

  function automatic longint sat(input longint v);
    return (v > INF) ? INF : v;
  endfunction

  task automatic chk(input longint got, input longint exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("%s got %0d exp %0d", what, got, exp);
    end
  endtask

  function automatic longint rcost();
    int r = $urandom % 3;
    if (r == 0) return INF;
    return $urandom % 300;
  endfunction

  task automatic step(input int odd);
    longint own_b, own_mr, lo_ml, hi_mr, hi_b, mn, di;
    int c, code;
    longint gl, g_r;
    c = odd;
    own_b = m[c][0]; own_mr = m[c][1];
    lo_ml = odd ? m[0][2] : longint'(dn_ml);
    hi_mr = odd ? longint'(up_mr) : m[1][1];
    hi_b  = odd ? longint'(up_b)  : m[1][0];
    gl = odd ? gl_o : gl_e; g_r = gr;
    di = (gl > g_r) ? gl - g_r : g_r - gl;
    // B
    mn = own_b; code = 0;
    if (own_mr < mn) begin mn = own_mr; code = 1; end
    if (lo_ml < mn)  begin mn = lo_ml;  code = 3; end
    mp[c][0] = code;
    if (code == 0) seen_b++; else if (code == 1) seen_mr++; else seen_ml++;
    m[c][0] = sat(mn + di);
    if (m[c][0] == INF) seen_sat++;
    // ML
    if (own_b <= lo_ml) begin m[c][2] = sat(own_b + occ); mp[c][2] = 0; end
    else                begin m[c][2] = sat(lo_ml + occ); mp[c][2] = 1; end
    // MR
    if (hi_b <= hi_mr)  begin m[c][1] = sat(hi_b + occ);  mp[c][1] = 0; end
    else                begin m[c][1] = sat(hi_mr + occ); mp[c][1] = 1; end
  endtask

  task automatic compare();
    chk(e_b, m[0][0], "e_b"); chk(e_mr, m[0][1], "e_mr"); chk(e_ml, m[0][2], "e_ml");
    chk(o_b, m[1][0], "o_b"); chk(o_mr, m[1][1], "o_mr"); chk(o_ml, m[1][2], "o_ml");
    chk(pred_e.b, mp[0][0], "pe.b"); chk(pred_e.mr, mp[0][1], "pe.mr"); chk(pred_e.ml, mp[0][2], "pe.ml");
    chk(pred_o.b, mp[1][0], "po.b"); chk(pred_o.mr, mp[1][1], "po.mr"); chk(pred_o.ml, mp[1][2], "po.ml");
    chk(x_o_b, INF, "disabled o_b"); chk(x_o_mr, INF, "disabled o_mr"); chk(x_o_ml, INF, "disabled o_ml");
  endtask

  initial begin
    occ = 8'd20;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int line = 0; line < 4; line++) begin
      clr <= 1;
      @(posedge clk);
      clr <= 0;
      for (int i = 0; i < 3; i++) for (int s = 0; s < 3; s++) begin m[i%2][s] = 0; mp[i%2][s] = 0; end
      occ = OW'(5 + 10 * line);
      #1 compare();
      for (int x = 0; x < 200; x++) begin
        int odd;
        odd = x % 2;
        gl_e <= PW'($urandom); gl_o <= PW'($urandom); gr <= PW'($urandom);
        if (line == 3) begin dn_ml <= CW'(INF); up_mr <= CW'(INF); up_b <= CW'(INF); end
        else begin dn_ml <= CW'(rcost()); up_mr <= CW'(rcost()); up_b <= CW'(rcost()); end
        ev_en <= !odd[0]; od_en <= odd[0];
        @(posedge clk);
        ev_en <= 0; od_en <= 0;
        step(odd);
        #1 compare();
        if ($urandom % 4 == 0) @(posedge clk);   // idle cycle: nothing changes
        #1 compare();
      end
    end
    checks++;
    if (seen_b == 0 || seen_mr == 0 || seen_ml == 0 || seen_sat == 0) begin
      failures++;
      $display("not every predecessor / saturation case occurred");
    end
    $display("B=%0d MR=%0d ML=%0d sat=%0d final %0d %0d %0d", seen_b, seen_mr, seen_ml, seen_sat, m[0][0], m[1][0], e_b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
