// tb_pag: loads a random smooth displacement table into a pixel address
// generator with 16 x 12 pixel cells, then streams random cell positions one
// per cycle and compares each interpolated displacement, three cycles later,
// with the weighted-sum bilinear interpolation of the table.
module tb_pag;
  import rect_ref_pkg::*;
  localparam int NX = 5, NY = 5, CW = 16, CH = 12, LW = 16, FW = 8;
  localparam int N = NX * NY;
  logic clk = 0, rst_n = 0, lut_we = 0, in_valid = 0, out_valid;
  logic [$clog2(N)-1:0] lut_waddr;
  logic signed [LW-1:0] lut_wdata, disp;
  logic [$clog2(NX)-1:0] cx;
  logic [$clog2(NY)-1:0] cy;
  logic [$clog2(CW)-1:0] xm;
  logic [$clog2(CH)-1:0] ym;
  longint model [N];
  longint expq [$];
  int cyc = 0, cycq [$];
  int checks = 0, failures = 0;

  pag #(.NX(NX), .NY(NY), .CELL_W(CW), .CELL_H(CH), .LW(LW), .FW(FW)) dut (.*);
  always #5 clk = !clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #1000000;
    $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    longint e; int c0;
    e = expq.pop_front(); c0 = cycq.pop_front();
    checks += 2;
    if (longint'(disp) != e) begin
      failures++;
      if (failures < 10) $display("disp got %0d exp %0d", disp, e);
    end
    if (cyc - c0 != 3) begin failures++; $display("latency %0d", cyc - c0); end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < N; i++) begin
      model[i] = longint'($signed($urandom % 2001)) - 1000;   // +-62.5 px, 4 frac bits
      lut_we <= 1; lut_waddr <= i[$clog2(N)-1:0]; lut_wdata <= LW'(model[i]);
      @(posedge clk);
    end
    lut_we <= 0;
    for (int i = 0; i < 1000; i++) begin
      int x, y, mx, my;
      x = $urandom % (NX - 1); y = $urandom % (NY - 1);
      mx = $urandom % CW; my = $urandom % CH;
      in_valid <= 1;
      cx <= x[$clog2(NX)-1:0]; cy <= y[$clog2(NY)-1:0];
      xm <= mx[$clog2(CW)-1:0]; ym <= my[$clog2(CH)-1:0];
      expq.push_back(bilerp_ref(model[y*NX+x], model[y*NX+x+1], model[(y+1)*NX+x],
                                model[(y+1)*NX+x+1], frac_ref(mx, CW, FW),
                                frac_ref(my, CH, FW), FW));
      cycq.push_back(cyc + 1);
      @(posedge clk);
    end
    in_valid <= 0;
    repeat (6) @(posedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("missing outputs"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
