// tb_intensity_calc: presents neighbour pairs A,B then C,D on consecutive
// cycles, as the line buffer does, with random fractions, and compares the
// rectified intensity with the weighted-sum bilinear interpolation, checking
// that it appears two cycles after the C,D cycle.
module tb_intensity_calc;
  import rect_ref_pkg::*;
  localparam int PW = 8, DF = 4;
  logic clk = 0, rst_n = 0, ab_valid = 0, cd_valid = 0, out_valid;
  logic [PW-1:0] pix0, pix1, pixel;
  logic [DF-1:0] xf, yf;
  longint expq [$];
  int cyc = 0, cycq [$];
  int checks = 0, failures = 0;

  intensity_calc #(.PW(PW), .DF(DF)) dut (.*);
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
    if (longint'(pixel) != e) begin
      failures++;
      if (failures < 10) $display("pixel got %0d exp %0d", pixel, e);
    end
    if (cyc - c0 != 2) begin failures++; $display("latency %0d", cyc - c0); end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < 1000; i++) begin
      longint a, b, c, d, fx, fy;
      a = $urandom % 256; b = $urandom % 256; c = $urandom % 256; d = $urandom % 256;
      if (i % 7 == 0) begin a = 255; b = 255; c = 255; d = 255; end
      fx = $urandom % 16; fy = $urandom % 16;
      ab_valid <= 1; cd_valid <= 0; pix0 <= PW'(a); pix1 <= PW'(b);
      xf <= DF'($urandom); yf <= DF'($urandom);
      @(posedge clk);
      ab_valid <= 0; cd_valid <= 1; pix0 <= PW'(c); pix1 <= PW'(d);
      xf <= DF'(fx); yf <= DF'(fy);
      expq.push_back(bilerp_ref(a, b, c, d, fx, fy, DF));
      cycq.push_back(cyc + 1);
      @(posedge clk);
      cd_valid <= 0;
      if (i % 3 == 0) begin
        pix0 <= PW'($urandom); pix1 <= PW'($urandom);
        @(posedge clk);
      end
    end
    repeat (4) @(posedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("missing outputs"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
