// tb_bilerp: checks the bilinear interpolator against the weighted-sum form
// for random corner values and fractions, including the extremes, one sample
// per cycle, and checks the two-cycle latency.
module tb_bilerp;
  import rect_ref_pkg::*;
  localparam int DW = 16, FW = 8, N = 2000;

  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic signed [DW-1:0] a, b, c, d, out;
  logic [FW-1:0] xf, yf;
  int checks = 0, failures = 0;
  longint exp_q [$];
  int cyc = 0, in_cyc [$];

  bilerp #(.DW(DW), .FW(FW)) dut (.*);

  always #5 clk = !clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #2000000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    longint e;
    int ic;
    e = exp_q.pop_front();
    ic = in_cyc.pop_front();
    checks++;
    if (longint'(out) != e) begin
      failures++;
      if (failures < 10) $display("mismatch: got %0d exp %0d", out, e);
    end
    checks++;
    if (cyc - ic != 2) begin
      failures++;
      $display("latency %0d, expected 2", cyc - ic);
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int i = 0; i < N; i++) begin
      logic signed [DW-1:0] ra, rb, rc, rd;
      logic [FW-1:0] rx, ry;
      ra = DW'($urandom); rb = DW'($urandom); rc = DW'($urandom); rd = DW'($urandom);
      // keep some samples in a narrow range, like real displacements
      if (i % 2 == 0) begin
        ra = ra >>> 6; rb = rb >>> 6; rc = rc >>> 6; rd = rd >>> 6;
      end
      rx = FW'($urandom); ry = FW'($urandom);
      if (i % 17 == 0) rx = '1;
      if (i % 19 == 0) ry = '0;
      a <= ra; b <= rb; c <= rc; d <= rd; xf <= rx; yf <= ry;
      in_valid <= ($urandom % 4) != 0 || i == 0;
      @(posedge clk);
      if (in_valid) begin
        exp_q.push_back(bilerp_ref(ra, rb, rc, rd, rx, ry, FW));
        in_cyc.push_back(cyc);
      end
    end
    in_valid <= 0;
    repeat (5) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
