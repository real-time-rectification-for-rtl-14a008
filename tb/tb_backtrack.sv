// tb_backtrack: for random stereo scan lines the reference model fills the
// predecessor codes; a memory model with one cycle read latency serves them
// to the back-track module, whose stream (x from 2W-1 down to 0, disparity,
// state) must equal the reference walk, one point per cycle without gaps.
// Counts how often each state and each two-column step occur.
module tb_backtrack;
  import stereo_pkg::*;
  import sdps_ref_pkg::*;
  localparam int W = 24, DMAX = 7, NB = DMAX / 2 + 1, NC = 2 * NB;
  localparam int AW = $clog2(W), XW = $clog2(2 * W), DW = $clog2(NC), RW = 4 * NC;
  logic clk = 0, rst_n = 0, start = 0, bank = 0;
  logic [DW-1:0] d0;
  vis_t s0;
  logic rd_bank;
  logic [AW-1:0] rd_addr;
  logic [RW-1:0] rd_data;
  logic out_valid, out_last, busy;
  logic [XW-1:0] out_x;
  logic [DW-1:0] out_d;
  vis_t out_state;
  logic [RW-1:0] mem [2][W];
  int checks = 0, failures = 0;
  int n_b = 0, n_mr = 0, n_ml = 0, n_fill = 0;

  backtrack #(.W(W), .NC(NC)) dut (.*);
  always #5 clk = !clk;
  always @(posedge clk) rd_data <= mem[rd_bank][rd_addr];

  initial begin
    #5000000;
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

  initial begin
    line_t gl, gr;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int line = 0; line < 12; line++) begin
      int dd, b;
      b = line % 2;
      // a scene of a few surfaces at different disparities
      dd = $urandom % (DMAX + 1);
      for (int i = 0; i < W; i++) gl[i] = $urandom % 256;
      for (int i = 0; i < W; i++) begin
        if ($urandom % 6 == 0) dd = $urandom % (DMAX + 1);
        gr[i] = (i + dd < W) ? gl[i + dd] : $urandom % 256;
        if (line % 3 == 2) gr[i] = $urandom % 256;
      end
      run_line(gl, gr, W, DMAX, 12, 20);
      for (int k = 0; k < W; k++) begin
        logic [RW-1:0] wd;
        wd = '0;
        for (int d = 0; d < NC; d++)
          if (d <= DMAX) wd[4*d +: 4] = 4'(ref_pred[2*k + (d % 2)][d]);
        mem[b][k] = wd;
      end
      @(posedge clk);
      start <= 1; bank <= b[0]; d0 <= DW'(ref_best_d); s0 <= vis_t'(ref_best_s);
      @(posedge clk);
      start <= 0;
      // two start-up cycles
      @(posedge clk);
      for (int x = 2 * W - 1; x >= 0; x--) begin
        @(posedge clk);
        #1;
        chk(out_valid, 1, "valid");
        chk(out_x, x, "x");
        chk(out_d, ref_d[x], "d");
        chk(out_state, ref_s[x], "state");
        chk(out_last, x == 0, "last");
        if (ref_s[x] == 0) n_b++; else if (ref_s[x] == 1) n_mr++; else n_ml++;
        if (x > 0 && ref_s[x] == ref_s[x-1] && ref_d[x] == ref_d[x-1] && ref_s[x] != 1) n_fill++;
      end
      @(posedge clk);
      #1 chk(busy, 0, "idle after line");
    end
    $display("B=%0d MR=%0d ML=%0d steps2=%0d", n_b, n_mr, n_ml, n_fill);
    checks++;
    if (n_b == 0 || n_mr == 0 || n_ml == 0 || n_fill == 0) begin
      failures++; $display("a state or step kind never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
