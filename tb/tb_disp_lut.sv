// tb_disp_lut: loads a random 9 x 7 table through the write port, then reads
// random cells and checks that the four corners A (cx,cy), B (cx+1,cy),
// C (cx,cy+1), D (cx+1,cy+1) all arrive one cycle after the read.
module tb_disp_lut;
  localparam int NX = 9, NY = 7, LW = 16;
  localparam int N = NX * NY;
  logic clk = 0, we = 0, rd_en = 0;
  logic [$clog2(N)-1:0] waddr;
  logic signed [LW-1:0] wdata, a, b, c, d;
  logic [$clog2(NX)-1:0] cx;
  logic [$clog2(NY)-1:0] cy;
  logic signed [LW-1:0] model [N];
  int checks = 0, failures = 0;

  disp_lut #(.NX(NX), .NY(NY), .LW(LW)) dut (.*);
  always #5 clk = !clk;

  initial begin
    #1000000;
    $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic signed [LW-1:0] got, input logic signed [LW-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("mismatch got %0d exp %0d", got, exp);
    end
  endtask

  initial begin
    @(posedge clk);
    for (int i = 0; i < N; i++) begin
      model[i] = LW'($urandom);
      we <= 1; waddr <= i[$clog2(N)-1:0]; wdata <= model[i];
      @(posedge clk);
    end
    we <= 0;
    for (int i = 0; i < 300; i++) begin
      int x, y;
      x = $urandom % (NX - 1); y = $urandom % (NY - 1);
      rd_en <= 1; cx <= x[$clog2(NX)-1:0]; cy <= y[$clog2(NY)-1:0];
      @(posedge clk);
      rd_en <= 0;
      cx <= '0; cy <= '0;
      #1;
      chk(a, model[y * NX + x]);
      chk(b, model[y * NX + x + 1]);
      chk(c, model[(y + 1) * NX + x]);
      chk(d, model[(y + 1) * NX + x + 1]);
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
