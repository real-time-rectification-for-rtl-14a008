// tb_pix_shift_reg: writes a raster of random pixels as scan lines into the
// line buffer while reading random addresses on both read ports, and checks
// the read data against a model of the buffer one cycle later (a read of an
// address written in the same cycle returns the old contents).
module tb_pix_shift_reg;
  localparam int W = 32, SL = 8, PW = 8, N = W * SL, BW = $clog2(N);
  logic clk = 0, we = 0, re = 0;
  logic [BW-1:0] waddr, raddr0, raddr1;
  logic [PW-1:0] wdata, rdata0, rdata1;
  logic [PW-1:0] model [N];
  int checks = 0, failures = 0;

  pix_shift_reg #(.W(W), .SL(SL), .PW(PW)) dut (.*);
  always #5 clk = !clk;

  initial begin
    #1000000;
    $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk);
    // fill
    for (int i = 0; i < N; i++) begin
      model[i] = PW'($urandom);
      we <= 1; waddr <= BW'(i); wdata <= model[i];
      @(posedge clk);
    end
    // overwrite scan lines in order while reading
    for (int i = 0; i < 3 * N; i++) begin
      logic [PW-1:0] e0, e1, nd;
      logic [BW-1:0] a0, a1, wa;
      wa = BW'(i % N); nd = PW'($urandom);
      a0 = BW'($urandom); a1 = (i % 5 == 0) ? wa : BW'($urandom);
      we <= 1; waddr <= wa; wdata <= nd;
      re <= 1; raddr0 <= a0; raddr1 <= a1;
      e0 = model[a0]; e1 = model[a1];
      @(posedge clk);
      model[wa] = nd;
      #1;
      checks += 2;
      if (rdata0 !== e0) begin failures++; if (failures < 10) $display("port0 mismatch"); end
      if (rdata1 !== e1) begin failures++; if (failures < 10) $display("port1 mismatch"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
