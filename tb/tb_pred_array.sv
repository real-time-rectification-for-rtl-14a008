// tb_pred_array: fills both banks of the predecessor array with random words
// and reads them back in random order while the other bank is being
// rewritten, checking the read data one cycle after the address.
module tb_pred_array;
  localparam int W = 32, NC = 6, DW = 4 * NC, AW = $clog2(W);
  logic clk = 0, we = 0, wbank = 0, rbank = 0;
  logic [AW-1:0] waddr, raddr;
  logic [DW-1:0] wdata, rdata;
  logic [DW-1:0] model [2][W];
  int checks = 0, failures = 0;

  pred_array #(.W(W), .NC(NC)) dut (.*);
  always #5 clk = !clk;

  initial begin
    #1000000;
    $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk);
    for (int b = 0; b < 2; b++)
      for (int i = 0; i < W; i++) begin
        model[b][i] = DW'($urandom);
        we <= 1; wbank <= b[0]; waddr <= AW'(i); wdata <= model[b][i];
        @(posedge clk);
      end
    for (int r = 0; r < 6; r++) begin
      for (int i = 0; i < W; i++) begin
        logic [DW-1:0] e, nw; int ra;
        nw = DW'($urandom);
        ra = $urandom % W;
        we <= 1; wbank <= r[0]; waddr <= AW'(i); wdata <= nw;
        rbank <= !r[0]; raddr <= AW'(ra);
        e = model[!r[0]][ra];
        @(posedge clk);
        model[r[0]][i] = nw;
        #1;
        checks++;
        if (rdata !== e) begin failures++; if (failures < 10) $display("mismatch"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
