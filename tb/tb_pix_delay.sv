// tb_pix_delay: shifts random pixels into the right pixel delay line with
// irregular enables and checks that each comes out exactly N shifts later,
// zeros before that and after a clear.
module tb_pix_delay;
  localparam int N = 5, PW = 8;
  logic clk = 0, clr = 1, en = 0;
  logic [PW-1:0] din, dout;
  logic [PW-1:0] hist [$];
  int checks = 0, failures = 0;

  pix_delay #(.N(N), .PW(PW)) dut (.*);
  always #5 clk = !clk;

  initial begin
    #1000000;
    $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk); clr <= 0;
    for (int i = 0; i < N; i++) hist.push_back('0);
    for (int i = 0; i < 600; i++) begin
      logic e; logic [PW-1:0] v;
      e = ($urandom % 3) != 0; v = PW'($urandom);
      if (i == 300) begin
        clr <= 1; en <= 0;
        @(posedge clk);
        clr <= 0;
        hist.delete();
        for (int k = 0; k < N; k++) hist.push_back('0);
      end
      en <= e; din <= v;
      @(posedge clk);
      #1;
      if (e) begin
        hist.push_back(v);
        void'(hist.pop_front());
      end
      checks++;
      if (dout !== hist[0]) begin
        failures++;
        if (failures < 10) $display("dout %0d exp %0d", dout, hist[0]);
      end
    end
    en <= 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
