// tb_stereo_workloads: runs the stereo pipeline end to end, one full frame
// each, at the other configurations of the published resource tables:
//   - 512-pixel lines with a 128-line buffer, disparities 0..40;
//   - 1024 x 768 with disparities 0..64 and 0..100;
//   - 12-bit pixels with an 8-line buffer and 10-bit pixels with a 16-line
//     buffer, disparities 0..40.
// Each run (stereo_run) checks every rectified pixel pair and every map point
// against the reference models. The runs proceed one after the other; the
// test ends when all are done, or on the watchdog.
module tb_stereo_workloads;
  localparam int NR = 5;
  int   checks [NR], failures [NR];
  logic done [NR];
  logic start [NR];

  stereo_run #(.W(512),  .H(768), .SL(128), .PW(8),  .DMAX(40),  .NAME("w512_sl128_d40"))
    u_r0 (.start(start[0]), .checks(checks[0]), .failures(failures[0]), .done(done[0]));
  stereo_run #(.W(1024), .H(768), .SL(64),  .PW(8),  .DMAX(64),  .NAME("w1024_sl64_d64"))
    u_r1 (.start(start[1]), .checks(checks[1]), .failures(failures[1]), .done(done[1]));
  stereo_run #(.W(1024), .H(768), .SL(64),  .PW(8),  .DMAX(100), .NAME("w1024_sl64_d100"))
    u_r2 (.start(start[2]), .checks(checks[2]), .failures(failures[2]), .done(done[2]));
  stereo_run #(.W(1024), .H(768), .SL(8),   .PW(12), .DMAX(40),  .NAME("w1024_sl8_pw12"))
    u_r3 (.start(start[3]), .checks(checks[3]), .failures(failures[3]), .done(done[3]));
  stereo_run #(.W(1024), .H(768), .SL(16),  .PW(10), .DMAX(40),  .NAME("w1024_sl16_pw10"))
    u_r4 (.start(start[4]), .checks(checks[4]), .failures(failures[4]), .done(done[4]));

  function automatic void report(input int extra_fail);
    int c = 0, f = extra_fail;
    for (int i = 0; i < NR; i++) begin c += checks[i]; f += failures[i]; end
    $display("TB_RESULT checks=%0d failures=%0d", c, f);
  endfunction

  initial begin
    #1000000000;
    $display("watchdog expired");
    report(1);
    $finish;
  end

  initial begin
    for (int i = 0; i < NR; i++) start[i] = 0;
    #1;
    for (int i = 0; i < NR; i++) begin
      start[i] = 1;
      wait (done[i]);
    end
    report(0);
    $finish;
  end
endmodule
