// tb_request_counter_sizes: request_counter at the other switch sizes of
// the performance study.
//
// The default build (96 ports, 32 output modules) fills its 128-entry
// sorter exactly.  The cell-loss study sweeps the ports per input module
// from about 56 to 140 with 30 to 32 output modules.  This test builds
// three points of that range and checks every count and the start-to-count
// latency of each:
//   N1 =  60, L2 = 32   92 entries in a 128-entry sorter (36 padding inputs)
//   N1 = 130, L2 = 30  160 entries in a 256-entry sorter, 2*8+1 = 17 clocks
//                      through concentrator and adders
//   N1 =   8, L2 =  3   the small worked example's size (16-entry sorter)
module tb_request_counter_sizes;
  logic clk = 0, rst_n = 0;
  int c0, f0, c1, f1, c2, f2;
  logic d0, d1, d2;
  int checks, failures;

  rc_size_point #(.N1(60),  .L2(32), .FRAMES(12)) u_p0 (.clk, .rst_n, .checks(c0), .failures(f0), .done(d0));
  rc_size_point #(.N1(130), .L2(30), .FRAMES(12)) u_p1 (.clk, .rst_n, .checks(c1), .failures(f1), .done(d1));
  rc_size_point #(.N1(8),   .L2(3),  .FRAMES(40)) u_p2 (.clk, .rst_n, .checks(c2), .failures(f2), .done(d2));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2, f0 + f1 + f2 + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (d0 && d1 && d2);
    checks   = c0 + c1 + c2;
    failures = f0 + f1 + f2;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
