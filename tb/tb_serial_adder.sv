// tb_serial_adder: self-checking test of the inverted-input serial adder.
//
// Streams random W-bit pairs (upper = D_(j-1), lower = D_j) least
// significant bit first, frames back to back, and checks every sum bit in
// the clock it is presented against D_j - D_(j-1) - 1 modulo 2**W worked
// out here.  Includes the edge cases D_j = D_(j-1) + 1 (count zero) and the
// largest counts.
module tb_serial_adder;
  localparam int W = 7;
  logic clk = 0, rst_n = 0, first = 0, upper = 0, lower = 0, sum;
  int checks = 0, failures = 0;

  serial_adder dut (.clk, .rst_n, .first, .upper, .lower, .sum);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_pair(input logic [W-1:0] dj1, input logic [W-1:0] dj);
    logic [W-1:0] exp_k, got;
    exp_k = W'(dj - dj1 - 1);
    for (int b = 0; b < W; b++) begin
      @(negedge clk);
      first = (b == 0);
      upper = dj1[b];
      lower = dj[b];
      #1 got[b] = sum;
    end
    checks++;
    if (got !== exp_k) begin
      failures++;
      $display("FAIL D_j-1=%0d D_j=%0d K=%0d expected %0d", dj1, dj, got, exp_k);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_pair(7'd2, 7'd6);        // 6 - 2 - 1 = 3
    run_pair(7'd3, 7'd4);        // zero requests
    run_pair(7'd0, 7'd127);      // 126
    run_pair(7'd127, 7'd127);    // wraps to 127
    for (int i = 0; i < 500; i++) begin
      logic [W-1:0] a, b;
      a = W'($urandom);
      b = W'($urandom);
      run_pair(a, b);
    end
    @(negedge clk);
    first = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
