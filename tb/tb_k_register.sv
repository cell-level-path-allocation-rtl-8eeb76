// tb_k_register: self-checking test of the serial-in K register.
//
// Shifts random W-bit counts in, least significant bit first, and checks
// that k_valid pulses exactly W clocks after the first bit, that k_value
// then holds the count, that it holds it while idle, and that k_valid stays
// low otherwise.
module tb_k_register;
  localparam int W = 7;
  logic clk = 0, rst_n = 0, first = 0, ser_in = 0, k_valid;
  logic [W-1:0] k_value;
  int checks = 0, failures = 0;

  k_register #(.W(W)) dut (.clk, .rst_n, .first, .ser_in, .k_value, .k_valid);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(input logic [W-1:0] v, input int gap);
    for (int b = 0; b < W; b++) begin
      @(negedge clk);
      first  = (b == 0);
      ser_in = v[b];
      checks++;
      if (k_valid) begin
        failures++;
        $display("FAIL k_valid early at bit %0d", b);
      end
    end
    @(negedge clk);
    first  = 0;
    ser_in = 1'($urandom);
    checks++;
    if (!k_valid || k_value !== v) begin
      failures++;
      $display("FAIL value %0d valid %0b expected %0d", k_value, k_valid, v);
    end
    for (int g = 0; g < gap; g++) begin
      @(negedge clk);
      ser_in = 1'($urandom);
      checks++;
      if (k_valid || k_value !== v) begin
        failures++;
        $display("FAIL hold: value %0d valid %0b expected %0d", k_value, k_valid, v);
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    send(7'd96, 2);
    send(7'd0, 0);
    send(7'd85, 0);
    for (int i = 0; i < 300; i++) send(W'($urandom), i % 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
