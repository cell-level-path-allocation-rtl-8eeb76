// tb_address_generator: self-checking test of one address generator.
//
// The generator sits at sorter output PORT = 77 of a 128-entry sorter.
// A control packet for module j must produce the serial packet
// 1, j (7 bits, LSB first), 77 (7 bits, LSB first); a data cell and an idle
// entry must produce fifteen zeros.  Also checks the reported entry kind
// and that the packet begins in the clock after load.
module tb_address_generator;
  import rc_pkg::*;
  localparam int LP = 7, MW = 5, PORT = 77;
  localparam int FRAME = 2 * LP + 1;
  logic clk = 0, rst_n = 0, load = 0, ser_out;
  logic [MW+1:0] key = '0;
  entry_kind_e kind;
  int checks = 0, failures = 0;

  address_generator #(.LP(LP), .MW(MW), .PORT(PORT)) dut
    (.clk, .rst_n, .load, .key, .ser_out, .kind);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic try(input logic idle, input logic [MW-1:0] j, input logic ctrl);
    logic [FRAME-1:0] exp_pkt, got;
    entry_kind_e exp_kind;
    exp_kind = idle ? ENTRY_IDLE : (ctrl ? ENTRY_CONTROL : ENTRY_DATA);
    exp_pkt  = '0;
    if (!idle && ctrl) begin
      exp_pkt[0] = 1'b1;
      for (int b = 0; b < LP; b++) exp_pkt[1+b]    = (b < MW) ? j[b] : 1'b0;
      for (int b = 0; b < LP; b++) exp_pkt[1+LP+b] = 1'((PORT >> b) & 1);
    end
    @(negedge clk);
    key  = {idle, j, ctrl};
    load = 1;
    @(negedge clk);
    load = 0;
    key  = $urandom;
    for (int b = 0; b < FRAME; b++) begin
      got[b] = ser_out;
      @(negedge clk);
    end
    checks++;
    if (got !== exp_pkt || kind !== exp_kind) begin
      failures++;
      $display("FAIL key %b: packet %b expected %b kind %s", {idle, j, ctrl}, got, exp_pkt, kind.name());
    end
    checks++;
    if (ser_out !== 1'b0) begin
      failures++;
      $display("FAIL output not idle after the packet");
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    try(1'b0, 5'd2, 1'b1);
    try(1'b0, 5'd31, 1'b1);
    try(1'b0, 5'd2, 1'b0);
    try(1'b1, 5'd0, 1'b0);
    for (int i = 0; i < 200; i++) try(1'($urandom_range(0, 3) == 0), MW'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
