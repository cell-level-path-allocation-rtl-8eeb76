// tb_rb_switch: self-checking test of the 2x2 bit-serial routing element.
//
// Sends packets "active, routing bit, 6 further bits" into both inputs (an
// inactive input carries zeros) for every combination of active flags and
// routing bits plus random ones.  The expected outputs are worked out from
// the routing rule alone: an active packet leaves on the output named by
// its routing bit, with its active flag two clocks after it arrived and its
// remaining bits one clock after they arrived, the routing bit dropped.
// Both packets asking for one output must raise conflict.
module tb_rb_switch;
  localparam int LEN = 8;                 // active + routing + 6 bits
  logic clk = 0, rst_n = 0, sync = 0, in0 = 0, in1 = 0;
  logic out0, out1, sync_out, conflict;
  int checks = 0, failures = 0, crossed = 0, conflicts = 0;

  rb_switch dut (.clk, .rst_n, .sync, .in0, .in1, .out0, .out1, .sync_out, .conflict);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic frame(input logic a0, input logic r0, input logic a1, input logic r1);
    logic [LEN-1:0] s0, s1, e0, e1;
    logic [LEN-1:0] g0, g1;
    logic exp_conf, got_conf;
    s0 = a0 ? {LEN'($urandom) >> 2, r0, 1'b1} : '0;
    s1 = a1 ? {LEN'($urandom) >> 2, r1, 1'b1} : '0;
    exp_conf = a0 && a1 && (r0 == r1);
    // Reference routing: each active packet to the output of its routing bit.
    if (a0 && r0)            begin e1 = s0; e0 = s1; end
    else if (a0)             begin e0 = s0; e1 = s1; end
    else if (a1 && !r1)      begin e0 = s1; e1 = s0; end
    else                     begin e0 = s0; e1 = s1; end
    got_conf = 0;
    for (int c = 0; c <= LEN; c++) begin
      @(negedge clk);
      sync = (c == 0);
      in0  = (c < LEN) ? s0[c] : 1'b0;
      in1  = (c < LEN) ? s1[c] : 1'b0;
      #1;
      got_conf |= conflict;
      if (c == 2) begin
        checks++;
        if (!sync_out || out0 !== e0[0] || out1 !== e1[0]) begin
          failures++;
          $display("FAIL flags a0=%b r0=%b a1=%b r1=%b: out %b%b sync %b", a0, r0, a1, r1, out0, out1, sync_out);
        end
      end else if (c >= 3) begin
        g0[c-1] = out0;
        g1[c-1] = out1;
      end
    end
    checks++;
    if (got_conf !== exp_conf) begin
      failures++;
      $display("FAIL conflict %b expected %b", got_conf, exp_conf);
    end
    if (exp_conf) conflicts++;
    else begin
      checks++;
      if (g0[LEN-1:2] !== e0[LEN-1:2] || g1[LEN-1:2] !== e1[LEN-1:2]) begin
        failures++;
        $display("FAIL body a0=%b r0=%b a1=%b r1=%b", a0, r0, a1, r1);
      end
      if ((a0 && r0) || (!a0 && a1 && !r1)) crossed++;
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 16; k++) frame(k[0], k[1], k[2], k[3]);
    for (int i = 0; i < 300; i++) frame(1'($urandom), 1'($urandom), 1'($urandom), 1'($urandom));
    checks++;
    if (crossed == 0 || conflicts == 0) begin
      failures++;
      $display("FAIL coverage: crossed %0d conflicts %0d", crossed, conflicts);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
