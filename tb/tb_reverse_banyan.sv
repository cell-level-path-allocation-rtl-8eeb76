// tb_reverse_banyan: self-checking test of the 128-line concentrator.
//
// Each frame launches a set of active packets (active flag, 7-bit
// destination LSB first, 7-bit random data LSB first) whose destinations
// keep the order of their sources with gaps no larger than the source gaps,
// the traffic the request counter produces.  It checks that every packet
// leaves on its destination line with its active flag exactly 2*LP clocks
// after entry and its data in the clocks after, that every other line is
// idle, and that no blocking is reported.  One frame with two packets that
// violate the gap rule must report blocking.  The example of the request
// counting scheme (sources 3, 6, 7 to lines 0, 1, 2) is included.
module tb_reverse_banyan;
  localparam int LP = 7, P = 1 << LP, LEN = 2 * LP + 1;
  logic clk = 0, rst_n = 0, sync_in = 0, sync_out, blocked;
  logic [P-1:0] in_bits = '0, out_bits;
  int checks = 0, failures = 0;

  reverse_banyan #(.LP(LP)) dut (.clk, .rst_n, .sync_in, .in_bits, .out_bits, .sync_out, .blocked);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // src_dest[p] = destination of the packet at input p, or -1.
  task automatic frame(input int src_dest[P], input bit expect_block);
    logic [LEN-1:0] pkt [P];
    int   dest_src [P];
    logic [LP-1:0] data [P];
    logic got_block;
    foreach (dest_src[d]) dest_src[d] = -1;
    for (int p = 0; p < P; p++) begin
      data[p] = LP'($urandom);
      if (src_dest[p] >= 0) begin
        pkt[p] = {data[p], LP'(src_dest[p]), 1'b1};
        dest_src[src_dest[p]] = p;
      end else pkt[p] = '0;
    end
    got_block = 0;
    for (int c = 0; c <= 3 * LP + 1; c++) begin
      @(negedge clk);
      sync_in = (c == 0);
      for (int p = 0; p < P; p++) in_bits[p] = (c < LEN) ? pkt[p][c] : 1'b0;
      #1;
      got_block |= blocked;
      if (expect_block) continue;
      if (c == 2 * LP) begin
        checks++;
        if (!sync_out) begin
          failures++;
          $display("FAIL sync_out missing at clock %0d", c);
        end
      end else if (sync_out) begin
        checks++;
        failures++;
        $display("FAIL sync_out at clock %0d", c);
      end
      if (c >= 2 * LP && c <= 3 * LP) begin
        for (int d = 0; d < P; d++) begin
          logic e;
          if (dest_src[d] < 0) e = 1'b0;
          else if (c == 2 * LP) e = 1'b1;
          else e = data[dest_src[d]][c - 2 * LP - 1];
          checks++;
          if (out_bits[d] !== e) begin
            failures++;
            if (failures < 10) $display("FAIL line %0d clock %0d: %b expected %b", d, c, out_bits[d], e);
          end
        end
      end
    end
    checks++;
    if (got_block !== expect_block) begin
      failures++;
      $display("FAIL blocked %b expected %b", got_block, expect_block);
    end
  endtask

  initial begin
    int sd [P];
    repeat (3) @(posedge clk);
    rst_n = 1;
    // Example: control packets at sorter outputs 3, 6 and 7.
    foreach (sd[p]) sd[p] = -1;
    sd[3] = 0; sd[6] = 1; sd[7] = 2;
    frame(sd, 0);
    // All lines active, identity.
    foreach (sd[p]) sd[p] = p;
    frame(sd, 0);
    // Random order-keeping concentrations.
    for (int f = 0; f < 60; f++) begin
      int m, base, k;
      m = $urandom_range(1, P);
      base = $urandom_range(0, P - m);
      foreach (sd[p]) sd[p] = -1;
      k = 0;
      // choose m of the P inputs, in order
      for (int p = 0; p < P; p++) begin
        if (k < m && $urandom_range(0, P - p - 1) < m - k) begin
          sd[p] = base + k;
          k++;
        end
      end
      frame(sd, 0);
    end
    // Gap rule violated: inputs 0 and 1 to outputs 0 and 2.
    foreach (sd[p]) sd[p] = -1;
    sd[0] = 0; sd[1] = 2;
    frame(sd, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
