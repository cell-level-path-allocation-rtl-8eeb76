// tb_batcher_sorter: self-checking test of the 128-entry sorting network.
//
// Feeds a new set of random 7-bit keys every clock (with gaps), many of
// them equal, and checks each result against a reference sort done here,
// that it appears exactly LP*(LP+1)/2 = 28 clocks after its input, and
// that out_valid marks exactly the sets that were sent.
module tb_batcher_sorter;
  localparam int LP = 7, KW = 7, P = 1 << LP, LAT = LP * (LP + 1) / 2;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic [KW-1:0] in_key [P], out_key [P];
  int checks = 0, failures = 0;
  int cycle = 0;

  typedef logic [P-1:0][KW-1:0] keyset_t;   // packed: held in a queue
  keyset_t exp_q [$];
  int      due_q [$];

  batcher_sorter #(.LP(LP), .KW(KW)) dut (.clk, .rst_n, .in_valid, .in_key, .out_valid, .out_key);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Output side: compare at every clock.
  always @(negedge clk) if (rst_n) begin
    if (out_valid) begin
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL unexpected out_valid at %0d", cycle);
      end else begin
        keyset_t e;
        int due;
        e = exp_q.pop_front();
        due = due_q.pop_front();
        if (due != cycle) begin
          failures++;
          $display("FAIL latency: result at %0d, due %0d", cycle, due);
        end
        for (int i = 0; i < P; i++) if (out_key[i] !== e[i]) begin
          failures++;
          $display("FAIL set due %0d entry %0d: %0d expected %0d", due, i, out_key[i], e[i]);
          break;
        end
      end
    end else if (due_q.size() != 0 && due_q[0] == cycle) begin
      checks++;
      failures++;
      $display("FAIL missing result at %0d", cycle);
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      keyset_t s;
      int range;
      @(negedge clk);
      in_valid = ($urandom_range(0, 4) != 0);
      range = (n % 3 == 0) ? 3 : ((1 << KW) - 1);
      for (int i = 0; i < P; i++) in_key[i] = KW'($urandom_range(0, range));
      if (in_valid) begin
        // reference: counting sort of the keys
        int cnt [1 << KW];
        int k;
        foreach (cnt[v]) cnt[v] = 0;
        for (int i = 0; i < P; i++) cnt[in_key[i]]++;
        k = 0;
        for (int v = 0; v < (1 << KW); v++)
          for (int c = 0; c < cnt[v]; c++) begin s[k] = KW'(v); k++; end
        exp_q.push_back(s);
        due_q.push_back(cycle + LAT);
      end
    end
    @(negedge clk);
    in_valid = 0;
    repeat (LAT + 3) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("FAIL %0d results never appeared", exp_q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
