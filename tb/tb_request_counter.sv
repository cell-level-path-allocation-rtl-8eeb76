// tb_request_counter: end-to-end test of the request counter at its
// default size (96 input ports, 32 output modules, 128-entry sorter).
//
// Every frame presents one set of cell headers with a start pulse and
// checks, against counts made here by simply tallying the headers:
//   - every K value on k_value when k_valid pulses;
//   - every K value as it streams out bit-serially on k_ser;
//   - the timing: least significant bits 2*7+1 = 15 clocks after the
//     packets enter the concentrator (44 clocks after start), k_valid 7
//     clocks later;
//   - that the concentrator never blocks.
// Frames follow the traffic models of the switch's performance study:
//   uniform   every port carries a cell, destinations uniform;
//   hotspot   75% of cells to 16 contiguous modules, 25% to the others;
//   demand    k modules (contiguous or interspersed) each expect r*S2*m
//             cells switch-wide (S2 = 8, m = 32), i.e. r*256/32 per input
//             module, the rest uniform over the other modules;
//   partial   some ports idle;  single  all cells to one module.
// Some frames are started at the minimum spacing, back to back.  The test
// counts how often each mechanism occurred (idle ports, empty modules,
// a module receiving every cell, back-to-back frames) and fails if one
// never did.
module tb_request_counter;
  import rc_pkg::*;
  localparam int N1 = N1_DEFAULT, L2 = L2_DEFAULT;
  localparam int LP = $clog2(N1 + L2), MW = $clog2(L2), W = LP;
  localparam int SORT_LAT = LP * (LP + 1) / 2;
  localparam int K_LAT = SORT_LAT + 1 + 2 * LP + 1;   // start -> LSBs
  localparam int FRAME = 2 * LP + 1;

  logic clk = 0, rst_n = 0, start = 0;
  logic cell_valid [N1];
  logic [MW-1:0] cell_dest [N1];
  logic k_first, k_valid, blocked;
  logic [L2-1:0] k_ser;
  logic [W-1:0] k_value [L2];

  int checks = 0, failures = 0, cycle = 0;
  int n_idle = 0, n_empty = 0, n_full = 0, n_b2b = 0, n_frames = 0;

  typedef logic [L2-1:0][7:0] kvec_t;   // packed: held in queues
  kvec_t exp_q [$];
  int    due_q [$];
  kvec_t ser_exp_q [$];
  int    entry_q [$];   // clocks at which packets enter the concentrator

  request_counter dut (.clk, .rst_n, .start, .cell_valid, .cell_dest,
                       .k_first, .k_ser, .k_value, .k_valid, .blocked);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- checking side ----
  int ser_bit = -1;
  kvec_t ser_cur;
  logic [W-1:0] ser_got [L2];
  always @(negedge clk) if (rst_n) begin
    if (blocked) begin
      checks++;
      failures++;
      $display("FAIL concentrator blocked at %0d", cycle);
    end
    if (k_first) begin
      // 2*ceil(log2(n1+L2))+1 clocks from concentrator entry to the LSBs,
      // entry being the sorter latency plus one clock after start
      checks++;
      if (entry_q.size() == 0 || cycle - entry_q.pop_front() != 2 * LP + 1) begin
        failures++;
        $display("FAIL concentrator-to-count time is not %0d clocks at %0d", 2 * LP + 1, cycle);
      end
      checks++;
      if (due_q.size() == 0 || due_q[0] != cycle) begin
        failures++;
        $display("FAIL k_first at %0d, due %0d", cycle, due_q.size() ? due_q[0] : -1);
      end
      if (due_q.size() != 0) void'(due_q.pop_front());
      ser_cur = ser_exp_q.pop_front();
      ser_bit = 0;
    end
    if (ser_bit >= 0) begin
      for (int j = 0; j < L2; j++) ser_got[j][ser_bit] = k_ser[j];
      if (ser_bit == W - 1) begin
        for (int j = 0; j < L2; j++) begin
          checks++;
          if (int'(ser_got[j]) != ser_cur[j]) begin
            failures++;
            $display("FAIL serial K[%0d] = %0d expected %0d", j, ser_got[j], ser_cur[j]);
          end
        end
        ser_bit = -1;
      end else ser_bit++;
    end
    if (k_valid) begin
      kvec_t e;
      e = exp_q.pop_front();
      for (int j = 0; j < L2; j++) begin
        checks++;
        if (int'(k_value[j]) != e[j]) begin
          failures++;
          $display("FAIL K[%0d] = %0d expected %0d at %0d", j, k_value[j], e[j], cycle);
        end
      end
    end
  end

  // ---- traffic side ----
  int dest [N1];
  logic act [N1];

  task automatic launch(input int gap);
    kvec_t e;
    e = '0;
    @(negedge clk);
    for (int p = 0; p < N1; p++) begin
      cell_valid[p] = act[p];
      cell_dest[p]  = MW'(dest[p]);
      if (act[p]) e[dest[p]]++;
    end
    start = 1;
    exp_q.push_back(e);
    ser_exp_q.push_back(e);
    due_q.push_back(cycle + K_LAT);
    entry_q.push_back(cycle + SORT_LAT + 1);   // sorter, then address generators
    n_frames++;
    for (int j = 0; j < L2; j++) begin
      if (e[j] == 0) n_empty++;
      if (e[j] == N1) n_full++;
    end
    foreach (act[p]) if (!act[p]) begin n_idle++; break; end
    if (gap == FRAME) n_b2b++;
    @(negedge clk);
    start = 0;
    for (int p = 0; p < N1; p++) begin          // headers change after start
      cell_valid[p] = 1'($urandom);
      cell_dest[p]  = MW'($urandom);
    end
    repeat (gap - 2) @(negedge clk);
  endtask

  function automatic int pick_other(input bit in_group [L2]);
    int j;
    do j = $urandom_range(0, L2 - 1); while (in_group[j]);
    return j;
  endfunction

  function automatic int pick_in(input bit in_group [L2]);
    int j;
    do j = $urandom_range(0, L2 - 1); while (!in_group[j]);
    return j;
  endfunction

  initial begin
    bit grp [L2];
    foreach (cell_valid[p]) begin cell_valid[p] = 0; cell_dest[p] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);

    // uniform full load
    for (int f = 0; f < 20; f++) begin
      foreach (dest[p]) begin act[p] = 1; dest[p] = $urandom_range(0, L2 - 1); end
      launch((f % 2) ? FRAME : FRAME + 7);
    end
    // 75% of cells to modules 0..15, 25% to 16..31
    for (int f = 0; f < 10; f++) begin
      foreach (dest[p]) begin
        act[p] = 1;
        dest[p] = ($urandom_range(0, 3) != 0) ? $urandom_range(0, 15) : $urandom_range(16, 31);
      end
      launch(FRAME);
    end
    // demand group of k modules, contiguous then interspersed
    foreach (grp[j]) grp[j] = 0;
    for (int f = 0; f < 16; f++) begin
      int k, pct;
      int ks [4] = '{3, 6, 12, 16};
      real r, pdem;
      k = ks[f % 4];
      r = 0.55 + 0.05 * (f % 5);
      pdem = k * r * 8.0 / N1;
      foreach (grp[j]) grp[j] = (f < 8) ? (j < k) : ((j % (L2 / k)) == 0 && j / (L2 / k) < k);
      pct = int'(pdem * 1000.0);
      foreach (dest[p]) begin
        act[p] = 1;
        dest[p] = ($urandom_range(0, 999) < pct) ? pick_in(grp) : pick_other(grp);
      end
      launch(FRAME + (f % 3));
    end
    // partial load, empty switch, single destination, fixed example
    for (int f = 0; f < 10; f++) begin
      foreach (dest[p]) begin act[p] = ($urandom_range(0, 9) < f); dest[p] = $urandom_range(0, L2 - 1); end
      launch(FRAME);
    end
    foreach (dest[p]) begin act[p] = 1; dest[p] = 31; end
    launch(FRAME);
    foreach (dest[p]) begin act[p] = 1; dest[p] = 0; end
    launch(FRAME);
    foreach (dest[p]) begin act[p] = (p < 6); dest[p] = (p < 3) ? 0 : ((p < 5) ? 1 : 3); end
    launch(FRAME);

    repeat (K_LAT + W + 5) @(negedge clk);
    checks++;
    if (exp_q.size() != 0 || due_q.size() != 0) begin
      failures++;
      $display("FAIL %0d frames without result", exp_q.size());
    end
    $display("mechanisms: frames=%0d idle_ports=%0d empty_modules=%0d full_module=%0d back_to_back=%0d",
             n_frames, n_idle, n_empty, n_full, n_b2b);
    checks++;
    if (n_idle == 0 || n_empty == 0 || n_full == 0 || n_b2b == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
