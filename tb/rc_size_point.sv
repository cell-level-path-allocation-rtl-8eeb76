// rc_size_point: traffic source and checker for one request_counter of a
// given size, used by tb_request_counter_sizes.
//
// Instantiates request_counter #(N1, L2), sends FRAMES sets of cell
// headers at the minimum start spacing and checks every count on k_value
// (against a tally of the headers made here) and the clock at which the
// least significant bits appear: LP*(LP+1)/2 + 2*LP + 2 clocks after start,
// LP = clog2(N1+L2).  Traffic cycles through uniform full load, 75% of the
// cells to the lower half of the output modules, partial load with idle
// ports, and every cell to the last module.  Reports its totals on checks,
// failures and done.
module rc_size_point #(
  parameter int N1 = 8,
  parameter int L2 = 3,
  parameter int FRAMES = 12
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output logic done
);
  localparam int LP = $clog2(N1 + L2), MW = (L2 > 1) ? $clog2(L2) : 1, W = LP;
  localparam int K_LAT = LP * (LP + 1) / 2 + 2 * LP + 2;
  localparam int FRAME = 2 * LP + 1;

  logic start = 0;
  logic cell_valid [N1];
  logic [MW-1:0] cell_dest [N1];
  logic k_first, k_valid, blocked;
  logic [L2-1:0] k_ser;
  logic [W-1:0] k_value [L2];
  int cycle = 0;

  typedef logic [L2-1:0][7:0] kvec_t;
  kvec_t exp_q [$];
  int    due_q [$];

  request_counter #(.N1(N1), .L2(L2)) dut (.clk, .rst_n, .start, .cell_valid, .cell_dest,
                                          .k_first, .k_ser, .k_value, .k_valid, .blocked);

  always @(posedge clk) cycle <= cycle + 1;

  initial begin checks = 0; failures = 0; done = 0; end

  always @(negedge clk) if (rst_n) begin
    if (blocked) begin checks++; failures++; $display("FAIL N1=%0d blocked", N1); end
    if (k_first) begin
      checks++;
      if (due_q.size() == 0 || due_q[0] != cycle) begin
        failures++;
        $display("FAIL N1=%0d L2=%0d: k_first at %0d", N1, L2, cycle);
      end
      if (due_q.size() != 0) void'(due_q.pop_front());
    end
    if (k_valid) begin
      kvec_t e;
      e = exp_q.pop_front();
      for (int j = 0; j < L2; j++) begin
        checks++;
        if (int'(k_value[j]) != int'(e[j])) begin
          failures++;
          $display("FAIL N1=%0d L2=%0d: K[%0d] = %0d expected %0d", N1, L2, j, k_value[j], e[j]);
        end
      end
    end
  end

  initial begin
    foreach (cell_valid[p]) begin cell_valid[p] = 0; cell_dest[p] = 0; end
    @(posedge rst_n);
    repeat (2) @(negedge clk);
    for (int f = 0; f < FRAMES; f++) begin
      kvec_t e;
      e = '0;
      @(negedge clk);
      for (int p = 0; p < N1; p++) begin
        int d;
        case (f % 4)
          0: begin cell_valid[p] = 1; d = $urandom_range(0, L2 - 1); end
          1: begin
               cell_valid[p] = 1;
               d = ($urandom_range(0, 3) != 0 || L2 < 2) ? $urandom_range(0, L2 / 2 - (L2 < 2 ? 0 : 1))
                                                         : $urandom_range(L2 / 2, L2 - 1);
             end
          2: begin cell_valid[p] = 1'($urandom_range(0, 2) == 0); d = $urandom_range(0, L2 - 1); end
          default: begin cell_valid[p] = 1; d = L2 - 1; end
        endcase
        cell_dest[p] = MW'(d);
        if (cell_valid[p]) e[d]++;
      end
      start = 1;
      exp_q.push_back(e);
      due_q.push_back(cycle + K_LAT);
      @(negedge clk);
      start = 0;
      repeat (FRAME - 2) @(negedge clk);
    end
    repeat (K_LAT + W + 5) @(negedge clk);
    checks++;
    if (exp_q.size() != 0 || due_q.size() != 0) begin
      failures++;
      $display("FAIL N1=%0d L2=%0d: %0d frames without result", N1, L2, exp_q.size());
    end
    done = 1;
  end
endmodule
