// request_counter: parallel request counting for one input module of a
// three-stage ATM switch with intermediate channel grouping.
//
// Path allocation needs, for input module i and every output module j,
// K_ij: how many of the module's N1 incoming cells request output module j.
// This block finds all L2 counts at once:
//   1. A Batcher sorter merges the N1 cell headers with L2 control packets,
//      one per output module.  Cells for module j sort just below control
//      packet j; idle ports sort to the top.  If control packet j leaves at
//      sorter output D_j, then D_j = K_i0 + ... + K_ij + j.
//   2. The address generator at each sorter output turns a control packet
//      into an active packet for concentrator output j carrying D_j; every
//      other output sends an inactive packet.
//   3. A reverse banyan concentrator brings D_0 .. D_(L2-1) onto lines
//      0 .. L2-1.  Because D_k - D_j >= k - j, it never blocks.
//   4. Bit-serial adders form K_ij = D_j + not(D_(j-1)) = D_j - D_(j-1) - 1;
//      K_i0 is D_0 itself.  The counts go to the processors' K registers,
//      held here on k_value.
//
// Interface: present the cell headers (cell_valid, cell_dest) with a
// one-clock start pulse.  Starts must be at least FRAME = 2*LP+1 clocks
// apart, LP = clog2(N1+L2).  Timing after the start clock:
//   SORT_LAT = LP*(LP+1)/2      sorted set at the address generators
//   +1                          packets enter the concentrator
//   +2*LP+1                     least significant bits of all K on k_ser
//                               (k_first high); the remaining bits follow
//                               one per clock
//   +W                          k_value holds all counts, k_valid pulses
// For the defaults (N1 = 96, L2 = 32, 128-entry sorter, LP = 7) the counts
// start 2*7+1 = 15 clocks after the packets enter the concentrator, as the
// request counting scheme states, and 44 clocks after start.
// The sorting order, the address generators, the concentrator with two
// clocks per stage and the inverted-input serial adders follow that scheme;
// the sorter's pipelining, the serial packet format and the key layout are
// this design's own.
module request_counter
  import rc_pkg::*;
#(
  parameter int unsigned N1 = N1_DEFAULT,   // input ports per input module
  parameter int unsigned L2 = L2_DEFAULT,   // output modules
  localparam int unsigned LP = $clog2(N1 + L2),
  localparam int unsigned MW = (L2 > 1) ? $clog2(L2) : 1,
  localparam int unsigned W  = LP           // width of D and of K
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,                 // headers valid this clock
  input  logic          cell_valid [N1],       // port carries a cell
  input  logic [MW-1:0] cell_dest  [N1],       // requested output module
  output logic          k_first,               // LSBs of the counts on k_ser
  output logic [L2-1:0] k_ser,                 // bit-serial counts, LSB first
  output logic [W-1:0]  k_value    [L2],       // K registers
  output logic          k_valid,               // k_value updated
  output logic          blocked                // concentrator blocking seen
);

  localparam int unsigned P     = sorter_size(N1, L2);
  localparam int unsigned KW    = MW + 2;
  localparam int unsigned FRAME = 2 * LP + 1;

  // ---- 1. merge cell headers and control packets in the sorter ----------
  logic [KW-1:0] s_in  [P];
  logic [KW-1:0] s_out [P];
  logic          s_valid;

  always_comb begin
    for (int q = 0; q < int'(P); q++) begin
      if (q < int'(N1))
        s_in[q] = cell_valid[q] ? {1'b0, cell_dest[q], 1'b0} : {1'b1, {MW{1'b0}}, 1'b0};
      else if (q < int'(N1 + L2))
        s_in[q] = {1'b0, MW'(q - int'(N1)), 1'b1};
      else
        s_in[q] = {1'b1, {MW{1'b0}}, 1'b0};
    end
  end

  batcher_sorter #(.LP(LP), .KW(KW)) u_sort (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (start),
    .in_key    (s_in),
    .out_valid (s_valid),
    .out_key   (s_out)
  );

  // ---- 2. address generators ---------------------------------------------
  logic [P-1:0] ag_bits;
  logic         conc_sync;

  for (genvar d = 0; d < P; d++) begin : g_ag
    entry_kind_e kind;
    address_generator #(.LP(LP), .MW(MW), .PORT(d)) u_ag (
      .clk     (clk),
      .rst_n   (rst_n),
      .load    (s_valid),
      .key     (s_out[d]),
      .ser_out (ag_bits[d]),
      .kind    (kind)
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) conc_sync <= 1'b0;
    else        conc_sync <= s_valid;
  end

  // ---- 3. concentrator -----------------------------------------------------
  logic [P-1:0] c_out;
  logic         c_sync;

  reverse_banyan #(.LP(LP)) u_conc (
    .clk      (clk),
    .rst_n    (rst_n),
    .sync_in  (conc_sync),
    .in_bits  (ag_bits),
    .out_bits (c_out),
    .sync_out (c_sync),
    .blocked  (blocked)
  );

  // ---- 4. serial adders and K registers -----------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) k_first <= 1'b0;
    else        k_first <= c_sync;     // data field follows the active flags
  end

  assign k_ser[0] = c_out[0];           // K_i0 = D_0

  for (genvar j = 1; j < L2; j++) begin : g_add
    serial_adder u_add (
      .clk   (clk),
      .rst_n (rst_n),
      .first (k_first),
      .upper (c_out[j-1]),
      .lower (c_out[j]),
      .sum   (k_ser[j])
    );
  end

  logic [L2-1:0] kv;
  for (genvar j = 0; j < L2; j++) begin : g_kreg
    k_register #(.W(W)) u_kreg (
      .clk     (clk),
      .rst_n   (rst_n),
      .first   (k_first),
      .ser_in  (k_ser[j]),
      .k_value (k_value[j]),
      .k_valid (kv[j])
    );
  end
  assign k_valid = kv[0];

  // ---- rules of use -------------------------------------------------------
  int unsigned since_start;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                   since_start <= FRAME;
    else if (start)               since_start <= 0;
    else if (since_start < FRAME) since_start <= since_start + 1;
  end

  a_start_spacing: assert property (@(posedge clk) disable iff (!rst_n)
    start |-> since_start >= FRAME - 1)
    else $error("request_counter: start pulses closer than %0d clocks", FRAME);

  a_no_blocking: assert property (@(posedge clk) disable iff (!rst_n) !blocked)
    else $error("request_counter: concentrator blocked");

endmodule
