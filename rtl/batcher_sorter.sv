// batcher_sorter: pipelined Batcher bitonic sorting network.
//
// Sorts P = 2**LP keys of KW bits into ascending order, key 0 at output 0.
// In the request counter it merges an input module's cell headers with the
// control packets, so that each control packet lands just above the cells
// that request its output module and idle entries collect at the top.
//
// Structure: the classic bitonic sorter of LP phases; phase s (s = 0..LP-1)
// has s+1 columns of P/2 compare-exchange elements, LP*(LP+1)/2 columns in
// all.  Every column is followed by a register, so the network accepts a
// new set of keys every clock and delivers it LAT = LP*(LP+1)/2 clocks later
// (28 clocks for P = 128).  in_valid travels with the keys as out_valid.
//
// The sorting function (what goes where) follows the request counting
// scheme; the choice of the bitonic form of Batcher's network and the
// register after each column are this design's own.
module batcher_sorter
  import rc_pkg::*;
#(
  parameter int unsigned LP = 7,             // log2 of the number of entries
  parameter int unsigned KW = 7              // key width
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic [KW-1:0]        in_key  [2**LP],
  output logic                 out_valid,
  output logic [KW-1:0]        out_key [2**LP]
);

  localparam int unsigned P   = 2 ** LP;
  localparam int unsigned LAT = bitonic_columns(LP);

  // col[c] is the input of column c; col[LAT] is the sorted result.
  logic [LAT:0][P-1:0][KW-1:0] col;
  logic [LAT:0]                vld;

  for (genvar i = 0; i < P; i++) begin : g_in
    assign col[0][i] = in_key[i];
  end
  assign vld[0] = in_valid;

  for (genvar s = 0; s < LP; s++) begin : g_phase
    for (genvar t = 0; t <= s; t++) begin : g_col
      localparam int unsigned C    = s * (s + 1) / 2 + t;   // column index
      localparam int unsigned BLK  = 2 << s;                // bitonic block size
      localparam int unsigned DIST = 1 << (s - t);          // compare distance
      logic [P-1:0][KW-1:0] nxt;

      // Compare-exchange of entries i and i+DIST for every i with bit DIST
      // clear; the direction alternates between blocks of BLK entries so
      // that each merge sees a bitonic sequence.
      for (genvar i = 0; i < P; i++) begin : g_elem
        if ((i & DIST) == 0) begin : g_ce
          localparam bit ASC = ((i & BLK) == 0);
          logic [KW-1:0] a, b;
          logic          swap;
          assign a    = col[C][i];
          assign b    = col[C][i+DIST];
          assign swap = ASC ? (a > b) : (a < b);
          assign nxt[i]      = swap ? b : a;
          assign nxt[i+DIST] = swap ? a : b;
        end
      end

      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          vld[C+1] <= 1'b0;
          col[C+1] <= '1;
        end else begin
          vld[C+1] <= vld[C];
          col[C+1] <= nxt;
        end
      end
    end
  end

  for (genvar i = 0; i < P; i++) begin : g_out
    assign out_key[i] = col[LAT][i];
  end
  assign out_valid = vld[LAT];

endmodule
