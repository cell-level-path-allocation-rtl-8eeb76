// reverse_banyan: bit-serial concentrator (indirect binary n-cube).
//
// P = 2**LP lines pass through LP stages of rb_switch elements.  Stage s
// pairs lines p and p + 2**s (bit s of p clear), so a packet leaving stage
// s sits on a line whose low s+1 bits equal the low s+1 bits of its
// destination; after the last stage it is on its destination line.  The
// address is therefore read least significant bit first.  Packets whose
// destinations keep their order and are never further apart than their
// sources (O2 - O1 <= I2 - I1) never meet in an element, which is what
// the request counter offers: control packet j enters at line D_j and
// leaves at line j.
//
// Timing: the active flags enter with sync_in; each stage takes two clocks
// and drops the routing bit it used, so the active flags leave 2*LP clocks
// later (sync_out) and the data field follows from the next clock, least
// significant bit first.  blocked is high in any clock in which an element
// sees two active packets competing for one output.  The network, its
// self-routing and its two clocks per stage follow the request counting
// scheme; stage wiring and the serial format are this design's own.
module reverse_banyan #(
  parameter int unsigned LP = 7
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            sync_in,
  input  logic [2**LP-1:0] in_bits,
  output logic [2**LP-1:0] out_bits,
  output logic            sync_out,
  output logic            blocked
);

  localparam int unsigned P = 2 ** LP;

  logic [P-1:0]    line  [LP+1];
  logic            sync  [LP+1];
  logic [P/2-1:0]  confl [LP];

  assign line[0] = in_bits;
  assign sync[0] = sync_in;

  for (genvar s = 0; s < LP; s++) begin : g_stage
    logic [P/2-1:0] sy;
    for (genvar e = 0; e < P/2; e++) begin : g_elem
      // Element e of stage s: insert a 0 at bit s of e for the upper line.
      localparam int unsigned LO = ((e >> s) << (s + 1)) | (e & ((1 << s) - 1));
      localparam int unsigned HI = LO | (1 << s);
      rb_switch u_sw (
        .clk      (clk),
        .rst_n    (rst_n),
        .sync     (sync[s]),
        .in0      (line[s][LO]),
        .in1      (line[s][HI]),
        .out0     (line[s+1][LO]),
        .out1     (line[s+1][HI]),
        .sync_out (sy[e]),
        .conflict (confl[s][e])
      );
    end
    // All elements of a stage run in step; element 0 stands for the stage.
    assign sync[s+1] = sy[0];
  end

  assign out_bits = line[LP];
  assign sync_out = sync[LP];

  always_comb begin
    blocked = 1'b0;
    for (int s = 0; s < LP; s++) blocked |= |confl[s];
  end

endmodule
