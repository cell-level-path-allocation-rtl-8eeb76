// rb_switch: 2x2 bit-serial self-routing element of the reverse banyan.
//
// Port 0 leads to the output line whose routing bit is 0, port 1 to the
// line whose routing bit is 1.  A packet arrives as: active flag, then its
// routing bit for this stage, then the rest of its address and its data.
//   clock T   (sync high): the active flags of both inputs are stored.
//   clock T+1          : the routing bits are read and the element sets
//                        itself straight or crossed for the whole packet:
//                        an active upper packet decides, otherwise an
//                        active lower packet, otherwise straight.
//   clock T+2          : the stored active flags leave (sync_out high).
//   clock T+3 onward   : every further bit leaves one clock after it came.
// The routing bit is thus consumed, and the next stage sees its own
// routing bit right after the active flag, two clocks later.  Two active
// packets that ask for the same output are a blocking event, flagged on
// conflict (it cannot happen when the element is used as the request
// counter's concentrator).  Two clocks per stage, one to see whether the
// packet is active and one to decide its route, follow the request counting
// scheme; the rest of the element is this design's own.
module rb_switch (
  input  logic clk,
  input  logic rst_n,
  input  logic sync,       // active flags are on the inputs this clock
  input  logic in0,
  input  logic in1,
  output logic out0,
  output logic out1,
  output logic sync_out,   // active flags are on the outputs this clock
  output logic conflict    // both active packets asked for the same output
);

  logic a0_q, a1_q;        // stored active flags
  logic d0_q, d1_q;        // one-clock delay of the input bits
  logic route_q;           // high during the routing-bit clock
  logic cross_q, cross_d;
  logic x0, x1;

  always_comb begin
    if (a0_q)      cross_d = in0;      // upper packet goes to line in0
    else if (a1_q) cross_d = ~in1;     // lower packet goes to line in1
    else           cross_d = 1'b0;
  end

  assign conflict = route_q & a0_q & a1_q & (in0 == in1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a0_q     <= 1'b0;
      a1_q     <= 1'b0;
      d0_q     <= 1'b0;
      d1_q     <= 1'b0;
      route_q  <= 1'b0;
      sync_out <= 1'b0;
      cross_q  <= 1'b0;
    end else begin
      d0_q     <= in0;
      d1_q     <= in1;
      route_q  <= sync;
      sync_out <= route_q;
      if (sync) begin
        a0_q <= in0;
        a1_q <= in1;
      end
      if (route_q) cross_q <= cross_d;
    end
  end

  // In the clock after the routing bit, the stored flags replace it.
  assign x0 = sync_out ? a0_q : d0_q;
  assign x1 = sync_out ? a1_q : d1_q;
  assign out0 = cross_q ? x1 : x0;
  assign out1 = cross_q ? x0 : x1;

endmodule
