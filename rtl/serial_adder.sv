// serial_adder: bit-serial adder with its upper input inverted.
//
// Forms K_j = D_j + not(D_(j-1)) over W bits, least significant bit first,
// which equals D_j - D_(j-1) - 1 modulo 2**W: the number of cells that lie
// between two neighbouring control packets at the sorter output, i.e. the
// number of requests for output module j.  The upper input (line j-1 of the
// concentrator) is inverted, the lower input (line j) is not.
//
// A full adder with a carry flip-flop.  first marks the clock that carries
// the least significant bits; it starts the sum with a zero carry.  The sum
// bit is combinational, so each result bit leaves in the same clock as the
// two operand bits.  The inversion of the upper input follows the request
// counting scheme; the carry handling is this design's own.
module serial_adder (
  input  logic clk,
  input  logic rst_n,
  input  logic first,     // least significant operand bits are present
  input  logic upper,     // D_(j-1), inverted inside
  input  logic lower,     // D_j
  output logic sum
);

  logic carry_q, cin, a;

  assign a   = ~upper;
  assign cin = first ? 1'b0 : carry_q;
  assign sum = a ^ lower ^ cin;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) carry_q <= 1'b0;
    else        carry_q <= (a & lower) | (a & cin) | (lower & cin);
  end

endmodule
