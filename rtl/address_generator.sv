// address_generator: turns one sorter output into a concentrator packet.
//
// One address generator sits at each output D (= parameter PORT) of the
// sorting network.  When the sorted set arrives (load), it inspects the key
// {idle, module, ctrl}.  A control packet for output module j becomes an
// active packet addressed to concentrator output j whose data field is the
// value D, the position at which the control packet left the sorter.  A
// data cell or an idle entry becomes an inactive packet.
//
// The packet is sent bit-serially, one bit per clock, starting the clock
// after load:
//   bit 0            active flag
//   bits 1..LP       destination address, least significant bit first
//                    (the bit that concentrator stage 0 routes on first)
//   bits LP+1..2LP   data field D, least significant bit first
// An inactive packet is all zeros.  A new load may come every FRAME = 2*LP+1
// clocks.  Forwarding only control packets and appending D follows the
// request counting scheme; the serial format is this design's own.
module address_generator
  import rc_pkg::*;
#(
  parameter int unsigned LP   = 7,   // log2 of the sorter size
  parameter int unsigned MW   = 5,   // width of the output-module number
  parameter int unsigned PORT = 0    // this generator's sorter output D
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                load,
  input  logic [MW+1:0]       key,       // {idle, module, ctrl}
  output logic                ser_out,   // bit-serial packet
  output entry_kind_e         kind       // what was last loaded
);

  localparam int unsigned FRAME = 2 * LP + 1;

  logic [FRAME-1:0] sr;
  entry_kind_e      kind_d;
  logic [LP-1:0]    addr;
  logic [LP-1:0]    dval;

  always_comb begin
    if (key[MW+1])  kind_d = ENTRY_IDLE;
    else if (key[0]) kind_d = ENTRY_CONTROL;
    else             kind_d = ENTRY_DATA;
    addr = LP'(key[MW:1]);
    dval = LP'(PORT);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr   <= '0;
      kind <= ENTRY_IDLE;
    end else if (load) begin
      kind <= kind_d;
      sr   <= (kind_d == ENTRY_CONTROL) ? {dval, addr, 1'b1} : '0;
    end else begin
      sr   <= sr >> 1;
    end
  end

  assign ser_out = sr[0];

endmodule
