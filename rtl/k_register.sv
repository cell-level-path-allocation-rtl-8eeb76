// k_register: the K register of one path-allocation processor.
//
// Receives the request count K, least significant bit first, one bit per
// clock for W clocks starting with the clock in which first is high, and
// then holds it on k_value until the next count arrives.  k_valid pulses in
// the clock after the most significant bit has been stored, when k_value
// holds the new count.  The register is named by the path-allocation scheme
// as the destination of the count; its serial-in form is this design's own
// choice, matching the bit-serial adders that feed it.
module k_register #(
  parameter int unsigned W = 7
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         first,    // least significant bit is on ser_in
  input  logic         ser_in,
  output logic [W-1:0] k_value,
  output logic         k_valid
);

  logic [W-1:0]         sh;
  logic [$clog2(W+1)-1:0] left;   // bits still to come

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh      <= '0;
      left    <= '0;
      k_value <= '0;
      k_valid <= 1'b0;
    end else begin
      k_valid <= 1'b0;
      if (first || left != 0) begin
        sh <= {ser_in, sh[W-1:1]};
        if (first) left <= ($clog2(W+1))'(W - 1);
        else       left <= left - 1'b1;
        if ((first && W == 1) || (!first && left == 1)) begin
          k_value <= {ser_in, sh[W-1:1]};
          k_valid <= 1'b1;
        end
      end
    end
  end

endmodule
