// Gateable storage element built from threshold switches.
//
// In the circuit, while the gate (clock) line is high the output follows the
// input, and when it falls the fed-back output holds the state; set and
// reset act on the same element. Here it is a synchronous register: on a
// rising clk edge with gate high it takes d; reset (highest priority) clears
// it and set sets it at any clk edge. Set, reset and the latch's
// transparency phase becoming clocked is this design's choice.
module tl_gateable_ff #(
  parameter int unsigned W = 1
) (
  input  logic         clk,
  input  logic         gate,
  input  logic [W-1:0] d,
  input  logic         set,
  input  logic         reset,
  output logic [W-1:0] q
);
  always_ff @(posedge clk) begin
    if (reset)     q <= '0;
    else if (set)  q <= '1;
    else if (gate) q <= d;
  end
endmodule
