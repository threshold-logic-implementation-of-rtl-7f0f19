// CAU idle-time counter: parallel up/down counter of WIDTH stages.
//
// Every stage is a master-slave flip-flop whose master clock is gated: stage
// i toggles only when counting up with all lower stages at 1, or counting
// down with all lower stages at 0; otherwise it holds. The stage enables are
// computed in parallel (the inhibit logic), so all stages change on the same
// clock. A byte look-ahead output, carry_out, is high when the whole counter
// would wrap on this clock, and cascade_in lets a lower-order counter enable
// this one. Set and reset act on the slave (all stages at once, reset first),
// modelled synchronously. Up and down together hold the count; that case and
// the cascade ports are this design's choices.
module cau_updown_counter #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             count_up,
  input  logic             count_down,
  input  logic             cascade_in,   // 1 when lower-order stages allow a count
  input  logic             set,
  input  logic             reset,
  output logic [WIDTH-1:0] q,
  output logic             carry_out     // look-ahead to the next counter
);
  logic             up, down;
  logic [WIDTH-1:0] toggle;

  assign up   = count_up & ~count_down & cascade_in;
  assign down = count_down & ~count_up & cascade_in;

  always_comb begin
    for (int i = 0; i < WIDTH; i++) begin
      logic all_ones, all_zeros;
      all_ones  = 1'b1;
      all_zeros = 1'b1;
      for (int j = 0; j < i; j++) begin
        all_ones  = all_ones & q[j];
        all_zeros = all_zeros & ~q[j];
      end
      toggle[i] = (up & all_ones) | (down & all_zeros);
    end
  end

  assign carry_out = (up & (&q)) | (down & ~(|q));

  always_ff @(posedge clk) begin
    if (reset)    q <= '0;
    else if (set) q <= '1;
    else          q <= q ^ toggle;
  end
endmodule
