// pixel_latch: the 8-bit in-pixel memory register.
//
// A transparent latch: while the global LATCH is high the register follows
// the counter, and when LATCH falls it keeps the frame's final count. It then
// holds that value for the whole of the next frame while the counter is
// cleared and counts again, which is what lets the array integrate one frame
// while the previous one is read out. Width and function are the imager's;
// the level-sensitive latch (rather than an edge-triggered flop) follows its
// description as a "latch register".
module pixel_latch #(
  parameter int unsigned W = 8
) (
  input  logic         latch,  // global LATCH, active high
  input  logic [W-1:0] d,      // counter value
  output logic [W-1:0] q       // stored count of the previous frame
);

  always_latch begin
    if (latch)
      q = d;
  end

endmodule
