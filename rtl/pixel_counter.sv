// pixel_counter: the photon counter inside each SPAD pixel.
//
// Every rising edge of the quenched SPAD's rail-to-rail pulse adds one to
// the count; the global RESET clears it asynchronously. The pulse itself is
// the clock, as in the pixel, so the counter works without any system clock
// and all pixels count independently. The 8-bit width is the imager's. The
// document does not say what happens past 255 counts; this design saturates
// at the maximum (SATURATE=1), so a very bright pixel reads as full scale
// rather than wrapping to a small value. SATURATE=0 gives a wrapping counter.
//
// Timing: count is valid one clock-to-q after each pulse edge; RESET must be
// released before the next pulse edge is to be counted.
module pixel_counter #(
  parameter int unsigned W        = 8,
  parameter bit          SATURATE = 1'b1
) (
  input  logic         spad_pulse,  // quenched SPAD output, one pulse per photon
  input  logic         reset,       // global RESET, active high, asynchronous
  output logic [W-1:0] count
);

  always_ff @(posedge spad_pulse or posedge reset) begin
    if (reset)
      count <= '0;
    else if (!(SATURATE && (&count)))
      count <= count + 1'b1;
  end

endmodule
