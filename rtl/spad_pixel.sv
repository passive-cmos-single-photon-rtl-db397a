// spad_pixel: digital part of one SPAD pixel.
//
// The SPAD's quenched pulse clocks an 8-bit counter (pixel_counter); the
// global LATCH copies the count into the 8-bit pixel memory (pixel_latch);
// when the pixel's row is selected the stored value is driven onto the
// column's 8-bit bus. On the chip that driver is a tri-state onto a shared
// vertical bus; here an unselected pixel drives zeros so the column bus can
// be formed as the OR of all pixels in the column, which gives the same
// value as long as only one row is selected at a time.
module spad_pixel #(
  parameter int unsigned W        = 8,
  parameter bit          SATURATE = 1'b1
) (
  input  logic         spad_pulse,  // quenched SPAD output
  input  logic         reset,       // global RESET
  input  logic         latch,       // global LATCH
  input  logic         row_sel,     // this pixel's row is being read
  output logic [W-1:0] bus_out      // contribution to the column bus
);

  logic [W-1:0] count;
  logic [W-1:0] stored;

  pixel_counter #(.W(W), .SATURATE(SATURATE)) u_counter (
    .spad_pulse(spad_pulse),
    .reset     (reset),
    .count     (count)
  );

  pixel_latch #(.W(W)) u_latch (
    .latch(latch),
    .d    (count),
    .q    (stored)
  );

  assign bus_out = row_sel ? stored : '0;

endmodule
