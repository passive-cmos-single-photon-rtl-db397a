// pixel_array: the ROWS x COLS array of SPAD pixels.
//
// All pixels share the global RESET and LATCH and count their own SPAD's
// pulses in parallel. Row selects run horizontally; each column has an
// 8-bit bus running vertically, formed as the OR of its pixels' outputs
// (only the selected row drives a non-zero value). The 64x64 size and the
// 8-bit column buses are the imager's.
module pixel_array #(
  parameter int unsigned ROWS     = 64,
  parameter int unsigned COLS     = 64,
  parameter int unsigned W        = 8,
  parameter bit          SATURATE = 1'b1
) (
  input  logic [ROWS-1:0][COLS-1:0] spad_pulse,  // [row][col]
  input  logic                      reset,
  input  logic                      latch,
  input  logic [ROWS-1:0]           row_sel,     // one-hot
  output logic [COLS-1:0][W-1:0]    col_bus
);

  logic [ROWS-1:0][COLS-1:0][W-1:0] pix_out;

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      spad_pixel #(.W(W), .SATURATE(SATURATE)) u_pixel (
        .spad_pulse(spad_pulse[r][c]),
        .reset     (reset),
        .latch     (latch),
        .row_sel   (row_sel[r]),
        .bus_out   (pix_out[r][c])
      );
    end
  end

  // one wired-OR column bus per column
  for (genvar c = 0; c < COLS; c++) begin : g_bus
    always_comb begin
      col_bus[c] = '0;
      for (int unsigned r = 0; r < ROWS; r++)
        col_bus[c] |= pix_out[r][c];
    end
  end

endmodule
