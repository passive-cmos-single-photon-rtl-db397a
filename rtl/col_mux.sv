// col_mux: output multiplexer of the imager.
//
// The 64 column buses (8 bits each) are split into 8 groups of 8 adjacent
// columns. A one-hot group select from the column decoder routes one group
// onto the 64-bit output bus: column grp*8+j appears in bits [8j+7:8j].
// The document says only that 8 columns are selected at a time; taking
// adjacent columns, and the bit order, are this design's choices. Built as
// an AND-OR mux so that an all-zero select gives an all-zero bus.
module col_mux #(
  parameter int unsigned COLS = 64,
  parameter int unsigned W    = 8,
  parameter int unsigned K    = 8   // columns per output word
) (
  input  logic [COLS-1:0][W-1:0] col_bus,
  input  logic [COLS/K-1:0]      grp_sel,  // one-hot
  output logic [K-1:0][W-1:0]    data_out
);

  always_comb begin
    data_out = '0;
    for (int unsigned g = 0; g < COLS / K; g++)
      for (int unsigned j = 0; j < K; j++)
        data_out[j] |= col_bus[g*K + j] & {W{grp_sel[g]}};
  end

endmodule
