// addr_decoder: binary-to-one-hot address decoder of the imager periphery.
//
// The chip has a row decoder (6 address bits, 64 row selects) and a column
// decoder (3 address bits, one select per group of 8 columns). Both are this
// module with different widths. The output is combinational; en=0 selects
// nothing.
module addr_decoder #(
  parameter int unsigned AW = 6,
  parameter int unsigned N  = 1 << AW
) (
  input  logic [AW-1:0] addr,
  input  logic          en,
  output logic [N-1:0]  sel
);

  always_comb begin
    sel = '0;
    for (int unsigned i = 0; i < N; i++)
      if (en && (addr == AW'(i)))
        sel[i] = 1'b1;
  end

endmodule
