// frame_dpram: the recording module's frame dual-port block RAM.
//
// One write port (written by the frame writer as bundles arrive from the
// imager) and one read port (used by the frame reader), on one clock. Each
// word is one 64-bit bundle of 8 pixels. The read is registered, as in an
// FPGA block RAM: rd_data shows mem[rd_addr] one cycle after rd_en, and
// holds its value while rd_en is low. The default depth of two frames
// (2 x 512 words) is this design's choice: it lets one frame be sent while
// the next is being stored.
module frame_dpram #(
  parameter int unsigned DW    = 64,
  parameter int unsigned DEPTH = 1024,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  logic [DW-1:0] wr_data,
  input  logic          rd_en,
  input  logic [AW-1:0] rd_addr,
  output logic [DW-1:0] rd_data
);

  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en)
      mem[wr_addr] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rd_en)
      rd_data <= mem[rd_addr];
  end

endmodule
