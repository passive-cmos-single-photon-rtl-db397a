// spad_imager: digital logic of the 64x64 SPAD imager chip.
//
// The chip has no clock. Its 11 control inputs are a 6-bit row address, a
// 3-bit column-group address, and the global RESET and LATCH; its 64 outputs
// carry 8 pixels of 8 bits. The row decoder selects one row, whose stored
// counts appear on the 64 column buses; the column decoder and output
// multiplexer put 8 adjacent columns on the output bus. The output is
// combinational from the address: the FPGA waits for it to settle (about
// 50 ns on the real board) before sampling.
//
// Frame operation (driven from outside): RESET clears all counters, the
// pixels count for the frame time, LATCH copies all counts into the pixel
// memories at once (global shutter), and after a short gap RESET starts the
// next frame while the stored frame is read out bundle by bundle.
//
// The split of the 11 control pins into 6 row bits, 3 column bits, RESET and
// LATCH is this design's reading of the pin count; the analog SPAD, its
// passive quenching circuit, the pad drivers and the temperature sensors
// are outside this model (spad_pulse is the quenched SPAD output).
module spad_imager
#(
  parameter int unsigned ROWS     = spad_pkg::ROWS,
  parameter int unsigned COLS     = spad_pkg::COLS,
  parameter int unsigned W        = spad_pkg::CNT_W,
  parameter int unsigned K        = spad_pkg::PIX_PER_BUS,
  parameter bit          SATURATE = 1'b1,
  localparam int unsigned RAW     = $clog2(ROWS),
  localparam int unsigned GAW     = $clog2(COLS / K)
) (
  input  logic [ROWS-1:0][COLS-1:0] spad_pulse,  // [row][col]
  input  logic                      reset,       // global RESET pin
  input  logic                      latch,       // global LATCH pin
  input  logic [RAW-1:0]            row_addr,    // slow scan address
  input  logic [GAW-1:0]            col_addr,    // fast scan address
  output logic [K*W-1:0]            data_out     // 8 pixels, pixel j in [8j+7:8j]
);

  logic [ROWS-1:0]            row_sel;
  logic [COLS/K-1:0]          grp_sel;
  logic [COLS-1:0][W-1:0]     col_bus;
  logic [K-1:0][W-1:0]        bus_word;

  addr_decoder #(.AW(RAW), .N(ROWS)) u_row_dec (
    .addr(row_addr), .en(1'b1), .sel(row_sel)
  );

  addr_decoder #(.AW(GAW), .N(COLS / K)) u_col_dec (
    .addr(col_addr), .en(1'b1), .sel(grp_sel)
  );

  pixel_array #(.ROWS(ROWS), .COLS(COLS), .W(W), .SATURATE(SATURATE)) u_array (
    .spad_pulse(spad_pulse),
    .reset     (reset),
    .latch     (latch),
    .row_sel   (row_sel),
    .col_bus   (col_bus)
  );

  col_mux #(.COLS(COLS), .W(W), .K(K)) u_out_mux (
    .col_bus (col_bus),
    .grp_sel (grp_sel),
    .data_out(bus_word)
  );

  assign data_out = bus_word;

endmodule
