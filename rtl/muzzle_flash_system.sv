// muzzle_flash_system: the SPAD camera of the muzzle-flash detection system.
//
// A 64x64 photon-counting SPAD imager is read by an FPGA. In the FPGA the
// SPAD controller drives the imager's RESET, LATCH and address pins at a
// 15 kHz frame rate and samples its 64-bit output bus, and the recording
// module stores each complete frame in block RAM and then streams it out.
// The stream (m_*) is where the Ethernet interface to the host attaches;
// the imager's analog front end is outside the model, so each pixel's
// quenched SPAD pulse is an input (spad_pulse[row][col]). The imager's pins
// are also brought out (fmc_*) so that the chip/FPGA interface can be
// observed.
//
// Timing: with the default parameters and a 100 MHz clk, one frame is 6667
// cycles (66.7 us); the readout of the previous frame takes 512 x 5 cycles
// of it. Frame n leaves on the stream during frame n+2 at the latest: it is
// read from the chip during frame n+1 and sent once stored.
module muzzle_flash_system #(
  parameter int unsigned ROWS          = spad_pkg::ROWS,
  parameter int unsigned COLS          = spad_pkg::COLS,
  parameter int unsigned W             = spad_pkg::CNT_W,
  parameter int unsigned K             = spad_pkg::PIX_PER_BUS,
  parameter bit          SATURATE      = 1'b1,
  parameter int unsigned FRAME_CYCLES  = spad_pkg::FRAME_CYCLES,
  parameter int unsigned LATCH_CYCLES  = spad_pkg::LATCH_CYCLES,
  parameter int unsigned GAP_CYCLES    = spad_pkg::GAP_CYCLES,
  parameter int unsigned RESET_CYCLES  = spad_pkg::RESET_CYCLES,
  parameter int unsigned BUNDLE_CYCLES = spad_pkg::BUNDLE_CYCLES,
  localparam int unsigned RAW          = $clog2(ROWS),
  localparam int unsigned GAW          = $clog2(COLS / K),
  localparam int unsigned DW           = K * W
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      start,
  input  logic                      stop,
  // quenched SPAD outputs, one per pixel
  input  logic [ROWS-1:0][COLS-1:0] spad_pulse,
  // imager pins, as driven/seen by the FPGA
  output logic                      fmc_reset,
  output logic                      fmc_latch,
  output logic [RAW-1:0]            fmc_row_addr,
  output logic [GAW-1:0]            fmc_col_addr,
  output logic [DW-1:0]             fmc_data,
  // frame stream towards the Ethernet interface
  output logic                      m_valid,
  input  logic                      m_ready,
  output logic [DW-1:0]             m_data,
  output logic                      m_first,
  output logic                      m_last,
  output logic [15:0]               m_frame_id,
  // status
  output logic                      busy,
  output logic [15:0]               frames_stored,
  output logic [15:0]               frames_sent,
  output logic [15:0]               frames_dropped
);

  logic             pix_valid;
  logic             pix_last;
  logic [RAW-1:0]   pix_row;
  logic [GAW-1:0]   pix_grp;
  logic [DW-1:0]    pix_data;
  logic [15:0]      frame_id;

  spad_imager #(
    .ROWS(ROWS), .COLS(COLS), .W(W), .K(K), .SATURATE(SATURATE)
  ) u_imager (
    .spad_pulse(spad_pulse),
    .reset     (fmc_reset),
    .latch     (fmc_latch),
    .row_addr  (fmc_row_addr),
    .col_addr  (fmc_col_addr),
    .data_out  (fmc_data)
  );

  spad_controller #(
    .ROWS(ROWS), .COLS(COLS), .K(K), .W(W),
    .FRAME_CYCLES(FRAME_CYCLES), .LATCH_CYCLES(LATCH_CYCLES),
    .GAP_CYCLES(GAP_CYCLES), .RESET_CYCLES(RESET_CYCLES),
    .BUNDLE_CYCLES(BUNDLE_CYCLES)
  ) u_ctrl (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (start),
    .stop      (stop),
    .spad_reset(fmc_reset),
    .spad_latch(fmc_latch),
    .row_addr  (fmc_row_addr),
    .col_addr  (fmc_col_addr),
    .spad_data (fmc_data),
    .pix_valid (pix_valid),
    .pix_last  (pix_last),
    .pix_row   (pix_row),
    .pix_grp   (pix_grp),
    .pix_data  (pix_data),
    .frame_id  (frame_id),
    .busy      (busy)
  );

  recording_module #(.ROWS(ROWS), .COLS(COLS), .K(K), .W(W)) u_rec (
    .clk           (clk),
    .rst_n         (rst_n),
    .pix_valid     (pix_valid),
    .pix_last      (pix_last),
    .pix_row       (pix_row),
    .pix_grp       (pix_grp),
    .pix_data      (pix_data),
    .frame_id      (frame_id),
    .m_valid       (m_valid),
    .m_ready       (m_ready),
    .m_data        (m_data),
    .m_first       (m_first),
    .m_last        (m_last),
    .m_frame_id    (m_frame_id),
    .frames_stored (frames_stored),
    .frames_sent   (frames_sent),
    .frames_dropped(frames_dropped)
  );

endmodule
