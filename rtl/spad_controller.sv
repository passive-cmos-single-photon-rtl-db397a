// spad_controller: FPGA-side sequencer of the SPAD imager.
//
// It drives the imager's global RESET and LATCH pins and its address bus,
// and samples the 64-bit data bus. After start it sends one RESET to begin
// the first frame. Every FRAME_CYCLES from then on it ends the frame with a
// LATCH pulse, waits GAP_CYCLES (20 ns in the imager description), and sends
// RESET to begin the next one. While the new frame integrates, it reads the
// latched frame out: the row address moves slowly, the column-group address
// quickly, and each of the ROWS*COLS/8 bundle addresses is held for
// BUNDLE_CYCLES (50 ns, the measured minimum) and sampled in its last cycle.
// Each sampled bundle leaves on pix_* for one cycle; pix_last marks the final
// bundle of a frame and frame_id numbers the frames. Because the data read
// during frame n+1 is frame n's, the output lags the light by one frame.
//
// The 100 MHz clock, the 2-cycle LATCH and RESET pulse widths and the output
// interface are this design's choices. The data bus is sampled directly:
// it is driven by the chip's latched memories, which are stable for the
// whole readout, and the settling wait covers the path delay.
//
// Interface: start is sampled when idle; stop (pulse or level) ends
// acquisition at the next LATCH, whose frame is still read out. A frame time
// too short for the readout is rejected when the module is elaborated.
module spad_controller #(
  parameter int unsigned ROWS          = spad_pkg::ROWS,
  parameter int unsigned COLS          = spad_pkg::COLS,
  parameter int unsigned K             = spad_pkg::PIX_PER_BUS,
  parameter int unsigned W             = spad_pkg::CNT_W,
  parameter int unsigned FRAME_CYCLES  = spad_pkg::FRAME_CYCLES,
  parameter int unsigned LATCH_CYCLES  = spad_pkg::LATCH_CYCLES,
  parameter int unsigned GAP_CYCLES    = spad_pkg::GAP_CYCLES,
  parameter int unsigned RESET_CYCLES  = spad_pkg::RESET_CYCLES,
  parameter int unsigned BUNDLE_CYCLES = spad_pkg::BUNDLE_CYCLES,
  localparam int unsigned RAW          = $clog2(ROWS),
  localparam int unsigned GAW          = $clog2(COLS / K),
  localparam int unsigned FRAME_W      = $clog2(FRAME_CYCLES + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,       // begin acquisition
  input  logic             stop,        // end acquisition at the next frame end
  // imager pins
  output logic             spad_reset,
  output logic             spad_latch,
  output logic [RAW-1:0]   row_addr,
  output logic [GAW-1:0]   col_addr,
  input  logic [K*W-1:0]   spad_data,
  // sampled bundles
  output logic             pix_valid,
  output logic             pix_last,
  output logic [RAW-1:0]   pix_row,
  output logic [GAW-1:0]   pix_grp,
  output logic [K*W-1:0]   pix_data,
  output logic [15:0]      frame_id,    // frame whose data is on pix_*
  output logic             busy
);

  localparam int unsigned BUNDLES = ROWS * COLS / K;
  localparam int unsigned BW      = $clog2(BUNDLE_CYCLES + 1);
  localparam int unsigned PW      = $clog2(LATCH_CYCLES + GAP_CYCLES + RESET_CYCLES + 1);

  // The whole readout has to fit into one frame, after LATCH, gap and RESET.
  if (LATCH_CYCLES + GAP_CYCLES + RESET_CYCLES + BUNDLES * BUNDLE_CYCLES >= FRAME_CYCLES)
  begin : g_frame_too_short
    $error("spad_controller: readout does not fit into FRAME_CYCLES");
  end

  typedef enum logic [2:0] {
    S_IDLE,
    S_RESET,    // RESET pulse
    S_INTEG,    // integration (and readout of the previous frame)
    S_LATCH,    // LATCH pulse
    S_GAP       // pause between LATCH and RESET
  } cmd_state_e;

  cmd_state_e         state;
  logic [FRAME_W-1:0] frame_cnt;   // cycles since the frame's LATCH
  logic [PW-1:0]      pulse_cnt;
  logic               reading;
  logic [BW-1:0]      settle_cnt;
  logic               stop_req;
  logic               have_frame;  // a frame has been integrated since start

  wire frame_end = (frame_cnt == FRAME_W'(FRAME_CYCLES - 1));

  // Command sequencer: RESET, then per frame LATCH / gap / RESET.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      frame_cnt  <= '0;
      pulse_cnt  <= '0;
      spad_reset <= 1'b0;
      spad_latch <= 1'b0;
      stop_req   <= 1'b0;
      have_frame <= 1'b0;
      frame_id   <= '0;
    end else begin
      if (stop) stop_req <= 1'b1;
      frame_cnt <= frame_end ? '0 : frame_cnt + 1'b1;
      unique case (state)
        S_IDLE: begin
          frame_cnt  <= '0;
          have_frame <= 1'b0;
          stop_req   <= 1'b0;
          if (start) begin
            state      <= S_RESET;
            pulse_cnt  <= '0;
            spad_reset <= 1'b1;
          end
        end
        S_RESET: begin
          pulse_cnt <= pulse_cnt + 1'b1;
          if (pulse_cnt == PW'(RESET_CYCLES - 1)) begin
            spad_reset <= 1'b0;
            state      <= S_INTEG;
          end
        end
        S_LATCH: begin
          pulse_cnt <= pulse_cnt + 1'b1;
          if (pulse_cnt == PW'(LATCH_CYCLES - 1)) begin
            spad_latch <= 1'b0;
            pulse_cnt  <= '0;
            if (stop_req) begin
              state <= S_IDLE;      // last latched frame is still read out
            end else if (GAP_CYCLES == 0) begin
              state      <= S_RESET;
              spad_reset <= 1'b1;
            end else begin
              state <= S_GAP;
            end
          end
        end
        S_GAP: begin
          pulse_cnt <= pulse_cnt + 1'b1;
          if (pulse_cnt == PW'(GAP_CYCLES - 1)) begin
            pulse_cnt  <= '0;
            spad_reset <= 1'b1;
            state      <= S_RESET;
          end
        end
        S_INTEG: begin
          if (frame_end) begin
            spad_latch <= 1'b1;
            pulse_cnt  <= '0;
            state      <= S_LATCH;
            have_frame <= 1'b1;
            if (have_frame) frame_id <= frame_id + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Readout of the latched frame: starts when LATCH falls.
  wire latch_done = (state == S_LATCH) && (pulse_cnt == PW'(LATCH_CYCLES - 1));
  wire bundle_done = reading && (settle_cnt == BW'(BUNDLE_CYCLES - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      reading    <= 1'b0;
      settle_cnt <= '0;
      row_addr   <= '0;
      col_addr   <= '0;
      pix_valid  <= 1'b0;
      pix_last   <= 1'b0;
      pix_row    <= '0;
      pix_grp    <= '0;
      pix_data   <= '0;
    end else begin
      pix_valid <= 1'b0;
      pix_last  <= 1'b0;
      if (latch_done) begin
        reading    <= 1'b1;
        settle_cnt <= '0;
        row_addr   <= '0;
        col_addr   <= '0;
      end else if (reading) begin
        settle_cnt <= settle_cnt + 1'b1;
        if (bundle_done) begin
          settle_cnt <= '0;
          pix_valid  <= 1'b1;
          pix_row    <= row_addr;
          pix_grp    <= col_addr;
          pix_data   <= spad_data;
          col_addr   <= col_addr + 1'b1;              // fast address
          if (&col_addr) begin
            row_addr <= row_addr + 1'b1;              // slow address
            if (row_addr == RAW'(ROWS - 1)) begin
              reading  <= 1'b0;
              pix_last <= 1'b1;
            end
          end
        end
      end
    end
  end

  assign busy = (state != S_IDLE) || reading;

endmodule
