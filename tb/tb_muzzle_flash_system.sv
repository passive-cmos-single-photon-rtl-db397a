// tb_muzzle_flash_system: the whole camera at its default size and timing
// (64x64 pixels, 15 kHz frames of 6667 cycles at 100 MHz), end to end.
//
// A scene model gives every pixel of every frame a photon count: a random
// ground-clutter background of 0..40 counts (about 20 on average) and, in
// some frames, a muzzle flash spread over two vertically adjacent pixels,
// bright enough in some frames to pass the 8-bit range. The pulses are
// sent after each RESET at 20 ns spacing, so they overlap the readout of the
// previous frame. The stream sink takes words with random backpressure and
// stops entirely for a few frame times, so that frames must be dropped.
//
// Checked: every received frame is complete and each pixel equals the
// count the scene gave it (clipped at 255); frame numbers increase; the
// LATCH period is 6667 cycles and each readout takes 512 x 5 cycles; the
// status counters agree with what was seen; acquisition stops cleanly.
// Each mechanism - counter saturation, counting during readout, stream
// backpressure, frame drop, stop - is counted and must occur at least once.
module tb_muzzle_flash_system;
  localparam int R = 64, C = 64, WORDS = 512, FRAME = 6667, NFRAMES = 9;
  int checks = 0, failures = 0;
  logic              clk = 1'b0, rst_n = 1'b0, start = 1'b0, stop = 1'b0;
  logic [R-1:0][C-1:0] spad = '0;
  logic              fmc_reset, fmc_latch;
  logic [5:0]        fmc_row_addr;
  logic [2:0]        fmc_col_addr;
  logic [63:0]       fmc_data;
  logic              m_valid, m_ready = 1'b0, m_first, m_last;
  logic [63:0]       m_data;
  logic [15:0]       m_frame_id, frames_stored, frames_sent, frames_dropped;
  logic              busy;

  muzzle_flash_system dut (
    .clk(clk), .rst_n(rst_n), .start(start), .stop(stop), .spad_pulse(spad),
    .fmc_reset(fmc_reset), .fmc_latch(fmc_latch), .fmc_row_addr(fmc_row_addr),
    .fmc_col_addr(fmc_col_addr), .fmc_data(fmc_data),
    .m_valid(m_valid), .m_ready(m_ready), .m_data(m_data), .m_first(m_first),
    .m_last(m_last), .m_frame_id(m_frame_id), .busy(busy),
    .frames_stored(frames_stored), .frames_sent(frames_sent), .frames_dropped(frames_dropped));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL at %0t: %s", $time, what); end
  endtask

  // Scene: photons seen by pixel (r,c) in frame f.
  function automatic int photons(int f, int r, int c);
    int unsigned h = (f * 73856093) ^ (r * 19349663) ^ (c * 83492791);
    h = h ^ (h >> 13); h = h * 32'h5bd1e995; h = h ^ (h >> 15);
    if (f % 3 == 2 && c == 30 && r == 24 + f) return 300;   // flash, saturates
    if (f % 3 == 2 && c == 30 && r == 25 + f) return 256;
    if (f % 3 == 1 && c == 12 && r == 40)     return 180;   // dimmer flash
    if (f % 3 == 1 && c == 12 && r == 41)     return 150;
    return int'(h % 41);
  endfunction

  // mechanism counters
  int n_saturated = 0, n_count_during_read = 0, n_stall = 0, n_drop_seen = 0, n_stop = 0;

  // Pulse source: after each RESET, send every pixel its photons.
  int frame_started = -1;
  initial begin
    @(posedge rst_n);
    forever begin
      @(negedge fmc_reset);
      frame_started++;
      repeat (3) @(negedge clk);
      for (int k = 0; k < 300; k++) begin
        for (int r = 0; r < R; r++)
          for (int c = 0; c < C; c++)
            spad[r][c] = (k < photons(frame_started, r, c));
        if (dut.u_ctrl.reading) n_count_during_read++;
        @(negedge clk) spad = '0;
        @(negedge clk);
      end
    end
  end

  // Interface timing monitor.
  longint cyc = 0, latch_rise = -1, latch_fall = -1;
  int     latches = 0, readouts = 0;
  logic   latch_q = 1'b0;
  always @(posedge clk) begin
    cyc++;
    latch_q <= fmc_latch;
    if (rst_n) begin
      if (fmc_reset && fmc_latch) check(0, "RESET and LATCH overlap");
      if (fmc_latch && !latch_q) begin
        if (latch_rise >= 0) check(cyc - latch_rise == FRAME, $sformatf("frame period %0d", cyc - latch_rise));
        latch_rise = cyc; latches++;
      end
      if (!fmc_latch && latch_q) latch_fall = cyc;
      if (dut.u_ctrl.pix_valid && dut.u_ctrl.pix_last) begin
        check(cyc - latch_fall == WORDS * 5, $sformatf("readout took %0d cycles", cyc - latch_fall));
        readouts++;
      end
    end
  end

  // Stream sink.
  int  got = 0, nrecv = 0, cur_id = -1, last_id = -1, pix_bad = 0;
  int  pr, pc, pp, pe;
  bit  hold = 1'b0;
  always @(posedge clk) begin
    if (rst_n && m_valid && !m_ready) n_stall++;
    if (rst_n && m_valid && m_ready) begin
      if (got == 0) begin
        cur_id = int'(m_frame_id);
        check(m_first, "m_first on first word");
        check(cur_id > last_id, $sformatf("frame %0d after %0d", cur_id, last_id));
        if (last_id >= 0 && cur_id > last_id + 1) n_drop_seen++;
      end
      for (int j = 0; j < 8; j++) begin
        pr = got / 8;
        pc = (got % 8) * 8 + j;
        pp = photons(cur_id, pr, pc);
        pe = (pp > 255) ? 255 : pp;
        checks++;
        if (int'(m_data[8*j +: 8]) != pe) begin
          failures++; pix_bad++;
          if (pix_bad < 10) $display("FAIL frame %0d pixel (%0d,%0d) = %0d, expected %0d",
                                     cur_id, pr, pc, m_data[8*j +: 8], pe);
        end
        if (pp > 255 && m_data[8*j +: 8] == 8'hFF) n_saturated++;
      end
      check(m_last == (got == WORDS - 1), "m_last");
      got++;
      if (got == WORDS) begin got = 0; nrecv++; last_id = cur_id; end
    end
    m_ready <= !hold && ($urandom_range(0, 99) < 75);
  end

  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    repeat (4) @(posedge clk);
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    // let three frames through, then stall the sink for four frame times
    wait (nrecv == 3);
    hold = 1'b1;
    repeat (4 * FRAME) @(posedge clk);
    hold = 1'b0;
    wait (latches == NFRAMES);
    @(negedge clk) stop = 1'b1;
    @(negedge clk) stop = 1'b0;
    wait (!busy);
    n_stop++;
    repeat (3 * WORDS + 100) @(posedge clk);
    repeat (FRAME) @(posedge clk);
    // stop takes effect at the next LATCH, whose frame is still read out
    check(!busy && latches == NFRAMES + 1, $sformatf("%0d LATCH pulses", latches));
    check(readouts == latches, $sformatf("%0d readouts for %0d frames", readouts, latches));
    check(int'(frames_stored) + int'(frames_dropped) == latches, "stored + dropped = frames");
    check(int'(frames_sent) == nrecv && nrecv == int'(frames_stored), "sent = received = stored");
    check(got == 0, "no partial frame");
    $display("mechanisms: saturated=%0d count_during_read=%0d stall=%0d drop=%0d stop=%0d",
             n_saturated, n_count_during_read, n_stall, frames_dropped, n_stop);
    check(n_saturated > 0, "counter saturation happened");
    check(n_count_during_read > 0, "counting during readout happened");
    check(n_stall > 0, "stream backpressure happened");
    check(frames_dropped > 0 && n_drop_seen > 0, "frame drop happened");
    check(n_stop > 0, "stop happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_500_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
