// tb_recording_module: bundles arrive as from the SPAD controller, one every
// 5 cycles, 512 per frame, one frame every 4000 cycles. Frames 0-2 go to an
// always-ready sink. The sink then stops for frames 3-6: frames 3 and 4
// fill the two banks and frames 5 and 6 must be dropped whole. When the
// sink resumes (with random backpressure) it must receive frames 3, 4, 7,
// 8, 9, each complete and unmixed, and the status counters must agree.
module tb_recording_module;
  localparam int WORDS = 512, PERIOD = 4000, NFR = 10;
  int checks = 0, failures = 0;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic        pix_valid = 1'b0, pix_last = 1'b0;
  logic [5:0]  pix_row = '0;
  logic [2:0]  pix_grp = '0;
  logic [63:0] pix_data = '0;
  logic [15:0] frame_id = '0;
  logic        m_valid, m_ready = 1'b0, m_first, m_last;
  logic [63:0] m_data;
  logic [15:0] m_frame_id, frames_stored, frames_sent, frames_dropped;
  int          ready_pct = 100;

  recording_module dut (
    .clk(clk), .rst_n(rst_n), .pix_valid(pix_valid), .pix_last(pix_last),
    .pix_row(pix_row), .pix_grp(pix_grp), .pix_data(pix_data), .frame_id(frame_id),
    .m_valid(m_valid), .m_ready(m_ready), .m_data(m_data), .m_first(m_first),
    .m_last(m_last), .m_frame_id(m_frame_id), .frames_stored(frames_stored),
    .frames_sent(frames_sent), .frames_dropped(frames_dropped));

  always #5 clk = ~clk;

  function automatic logic [63:0] word_of(int fr, int i);
    return {16'(fr), 16'(i), 32'((fr + 1) * (i + 3) * 40503)};
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL at %0t: %s", $time, what); end
  endtask

  // sink
  int exp_ids [$] = '{0, 1, 2, 3, 4, 7, 8, 9};
  int got = 0, nframes = 0, cur_id = -1, stalls = 0;
  always @(posedge clk) begin
    if (rst_n && m_valid && !m_ready) stalls++;
    if (rst_n && m_valid && m_ready) begin
      if (got == 0) begin
        cur_id = int'(m_frame_id);
        check(nframes < exp_ids.size() && cur_id == exp_ids[nframes],
              $sformatf("received frame %0d as frame number %0d", cur_id, nframes));
      end
      check(m_data == word_of(cur_id, got), $sformatf("frame %0d word %0d", cur_id, got));
      check(m_first == (got == 0) && m_last == (got == WORDS - 1), "first/last");
      got++;
      if (got == WORDS) begin got = 0; nframes++; end
    end
    m_ready <= (int'($urandom_range(0, 99)) < ready_pct);
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < NFR; f++) begin
      if (f == 3) ready_pct = 0;
      for (int i = 0; i < WORDS; i++) begin
        repeat (4) @(negedge clk);
        pix_valid = 1'b1; pix_last = (i == WORDS - 1);
        pix_row = 6'(i / 8); pix_grp = 3'(i % 8);
        pix_data = word_of(f, i); frame_id = 16'(f);
        @(negedge clk) pix_valid = 1'b0; pix_last = 1'b0;
      end
      if (f == 6) ready_pct = 50;   // sink resumes between frames 6 and 7
      repeat (PERIOD - 5 * WORDS) @(negedge clk);
    end
    repeat (3000) @(negedge clk);
    check(nframes == exp_ids.size(), $sformatf("frames received %0d", nframes));
    check(frames_dropped == 16'd2, $sformatf("frames_dropped %0d", frames_dropped));
    check(frames_stored == 16'(NFR - 2), $sformatf("frames_stored %0d", frames_stored));
    check(frames_sent == 16'(exp_ids.size()), $sformatf("frames_sent %0d", frames_sent));
    check(stalls > 0, "sink backpressure seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
