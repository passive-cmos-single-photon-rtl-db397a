// tb_spad_controller: the FPGA sequencer against a simple model of the
// imager's pins. The model numbers the frames by counting LATCH pulses and
// answers each bundle address with a word made of the frame number, row and
// column group, valid only 35 ns after the address changes (the bus settles
// slowly on the real board). Checked: the LATCH period (6667 cycles =
// 15 kHz), LATCH width, the 20 ns gap from LATCH to RESET, that LATCH and
// RESET never overlap, the scan order and data of all 512 bundles per frame,
// the 50 ns bundle spacing, the readout duration, frame numbering, and stop.
// A second controller runs with the frame time cut to 2600 cycles (26 us,
// about 38 kHz), just above the 2566 cycles its readout needs: its frames
// must keep that period and still deliver all 512 correct bundles.
module tb_spad_controller;
  localparam int FRAME = 6667, BUNDLE = 5, GAP = 2, LATCHW = 2;
  int checks = 0, failures = 0;
  logic        clk = 1'b0, rst_n = 1'b0, start = 1'b0, stop = 1'b0;
  logic        spad_reset, spad_latch;
  logic [5:0]  row_addr;
  logic [2:0]  col_addr;
  logic [63:0] spad_data = '0;
  logic        pix_valid, pix_last, busy;
  logic [5:0]  pix_row;
  logic [2:0]  pix_grp;
  logic [63:0] pix_data;
  logic [15:0] frame_id;

  spad_controller dut (
    .clk(clk), .rst_n(rst_n), .start(start), .stop(stop),
    .spad_reset(spad_reset), .spad_latch(spad_latch),
    .row_addr(row_addr), .col_addr(col_addr), .spad_data(spad_data),
    .pix_valid(pix_valid), .pix_last(pix_last), .pix_row(pix_row), .pix_grp(pix_grp),
    .pix_data(pix_data), .frame_id(frame_id), .busy(busy));

  always #5 clk = ~clk;

  // second controller, shortest frame time that holds the readout
  localparam int FRAME2 = 2600;
  logic        r2, l2, v2, last2, busy2;
  logic [5:0]  ra2, prow2;
  logic [2:0]  ca2, pgrp2;
  logic [63:0] pd2;
  logic [15:0] fid2;
  spad_controller #(.FRAME_CYCLES(FRAME2)) dut2 (
    .clk(clk), .rst_n(rst_n), .start(start), .stop(1'b0),
    .spad_reset(r2), .spad_latch(l2), .row_addr(ra2), .col_addr(ca2),
    .spad_data({16'h5A5A, 16'(ra2), 16'(ca2), 16'h0F0F}),
    .pix_valid(v2), .pix_last(last2), .pix_row(prow2), .pix_grp(pgrp2),
    .pix_data(pd2), .frame_id(fid2), .busy(busy2));

  longint l2_rise = -1;
  int     n2 = 0, frames2 = 0;
  logic   l2_q = 1'b0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  function automatic logic [63:0] word_of(int fr, int r, int g);
    return {16'hA5C3, 16'(fr), 16'(r), 16'(g)};
  endfunction

  // imager model
  int latched = -1;
  always @(posedge spad_latch) latched++;
  always @(row_addr or col_addr or latched) begin
    spad_data = 64'hDEAD_DEAD_DEAD_DEAD;
    spad_data <= #35 word_of(latched, int'(row_addr), int'(col_addr));
  end

  // cycle-level monitors
  longint cyc = 0;
  longint last_latch_rise = -1, latch_fall = -1, last_valid = -1, reset_rise = -1;
  int     nbundle = 0, frames_seen = 0, exp_row = 0, exp_grp = 0;
  logic   latch_q = 1'b0, reset_q = 1'b0;

  always @(posedge clk) begin
    l2_q <= l2;
    if (rst_n) begin
      if (r2 && l2) check(0, "short frame: RESET and LATCH overlap");
      if (l2 && !l2_q) begin
        if (l2_rise >= 0) check(cyc - l2_rise == FRAME2, $sformatf("short frame period %0d", cyc - l2_rise));
        l2_rise = cyc;
      end
      if (v2) begin
        check(pd2 == {16'h5A5A, 16'(prow2), 16'(pgrp2), 16'h0F0F} && int'(prow2) * 8 + int'(pgrp2) == n2,
              "short frame: bundle order and data");
        n2++;
        if (last2) begin
          check(n2 == 512, "short frame: 512 bundles");
          n2 = 0; frames2++;
        end
      end
    end
  end

  always @(posedge clk) begin
    cyc++;
    latch_q <= spad_latch;
    reset_q <= spad_reset;
    if (rst_n) begin
      if (spad_reset && spad_latch) check(0, "RESET and LATCH overlap");
      if (spad_latch && !latch_q) begin
        if (last_latch_rise >= 0)
          check(cyc - last_latch_rise == FRAME, $sformatf("LATCH period %0d", cyc - last_latch_rise));
        last_latch_rise = cyc;
      end
      if (!spad_latch && latch_q) begin
        check(cyc - last_latch_rise == LATCHW, "LATCH width");
        latch_fall = cyc;
      end
      if (spad_reset && !reset_q) begin
        reset_rise = cyc;
        if (latch_fall >= 0)
          check(cyc - latch_fall == GAP, $sformatf("LATCH-to-RESET gap %0d", cyc - latch_fall));
      end
      if (pix_valid) begin
        check(int'(pix_row) == exp_row && int'(pix_grp) == exp_grp, "scan order");
        check(pix_data == word_of(frames_seen, exp_row, exp_grp), "bundle data");
        check(int'(frame_id) == frames_seen, "frame_id");
        if (nbundle > 0) check(cyc - last_valid == BUNDLE, "bundle spacing");
        else check(cyc - latch_fall == BUNDLE, "first bundle after LATCH");
        last_valid = cyc;
        nbundle++;
        exp_grp = (exp_grp + 1) % 8;
        if (exp_grp == 0) exp_row++;
        check(pix_last == (nbundle == 512), "pix_last");
        if (pix_last) begin
          check(cyc - latch_fall == 512 * BUNDLE, "readout duration");
          frames_seen++; nbundle = 0; exp_row = 0; exp_grp = 0;
        end
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (3) @(posedge clk);
    check(!busy && !spad_reset && !spad_latch, "idle after reset");
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    @(posedge clk); #1 check(spad_reset, "first RESET follows start");
    wait (frames_seen == 4);
    @(negedge clk) stop = 1'b1;
    @(negedge clk) stop = 1'b0;
    wait (!busy);
    repeat (2) @(posedge clk);
    check(frames_seen == 5, $sformatf("frame after stop read out (%0d)", frames_seen));
    repeat (FRAME + 10) @(posedge clk);
    check(frames_seen == 5 && !spad_latch && !busy, "stays idle after stop");
    check(frames2 >= 12, $sformatf("short-frame controller read %0d frames", frames2));
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
