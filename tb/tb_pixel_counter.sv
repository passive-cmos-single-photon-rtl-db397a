// tb_pixel_counter: checks the in-pixel photon counter.
// Sends bursts of SPAD pulses with 20 ns spacing, checks the count after
// each burst, checks that RESET clears it asynchronously, and that the
// saturating counter stops at 255 while the wrapping one rolls over.
module tb_pixel_counter;
  int checks = 0, failures = 0;
  logic pulse = 1'b0, reset = 1'b0;
  logic [7:0] cnt_sat, cnt_wrap;

  pixel_counter #(.W(8), .SATURATE(1'b1)) dut_sat  (.spad_pulse(pulse), .reset(reset), .count(cnt_sat));
  pixel_counter #(.W(8), .SATURATE(1'b0)) dut_wrap (.spad_pulse(pulse), .reset(reset), .count(cnt_wrap));

  task automatic send(int n);
    repeat (n) begin #5 pulse = 1'b1; #10 pulse = 1'b0; #5; end
  endtask

  task automatic expect_count(int exp_sat, int exp_wrap);
    #1;
    checks++;
    if (cnt_sat !== 8'(exp_sat) || cnt_wrap !== 8'(exp_wrap)) begin
      failures++;
      $display("FAIL: sat=%0d (exp %0d) wrap=%0d (exp %0d)", cnt_sat, exp_sat, cnt_wrap, exp_wrap);
    end
  endtask

  initial begin
    int total, n;
    #2 reset = 1'b1;
    #20 reset = 1'b0;
    #20 expect_count(0, 0);
    total = 0;
    for (int b = 0; b < 12; b++) begin
      n = int'($urandom_range(1, 40));
      send(n);
      total += n;
      expect_count(total > 255 ? 255 : total, total % 256);
    end
    // asynchronous clear, no pulse needed
    reset = 1'b1; #7 expect_count(0, 0);
    // pulses during reset are not counted
    send(3); expect_count(0, 0);
    reset = 1'b0; #10;
    send(300); expect_count(255, 300 % 256);
    send(1);   expect_count(255, 301 % 256);
    reset = 1'b1; #5 reset = 1'b0; #5;
    send(110); expect_count(110, 110);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
