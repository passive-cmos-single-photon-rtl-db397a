// tb_spad_pixel: one pixel through several frames. Each frame: RESET,
// a random number of SPAD pulses (some past the 8-bit range), LATCH. During
// the next frame's counting the stored value must stay on the bus while the
// row is selected, and the bus must be zero while it is not.
module tb_spad_pixel;
  int checks = 0, failures = 0;
  logic pulse = 1'b0, reset = 1'b0, latch = 1'b0, row_sel = 1'b0;
  logic [7:0] bus;
  int   n, prev;

  spad_pixel #(.W(8), .SATURATE(1'b1)) dut (
    .spad_pulse(pulse), .reset(reset), .latch(latch), .row_sel(row_sel), .bus_out(bus));

  task automatic send(int k);
    repeat (k) begin #5 pulse = 1'b1; #10 pulse = 1'b0; #5; end
  endtask

  task automatic check(int exp, string what);
    checks++;
    if (bus !== 8'(exp)) begin
      failures++;
      $display("FAIL %s: bus=%0d expected %0d", what, bus, exp);
    end
  endtask

  initial begin
    #2 reset = 1'b1; #10 reset = 1'b0;
    prev = -1;
    for (int f = 0; f < 20; f++) begin
      n = (f % 5 == 4) ? int'($urandom_range(256, 400)) : int'($urandom_range(0, 120));
      // count frame f while frame f-1 is read out
      fork
        send(n);
        begin
          if (prev >= 0) begin
            repeat (6) begin
              row_sel = 1'b1; #3 check(prev, "stored value while counting");
              row_sel = 1'b0; #3 check(0, "unselected bus");
            end
          end
        end
      join
      #10 latch = 1'b1; #10 latch = 1'b0;
      #20 reset = 1'b1; #10 reset = 1'b0;
      prev = (n > 255) ? 255 : n;
      row_sel = 1'b1; #3 check(prev, "after latch");
      row_sel = 1'b0; #3;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
