// tb_pixel_latch: checks the in-pixel latch register. While LATCH is high
// the output follows the input; after LATCH falls it holds the last value
// whatever the input does.
module tb_pixel_latch;
  int checks = 0, failures = 0;
  logic       latch = 1'b0;
  logic [7:0] d = '0, q, held;

  pixel_latch #(.W(8)) dut (.latch(latch), .d(d), .q(q));

  task automatic check(logic [7:0] exp, string what);
    checks++;
    if (q !== exp) begin
      failures++;
      $display("FAIL %s: q=%0d expected %0d", what, q, exp);
    end
  endtask

  initial begin
    for (int i = 0; i < 50; i++) begin
      latch = 1'b1;
      d = 8'($urandom);
      #5 check(d, "transparent");
      d = 8'($urandom);
      #5 check(d, "follows");
      held = d;
      latch = 1'b0;
      #5;
      repeat (4) begin
        d = 8'($urandom);
        #5 check(held, "holds");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
