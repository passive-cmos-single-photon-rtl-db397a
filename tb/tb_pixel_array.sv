// tb_pixel_array: every pixel of a 16x16 array gets its own number of
// pulses in parallel; after LATCH and a new RESET, each row selected in
// turn must show its stored counts on the column buses, also while the
// array is counting the next frame.
module tb_pixel_array;
  localparam int R = 16, C = 16;
  int checks = 0, failures = 0;
  logic [R-1:0][C-1:0]    pulse = '0;
  logic                   reset = 1'b0, latch = 1'b0;
  logic [R-1:0]           row_sel = '0;
  logic [C-1:0][7:0]      col_bus;
  int                     n   [R][C];
  int                     exp [R][C];
  int                     maxn;

  pixel_array #(.ROWS(R), .COLS(C), .W(8), .SATURATE(1'b1)) dut (
    .spad_pulse(pulse), .reset(reset), .latch(latch), .row_sel(row_sel), .col_bus(col_bus));

  task automatic integrate();
    maxn = 0;
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++) begin
        n[r][c] = ((r + c) % 7 == 0) ? int'($urandom_range(250, 300)) : int'($urandom_range(0, 60));
        if (n[r][c] > maxn) maxn = n[r][c];
      end
    for (int k = 0; k < maxn; k++) begin
      #5;
      for (int r = 0; r < R; r++)
        for (int c = 0; c < C; c++)
          pulse[r][c] = (k < n[r][c]);
      #10 pulse = '0;
      #5;
    end
  endtask

  task automatic read_all();
    for (int r = 0; r < R; r++) begin
      row_sel = R'(1) << r;
      #2;
      for (int c = 0; c < C; c++) begin
        checks++;
        if (col_bus[c] !== 8'(exp[r][c])) begin
          failures++;
          $display("FAIL pixel (%0d,%0d) read %0d expected %0d", r, c, col_bus[c], exp[r][c]);
        end
      end
    end
    row_sel = '0;
  endtask

  initial begin
    #2 reset = 1'b1; #10 reset = 1'b0;
    for (int f = 0; f < 4; f++) begin
      if (f == 0) integrate();
      else fork integrate(); read_all(); join
      #10 latch = 1'b1; #10 latch = 1'b0;
      #20 reset = 1'b1; #10 reset = 1'b0;
      for (int r = 0; r < R; r++)
        for (int c = 0; c < C; c++)
          exp[r][c] = (n[r][c] > 255) ? 255 : n[r][c];
    end
    read_all();
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
