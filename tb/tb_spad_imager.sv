// tb_spad_imager: the full 64x64 imager chip, driven through its pins.
// Each frame every pixel receives its own number of pulses (a dim random
// background, two bright pixels past full scale). After LATCH and RESET all
// 512 bundle addresses are scanned, row slow and column group fast, and each
// 64-bit word is compared with the expected counts, while the array is
// already counting the next frame.
module tb_spad_imager;
  localparam int R = 64, C = 64;
  int checks = 0, failures = 0;
  logic [R-1:0][C-1:0] pulse = '0;
  logic                reset = 1'b0, latch = 1'b0;
  logic [5:0]          row_addr = '0;
  logic [2:0]          col_addr = '0;
  logic [63:0]         data;
  int                  n   [R][C];
  int                  exp [R][C];
  int                  maxn;

  spad_imager dut (
    .spad_pulse(pulse), .reset(reset), .latch(latch),
    .row_addr(row_addr), .col_addr(col_addr), .data_out(data));

  task automatic integrate(int f);
    maxn = 0;
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++) begin
        n[r][c] = int'($urandom_range(0, 40));
        if (maxn < n[r][c]) maxn = n[r][c];
      end
    n[20 + f][30] = 300;     // bright spot, saturates
    n[21 + f][30] = 256;
    maxn = 300;
    for (int k = 0; k < maxn; k++) begin
      #5;
      for (int r = 0; r < R; r++)
        for (int c = 0; c < C; c++)
          pulse[r][c] = (k < n[r][c]);
      #10 pulse = '0;
      #5;
    end
  endtask

  task automatic scan();
    for (int r = 0; r < R; r++)
      for (int g = 0; g < C / 8; g++) begin
        row_addr = 6'(r); col_addr = 3'(g);
        #10;
        for (int j = 0; j < 8; j++) begin
          checks++;
          if (data[8*j +: 8] !== 8'(exp[r][8*g + j])) begin
            failures++;
            if (failures < 10)
              $display("FAIL pixel (%0d,%0d) read %0d expected %0d", r, 8*g+j, data[8*j +: 8], exp[r][8*g+j]);
          end
        end
      end
  endtask

  initial begin
    #2 reset = 1'b1; #10 reset = 1'b0;
    for (int f = 0; f < 3; f++) begin
      if (f == 0) integrate(f);
      else fork integrate(f); scan(); join
      #10 latch = 1'b1; #10 latch = 1'b0;
      #20 reset = 1'b1; #10 reset = 1'b0;
      for (int r = 0; r < R; r++)
        for (int c = 0; c < C; c++)
          exp[r][c] = (n[r][c] > 255) ? 255 : n[r][c];
    end
    scan();
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
