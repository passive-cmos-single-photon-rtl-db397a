// tb_frame_dpram: random writes and reads against a reference array,
// including a read while the same cycle writes elsewhere, and a check that
// the read output holds while rd_en is low.
module tb_frame_dpram;
  int checks = 0, failures = 0;
  logic        clk = 1'b0;
  logic        wr_en = 1'b0, rd_en = 1'b0;
  logic [9:0]  wr_addr = '0, rd_addr = '0;
  logic [63:0] wr_data = '0, rd_data, ref_mem [1024], held;

  frame_dpram #(.DW(64), .DEPTH(1024)) dut (
    .clk(clk), .wr_en(wr_en), .wr_addr(wr_addr), .wr_data(wr_data),
    .rd_en(rd_en), .rd_addr(rd_addr), .rd_data(rd_data));

  always #5 clk = ~clk;

  initial begin
    // fill every word
    for (int a = 0; a < 1024; a++) begin
      @(negedge clk);
      wr_en = 1'b1; wr_addr = 10'(a); wr_data = {$urandom, $urandom};
      ref_mem[a] = wr_data;
    end
    @(negedge clk) wr_en = 1'b0;
    // random mixed traffic, read and write to different words
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      rd_en = 1'b1; rd_addr = 10'($urandom);
      wr_en = 1'($urandom); wr_addr = rd_addr ^ 10'h200; wr_data = {$urandom, $urandom};
      @(posedge clk); #1;
      checks++;
      if (rd_data !== ref_mem[rd_addr]) begin
        failures++;
        if (failures < 10) $display("FAIL read %0d got %h expected %h", rd_addr, rd_data, ref_mem[rd_addr]);
      end
      if (wr_en) ref_mem[wr_addr] = wr_data;
    end
    // output holds without rd_en
    @(negedge clk) rd_en = 1'b0; wr_en = 1'b0; held = rd_data;
    repeat (5) begin
      @(negedge clk) rd_addr = 10'($urandom);
      checks++;
      if (rd_data !== held) begin failures++; $display("FAIL output changed without rd_en"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
