// tb_col_mux: random column-bus contents; for every one-hot group select the
// output word must hold columns grp*8..grp*8+7 in order, and an empty select
// must give zero.
module tb_col_mux;
  int checks = 0, failures = 0;
  logic [63:0][7:0] col_bus;
  logic [7:0]       grp_sel;
  logic [7:0][7:0]  data;

  col_mux #(.COLS(64), .W(8), .K(8)) dut (.col_bus(col_bus), .grp_sel(grp_sel), .data_out(data));

  initial begin
    for (int t = 0; t < 20; t++) begin
      for (int c = 0; c < 64; c++) col_bus[c] = 8'($urandom);
      for (int g = 0; g < 8; g++) begin
        grp_sel = 8'd1 << g;
        #1;
        for (int j = 0; j < 8; j++) begin
          checks++;
          if (data[j] !== col_bus[g*8 + j]) begin
            failures++;
            $display("FAIL grp=%0d j=%0d got %h expected %h", g, j, data[j], col_bus[g*8+j]);
          end
        end
      end
      grp_sel = '0; #1;
      checks++;
      if (data !== '0) begin failures++; $display("FAIL empty select gives %h", data); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
