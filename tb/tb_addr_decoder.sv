// tb_addr_decoder: exhaustive check of the 6-bit row decoder and the 3-bit
// column decoder, with enable on and off.
module tb_addr_decoder;
  int checks = 0, failures = 0;
  logic [5:0]  ra;
  logic [2:0]  ca;
  logic        en;
  logic [63:0] rsel;
  logic [7:0]  csel;

  addr_decoder #(.AW(6), .N(64)) dut_row (.addr(ra), .en(en), .sel(rsel));
  addr_decoder #(.AW(3), .N(8))  dut_col (.addr(ca), .en(en), .sel(csel));

  initial begin
    for (int e = 0; e < 2; e++) begin
      for (int a = 0; a < 64; a++) begin
        en = e[0]; ra = 6'(a); ca = 3'(a);
        #1;
        checks++;
        if (rsel !== (e ? (64'd1 << a) : 64'd0)) begin
          failures++; $display("FAIL row addr=%0d en=%0d sel=%h", a, e, rsel);
        end
        checks++;
        if (csel !== (e ? (8'd1 << (a % 8)) : 8'd0)) begin
          failures++; $display("FAIL col addr=%0d en=%0d sel=%b", a % 8, e, csel);
        end
      end
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
