// tb_frame_reader: the frame reader with a real frame RAM behind it. Both
// banks are filled with known words; the reader is asked for them in turn.
// With the sink always ready a 512-word frame must leave in 512 consecutive
// cycles; with a random ready the words must still arrive complete, in
// order, with m_first/m_last and the frame number, and done must free the
// bank exactly once per frame.
module tb_frame_reader;
  localparam int WORDS = 512;
  int checks = 0, failures = 0;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic        wr_en = 1'b0;
  logic [9:0]  wr_addr = '0;
  logic [63:0] wr_data = '0;
  logic        req = 1'b0, req_bank = 1'b0;
  logic [15:0] req_frame_id = '0;
  logic        idle, done, rd_en;
  logic [9:0]  rd_addr;
  logic [63:0] rd_data;
  logic        m_valid, m_ready = 1'b0, m_first, m_last;
  logic [63:0] m_data;
  logic [15:0] m_frame_id;
  int          ready_pct = 100;

  frame_dpram #(.DW(64), .DEPTH(2 * WORDS)) u_ram (
    .clk(clk), .wr_en(wr_en), .wr_addr(wr_addr), .wr_data(wr_data),
    .rd_en(rd_en), .rd_addr(rd_addr), .rd_data(rd_data));

  frame_reader #(.DW(64), .WORDS(WORDS), .BANKS(2)) dut (
    .clk(clk), .rst_n(rst_n), .req(req), .req_bank(req_bank), .req_frame_id(req_frame_id),
    .idle(idle), .done(done), .rd_en(rd_en), .rd_addr(rd_addr), .rd_data(rd_data),
    .m_valid(m_valid), .m_ready(m_ready), .m_data(m_data), .m_first(m_first),
    .m_last(m_last), .m_frame_id(m_frame_id));

  always #5 clk = ~clk;

  function automatic logic [63:0] word_of(int bank, int i);
    return {32'hF00D_0000 | 32'(bank), 32'(i * 2654435761)};
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL at %0t: %s", $time, what); end
  endtask

  // sink
  int got = 0, dones = 0, stalls = 0;
  int cur_bank = 0, cur_id = 0;
  longint cyc = 0, first_cyc = 0, last_cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (rst_n && done) dones++;
    if (m_valid && !m_ready) stalls++;
    if (m_valid && m_ready) begin
      check(m_data == word_of(cur_bank, got), $sformatf("word %0d data", got));
      check(m_first == (got == 0), "m_first");
      check(m_last == (got == WORDS - 1), "m_last");
      check(int'(m_frame_id) == cur_id, "m_frame_id");
      if (got == 0) first_cyc = cyc;
      last_cyc = cyc;
      got++;
    end
    m_ready <= (int'($urandom_range(0, 99)) < ready_pct);
  end

  task automatic read_frame(int bank, int id, int pct);
    ready_pct = pct;
    @(negedge clk);
    wait (idle);
    @(negedge clk);
    cur_bank = bank; cur_id = id; got = 0;
    req = 1'b1; req_bank = bank[0]; req_frame_id = 16'(id);
    @(negedge clk) req = 1'b0;
    check(!idle, "busy after request");
    wait (got == WORDS);
    @(posedge clk); @(posedge clk);
  endtask

  initial begin
    for (int a = 0; a < 2 * WORDS; a++) begin
      @(negedge clk);
      wr_en = 1'b1; wr_addr = 10'(a); wr_data = word_of(a / WORDS, a % WORDS);
    end
    @(negedge clk) wr_en = 1'b0;
    rst_n = 1'b1;
    // full rate
    read_frame(0, 7, 100);
    check(last_cyc - first_cyc == WORDS - 1, $sformatf("full-rate frame took %0d cycles", last_cyc - first_cyc + 1));
    check(dones == 1, "one done per frame");
    read_frame(1, 8, 100);
    // backpressure
    read_frame(0, 9, 40);
    read_frame(1, 10, 70);
    check(dones == 4, $sformatf("done count %0d", dones));
    check(stalls > 0, "sink stalled at least once");
    check(idle, "idle at end");
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
