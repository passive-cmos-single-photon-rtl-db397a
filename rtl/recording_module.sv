// recording_module: stores the imager's frames in block RAM and sends each
// complete frame on towards the host.
//
// Bundles arrive from the SPAD controller in scan order. The frame writer
// puts bundle (row, grp) at word row*8+grp of the current bank of the frame
// RAM; when the frame's last bundle is written the bank is marked full and
// writing moves to the other bank. The frame reader empties full banks in
// the order they were filled and streams them out; a bank is free again
// once its last word has been taken. The document gives this order - store
// the full frame, then transmit it - but not the buffering. This design
// keeps two banks; if a new frame begins while its bank is still full
// (the sink has fallen a whole frame behind), the new frame is dropped as a
// whole and counted in frames_dropped, so a sent frame is never a mix of
// two frames.
module recording_module #(
  parameter int unsigned ROWS  = spad_pkg::ROWS,
  parameter int unsigned COLS  = spad_pkg::COLS,
  parameter int unsigned K     = spad_pkg::PIX_PER_BUS,
  parameter int unsigned W     = spad_pkg::CNT_W,
  localparam int unsigned RAW  = $clog2(ROWS),
  localparam int unsigned GAW  = $clog2(COLS / K),
  localparam int unsigned DW   = K * W,
  localparam int unsigned WORDS = ROWS * COLS / K
) (
  input  logic           clk,
  input  logic           rst_n,
  // bundles from the SPAD controller
  input  logic           pix_valid,
  input  logic           pix_last,
  input  logic [RAW-1:0] pix_row,
  input  logic [GAW-1:0] pix_grp,
  input  logic [DW-1:0]  pix_data,
  input  logic [15:0]    frame_id,
  // stream towards the Ethernet interface
  output logic           m_valid,
  input  logic           m_ready,
  output logic [DW-1:0]  m_data,
  output logic           m_first,
  output logic           m_last,
  output logic [15:0]    m_frame_id,
  // status
  output logic [15:0]    frames_stored,
  output logic [15:0]    frames_sent,
  output logic [15:0]    frames_dropped
);

  localparam int unsigned WAW = $clog2(WORDS);
  localparam int unsigned AW  = WAW + 1;

  logic [1:0]       full;
  logic [1:0][15:0] bank_id;
  logic             wr_bank;
  logic             rd_bank;
  logic             dropping;

  logic             wr_en;
  logic [AW-1:0]    wr_addr;
  logic             rd_en;
  logic [AW-1:0]    rd_addr;
  logic [DW-1:0]    rd_data;
  logic             rdr_idle;
  logic             rdr_done;
  logic             start_read;

  wire first_bundle = pix_valid && (pix_row == '0) && (pix_grp == '0);
  // a frame whose first bundle finds its bank still full is dropped
  wire drop_now     = first_bundle ? full[wr_bank] : dropping;
  wire [WAW-1:0] word = WAW'({pix_row, pix_grp});

  assign wr_en      = pix_valid && !drop_now;
  assign wr_addr    = {wr_bank, word};
  assign start_read = rdr_idle && full[rd_bank];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full           <= '0;
      bank_id        <= '0;
      wr_bank        <= 1'b0;
      rd_bank        <= 1'b0;
      dropping       <= 1'b0;
      frames_stored  <= '0;
      frames_sent    <= '0;
      frames_dropped <= '0;
    end else begin
      if (first_bundle) begin
        dropping <= full[wr_bank];
        if (full[wr_bank]) frames_dropped <= frames_dropped + 1'b1;
      end
      if (pix_valid && pix_last && !drop_now) begin
        full[wr_bank]    <= 1'b1;
        bank_id[wr_bank] <= frame_id;
        wr_bank          <= !wr_bank;
        frames_stored    <= frames_stored + 1'b1;
      end
      if (start_read)
        rd_bank <= !rd_bank;
      if (rdr_done) begin
        full[!rd_bank] <= 1'b0;   // rd_bank already points at the next bank
        frames_sent    <= frames_sent + 1'b1;
      end
    end
  end

  frame_dpram #(.DW(DW), .DEPTH(2 * WORDS)) u_ram (
    .clk    (clk),
    .wr_en  (wr_en),
    .wr_addr(wr_addr),
    .wr_data(pix_data),
    .rd_en  (rd_en),
    .rd_addr(rd_addr),
    .rd_data(rd_data)
  );

  frame_reader #(.DW(DW), .WORDS(WORDS), .BANKS(2)) u_reader (
    .clk         (clk),
    .rst_n       (rst_n),
    .req         (start_read),
    .req_bank    (rd_bank),
    .req_frame_id(bank_id[rd_bank]),
    .idle        (rdr_idle),
    .done        (rdr_done),
    .rd_en       (rd_en),
    .rd_addr     (rd_addr),
    .rd_data     (rd_data),
    .m_valid     (m_valid),
    .m_ready     (m_ready),
    .m_data      (m_data),
    .m_first     (m_first),
    .m_last      (m_last),
    .m_frame_id  (m_frame_id)
  );

endmodule
