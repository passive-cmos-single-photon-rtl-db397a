// frame_reader: reads one stored frame out of the frame RAM as a stream.
//
// When req is high while the reader is idle, it reads the WORDS words of
// bank req_bank in address order (row-major, 8 pixels per word) and sends
// them on a valid/ready stream towards the Ethernet interface. m_first and
// m_last mark the frame's first and last word, and m_frame_id carries the
// frame number. It issues a RAM read whenever the output word is empty or
// being taken, so it sends one word per cycle when the sink is always
// ready and simply holds (the RAM output does not change without rd_en)
// when the sink stalls. done pulses when the last word has been taken,
// which frees the bank. The document names this block only; the stream
// interface and the one-word-per-cycle schedule are this design's.
//
// The stream assertion below uses rst_n in its disable condition, which is
// why lint reports rst_n as used both asynchronously and synchronously; the
// logic itself uses it only as an asynchronous reset.
module frame_reader #(
  parameter int unsigned DW    = 64,
  parameter int unsigned WORDS = 512,
  parameter int unsigned BANKS = 2,
  localparam int unsigned WAW  = $clog2(WORDS),
  localparam int unsigned BAW  = (BANKS > 1) ? $clog2(BANKS) : 1,
  localparam int unsigned AW   = $clog2(WORDS * BANKS)
) (
  input  logic           clk,
  input  logic           rst_n,
  // request: a full bank is waiting
  input  logic           req,
  input  logic [BAW-1:0] req_bank,
  input  logic [15:0]    req_frame_id,
  output logic           idle,
  output logic           done,
  // frame RAM read port
  output logic           rd_en,
  output logic [AW-1:0]  rd_addr,
  input  logic [DW-1:0]  rd_data,
  // output stream
  output logic           m_valid,
  input  logic           m_ready,
  output logic [DW-1:0]  m_data,
  output logic           m_first,
  output logic           m_last,
  output logic [15:0]    m_frame_id
);

  logic           active;
  logic [BAW-1:0] bank;
  logic [WAW-1:0] idx;

  wire advance = !m_valid || m_ready;

  assign rd_en   = active && advance;
  assign rd_addr = AW'(bank) * AW'(WORDS) + AW'(idx);
  assign m_data  = rd_data;
  assign idle    = !active && !m_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active     <= 1'b0;
      bank       <= '0;
      idx        <= '0;
      m_valid    <= 1'b0;
      m_first    <= 1'b0;
      m_last     <= 1'b0;
      m_frame_id <= '0;
      done       <= 1'b0;
    end else begin
      done <= 1'b0;
      if (idle && req) begin
        active     <= 1'b1;
        bank       <= req_bank;
        idx        <= '0;
        m_frame_id <= req_frame_id;
      end
      if (rd_en) begin
        m_valid <= 1'b1;
        m_first <= (idx == '0);
        m_last  <= (idx == WAW'(WORDS - 1));
        idx     <= idx + 1'b1;
        if (idx == WAW'(WORDS - 1))
          active <= 1'b0;
      end else if (m_valid && m_ready) begin
        m_valid <= 1'b0;
      end
      if (m_valid && m_ready && m_last)
        done <= 1'b1;
    end
  end

  // Stream rule: a word that is offered stays unchanged until it is taken.
  assert property (@(posedge clk) disable iff (!rst_n)
                   m_valid && !m_ready |=> m_valid && $stable(m_data) && $stable(m_last))
    else $error("frame_reader: stream word changed before it was taken");

endmodule
