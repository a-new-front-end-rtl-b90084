// link_frame_rx: RCB receiver for the frames of one column controller link.
//
// It watches the parallel side of the link transceiver. Control words are
// only recognised with their K28.5 comma in byte lane 0; a K flag in any other
// lane counts a lane error. After SOF it expects the header word, the number
// of data words the header announces, the CRC word and EOF. IDLE words may
// appear anywhere and are skipped. Data words go into a parity-protected
// buffer; the CRC-32 is recomputed over header and data and compared with the
// CRC word. At EOF the frame is reported: frame_valid stays high, with the
// event number, column id, word count and frame_ok (CRC and EOF count both
// correct), until frame_ack. A word that breaks the sequence abandons the
// frame, counts a format error and returns to hunting for SOF; its data words
// already in the buffer are flushed. An SOF always starts a new frame, even in
// the middle of one.
//
// Interface: buf_* is the first-word-fall-through head of the data buffer;
// the consumer pops exactly frame_words words before it acknowledges. A frame
// that starts while the previous one is still unacknowledged is refused and
// counted in format_err.
//
// The recovery of the frame from a known byte lane and the CRC check follow
// the readout; the frame layout and error handling are this design's own.
module link_frame_rx
  import cpv_pkg::*;
#(
  parameter int unsigned BUF_DEPTH = 4 * DL_CARD_WORDS
) (
  input  logic        clk,
  input  logic        rst_n,
  input  link_word_t  rx,
  // frame report
  output logic        frame_valid,
  output logic        frame_ok,
  output logic [15:0] frame_event,
  output logic [5:0]  frame_col,
  output logic [15:0] frame_words,
  input  logic        frame_ack,
  // data buffer
  output logic        buf_empty,
  output logic [31:0] buf_data,
  output logic        buf_perr,
  input  logic        buf_pop,
  // error counters
  output logic [15:0] crc_err,
  output logic [15:0] lane_err,
  output logic [15:0] format_err
);
  localparam int unsigned AW = $clog2(BUF_DEPTH);

  typedef enum logic [2:0] {S_HUNT, S_HDR, S_DATA, S_CRC, S_EOF} state_e;
  state_e      state;
  logic [15:0] n_exp, n_got;
  logic        crc_match;
  logic        is_idle, is_sof, is_data, lane_bad;
  logic        crc_init, crc_en;
  logic [31:0] crc, crc_nx;
  logic        push, clr, full;
  logic [AW:0] count;

  assign is_idle  = link_is_ctrl(rx, LC_IDLE);
  assign is_sof   = link_is_ctrl(rx, LC_SOF);
  assign is_data  = (rx.k == 4'b0000);
  assign lane_bad = |rx.k[3:1];

  crc32_d32 u_crc (
    .clk, .rst_n, .init(crc_init), .en(crc_en), .data(rx.data), .crc, .crc_next(crc_nx)
  );

  parity_fifo #(.W(32), .DEPTH(BUF_DEPTH)) u_buf (
    .clk, .rst_n, .clr,
    .wr_en(push), .wr_data(rx.data),
    .rd_en(buf_pop), .rd_data(buf_data), .rd_perr(buf_perr),
    .empty(buf_empty), .full, .count
  );

  always_comb begin
    crc_init = 1'b0;
    crc_en   = 1'b0;
    push     = 1'b0;
    if (is_sof) crc_init = 1'b1;
    unique case (state)
      S_HUNT: crc_init = 1'b1;
      S_HDR:  crc_en   = is_data && rx.data[31:30] == LW_TAG_HDR;
      S_DATA: begin
        crc_en = is_data;
        push   = is_data;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_HUNT;
      n_exp       <= '0;
      n_got       <= '0;
      crc_match   <= 1'b0;
      frame_valid <= 1'b0;
      frame_ok    <= 1'b0;
      frame_event <= '0;
      frame_col   <= '0;
      frame_words <= '0;
      crc_err     <= '0;
      lane_err    <= '0;
      format_err  <= '0;
      clr         <= 1'b0;
    end else begin
      clr <= 1'b0;
      if (frame_ack) frame_valid <= 1'b0;
      if (lane_bad)  lane_err    <= lane_err + 1'b1;
      if (is_sof && !lane_bad) begin
        // a frame start is honoured in any state; one that cuts a frame
        // short abandons it
        if (state != S_HUNT) begin
          format_err <= format_err + 1'b1;
          clr        <= 1'b1;
          state      <= S_HUNT;
        end
        if (frame_valid && !frame_ack) format_err <= format_err + 1'b1;
        else begin
          frame_event <= rx.data[31:16];
          state       <= S_HDR;
        end
      end else if (!is_idle && !lane_bad) begin
        unique case (state)
          S_HUNT: ;
          S_HDR: begin
            if (is_data && rx.data[31:30] == LW_TAG_HDR) begin
              frame_col <= rx.data[29:24];
              n_exp     <= rx.data[15:0];
              n_got     <= '0;
              state     <= (rx.data[15:0] == '0) ? S_CRC : S_DATA;
            end else begin
              format_err <= format_err + 1'b1;
              state      <= S_HUNT;
            end
          end
          S_DATA: begin
            if (is_data) begin
              n_got <= n_got + 1'b1;
              if (n_got + 1'b1 == n_exp) state <= S_CRC;
            end else begin
              format_err <= format_err + 1'b1;
              clr        <= 1'b1;
              state      <= S_HUNT;
            end
          end
          S_CRC: begin
            if (is_data) begin
              crc_match <= (rx.data == crc);
              if (rx.data != crc) crc_err <= crc_err + 1'b1;
              state <= S_EOF;
            end else begin
              format_err <= format_err + 1'b1;
              clr        <= 1'b1;
              state      <= S_HUNT;
            end
          end
          S_EOF: begin
            if (link_is_ctrl(rx, LC_EOF) && rx.data[31:16] == n_exp) begin
              frame_valid <= 1'b1;
              frame_ok    <= crc_match;
              frame_words <= n_exp;
            end else begin
              format_err <= format_err + 1'b1;
              clr        <= 1'b1;
            end
            state <= S_HUNT;
          end
          default: state <= S_HUNT;
        endcase
      end
    end
  end

  logic unused;
  assign unused = ^{crc_nx, full, count};
endmodule
