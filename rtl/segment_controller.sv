// segment_controller: event control of the Readout Common Board.
//
// An L0 trigger from the trigger system starts an event. The controller
// raises busy, numbers the event, and sends a trigger control word down every
// column link in the same clock. It then waits until every link_frame_rx has
// a complete frame (or TIMEOUT clocks have passed) and sends the event on its
// output stream:
//   10 words  Common Data Header (CDH, 40 bytes)
//     w0 block length in bytes, CDH included
//     w1 CDH version (31:24), event number (15:0)
//     w2 number of accepted L0 triggers
//     w3 link present mask (15:8), link error mask (7:0)
//     w4 number of L0 triggers refused while busy
//     w5..w9 zero
//   per link, in link order: one link header word
//     (31:30 = 2'b11, 29:27 link, 26 present, 25 CRC/format ok,
//      21:16 column id, 15:0 word count) and the link's data words.
// busy stays high from the L0 until the last word has been accepted
// (out_valid && out_ready && out_last); an L0 during busy is refused and
// counted. The stream uses a valid/ready handshake so that the DDL2 flow
// control can hold it back.
//
// From the readout: L0 in, busy from L0 to the end of transmission, the
// 10-word CDH carrying the event number, data merged from the column links.
// This design's choices: the CDH fields other than length and event number,
// the link header word, the timeout, and sending the links one after another.
module segment_controller
  import cpv_pkg::*;
#(
  parameter int unsigned N_LINKS = 4,
  parameter int unsigned TIMEOUT = 1 << 20
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               l0,
  output logic               busy,
  // column links
  output link_word_t         link_tx     [N_LINKS],
  input  logic [N_LINKS-1:0] frame_valid,
  input  logic [N_LINKS-1:0] frame_ok,
  input  logic [15:0]        frame_words [N_LINKS],
  input  logic [5:0]         frame_col   [N_LINKS],
  output logic [N_LINKS-1:0] frame_ack,
  input  logic [N_LINKS-1:0] buf_empty,
  input  logic [31:0]        buf_data    [N_LINKS],
  output logic [N_LINKS-1:0] buf_pop,
  // event stream
  output logic [31:0]        out_data,
  output logic               out_valid,
  output logic               out_last,
  input  logic               out_ready,
  // status
  output logic [15:0]        event_no,
  output logic [31:0]        l0_accepted,
  output logic [31:0]        l0_refused,
  output logic [31:0]        timeouts
);
  localparam int unsigned LW = (N_LINKS > 1) ? $clog2(N_LINKS) : 1;

  typedef enum logic [2:0] {S_IDLE, S_TRIG, S_WAIT, S_CDH, S_LHDR, S_LDATA} state_e;
  state_e             state;
  logic [3:0]         cdh_idx;
  logic [LW-1:0]      lnk;
  logic [15:0]        cnt;
  logic [N_LINKS-1:0] present;
  logic [31:0]        len_bytes;
  logic [31:0]        tmr;
  logic               fire;
  logic               last_link;
  logic [N_LINKS-1:0] link_bad;

  assign link_bad  = present & ~frame_ok;

  assign fire      = out_valid && out_ready;
  assign last_link = (lnk == LW'(N_LINKS - 1));

  function automatic logic [31:0] cdh_word(logic [3:0] i);
    unique case (i)
      4'd0:    return len_bytes;
      4'd1:    return {CDH_VERSION, 8'h00, event_no};
      4'd2:    return l0_accepted;
      4'd3:    return {16'h0, 8'(present), 8'(link_bad)};
      4'd4:    return l0_refused;
      default: return 32'h0;
    endcase
  endfunction

  // words of the event: CDH, one header per link, the data of present links
  logic [31:0] ev_words;
  always_comb begin
    ev_words = CDH_WORDS;
    for (int i = 0; i < N_LINKS; i++)
      ev_words += 32'd1 + (frame_valid[i] ? 32'(frame_words[i]) : 32'd0);
  end

  always_comb begin
    out_valid = 1'b0;
    out_data  = '0;
    out_last  = 1'b0;
    buf_pop   = '0;
    unique case (state)
      S_CDH: begin
        out_valid = 1'b1;
        out_data  = cdh_word(cdh_idx);
      end
      S_LHDR: begin
        out_valid = 1'b1;
        out_data  = {2'b11, 3'(lnk), present[lnk], frame_ok[lnk] & present[lnk], 3'h0,
                     frame_col[lnk], present[lnk] ? frame_words[lnk] : 16'h0};
        out_last  = last_link && !(present[lnk] && frame_words[lnk] != '0);
      end
      S_LDATA: begin
        out_valid    = !buf_empty[lnk];
        out_data     = buf_data[lnk];
        out_last     = last_link && (cnt + 1'b1 == frame_words[lnk]);
        buf_pop[lnk] = out_ready && !buf_empty[lnk];
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      cdh_idx     <= '0;
      lnk         <= '0;
      cnt         <= '0;
      present     <= '0;
      len_bytes   <= '0;
      tmr         <= '0;
      event_no    <= '0;
      l0_accepted <= '0;
      l0_refused  <= '0;
      timeouts    <= '0;
      frame_ack   <= '0;
      for (int i = 0; i < N_LINKS; i++) link_tx[i] <= LINK_IDLE;
    end else begin
      frame_ack <= '0;
      for (int i = 0; i < N_LINKS; i++) link_tx[i] <= LINK_IDLE;
      if (l0 && state != S_IDLE) l0_refused <= l0_refused + 1'b1;
      unique case (state)
        S_IDLE: if (l0) begin
          event_no    <= event_no + 1'b1;
          l0_accepted <= l0_accepted + 1'b1;
          state       <= S_TRIG;
        end
        S_TRIG: begin
          for (int i = 0; i < N_LINKS; i++) link_tx[i] <= link_ctrl(LC_TRIG, event_no);
          tmr   <= '0;
          state <= S_WAIT;
        end
        S_WAIT: begin
          tmr <= tmr + 1'b1;
          if (&frame_valid || tmr == TIMEOUT - 1) begin
            len_bytes <= ev_words << 2;
            present   <= frame_valid;
            if (!(&frame_valid)) timeouts <= timeouts + 1'b1;
            cdh_idx   <= '0;
            state     <= S_CDH;
          end
        end
        S_CDH: if (fire) begin
          cdh_idx <= cdh_idx + 1'b1;
          if (cdh_idx == 4'(CDH_WORDS - 1)) begin
            lnk   <= '0;
            state <= S_LHDR;
          end
        end
        S_LHDR: if (fire) begin
          cnt <= '0;
          if (present[lnk] && frame_words[lnk] != '0) state <= S_LDATA;
          else if (last_link) begin
            frame_ack <= present;
            state     <= S_IDLE;
          end else lnk <= lnk + 1'b1;
        end
        S_LDATA: if (fire) begin
          cnt <= cnt + 1'b1;
          if (cnt + 1'b1 == frame_words[lnk]) begin
            if (last_link) begin
              frame_ack <= present;
              state     <= S_IDLE;
            end else begin
              lnk   <= lnk + 1'b1;
              state <= S_LHDR;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);
endmodule
