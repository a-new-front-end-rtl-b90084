// rcb_top: the FPGA of the Readout Common Board (RCB).
//
// It terminates the N_LINKS full-duplex links from the column controllers
// (one link_frame_rx each), runs the segment_controller that handles the L0
// trigger, the busy flag and event building, and hands the built events
// either to the SIU/DDL2 interface (siu_ddl2) or, with siu_en low, to the
// port that feeds the GBT link bank. The GBT encoder/scrambler and the
// transceiver serialisers are not part of this RTL: link_rx/link_tx are the
// parallel sides of the transceivers, gbt_* is the data side of the GBT bank.
//
// siu_en selects the output path and should only change while busy is low.
// The block structure follows the RCB top level of the readout (segment
// controller, GBT bank, SIU DDL2, transceiver IP); the widths and handshakes
// are this design's own.
module rcb_top
  import cpv_pkg::*;
#(
  parameter int unsigned N_LINKS   = 4,
  parameter int unsigned BUF_DEPTH = 4 * DL_CARD_WORDS,
  parameter int unsigned TIMEOUT   = 1 << 20
) (
  input  logic               clk,
  input  logic               rst_n,
  // trigger system
  input  logic               l0,
  output logic               busy,
  // column links
  input  link_word_t         link_rx [N_LINKS],
  output link_word_t         link_tx [N_LINKS],
  // output path select
  input  logic               siu_en,
  // SIU / DDL2
  input  logic               ddl_cmd_valid,
  input  logic [31:0]        ddl_cmd,
  input  logic               ddl_fc_stop,
  output logic               ddl_valid,
  output logic               ddl_ctrl,
  output logic [31:0]        ddl_data,
  output logic               ddl_open,
  // GBT bank data side
  output logic [31:0]        gbt_data,
  output logic               gbt_valid,
  output logic               gbt_last,
  input  logic               gbt_ready,
  // status
  output logic [15:0]        event_no,
  output logic [31:0]        l0_accepted,
  output logic [31:0]        l0_refused,
  output logic [31:0]        timeouts,
  output logic [31:0]        ddl_blocks,
  output logic [15:0]        crc_err    [N_LINKS],
  output logic [15:0]        lane_err   [N_LINKS],
  output logic [15:0]        format_err [N_LINKS],
  output logic [15:0]        buf_perr_count
);
  logic [N_LINKS-1:0] frame_valid, frame_ok, frame_ack, buf_empty, buf_pop, buf_perr;
  logic [15:0]        frame_words [N_LINKS];
  logic [15:0]        frame_event [N_LINKS];
  logic [5:0]         frame_col   [N_LINKS];
  logic [31:0]        buf_data    [N_LINKS];
  logic [31:0]        s_data;
  logic               s_valid, s_last, s_ready, siu_ready;

  for (genvar i = 0; i < N_LINKS; i++) begin : g_link
    link_frame_rx #(.BUF_DEPTH(BUF_DEPTH)) u_rx (
      .clk, .rst_n, .rx(link_rx[i]),
      .frame_valid(frame_valid[i]), .frame_ok(frame_ok[i]), .frame_event(frame_event[i]),
      .frame_col(frame_col[i]), .frame_words(frame_words[i]), .frame_ack(frame_ack[i]),
      .buf_empty(buf_empty[i]), .buf_data(buf_data[i]), .buf_perr(buf_perr[i]),
      .buf_pop(buf_pop[i]),
      .crc_err(crc_err[i]), .lane_err(lane_err[i]), .format_err(format_err[i])
    );
  end

  segment_controller #(.N_LINKS(N_LINKS), .TIMEOUT(TIMEOUT)) u_seg (
    .clk, .rst_n, .l0, .busy, .link_tx,
    .frame_valid, .frame_ok, .frame_words, .frame_col, .frame_ack,
    .buf_empty, .buf_data, .buf_pop,
    .out_data(s_data), .out_valid(s_valid), .out_last(s_last), .out_ready(s_ready),
    .event_no, .l0_accepted, .l0_refused, .timeouts
  );

  siu_ddl2 u_siu (
    .clk, .rst_n, .cmd_valid(ddl_cmd_valid), .cmd(ddl_cmd), .fc_stop(ddl_fc_stop),
    .ddl_valid, .ddl_ctrl, .ddl_data,
    .in_data(s_data), .in_valid(s_valid && siu_en), .in_last(s_last), .in_ready(siu_ready),
    .is_open(ddl_open), .blocks(ddl_blocks)
  );

  assign s_ready   = siu_en ? siu_ready : gbt_ready;
  assign gbt_data  = s_data;
  assign gbt_valid = s_valid && !siu_en;
  assign gbt_last  = s_last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                  buf_perr_count <= '0;
    else if (|(buf_pop & buf_perr)) buf_perr_count <= buf_perr_count + 1'b1;
  end

  logic unused;
  always_comb begin
    unused = 1'b0;
    for (int i = 0; i < N_LINKS; i++) unused ^= ^frame_event[i];
  end
endmodule
