// cpv_readout_top: front-end readout of one RCB segment of the CPV detector.
//
// One Readout Common Board (rcb_top) is linked to N_LINKS column controllers
// (column_controller), each of which reads N_CARDS 5-DiLogic cards, five
// DiLogic chips per card. An L0 trigger reaches the RCB; the RCB raises busy
// and sends the trigger down all links; every column controller holds and
// digitises its Gassiplex channels, reads all its cards at the same time and
// returns a CRC-protected frame; the RCB merges the frames behind a Common
// Data Header and sends the event to the DDL2 (SIU) or GBT side. busy drops
// when the last word of the event has left.
//
// The links between the two FPGA types are wired directly: the transceivers
// with their 8B/10B coding and serialisers are outside this RTL, and at their
// parallel sides a working link is a plain connection. The DiLogic chips,
// Gassiplex chips and ADCs are outside the RTL too; their pins are ports here.
// Column ids are the link numbers. One clock drives everything.
module cpv_readout_top
  import cpv_pkg::*;
#(
  parameter int unsigned N_LINKS    = 4,
  parameter int unsigned N_CARDS    = 4,
  parameter int unsigned STRB_DIV   = 4,
  parameter int unsigned N_PULSES   = CH_PER_CHIP,
  parameter int unsigned PULSE_HALF = 2,
  parameter int unsigned HOLD_SETUP = 8,
  parameter int unsigned FIFO_DEPTH = DL_CARD_WORDS,
  parameter int unsigned BUF_DEPTH  = N_CARDS * DL_CARD_WORDS,
  parameter int unsigned TIMEOUT    = 1 << 20
) (
  input  logic                clk,
  input  logic                rst_n,
  // trigger system
  input  logic                l0,
  output logic                busy,
  // 5-DiLogic cards, [link][card]
  output logic [N_CARDS-1:0]  dl_en_in_n  [N_LINKS],
  output logic [N_CARDS-1:0]  dl_str_in_n [N_LINKS],
  input  logic [N_CARDS-1:0]  dl_en_out_n [N_LINKS],
  input  dl_word_t            dl_data     [N_LINKS][N_CARDS],
  // Gassiplex cards, per column controller
  output logic [N_LINKS-1:0]  gas_th,
  output logic [N_LINKS-1:0]  gas_clk,
  // output path select
  input  logic                siu_en,
  // SIU / DDL2
  input  logic                ddl_cmd_valid,
  input  logic [31:0]         ddl_cmd,
  input  logic                ddl_fc_stop,
  output logic                ddl_valid,
  output logic                ddl_ctrl,
  output logic [31:0]         ddl_data,
  output logic                ddl_open,
  // GBT bank data side
  output logic [31:0]         gbt_data,
  output logic                gbt_valid,
  output logic                gbt_last,
  input  logic                gbt_ready,
  // status
  output logic [15:0]         event_no,
  output logic [31:0]         l0_accepted,
  output logic [31:0]         l0_refused,
  output logic [31:0]         timeouts,
  output logic [31:0]         ddl_blocks,
  output logic [15:0]         crc_err    [N_LINKS],
  output logic [15:0]         lane_err   [N_LINKS],
  output logic [15:0]         format_err [N_LINKS],
  output logic [15:0]         buf_perr_count,
  output logic [N_LINKS-1:0]  col_busy,
  output logic [15:0]         col_trig_dropped [N_LINKS],
  output logic [15:0]         col_perr_count   [N_LINKS]
);
  link_word_t up   [N_LINKS];  // column -> RCB
  link_word_t down [N_LINKS];  // RCB -> column

  rcb_top #(.N_LINKS(N_LINKS), .BUF_DEPTH(BUF_DEPTH), .TIMEOUT(TIMEOUT)) u_rcb (
    .clk, .rst_n, .l0, .busy, .link_rx(up), .link_tx(down), .siu_en,
    .ddl_cmd_valid, .ddl_cmd, .ddl_fc_stop, .ddl_valid, .ddl_ctrl, .ddl_data, .ddl_open,
    .gbt_data, .gbt_valid, .gbt_last, .gbt_ready,
    .event_no, .l0_accepted, .l0_refused, .timeouts, .ddl_blocks,
    .crc_err, .lane_err, .format_err, .buf_perr_count
  );

  for (genvar i = 0; i < N_LINKS; i++) begin : g_col
    logic [15:0] col_event;
    column_controller #(
      .N_CARDS(N_CARDS), .STRB_DIV(STRB_DIV), .N_PULSES(N_PULSES), .PULSE_HALF(PULSE_HALF),
      .HOLD_SETUP(HOLD_SETUP), .FIFO_DEPTH(FIFO_DEPTH)
    ) u_col (
      .clk, .rst_n, .col_id(6'(i)), .rx(down[i]), .tx(up[i]),
      .dl_en_in_n(dl_en_in_n[i]), .dl_str_in_n(dl_str_in_n[i]),
      .dl_en_out_n(dl_en_out_n[i]), .dl_data(dl_data[i]),
      .gas_th(gas_th[i]), .gas_clk(gas_clk[i]),
      .busy(col_busy[i]), .event_no(col_event),
      .trig_dropped(col_trig_dropped[i]), .perr_count(col_perr_count[i])
    );
  end
endmodule
