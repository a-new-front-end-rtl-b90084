// siu_ddl2: front-end side of the DDL2 event data transaction (the SIU
// protocol, optional path of the RCB).
//
// The readout receiver sends commands, the front end answers with status words
// and sends data blocks:
//   RDYRX (ready to receive)  -> CTSTW, the transfer is open
//   while open: each event from the stream is sent as one data block, ended by
//               FESTW with the end-of-data-block (EODB) flag and the block
//               length; fc_stop (the receiver's flow control) pauses data
//   EOBTR (end of block transfer) -> CTSTW after the block in progress, closed
// While the transfer is closed the input stream is held back (in_ready low),
// which keeps the RCB busy.
//
// Word formats (this design's own): a command has its code in bits 7:0 and a
// transaction id in bits 11:8. A status word (ddl_ctrl high) has its code in
// bits 7:0, the transaction id in 11:8, the block length in words in 30:12
// and EODB in bit 31. Data words are sent with ddl_ctrl low. Outputs are
// registered: a word appears one clock after it is accepted.
//
// The command/status sequence follows the DDL transaction of the readout; the
// code values and field positions are assumptions.
module siu_ddl2
  import cpv_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // commands from the readout receiver
  input  logic        cmd_valid,
  input  logic [31:0] cmd,
  input  logic        fc_stop,
  // to the link
  output logic        ddl_valid,
  output logic        ddl_ctrl,
  output logic [31:0] ddl_data,
  // event stream in
  input  logic [31:0] in_data,
  input  logic        in_valid,
  input  logic        in_last,
  output logic        in_ready,
  // status
  output logic        is_open,
  output logic [31:0] blocks
);
  typedef enum logic [1:0] {S_CLOSED, S_OPEN, S_FESTW} state_e;
  state_e      state;
  logic        open_req, close_req;
  logic [3:0]  trid;
  logic [18:0] cnt, blen;
  logic        in_fire;

  assign in_ready = (state == S_OPEN) && !fc_stop && !(close_req && cnt == '0);
  assign in_fire  = in_valid && in_ready;
  assign is_open  = (state != S_CLOSED);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_CLOSED;
      open_req  <= 1'b0;
      close_req <= 1'b0;
      trid      <= '0;
      cnt       <= '0;
      blen      <= '0;
      blocks    <= '0;
      ddl_valid <= 1'b0;
      ddl_ctrl  <= 1'b0;
      ddl_data  <= '0;
    end else begin
      ddl_valid <= 1'b0;
      ddl_ctrl  <= 1'b0;
      unique case (state)
        S_CLOSED: begin
          close_req <= 1'b0;
          if (open_req) begin
            open_req  <= 1'b0;
            ddl_valid <= 1'b1;
            ddl_ctrl  <= 1'b1;
            ddl_data  <= {1'b0, 19'h0, trid, DDL_CTSTW};
            state     <= S_OPEN;
          end
        end
        S_OPEN: begin
          open_req <= 1'b0;
          if (in_fire) begin
            ddl_valid <= 1'b1;
            ddl_data  <= in_data;
            cnt       <= cnt + 1'b1;
            if (in_last) begin
              blen  <= cnt + 1'b1;
              state <= S_FESTW;
            end
          end else if (close_req && cnt == '0) begin
            close_req <= 1'b0;
            ddl_valid <= 1'b1;
            ddl_ctrl  <= 1'b1;
            ddl_data  <= {1'b0, 19'h0, trid, DDL_CTSTW};
            state     <= S_CLOSED;
          end
        end
        S_FESTW: begin
          ddl_valid <= 1'b1;
          ddl_ctrl  <= 1'b1;
          ddl_data  <= {1'b1, blen, trid, DDL_FESTW};
          blocks    <= blocks + 1'b1;
          cnt       <= '0;
          state     <= S_OPEN;
        end
        default: state <= S_CLOSED;
      endcase
      if (cmd_valid && cmd[7:0] == DDL_RDYRX) begin
        open_req <= 1'b1;
        trid     <= cmd[11:8];
      end
      if (cmd_valid && cmd[7:0] == DDL_EOBTR) begin
        close_req <= 1'b1;
        trid      <= cmd[11:8];
      end
    end
  end
endmodule
